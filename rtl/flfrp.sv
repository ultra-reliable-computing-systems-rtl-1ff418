// flfrp: fault-locating/fault-repair processor for a system of two GAL
// modules (GM0 -> SC0 -> GM1) joined by one switching circuit.
//
// It holds one GAL repair unit per GAL module (MAP, SAP, NC, NR and the
// column/OR repair logic), one switching-circuit repair unit (NSC, MCIR,
// RD/RB/NSA, DEMUX and buffer registers) and the MSCI table, and runs them
// from a central fail-safe maintenance controller:
//
//   init:  program both GALs from their fuse maps and route the SC.
//   maint: repeat rounds of  test+repair GM0, test+repair GM1,
//          test+repair SC0  until a round makes no OR move, or a unit
//          reports that it cannot repair (nogo, the global no-go signal).
//          A round is repeated after an OR move because the columns of
//          the new OR group have not been tested yet.
//
// MSCI: entry [o][i] tells which switching circuit connects the outputs of
// module o to the inputs of module i (Figure-5.3 style l x l table). A GAL
// whose outputs leave through a switching circuit may replace a failing OR
// group by an extra OR, since the SC can reroute; the SC's requests for an
// OR move go to the module in the row of its MSCI entry. A module with no
// MSCI entry drives primary outputs and must keep its OR groups in place.
//
// Host interface: fuse maps (gm_sel, map_*), OLMC settings (cfgsh_*), SC
// pin routing (route_*) and MSCI entries (msci_*) are written while idle;
// init_start and maint_start run the two commands, ending with a done
// pulse and go/nogo. test_mode outputs are high while a unit tests or
// reprograms its block.
//
// The units' own busy/nogo and fault/pass counters are left unconnected:
// the sequencer uses done and go, and the units' test_mode outputs mark
// their busy time. The status-register views (nc, nr, nsc, mcir, src) are
// left unconnected too; the units keep and use them internally.
//
// The unit structure follows the FLFRP of the design; the command set,
// the round-based sequencing and the round limit are this design's own.
module flfrp
  import urcs_pkg::*;
#(
  parameter int unsigned N_VARS     = GAL_VARS,
  parameter int unsigned N_OR       = GAL_ORS,
  parameter int unsigned Y          = GAL_Y,
  parameter int unsigned Y_USED     = GAL_Y_USED,
  parameter int unsigned OR_USED    = SYS_OR_USED,
  parameter int unsigned MAX_ROUNDS = 8,
  localparam int unsigned N_ROWS = 2 * N_VARS,
  localparam int unsigned M      = N_OR * Y,
  localparam int unsigned CW     = $clog2(M),
  localparam int unsigned GW     = (N_OR > 1) ? $clog2(N_OR) : 1,
  localparam int unsigned K      = N_OR
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host
  input  logic                      gm_sel,
  input  logic                      map_we,
  input  logic [CW-1:0]             map_col,
  input  logic [N_ROWS-1:0]         map_data,
  input  logic                      cfgsh_we,
  input  logic [GW-1:0]             cfgsh_idx,
  input  olmc_cfg_t                 cfgsh_data,
  input  logic [CW-1:0]             map_rd_col,
  output logic [N_ROWS-1:0]         map_rd_data,
  input  logic                      route_we,
  input  logic [GW-1:0]             route_out,
  input  logic [GW-1:0]             route_in,
  input  logic                      route_valid,
  input  logic                      msci_we,
  input  logic                      msci_out,
  input  logic                      msci_in,
  input  logic                      msci_valid,
  input  logic                      init_start,
  input  logic                      maint_start,
  output logic                      busy,
  output logic                      done,
  output logic                      go,
  output logic                      nogo,
  // GAL modules
  output logic [1:0]                gm_test_mode,
  output logic [1:0]                gm_scr1_shift,
  output logic [1:0]                gm_scr1_sin,
  output logic [1:0]                gm_scr2_capture,
  output logic [1:0]                gm_scr2_shift,
  input  logic [1:0]                gm_scr2_sout,
  output logic [1:0]                gm_prog_we,
  output logic [1:0][CW-1:0]        gm_prog_col,
  output logic [1:0][N_ROWS-1:0]    gm_prog_data,
  output logic [1:0]                gm_cfg_we,
  output logic [1:0][GW-1:0]        gm_cfg_idx,
  output olmc_cfg_t [1:0]           gm_cfg_data,
  // switching circuit
  output logic                      sc_test_mode,
  output logic                      sc_scr6_shift,
  output logic                      sc_scr6_sin,
  output logic                      sc_scr7_capture,
  output logic                      sc_scr7_shift,
  input  logic                      sc_scr7_sout,
  output logic [2*K-1:0]            sc_dmx_en,
  output logic [2*K-1:0][GW-1:0]    sc_dmx_sel,
  output logic [2*K-1:0]            sc_buf_en,
  // event counters: column re-use, column replacement, OR moves per GAL;
  // dead AND gates, stuck-at-1 lines, spare-line routes, reroutes in the SC
  output logic [1:0][15:0]          cnt_reuse,
  output logic [1:0][15:0]          cnt_replace,
  output logic [1:0][15:0]          cnt_ormove,
  output logic [15:0]               cnt_sc_sa0,
  output logic [15:0]               cnt_sc_sa1,
  output logic [15:0]               cnt_sc_spare,
  output logic [15:0]               cnt_sc_reroute,
  output logic [15:0]               cnt_rounds
);

  typedef enum logic [3:0] {
    C_IDLE, C_INIT_G0, C_INIT_G1, C_INIT_SC,
    C_REP_G0, C_REP_G1, C_REP_SC, C_ROUND_END, C_FINISH
  } cstate_e;

  typedef struct packed {
    logic valid;
    logic sc;    // index of the switching circuit (one in this system)
  } msci_t;

  cstate_e          st_q;
  logic             started_q;
  logic             ok_q;
  logic             moved_q;
  msci_t [1:0][1:0] msci_q;

  // GAL repair unit handshakes
  logic [1:0]              g_init, g_rep, g_done, g_go, g_xor_en;
  logic [1:0]              g_mv_req, g_mv_ack, g_mv_ok, g_moved_valid;
  logic [1:0][GW-1:0]      g_mv_dst, g_moved_from, g_moved_to;
  logic [1:0][N_ROWS-1:0]  g_map_rd;
  // SC repair unit handshakes
  logic                    s_init, s_rep, s_done, s_go;
  logic                    s_mv_req, s_mv_ack, s_mv_ok;
  logic [GW-1:0]           s_mv_src, s_mv_dst;
  logic                    master;   // GAL module feeding the SC

  always_comb begin
    master = msci_q[1][0].valid && !msci_q[0][1].valid;
    for (int g = 0; g < 2; g++) g_xor_en[g] = msci_q[g][0].valid || msci_q[g][1].valid;
  end

  for (genvar g = 0; g < 2; g++) begin : g_gal
    gal_repair_ctrl #(
      .N_ROWS(N_ROWS), .N_OR(N_OR), .Y(Y), .Y_USED(Y_USED), .OR_USED(OR_USED)
    ) u_gal (
      .clk, .rst_n,
      .map_we       (map_we && gm_sel == g),
      .map_col, .map_data,
      .cfgsh_we     (cfgsh_we && gm_sel == g),
      .cfgsh_idx, .cfgsh_data,
      .map_rd_col,
      .map_rd_data  (g_map_rd[g]),
      .init_start   (g_init[g]),
      .repair_start (g_rep[g]),
      .extra_or_en  (g_xor_en[g]),
      .busy         (),
      .done         (g_done[g]),
      .go           (g_go[g]),
      .nogo         (),
      .mv_req       (g_mv_req[g]),
      .mv_src       (s_mv_src),
      .mv_ack       (g_mv_ack[g]),
      .mv_ok        (g_mv_ok[g]),
      .mv_dst       (g_mv_dst[g]),
      .moved_valid  (g_moved_valid[g]),
      .moved_from   (g_moved_from[g]),
      .moved_to     (g_moved_to[g]),
      .test_mode    (gm_test_mode[g]),
      .scr1_shift   (gm_scr1_shift[g]),
      .scr1_sin     (gm_scr1_sin[g]),
      .scr2_capture (gm_scr2_capture[g]),
      .scr2_shift   (gm_scr2_shift[g]),
      .scr2_sout    (gm_scr2_sout[g]),
      .prog_we      (gm_prog_we[g]),
      .prog_col     (gm_prog_col[g]),
      .prog_data    (gm_prog_data[g]),
      .cfg_we       (gm_cfg_we[g]),
      .cfg_idx      (gm_cfg_idx[g]),
      .cfg_data     (gm_cfg_data[g]),
      .nc           (),
      .nr           (),
      .cnt_reuse    (cnt_reuse[g]),
      .cnt_replace  (cnt_replace[g]),
      .cnt_ormove   (cnt_ormove[g]),
      .cnt_faulty   (),
      .cnt_pass     ()
    );
    assign g_mv_req[g] = s_mv_req && (master == g);
  end

  assign map_rd_data = g_map_rd[gm_sel];
  assign s_mv_ack    = g_mv_ack[master];
  assign s_mv_ok     = g_mv_ok[master];
  assign s_mv_dst    = g_mv_dst[master];

  sc_repair_ctrl #(.K(K)) u_sc (
    .clk, .rst_n,
    .route_we, .route_out, .route_in, .route_valid,
    .init_start   (s_init),
    .repair_start (s_rep),
    .busy         (),
    .done         (s_done),
    .go           (s_go),
    .nogo         (),
    .test_mode    (sc_test_mode),
    .scr6_shift   (sc_scr6_shift),
    .scr6_sin     (sc_scr6_sin),
    .scr7_capture (sc_scr7_capture),
    .scr7_shift   (sc_scr7_shift),
    .scr7_sout    (sc_scr7_sout),
    .dmx_en       (sc_dmx_en),
    .dmx_sel      (sc_dmx_sel),
    .buf_en       (sc_buf_en),
    .mv_req       (s_mv_req),
    .mv_src       (s_mv_src),
    .mv_ack       (s_mv_ack),
    .mv_ok        (s_mv_ok),
    .mv_dst       (s_mv_dst),
    .moved_valid  (g_moved_valid[master]),
    .moved_from   (g_moved_from[master]),
    .moved_to     (g_moved_to[master]),
    .nsc          (),
    .mcir         (),
    .src          (),
    .cnt_sa0_and  (cnt_sc_sa0),
    .cnt_sa1_line (cnt_sc_sa1),
    .cnt_spare    (cnt_sc_spare),
    .cnt_reroute  (cnt_sc_reroute)
  );

  // one-cycle start pulses, issued on entry to each step
  always_comb begin
    g_init = '0;
    g_rep  = '0;
    s_init = 1'b0;
    s_rep  = 1'b0;
    if (!started_q) begin
      unique case (st_q)
        C_INIT_G0: g_init[0] = 1'b1;
        C_INIT_G1: g_init[1] = 1'b1;
        C_INIT_SC: s_init    = 1'b1;
        C_REP_G0:  g_rep[0]  = 1'b1;
        C_REP_G1:  g_rep[1]  = 1'b1;
        C_REP_SC:  s_rep     = 1'b1;
        default: ;
      endcase
    end
  end

  assign busy = (st_q != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q       <= C_IDLE;
      started_q  <= 1'b0;
      ok_q       <= 1'b0;
      moved_q    <= 1'b0;
      msci_q     <= '0;
      done       <= 1'b0;
      go         <= 1'b0;
      nogo       <= 1'b0;
      cnt_rounds <= '0;
    end else begin
      done <= 1'b0;
      if (g_moved_valid[master] || (s_mv_ack && s_mv_ok && s_mv_req)) moved_q <= 1'b1;
      unique case (st_q)
        C_IDLE: begin
          started_q <= 1'b0;
          if (msci_we) msci_q[msci_out][msci_in] <= '{valid: msci_valid, sc: 1'b0};
          if (init_start) begin
            go   <= 1'b0;
            nogo <= 1'b0;
            st_q <= C_INIT_G0;
          end else if (maint_start) begin
            go         <= 1'b0;
            nogo       <= 1'b0;
            cnt_rounds <= '0;
            moved_q    <= 1'b0;
            st_q       <= C_REP_G0;
          end
        end

        C_INIT_G0, C_INIT_G1, C_REP_G0, C_REP_G1: begin
          logic g;
          g = (st_q == C_INIT_G1 || st_q == C_REP_G1);
          started_q <= 1'b1;
          if (started_q && g_done[g]) begin
            started_q <= 1'b0;
            if (!g_go[g]) begin
              ok_q <= 1'b0;
              st_q <= C_FINISH;
            end else begin
              unique case (st_q)
                C_INIT_G0: st_q <= C_INIT_G1;
                C_INIT_G1: st_q <= C_INIT_SC;
                C_REP_G0:  st_q <= C_REP_G1;
                default:   st_q <= C_REP_SC;
              endcase
            end
          end
        end

        C_INIT_SC, C_REP_SC: begin
          started_q <= 1'b1;
          if (started_q && s_done) begin
            started_q <= 1'b0;
            if (!s_go) begin
              ok_q <= 1'b0;
              st_q <= C_FINISH;
            end else if (st_q == C_INIT_SC) begin
              ok_q <= 1'b1;
              st_q <= C_FINISH;
            end else begin
              st_q <= C_ROUND_END;
            end
          end
        end

        C_ROUND_END: begin
          cnt_rounds <= cnt_rounds + 16'd1;
          moved_q    <= 1'b0;
          if (!moved_q) begin
            ok_q <= 1'b1;
            st_q <= C_FINISH;
          end else if (cnt_rounds == 16'(MAX_ROUNDS - 1)) begin
            ok_q <= 1'b0;
            st_q <= C_FINISH;
          end else begin
            st_q <= C_REP_G0;
          end
        end

        C_FINISH: begin
          done <= 1'b1;
          go   <= ok_q;
          nogo <= !ok_q;
          st_q <= C_IDLE;
        end

        default: st_q <= C_IDLE;
      endcase
    end
  end

endmodule
