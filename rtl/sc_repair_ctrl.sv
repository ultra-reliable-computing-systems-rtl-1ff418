// sc_repair_ctrl: the part of the fault-locating/fault-repair processor
// (FLFRP) that tests and repairs one switching circuit (SC).
//
// Registers:
//   SRC      the pin-to-pin configuration to keep: for each output pin q
//            the input pin (OR group of the master GAL) that feeds it
//   RD / RB  register for DEMUX and register for buffer: the expected
//            AND-gate response of one test vector and its scanned result
//   NSA      RB - RD from the minus comparator
//   NSC      K x 2K line map, row = input pin p, column = AND gate a;
//            1 = line usable, 0 = stuck-at fault. A stuck-at-0 anywhere on
//            an AND gate clears its whole column.
//   MCIR     per AND gate: 0 in use, -1 available, -2 unusable
//   NDS/RTB  DEMUX enable/select and buffer enables used in normal mode
//
// Test, two phases:
//   1. SCR6 = 11..1. Every line carries 1, so an AND output of 0 means a
//      stuck-at-0 on one of its lines: the AND gate is discarded.
//   2. Line by line: SCR6 holds a single 0 at DEMUX d (the others 1, which
//      makes their lines neutral) and every DEMUX selects output q. The
//      AND gate a(2q + d%2) must give 0; a 1 means the line from d to it is
//      stuck at 1, and only that NSC cell is cleared.
//   The test needs 2K(2K+3) + 2K*K*(2K+3) cycles, about 2.6k for K = 8.
//
// Line replacement, for each output q fed by input p:
//   use d(2p)->a(2q) if that line and AND gate are sound, otherwise the
//   extra line d(2p+1)->a(2q+1); if both are lost, ask the GAL repair unit
//   of the master GAL (mv_req) to move OR group p to a free extra OR h, then
//   route h to q through whichever of its two lines is sound (routing
//   restarts, since every output fed by p now follows h). The output pin
//   keeps its connection, so the next GAL module sees no change. OR moves
//   that the GAL repair unit makes on its own (columns exhausted) arrive on
//   moved_* and update SRC the same way.
// If no route is possible nogo is raised.
//
// Commands: init_start clears NSC/MCIR and routes; repair_start tests and
// reroutes. Both end with a done pulse. test_mode is high while busy; in
// test mode the DEMUX/buffer controls come from the test sequence.
//
// The registers, two-vector test idea, comparison and line replacement
// follow the design. Running the stuck-at-1 phase with a single 0 per
// vector, the expected-response RD and the command interface are this
// implementation's own choices.
module sc_repair_ctrl
  import urcs_pkg::*;
#(
  parameter int unsigned K = SC_PINS,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DW = $clog2(2 * K)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // pin-to-pin configuration from the host, allowed while idle
  input  logic                      route_we,
  input  logic [SW-1:0]             route_out,
  input  logic [SW-1:0]             route_in,
  input  logic                      route_valid,
  // commands and status
  input  logic                      init_start,
  input  logic                      repair_start,
  output logic                      busy,
  output logic                      done,
  output logic                      go,
  output logic                      nogo,
  // SC test access and configuration
  output logic                      test_mode,
  output logic                      scr6_shift,
  output logic                      scr6_sin,
  output logic                      scr7_capture,
  output logic                      scr7_shift,
  input  logic                      scr7_sout,
  output logic [2*K-1:0]            dmx_en,
  output logic [2*K-1:0][SW-1:0]    dmx_sel,
  output logic [2*K-1:0]            buf_en,
  // OR move through the master GAL's repair unit
  output logic                      mv_req,
  output logic [SW-1:0]             mv_src,
  input  logic                      mv_ack,
  input  logic                      mv_ok,
  input  logic [SW-1:0]             mv_dst,
  input  logic                      moved_valid,
  input  logic [SW-1:0]             moved_from,
  input  logic [SW-1:0]             moved_to,
  // status
  output logic [K-1:0][2*K-1:0]     nsc,
  output mcir_e [2*K-1:0]           mcir,
  output logic [K-1:0][SW-1:0]      src,
  output logic [15:0]               cnt_sa0_and,
  output logic [15:0]               cnt_sa1_line,
  output logic [15:0]               cnt_spare,
  output logic [15:0]               cnt_reroute
);

  typedef enum logic [3:0] {
    S_IDLE, S_INIT,
    S_T1_LOAD, S_T1_CAP, S_T1_SCAN, S_T1_EVAL,
    S_T2_LOAD, S_T2_CAP, S_T2_SCAN, S_T2_EVAL,
    S_R_CLEAR, S_ROUTE, S_MV_WAIT, S_FINISH
  } state_e;

  state_e                    state_q;
  logic [K-1:0][SW-1:0]      src_q;
  logic [K-1:0]              src_v_q;
  logic [K-1:0][2*K-1:0]     nsc_q;
  mcir_e [2*K-1:0]           mcir_q;
  logic [2*K-1:0]            nds_en_q;
  logic [2*K-1:0][SW-1:0]    nds_sel_q;
  logic [2*K-1:0]            rtb_q;
  logic [2*K-1:0]            rd_q, rb_q;
  logic [15:0]               cnt_q;
  logic [DW-1:0]             d_q;
  logic [SW-1:0]             s_q, q_q;
  logic                      ok_q;
  logic                      mv_req_q;
  logic [SW-1:0]             mv_src_q;

  // NSA = RB - RD; the stuck-at vectors are used, the difference word and
  // the any-fault flag are left open
  logic [2*K-1:0] nsa_sa0, nsa_sa1;
  minus_comparator #(.W(2*K)) u_cmp (
    .actual    (rb_q),
    .expected  (rd_q),
    .result    (),
    .sa0       (nsa_sa0),
    .sa1       (nsa_sa1),
    .any_fault ()
  );

  // AND gate targeted by the line under test in phase 2
  logic [DW-1:0] a_t;
  assign a_t = DW'(2 * int'(s_q) + int'(d_q[0]));

  // route candidates for output q_q
  logic [SW-1:0] p_cur;
  logic [DW-1:0] a_orig, a_extra;
  logic          orig_ok, extra_ok;
  always_comb begin
    p_cur    = src_q[q_q];
    a_orig   = DW'(2 * int'(q_q));
    a_extra  = DW'(2 * int'(q_q) + 1);
    orig_ok  = nsc_q[p_cur][a_orig]  && (mcir_q[a_orig]  != MCIR_DEAD);
    extra_ok = nsc_q[p_cur][a_extra] && (mcir_q[a_extra] != MCIR_DEAD);
  end

  // test-mode versus normal-mode control of the SC
  always_comb begin
    scr6_shift   = 1'b0;
    scr6_sin     = 1'b1;
    scr7_capture = 1'b0;
    scr7_shift   = 1'b0;
    unique case (state_q)
      S_T1_LOAD: scr6_shift = 1'b1;
      S_T2_LOAD: begin scr6_shift = 1'b1; scr6_sin = (cnt_q != 16'(2*K - 1)); end
      S_T1_CAP, S_T2_CAP: scr7_capture = 1'b1;
      S_T1_SCAN, S_T2_SCAN: scr7_shift = 1'b1;
      S_T2_EVAL: scr6_shift = (s_q == SW'(K - 1)) && (d_q != DW'(2*K - 1));
      default: ;
    endcase
    if (test_mode) begin
      dmx_en = '1;
      for (int i = 0; i < 2*K; i++) dmx_sel[i] = (state_q inside {S_T2_CAP, S_T2_SCAN, S_T2_EVAL}) ? s_q : '0;
      buf_en = '0;
    end else begin
      dmx_en  = nds_en_q;
      dmx_sel = nds_sel_q;
      buf_en  = rtb_q;
    end
  end

  assign busy      = (state_q != S_IDLE);
  assign test_mode = busy;
  assign nsc       = nsc_q;
  assign mcir      = mcir_q;
  assign src       = src_q;
  assign mv_req    = mv_req_q;
  assign mv_src    = mv_src_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= S_IDLE;
      src_q        <= '0;
      src_v_q      <= '0;
      nsc_q        <= '1;
      mcir_q       <= '{default: MCIR_AVAIL};
      nds_en_q     <= '0;
      nds_sel_q    <= '0;
      rtb_q        <= '0;
      rd_q         <= '1;
      rb_q         <= '1;
      cnt_q        <= '0;
      d_q          <= '0;
      s_q          <= '0;
      q_q          <= '0;
      ok_q         <= 1'b0;
      mv_req_q     <= 1'b0;
      mv_src_q     <= '0;
      done         <= 1'b0;
      go           <= 1'b0;
      nogo         <= 1'b0;
      cnt_sa0_and  <= '0;
      cnt_sa1_line <= '0;
      cnt_spare    <= '0;
      cnt_reroute  <= '0;
    end else begin
      done <= 1'b0;
      // OR moves decided by the GAL repair unit
      if (moved_valid) begin
        for (int q = 0; q < K; q++) begin
          if (src_v_q[q] && src_q[q] == moved_from) src_q[q] <= moved_to;
        end
      end
      unique case (state_q)
        S_IDLE: begin
          if (route_we) begin
            src_q[route_out]   <= route_in;
            src_v_q[route_out] <= route_valid;
          end
          if (init_start) begin
            go      <= 1'b0;
            nogo    <= 1'b0;
            state_q <= S_INIT;
          end else if (repair_start) begin
            go      <= 1'b0;
            nogo    <= 1'b0;
            cnt_q   <= '0;
            state_q <= S_T1_LOAD;
          end
        end

        S_INIT: begin
          nsc_q   <= '1;
          mcir_q  <= '{default: MCIR_AVAIL};
          state_q <= S_R_CLEAR;
        end

        // ---------- phase 1: all ones, stuck-at-0 per AND gate ----------
        S_T1_LOAD: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(2*K - 1)) state_q <= S_T1_CAP;
        end
        S_T1_CAP: begin
          cnt_q   <= '0;
          state_q <= S_T1_SCAN;
        end
        S_T1_SCAN: begin
          rb_q  <= {scr7_sout, rb_q[2*K-1:1]};
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(2*K - 1)) begin
            rd_q    <= '1;
            state_q <= S_T1_EVAL;
          end
        end
        S_T1_EVAL: begin
          for (int a = 0; a < 2*K; a++) begin
            if (nsa_sa0[a]) begin
              for (int p = 0; p < K; p++) nsc_q[p][a] <= 1'b0;
              mcir_q[a] <= MCIR_DEAD;
            end
          end
          cnt_sa0_and <= cnt_sa0_and + 16'($countones(nsa_sa0 & ~dead_mask(mcir_q)));
          cnt_q       <= '0;
          state_q     <= S_T2_LOAD;
        end

        // ---------- phase 2: single 0, stuck-at-1 per line ----------
        S_T2_LOAD: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(2*K - 1)) begin
            d_q     <= '0;
            s_q     <= '0;
            state_q <= S_T2_CAP;
          end
        end
        S_T2_CAP: begin
          cnt_q   <= '0;
          state_q <= S_T2_SCAN;
        end
        S_T2_SCAN: begin
          rb_q  <= {scr7_sout, rb_q[2*K-1:1]};
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(2*K - 1)) begin
            rd_q      <= '1;
            rd_q[a_t] <= 1'b0;
            state_q   <= S_T2_EVAL;
          end
        end
        S_T2_EVAL: begin
          if (nsa_sa1[a_t]) begin
            if (nsc_q[d_q[DW-1:1]][a_t]) cnt_sa1_line <= cnt_sa1_line + 16'd1;
            nsc_q[d_q[DW-1:1]][a_t] <= 1'b0;
          end
          if (s_q == SW'(K - 1)) begin
            s_q <= '0;
            if (d_q == DW'(2*K - 1)) begin
              state_q <= S_R_CLEAR;
            end else begin
              d_q     <= d_q + DW'(1);
              state_q <= S_T2_CAP;
            end
          end else begin
            s_q     <= s_q + SW'(1);
            state_q <= S_T2_CAP;
          end
        end

        // ---------- line replacement and rerouting ----------
        S_R_CLEAR: begin
          nds_en_q <= '0;
          rtb_q    <= '0;
          for (int a = 0; a < 2*K; a++) begin
            if (mcir_q[a] != MCIR_DEAD) mcir_q[a] <= MCIR_AVAIL;
          end
          q_q     <= '0;
          ok_q    <= 1'b1;
          state_q <= S_ROUTE;
        end

        S_ROUTE: begin
          logic next_q;
          next_q = 1'b1;
          if (src_v_q[q_q]) begin
            if (orig_ok) begin
              nds_en_q[2*p_cur]  <= 1'b1;
              nds_sel_q[2*p_cur] <= q_q;
              rtb_q[a_orig]      <= 1'b1;
              mcir_q[a_orig]     <= MCIR_USED;
            end else if (extra_ok) begin
              nds_en_q[2*p_cur+1]  <= 1'b1;
              nds_sel_q[2*p_cur+1] <= q_q;
              rtb_q[a_extra]       <= 1'b1;
              mcir_q[a_extra]      <= MCIR_USED;
              cnt_spare            <= cnt_spare + 16'd1;
            end else begin
              mv_req_q <= 1'b1;
              mv_src_q <= p_cur;
              next_q   = 1'b0;
              state_q  <= S_MV_WAIT;
            end
          end
          if (next_q) begin
            if (q_q == SW'(K - 1)) state_q <= S_FINISH;
            else                   q_q <= q_q + SW'(1);
          end
        end

        S_MV_WAIT: begin
          if (mv_ack) begin
            mv_req_q <= 1'b0;
            if (mv_ok) begin
              // every output fed by the moved OR follows it; routing
              // starts over so that outputs done earlier are redone
              for (int q = 0; q < K; q++) begin
                if (src_v_q[q] && src_q[q] == mv_src_q) src_q[q] <= mv_dst;
              end
              cnt_reroute <= cnt_reroute + 16'd1;
              state_q     <= S_R_CLEAR;
            end else begin
              ok_q    <= 1'b0;
              state_q <= S_FINISH;
            end
          end
        end

        S_FINISH: begin
          done    <= 1'b1;
          go      <= ok_q;
          nogo    <= !ok_q;
          state_q <= S_IDLE;
        end

        default: state_q <= S_IDLE;
      endcase
    end
  end

  function automatic logic [2*K-1:0] dead_mask(input mcir_e [2*K-1:0] m);
    for (int a = 0; a < 2*K; a++) dead_mask[a] = (m[a] == MCIR_DEAD);
  endfunction

  // a request is held until it is acknowledged (checked once out of reset)
  logic run_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) run_q <= 1'b0;
    else        run_q <= 1'b1;
  end

  a_mv_hold: assert property (@(posedge clk) disable iff (!run_q)
    mv_req && !mv_ack |=> mv_req);

endmodule
