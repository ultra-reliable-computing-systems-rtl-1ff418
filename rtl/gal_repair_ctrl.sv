// gal_repair_ctrl: the part of the fault-locating/fault-repair processor
// (FLFRP) that tests and repairs one GAL module.
//
// State kept per GAL:
//   MAP  n x m  the intended personality of every AND-plane column (the
//               fuse map), 1 = cell ON. Free and discarded columns hold all
//               ones, which makes their product term constant 0.
//   SAP  n x m  the state of every cell as measured by the last self-test.
//   NC   m      next-column status: 0 in use, 1 free extra column,
//               -1 discarded, -2 re-used (replacement only from now on).
//   NR   k      next-OR status: 0 in use, 1 free extra OR, -1 faulty.
//   SCR3/SCR4   the SAP and MAP column under comparison; SCR5 collects a
//               scan result, inverted, from the serial bus.
//
// Self-test (walking 0): SCR1 in the GAL is loaded with 0111..1 and then
// shifted n-1 times, so each of the n vectors pulls exactly one row low.
// For each vector SCR2 captures the m product terms and shifts them out;
// an ON cell in the low row forces its product term to 0, so the inverted
// scan result is one SAP row.
//
// Fault location: each SAP column (SCR3) is compared with the MAP column
// as it was programmed when the test ran (SCR4, from a copy of the MAP
// taken at the start of the test) by the minus comparator, giving the
// stuck-at-0 and stuck-at-1 cells and the values they are stuck at.
// A fault in a column that is not in use needs no repair, with two
// exceptions: a faulty free column is marked discarded so that it is never
// chosen for replacement, and a free or discarded column in which no
// variable and its complement are both still ON cannot be held at product
// 0, so its OR group is lost (extra-OR replacement, else nogo). Because repairs of
// earlier columns may already have given a column new MAP contents, the
// copy keeps the fault list tied to what was actually measured.
//
// Repair of a faulty column c in OR group g, re-use first, then
// replacement (the integrated order the design favours):
//   1. cell-column re-use (only if NC[c] = 0): find another in-use column
//      c' of g whose current MAP bits equal the stuck values of c at every
//      faulty cell; swap the MAP columns of c and c', reprogram both, NC[c] = -2.
//   2. column replacement: copy MAP[c] to a free extra column e of g, set
//      MAP[c] to all ones, reprogram both, NC[c] = -1, NC[e] = 0.
//   3. extra-OR replacement (only when extra_or_en, i.e. the outputs reach
//      the next module through a switching circuit that can reroute): copy
//      the in-use columns of g and its OLMC setting to a free extra OR h,
//      discard every column of g, NR[g] = -1, NR[h] = 0, and report the
//      move on moved_*.
//   If none applies the GAL cannot be repaired and nogo is raised.
// A pass that changed anything is followed by a new self-test, until a
// pass finds no fault in a column in use (go) or MAX_PASSES is reached.
//
// A switching-circuit repair unit may ask for an OR group to be moved to
// an extra OR (mv_req/mv_src, held high until acknowledged); the answer is
// mv_ack, held until mv_req falls, with mv_ok and the new OR index mv_dst.
//
// Commands: init_start copies the host-loaded fuse map into the AND plane
// and OLMCs and sets NC/NR (the first Y_USED columns of the first OR_USED
// OR groups in use, the rest extra); repair_start runs test and repair.
// Each ends with a one-cycle done pulse. test_mode is high while busy.
//
// Timing, with M = N_OR*Y columns and N = N_ROWS rows: one self-test takes
// about N*(M+2)+N cycles, the comparison two cycles per column plus two
// programming cycles per repaired column.
//
// The registers, test set, comparison and the three repair methods follow
// the design; the cycle-level sequencing, command interface, the order of
// searching for partners (lowest index first) and the pass limit are this
// implementation's own.
module gal_repair_ctrl
  import urcs_pkg::*;
#(
  parameter int unsigned N_ROWS     = GAL_ROWS,
  parameter int unsigned N_OR       = GAL_ORS,
  parameter int unsigned Y          = GAL_Y,
  parameter int unsigned Y_USED     = GAL_Y_USED,
  parameter int unsigned OR_USED    = GAL_ORS,
  parameter int unsigned MAX_PASSES = 64,
  localparam int unsigned M  = N_OR * Y,
  localparam int unsigned CW = $clog2(M),
  localparam int unsigned GW = (N_OR > 1) ? $clog2(N_OR) : 1,
  localparam int unsigned RW = $clog2(N_ROWS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // fuse-map load from the host, allowed while idle
  input  logic                 map_we,
  input  logic [CW-1:0]        map_col,
  input  logic [N_ROWS-1:0]    map_data,
  input  logic                 cfgsh_we,
  input  logic [GW-1:0]        cfgsh_idx,
  input  olmc_cfg_t            cfgsh_data,
  input  logic [CW-1:0]        map_rd_col,
  output logic [N_ROWS-1:0]    map_rd_data,
  // commands and status
  input  logic                 init_start,
  input  logic                 repair_start,
  input  logic                 extra_or_en,
  output logic                 busy,
  output logic                 done,
  output logic                 go,
  output logic                 nogo,
  // OR move on request of a switching-circuit repair unit
  input  logic                 mv_req,
  input  logic [GW-1:0]        mv_src,
  output logic                 mv_ack,
  output logic                 mv_ok,
  output logic [GW-1:0]        mv_dst,
  // OR moves decided here
  output logic                 moved_valid,
  output logic [GW-1:0]        moved_from,
  output logic [GW-1:0]        moved_to,
  // GAL test access and programming
  output logic                 test_mode,
  output logic                 scr1_shift,
  output logic                 scr1_sin,
  output logic                 scr2_capture,
  output logic                 scr2_shift,
  input  logic                 scr2_sout,
  output logic                 prog_we,
  output logic [CW-1:0]        prog_col,
  output logic [N_ROWS-1:0]    prog_data,
  output logic                 cfg_we,
  output logic [GW-1:0]        cfg_idx,
  output olmc_cfg_t            cfg_data,
  // status registers and event counters
  output nc_e  [M-1:0]         nc,
  output nr_e  [N_OR-1:0]      nr,
  output logic [15:0]          cnt_reuse,
  output logic [15:0]          cnt_replace,
  output logic [15:0]          cnt_ormove,
  output logic [15:0]          cnt_faulty,
  output logic [15:0]          cnt_pass
);

  typedef enum logic [4:0] {
    S_IDLE, S_INIT, S_PROG_ALL, S_CFG_ALL,
    S_T_LOAD, S_T_CAP, S_T_SCAN, S_T_STORE,
    S_CMP_LOAD, S_CMP_EVAL, S_PROG_A, S_PROG_B, S_NEXT,
    S_ORMV, S_ORMV_PROG, S_ORMV_CFG, S_MV_DONE, S_FINISH
  } state_e;

  state_e                     state_q;
  logic [M-1:0][N_ROWS-1:0]   map_q;
  logic [M-1:0][N_ROWS-1:0]   sap_q;
  logic [M-1:0][N_ROWS-1:0]   tmap_q;
  nc_e  [M-1:0]               nc_q;
  nr_e  [N_OR-1:0]            nr_q;
  olmc_cfg_t [N_OR-1:0]       cfg_sh_q;
  logic [M-1:0]               scr5_q;
  logic [N_ROWS-1:0]          scr3_q, scr4_q;
  logic [15:0]                cnt_q;
  logic [RW-1:0]              row_q;
  logic [CW-1:0]              col_q;
  logic [CW-1:0]              pa_q, pb_q;
  logic [GW-1:0]              mv_g_q, mv_h_q;
  logic                       mv_ext_q;
  logic                       changed_q;
  logic                       ok_q;
  logic [15:0]                pass_q;

  // comparator on SCR3 (measured) against SCR4 (intended)
  logic [N_ROWS-1:0] sa0, sa1, fmask;
  logic              col_fault;

  // only the stuck-at vectors are needed, so the difference word is left open
  minus_comparator #(.W(N_ROWS)) u_cmp (
    .actual    (scr3_q),
    .expected  (scr4_q),
    .result    (),
    .sa0, .sa1,
    .any_fault (col_fault)
  );
  assign fmask = sa0 | sa1;

  // candidate search inside the OR group of the column under comparison
  logic [GW-1:0] grp;
  logic          found_p, found_e, found_h;
  logic [CW-1:0] p_idx, e_idx;
  logic [GW-1:0] h_idx;
  logic          col_in_use, col_zero;

  always_comb begin
    grp     = GW'(col_q / CW'(Y));
    found_p = 1'b0;
    found_e = 1'b0;
    found_h = 1'b0;
    p_idx   = '0;
    e_idx   = '0;
    h_idx   = '0;
    for (int j = 0; j < Y; j++) begin
      logic [CW-1:0] idx;
      idx = CW'(grp * Y + j);
      if (!found_p && idx != col_q && nc_q[idx] == NC_USED &&
          ((map_q[idx] ^ scr3_q) & fmask) == '0) begin
        found_p = 1'b1;
        p_idx   = idx;
      end
      if (!found_e && nc_q[idx] == NC_AVAIL) begin
        found_e = 1'b1;
        e_idx   = idx;
      end
    end
    for (int h = 0; h < N_OR; h++) begin
      if (!found_h && nr_q[h] == NR_EXTRA) begin
        found_h = 1'b1;
        h_idx   = GW'(h);
      end
    end
    col_in_use = (nc_q[col_q] == NC_USED) || (nc_q[col_q] == NC_REUSED);
    // a column out of use stays harmless only while some variable and its
    // complement are both measured ON, keeping its product term at 0
    col_zero = 1'b0;
    for (int v = 0; v < N_ROWS / 2; v++)
      col_zero |= scr3_q[2*v] & scr3_q[2*v+1];
  end

  // index of the column programmed during an OR move
  logic [CW-1:0] mv_col;
  always_comb begin
    if (cnt_q < 16'(Y)) mv_col = CW'(int'(mv_h_q) * Y + int'(cnt_q));
    else                mv_col = CW'(int'(mv_g_q) * Y + int'(cnt_q) - Y);
  end

  // outputs decoded from the state
  always_comb begin
    scr1_shift   = 1'b0;
    scr1_sin     = 1'b1;
    scr2_capture = 1'b0;
    scr2_shift   = 1'b0;
    prog_we      = 1'b0;
    prog_col     = '0;
    cfg_we       = 1'b0;
    cfg_idx      = '0;
    unique case (state_q)
      S_PROG_ALL:  begin prog_we = 1'b1; prog_col = CW'(cnt_q); end
      S_CFG_ALL:   begin cfg_we = 1'b1; cfg_idx = GW'(cnt_q); end
      S_T_LOAD:    begin scr1_shift = 1'b1; scr1_sin = (cnt_q != 16'(N_ROWS - 1)); end
      S_T_CAP:     scr2_capture = 1'b1;
      S_T_SCAN:    scr2_shift = 1'b1;
      S_T_STORE:   scr1_shift = (row_q != RW'(N_ROWS - 1));
      S_PROG_A:    begin prog_we = 1'b1; prog_col = pa_q; end
      S_PROG_B:    begin prog_we = 1'b1; prog_col = pb_q; end
      S_ORMV_PROG: begin prog_we = 1'b1; prog_col = mv_col; end
      S_ORMV_CFG:  begin cfg_we = 1'b1; cfg_idx = mv_h_q; end
      default: ;
    endcase
    prog_data = map_q[prog_col];
    cfg_data  = cfg_sh_q[cfg_idx];
  end

  assign test_mode   = (state_q != S_IDLE);
  assign busy        = (state_q != S_IDLE);
  assign mv_ack      = (state_q == S_MV_DONE);
  assign nc          = nc_q;
  assign nr          = nr_q;
  assign map_rd_data = map_q[map_rd_col];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      map_q       <= '1;
      sap_q       <= '1;
      tmap_q      <= '1;
      nc_q        <= '{default: NC_AVAIL};
      nr_q        <= '{default: NR_EXTRA};
      cfg_sh_q    <= '0;
      scr5_q      <= '0;
      scr3_q      <= '0;
      scr4_q      <= '0;
      cnt_q       <= '0;
      row_q       <= '0;
      col_q       <= '0;
      pa_q        <= '0;
      pb_q        <= '0;
      mv_g_q      <= '0;
      mv_h_q      <= '0;
      mv_ext_q    <= 1'b0;
      changed_q   <= 1'b0;
      ok_q        <= 1'b0;
      pass_q      <= '0;
      done        <= 1'b0;
      go          <= 1'b0;
      nogo        <= 1'b0;
      mv_ok       <= 1'b0;
      mv_dst      <= '0;
      moved_valid <= 1'b0;
      moved_from  <= '0;
      moved_to    <= '0;
      cnt_reuse   <= '0;
      cnt_replace <= '0;
      cnt_ormove  <= '0;
      cnt_faulty  <= '0;
      cnt_pass    <= '0;
    end else begin
      done        <= 1'b0;
      moved_valid <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (map_we)   map_q[map_col] <= map_data;
          if (cfgsh_we) cfg_sh_q[cfgsh_idx] <= cfgsh_data;
          if (init_start) begin
            go      <= 1'b0;
            nogo    <= 1'b0;
            state_q <= S_INIT;
          end else if (repair_start) begin
            go        <= 1'b0;
            nogo      <= 1'b0;
            pass_q    <= '0;
            changed_q <= 1'b0;
            cnt_q     <= '0;
            state_q   <= S_T_LOAD;
          end else if (mv_req) begin
            if (found_h) begin
              mv_g_q   <= mv_src;
              mv_h_q   <= h_idx;
              mv_ext_q <= 1'b1;
              state_q  <= S_ORMV;
            end else begin
              mv_ok   <= 1'b0;
              state_q <= S_MV_DONE;
            end
          end
        end

        // mark the first Y_USED columns of the first OR_USED groups as in use
        S_INIT: begin
          for (int g = 0; g < N_OR; g++) begin
            nr_q[g] <= (g < OR_USED) ? NR_USED : NR_EXTRA;
            for (int j = 0; j < Y; j++) begin
              if (g < OR_USED && j < Y_USED) begin
                nc_q[g*Y+j] <= NC_USED;
              end else begin
                nc_q[g*Y+j]  <= NC_AVAIL;
                map_q[g*Y+j] <= '1;
              end
            end
          end
          cnt_q   <= '0;
          state_q <= S_PROG_ALL;
        end

        S_PROG_ALL: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(M - 1)) begin
            cnt_q   <= '0;
            state_q <= S_CFG_ALL;
          end
        end

        S_CFG_ALL: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(N_OR - 1)) begin
            ok_q    <= 1'b1;
            state_q <= S_FINISH;
          end
        end

        // ---------------- self-test: walking 0 ----------------
        S_T_LOAD: begin
          tmap_q <= map_q;
          cnt_q  <= cnt_q + 16'd1;
          if (cnt_q == 16'(N_ROWS - 1)) begin
            row_q   <= '0;
            state_q <= S_T_CAP;
          end
        end

        S_T_CAP: begin
          cnt_q   <= '0;
          state_q <= S_T_SCAN;
        end

        S_T_SCAN: begin
          scr5_q <= {~scr2_sout, scr5_q[M-1:1]};
          cnt_q  <= cnt_q + 16'd1;
          if (cnt_q == 16'(M - 1)) state_q <= S_T_STORE;
        end

        S_T_STORE: begin
          for (int c = 0; c < M; c++) sap_q[c][row_q] <= scr5_q[c];
          if (row_q == RW'(N_ROWS - 1)) begin
            col_q    <= '0;
            cnt_pass <= cnt_pass + 16'd1;
            state_q  <= S_CMP_LOAD;
          end else begin
            row_q   <= row_q + RW'(1);
            state_q <= S_T_CAP;
          end
        end

        // ---------------- fault location and repair ----------------
        S_CMP_LOAD: begin
          scr3_q  <= sap_q[col_q];
          scr4_q  <= tmap_q[col_q];
          state_q <= S_CMP_EVAL;
        end

        S_CMP_EVAL: begin
          if (col_in_use && col_fault) begin
            cnt_faulty <= cnt_faulty + 16'd1;
            changed_q  <= 1'b1;
            if (nc_q[col_q] == NC_USED && found_p) begin
              map_q[col_q] <= map_q[p_idx];
              map_q[p_idx] <= map_q[col_q];
              nc_q[col_q]  <= NC_REUSED;
              pa_q         <= col_q;
              pb_q         <= p_idx;
              cnt_reuse    <= cnt_reuse + 16'd1;
              state_q      <= S_PROG_A;
            end else if (found_e) begin
              map_q[e_idx] <= map_q[col_q];
              map_q[col_q] <= '1;
              nc_q[e_idx]  <= NC_USED;
              nc_q[col_q]  <= NC_DEAD;
              pa_q         <= e_idx;
              pb_q         <= col_q;
              cnt_replace  <= cnt_replace + 16'd1;
              state_q      <= S_PROG_A;
            end else if (extra_or_en && found_h) begin
              mv_g_q   <= grp;
              mv_h_q   <= h_idx;
              mv_ext_q <= 1'b0;
              state_q  <= S_ORMV;
            end else begin
              ok_q    <= 1'b0;
              state_q <= S_FINISH;
            end
          end else if (!col_in_use && nr_q[grp] == NR_USED && !col_zero) begin
            // a free or discarded column that can no longer be held at 0
            // corrupts its OR group: only an OR move can help
            cnt_faulty <= cnt_faulty + 16'd1;
            changed_q  <= 1'b1;
            nc_q[col_q] <= NC_DEAD;
            if (extra_or_en && found_h) begin
              mv_g_q   <= grp;
              mv_h_q   <= h_idx;
              mv_ext_q <= 1'b0;
              state_q  <= S_ORMV;
            end else begin
              ok_q    <= 1'b0;
              state_q <= S_FINISH;
            end
          end else begin
            // a faulty free column is no longer a replacement candidate
            if (nc_q[col_q] == NC_AVAIL && col_fault) nc_q[col_q] <= NC_DEAD;
            state_q <= S_NEXT;
          end
        end

        S_PROG_A: state_q <= S_PROG_B;
        S_PROG_B: state_q <= S_NEXT;

        S_NEXT: begin
          if (col_q == CW'(M - 1)) begin
            if (!changed_q) begin
              ok_q    <= 1'b1;
              state_q <= S_FINISH;
            end else if (pass_q == 16'(MAX_PASSES - 1)) begin
              ok_q    <= 1'b0;
              state_q <= S_FINISH;
            end else begin
              pass_q    <= pass_q + 16'd1;
              changed_q <= 1'b0;
              cnt_q     <= '0;
              state_q   <= S_T_LOAD;
            end
          end else begin
            col_q   <= col_q + CW'(1);
            state_q <= S_CMP_LOAD;
          end
        end

        // ---------------- extra-OR replacement ----------------
        S_ORMV: begin
          for (int j = 0; j < Y; j++) begin
            if (nc_q[mv_g_q*Y+j] == NC_USED || nc_q[mv_g_q*Y+j] == NC_REUSED) begin
              map_q[mv_h_q*Y+j] <= map_q[mv_g_q*Y+j];
              nc_q[mv_h_q*Y+j]  <= NC_USED;
            end else begin
              map_q[mv_h_q*Y+j] <= '1;
              nc_q[mv_h_q*Y+j]  <= NC_AVAIL;
            end
            map_q[mv_g_q*Y+j] <= '1;
            nc_q[mv_g_q*Y+j]  <= NC_DEAD;
          end
          nr_q[mv_g_q]     <= NR_FAULTY;
          nr_q[mv_h_q]     <= NR_USED;
          cfg_sh_q[mv_h_q] <= cfg_sh_q[mv_g_q];
          cnt_ormove       <= cnt_ormove + 16'd1;
          cnt_q            <= '0;
          state_q          <= S_ORMV_PROG;
        end

        S_ORMV_PROG: begin
          cnt_q <= cnt_q + 16'd1;
          if (cnt_q == 16'(2 * Y - 1)) state_q <= S_ORMV_CFG;
        end

        S_ORMV_CFG: begin
          if (mv_ext_q) begin
            mv_ok   <= 1'b1;
            mv_dst  <= mv_h_q;
            state_q <= S_MV_DONE;
          end else begin
            moved_valid <= 1'b1;
            moved_from  <= mv_g_q;
            moved_to    <= mv_h_q;
            changed_q   <= 1'b1;
            state_q     <= S_NEXT;
          end
        end

        // hold the acknowledge until the requester drops its request
        S_MV_DONE: if (!mv_req) state_q <= S_IDLE;

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

endmodule
