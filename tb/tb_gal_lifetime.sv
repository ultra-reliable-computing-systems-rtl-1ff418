// tb_gal_lifetime: lifetime workload for the self-repairable GAL, the
// design's looping-time evaluation at a size that simulates quickly.
//
// A random personality (every used cross-point drawn at random) is
// programmed into two GALs of 3 variables (6 rows) and 2 OR groups of 4
// used columns each: one with no extra columns (Y = 4), one with 4 extra
// columns per OR group (Y = 8). Extra-OR moves are off, so only cell-column
// re-use and column replacement repair faults. Each loop adds 1 to 5 new
// stuck-at cross-points (the smallest fault limit of the evaluation) at
// random columns, extra columns included, rows and polarities, and runs a
// repair. The loop count at which repair first ends in no-go is the
// looping time of the trial.
//
// Checks: after every repair that ends in go, the GAL output equals the
// programmed sum-of-products for all 8 input vectors (which includes that
// every free or discarded column still yields product 0); both repair methods
// occur; and the average looping time with extra columns is longer than
// without, which is the design's central claim for extra columns.
module tb_gal_lifetime;
  import urcs_pkg::*;
  localparam int unsigned NV = 3, NO = 2, YU = 4, NR = 2 * NV, GW = 1;
  localparam int unsigned TRIALS = 30, MAX_LOOPS = 200, FAULT_LIMIT = 5;

  logic clk = 1'b0;
  int checks = 0, failures = 0;
  logic [NO*YU-1:0][NR-1:0] pers;     // programmed used columns, OR-major
  logic start;
  logic [1:0] finished;
  int life_sum [2];
  int reuse_seen [2], replace_seen [2];

  always #5 clk = ~clk;
  initial begin
    #200000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference output of OR group g for input vector v
  function automatic bit ref_out(int g, logic [NV-1:0] v);
    logic [NR-1:0] rows;
    bit sum = 1'b0;
    for (int i = 0; i < NV; i++) begin
      rows[2*i]   = v[i];
      rows[2*i+1] = ~v[i];
    end
    for (int j = 0; j < YU; j++)
      sum |= &(rows | ~pers[g*YU+j]);
    return sum;
  endfunction

  for (genvar k = 0; k < 2; k++) begin : g_cfg
    localparam int unsigned Y  = (k == 0) ? YU : 2 * YU;
    localparam int unsigned M  = NO * Y;
    localparam int unsigned CW = $clog2(M);

    logic rst_n;
    logic [NV-1:0] x;
    logic [NO-1:0] y_out;
    logic map_we, init_start, repair_start;
    logic [CW-1:0] map_col;
    logic [NR-1:0] map_data;
    logic busy, done, go, nogo;
    logic mv_ok, moved_valid;
    logic [GW-1:0] mv_dst, moved_from, moved_to;
    logic test_mode, scr1_shift, scr1_sin, scr2_capture, scr2_shift, scr2_sout;
    logic prog_we, cfg_we;
    logic [CW-1:0] prog_col;
    logic [NR-1:0] prog_data, map_rd_data;
    logic [GW-1:0] cfg_idx;
    olmc_cfg_t cfg_data;
    nc_e [M-1:0] nc;
    nr_e [NO-1:0] nr;
    logic [15:0] cnt_reuse, cnt_replace, cnt_ormove, cnt_faulty, cnt_pass;
    logic [M-1:0][NR-1:0] d_sa0, d_sa1;

    gal_module #(.N_VARS(NV), .N_OR(NO), .Y(Y)) u_gm (
      .clk, .rst_n, .x, .y_out, .test_mode, .scr1_shift, .scr1_sin,
      .scr2_capture, .scr2_shift, .scr2_sout, .prog_we, .prog_col, .prog_data,
      .cfg_we, .cfg_idx, .cfg_data, .defect_sa0(d_sa0), .defect_sa1(d_sa1)
    );

    gal_repair_ctrl #(.N_ROWS(NR), .N_OR(NO), .Y(Y), .Y_USED(YU), .OR_USED(NO)) u_ctrl (
      .clk, .rst_n, .map_we, .map_col, .map_data, .cfgsh_we(1'b0), .cfgsh_idx('0),
      .cfgsh_data('0), .map_rd_col('0), .map_rd_data, .init_start, .repair_start,
      .extra_or_en(1'b0), .busy, .done, .go, .nogo, .mv_req(1'b0), .mv_src('0),
      .mv_ack(), .mv_ok, .mv_dst, .moved_valid, .moved_from, .moved_to, .test_mode,
      .scr1_shift, .scr1_sin, .scr2_capture, .scr2_shift, .scr2_sout, .prog_we,
      .prog_col, .prog_data, .cfg_we, .cfg_idx, .cfg_data, .nc, .nr, .cnt_reuse,
      .cnt_replace, .cnt_ormove, .cnt_faulty, .cnt_pass
    );

    task automatic run(bit init);
      @(negedge clk);
      if (init) init_start = 1'b1; else repair_start = 1'b1;
      @(negedge clk);
      init_start = 1'b0; repair_start = 1'b0;
      while (!done) @(negedge clk);
    endtask

    task automatic check_function(int trial, int loop);
      automatic bit ok = 1'b1;
      for (int v = 0; v < 2 ** NV; v++) begin
        x = NV'(v);
        #1;
        for (int g = 0; g < NO; g++)
          if (y_out[g] !== ref_out(g, NV'(v))) ok = 1'b0;
      end
      expect_true(ok, $sformatf("config %0d trial %0d loop %0d function after repair", k, trial, loop));
    endtask

    initial begin
      rst_n = 1'b0; x = '0; map_we = 1'b0; init_start = 1'b0; repair_start = 1'b0;
      map_col = '0; map_data = '0; d_sa0 = '0; d_sa1 = '0;
      finished[k] = 1'b0; life_sum[k] = 0; reuse_seen[k] = 0; replace_seen[k] = 0;
      wait (start);
      for (int t = 0; t < TRIALS; t++) begin
        automatic int life = MAX_LOOPS;
        @(negedge clk);
        rst_n = 1'b0; d_sa0 = '0; d_sa1 = '0;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        for (int c = 0; c < M; c++) begin
          @(negedge clk);
          map_we = 1'b1; map_col = CW'(c);
          map_data = (c % Y < YU) ? pers[(c / Y) * YU + c % Y] : '1;
          @(negedge clk);
          map_we = 1'b0;
        end
        run(1'b1);
        expect_true(go, $sformatf("config %0d trial %0d init go", k, t));
        for (int l = 1; l <= MAX_LOOPS; l++) begin
          automatic int n = 1 + $urandom_range(FAULT_LIMIT - 1);
          for (int f = 0; f < n; f++) begin
            automatic int c = $urandom_range(M - 1), r = $urandom_range(NR - 1);
            // a cross-point that has already failed keeps its fault
            if (!d_sa0[c][r] && !d_sa1[c][r]) begin
              if ($urandom_range(1) == 0) d_sa0[c][r] = 1'b1; else d_sa1[c][r] = 1'b1;
            end
          end
          run(1'b0);
          if (cnt_reuse != 0) reuse_seen[k]++;
          if (cnt_replace != 0) replace_seen[k]++;
          if (nogo) begin life = l; break; end
          check_function(t, l);
        end
        life_sum[k] += life;
      end
      finished[k] = 1'b1;
    end
  end

  initial begin
    start = 1'b0;
    for (int c = 0; c < NO * YU; c++) pers[c] = NR'($urandom);
    #30 start = 1'b1;
    wait (&finished);
    $display("average looping time over %0d trials: %0d.%02d loops with 0 extra columns, %0d.%02d with %0d per OR",
             TRIALS, life_sum[0] / TRIALS, (life_sum[0] * 100 / TRIALS) % 100,
             life_sum[1] / TRIALS, (life_sum[1] * 100 / TRIALS) % 100, YU);
    $display("repairs with re-use: %0d / %0d, with replacement: %0d / %0d",
             reuse_seen[0], reuse_seen[1], replace_seen[0], replace_seen[1]);
    expect_true(reuse_seen[0] > 0 && reuse_seen[1] > 0, "cell-column re-use happened");
    expect_true(replace_seen[1] > 0, "column replacement happened");
    expect_true(life_sum[1] > life_sum[0], "extra columns lengthen the looping time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
