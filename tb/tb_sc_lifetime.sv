// tb_sc_lifetime: lifetime workload for the self-repairable switching
// circuit at its full 8 x 8 size, the design's looping-time evaluation of
// the SC.
//
// The SC and its repair unit are driven by a behavioural master GAL with
// 6 OR groups in use and 2 spare ORs: it answers OR-move requests by moving
// the requested function to the next spare pin, and refuses once none is
// left. Each input pin reaches the outputs through one DEMUX, so it feeds
// one output: each trial routes the 6 used functions to 6 distinct random
// output pins and initialises. Each loop then adds 1 to fault-limit new
// stuck-at lines, extra lines included, and runs a repair. The loop count at which repair
// first ends in no-go is the looping time of the trial. The experiment is
// run for fault limits 2 and 4, as in the evaluation.
//
// Checks: after every repair that ends in go, every output pin carries the
// function it was routed to, for random values of the master's functions,
// wherever the master has moved them; and spare lines, discarded AND gates
// and reroutes through a moved OR all occur.
module tb_sc_lifetime;
  import urcs_pkg::*;
  localparam int unsigned K = SC_PINS, SW = $clog2(K), USED = 6;
  localparam int unsigned TRIALS = 20, MAX_LOOPS = 200;

  logic clk = 1'b0, rst_n;
  int checks = 0, failures = 0;

  logic [K-1:0] pin_in, pin_out;
  logic test_mode, scr6_shift, scr6_sin, scr7_capture, scr7_shift, scr7_sout;
  logic [2*K-1:0] dmx_en, buf_en;
  logic [2*K-1:0][SW-1:0] dmx_sel;
  logic [2*K-1:0][K-1:0] d_sa0, d_sa1;
  logic route_we, route_valid, init_start, repair_start;
  logic [SW-1:0] route_out, route_in;
  logic busy, done, go, nogo;
  logic mv_req, mv_ack, mv_ok;
  logic [SW-1:0] mv_src, mv_dst;
  logic [K-1:0][2*K-1:0] nsc;
  mcir_e [2*K-1:0] mcir;
  logic [K-1:0][SW-1:0] src;
  logic [15:0] cnt_sa0_and, cnt_sa1_line, cnt_spare, cnt_reroute;

  // master GAL model: fn_at[p] is the function on physical pin p
  int fn_at [K];
  int next_spare;
  logic [K-1:0] fn_val;             // value of each of the master's functions
  int route_fn [K];                 // function each output pin was routed to
  int life_sum [2];
  int sa0_seen = 0, spare_seen = 0, reroute_seen = 0;

  always_comb
    for (int p = 0; p < K; p++) pin_in[p] = (fn_at[p] >= 0) ? fn_val[fn_at[p]] : 1'b0;

  switching_circuit #(.K(K)) u_sc (
    .clk, .rst_n, .pin_in, .pin_out, .test_mode, .scr6_shift, .scr6_sin,
    .scr7_capture, .scr7_shift, .scr7_sout, .dmx_en, .dmx_sel, .buf_en,
    .defect_sa0(d_sa0), .defect_sa1(d_sa1)
  );

  sc_repair_ctrl #(.K(K)) dut (
    .clk, .rst_n, .route_we, .route_out, .route_in, .route_valid,
    .init_start, .repair_start, .busy, .done, .go, .nogo, .test_mode,
    .scr6_shift, .scr6_sin, .scr7_capture, .scr7_shift, .scr7_sout,
    .dmx_en, .dmx_sel, .buf_en, .mv_req, .mv_src, .mv_ack, .mv_ok, .mv_dst,
    .moved_valid(1'b0), .moved_from('0), .moved_to('0), .nsc, .mcir, .src,
    .cnt_sa0_and, .cnt_sa1_line, .cnt_spare, .cnt_reroute
  );

  always #5 clk = ~clk;
  initial begin
    #200000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // OR-move responder of the master GAL
  initial forever begin
    @(posedge clk);
    if (rst_n && mv_req && !mv_ack) begin
      repeat (2) @(posedge clk);
      #1;
      if (next_spare < K) begin
        fn_at[next_spare] = fn_at[mv_src];
        fn_at[mv_src]     = -1;
        mv_ok  = 1'b1;
        mv_dst = SW'(next_spare);
        next_spare++;
      end else begin
        mv_ok = 1'b0;
      end
      mv_ack = 1'b1;
      while (mv_req) @(posedge clk);
      #1 mv_ack = 1'b0;
    end
  end

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(bit init);
    @(negedge clk);
    if (init) init_start = 1'b1; else repair_start = 1'b1;
    @(negedge clk);
    init_start = 1'b0; repair_start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  task automatic check_routes(int limit, int trial, int loop);
    automatic bit ok = 1'b1;
    for (int v = 0; v < 16; v++) begin
      fn_val = (v == 0) ? '0 : (v == 1) ? '1 : K'($urandom);
      #1;
      for (int q = 0; q < K; q++)
        if (route_fn[q] >= 0 && pin_out[q] !== fn_val[route_fn[q]]) ok = 1'b0;
    end
    expect_true(ok, $sformatf("limit %0d trial %0d loop %0d routes after repair", limit, trial, loop));
  endtask

  initial begin
    rst_n = 1'b0; d_sa0 = '0; d_sa1 = '0; route_we = 1'b0; route_valid = 1'b0;
    route_out = '0; route_in = '0; init_start = 1'b0; repair_start = 1'b0;
    mv_ack = 1'b0; mv_ok = 1'b0; mv_dst = '0; fn_val = '0; next_spare = USED;
    for (int p = 0; p < K; p++) fn_at[p] = (p < USED) ? p : -1;
    for (int q = 0; q < K; q++) route_fn[q] = 0;

    for (int s = 0; s < 2; s++) begin
      automatic int limit = (s == 0) ? 2 : 4;
      life_sum[s] = 0;
      for (int t = 0; t < TRIALS; t++) begin
        automatic int life = MAX_LOOPS;
        @(negedge clk);
        rst_n = 1'b0; d_sa0 = '0; d_sa1 = '0; next_spare = USED;
        for (int p = 0; p < K; p++) fn_at[p] = (p < USED) ? p : -1;
        repeat (2) @(negedge clk);
        rst_n = 1'b1;
        // each used function to a distinct random output pin (a DEMUX
        // selects one output), the other outputs unrouted
        for (int q = 0; q < K; q++) route_fn[q] = (q < USED) ? q : -1;
        for (int q = K - 1; q > 0; q--) begin
          automatic int j = $urandom_range(q);
          automatic int tmp = route_fn[q];
          route_fn[q] = route_fn[j];
          route_fn[j] = tmp;
        end
        for (int q = 0; q < K; q++) begin
          @(negedge clk);
          route_we = 1'b1; route_out = SW'(q); route_valid = route_fn[q] >= 0;
          route_in = SW'((route_fn[q] >= 0) ? route_fn[q] : 0);
          @(negedge clk);
          route_we = 1'b0;
        end
        run(1'b1);
        expect_true(go, $sformatf("limit %0d trial %0d init go", limit, t));
        for (int l = 1; l <= MAX_LOOPS; l++) begin
          automatic int n = 1 + $urandom_range(limit - 1);
          for (int f = 0; f < n; f++) begin
            automatic int d = $urandom_range(2 * K - 1), q = $urandom_range(K - 1);
            // a line that has already failed keeps its fault
            if (!d_sa0[d][q] && !d_sa1[d][q]) begin
              if ($urandom_range(1) == 0) d_sa0[d][q] = 1'b1; else d_sa1[d][q] = 1'b1;
            end
          end
          run(1'b0);
          if (nogo) begin life = l; break; end
          check_routes(limit, t, l);
        end
        if (cnt_sa0_and != 0) sa0_seen++;
        if (cnt_spare != 0) spare_seen++;
        if (cnt_reroute != 0) reroute_seen++;
        life_sum[s] += life;
      end
    end
    $display("average looping time over %0d trials: %0d.%02d loops at fault limit 2, %0d.%02d at fault limit 4",
             TRIALS, life_sum[0] / TRIALS, (life_sum[0] * 100 / TRIALS) % 100,
             life_sum[1] / TRIALS, (life_sum[1] * 100 / TRIALS) % 100);
    $display("trials with discarded AND gates: %0d, spare lines: %0d, reroutes: %0d",
             sa0_seen, spare_seen, reroute_seen);
    expect_true(sa0_seen > 0, "an AND gate was discarded");
    expect_true(spare_seen > 0, "a spare line was used");
    expect_true(reroute_seen > 0, "a connection was rerouted through a moved OR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
