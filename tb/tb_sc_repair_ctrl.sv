// tb_sc_repair_ctrl: self-checking testbench for the switching-circuit test
// and repair unit driving a real 8 x 8 switching_circuit.
//
// The master GAL is modelled behaviourally: logical OR functions 0..5 sit
// on GAL pins 0..5 and feed SC outputs 0..5; pins 6 and 7 are extra ORs.
// The model answers mv_req by moving the function to the next free extra
// OR (mv_ok = 1) or refusing when none is left. After every repair the
// testbench drives random function values and checks that each SC output
// shows its function's value wherever that function now lives.
//
// Steps: clean init; a stuck-at-1 line on a used original line (spare line
// taken); a stuck-at-0 line that kills an AND gate (whole gate discarded,
// spare used); both lines of one output stuck (OR moved on request and
// rerouted); an OR move reported on moved_*; both lines of another output
// stuck with no extra OR left (nogo).
//
// A second, 2 x 2 instance replays the design's multiple-fault example: a
// single connection from input pin 0 to output pin 0, input pin 1 being a
// spare OR of the master GAL. A stuck-at-1 on the original line d0-a0
// moves the connection to the spare line d1-a1; a stuck-at-0 on line
// d3-a1 then makes AND a1 unusable, so the OR moves to pin 1 and the
// connection is made through d2-a0, while NSC keeps d2-a0 usable.
module tb_sc_repair_ctrl;
  import urcs_pkg::*;
  localparam int unsigned K = SC_PINS, SW = $clog2(K);
  localparam int unsigned NF = 6;

  logic clk = 1'b0, rst_n;
  logic [K-1:0] pin_in, pin_out;
  logic test_mode, scr6_shift, scr6_sin, scr7_capture, scr7_shift, scr7_sout;
  logic [2*K-1:0] dmx_en, buf_en;
  logic [2*K-1:0][SW-1:0] dmx_sel;
  logic [2*K-1:0][K-1:0] d_sa0, d_sa1;
  logic route_we, route_valid, init_start, repair_start, busy, done, go, nogo;
  logic [SW-1:0] route_out, route_in, mv_src, mv_dst, moved_from, moved_to;
  logic mv_req, mv_ack, mv_ok, moved_valid;
  logic [K-1:0][2*K-1:0] nsc;
  mcir_e [2*K-1:0] mcir;
  logic [K-1:0][SW-1:0] src;
  logic [15:0] cnt_sa0_and, cnt_sa1_line, cnt_spare, cnt_reroute;
  int checks = 0, failures = 0;

  // 2 x 2 instance for the worked example
  logic [1:0] e_pin_in, e_pin_out;
  logic e_test_mode, e_scr6_shift, e_scr6_sin, e_scr7_capture, e_scr7_shift, e_scr7_sout;
  logic [3:0] e_dmx_en, e_buf_en;
  logic [3:0][0:0] e_dmx_sel;
  logic [3:0][1:0] e_sa0, e_sa1;
  logic e_route_we, e_init, e_rep, e_busy, e_done, e_go, e_nogo;
  logic [0:0] e_mv_src, e_mv_dst, e_src_unused_from, e_src_unused_to;
  logic e_mv_req, e_mv_ack, e_mv_ok;
  logic [1:0][3:0] e_nsc;
  mcir_e [3:0] e_mcir;
  logic [1:0][0:0] e_src;
  logic [15:0] e_c0, e_c1, e_c2, e_c3;

  switching_circuit #(.K(2)) u_sc_ex (
    .clk, .rst_n, .pin_in(e_pin_in), .pin_out(e_pin_out), .test_mode(e_test_mode),
    .scr6_shift(e_scr6_shift), .scr6_sin(e_scr6_sin), .scr7_capture(e_scr7_capture),
    .scr7_shift(e_scr7_shift), .scr7_sout(e_scr7_sout), .dmx_en(e_dmx_en), .dmx_sel(e_dmx_sel),
    .buf_en(e_buf_en), .defect_sa0(e_sa0), .defect_sa1(e_sa1)
  );

  sc_repair_ctrl #(.K(2)) dut_ex (
    .clk, .rst_n, .route_we(e_route_we), .route_out(1'b0), .route_in(1'b0), .route_valid(1'b1),
    .init_start(e_init), .repair_start(e_rep), .busy(e_busy), .done(e_done), .go(e_go), .nogo(e_nogo),
    .test_mode(e_test_mode), .scr6_shift(e_scr6_shift), .scr6_sin(e_scr6_sin),
    .scr7_capture(e_scr7_capture), .scr7_shift(e_scr7_shift), .scr7_sout(e_scr7_sout),
    .dmx_en(e_dmx_en), .dmx_sel(e_dmx_sel), .buf_en(e_buf_en),
    .mv_req(e_mv_req), .mv_src(e_mv_src), .mv_ack(e_mv_ack), .mv_ok(e_mv_ok), .mv_dst(e_mv_dst),
    .moved_valid(1'b0), .moved_from(e_src_unused_from), .moved_to(e_src_unused_to),
    .nsc(e_nsc), .mcir(e_mcir), .src(e_src),
    .cnt_sa0_and(e_c0), .cnt_sa1_line(e_c1), .cnt_spare(e_c2), .cnt_reroute(e_c3)
  );

  // the master GAL of the example: its function sits on pin 0, pin 1 is spare
  logic e_fn_pin, e_val;
  assign e_pin_in = e_fn_pin ? {e_val, 1'b0} : {1'b0, e_val};
  always @(posedge clk) begin
    if (e_mv_req && !e_mv_ack) begin
      repeat (2) @(posedge clk);
      #1;
      e_mv_ok = 1'b1; e_mv_dst = 1'b1; e_fn_pin = 1'b1; e_mv_ack = 1'b1;
      while (e_mv_req) @(posedge clk);
      #1 e_mv_ack = 1'b0;
    end
  end

  task automatic e_run(bit init);
    @(negedge clk);
    if (init) e_init = 1'b1; else e_rep = 1'b1;
    @(negedge clk);
    e_init = 1'b0; e_rep = 1'b0;
    while (!e_done) @(negedge clk);
  endtask

  task automatic e_check_path(string what);
    for (int v = 0; v < 2; v++) begin
      e_val = 1'(v);
      #1 expect_true(e_pin_out[0] === e_val, what);
    end
  endtask
  int fn_loc[NF];
  int next_free;
  logic [NF-1:0] val;

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
    .moved_valid, .moved_from, .moved_to, .nsc, .mcir, .src,
    .cnt_sa0_and, .cnt_sa1_line, .cnt_spare, .cnt_reroute
  );

  always #5 clk = ~clk;
  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // the master GAL's pins carry the functions wherever they live
  always_comb begin
    pin_in = '0;
    for (int f = 0; f < NF; f++) pin_in[fn_loc[f]] = val[f];
  end

  // master GAL repair unit model: answer an OR-move request
  always @(posedge clk) begin
    if (mv_req && !mv_ack) begin
      repeat (3) @(posedge clk);
      #1;
      mv_ok  = (next_free < K);
      mv_dst = SW'(next_free);
      if (next_free < K) begin
        for (int f = 0; f < NF; f++) if (fn_loc[f] == int'(mv_src)) fn_loc[f] = next_free;
        next_free++;
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

  task automatic check_paths(string what);
    for (int t = 0; t < 16; t++) begin
      val = NF'($urandom);
      #1 expect_true(pin_out[NF-1:0] === val, what);
    end
  endtask

  initial begin
    e_sa0 = '0; e_sa1 = '0; e_route_we = 1'b0; e_init = 1'b0; e_rep = 1'b0;
    e_mv_ack = 1'b0; e_mv_ok = 1'b0; e_mv_dst = '0; e_fn_pin = 1'b0; e_val = 1'b0;
    e_src_unused_from = '0; e_src_unused_to = '0;
    rst_n = 1'b0; d_sa0 = '0; d_sa1 = '0; route_we = 1'b0; route_valid = 1'b0;
    route_out = '0; route_in = '0; init_start = 1'b0; repair_start = 1'b0;
    mv_ack = 1'b0; mv_ok = 1'b0; mv_dst = '0; moved_valid = 1'b0;
    moved_from = '0; moved_to = '0; val = '0; next_free = NF;
    for (int f = 0; f < NF; f++) fn_loc[f] = f;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int q = 0; q < NF; q++) begin
      @(negedge clk);
      route_we = 1'b1; route_out = SW'(q); route_in = SW'(q); route_valid = 1'b1;
    end
    @(negedge clk);
    route_we = 1'b0;

    // clean part
    run(1'b1);
    expect_true(go, "init go");
    check_paths("init paths");
    run(1'b0);
    expect_true(go && cnt_sa0_and == 0 && cnt_sa1_line == 0 && cnt_spare == 0, "clean test");
    check_paths("clean paths");

    // stuck-at-1 on the original line of output 2 (DEMUX 4 -> AND 4)
    d_sa1[4][2] = 1'b1;
    run(1'b0);
    expect_true(go && cnt_sa1_line == 1 && nsc[2][4] == 1'b0, "sa1 located");
    expect_true(cnt_spare >= 1 && mcir[5] == MCIR_USED, "spare line for output 2");
    check_paths("after sa1 repair");

    // stuck-at-0 on an idle line into AND 6 (output 3): the gate is lost
    d_sa0[0][3] = 1'b1;
    run(1'b0);
    expect_true(go && cnt_sa0_and == 1 && mcir[6] == MCIR_DEAD, "sa0 gate discarded");
    expect_true(mcir[7] == MCIR_USED, "spare gate for output 3");
    check_paths("after sa0 repair");

    // both lines of output 1 stuck at 1: OR 1 must move
    d_sa1[2][1] = 1'b1; d_sa1[3][1] = 1'b1;
    run(1'b0);
    expect_true(go && cnt_reroute == 1 && src[1] == SW'(6) && fn_loc[1] == 6, "OR moved on request");
    check_paths("after reroute");

    // an OR move made by the GAL repair unit on its own: 5 -> 7
    @(negedge clk);
    fn_loc[5] = 7; next_free = K;
    moved_valid = 1'b1; moved_from = SW'(5); moved_to = SW'(7);
    @(negedge clk);
    moved_valid = 1'b0;
    expect_true(src[5] == SW'(7), "SRC follows reported move");
    run(1'b0);
    expect_true(go, "go after reported move");
    check_paths("after reported move");

    // both lines of output 0 stuck with no extra OR left
    d_sa1[0][0] = 1'b1; d_sa1[1][0] = 1'b1;
    run(1'b0);
    expect_true(nogo && !go, "nogo when nothing is left");

    // ---------------- the 2 x 2 worked example ----------------
    @(negedge clk);
    e_route_we = 1'b1;          // output pin 0 <- input pin 0
    @(negedge clk);
    e_route_we = 1'b0;
    e_run(1'b1);
    expect_true(e_go && e_mcir[0] == MCIR_USED && e_mcir[1] == MCIR_AVAIL, "example (a) d0-a0 in use");
    expect_true(e_nsc == '1, "example (a) NSC all ones");
    e_check_path("example (a) path");
    e_sa1[0][0] = 1'b1;          // (b) stuck-at-1 on d0-a0
    e_run(1'b0);
    expect_true(e_go && e_nsc[0][0] == 1'b0 && e_nsc[1][0] == 1'b1, "example (b) NSC");
    expect_true(e_mcir[1] == MCIR_USED, "example (b) spare line d1-a1 in use");
    e_check_path("example (b) path");
    e_sa0[3][0] = 1'b1;          // (c) stuck-at-0 on d3-a1
    e_run(1'b0);
    expect_true(e_go && e_mcir[1] == MCIR_DEAD && e_nsc[0][1] == 1'b0 && e_nsc[1][1] == 1'b0, "example (c) a1 unusable");
    expect_true(e_src[0] == 1'b1 && e_mcir[0] == MCIR_USED && e_c3 == 1, "example (c) OR moved, d2-a0 used");
    e_check_path("example (c) path");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
