// tb_gal_repair_ctrl: self-checking testbench for the GAL test-and-repair
// unit driving a real gal_module, at the size of the design's worked
// example: 2 variables (4 rows), 2 OR groups of 8 columns, 4 used columns
// per group, OR group 1 held as the extra OR.
//
// A. The design's cell-column re-use example: MAP columns 0101, 1010,
//    1001, 0110 (rows 0..3) with stuck-at cells in the first three
//    columns. Expected: three re-uses, NC = -2 -2 -2 0, final MAP columns
//    1010, 1001, 0110, 0101 and go after a clean second test.
// B. An XNOR function, then a stuck-at-1 cell that a partner column can
//    absorb (re-use) and a second fault in the re-used column (column
//    replacement). The output must stay XNOR throughout.
// C. A move of OR 0 to the extra OR asked for on mv_req (as the switching
//    circuit unit does); the function must appear on output 1.
// D. After a fresh initialisation, every cell of OR 0 stuck at 0: the unit
//    must exhaust re-use and replacement and move the OR itself
//    (moved_valid), ending in go with the function on output 1.
// E. mv_req with no extra OR left must be answered with mv_ok = 0.
// F. With extra-OR moves disabled, an unrepairable fault must end in nogo.
module tb_gal_repair_ctrl;
  import urcs_pkg::*;
  localparam int unsigned NV = 2, NO = 2, Y = 8, YU = 4, OU = 1;
  localparam int unsigned NR = 2 * NV, M = NO * Y;
  localparam int unsigned CW = $clog2(M), GW = 1;

  logic clk = 1'b0, rst_n;
  logic [NV-1:0] x;
  logic [NO-1:0] y_out;
  logic map_we, cfgsh_we, init_start, repair_start, extra_or_en;
  logic [CW-1:0] map_col, map_rd_col;
  logic [NR-1:0] map_data, map_rd_data;
  logic [GW-1:0] cfgsh_idx;
  olmc_cfg_t cfgsh_data;
  logic busy, done, go, nogo;
  logic mv_req, mv_ack, mv_ok;
  logic [GW-1:0] mv_src, mv_dst, moved_from, moved_to;
  logic moved_valid;
  logic test_mode, scr1_shift, scr1_sin, scr2_capture, scr2_shift, scr2_sout;
  logic prog_we, cfg_we;
  logic [CW-1:0] prog_col;
  logic [NR-1:0] prog_data;
  logic [GW-1:0] cfg_idx;
  olmc_cfg_t cfg_data;
  nc_e [M-1:0] nc;
  nr_e [NO-1:0] nr;
  logic [15:0] cnt_reuse, cnt_replace, cnt_ormove, cnt_faulty, cnt_pass;
  logic [M-1:0][NR-1:0] d_sa0, d_sa1;
  int checks = 0, failures = 0;
  int moved_seen = 0;

  gal_module #(.N_VARS(NV), .N_OR(NO), .Y(Y)) u_gm (
    .clk, .rst_n, .x, .y_out, .test_mode, .scr1_shift, .scr1_sin,
    .scr2_capture, .scr2_shift, .scr2_sout, .prog_we, .prog_col, .prog_data,
    .cfg_we, .cfg_idx, .cfg_data, .defect_sa0(d_sa0), .defect_sa1(d_sa1)
  );

  gal_repair_ctrl #(.N_ROWS(NR), .N_OR(NO), .Y(Y), .Y_USED(YU), .OR_USED(OU)) dut (
    .clk, .rst_n, .map_we, .map_col, .map_data, .cfgsh_we, .cfgsh_idx, .cfgsh_data,
    .map_rd_col, .map_rd_data, .init_start, .repair_start, .extra_or_en,
    .busy, .done, .go, .nogo, .mv_req, .mv_src, .mv_ack, .mv_ok, .mv_dst,
    .moved_valid, .moved_from, .moved_to, .test_mode, .scr1_shift, .scr1_sin,
    .scr2_capture, .scr2_shift, .scr2_sout, .prog_we, .prog_col, .prog_data,
    .cfg_we, .cfg_idx, .cfg_data, .nc, .nr, .cnt_reuse, .cnt_replace,
    .cnt_ormove, .cnt_faulty, .cnt_pass
  );

  always #5 clk = ~clk;
  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  always @(posedge clk) if (moved_valid) moved_seen++;

  // column value from the row bits, row 0 first as in the design's tables
  function automatic logic [NR-1:0] m(bit r0, bit r1, bit r2, bit r3);
    return {r3, r2, r1, r0};
  endfunction

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic load_col(int c, logic [NR-1:0] d);
    @(negedge clk);
    map_we = 1'b1; map_col = CW'(c); map_data = d;
    @(negedge clk);
    map_we = 1'b0;
  endtask

  task automatic run(bit init);
    @(negedge clk);
    if (init) init_start = 1'b1; else repair_start = 1'b1;
    @(negedge clk);
    init_start = 1'b0; repair_start = 1'b0;
    while (!done) @(negedge clk);
  endtask

  // output g must be XNOR(x0, x1) for every input
  task automatic check_xnor(int g, string what);
    for (int v = 0; v < 4; v++) begin
      x = NV'(v);
      #1 expect_true(y_out[g] === ~(x[0] ^ x[1]), what);
    end
  endtask

  task automatic load_xnor();
    load_col(0, m(1, 0, 1, 0));   // x0 & x1
    load_col(1, m(0, 1, 0, 1));   // ~x0 & ~x1
    load_col(2, '1);
    load_col(3, '1);
    for (int c = 4; c < M; c++) load_col(c, '1);
  endtask

  initial begin
    rst_n = 1'b0; x = '0; map_we = 1'b0; cfgsh_we = 1'b0; init_start = 1'b0;
    repair_start = 1'b0; extra_or_en = 1'b1; map_col = '0; map_rd_col = '0;
    map_data = '0; cfgsh_idx = '0; cfgsh_data = '0; mv_req = 1'b0; mv_src = '0;
    d_sa0 = '0; d_sa1 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---------------- A: the worked re-use example ----------------
    load_col(0, m(0, 1, 0, 1));
    load_col(1, m(1, 0, 1, 0));
    load_col(2, m(1, 0, 0, 1));
    load_col(3, m(0, 1, 1, 0));
    run(1'b1);
    expect_true(go && !nogo, "A init go");
    d_sa1[0][2] = 1; d_sa0[0][3] = 1;
    d_sa0[1][1] = 1; d_sa0[1][2] = 1; d_sa1[1][3] = 1;
    d_sa0[2][0] = 1; d_sa1[2][1] = 1; d_sa1[2][2] = 1; d_sa0[2][3] = 1;
    run(1'b0);
    expect_true(go && !nogo, "A repair go");
    expect_true(cnt_reuse == 3 && cnt_replace == 0 && cnt_ormove == 0, "A three re-uses");
    expect_true(cnt_pass == 2, "A one re-test");
    expect_true(nc[0] == NC_REUSED && nc[1] == NC_REUSED && nc[2] == NC_REUSED &&
                nc[3] == NC_USED && nc[4] == NC_AVAIL && nc[7] == NC_AVAIL, "A NC");
    map_rd_col = 0; #1 expect_true(map_rd_data == m(1, 0, 1, 0), "A MAP c0");
    map_rd_col = 1; #1 expect_true(map_rd_data == m(1, 0, 0, 1), "A MAP c1");
    map_rd_col = 2; #1 expect_true(map_rd_data == m(0, 1, 1, 0), "A MAP c2");
    map_rd_col = 3; #1 expect_true(map_rd_data == m(0, 1, 0, 1), "A MAP c3");
    for (int v = 0; v < 4; v++) begin
      x = NV'(v);
      #1 expect_true(y_out[0] === 1'b1, "A function (all four minterms)");
    end

    // ---------------- B: re-use then replacement ----------------
    d_sa0 = '0; d_sa1 = '0;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    load_xnor();
    run(1'b1);
    check_xnor(0, "B init function");
    d_sa1[0][1] = 1;                        // x0&x1 column gains ~x0
    run(1'b0);
    expect_true(go && cnt_reuse == 1 && cnt_replace == 0, "B1 re-use");
    check_xnor(0, "B1 function");
    map_rd_col = 0; #1 expect_true(map_rd_data == m(0, 1, 0, 1), "B1 swapped MAP");
    d_sa1[0][0] = 1;                        // the re-used column fails again
    run(1'b0);
    expect_true(go && cnt_replace == 1 && nc[0] == NC_DEAD && nc[4] == NC_USED, "B2 replacement");
    check_xnor(0, "B2 function");

    // ---------------- C: OR move on request ----------------
    @(negedge clk);
    mv_req = 1'b1; mv_src = '0;
    while (!mv_ack) @(negedge clk);
    expect_true(mv_ok && mv_dst == 1'b1, "C move granted to OR 1");
    mv_req = 1'b0;
    @(negedge clk);
    expect_true(!busy, "C back to idle");
    expect_true(nr[0] == NR_FAULTY && nr[1] == NR_USED, "C NR");
    check_xnor(1, "C function on OR 1");

    // ---------------- D: OR move decided by the unit ----------------
    d_sa0 = '0; d_sa1 = '0;
    rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    load_xnor();
    run(1'b1);
    check_xnor(0, "D init function");
    for (int c = 0; c < Y; c++) d_sa0[c] = '1;
    run(1'b0);
    expect_true(go && !nogo, "D go");
    expect_true(cnt_ormove == 1 && moved_seen == 1, "D one OR move reported");
    expect_true(moved_from == 1'b0 && moved_to == 1'b1, "D move 0 -> 1");
    expect_true(cnt_replace >= 1 && cnt_reuse >= 1, "D tried columns first");
    expect_true(nr[0] == NR_FAULTY && nr[1] == NR_USED, "D NR");
    check_xnor(1, "D function on OR 1");

    // ---------------- E: request with no extra OR ----------------
    @(negedge clk);
    mv_req = 1'b1; mv_src = 1'b1;
    while (!mv_ack) @(negedge clk);
    expect_true(!mv_ok, "E refused");
    mv_req = 1'b0;
    @(negedge clk);

    // ---------------- F: unrepairable ----------------
    extra_or_en = 1'b0;
    for (int c = Y; c < M; c++) d_sa0[c] = '1;
    run(1'b0);
    expect_true(nogo && !go, "F nogo");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
