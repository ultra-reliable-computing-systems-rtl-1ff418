// tb_urcs_top: end-to-end testbench of the whole system at its default size
// (two GAL16V8-sized modules with 8 extra columns per OR and 2 extra ORs,
// one 8 x 8 switching circuit), with no parameter overrides.
//
// The testbench loads random sum-of-products functions (8 product terms
// of 1 to 3 literals for each of the 6 used ORs of both GALs), routes SC
// output q from GM0 OR q, enters the MSCI entry GM0 -> GM1, initialises
// the system and then injects defects step by step, running a maintenance
// command after each. After every command it drives random inputs and
// compares y with a reference model built from the functions alone, so it
// does not matter where the repairs have put them.
//
// Steps and the mechanism each must trigger:
//   1. stuck-at-1 cell in a GM0 column        -> cell-column re-use
//   2. every cell of a GM1 column stuck at 1   -> column replacement
//   3. every cell of GM0 OR 3 stuck at 1       -> replacements, then an
//                                                extra-OR move and a
//                                                second maintenance round
//   4. stuck-at-1 SC line in use               -> SC stuck-at-1 line, spare
//   5. stuck-at-0 SC line                      -> AND gate discarded, spare
//   6. both SC lines of one output stuck       -> OR move on SC request,
//                                                reroute
//   7. both SC lines of another output stuck,
//      no extra OR left                        -> global no-go
// Each mechanism is counted from the system's event counters; one that
// never happened counts as a failure.
module tb_urcs_top;
  import urcs_pkg::*;
  localparam int unsigned NV = GAL_VARS, NO = GAL_ORS, Y = GAL_Y, YU = GAL_Y_USED;
  localparam int unsigned OU = SYS_OR_USED;
  localparam int unsigned NR = 2 * NV, M = NO * Y, K = NO;
  localparam int unsigned CW = $clog2(M), GW = $clog2(NO);

  logic clk = 1'b0, rst_n;
  logic [NV-1:0] x0;
  logic [NV-K-1:0] x1;
  logic [NO-1:0] y;
  logic host_gm_sel, map_we, cfgsh_we, route_we, route_valid, msci_we;
  logic msci_out, msci_in, msci_valid, init_start, maint_start;
  logic [CW-1:0] map_col, map_rd_col;
  logic [NR-1:0] map_data, map_rd_data;
  logic [GW-1:0] cfgsh_idx, route_out, route_in;
  olmc_cfg_t cfgsh_data;
  logic busy, done, go, nogo;
  logic [1:0][15:0] cnt_reuse, cnt_replace, cnt_ormove;
  logic [15:0] cnt_sc_sa0, cnt_sc_sa1, cnt_sc_spare, cnt_sc_reroute, cnt_rounds;
  logic [1:0][M-1:0][NR-1:0] gm_d_sa0, gm_d_sa1;
  logic [2*K-1:0][K-1:0] sc_d_sa0, sc_d_sa1;

  // reference functions: product terms and output polarity per GAL and OR
  logic [1:0][NO-1:0][YU-1:0][NR-1:0] fn;
  logic [1:0][NO-1:0] inv;

  int checks = 0, failures = 0;
  int n_reuse = 0, n_replace = 0, n_ormove = 0, n_rounds2 = 0;
  int n_sc_sa0 = 0, n_sc_sa1 = 0, n_sc_spare = 0, n_sc_reroute = 0, n_nogo = 0;

  urcs_top dut (
    .clk, .rst_n, .x0, .x1, .y,
    .host_gm_sel, .map_we, .map_col, .map_data, .cfgsh_we, .cfgsh_idx, .cfgsh_data,
    .map_rd_col, .map_rd_data, .route_we, .route_out, .route_in, .route_valid,
    .msci_we, .msci_out, .msci_in, .msci_valid, .init_start, .maint_start,
    .busy, .done, .go, .nogo, .cnt_reuse, .cnt_replace, .cnt_ormove,
    .cnt_sc_sa0, .cnt_sc_sa1, .cnt_sc_spare, .cnt_sc_reroute, .cnt_rounds,
    .gm_defect_sa0(gm_d_sa0), .gm_defect_sa1(gm_d_sa1),
    .sc_defect_sa0(sc_d_sa0), .sc_defect_sa1(sc_d_sa1)
  );

  always #5 clk = ~clk;
  initial begin
    #80000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [NO-1:0] gal_fn(int g, logic [NV-1:0] v);
    logic [NR-1:0] rows;
    logic [NO-1:0] o;
    for (int i = 0; i < NV; i++) begin rows[2*i] = v[i]; rows[2*i+1] = ~v[i]; end
    o = '0;
    for (int k = 0; k < OU; k++)
      for (int j = 0; j < YU; j++)
        if (&(~fn[g][k][j] | rows)) o[k] = 1'b1;
    return o ^ inv[g];
  endfunction

  function automatic logic [NO-1:0] system_fn(logic [NV-1:0] a, logic [NV-K-1:0] b);
    logic [NO-1:0] s;
    s = gal_fn(0, a);
    for (int q = OU; q < K; q++) s[q] = 1'b0;  // unrouted SC outputs
    return gal_fn(1, {b, s});
  endfunction

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_function(string what);
    int bad;
    bad = 0;
    for (int t = 0; t < 64; t++) begin
      x0 = NV'($urandom);
      x1 = (NV-K)'($urandom);
      #1 if (y !== system_fn(x0, x1)) bad++;
    end
    expect_true(bad == 0, what);
  endtask

  task automatic command(bit init);
    @(negedge clk);
    if (init) init_start = 1'b1; else maint_start = 1'b1;
    @(negedge clk);
    init_start = 1'b0; maint_start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
  endtask

  // a row that is ON in column b and OFF in column a of the same function
  function automatic int partner_row(int g, int o, int a, int b);
    for (int r = 0; r < NR; r++) if (fn[g][o][b][r] && !fn[g][o][a][r]) return r;
    return -1;
  endfunction

  initial begin
    logic [15:0] r0, rp, om, rr, s0, s1, sp;
    rst_n = 1'b0; x0 = '0; x1 = '0; host_gm_sel = 1'b0; map_we = 1'b0; cfgsh_we = 1'b0;
    route_we = 1'b0; route_valid = 1'b0; msci_we = 1'b0; msci_out = 1'b0; msci_in = 1'b0;
    msci_valid = 1'b0; init_start = 1'b0; maint_start = 1'b0; map_col = '0; map_rd_col = '0;
    map_data = '0; cfgsh_idx = '0; cfgsh_data = '0; route_out = '0; route_in = '0;
    gm_d_sa0 = '0; gm_d_sa1 = '0; sc_d_sa0 = '0; sc_d_sa1 = '0;
    fn = '0; inv = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // functions, fuse maps and OLMC settings
    for (int g = 0; g < 2; g++) begin
      for (int o = 0; o < OU; o++) begin
        inv[g][o] = 1'($urandom);
        for (int j = 0; j < YU; j++) begin
          int nl;
          nl = $urandom_range(1, 3);
          for (int l = 0; l < nl; l++) begin
            int v;
            v = $urandom_range(0, NV - 1);
            fn[g][o][j][2*v + $urandom_range(0, 1)] = 1'b1;
          end
        end
      end
      for (int c = 0; c < M; c++) begin
        int o, j;
        o = c / Y; j = c % Y;
        @(negedge clk);
        host_gm_sel = 1'(g);
        map_we = 1'b1; map_col = CW'(c);
        map_data = (o < OU && j < YU) ? fn[g][o][j] : '1;
      end
      for (int o = 0; o < NO; o++) begin
        @(negedge clk);
        map_we = 1'b0;
        cfgsh_we = 1'b1; cfgsh_idx = GW'(o);
        cfgsh_data.registered = 1'b0; cfgsh_data.invert = inv[g][o];
      end
      @(negedge clk);
      map_we = 1'b0; cfgsh_we = 1'b0;
    end
    for (int q = 0; q < K; q++) begin
      @(negedge clk);
      route_we = 1'b1; route_out = GW'(q); route_in = GW'(q); route_valid = (q < OU);
    end
    @(negedge clk);
    route_we = 1'b0;
    msci_we = 1'b1; msci_out = 1'b0; msci_in = 1'b1; msci_valid = 1'b1;
    @(negedge clk);
    msci_we = 1'b0;

    command(1'b1);
    expect_true(go && !nogo, "init go");
    check_function("function after init");
    command(1'b0);
    expect_true(go && cnt_rounds == 1, "clean maintenance, one round");
    check_function("function after clean maintenance");

    // 1. cell-column re-use in GM0
    begin
      int r;
      r = partner_row(0, 0, 0, 1);
      expect_true(r >= 0, "re-use partner row exists");
      if (r >= 0) gm_d_sa1[0][0][r] = 1'b1;
    end
    r0 = cnt_reuse[0];
    command(1'b0);
    expect_true(go, "step 1 go");
    if (cnt_reuse[0] > r0) n_reuse++;
    check_function("function after re-use");

    // 2. column replacement in GM1
    gm_d_sa1[1][2*Y + 3] = '1;
    rp = cnt_replace[1];
    command(1'b0);
    expect_true(go, "step 2 go");
    if (cnt_replace[1] > rp) n_replace++;
    check_function("function after replacement");

    // 3. an OR group of GM0 beyond column repair
    for (int j = 0; j < Y; j++) gm_d_sa1[0][3*Y + j] = '1;
    om = cnt_ormove[0];
    command(1'b0);
    expect_true(go, "step 3 go");
    if (cnt_ormove[0] > om) n_ormove++;
    if (cnt_rounds >= 2) n_rounds2++;
    check_function("function after extra-OR move");

    // 4. stuck-at-1 on the original line of output 1 (DEMUX 2)
    sc_d_sa1[2][1] = 1'b1;
    s1 = cnt_sc_sa1; sp = cnt_sc_spare;
    command(1'b0);
    expect_true(go, "step 4 go");
    if (cnt_sc_sa1 > s1) n_sc_sa1++;
    if (cnt_sc_spare > sp) n_sc_spare++;
    check_function("function after spare line");

    // 5. stuck-at-0 on an idle line into AND gate 4 (output 2)
    sc_d_sa0[15][2] = 1'b1;
    s0 = cnt_sc_sa0;
    command(1'b0);
    expect_true(go, "step 5 go");
    if (cnt_sc_sa0 > s0) n_sc_sa0++;
    check_function("function after AND gate loss");

    // 6. both lines of output 4 stuck: OR 4 of GM0 moves, SC reroutes
    sc_d_sa1[8][4] = 1'b1; sc_d_sa1[9][4] = 1'b1;
    rr = cnt_sc_reroute;
    command(1'b0);
    expect_true(go, "step 6 go");
    if (cnt_sc_reroute > rr) n_sc_reroute++;
    check_function("function after reroute");

    // 7. both lines of output 5 stuck and no extra OR left
    sc_d_sa1[10][5] = 1'b1; sc_d_sa1[11][5] = 1'b1;
    command(1'b0);
    if (nogo && !go) n_nogo++;

    $display("mechanisms: reuse=%0d replace=%0d ormove=%0d rounds>1=%0d sc_sa1=%0d sc_spare=%0d sc_sa0=%0d sc_reroute=%0d nogo=%0d",
             n_reuse, n_replace, n_ormove, n_rounds2, n_sc_sa1, n_sc_spare, n_sc_sa0, n_sc_reroute, n_nogo);
    $display("counters: reuse=%0d/%0d replace=%0d/%0d ormove=%0d/%0d sc_sa0=%0d sc_sa1=%0d spare=%0d reroute=%0d",
             cnt_reuse[0], cnt_reuse[1], cnt_replace[0], cnt_replace[1], cnt_ormove[0], cnt_ormove[1],
             cnt_sc_sa0, cnt_sc_sa1, cnt_sc_spare, cnt_sc_reroute);
    expect_true(n_reuse > 0, "mechanism: cell-column re-use");
    expect_true(n_replace > 0, "mechanism: column replacement");
    expect_true(n_ormove > 0, "mechanism: extra-OR move");
    expect_true(n_rounds2 > 0, "mechanism: repeated maintenance round");
    expect_true(n_sc_sa1 > 0, "mechanism: SC stuck-at-1 line");
    expect_true(n_sc_spare > 0, "mechanism: SC spare line");
    expect_true(n_sc_sa0 > 0, "mechanism: SC AND gate discarded");
    expect_true(n_sc_reroute > 0, "mechanism: SC reroute through extra OR");
    expect_true(n_nogo > 0, "mechanism: global no-go");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
