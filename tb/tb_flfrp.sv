// tb_flfrp: self-checking testbench for the fault-locating/fault-repair
// processor at a reduced size (6 variables, 4 ORs of 4 columns with 2
// used columns, 2 used ORs, a 4 x 4 switching circuit), wired to two real
// GAL modules and a real switching circuit the way the system is.
//
// It checks the command sequencing (init, maintenance rounds, done, go and
// nogo) and the role of the MSCI table: a GAL whose outputs leave through
// the switching circuit may move a failing OR group to an extra OR, and
// then a second maintenance round follows; without the MSCI entry the same
// defect must end in nogo. The system function is compared with a
// reference model after every successful command.
module tb_flfrp;
  import urcs_pkg::*;
  localparam int unsigned NV = 6, NO = 4, Y = 4, YU = 2, OU = 2;
  localparam int unsigned NR = 2 * NV, M = NO * Y, K = NO;
  localparam int unsigned CW = $clog2(M), GW = $clog2(NO);

  logic clk = 1'b0, rst_n;
  logic gm_sel, map_we, cfgsh_we, route_we, route_valid, msci_we;
  logic msci_out, msci_in, msci_valid, init_start, maint_start;
  logic [CW-1:0] map_col, map_rd_col;
  logic [NR-1:0] map_data, map_rd_data;
  logic [GW-1:0] cfgsh_idx, route_out, route_in;
  olmc_cfg_t cfgsh_data;
  logic busy, done, go, nogo;
  logic [1:0] gm_test_mode, gm_scr1_shift, gm_scr1_sin, gm_scr2_capture, gm_scr2_shift, gm_scr2_sout;
  logic [1:0] gm_prog_we, gm_cfg_we;
  logic [1:0][CW-1:0] gm_prog_col;
  logic [1:0][NR-1:0] gm_prog_data;
  logic [1:0][GW-1:0] gm_cfg_idx;
  olmc_cfg_t [1:0] gm_cfg_data;
  logic sc_test_mode, sc_scr6_shift, sc_scr6_sin, sc_scr7_capture, sc_scr7_shift, sc_scr7_sout;
  logic [2*K-1:0] sc_dmx_en, sc_buf_en;
  logic [2*K-1:0][GW-1:0] sc_dmx_sel;
  logic [1:0][15:0] cnt_reuse, cnt_replace, cnt_ormove;
  logic [15:0] cnt_sc_sa0, cnt_sc_sa1, cnt_sc_spare, cnt_sc_reroute, cnt_rounds;
  logic [1:0][M-1:0][NR-1:0] gm_d_sa0, gm_d_sa1;
  logic [2*K-1:0][K-1:0] sc_d_sa0, sc_d_sa1;
  logic [1:0][NV-1:0] gm_x;
  logic [1:0][NO-1:0] gm_y;
  logic [K-1:0] sc_out;
  logic [NV-1:0] x0;
  logic [NV-K-1:0] x1;

  logic [1:0][NO-1:0][YU-1:0][NR-1:0] fn;
  int checks = 0, failures = 0;

  assign gm_x[0] = x0;
  assign gm_x[1] = {x1, sc_out};

  for (genvar g = 0; g < 2; g++) begin : g_gm
    gal_module #(.N_VARS(NV), .N_OR(NO), .Y(Y)) u_gm (
      .clk, .rst_n, .x(gm_x[g]), .y_out(gm_y[g]), .test_mode(gm_test_mode[g]),
      .scr1_shift(gm_scr1_shift[g]), .scr1_sin(gm_scr1_sin[g]),
      .scr2_capture(gm_scr2_capture[g]), .scr2_shift(gm_scr2_shift[g]),
      .scr2_sout(gm_scr2_sout[g]), .prog_we(gm_prog_we[g]), .prog_col(gm_prog_col[g]),
      .prog_data(gm_prog_data[g]), .cfg_we(gm_cfg_we[g]), .cfg_idx(gm_cfg_idx[g]),
      .cfg_data(gm_cfg_data[g]), .defect_sa0(gm_d_sa0[g]), .defect_sa1(gm_d_sa1[g])
    );
  end

  switching_circuit #(.K(K)) u_sc (
    .clk, .rst_n, .pin_in(gm_y[0]), .pin_out(sc_out), .test_mode(sc_test_mode),
    .scr6_shift(sc_scr6_shift), .scr6_sin(sc_scr6_sin), .scr7_capture(sc_scr7_capture),
    .scr7_shift(sc_scr7_shift), .scr7_sout(sc_scr7_sout), .dmx_en(sc_dmx_en),
    .dmx_sel(sc_dmx_sel), .buf_en(sc_buf_en), .defect_sa0(sc_d_sa0), .defect_sa1(sc_d_sa1)
  );

  flfrp #(.N_VARS(NV), .N_OR(NO), .Y(Y), .Y_USED(YU), .OR_USED(OU)) dut (
    .clk, .rst_n, .gm_sel, .map_we, .map_col, .map_data, .cfgsh_we, .cfgsh_idx, .cfgsh_data,
    .map_rd_col, .map_rd_data, .route_we, .route_out, .route_in, .route_valid,
    .msci_we, .msci_out, .msci_in, .msci_valid, .init_start, .maint_start,
    .busy, .done, .go, .nogo,
    .gm_test_mode, .gm_scr1_shift, .gm_scr1_sin, .gm_scr2_capture, .gm_scr2_shift, .gm_scr2_sout,
    .gm_prog_we, .gm_prog_col, .gm_prog_data, .gm_cfg_we, .gm_cfg_idx, .gm_cfg_data,
    .sc_test_mode, .sc_scr6_shift, .sc_scr6_sin, .sc_scr7_capture, .sc_scr7_shift, .sc_scr7_sout,
    .sc_dmx_en, .sc_dmx_sel, .sc_buf_en,
    .cnt_reuse, .cnt_replace, .cnt_ormove, .cnt_sc_sa0, .cnt_sc_sa1, .cnt_sc_spare,
    .cnt_sc_reroute, .cnt_rounds
  );

  always #5 clk = ~clk;
  initial begin
    #20000000;
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
    return o;
  endfunction

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_function(string what);
    int bad;
    bad = 0;
    for (int t = 0; t < 64; t++) begin
      logic [NO-1:0] s;
      x0 = NV'($urandom);
      x1 = (NV-K)'($urandom);
      s = gal_fn(0, x0);
      for (int q = OU; q < K; q++) s[q] = 1'b0;
      #1 if (gm_y[1] !== gal_fn(1, {x1, s})) bad++;
    end
    expect_true(bad == 0, what);
  endtask

  task automatic command(bit init);
    int cycles;
    @(negedge clk);
    if (init) init_start = 1'b1; else maint_start = 1'b1;
    @(negedge clk);
    init_start = 1'b0; maint_start = 1'b0;
    expect_true(busy, "busy after command");
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    @(negedge clk);
    expect_true(!busy, "idle after done");
  endtask

  task automatic setup(bit with_msci);
    rst_n = 1'b0;
    gm_d_sa0 = '0; gm_d_sa1 = '0; sc_d_sa0 = '0; sc_d_sa1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 2; g++) begin
      for (int c = 0; c < M; c++) begin
        @(negedge clk);
        gm_sel = 1'(g); map_we = 1'b1; map_col = CW'(c);
        map_data = (c / Y < OU && c % Y < YU) ? fn[g][c / Y][c % Y] : '1;
      end
      @(negedge clk);
      map_we = 1'b0;
    end
    for (int q = 0; q < K; q++) begin
      @(negedge clk);
      route_we = 1'b1; route_out = GW'(q); route_in = GW'(q); route_valid = (q < OU);
    end
    @(negedge clk);
    route_we = 1'b0;
    msci_we = 1'b1; msci_out = 1'b0; msci_in = 1'b1; msci_valid = with_msci;
    @(negedge clk);
    msci_we = 1'b0;
    command(1'b1);
    expect_true(go && !nogo, "init go");
    check_function("function after init");
  endtask

  initial begin
    rst_n = 1'b0; x0 = '0; x1 = '0; gm_sel = 1'b0; map_we = 1'b0; cfgsh_we = 1'b0;
    cfgsh_idx = '0; cfgsh_data = '0; map_col = '0; map_rd_col = '0; map_data = '0;
    route_we = 1'b0; route_valid = 1'b0; route_out = '0; route_in = '0;
    msci_we = 1'b0; msci_out = 1'b0; msci_in = 1'b0; msci_valid = 1'b0;
    init_start = 1'b0; maint_start = 1'b0;
    gm_d_sa0 = '0; gm_d_sa1 = '0; sc_d_sa0 = '0; sc_d_sa1 = '0;
    fn = '0;
    for (int g = 0; g < 2; g++)
      for (int o = 0; o < OU; o++)
        for (int j = 0; j < YU; j++)
          for (int l = 0; l < 2; l++) begin
            int v;
            v = $urandom_range(0, NV - 1);
            fn[g][o][j][2*v + $urandom_range(0, 1)] = 1'b1;
          end

    // ---- with the MSCI entry GM0 -> GM1 ----
    setup(1'b1);
    command(1'b0);
    expect_true(go && cnt_rounds == 1, "clean maintenance in one round");
    for (int j = 0; j < Y; j++) gm_d_sa1[0][Y + j] = '1;   // OR 1 of GM0 lost
    command(1'b0);
    expect_true(go && !nogo, "OR loss repaired");
    expect_true(cnt_ormove[0] == 1, "one OR move in GM0");
    expect_true(cnt_rounds == 2, "second round after the move");
    check_function("function after OR move");
    // SC: both lines of output 0 stuck, OR 0 must move to the last extra OR
    sc_d_sa1[0][0] = 1'b1; sc_d_sa1[1][0] = 1'b1;
    command(1'b0);
    expect_true(go && cnt_sc_reroute == 1 && cnt_ormove[0] == 2, "SC-requested move");
    check_function("function after SC reroute");
    // a GM1 fault: GM1 drives primary outputs, so it may not move ORs
    for (int j = 0; j < Y; j++) gm_d_sa1[1][j] = '1;
    command(1'b0);
    expect_true(nogo && !go && cnt_ormove[1] == 0, "GM1 OR loss is fatal");

    // ---- without the MSCI entry ----
    setup(1'b0);
    for (int j = 0; j < Y; j++) gm_d_sa1[0][Y + j] = '1;
    command(1'b0);
    expect_true(nogo && !go && cnt_ormove[0] == 0, "no OR move without MSCI entry");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
