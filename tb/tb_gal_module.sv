// tb_gal_module: self-checking testbench for one GAL block at the GAL16V8
// size (16 variables, 32 rows, 8 OR groups of 16 columns).
//
// 1. Programs random product terms (a few literals per column, free
//    columns left all ON) and random OLMC settings through the programming
//    ports, then applies random inputs in normal mode and compares the
//    outputs with a reference sum-of-products.
// 2. Adds random cross-point stuck-at defects, runs the walking-0 self-test
//    through SCR1/SCR2 exactly as the repair unit does, and checks that
//    each scanned-out bit is the inverse of the effective cellm state.
// 3. Checks that the registered outputs held during test mode.
module tb_gal_module;
  import urcs_pkg::*;
  localparam int unsigned NV = GAL_VARS;
  localparam int unsigned NO = GAL_ORS;
  localparam int unsigned Y  = GAL_Y;
  localparam int unsigned NR = 2 * NV;
  localparam int unsigned M  = NO * Y;

  logic clk = 1'b0, rst_n;
  logic [NV-1:0] x;
  logic [NO-1:0] y_out;
  logic test_mode, scr1_shift, scr1_sin, scr2_capture, scr2_shift, scr2_sout;
  logic prog_we, cfg_we;
  logic [$clog2(M)-1:0] prog_col;
  logic [NR-1:0] prog_data;
  logic [$clog2(NO)-1:0] cfg_idx;
  olmc_cfg_t cfg_data;
  logic [M-1:0][NR-1:0] d_sa0, d_sa1, cellm;
  olmc_cfg_t [NO-1:0] cfg;
  logic [NO-1:0] held;
  int checks = 0, failures = 0;

  gal_module #(.N_VARS(NV), .N_OR(NO), .Y(Y)) dut (
    .clk, .rst_n, .x, .y_out, .test_mode, .scr1_shift, .scr1_sin,
    .scr2_capture, .scr2_shift, .scr2_sout, .prog_we, .prog_col, .prog_data,
    .cfg_we, .cfg_idx, .cfg_data, .defect_sa0(d_sa0), .defect_sa1(d_sa1)
  );

  always #5 clk = ~clk;
  initial begin
    #5000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [NO-1:0] sop();
    logic [NR-1:0] rows;
    logic [NO-1:0] s;
    for (int v = 0; v < NV; v++) begin rows[2*v] = x[v]; rows[2*v+1] = ~x[v]; end
    s = '0;
    for (int c = 0; c < M; c++) begin
      logic [NR-1:0] eff;
      eff = (cellm[c] | d_sa1[c]) & ~d_sa0[c];
      if (&(~eff | rows)) s[c / Y] = 1'b1;
    end
    for (int g = 0; g < NO; g++) s[g] ^= cfg[g].invert;
    return s;
  endfunction

  initial begin
    rst_n = 1'b0; x = '0; test_mode = 1'b0; scr1_shift = 1'b0; scr1_sin = 1'b1;
    scr2_capture = 1'b0; scr2_shift = 1'b0; prog_we = 1'b0; cfg_we = 1'b0;
    prog_col = '0; prog_data = '0; cfg_idx = '0; cfg_data = '0;
    d_sa0 = '0; d_sa1 = '0; cellm = '1; cfg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // program 8 used columns per OR group, 1 to 3 literals each
    for (int c = 0; c < M; c++) begin
      logic [NR-1:0] d;
      d = '0;
      if (c % Y < Y / 2) begin
        for (int l = 0; l < 3; l++) begin
          int v;
          v = $urandom_range(0, NV - 1);
          d[2*v + $urandom_range(0, 1)] = 1'b1;
        end
      end else d = '1;
      @(negedge clk);
      prog_we = 1'b1; prog_col = $clog2(M)'(c); prog_data = d; cellm[c] = d;
    end
    @(negedge clk);
    prog_we = 1'b0;
    for (int g = 0; g < NO; g++) begin
      cfg[g].invert = 1'($urandom);
      cfg[g].registered = (g >= NO - 2);
      cfg_we = 1'b1; cfg_idx = $clog2(NO)'(g); cfg_data = cfg[g];
      @(negedge clk);
    end
    cfg_we = 1'b0;
    // normal mode
    for (int t = 0; t < 300; t++) begin
      logic [NO-1:0] s;
      x = NV'($urandom);
      s = sop();
      #1 checks++;
      for (int g = 0; g < NO - 2; g++)
        if (y_out[g] !== s[g]) begin failures++; $display("FAIL comb out %0d", g); break; end
      @(posedge clk);
      #1 checks++;
      if (y_out[NO-1:NO-2] !== s[NO-1:NO-2]) begin failures++; $display("FAIL registered out"); end
      @(negedge clk);
    end
    // defects and walking-0 self-test
    for (int k = 0; k < 40; k++) begin
      d_sa0[$urandom_range(0, M - 1)][$urandom_range(0, NR - 1)] = 1'b1;
      d_sa1[$urandom_range(0, M - 1)][$urandom_range(0, NR - 1)] = 1'b1;
    end
    held = y_out;
    @(negedge clk);
    test_mode = 1'b1;
    scr1_shift = 1'b1;
    for (int i = 0; i < NR; i++) begin
      scr1_sin = (i != NR - 1);
      @(negedge clk);
    end
    scr1_shift = 1'b0; scr1_sin = 1'b1;
    for (int r = 0; r < NR; r++) begin
      x = NV'($urandom);   // must not matter in test mode
      scr2_capture = 1'b1;
      @(negedge clk);
      scr2_capture = 1'b0;
      scr2_shift = 1'b1;
      for (int c = 0; c < M; c++) begin
        logic e;
        e = (cellm[c][r] | d_sa1[c][r]) & ~d_sa0[c][r];
        checks++;
        if (scr2_sout !== ~e) begin
          failures++;
          $display("FAIL self-test row %0d col %0d got %b cell %b", r, c, scr2_sout, e);
        end
        @(negedge clk);
      end
      scr2_shift = 1'b0;
      scr1_shift = 1'b1;
      @(negedge clk);
      scr1_shift = 1'b0;
    end
    checks++;
    if (y_out[NO-1:NO-2] !== held[NO-1:NO-2]) begin failures++; $display("FAIL registers moved in test mode"); end
    test_mode = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
