// tb_olmc_plane: self-checking testbench for the fixed OR plane and OLMCs at
// the GAL16V8 size (8 OR groups of 16 product terms).
//
// Random OLMC settings (polarity, registered) and random product terms
// are applied; combinational outputs are checked in the same cycle and
// registered outputs after the clock edge, including that a registered
// output holds while hold is high.
module tb_olmc_plane;
  import urcs_pkg::*;
  localparam int unsigned N_OR = GAL_ORS;
  localparam int unsigned Y = GAL_Y;
  logic clk = 1'b0, rst_n, hold, cfg_we;
  logic [N_OR*Y-1:0] pterm;
  logic [$clog2(N_OR)-1:0] cfg_idx;
  olmc_cfg_t cfg_data;
  logic [N_OR-1:0] out, ff_ref;
  olmc_cfg_t [N_OR-1:0] cfg_ref;
  int checks = 0, failures = 0;

  olmc_plane #(.N_OR(N_OR), .Y(Y)) dut (.clk, .rst_n, .hold, .pterm, .cfg_we, .cfg_idx, .cfg_data, .out);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [N_OR-1:0] sums();
    logic [N_OR-1:0] s;
    for (int g = 0; g < N_OR; g++) s[g] = (|pterm[g*Y +: Y]) ^ cfg_ref[g].invert;
    return s;
  endfunction

  function automatic logic [N_OR-1:0] expect_out();
    logic [N_OR-1:0] s, o;
    s = sums();
    for (int g = 0; g < N_OR; g++) o[g] = cfg_ref[g].registered ? ff_ref[g] : s[g];
    return o;
  endfunction

  initial begin
    rst_n = 1'b0; hold = 1'b0; cfg_we = 1'b0; pterm = '0; cfg_idx = '0; cfg_data = '0;
    cfg_ref = '0; ff_ref = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      cfg_we = ($urandom_range(0, 3) == 0);
      cfg_idx = $clog2(N_OR)'($urandom_range(0, N_OR - 1));
      cfg_data.registered = 1'($urandom);
      cfg_data.invert = 1'($urandom);
      hold = ($urandom_range(0, 4) == 0);
      for (int c = 0; c < N_OR * Y; c++) pterm[c] = ($urandom_range(0, 9) == 0);
      #1 checks++;
      if (out !== expect_out()) begin failures++; $display("FAIL comb t=%0d out=%b exp=%b", t, out, expect_out()); end
      @(posedge clk);
      if (!hold) ff_ref = sums();
      if (cfg_we) cfg_ref[cfg_idx] = cfg_data;
      #1 checks++;
      if (out !== expect_out()) begin failures++; $display("FAIL reg t=%0d out=%b exp=%b", t, out, expect_out()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
