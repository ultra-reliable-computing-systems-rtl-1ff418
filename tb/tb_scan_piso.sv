// tb_scan_piso: self-checking testbench for the capture/shift scan register
// that sits between the AND plane and the OR plane (SCR2, SCR7), 128 bits.
//
// Checks transparency in normal mode, capture in test mode, that the
// parallel output holds the captured value in test mode, and that shifting
// W times delivers the captured word least significant bit first.
module tb_scan_piso;
  import urcs_pkg::*;
  localparam int unsigned W = GAL_ORS * GAL_Y;
  logic clk = 1'b0, rst_n, test_mode, capture, shift, sout;
  logic [W-1:0] par_in, par_out, word, got;
  int checks = 0, failures = 0;

  scan_piso #(.W(W)) dut (.clk, .rst_n, .test_mode, .capture, .shift, .par_in, .par_out, .sout);

  always #5 clk = ~clk;
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] r;
    for (int i = 0; i < W; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    rst_n = 1'b0; test_mode = 1'b0; capture = 1'b0; shift = 1'b0; par_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      // normal mode: transparent
      @(negedge clk);
      test_mode = 1'b0;
      par_in = rnd();
      #1 checks++;
      if (par_out !== par_in) begin failures++; $display("FAIL transparent"); end
      // test mode capture
      @(negedge clk);
      test_mode = 1'b1;
      word = rnd();
      par_in = word;
      capture = 1'b1;
      @(negedge clk);
      capture = 1'b0;
      par_in = rnd();
      checks++;
      if (par_out !== word) begin failures++; $display("FAIL capture/hold"); end
      // shift out
      shift = 1'b1;
      for (int i = 0; i < W; i++) begin
        got[i] = sout;
        @(negedge clk);
      end
      shift = 1'b0;
      checks++;
      if (got !== word) begin failures++; $display("FAIL shift out %h vs %h", got, word); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
