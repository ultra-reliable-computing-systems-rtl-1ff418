// tb_scan_sipo: self-checking testbench for the serial-in parallel-out scan
// register (SCR1/SCR6 style), 32 bits.
//
// Checks the all-ones reset value, then shifts random bits with random
// gaps (shift low) and compares the parallel output with a reference
// shift register after every clock.
module tb_scan_sipo;
  import urcs_pkg::*;
  localparam int unsigned W = GAL_ROWS;
  logic clk = 1'b0, rst_n, shift, sin;
  logic [W-1:0] par_out, ref_q;
  int checks = 0, failures = 0;

  scan_sipo #(.W(W)) dut (.clk, .rst_n, .shift, .sin, .par_out);

  always #5 clk = ~clk;
  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    rst_n = 1'b0; shift = 1'b0; sin = 1'b0; ref_q = '1;
    repeat (2) @(posedge clk);
    #1 checks++;
    if (par_out !== '1) begin failures++; $display("FAIL reset value %h", par_out); end
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 3) != 0);
      sin   = 1'($urandom);
      @(posedge clk);
      if (shift) ref_q = {ref_q[W-2:0], sin};
      #1 checks++;
      if (par_out !== ref_q) begin
        failures++;
        $display("FAIL t=%0d par_out=%h expected=%h", t, par_out, ref_q);
      end
    end
    // walking-0 load as used by the self-test
    @(negedge clk);
    shift = 1'b1;
    for (int i = 0; i < W; i++) begin
      sin = (i != W - 1);
      @(negedge clk);
    end
    shift = 1'b0;
    checks++;
    if (par_out !== {{(W-1){1'b1}}, 1'b0}) begin failures++; $display("FAIL walking-0 load %h", par_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
