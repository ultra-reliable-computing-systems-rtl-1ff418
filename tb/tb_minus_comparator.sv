// tb_minus_comparator: self-checking testbench for the minus comparator that
// locates stuck-at cells by subtracting the intended (MAP) bit from the
// measured (SAP) bit: +1 is stuck-at-1, -1 is stuck-at-0, 0 is good.
//
// Random and exhaustive single-bit cases are compared with the arithmetic
// difference computed in the testbench.
module tb_minus_comparator;
  import urcs_pkg::*;
  localparam int unsigned W = GAL_ROWS;
  logic [W-1:0] actual, expected, sa0, sa1;
  cmp_e [W-1:0] result;
  logic any_fault;
  int checks = 0, failures = 0;

  minus_comparator #(.W(W)) dut (.actual, .expected, .result, .sa0, .sa1, .any_fault);

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic check();
    bit any;
    any = 1'b0;
    #1;
    for (int i = 0; i < W; i++) begin
      int d;
      cmp_e e;
      d = int'(actual[i]) - int'(expected[i]);
      e = (d == 1) ? CMP_SA1 : (d == -1) ? CMP_SA0 : CMP_OK;
      if (d != 0) any = 1'b1;
      checks++;
      if (result[i] !== e || sa1[i] !== (d == 1) || sa0[i] !== (d == -1)) begin
        failures++;
        $display("FAIL bit %0d a=%b e=%b result=%b", i, actual[i], expected[i], result[i]);
      end
    end
    checks++;
    if (any_fault !== any) begin failures++; $display("FAIL any_fault"); end
  endtask

  initial begin
    for (int a = 0; a < 2; a++)
      for (int e = 0; e < 2; e++) begin
        actual = {W{1'(a)}}; expected = {W{1'(e)}};
        check();
      end
    for (int t = 0; t < 300; t++) begin
      actual = $urandom;
      expected = (t % 3 == 0) ? actual : W'($urandom);
      if (t % 5 == 0) expected = actual ^ (W'(1) << $urandom_range(0, W - 1));
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
