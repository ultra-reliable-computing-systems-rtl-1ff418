// minus_comparator: the FLFRP comparator that subtracts an expected vector
// from an actual one bit by bit.
//
// For every bit the result actual - expected is 0 (no fault), +1 (the
// actual bit is 1 where 0 was expected: stuck-at-1) or -1 (stuck-at-0).
// Unlike an XOR, the sign tells the two fault types apart. For the GAL the
// actual vector is a SAP column (SCR3) and the expected one the matching
// MAP column (SCR4); for the switching circuit they are the scan result
// (RB) and the expected response (RD).
//
// Outputs: the per-bit result as cmp_e codes, the same as two masks, and
// a flag for any difference. Purely combinational.
module minus_comparator
  import urcs_pkg::*;
#(
  parameter int unsigned W = urcs_pkg::GAL_ROWS
) (
  input  logic [W-1:0] actual,
  input  logic [W-1:0] expected,
  output cmp_e [W-1:0] result,
  output logic [W-1:0] sa0,
  output logic [W-1:0] sa1,
  output logic         any_fault
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      sa1[i] = actual[i] & ~expected[i];
      sa0[i] = ~actual[i] & expected[i];
      unique case ({sa1[i], sa0[i]})
        2'b10:   result[i] = CMP_SA1;
        2'b01:   result[i] = CMP_SA0;
        default: result[i] = CMP_OK;
      endcase
    end
    any_fault = |(sa0 | sa1);
  end

endmodule
