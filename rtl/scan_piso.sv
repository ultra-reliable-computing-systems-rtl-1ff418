// scan_piso: parallel-in serial-out scan register (SCR2 of a GAL module,
// SCR7 of a switching circuit).
//
// In normal mode (test_mode = 0) the register is transparent: par_out
// equals par_in combinationally, so product terms or switching-circuit
// AND outputs pass straight through. In test mode par_out holds the
// register contents; capture loads par_in, and shift moves the contents
// one place towards bit 0, presenting bit 0 on sout first, so the scan
// result leaves on the serial bus in index order 0, 1, ..., W-1.
//
// Timing: capture and shift act on the clock edge; sout is the current
// bit 0 and is valid in the cycle before the shift that consumes it.
module scan_piso #(
  parameter int unsigned W = urcs_pkg::GAL_ORS * urcs_pkg::GAL_Y
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic         capture,
  input  logic         shift,
  input  logic [W-1:0] par_in,
  output logic [W-1:0] par_out,
  output logic         sout
);

  logic [W-1:0] q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (capture) begin
      q <= par_in;
    end else if (shift) begin
      q <= {1'b0, q[W-1:1]};
    end
  end

  assign par_out = test_mode ? q : par_in;
  assign sout    = q[0];

endmodule
