// scan_sipo: serial-in parallel-out scan register (SCR1 of a GAL module,
// SCR6 of a switching circuit).
//
// The register is loaded from the serial diagnosis/repair bus. On each
// clock with shift set, every bit moves one place towards the high index
// and sin enters bit 0, so bit 0 holds the newest bit. Loading the
// walking-0 test set therefore takes W-1 ones followed by one zero, which
// gives 0111..1 on the rows (bit 0 = row 1), and each later shift with a
// one moves the single zero one row on. Reset sets all bits to 1.
//
// Interface: par_out drives the rows (or DEMUX data inputs) in test mode.
// Timing: one bit per clock; par_out is a register output.
module scan_sipo #(
  parameter int unsigned W = urcs_pkg::GAL_ROWS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         sin,
  output logic [W-1:0] par_out
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      par_out <= '1;
    end else if (shift) begin
      par_out <= {par_out[W-2:0], sin};
    end
  end

endmodule
