// and_plane: programmable AND plane of a GAL with extra columns.
//
// N_ROWS input lines (rows) cross N_COLS product-term lines (columns). At
// every cross-point an E2CMOS cell is either ON (1), connecting the row to
// the AND gate of its column, or OFF (0), which presents a constant 1 to
// that AND gate. A column's product term is therefore the AND of the rows
// whose cells are ON. A column with all cells ON ANDs every variable with
// its complement and so is constant 0; that is how free extra columns and
// discarded columns are kept out of the OR function.
//
// Cells are programmed one column at a time through the programmer port
// (prog_we, prog_col, prog_data), taking effect on the next clock. Reset
// leaves every cell ON, the blank state in which no column contributes.
//
// Cross-point stuck-at defects are modelled by the defect_sa0/defect_sa1
// masks: a stuck-at-1 cell reads ON and a stuck-at-0 cell reads OFF
// whatever was programmed. They exist to exercise the self-test and repair
// logic and are tied to 0 in a real device.
//
// Timing: the product terms are combinational in rows and the cell state.
module and_plane #(
  parameter int unsigned N_ROWS = urcs_pkg::GAL_ROWS,
  parameter int unsigned N_COLS = urcs_pkg::GAL_ORS * urcs_pkg::GAL_Y
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_ROWS-1:0]              rows,
  input  logic                           prog_we,
  input  logic [$clog2(N_COLS)-1:0]      prog_col,
  input  logic [N_ROWS-1:0]              prog_data,
  input  logic [N_COLS-1:0][N_ROWS-1:0]  defect_sa0,
  input  logic [N_COLS-1:0][N_ROWS-1:0]  defect_sa1,
  output logic [N_COLS-1:0]              pterm
);

  logic [N_COLS-1:0][N_ROWS-1:0] cell_q;
  logic [N_COLS-1:0][N_ROWS-1:0] cell_eff;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cell_q <= '1;
    end else if (prog_we) begin
      cell_q[prog_col] <= prog_data;
    end
  end

  always_comb begin
    for (int c = 0; c < N_COLS; c++) begin
      cell_eff[c] = (cell_q[c] | defect_sa1[c]) & ~defect_sa0[c];
      pterm[c]    = &(~cell_eff[c] | rows);
    end
  end

endmodule
