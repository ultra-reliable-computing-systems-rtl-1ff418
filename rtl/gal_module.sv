// gal_module: one self-testable, self-repairable GAL block (GM).
//
// The input variables x[v] drive AND-plane rows 2v (true) and 2v+1
// (complement). The N_OR*Y product terms pass through scan register SCR2
// into the fixed OLMC plane, whose N_OR outputs are the block outputs.
// Each OR group owns Y consecutive columns, some of them extra columns.
//
// Normal mode (test_mode = 0): rows come from the inputs and SCR2 is
// transparent. Test mode: the rows are driven by scan register SCR1, which
// the FLFRP loads serially with the walking-0 test set; SCR2 captures the
// product terms for one test vector and shifts them out serially on the
// diagnosis/repair bus. The OLMC flip-flops hold during test mode.
//
// The AND-plane and OLMC programming ports are driven by the FLFRP
// (the role of the GAL programmer). defect_sa0/defect_sa1 model cross-
// point stuck-at defects and are 0 in a real part.
//
// The block structure, the two scan registers and their placement follow
// the design; the row order (variable, complement) is this design's own.
module gal_module
  import urcs_pkg::*;
#(
  parameter int unsigned N_VARS = GAL_VARS,
  parameter int unsigned N_OR   = GAL_ORS,
  parameter int unsigned Y      = GAL_Y,
  localparam int unsigned N_ROWS = 2 * N_VARS,
  localparam int unsigned M      = N_OR * Y
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_VARS-1:0]         x,
  output logic [N_OR-1:0]           y_out,
  // test access on the diagnosis/repair bus
  input  logic                      test_mode,
  input  logic                      scr1_shift,
  input  logic                      scr1_sin,
  input  logic                      scr2_capture,
  input  logic                      scr2_shift,
  output logic                      scr2_sout,
  // programming
  input  logic                      prog_we,
  input  logic [$clog2(M)-1:0]      prog_col,
  input  logic [N_ROWS-1:0]         prog_data,
  input  logic                      cfg_we,
  input  logic [$clog2(N_OR)-1:0]   cfg_idx,
  input  olmc_cfg_t                 cfg_data,
  // cross-point defect model
  input  logic [M-1:0][N_ROWS-1:0]  defect_sa0,
  input  logic [M-1:0][N_ROWS-1:0]  defect_sa1
);

  logic [N_ROWS-1:0] scr1_q;
  logic [N_ROWS-1:0] rows_normal;
  logic [N_ROWS-1:0] rows;
  logic [M-1:0]      pterm;
  logic [M-1:0]      pterm_or;

  always_comb begin
    for (int v = 0; v < N_VARS; v++) begin
      rows_normal[2*v]   = x[v];
      rows_normal[2*v+1] = ~x[v];
    end
    rows = test_mode ? scr1_q : rows_normal;
  end

  scan_sipo #(.W(N_ROWS)) u_scr1 (
    .clk, .rst_n,
    .shift   (scr1_shift),
    .sin     (scr1_sin),
    .par_out (scr1_q)
  );

  and_plane #(.N_ROWS(N_ROWS), .N_COLS(M)) u_and (
    .clk, .rst_n,
    .rows,
    .prog_we, .prog_col, .prog_data,
    .defect_sa0, .defect_sa1,
    .pterm
  );

  scan_piso #(.W(M)) u_scr2 (
    .clk, .rst_n,
    .test_mode,
    .capture (scr2_capture),
    .shift   (scr2_shift),
    .par_in  (pterm),
    .par_out (pterm_or),
    .sout    (scr2_sout)
  );

  olmc_plane #(.N_OR(N_OR), .Y(Y)) u_olmc (
    .clk, .rst_n,
    .hold    (test_mode),
    .pterm   (pterm_or),
    .cfg_we, .cfg_idx, .cfg_data,
    .out     (y_out)
  );

endmodule
