// tb_and_plane: self-checking testbench for and_plane at the GAL16V8 size
// (32 rows, 128 columns).
//
// A reference copy of the programmed cells is kept in the testbench. Each
// trial programs a few random columns, draws random row values and a
// sparse random set of stuck-at-0/stuck-at-1 defects, and compares every
// product term with the reference: a term is 1 unless some effective ON
// cell sits on a row at 0. After reset every cell must be ON, so with any
// row pair (variable and complement) present every term reads 0.
module tb_and_plane;
  import urcs_pkg::*;
  localparam int unsigned NR = GAL_ROWS;
  localparam int unsigned NC = GAL_ORS * GAL_Y;

  logic clk = 1'b0;
  logic rst_n;
  logic [NR-1:0] rows;
  logic prog_we;
  logic [$clog2(NC)-1:0] prog_col;
  logic [NR-1:0] prog_data;
  logic [NC-1:0][NR-1:0] d_sa0, d_sa1;
  logic [NC-1:0] pterm;
  logic [NC-1:0][NR-1:0] ref_cell;
  int checks = 0, failures = 0;

  and_plane #(.N_ROWS(NR), .N_COLS(NC)) dut (
    .clk, .rst_n, .rows, .prog_we, .prog_col, .prog_data,
    .defect_sa0(d_sa0), .defect_sa1(d_sa1), .pterm
  );

  always #5 clk = ~clk;
  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $display("watchdog expired");
    $finish;
  end

  function automatic logic [NC-1:0] model();
    logic [NC-1:0] r;
    for (int c = 0; c < NC; c++) begin
      logic [NR-1:0] eff;
      eff  = (ref_cell[c] | d_sa1[c]) & ~d_sa0[c];
      r[c] = &(~eff | rows);
    end
    return r;
  endfunction

  task automatic check_terms(string what);
    #1;
    checks++;
    if (pterm !== model()) begin
      failures++;
      $display("FAIL %s: pterm=%h expected=%h", what, pterm, model());
    end
  endtask

  initial begin
    rst_n = 1'b0; rows = '0; prog_we = 1'b0; prog_col = '0; prog_data = '0;
    d_sa0 = '0; d_sa1 = '0; ref_cell = '1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // blank device: every cell ON
    for (int t = 0; t < 20; t++) begin
      for (int v = 0; v < NR / 2; v++) begin
        rows[2*v]   = 1'($urandom);
        rows[2*v+1] = ~rows[2*v];
      end
      check_terms("blank");
      checks++;
      if (pterm !== '0) begin failures++; $display("FAIL blank term not 0"); end
    end
    // programming and evaluation with defects
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      prog_we   = 1'b1;
      prog_col  = $clog2(NC)'($urandom_range(0, NC - 1));
      // sparse ON pattern so that terms are often 1
      for (int r = 0; r < NR; r++) prog_data[r] = ($urandom_range(0, 7) == 0);
      ref_cell[prog_col] = prog_data;
      @(negedge clk);
      prog_we = 1'b0;
      if (t % 4 == 0) begin
        d_sa0 = '0; d_sa1 = '0;
        for (int k = 0; k < 6; k++) begin
          d_sa0[$urandom_range(0, NC - 1)][$urandom_range(0, NR - 1)] = 1'b1;
          d_sa1[$urandom_range(0, NC - 1)][$urandom_range(0, NR - 1)] = 1'b1;
        end
      end
      for (int r = 0; r < NR; r++) rows[r] = ($urandom_range(0, 3) != 0);
      check_terms("random");
    end
    // a column with all cells ON is constant 0 for complementary rows
    d_sa0 = '0; d_sa1 = '0;
    @(negedge clk);
    prog_we = 1'b1; prog_col = '0; prog_data = '1; ref_cell[0] = '1;
    @(negedge clk);
    prog_we = 1'b0;
    for (int v = 0; v < NR / 2; v++) begin rows[2*v] = 1'b1; rows[2*v+1] = 1'b0; end
    check_terms("all on");
    checks++;
    if (pterm[0] !== 1'b0) begin failures++; $display("FAIL all-ON column not 0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
