// olmc_plane: the fixed OR plane of a GAL, one output logic macro cell
// (OLMC) per OR group.
//
// OLMC g ORs its Y product terms pterm[g*Y +: Y]. The sum goes through a
// polarity XOR and then either straight to the output (combinational mode)
// or through the OLMC D flip-flop (registered mode). The two configuration
// bits of each OLMC are written through cfg_we/cfg_idx/cfg_data together
// with the AND-plane programming. Only these two options of the OLMC are
// modelled; the GAL16V8 output-enable and feedback multiplexers are left
// out, and outputs are always driven.
//
// The flip-flops load only while hold is low, so a self-test that drives
// test vectors into the AND plane does not disturb registered state.
// Timing: combinational outputs follow pterm in the same cycle; registered
// outputs change on the clock edge after their sum.
module olmc_plane
  import urcs_pkg::*;
#(
  parameter int unsigned N_OR = GAL_ORS,
  parameter int unsigned Y    = GAL_Y
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      hold,
  input  logic [N_OR*Y-1:0]         pterm,
  input  logic                      cfg_we,
  input  logic [$clog2(N_OR)-1:0]   cfg_idx,
  input  olmc_cfg_t                 cfg_data,
  output logic [N_OR-1:0]           out
);

  olmc_cfg_t [N_OR-1:0] cfg_q;
  logic      [N_OR-1:0] sum;
  logic      [N_OR-1:0] ff_q;

  always_comb begin
    for (int g = 0; g < N_OR; g++) begin
      sum[g] = (|pterm[g*Y +: Y]) ^ cfg_q[g].invert;
      out[g] = cfg_q[g].registered ? ff_q[g] : sum[g];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
      ff_q  <= '0;
    end else begin
      if (cfg_we) cfg_q[cfg_idx] <= cfg_data;
      if (!hold)  ff_q <= sum;
    end
  end

endmodule
