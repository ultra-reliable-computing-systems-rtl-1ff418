// urcs_top: an ultra reliable computing system of two self-repairable GAL
// modules joined by a self-repairable switching circuit, all under one
// fault-locating/fault-repair processor (FLFRP):
//
//     x0 (16) --> GM0 --(8)--> SC0 --(8)--+
//                                         +--> GM1 --> y (8)
//     x1 (8)  ----------------------------+
//
// GM0 and GM1 are GAL16V8-sized blocks (32 AND-plane rows, 8 OR groups,
// 16 columns per OR group of which 8 are extra). By default 6 OR groups
// of each GAL are in use and 2 are kept as extra ORs, so that a failing
// OR of GM0 can be moved and the SC can reroute around it; route only the
// SC outputs of used ORs (unrouted outputs read 0). GM1 reads the eight SC
// outputs as its variables 0..7 and eight primary inputs as variables
// 8..15. The FLFRP reaches every block over the diagnosis/repair bus
// (serial scan registers and the programming ports).
//
// Usage: while idle, load both fuse maps (host_gm_sel/map_*), OLMC
// settings (cfgsh_*), the SC pin-to-pin routing (route_*) and the MSCI
// entry GM0 -> GM1 (msci_*); pulse init_start and wait for done. The
// system then computes y from x0 and x1. Pulse maint_start at any time
// to test and repair every block; outputs are meaningless while busy.
// go/nogo give the result; nogo is the global no-go signal raised when
// the spare columns, spare ORs and spare lines can no longer cover the
// faults found.
//
// The defect_* inputs model cross-point and line stuck-at defects for
// evaluation and are tied to 0 in a real system.
module urcs_top
  import urcs_pkg::*;
#(
  parameter int unsigned N_VARS  = GAL_VARS,
  parameter int unsigned N_OR    = GAL_ORS,
  parameter int unsigned Y       = GAL_Y,
  parameter int unsigned Y_USED  = GAL_Y_USED,
  parameter int unsigned OR_USED = SYS_OR_USED,
  localparam int unsigned N_ROWS = 2 * N_VARS,
  localparam int unsigned M      = N_OR * Y,
  localparam int unsigned CW     = $clog2(M),
  localparam int unsigned GW     = (N_OR > 1) ? $clog2(N_OR) : 1,
  localparam int unsigned K      = N_OR
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // functional inputs and outputs
  input  logic [N_VARS-1:0]             x0,
  input  logic [N_VARS-K-1:0]           x1,
  output logic [N_OR-1:0]               y,
  // host access to the FLFRP
  input  logic                          host_gm_sel,
  input  logic                          map_we,
  input  logic [CW-1:0]                 map_col,
  input  logic [N_ROWS-1:0]             map_data,
  input  logic                          cfgsh_we,
  input  logic [GW-1:0]                 cfgsh_idx,
  input  olmc_cfg_t                     cfgsh_data,
  input  logic [CW-1:0]                 map_rd_col,
  output logic [N_ROWS-1:0]             map_rd_data,
  input  logic                          route_we,
  input  logic [GW-1:0]                 route_out,
  input  logic [GW-1:0]                 route_in,
  input  logic                          route_valid,
  input  logic                          msci_we,
  input  logic                          msci_out,
  input  logic                          msci_in,
  input  logic                          msci_valid,
  input  logic                          init_start,
  input  logic                          maint_start,
  output logic                          busy,
  output logic                          done,
  output logic                          go,
  output logic                          nogo,
  // maintenance event counters
  output logic [1:0][15:0]              cnt_reuse,
  output logic [1:0][15:0]              cnt_replace,
  output logic [1:0][15:0]              cnt_ormove,
  output logic [15:0]                   cnt_sc_sa0,
  output logic [15:0]                   cnt_sc_sa1,
  output logic [15:0]                   cnt_sc_spare,
  output logic [15:0]                   cnt_sc_reroute,
  output logic [15:0]                   cnt_rounds,
  // defect model
  input  logic [1:0][M-1:0][N_ROWS-1:0] gm_defect_sa0,
  input  logic [1:0][M-1:0][N_ROWS-1:0] gm_defect_sa1,
  input  logic [2*K-1:0][K-1:0]         sc_defect_sa0,
  input  logic [2*K-1:0][K-1:0]         sc_defect_sa1
);

  logic [1:0]              gm_test_mode, gm_scr1_shift, gm_scr1_sin;
  logic [1:0]              gm_scr2_capture, gm_scr2_shift, gm_scr2_sout;
  logic [1:0]              gm_prog_we, gm_cfg_we;
  logic [1:0][CW-1:0]      gm_prog_col;
  logic [1:0][N_ROWS-1:0]  gm_prog_data;
  logic [1:0][GW-1:0]      gm_cfg_idx;
  olmc_cfg_t [1:0]         gm_cfg_data;
  logic [1:0][N_VARS-1:0]  gm_x;
  logic [1:0][N_OR-1:0]    gm_y;

  logic                    sc_test_mode, sc_scr6_shift, sc_scr6_sin;
  logic                    sc_scr7_capture, sc_scr7_shift, sc_scr7_sout;
  logic [2*K-1:0]          sc_dmx_en, sc_buf_en;
  logic [2*K-1:0][GW-1:0]  sc_dmx_sel;
  logic [K-1:0]            sc_out;

  assign gm_x[0] = x0;
  assign gm_x[1] = {x1, sc_out};
  assign y       = gm_y[1];

  for (genvar g = 0; g < 2; g++) begin : g_gm
    gal_module #(.N_VARS(N_VARS), .N_OR(N_OR), .Y(Y)) u_gm (
      .clk, .rst_n,
      .x            (gm_x[g]),
      .y_out        (gm_y[g]),
      .test_mode    (gm_test_mode[g]),
      .scr1_shift   (gm_scr1_shift[g]),
      .scr1_sin     (gm_scr1_sin[g]),
      .scr2_capture (gm_scr2_capture[g]),
      .scr2_shift   (gm_scr2_shift[g]),
      .scr2_sout    (gm_scr2_sout[g]),
      .prog_we      (gm_prog_we[g]),
      .prog_col     (gm_prog_col[g]),
      .prog_data    (gm_prog_data[g]),
      .cfg_we       (gm_cfg_we[g]),
      .cfg_idx      (gm_cfg_idx[g]),
      .cfg_data     (gm_cfg_data[g]),
      .defect_sa0   (gm_defect_sa0[g]),
      .defect_sa1   (gm_defect_sa1[g])
    );
  end

  switching_circuit #(.K(K)) u_sc (
    .clk, .rst_n,
    .pin_in       (gm_y[0]),
    .pin_out      (sc_out),
    .test_mode    (sc_test_mode),
    .scr6_shift   (sc_scr6_shift),
    .scr6_sin     (sc_scr6_sin),
    .scr7_capture (sc_scr7_capture),
    .scr7_shift   (sc_scr7_shift),
    .scr7_sout    (sc_scr7_sout),
    .dmx_en       (sc_dmx_en),
    .dmx_sel      (sc_dmx_sel),
    .buf_en       (sc_buf_en),
    .defect_sa0   (sc_defect_sa0),
    .defect_sa1   (sc_defect_sa1)
  );

  flfrp #(
    .N_VARS(N_VARS), .N_OR(N_OR), .Y(Y), .Y_USED(Y_USED), .OR_USED(OR_USED)
  ) u_flfrp (
    .clk, .rst_n,
    .gm_sel (host_gm_sel),
    .map_we, .map_col, .map_data,
    .cfgsh_we, .cfgsh_idx, .cfgsh_data,
    .map_rd_col, .map_rd_data,
    .route_we, .route_out, .route_in, .route_valid,
    .msci_we, .msci_out, .msci_in, .msci_valid,
    .init_start, .maint_start,
    .busy, .done, .go, .nogo,
    .gm_test_mode, .gm_scr1_shift, .gm_scr1_sin,
    .gm_scr2_capture, .gm_scr2_shift, .gm_scr2_sout,
    .gm_prog_we, .gm_prog_col, .gm_prog_data,
    .gm_cfg_we, .gm_cfg_idx, .gm_cfg_data,
    .sc_test_mode, .sc_scr6_shift, .sc_scr6_sin,
    .sc_scr7_capture, .sc_scr7_shift, .sc_scr7_sout,
    .sc_dmx_en, .sc_dmx_sel, .sc_buf_en,
    .cnt_reuse, .cnt_replace, .cnt_ormove,
    .cnt_sc_sa0, .cnt_sc_sa1, .cnt_sc_spare, .cnt_sc_reroute,
    .cnt_rounds
  );

endmodule
