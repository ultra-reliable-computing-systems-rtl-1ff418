// urcs_pkg: sizes and status encodings shared by the self-repairing GAL
// modules, the switching circuit and the fault-locating/fault-repair
// processor (FLFRP).
//
// Default sizes follow the GAL16V8 model used throughout the design:
// 16 input variables give 32 AND-plane rows (each variable and its
// complement), 8 OR groups (OLMCs), and 16 columns per OR group, of which
// 8 are programmed product terms and 8 are extra (spare) columns. The
// switching circuit has k = 8 input and 8 output pins.
//
// Status registers use the small signed codes of the design, stored as
// 2-bit two's-complement values so that "0", "1", "-1" and "-2" read the
// same in a waveform as in the description:
//   NC   (next column, one per AND-plane column):
//        0 in use, 1 free extra column, -1 discarded, -2 already re-used
//        (may only be replaced from now on)
//   NR   (next OR, one per OR group): 0 in use, 1 free extra OR, -1 faulty
//   MCIR (module-connection information, one per switching-circuit AND):
//        0 in use, -1 available, -2 unusable (stuck-at-0 on one of its lines)
//
// Each module imports only the constants it needs, so a module compiled on
// its own leaves the other size constants unused.
package urcs_pkg;

  localparam int unsigned GAL_VARS     = 16; // input variables of a GAL
  localparam int unsigned GAL_ROWS     = 2 * GAL_VARS; // n = 32
  localparam int unsigned GAL_ORS      = 8;  // k = 8 OLMCs
  localparam int unsigned GAL_Y        = 16; // columns per OR incl. extras
  localparam int unsigned GAL_Y_USED   = 8;  // programmed columns per OR
  localparam int unsigned SC_PINS      = 8;  // k pins of a switching circuit
  localparam int unsigned SYS_OR_USED  = 6;  // OR groups in use in a system GAL (2 kept as extra ORs)

  typedef enum logic [1:0] {
    NC_USED   = 2'b00,  //  0
    NC_AVAIL  = 2'b01,  //  1
    NC_DEAD   = 2'b11,  // -1
    NC_REUSED = 2'b10   // -2
  } nc_e;

  typedef enum logic [1:0] {
    NR_USED   = 2'b00,  //  0
    NR_EXTRA  = 2'b01,  //  1
    NR_FAULTY = 2'b11   // -1
  } nr_e;

  typedef enum logic [1:0] {
    MCIR_USED  = 2'b00, //  0
    MCIR_AVAIL = 2'b11, // -1
    MCIR_DEAD  = 2'b10  // -2
  } mcir_e;

  // Result of the bit-by-bit "minus" comparison actual - expected.
  typedef enum logic [1:0] {
    CMP_OK  = 2'b00,    //  0  no fault
    CMP_SA1 = 2'b01,    // +1  stuck-at-1
    CMP_SA0 = 2'b11     // -1  stuck-at-0
  } cmp_e;

  // OLMC configuration bits.
  typedef struct packed {
    logic registered; // 1: output from the OLMC flip-flop
    logic invert;     // 1: output polarity inverted
  } olmc_cfg_t;

endpackage
