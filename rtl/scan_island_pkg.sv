// scan_island_pkg: constants and types shared by the scan-island test
// hardware of a two-layer die stack.
//
// The chain count (sixteen per layer, selected by one select pad) follows
// the reference layer test controller. The per-layer die-to-die (D2D)
// signal counts are the sums of the inter-die bus table of the sample
// two-layer floorplan of an Alpha 21264 class processor: 1115 signals are
// sourced on layer 1 and 1282 on layer 2, 2397 in all. The select
// encoding, the TAP instruction register width and the opcodes are this
// design's own choices.
package scan_island_pkg;

  // Scan chains (and bypass registers) per layer.
  localparam int unsigned N_CHAINS = 16;

  // D2D signals sourced on each layer (sum of the bus table rows).
  localparam int unsigned L1_TO_L2_SIGNALS = 1115;
  localparam int unsigned L2_TO_L1_SIGNALS = 1282;

  // Staggered adder width (two halves of ADDER_WIDTH/2 bits).
  localparam int unsigned ADDER_WIDTH = 32;

  // LTC select pad: which of the two parallel paths sits between the
  // Si and So pads.
  typedef enum logic {
    SEL_BYPASS = 1'b0,
    SEL_CHAINS = 1'b1
  } ltc_sel_e;

  // IEEE 1149.1 TAP controller states.
  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'h0,
    RUN_TEST_IDLE    = 4'h1,
    SELECT_DR_SCAN   = 4'h2,
    CAPTURE_DR       = 4'h3,
    SHIFT_DR         = 4'h4,
    EXIT1_DR         = 4'h5,
    PAUSE_DR         = 4'h6,
    EXIT2_DR         = 4'h7,
    UPDATE_DR        = 4'h8,
    SELECT_IR_SCAN   = 4'h9,
    CAPTURE_IR       = 4'hA,
    SHIFT_IR         = 4'hB,
    EXIT1_IR         = 4'hC,
    PAUSE_IR         = 4'hD,
    EXIT2_IR         = 4'hE,
    UPDATE_IR        = 4'hF
  } tap_state_e;

  localparam int unsigned IR_WIDTH = 4;

  // TAP instructions. BYPASS is all ones as the standard requires.
  typedef enum logic [IR_WIDTH-1:0] {
    IR_LAYER_BYPASS = 4'h2,  // serial loop through one LTC bypass bit per layer
    IR_LAYER_SCAN   = 4'h3,  // serial loop through every scan chain of every layer
    IR_BYPASS       = 4'hF
  } tap_instr_e;

  // Value loaded into the instruction register in Capture-IR (the two
  // least significant bits must be 01).
  localparam logic [IR_WIDTH-1:0] IR_CAPTURE = 4'b0001;

  // Stage-3 flags of the staggered adder.
  typedef struct packed {
    logic carry;     // carry out of the top bit
    logic overflow;  // signed overflow
    logic negative;  // sign of the sum
    logic zero;      // sum is zero
  } add_flags_t;

endpackage
