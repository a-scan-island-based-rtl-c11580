// die_stack_top: a two-layer die stack made testable layer by layer.
//
// Layer 1 and layer 2 each carry the border scan cells for every
// die-to-die (D2D) signal they receive or send (the bus counts of the
// sample processor floorplan: 1282 signals from layer 2 to layer 1, 1115
// from layer 1 to layer 2) and a Layer Test Controller (LTC) with sixteen
// chains. Layer 1 also holds the staggered adder example, whose operand
// buses come from layer 2 and whose result goes to layer 2; its scan
// chain is spliced into the head of layer 1's chain 0.
//
// bonded = 0 models the two dies before bonding, each on its own probe
// station: every via is open (reads as 0), each LTC is driven from its
// own pads, and layer 1 is clocked by its redundant clock tree from the
// l1_probe_clk pad (l1_tree_en high). bonded = 1 models the finished
// stack: vias connect the layers, the pads are disconnected, layer 1 is
// clocked through its vias from the main clock (l1_tree_en low), and the
// IEEE 1149.1 TAP on layer 2 reaches both LTCs through one serial loop:
// TAP -> layer 2 LTC -> layer 1 LTC -> TAP.
//
// The processor logic on each layer is not part of this design. Its D2D
// inputs and outputs, and the head segment of every chain where its own
// scannable registers would sit, are ports of this module. TCK is the
// same net as the main clock, and layer 2 is the one with the package
// pins and the main clock tree; both are this design's choices.
module die_stack_top
  import scan_island_pkg::*;
#(
  parameter int unsigned N12        = L1_TO_L2_SIGNALS,
  parameter int unsigned N21        = L2_TO_L1_SIGNALS,
  parameter int unsigned NCH        = N_CHAINS,
  parameter int unsigned AW         = ADDER_WIDTH,
  parameter int unsigned CLK_LEVELS = 4
) (
  input  logic                   clk,           // main clock (layer 2 tree, also TCK)
  input  logic                   rst_n,
  input  logic                   bonded,        // 0: separate dies on probe, 1: bonded stack
  // layer 1 redundant test clock tree
  input  logic                   l1_probe_clk,
  input  logic                   l1_tree_en,
  output logic [(1<<CLK_LEVELS)-1:0] l1_clk_leaves,
  // layer 1 probe pads
  input  logic [NCH-1:0]         l1_pad_si,
  output logic [NCH-1:0]         l1_pad_so,
  input  ltc_sel_e               l1_pad_sel,
  input  logic                   l1_pad_se,
  input  logic                   l1_pad_ce,
  input  logic                   l1_pad_te,
  // layer 2 probe pads
  input  logic [NCH-1:0]         l2_pad_si,
  output logic [NCH-1:0]         l2_pad_so,
  input  ltc_sel_e               l2_pad_sel,
  input  logic                   l2_pad_se,
  input  logic                   l2_pad_ce,
  input  logic                   l2_pad_te,
  // IEEE 1149.1 pins (TCK is clk)
  input  logic                   trst_n,
  input  logic                   tms,
  input  logic                   tdi,
  output logic                   tdo,
  output logic                   tdo_oe,
  // layer 1 processor logic (not part of this design)
  output logic [N21-1:0]         l1_logic_in,   // D2D inputs as seen by the logic
  input  logic [N12-1:0]         l1_core_out,   // D2D outputs driven by the logic
  output logic [NCH-1:0]         l1_core_si,    // chain heads into the logic's scan registers
  input  logic [NCH-1:0]         l1_core_so,
  output logic                   l1_scan_en,
  output logic                   l1_capture_en,
  // layer 2 processor logic (not part of this design)
  output logic [N12-1:0]         l2_logic_in,
  input  logic [N21-1:0]         l2_core_out,
  output logic [NCH-1:0]         l2_core_si,
  input  logic [NCH-1:0]         l2_core_so,
  output logic                   l2_scan_en,
  output logic                   l2_capture_en,
  // adder example: operands from layer 2 logic, result to layer 2 logic
  input  logic [AW-1:0]          l2_adder_a,
  input  logic [AW-1:0]          l2_adder_b,
  output logic [AW+3:0]          l2_adder_result
);

  localparam int unsigned LEAVES = 1 << CLK_LEVELS;

  // ---------------- clocks ----------------
  // Layer 1 receives its functional clock through vias from layer 2's
  // optimised tree; an open via carries no clock.
  logic [LEAVES-1:0] l1_via_clk;
  logic              l1_clk, l1_adder_clk;

  assign l1_via_clk = bonded ? {LEAVES{clk}} : '0;

  redundant_clock_tree #(.LEVELS(CLK_LEVELS)) u_l1_clk_tree (
    .probe_clk(l1_probe_clk), .tree_en(l1_tree_en), .via_clk(l1_via_clk), .leaf_clk(l1_clk_leaves)
  );

  assign l1_clk       = l1_clk_leaves[0];
  assign l1_adder_clk = l1_clk_leaves[1];

  // ---------------- TAP and serial loop ----------------
  ltc_sel_e loop_sel;
  logic     loop_se, loop_ce, loop_tdi, loop_mid, loop_tdo;

  tap_controller u_tap (
    .tck(clk), .trst_n, .tms, .tdi, .tdo, .tdo_oe,
    .loop_tdi, .loop_tdo, .ltc_sel(loop_sel), .ltc_se(loop_se), .ltc_ce(loop_ce),
    .state(), .instr()
  );

  // ---------------- D2D vias ----------------
  logic [N12-1:0] l1_d2d_out, l2_d2d_in;
  logic [N21-1:0] l2_d2d_out, l1_d2d_in;

  assign l2_d2d_in = bonded ? l1_d2d_out : '0;
  assign l1_d2d_in = bonded ? l2_d2d_out : '0;

  logic [AW-1:0] adder_a_via, adder_b_via;
  logic [AW+3:0] adder_result;

  assign adder_a_via     = bonded ? l2_adder_a : '0;
  assign adder_b_via     = bonded ? l2_adder_b : '0;
  assign l2_adder_result = bonded ? adder_result : '0;

  // ---------------- layer 2 ----------------
  logic l2_test_en_unused;

  die_layer #(.N_IN(N12), .N_OUT(N21), .NCH(NCH)) u_layer2 (
    .clk, .rst_n, .bonded,
    .pad_si(l2_pad_si), .pad_so(l2_pad_so), .pad_sel(l2_pad_sel),
    .pad_se(l2_pad_se), .pad_ce(l2_pad_ce), .pad_te(l2_pad_te),
    .tdi(loop_tdi), .tdo(loop_mid), .tap_sel(loop_sel), .tap_se(loop_se), .tap_ce(loop_ce),
    .scan_en(l2_scan_en), .capture_en(l2_capture_en), .test_en(l2_test_en_unused),
    .core_si(l2_core_si), .core_so(l2_core_so),
    .d2d_in(l2_d2d_in), .logic_in(l2_logic_in),
    .core_out(l2_core_out), .d2d_out(l2_d2d_out)
  );

  // ---------------- layer 1 ----------------
  logic [NCH-1:0] l1_head_si, l1_head_so;
  logic           l1_test_en;

  die_layer #(.N_IN(N21), .N_OUT(N12), .NCH(NCH)) u_layer1 (
    .clk(l1_clk), .rst_n, .bonded,
    .pad_si(l1_pad_si), .pad_so(l1_pad_so), .pad_sel(l1_pad_sel),
    .pad_se(l1_pad_se), .pad_ce(l1_pad_ce), .pad_te(l1_pad_te),
    .tdi(loop_mid), .tdo(loop_tdo), .tap_sel(loop_sel), .tap_se(loop_se), .tap_ce(loop_ce),
    .scan_en(l1_scan_en), .capture_en(l1_capture_en), .test_en(l1_test_en),
    .core_si(l1_head_si), .core_so(l1_head_so),
    .d2d_in(l1_d2d_in), .logic_in(l1_logic_in),
    .core_out(l1_core_out), .d2d_out(l1_d2d_out)
  );

  // Chain 0 of layer 1: LTC -> adder island -> processor logic segment -> border cells.
  logic adder_so;

  adder_island #(.WIDTH(AW)) u_adder_island (
    .clk(l1_adder_clk), .rst_n,
    .test_en(l1_test_en), .scan_en(l1_scan_en), .capture_en(l1_capture_en),
    .si(l1_head_si[0]), .so(adder_so),
    .a_via(adder_a_via), .b_via(adder_b_via), .result_via(adder_result)
  );

  assign l1_core_si = {l1_head_si[NCH-1:1], adder_so};
  assign l1_head_so = l1_core_so;

endmodule
