// redundant_clock_tree: pre-bond test clock distribution for a layer
// whose functional clock arrives from the other layer.
//
// In a power-optimised 3D clock tree almost all of the tree sits on one
// layer and the other layer only receives local clock taps through D2D
// vias, so before bonding that layer has no clock. This module is the
// redundant tree added to that layer: a binary H-tree of LEVELS levels
// fed from one probe pad, with an enable on every buffer. Pre-bond the
// tester asserts tree_en and drives probe_clk; each leaf then carries the
// probe clock. Post-bond tree_en is deasserted, every buffer of the
// redundant tree is off, and each leaf carries the clock that arrives on
// its via from the optimised tree.
//
// An enabled buffer is modelled as an AND of its input with tree_en (a
// disabled buffer idles low), and the leaf net, which is driven either by
// the redundant tree or by its via, as a select on tree_en. The binary
// fan-out and the default of four levels (sixteen leaves) are this
// design's choices. Purely combinational; no flip-flops.
module redundant_clock_tree #(
  parameter int unsigned LEVELS = 4,
  localparam int unsigned LEAVES = 1 << LEVELS
) (
  input  logic              probe_clk,  // test clock from the probe pad
  input  logic              tree_en,    // enable line to every buffer
  input  logic [LEAVES-1:0] via_clk,    // clock taps arriving through D2D vias
  output logic [LEAVES-1:0] leaf_clk    // local clock nets of the layer
);

  // node[l] holds the 2^l buffer outputs of level l; node[0] is the root.
  logic [LEAVES-1:0] node [LEVELS+1];

  assign node[0] = {{(LEAVES-1){1'b0}}, probe_clk & tree_en};

  for (genvar l = 1; l <= LEVELS; l++) begin : g_level
    for (genvar i = 0; i < (1 << l); i++) begin : g_buf
      assign node[l][i] = node[l-1][i/2] & tree_en;
    end
    if ((1 << l) < LEAVES) begin : g_pad
      assign node[l][LEAVES-1:(1 << l)] = '0;
    end
  end

  for (genvar i = 0; i < LEAVES; i++) begin : g_leaf
    assign leaf_clk[i] = tree_en ? node[LEVELS][i] : via_clk[i];
  end

endmodule
