// die_layer: one die of the stack, organised as a scan island.
//
// Before bonding a layer is incomplete: the logic on the other die that
// drives its inputs and receives its outputs is missing. Every signal that
// enters through a die-to-die (D2D) via therefore gets an injection scan
// cell, and every signal that leaves through a via gets an observation
// scan cell, so the layer can be tested as a closed island. This is the
// worst case in which no via connects straight to an existing scannable
// flip-flop. The layer's Layer Test Controller (LTC) gives the tester
// access to the cells.
//
// Chain stitching: the N_IN injection cells are numbered 0..N_IN-1 and
// the N_OUT observation cells N_IN..N_IN+N_OUT-1. Cell k belongs to chain
// k mod NCH at position k div NCH, so the cells are spread evenly and
// chain lengths differ by at most one. Each chain starts with a segment
// of the layer's own scannable registers (core_si -> core_so, supplied by
// the functional logic outside this module) and continues with its border
// cells. The stitching order is this design's choice.
//
// The D2D outputs pass straight through (the observation cells only tap
// them). Each injection cell drives logic_in while Test_Enable is high;
// the LTC keeps Test_Enable low once the stack is bonded.
//
// Timing: all cells shift or capture on the rising clock edge; the LTC
// steering and the injection select are combinational.
module die_layer
  import scan_island_pkg::*;
#(
  parameter int unsigned N_IN  = L2_TO_L1_SIGNALS,  // D2D signals arriving on this layer
  parameter int unsigned N_OUT = L1_TO_L2_SIGNALS,  // D2D signals leaving this layer
  parameter int unsigned NCH   = N_CHAINS
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             bonded,
  // probe pads
  input  logic [NCH-1:0]   pad_si,
  output logic [NCH-1:0]   pad_so,
  input  ltc_sel_e         pad_sel,
  input  logic             pad_se,
  input  logic             pad_ce,
  input  logic             pad_te,
  // chip-level serial loop
  input  logic             tdi,
  output logic             tdo,
  input  ltc_sel_e         tap_sel,
  input  logic             tap_se,
  input  logic             tap_ce,
  // scan controls and chain heads for the layer's own scannable registers
  output logic             scan_en,
  output logic             capture_en,
  output logic             test_en,
  output logic [NCH-1:0]   core_si,
  input  logic [NCH-1:0]   core_so,
  // D2D inputs: via side and logic side
  input  logic [N_IN-1:0]  d2d_in,
  output logic [N_IN-1:0]  logic_in,
  // D2D outputs: logic side and via side
  input  logic [N_OUT-1:0] core_out,
  output logic [N_OUT-1:0] d2d_out
);

  localparam int unsigned N_CELLS = N_IN + N_OUT;

  logic [N_CELLS-1:0] cell_so;
  logic [N_CELLS-1:0] cell_si;
  logic [NCH-1:0]     chain_so;

  layer_test_controller #(.NCH(NCH)) u_ltc (
    .clk, .rst_n, .bonded,
    .pad_si, .pad_so, .pad_sel, .pad_se, .pad_ce, .pad_te,
    .tdi, .tdo, .tap_sel, .tap_se, .tap_ce,
    .chain_si(core_si), .chain_so, .chain_se(scan_en), .chain_ce(capture_en), .test_en
  );

  for (genvar k = 0; k < N_CELLS; k++) begin : g_cell
    if (k < NCH) begin : g_head
      assign cell_si[k] = core_so[k];
    end else begin : g_body
      assign cell_si[k] = cell_so[k-NCH];
    end
    if (k < N_IN) begin : g_inj
      inject_scan_cell u_inj (
        .clk, .rst_n, .scan_en, .si(cell_si[k]), .so(cell_so[k]),
        .test_en, .via_in(d2d_in[k]), .logic_in(logic_in[k])
      );
    end else begin : g_obs
      observe_scan_cell u_obs (
        .clk, .rst_n, .scan_en, .capture_en, .si(cell_si[k]), .so(cell_so[k]),
        .via_out(core_out[k-N_IN])
      );
    end
  end

  // Last cell of chain c is c + NCH * ((N_CELLS-1-c) / NCH).
  for (genvar c = 0; c < NCH; c++) begin : g_chain_end
    if (c < N_CELLS) begin : g_cells
      assign chain_so[c] = cell_so[c + NCH * ((N_CELLS - 1 - c) / NCH)];
    end else begin : g_empty
      assign chain_so[c] = core_so[c];
    end
  end

  assign d2d_out = core_out;

endmodule
