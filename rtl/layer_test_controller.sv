// layer_test_controller (LTC): gives the tester access to the scan chains
// of one die layer, both before and after the layers are bonded.
//
// Before bonding (bonded = 0) the LTC is reached through probe pads. It
// offers sixteen chains in parallel: pad_si[i] feeds scan chain i or
// one-bit bypass register i, and pad_so[i] shows the end of chain i or
// bypass register i. The single select pad chooses between the two for
// all sixteen lanes at once (sixteen demultiplexers on the inputs,
// sixteen multiplexers on the outputs). Thirty-three pads carry Si, So
// and select; scan enable, capture enable and Test_Enable come from
// three further pads here, because the shift/capture control is not part
// of the pad list this LTC is modelled on.
//
// After bonding (bonded = 1, the state of the fuse or transmission gate
// that disconnects the pads) the pads are ignored and pad_so is held at
// zero. The LTC is then one link of the chip-level serial test loop
// driven by the IEEE 1149.1 TAP: with the chains selected, tdi enters
// chain 0, chain i feeds chain i+1, and chain 15 drives tdo; with the
// bypass selected the layer contributes a single bit (bypass register 0).
// Test_Enable for the injection cells is forced low after bonding, since
// injecting then would fight the drivers on the neighbouring layer.
// Chain order in the serial loop and the one-bit serial bypass are this
// design's choices.
//
// Timing: the bypass registers shift on the rising edge when the shift
// enable of the active side is high. Everything else is combinational
// steering, so a chain behaves as if wired straight to its pads.
module layer_test_controller
  import scan_island_pkg::*;
#(
  parameter int unsigned NCH = N_CHAINS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           bonded,       // 1: pads disconnected, serial loop in use
  // probe pads (pre-bond)
  input  logic [NCH-1:0] pad_si,
  output logic [NCH-1:0] pad_so,
  input  ltc_sel_e       pad_sel,
  input  logic           pad_se,       // shift
  input  logic           pad_ce,       // capture
  input  logic           pad_te,       // Test_Enable for the injection cells
  // chip-level serial loop (post-bond)
  input  logic           tdi,
  output logic           tdo,
  input  ltc_sel_e       tap_sel,
  input  logic           tap_se,
  input  logic           tap_ce,
  // scan chains of the layer
  output logic [NCH-1:0] chain_si,
  input  logic [NCH-1:0] chain_so,
  output logic           chain_se,
  output logic           chain_ce,
  output logic           test_en
);

  logic [NCH-1:0] bypass_q, bypass_d;
  logic           bypass_shift;
  ltc_sel_e       sel;

  assign sel = bonded ? tap_sel : pad_sel;

  always_comb begin
    chain_si     = '0;
    pad_so       = '0;
    tdo          = 1'b0;
    chain_se     = 1'b0;
    chain_ce     = 1'b0;
    test_en      = 1'b0;
    bypass_d     = bypass_q;
    bypass_shift = 1'b0;
    if (!bonded) begin
      test_en = pad_te;
      if (sel == SEL_CHAINS) begin
        chain_si = pad_si;
        pad_so   = chain_so;
        chain_se = pad_se;
        chain_ce = pad_ce;
      end else begin
        bypass_d     = pad_si;
        bypass_shift = pad_se;
        pad_so       = bypass_q;
      end
    end else begin
      if (sel == SEL_CHAINS) begin
        chain_si = {chain_so[NCH-2:0], tdi};
        tdo      = chain_so[NCH-1];
        chain_se = tap_se;
        chain_ce = tap_ce;
      end else begin
        bypass_d[0]  = tdi;
        bypass_shift = tap_se;
        tdo          = bypass_q[0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            bypass_q <= '0;
    else if (bypass_shift) bypass_q <= bypass_d;
  end

  // The pads must be quiet once the layer is bonded, and no injection may
  // happen then.
  a_pads_quiet: assert property (@(posedge clk)
                                 bonded |-> (pad_so == '0 && !test_en));

endmodule
