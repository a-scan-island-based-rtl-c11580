// inject_scan_cell: injection border scan cell for one D2D input signal.
//
// A die-to-die via that feeds logic directly cannot be driven by the
// tester before bonding, so a light-weight scan cell sits beside it. The
// cell is part of a scan chain: with scan_en high it shifts (si -> so) on
// the rising clock edge, otherwise it holds its value, so the pattern
// stays put across the capture cycle. While test_en is high its value is
// put onto the logic input; otherwise the logic sees the via.
//
// The original cell is a pass transistor from the scan register onto the
// via net, which is only safe before bonding (after bonding it would
// fight the driver on the other layer). A two-state model cannot express
// that contention, so the pass device is modelled as a 2:1 select; the
// layer that instantiates this cell keeps test_en low once bonded, which
// is the constraint the pass-transistor version imposes.
//
// Timing: one flip-flop; logic_in is combinational from via_in, test_en
// and the stored bit.
module inject_scan_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,   // shift when high, hold when low
  input  logic si,        // scan input from the previous cell
  output logic so,        // scan output (the stored bit)
  input  logic test_en,   // Test_Enable: drive the stored bit onto the logic
  input  logic via_in,    // value arriving through the D2D via
  output logic logic_in   // value seen by the logic on this layer
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       q <= 1'b0;
    else if (scan_en) q <= si;
  end

  assign so       = q;
  assign logic_in = test_en ? q : via_in;

endmodule
