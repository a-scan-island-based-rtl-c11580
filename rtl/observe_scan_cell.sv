// observe_scan_cell: observation border scan cell for one D2D output.
//
// Logic that drives a die-to-die via directly has no observable sink
// before bonding, so a scan cell taps the net. On the rising clock edge
// the cell shifts (si -> so) when scan_en is high, otherwise captures the
// via value when capture_en is high, otherwise holds. The tap itself does
// not disturb the signal going to the other layer.
//
// Which of shift and capture wins when both are asserted is this design's
// choice (shift wins). Timing: one flip-flop, capture takes one edge.
module observe_scan_cell (
  input  logic clk,
  input  logic rst_n,
  input  logic scan_en,     // shift when high
  input  logic capture_en,  // capture via_out when high and not shifting
  input  logic si,
  output logic so,
  input  logic via_out      // value this layer drives onto the D2D via
);

  logic q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= 1'b0;
    else if (scan_en)    q <= si;
    else if (capture_en) q <= via_out;
  end

  assign so = q;

endmodule
