// tb_die_layer: pre-bond and post-bond scan test of one layer at the
// default size (1282 incoming and 1115 outgoing D2D signals, 16 chains).
// The layer's own scan segments are a plain loop-back here.
//
// Pre-bond: every cell is loaded through the 16 pad lanes in parallel,
// the injected values are checked on the logic side, the observation
// cells capture random logic outputs, and all cells are shifted out and
// compared with a model of the stitching (cell k sits in chain k mod 16
// at position k div 16). The shift count to unload equals the longest
// chain. Post-bond: the same layer is reached through tdi/tdo as one
// serial chain of all its cells, and injection is off.
module tb_die_layer;
  import scan_island_pkg::*;
  localparam int N_IN  = L2_TO_L1_SIGNALS;
  localparam int N_OUT = L1_TO_L2_SIGNALS;
  localparam int NCH   = N_CHAINS;
  localparam int NC    = N_IN + N_OUT;
  localparam int LMAX  = (NC + NCH - 1) / NCH;

  logic clk = 1'b0, rst_n = 1'b0, bonded = 1'b0;
  logic [NCH-1:0] pad_si = '0, pad_so;
  ltc_sel_e pad_sel = SEL_CHAINS, tap_sel = SEL_CHAINS;
  logic pad_se = 1'b0, pad_ce = 1'b0, pad_te = 1'b0;
  logic tdi = 1'b0, tdo, tap_se = 1'b0, tap_ce = 1'b0;
  logic scan_en, capture_en, test_en;
  logic [NCH-1:0] core_si, core_so;
  logic [N_IN-1:0] d2d_in = '0, logic_in;
  logic [N_OUT-1:0] core_out = '0, d2d_out;
  int checks = 0, failures = 0;

  die_layer #(.N_IN(N_IN), .N_OUT(N_OUT), .NCH(NCH)) dut (.*);
  assign core_so = core_si;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int chain_len(input int c);
    return (NC - 1 - c) / NCH + 1;
  endfunction

  logic [NC-1:0] want;

  initial begin
    int bad;
    logic [NC-1:0] got;
    logic [NC-1:0] stream;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NC; k++) want[k] = 1'($urandom_range(0, 1));

    // Load: at step t lane c carries the bit for position LMAX-1-t.
    for (int t = 0; t < LMAX; t++) begin
      @(negedge clk);
      pad_se = 1'b1;
      for (int c = 0; c < NCH; c++) begin
        int k;
        k = c + NCH * (LMAX - 1 - t);
        pad_si[c] = (k < NC) ? want[k] : 1'b0;
      end
    end
    @(negedge clk);
    pad_se = 1'b0; pad_te = 1'b1;
    d2d_in = ~want[N_IN-1:0];
    #1;
    checks++;
    if (logic_in !== want[N_IN-1:0]) begin
      failures++;
      $display("FAIL injected values on the logic side");
    end
    pad_te = 1'b0;
    #1;
    checks++;
    if (logic_in !== d2d_in) begin
      failures++;
      $display("FAIL logic side follows vias with Test_Enable low");
    end

    // Capture.
    for (int j = 0; j < N_OUT; j++) core_out[j] = 1'($urandom_range(0, 1));
    want[NC-1:N_IN] = core_out;
    pad_ce = 1'b1;
    @(negedge clk);
    pad_ce = 1'b0;
    checks++;
    if (d2d_out !== core_out) begin
      failures++;
      $display("FAIL d2d_out pass-through");
    end

    // Unload: after t shifts lane c shows position len_c-1-t.
    got = '0;
    for (int t = 0; t < LMAX; t++) begin
      for (int c = 0; c < NCH; c++) begin
        int p;
        p = chain_len(c) - 1 - t;
        if (p >= 0) got[c + NCH * p] = pad_so[c];
      end
      pad_se = 1'b1;
      @(negedge clk);
    end
    pad_se = 1'b0;
    bad = 0;
    for (int k = 0; k < NC; k++) if (got[k] !== want[k]) bad++;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL pre-bond unload: %0d of %0d cells wrong", bad, NC);
    end

    // Post-bond: one serial chain of NC cells from tdi to tdo.
    bonded = 1'b1; pad_te = 1'b1; tap_sel = SEL_CHAINS;
    #1;
    checks++;
    if (test_en !== 1'b0 || pad_so !== '0) begin
      failures++;
      $display("FAIL post-bond pads/injection");
    end
    bad = 0;
    for (int i = 0; i < 2 * NC; i++) begin
      if (i < NC) begin
        tdi = 1'($urandom_range(0, 1));
        stream[i] = tdi;
      end else begin
        tdi = 1'b0;
        if (tdo !== stream[i-NC]) bad++;
      end
      tap_se = 1'b1;
      @(negedge clk);
    end
    tap_se = 1'b0;
    checks++;
    if (bad != 0) begin
      failures++;
      $display("FAIL post-bond serial path: %0d bits wrong", bad);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
