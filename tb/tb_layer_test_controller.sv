// tb_layer_test_controller: checks the LTC in its four settings.
// Pre-bond, chains selected: each pad lane connects straight to its chain
// and the shift/capture/Test_Enable pads reach the chains. Pre-bond,
// bypass selected: each lane is a one-cycle delay through its bypass bit
// and the chains are frozen. Post-bond: the pads are dead, Test_Enable is
// forced low, and the chains (or one bypass bit) form a serial path from
// tdi to tdo. The chains are modelled here as shift registers of
// different lengths.
module tb_layer_test_controller;
  import scan_island_pkg::*;
  localparam int NCH = 16;
  logic clk = 1'b0, rst_n = 1'b0, bonded = 1'b0;
  logic [NCH-1:0] pad_si = '0, pad_so;
  ltc_sel_e pad_sel = SEL_CHAINS, tap_sel = SEL_CHAINS;
  logic pad_se = 1'b0, pad_ce = 1'b0, pad_te = 1'b0;
  logic tdi = 1'b0, tdo, tap_se = 1'b0, tap_ce = 1'b0;
  logic [NCH-1:0] chain_si, chain_so;
  logic chain_se, chain_ce, test_en;
  int checks = 0, failures = 0;

  layer_test_controller #(.NCH(NCH)) dut (.*);

  // Chain c is a shift register of c+1 bits.
  localparam int TOTAL = NCH * (NCH + 1) / 2;
  logic [NCH-1:0] chains [NCH];
  always_ff @(posedge clk)
    for (int c = 0; c < NCH; c++)
      if (chain_se) chains[c] <= {chains[c][NCH-2:0], chain_si[c]};
  always_comb
    for (int c = 0; c < NCH; c++) chain_so[c] = chains[c][c];

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NCH-1:0] hist [$];
    logic [TOTAL+1:0] stream;
    for (int c = 0; c < NCH; c++) chains[c] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // ---- pre-bond, chains selected ----
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      pad_sel = SEL_CHAINS;
      pad_si = NCH'($urandom);
      pad_se = 1'($urandom_range(0, 1));
      pad_ce = 1'($urandom_range(0, 1));
      pad_te = 1'($urandom_range(0, 1));
      #1;
      check(chain_si, pad_si, "chain_si from pads");
      check(pad_so, chain_so, "pad_so from chains");
      check({chain_se, chain_ce, test_en}, {pad_se, pad_ce, pad_te}, "controls from pads");
    end

    // ---- pre-bond, bypass selected: one-cycle delay per lane ----
    @(negedge clk);
    pad_sel = SEL_BYPASS; pad_se = 1'b1; pad_ce = 1'b1;
    for (int i = 0; i < 40; i++) begin
      pad_si = NCH'($urandom);
      hist.push_back(pad_si);
      #1;
      check({chain_se, chain_ce}, 2'b00, "chains frozen in bypass");
      @(negedge clk);
      check(pad_so, hist[i], "bypass lane delay");
    end

    // ---- post-bond: pads dead, Test_Enable low ----
    @(negedge clk);
    bonded = 1'b1; pad_sel = SEL_CHAINS; pad_te = 1'b1; pad_se = 1'b1;
    tap_sel = SEL_CHAINS; tap_se = 1'b0; tap_ce = 1'b1;
    #1;
    check(pad_so, '0, "pads disconnected");
    check(test_en, 1'b0, "no injection after bonding");
    check(chain_ce, 1'b1, "capture from TAP");
    // Serial path tdi -> chain0 -> ... -> chain15 -> tdo, TOTAL bits long.
    stream = '0;
    for (int i = 0; i < TOTAL + 2; i++) begin
      @(negedge clk);
      tap_se = 1'b1; tap_ce = 1'b0;
      tdi = 1'($urandom_range(0, 1));
      stream[i] = tdi;
      #1;
      if (i >= TOTAL) check(tdo, stream[i-TOTAL], "serial loop through all chains");
    end
    // Serial bypass: one bit.
    @(negedge clk);
    tap_sel = SEL_BYPASS;
    for (int i = 0; i < 20; i++) begin
      tdi = 1'($urandom_range(0, 1));
      stream[i] = tdi;
      #1;
      check(chain_se, 1'b0, "chains frozen in serial bypass");
      @(negedge clk);
      check(tdo, stream[i], "serial bypass delay");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
