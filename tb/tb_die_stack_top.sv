// tb_die_stack_top: end-to-end test of the two-layer stack at its default
// size (2397 D2D signals, 16 chains per layer, 32-bit adder example).
//
// Pre-bond (vias open): each layer is tested on its own through its probe
// pads. Every border cell and every cell of the adder island is loaded in
// parallel over the 16 lanes, injected values are checked on the logic
// side, the adder computes on injected operands, the observation cells
// capture, and everything is shifted out and compared with a model of the
// chain stitching. Layer 1 is clocked by its redundant test clock tree.
// The pad bypass registers are exercised on both layers.
//
// Bonded: the vias connect, layer 1 is clocked through its vias, the pads
// are dead and injection is off. Signals cross the vias in both
// directions, the adder computes on operands from layer 2, and the TAP
// reaches both layers: LAYER_SCAN captures and shifts out the whole
// 4894-bit loop (checked bit by bit against the model) and flushes a
// pattern through it, LAYER_BYPASS gives a two-bit loop, BYPASS one bit.
// Every mechanism is counted and one that never happened is a failure.
module tb_die_stack_top;
  import scan_island_pkg::*;
  localparam int N12 = L1_TO_L2_SIGNALS;
  localparam int N21 = L2_TO_L1_SIGNALS;
  localparam int NCH = N_CHAINS;
  localparam int AW  = ADDER_WIDTH;
  localparam int NC  = N12 + N21;        // border cells per layer
  localparam int NA  = 3 * AW + 4;       // adder island cells
  localparam int LOOP = 2 * NC + NA;     // serial loop length after bonding

  logic clk = 1'b0, rst_n = 1'b0, bonded = 1'b0;
  logic l1_tree_en = 1'b1;
  logic [15:0] l1_clk_leaves;
  logic [NCH-1:0] l1_pad_si = '0, l1_pad_so, l2_pad_si = '0, l2_pad_so;
  ltc_sel_e l1_pad_sel = SEL_CHAINS, l2_pad_sel = SEL_CHAINS;
  logic l1_pad_se = 1'b0, l1_pad_ce = 1'b0, l1_pad_te = 1'b0;
  logic l2_pad_se = 1'b0, l2_pad_ce = 1'b0, l2_pad_te = 1'b0;
  logic trst_n = 1'b0, tms = 1'b1, tdi = 1'b0, tdo, tdo_oe;
  logic [N21-1:0] l1_logic_in, l2_core_out = '0;
  logic [N12-1:0] l1_core_out = '0, l2_logic_in;
  logic [NCH-1:0] l1_core_si, l1_core_so, l2_core_si, l2_core_so;
  logic l1_scan_en, l1_capture_en, l2_scan_en, l2_capture_en;
  logic [AW-1:0] l2_adder_a = '0, l2_adder_b = '0;
  logic [AW+3:0] l2_adder_result;

  die_stack_top dut (
    .clk, .rst_n, .bonded, .l1_probe_clk(clk), .l1_tree_en, .l1_clk_leaves,
    .l1_pad_si, .l1_pad_so, .l1_pad_sel, .l1_pad_se, .l1_pad_ce, .l1_pad_te,
    .l2_pad_si, .l2_pad_so, .l2_pad_sel, .l2_pad_se, .l2_pad_ce, .l2_pad_te,
    .trst_n, .tms, .tdi, .tdo, .tdo_oe,
    .l1_logic_in, .l1_core_out, .l1_core_si, .l1_core_so, .l1_scan_en, .l1_capture_en,
    .l2_logic_in, .l2_core_out, .l2_core_si, .l2_core_so, .l2_scan_en, .l2_capture_en,
    .l2_adder_a, .l2_adder_b, .l2_adder_result
  );

  // The processor logic's own scan segments are not modelled: loop back.
  assign l1_core_so = l1_core_si;
  assign l2_core_so = l2_core_si;

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // Mechanism counters.
  int m_prebond_scan [2];
  int m_injection = 0, m_capture = 0, m_pad_bypass = 0, m_tree_clock = 0;
  int m_via_clock = 0, m_via_transfer = 0, m_pads_dead = 0, m_tap_scan = 0;
  int m_tap_capture = 0, m_loop_bypass = 0, m_tap_bypass = 0, m_adder = 0;

  always @(posedge l1_clk_leaves[0]) begin
    if (!bonded && l1_tree_en) m_tree_clock++;
    if (bonded && !l1_tree_en) m_via_clock++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AW+3:0] add_ref(input logic [AW-1:0] x, input logic [AW-1:0] y);
    logic [AW:0] s;
    logic ov;
    s  = {1'b0, x} + {1'b0, y};
    ov = (x[AW-1] == y[AW-1]) && (s[AW-1] != x[AW-1]);
    return {s[AW], ov, s[AW-1], (s[AW-1:0] == '0), s[AW-1:0]};
  endfunction

  // ---------------- chain model ----------------
  // Expected content of every cell: border cells of each layer and the
  // adder island (cells 0..2AW-1 operands {b,a}, 2AW.. result).
  logic [NC-1:0] want [2];
  logic [NA-1:0] want_adder;

  function automatic int n_in(input int ly);   // injection cells on layer ly (0: layer 1)
    return ly == 0 ? N21 : N12;
  endfunction
  function automatic int head(input int ly, input int c);
    return (ly == 0 && c == 0) ? NA : 0;
  endfunction
  function automatic int chain_total(input int ly, input int c);
    return head(ly, c) + (NC - 1 - c) / NCH + 1;
  endfunction
  function automatic int lmax(input int ly);
    return chain_total(ly, 0);
  endfunction
  function automatic logic cell_want(input int ly, input int c, input int p);
    if (p < head(ly, c)) return want_adder[p];
    return want[ly][c + NCH * (p - head(ly, c))];
  endfunction
  // Observation cells take the logic outputs (and the adder result).
  task automatic model_capture(input int ly, input logic [AW+3:0] adder_res);
    if (ly == 0) begin
      want[0][NC-1:N21] = l1_core_out;
      want_adder[NA-1:2*AW] = adder_res;
    end else begin
      want[1][NC-1:N12] = l2_core_out;
    end
  endtask

  // ---------------- pad access ----------------
  task automatic pads(input int ly, input logic [NCH-1:0] si, input logic se, input logic ce,
                      input logic te, input ltc_sel_e sel);
    if (ly == 0) begin
      l1_pad_si = si; l1_pad_se = se; l1_pad_ce = ce; l1_pad_te = te; l1_pad_sel = sel;
    end else begin
      l2_pad_si = si; l2_pad_se = se; l2_pad_ce = ce; l2_pad_te = te; l2_pad_sel = sel;
    end
  endtask
  function automatic logic [NCH-1:0] pad_out(input int ly);
    return ly == 0 ? l1_pad_so : l2_pad_so;
  endfunction

  task automatic prebond_test(input int ly);
    logic [AW-1:0] x, y;
    logic [NCH-1:0] lane;
    int bad, lm;
    lm = lmax(ly);
    for (int k = 0; k < NC; k++) want[ly][k] = 1'($urandom_range(0, 1));
    x = $urandom; y = $urandom;
    if (ly == 0) want_adder[2*AW-1:0] = {y, x};
    // Load all chains in parallel.
    for (int t = 0; t < lm; t++) begin
      @(negedge clk);
      for (int c = 0; c < NCH; c++) begin
        int p;
        p = lm - 1 - t;
        lane[c] = (p < chain_total(ly, c)) ? cell_want(ly, c, p) : 1'b0;
      end
      pads(ly, lane, 1'b1, 1'b0, 1'b1, SEL_CHAINS);
    end
    @(negedge clk);
    pads(ly, '0, 1'b0, 1'b0, 1'b1, SEL_CHAINS);
    #1;
    if (ly == 0) check(l1_logic_in === want[0][N21-1:0], "layer 1 injected values");
    else         check(l2_logic_in === want[1][N12-1:0], "layer 2 injected values");
    m_injection++;
    // Let the adder pipeline fill, then capture on the third edge.
    for (int j = 0; j < (ly == 0 ? N12 : N21); j++)
      if (ly == 0) l1_core_out[j] = 1'($urandom_range(0, 1)); else l2_core_out[j] = 1'($urandom_range(0, 1));
    @(negedge clk);
    @(negedge clk);
    pads(ly, '0, 1'b0, 1'b1, 1'b1, SEL_CHAINS);
    @(negedge clk);
    pads(ly, '0, 1'b0, 1'b0, 1'b1, SEL_CHAINS);
    model_capture(ly, add_ref(x, y));
    m_capture++;
    if (ly == 0) m_adder++;
    // Unload and compare.
    bad = 0;
    for (int t = 0; t < lm; t++) begin
      lane = pad_out(ly);
      for (int c = 0; c < NCH; c++) begin
        int p;
        p = chain_total(ly, c) - 1 - t;
        if (p >= 0 && lane[c] !== cell_want(ly, c, p)) bad++;
      end
      pads(ly, '0, 1'b1, 1'b0, 1'b1, SEL_CHAINS);
      @(negedge clk);
    end
    pads(ly, '0, 1'b0, 1'b0, 1'b0, SEL_CHAINS);
    check(bad == 0, $sformatf("layer %0d pre-bond unload (%0d bits wrong)", ly + 1, bad));
    m_prebond_scan[ly]++;
    // Unloading shifted zeros into every chain.
    for (int k = 0; k < NC; k++) if (k < n_in(ly)) want[ly][k] = 1'b0;
    if (ly == 0) want_adder[2*AW-1:0] = '0;

    // Pad bypass: each lane is a one-cycle delay.
    bad = 0;
    for (int t = 0; t < 20; t++) begin
      logic [NCH-1:0] v;
      v = NCH'($urandom);
      pads(ly, v, 1'b1, 1'b0, 1'b0, SEL_BYPASS);
      @(negedge clk);
      if (pad_out(ly) !== v) bad++;
    end
    pads(ly, '0, 1'b0, 1'b0, 1'b0, SEL_CHAINS);
    check(bad == 0, $sformatf("layer %0d pad bypass", ly + 1));
    m_pad_bypass++;
  endtask

  // ---------------- TAP access ----------------
  task automatic step(input logic m, input logic d, output logic o);
    @(negedge clk);
    tms = m; tdi = d;
    #1;
    o = tdo;
    @(posedge clk);
  endtask
  task automatic go(input logic m);
    logic o;
    step(m, 1'b0, o);
  endtask
  task automatic ir_scan(input logic [IR_WIDTH-1:0] op);
    logic o;
    go(1'b1); go(1'b1); go(1'b0); go(1'b0);
    for (int i = 0; i < IR_WIDTH; i++) step(i == IR_WIDTH - 1, op[i], o);
    go(1'b1); go(1'b0);
  endtask

  logic dr_in [$], dr_out [$];
  task automatic dr_scan(input int n);
    logic o;
    dr_out.delete();
    go(1'b1); go(1'b0); go(1'b0);
    for (int i = 0; i < n; i++) begin
      step(i == n - 1, dr_in[i], o);
      dr_out.push_back(o);
    end
    go(1'b1); go(1'b0);
  endtask

  initial begin
    int bad, idx;
    logic [AW-1:0] x, y;
    logic [AW+3:0] ar;
    logic exp_bit;
    m_prebond_scan[0] = 0; m_prebond_scan[1] = 0;
    want[0] = '0; want[1] = '0; want_adder = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ======== pre-bond ========
    @(negedge clk);
    check(l1_logic_in === '0 && l2_logic_in === '0, "open vias read as zero");
    prebond_test(1);
    prebond_test(0);

    // ======== bonding ========
    @(negedge clk);
    bonded = 1'b1;
    l1_tree_en = 1'b0;
    trst_n = 1'b1;
    l1_pad_te = 1'b1; l2_pad_te = 1'b1;   // must have no effect now
    l1_pad_se = 1'b1; l2_pad_se = 1'b1;
    l1_pad_si = '1;   l2_pad_si = '1;
    for (int j = 0; j < N12; j++) l1_core_out[j] = 1'($urandom_range(0, 1));
    for (int j = 0; j < N21; j++) l2_core_out[j] = 1'($urandom_range(0, 1));
    x = $urandom; y = $urandom;
    l2_adder_a = x; l2_adder_b = y;
    #1;
    check(l1_logic_in === l2_core_out, "layer 2 -> layer 1 through vias");
    check(l2_logic_in === l1_core_out, "layer 1 -> layer 2 through vias");
    check(l1_pad_so === '0 && l2_pad_so === '0, "pads disconnected after bonding");
    check(l1_scan_en === 1'b0 && l2_scan_en === 1'b0, "pad shift enable ignored after bonding");
    m_via_transfer++;
    m_pads_dead++;
    repeat (3) @(negedge clk);
    ar = add_ref(x, y);
    check(l2_adder_result === ar, "adder on operands from layer 2");
    m_adder++;

    // TAP: reset, then LAYER_SCAN.
    for (int i = 0; i < 5; i++) go(1'b1);
    go(1'b0);
    ir_scan(IR_LAYER_SCAN);
    dr_in.delete();
    for (int i = 0; i < LOOP + 64; i++) dr_in.push_back(1'($urandom_range(0, 1)));
    model_capture(0, ar);
    model_capture(1, ar);
    dr_scan(LOOP + 64);
    // Output order: layer 1 chains 15..0 (last position first), then layer 2.
    bad = 0;
    idx = 0;
    for (int ly = 0; ly < 2; ly++)
      for (int c = NCH - 1; c >= 0; c--)
        for (int p = chain_total(ly, c) - 1; p >= 0; p--) begin
          exp_bit = cell_want(ly, c, p);
          if (dr_out[idx] !== exp_bit) bad++;
          idx++;
        end
    check(idx == LOOP, "loop length");
    check(bad == 0, $sformatf("TAP capture and unload of both layers (%0d bits wrong)", bad));
    m_tap_capture++;
    bad = 0;
    for (int i = 0; i < 64; i++) if (dr_out[LOOP + i] !== dr_in[i]) bad++;
    check(bad == 0, "pattern flushed through the whole loop");
    m_tap_scan++;

    // LAYER_BYPASS: one bit per layer.
    ir_scan(IR_LAYER_BYPASS);
    dr_in.delete();
    for (int i = 0; i < 40; i++) dr_in.push_back(1'($urandom_range(0, 1)));
    dr_scan(40);
    bad = 0;
    for (int i = 2; i < 40; i++) if (dr_out[i] !== dr_in[i-2]) bad++;
    check(bad == 0, "LAYER_BYPASS loop is two bits");
    m_loop_bypass++;

    // BYPASS: one bit, captures zero.
    ir_scan(IR_BYPASS);
    dr_in.delete();
    for (int i = 0; i < 40; i++) dr_in.push_back(1'($urandom_range(0, 1)));
    dr_scan(40);
    bad = (dr_out[0] !== 1'b0);
    for (int i = 1; i < 40; i++) if (dr_out[i] !== dr_in[i-1]) bad++;
    check(bad == 0, "TAP BYPASS is one bit");
    m_tap_bypass++;

    // Every mechanism must have happened.
    check(m_prebond_scan[0] > 0, "mechanism: layer 1 pre-bond pad scan");
    check(m_prebond_scan[1] > 0, "mechanism: layer 2 pre-bond pad scan");
    check(m_injection > 0,   "mechanism: injection");
    check(m_capture > 0,     "mechanism: observation capture");
    check(m_pad_bypass > 0,  "mechanism: pad bypass registers");
    check(m_tree_clock > 0,  "mechanism: redundant test clock tree");
    check(m_via_clock > 0,   "mechanism: clock through vias after bonding");
    check(m_via_transfer > 0, "mechanism: D2D transfer after bonding");
    check(m_pads_dead > 0,   "mechanism: pad disconnection");
    check(m_tap_capture > 0, "mechanism: TAP capture");
    check(m_tap_scan > 0,    "mechanism: TAP serial loop");
    check(m_loop_bypass > 0, "mechanism: LTC bypass in serial loop");
    check(m_tap_bypass > 0,  "mechanism: TAP BYPASS");
    check(m_adder > 0,       "mechanism: staggered adder");
    $display("mechanisms: prebond_scan=%0d/%0d injection=%0d capture=%0d pad_bypass=%0d tree_clk=%0d via_clk=%0d via_xfer=%0d pads_dead=%0d tap_capture=%0d tap_scan=%0d loop_bypass=%0d tap_bypass=%0d adder=%0d",
             m_prebond_scan[0], m_prebond_scan[1], m_injection, m_capture, m_pad_bypass, m_tree_clock,
             m_via_clock, m_via_transfer, m_pads_dead, m_tap_capture, m_tap_scan, m_loop_bypass,
             m_tap_bypass, m_adder);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
