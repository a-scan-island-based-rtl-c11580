// tb_tap_controller: checks the IEEE 1149.1 TAP.
// Walks the state diagram and compares every transition with a table
// written from the standard, checks that five TMS-high clocks reset the
// controller from any state, that Capture-IR loads ...01 and shifts it
// out on TDO, that BYPASS is a one-bit path that captures 0, and that
// the private instructions steer a loop (modelled here as a 7-bit shift
// register) into the TDI-TDO path with the right select, shift and
// capture strobes.
module tb_tap_controller;
  import scan_island_pkg::*;
  logic tck = 1'b0, trst_n = 1'b0, tms = 1'b1, tdi = 1'b0;
  logic tdo, tdo_oe, loop_tdi, loop_tdo, ltc_se, ltc_ce;
  ltc_sel_e ltc_sel;
  tap_state_e state;
  tap_instr_e instr;
  int checks = 0, failures = 0;

  tap_controller dut (.*);

  localparam int LOOP = 7;
  logic [LOOP-1:0] loop_q = '0;
  int n_loop_capture = 0;
  always_ff @(posedge tck) begin
    if (ltc_se) loop_q <= {loop_q[LOOP-2:0], loop_tdi};
    else if (ltc_ce) begin loop_q <= 7'b1010011; n_loop_capture++; end
  end
  assign loop_tdo = loop_q[LOOP-1];

  always #5 tck = ~tck;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge tck);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic tap_state_e next(input tap_state_e s, input logic m);
    case (s)
      TEST_LOGIC_RESET: return m ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    return m ? SELECT_DR_SCAN : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   return m ? SELECT_IR_SCAN : CAPTURE_DR;
      CAPTURE_DR:       return m ? EXIT1_DR : SHIFT_DR;
      SHIFT_DR:         return m ? EXIT1_DR : SHIFT_DR;
      EXIT1_DR:         return m ? UPDATE_DR : PAUSE_DR;
      PAUSE_DR:         return m ? EXIT2_DR : PAUSE_DR;
      EXIT2_DR:         return m ? UPDATE_DR : SHIFT_DR;
      UPDATE_DR:        return m ? SELECT_DR_SCAN : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   return m ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       return m ? EXIT1_IR : SHIFT_IR;
      SHIFT_IR:         return m ? EXIT1_IR : SHIFT_IR;
      EXIT1_IR:         return m ? UPDATE_IR : PAUSE_IR;
      PAUSE_IR:         return m ? EXIT2_IR : PAUSE_IR;
      EXIT2_IR:         return m ? UPDATE_IR : SHIFT_IR;
      default:          return m ? SELECT_DR_SCAN : RUN_TEST_IDLE;
    endcase
  endfunction

  // Drive TMS/TDI at the falling edge, sample TDO just after it, and let
  // the rising edge act.
  task automatic step(input logic m, input logic d, output logic o);
    @(negedge tck);
    tms = m; tdi = d;
    #1;
    o = tdo;
    @(posedge tck);
    #1;
  endtask

  task automatic go(input logic m);
    logic o;
    step(m, 1'b0, o);
  endtask

  // From Run-Test/Idle: shift n bits of data through IR or DR and return
  // to Run-Test/Idle.
  task automatic scan(input bit ir, input int n, input logic [63:0] din, output logic [63:0] dout);
    logic o;
    go(1'b1);
    if (ir) go(1'b1);
    go(1'b0);  // capture
    go(1'b0);  // -> shift
    for (int i = 0; i < n; i++) begin
      step(i == n - 1, din[i], o);
      dout[i] = o;
    end
    go(1'b1);  // update
    go(1'b0);  // idle
  endtask

  initial begin
    tap_state_e model;
    logic [63:0] d;
    logic o;
    repeat (2) @(posedge tck);
    trst_n = 1'b1;
    check(state, TEST_LOGIC_RESET, "reset state");

    // Random walk through the state diagram.
    model = TEST_LOGIC_RESET;
    for (int i = 0; i < 400; i++) begin
      logic m;
      m = 1'($urandom_range(0, 1));
      go(m);
      model = next(model, m);
      check(state, model, "state transition");
    end
    // Five TMS-high clocks reach Test-Logic-Reset from anywhere.
    for (int i = 0; i < 5; i++) go(1'b1);
    check(state, TEST_LOGIC_RESET, "five-TMS reset");
    check(instr, IR_BYPASS, "reset instruction");
    go(1'b0);

    // IR scan: capture value comes out first, load LAYER_SCAN.
    scan(1'b1, IR_WIDTH, 64'(IR_LAYER_SCAN), d);
    check(d[IR_WIDTH-1:0], IR_CAPTURE, "Capture-IR value on TDO");
    check(instr, IR_LAYER_SCAN, "instruction updated");
    check(ltc_sel, SEL_CHAINS, "LAYER_SCAN selects chains");

    // DR scan through the loop: the captured pattern comes out first
    // (last loop bit first), then the bits shifted in.
    scan(1'b0, LOOP + 5, 64'h0000_0000_0000_0B5A, d);
    check(n_loop_capture, 1, "one capture strobe");
    check(d[LOOP-1:0], 7'b1100101, "captured loop pattern on TDO");
    check(d[LOOP+4:LOOP], 5'h1A, "loop delay of 7 bits");
    check(ltc_se, 1'b0, "no shift strobe outside Shift-DR");

    // LAYER_BYPASS: loop in the path, bypass select, no capture strobe.
    scan(1'b1, IR_WIDTH, 64'(IR_LAYER_BYPASS), d);
    check(ltc_sel, SEL_BYPASS, "LAYER_BYPASS selects bypass");
    scan(1'b0, 3, 64'h5, d);
    check(n_loop_capture, 1, "no capture strobe under LAYER_BYPASS");

    // BYPASS: one-bit path that captures 0.
    scan(1'b1, IR_WIDTH, 64'hF, d);
    check(instr, IR_BYPASS, "BYPASS loaded");
    scan(1'b0, 9, 64'h0AD, d);
    check(d[8:0], {8'h0AD & 8'hFF, 1'b0}, "bypass path: 0 then TDI delayed by one");

    // An unknown opcode falls back to BYPASS.
    scan(1'b1, IR_WIDTH, 64'h9, d);
    check(instr, IR_BYPASS, "unknown opcode selects BYPASS");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
