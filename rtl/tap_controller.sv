// tap_controller: IEEE 1149.1 test access port for the bonded stack.
//
// After bonding, the layer test controllers (LTCs) of all layers are
// strung into one serial test loop that starts and ends at this TAP, which
// is reached through the package pins. The TAP is the standard sixteen-
// state controller driven by TMS on the rising edge of TCK, with a 4-bit
// instruction register and the one-bit BYPASS register. Two private
// instructions route the data register path through the loop:
//   IR_LAYER_SCAN   the LTCs put all their scan chains in the loop;
//                   Capture-DR makes the observation cells capture and
//                   Shift-DR shifts the loop by one bit per TCK.
//   IR_LAYER_BYPASS each LTC puts one bypass bit in the loop.
// Every other opcode, and the reset state, selects BYPASS.
//
// The controller follows IEEE 1149.1 (state diagram, Capture-IR value
// ...01, TDO changing on the falling edge of TCK). The instruction set,
// its opcodes and the absence of a boundary-scan register are this
// design's choices; the loop itself only needs the private instructions.
//
// Interface: loop_tdi goes to the first LTC of the loop, loop_tdo comes
// back from the last. ltc_sel/ltc_se/ltc_ce steer and clock-enable the
// LTCs. tdo_oe is high while shifting.
module tap_controller
  import scan_island_pkg::*;
(
  input  logic     tck,
  input  logic     trst_n,
  input  logic     tms,
  input  logic     tdi,
  output logic     tdo,
  output logic     tdo_oe,
  // serial loop through the LTCs
  output logic     loop_tdi,
  input  logic     loop_tdo,
  output ltc_sel_e ltc_sel,
  output logic     ltc_se,
  output logic     ltc_ce,
  // status
  output tap_state_e state,
  output tap_instr_e instr
);

  tap_state_e state_n;

  always_comb begin
    unique case (state)
      TEST_LOGIC_RESET: state_n = tms ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    state_n = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   state_n = tms ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       state_n = tms ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         state_n = tms ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         state_n = tms ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         state_n = tms ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         state_n = tms ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        state_n = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   state_n = tms ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       state_n = tms ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         state_n = tms ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         state_n = tms ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         state_n = tms ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         state_n = tms ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        state_n = tms ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          state_n = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) state <= TEST_LOGIC_RESET;
    else         state <= state_n;
  end

  // Instruction register: shift stage and update stage.
  logic [IR_WIDTH-1:0] ir_shift;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n) begin
      ir_shift <= IR_CAPTURE;
      instr    <= IR_BYPASS;
    end else begin
      unique case (state)
        TEST_LOGIC_RESET: instr    <= IR_BYPASS;
        CAPTURE_IR:       ir_shift <= IR_CAPTURE;
        SHIFT_IR:         ir_shift <= {tdi, ir_shift[IR_WIDTH-1:1]};
        UPDATE_IR: begin
          unique case (ir_shift)
            IR_LAYER_SCAN:   instr <= IR_LAYER_SCAN;
            IR_LAYER_BYPASS: instr <= IR_LAYER_BYPASS;
            default:         instr <= IR_BYPASS;
          endcase
        end
        default: ;
      endcase
    end
  end

  // BYPASS data register.
  logic bypass_q;

  always_ff @(posedge tck or negedge trst_n) begin
    if (!trst_n)                bypass_q <= 1'b0;
    else if (state == CAPTURE_DR) bypass_q <= 1'b0;
    else if (state == SHIFT_DR)   bypass_q <= tdi;
  end

  // Steering of the layer loop.
  logic loop_selected;
  assign loop_selected = (instr == IR_LAYER_SCAN) || (instr == IR_LAYER_BYPASS);
  assign loop_tdi      = tdi;
  assign ltc_sel       = (instr == IR_LAYER_SCAN) ? SEL_CHAINS : SEL_BYPASS;
  assign ltc_se        = loop_selected && (state == SHIFT_DR);
  assign ltc_ce        = (instr == IR_LAYER_SCAN) && (state == CAPTURE_DR);

  // TDO is updated on the falling edge of TCK.
  logic tdo_d;
  always_comb begin
    if (state == SHIFT_IR)      tdo_d = ir_shift[0];
    else if (loop_selected)     tdo_d = loop_tdo;
    else                        tdo_d = bypass_q;
  end

  always_ff @(negedge tck or negedge trst_n) begin
    if (!trst_n) begin
      tdo    <= 1'b0;
      tdo_oe <= 1'b0;
    end else begin
      tdo    <= tdo_d;
      tdo_oe <= (state == SHIFT_IR) || (state == SHIFT_DR);
    end
  end

endmodule
