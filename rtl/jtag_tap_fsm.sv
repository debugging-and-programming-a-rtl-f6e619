// jtag_tap_fsm: the TAP controller, the sixteen-state machine at the heart of an
// IEEE 1149.1 test access port.
//
// The state advances on every rising edge of TCK under control of TMS, following the state
// diagram of the standard. TRST_N resets it asynchronously to Test-Logic-Reset; holding TMS
// high for five TCK cycles reaches the same state from anywhere. Besides the state it puts
// out one strobe per action (capture, shift, update for the instruction and data paths)
// for the registers to use: capture and shift take effect at the next rising edge of TCK,
// update at the falling edge that follows, so the strobes are simply decodes of the
// current state.
//
// Interface: tck_i, tms_i, trst_n_i in; state_o and ctrl_o out. The states, their order
// and the TRST_N reset follow the standard the design is built on; the state encoding is
// this design's own choice.
module jtag_tap_fsm
  import jtag_pkg::*;
(
  input  logic       tck_i,
  input  logic       tms_i,
  input  logic       trst_n_i,
  output tap_state_e state_o,
  output tap_ctrl_t  ctrl_o
);

  tap_state_e state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      TEST_LOGIC_RESET: state_d = tms_i ? TEST_LOGIC_RESET : RUN_TEST_IDLE;
      RUN_TEST_IDLE:    state_d = tms_i ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_DR_SCAN:   state_d = tms_i ? SELECT_IR_SCAN   : CAPTURE_DR;
      CAPTURE_DR:       state_d = tms_i ? EXIT1_DR         : SHIFT_DR;
      SHIFT_DR:         state_d = tms_i ? EXIT1_DR         : SHIFT_DR;
      EXIT1_DR:         state_d = tms_i ? UPDATE_DR        : PAUSE_DR;
      PAUSE_DR:         state_d = tms_i ? EXIT2_DR         : PAUSE_DR;
      EXIT2_DR:         state_d = tms_i ? UPDATE_DR        : SHIFT_DR;
      UPDATE_DR:        state_d = tms_i ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      SELECT_IR_SCAN:   state_d = tms_i ? TEST_LOGIC_RESET : CAPTURE_IR;
      CAPTURE_IR:       state_d = tms_i ? EXIT1_IR         : SHIFT_IR;
      SHIFT_IR:         state_d = tms_i ? EXIT1_IR         : SHIFT_IR;
      EXIT1_IR:         state_d = tms_i ? UPDATE_IR        : PAUSE_IR;
      PAUSE_IR:         state_d = tms_i ? EXIT2_IR         : PAUSE_IR;
      EXIT2_IR:         state_d = tms_i ? UPDATE_IR        : SHIFT_IR;
      UPDATE_IR:        state_d = tms_i ? SELECT_DR_SCAN   : RUN_TEST_IDLE;
      default:          state_d = TEST_LOGIC_RESET;
    endcase
  end

  always_ff @(posedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i) state_q <= TEST_LOGIC_RESET;
    else           state_q <= state_d;
  end

  assign state_o = state_q;

  always_comb begin
    ctrl_o            = '0;
    ctrl_o.reset      = (state_q == TEST_LOGIC_RESET);
    ctrl_o.capture_dr = (state_q == CAPTURE_DR);
    ctrl_o.shift_dr   = (state_q == SHIFT_DR);
    ctrl_o.update_dr  = (state_q == UPDATE_DR);
    ctrl_o.capture_ir = (state_q == CAPTURE_IR);
    ctrl_o.shift_ir   = (state_q == SHIFT_IR);
    ctrl_o.update_ir  = (state_q == UPDATE_IR);
  end

endmodule
