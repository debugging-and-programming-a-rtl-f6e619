// jtag_ir: the instruction register of the test access port.
//
// It is a shift stage and an update (hold) stage. In Capture-IR the shift stage loads the
// fixed pattern ...0001 (the two low bits "01" are required by the standard, which lets a
// tester find the length of the chain); in Shift-IR it shifts right one bit per rising
// edge of TCK, TDI entering at the top and the low bit leaving on ir_so_o. On the falling
// edge of TCK in Update-IR the shifted value becomes the current instruction. TRST_N, or
// the falling edge of TCK in Test-Logic-Reset, sets the current instruction to IDCODE, so
// that the device identification register is selected after reset.
//
// Interface: TCK, TRST_N, TDI, the controller strobes; instr_o (current instruction) and
// ir_so_o (serial out). The capture pattern, the update timing and the reset to IDCODE
// follow the standard; the 4-bit length is this design's own choice (see jtag_pkg).
module jtag_ir
  import jtag_pkg::*;
(
  input  logic            tck_i,
  input  logic            trst_n_i,
  input  logic            tdi_i,
  input  tap_ctrl_t       ctrl_i,
  output logic [IR_W-1:0] instr_o,
  output logic            ir_so_o
);

  logic [IR_W-1:0] shift_q;
  logic [IR_W-1:0] hold_q;

  always_ff @(posedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i)             shift_q <= IR_CAPTURE;
    else if (ctrl_i.capture_ir) shift_q <= IR_CAPTURE;
    else if (ctrl_i.shift_ir)   shift_q <= {tdi_i, shift_q[IR_W-1:1]};
  end

  always_ff @(negedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i)             hold_q <= I_IDCODE;
    else if (ctrl_i.reset)     hold_q <= I_IDCODE;
    else if (ctrl_i.update_ir) hold_q <= shift_q;
  end

  assign instr_o = hold_q;
  assign ir_so_o = shift_q[0];

endmodule
