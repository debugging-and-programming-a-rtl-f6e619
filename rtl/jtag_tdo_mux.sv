// jtag_tdo_mux: the two output multiplexers in front of TDO.
//
// The first chooses the serial output of the data register the decoder selected (bypass,
// identification, boundary scan or one of the debug capture registers); the second chooses
// between that and the instruction register, the instruction register while the
// controller is on the instruction path. The result is retimed on the falling edge of TCK,
// as the standard requires, and TDO is enabled only in Shift-IR and Shift-DR; at other
// times tdo_oe_o is low and a pad would float TDO.
//
// Interface: the serial outputs, the selection, the TAP state; tdo_o and tdo_oe_o.
module jtag_tdo_mux
  import jtag_pkg::*;
(
  input  logic               tck_i,
  input  logic               trst_n_i,
  input  tap_state_e         state_i,
  input  dr_sel_e            dr_sel_i,
  input  logic               ir_so_i,
  input  logic               bypass_so_i,
  input  logic               idcode_so_i,
  input  logic               bsr_so_i,
  input  logic [MAX_CAP-1:0] cap_so_i,
  output logic               tdo_o,
  output logic               tdo_oe_o
);

  logic dr_so, ir_path, so;

  always_comb begin
    unique case (dr_sel_i)
      DR_IDCODE: dr_so = idcode_so_i;
      DR_BSR:    dr_so = bsr_so_i;
      DR_CAP0:   dr_so = cap_so_i[0];
      DR_CAP1:   dr_so = cap_so_i[1];
      DR_CAP2:   dr_so = cap_so_i[2];
      DR_CAP3:   dr_so = cap_so_i[3];
      default:   dr_so = bypass_so_i;
    endcase
  end

  // The instruction path spans Select-IR-Scan to Update-IR (codes 9..15).
  assign ir_path = state_i inside {SELECT_IR_SCAN, CAPTURE_IR, SHIFT_IR, EXIT1_IR,
                                   PAUSE_IR, EXIT2_IR, UPDATE_IR};
  assign so      = ir_path ? ir_so_i : dr_so;

  always_ff @(negedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i) begin
      tdo_o    <= 1'b0;
      tdo_oe_o <= 1'b0;
    end else begin
      tdo_o    <= so;
      tdo_oe_o <= (state_i == SHIFT_IR) || (state_i == SHIFT_DR);
    end
  end

endmodule
