// jtag_bypass_reg: the one-bit bypass register.
//
// When selected it is a single flip-flop between TDI and TDO, so a device that is not
// under test adds one TCK cycle to a chain of devices. It loads 0 in Capture-DR, as the
// standard requires, and takes TDI on each rising edge of TCK in Shift-DR.
//
// Interface: TCK, TRST_N, TDI, the controller strobes, a select from the decoder;
// so_o is the serial out. Everything here follows the standard.
module jtag_bypass_reg
  import jtag_pkg::*;
(
  input  logic      tck_i,
  input  logic      trst_n_i,
  input  logic      tdi_i,
  input  tap_ctrl_t ctrl_i,
  input  logic      sel_i,
  output logic      so_o
);

  logic q;

  always_ff @(posedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i) q <= 1'b0;
    else if (sel_i && ctrl_i.capture_dr) q <= 1'b0;
    else if (sel_i && ctrl_i.shift_dr)   q <= tdi_i;
  end

  assign so_o = q;

endmodule
