// jtag_idcode_reg: the 32-bit device identification register.
//
// In Capture-DR it loads the fixed IDCODE word (version, part number, manufacturer
// identity, and a 1 in bit 0); in Shift-DR it shifts right one bit per rising edge of
// TCK, so bit 0 leaves first and TDI enters at bit 31. The word layout and the 1 in bit 0
// follow the standard; the default value is this design's own choice, since no
// identification code is assigned to it.
//
// Interface: TCK, TRST_N, TDI, controller strobes, select; so_o is the serial out.
module jtag_idcode_reg
  import jtag_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1000_0001   // version 1, part 0x0000, maker 0x000, LSB 1
) (
  input  logic      tck_i,
  input  logic      trst_n_i,
  input  logic      tdi_i,
  input  tap_ctrl_t ctrl_i,
  input  logic      sel_i,
  output logic      so_o
);

  logic [31:0] q;

  always_ff @(posedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i) q <= IDCODE;
    else if (sel_i && ctrl_i.capture_dr) q <= IDCODE;
    else if (sel_i && ctrl_i.shift_dr)   q <= {tdi_i, q[31:1]};
  end

  assign so_o = q[0];

  initial assert (IDCODE[0] == 1'b1) else $error("IDCODE bit 0 must be 1");

endmodule
