// jtag_capture_reg: a design-specific debug data register that takes a snapshot of a group
// of internal processor registers and shifts it out through TDO.
//
// Each observed processor module gets one such register and one instruction of its own.
// When the decoder selects it, Capture-DR loads the concatenated register values from
// data_i in parallel; Shift-DR then moves them one bit per rising edge of TCK towards
// so_o, bit 0 first, while TDI fills in from the top. The register is read-only towards
// the processor: what is shifted in is discarded at the next capture. Taking one register
// group per instruction, rather than one long chain of all of them, follows the design;
// the width and the order of the registers within data_i are left to the instantiating
// level.
//
// Interface: TCK, TRST_N, TDI, controller strobes, select, data_i[WIDTH]; so_o.
module jtag_capture_reg
  import jtag_pkg::*;
#(
  parameter int unsigned WIDTH = 128
) (
  input  logic             tck_i,
  input  logic             trst_n_i,
  input  logic             tdi_i,
  input  tap_ctrl_t        ctrl_i,
  input  logic             sel_i,
  input  logic [WIDTH-1:0] data_i,
  output logic             so_o
);

  logic [WIDTH-1:0] q;
  logic [WIDTH:0]   shifted;

  assign shifted = {tdi_i, q};

  always_ff @(posedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i) q <= '0;
    else if (sel_i && ctrl_i.capture_dr) q <= data_i;
    else if (sel_i && ctrl_i.shift_dr)   q <= shifted[WIDTH:1];
  end

  assign so_o = q[0];

endmodule
