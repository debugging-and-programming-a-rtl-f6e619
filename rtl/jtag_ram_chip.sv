// jtag_ram_chip: the JTAG test chip, the 8 x 32-bit memory enclosed in the test access port.
//
// Its 40 inputs (data, write address, read address, write enable, write clock) and 32
// data outputs each pass through a boundary-scan cell, so that a tester can observe them
// (SAMPLE), preload them (PRELOAD), drive the memory from the scan chain (INTEST) or drive
// the output pins from it (EXTEST). It has no debug capture registers. Along the chain the
// 32 output cells come first from TDO; then the input cells in this order, from the TDO
// side: ram_dataInput_i[31] down to [0], ram_writeAddress_i[2:0], ram_readAddress_i[2:0],
// ram_writeEnable_i, ram_writeClock_i. A 72-bit scan word therefore carries the 32 output
// cells in bits 0..31 and the inputs, in the order just listed, in bits 32..71; under
// INTEST the write clock is a boundary cell too, so a write is made by two updates, one
// with the clock low and one with it high.
//
// The pin set and its order follow the test vector used on this chip; placing the output
// cells nearer TDO follows the block diagram; the IDCODE value is this design's own.
module jtag_ram_chip
  import jtag_pkg::*;
#(
  parameter logic [31:0] IDCODE = 32'h1000_0001
) (
  input  logic        tck_i,
  input  logic        tms_i,
  input  logic        tdi_i,
  input  logic        trst_n_i,
  output logic        tdo_o,
  output logic        tdo_oe_o,
  input  logic [31:0] ram_dataInput_i,
  input  logic [2:0]  ram_writeAddress_i,
  input  logic [2:0]  ram_readAddress_i,
  input  logic        ram_writeEnable_i,
  input  logic        ram_writeClock_i,
  output logic [31:0] ram_dataOutput_o,
  output tap_state_e  state_o,
  output logic [IR_W-1:0] instr_o
);

  localparam int unsigned N_IN  = 40;
  localparam int unsigned N_OUT = 32;

  logic [N_IN-1:0]  pin_in, core_in;
  logic [N_OUT-1:0] core_out;
  logic [31:0]      c_din;
  logic [2:0]       c_waddr, c_raddr;
  logic             c_we, c_wclk;

  // Bit-reverse so that ram_dataInput_i[31] is input cell 0 (nearest TDO).
  assign pin_in = {<<{ram_dataInput_i, ram_writeAddress_i, ram_readAddress_i,
                      ram_writeEnable_i, ram_writeClock_i}};
  assign {c_din, c_waddr, c_raddr, c_we, c_wclk} = {<<{core_in}};

  jtag_tap #(
    .N_IN   (N_IN),
    .N_OUT  (N_OUT),
    .N_CAP  (0),
    .CAP_W  (1),
    .IDCODE (IDCODE)
  ) u_tap (
    .tck_i      (tck_i),
    .tms_i      (tms_i),
    .tdi_i      (tdi_i),
    .trst_n_i   (trst_n_i),
    .tdo_o      (tdo_o),
    .tdo_oe_o   (tdo_oe_o),
    .pin_in_i   (pin_in),
    .core_in_o  (core_in),
    .core_out_i (core_out),
    .pin_out_o  (ram_dataOutput_o),
    .cap_data_i ('0),
    .dbg_capture_o (),
    .state_o    (state_o),
    .instr_o    (instr_o)
  );

  jtag_test_ram #(.DATA_W(32), .ADDR_W(3)) u_ram (
    .ram_dataInput_i    (c_din),
    .ram_writeAddress_i (c_waddr),
    .ram_readAddress_i  (c_raddr),
    .ram_writeEnable_i  (c_we),
    .ram_writeClock_i   (c_wclk),
    .ram_dataOutput_o   (core_out)
  );

endmodule
