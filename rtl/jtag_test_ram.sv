// jtag_test_ram: the small memory used as the core of the JTAG test chip.
//
// Eight words of 32 bits with a separate write port and read port. A word is written on
// the rising edge of ram_writeClock_i when ram_writeEnable_i is high; the read port is
// asynchronous: ram_dataOutput_o always shows the word at ram_readAddress_i. The input
// names and widths (32-bit data, 3-bit write and read addresses, write enable, write
// clock) follow the test vector applied to this memory; the output port, the depth implied
// by the 3-bit address and the asynchronous read (the memory has no read clock) are this
// design's reading of them. The contents are not reset.
module jtag_test_ram #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 3
) (
  input  logic [DATA_W-1:0] ram_dataInput_i,
  input  logic [ADDR_W-1:0] ram_writeAddress_i,
  input  logic [ADDR_W-1:0] ram_readAddress_i,
  input  logic              ram_writeEnable_i,
  input  logic              ram_writeClock_i,
  output logic [DATA_W-1:0] ram_dataOutput_o
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge ram_writeClock_i) begin
    if (ram_writeEnable_i) mem[ram_writeAddress_i] <= ram_dataInput_i;
  end

  assign ram_dataOutput_o = mem[ram_readAddress_i];

endmodule
