// jtag_top: the two JTAG-equipped designs side by side.
//
// The first is the processor's test access port: boundary scan around the processor's
// CPU_IN inputs and CPU_OUT outputs plus four debug capture registers that read out the
// register groups of the processor modules tram_Addressable, tram_Bank, deb_ca and deb_b,
// one instruction each. The processor core is not part of this RTL, so its side of the
// wrapper is brought out as ports: cpu_core_in_o feeds its inputs, cpu_core_out_i takes
// its outputs, cpu_dbg_i[g] carries register group g and cpu_dbg_capture_o[g] marks the
// TCK cycle in which that group is captured. The second is the JTAG test chip,
// the 8 x 32-bit memory inside its own test access port, with its own JTAG pins.
//
// Each design has its own TCK, TMS, TDI, TRST_N and TDO (with an output enable). The
// processor pin counts and register group widths are this design's own choices.
module jtag_top
  import jtag_pkg::*;
#(
  parameter int unsigned CPU_IN  = 32,
  parameter int unsigned CPU_OUT = 32,
  parameter int unsigned CAP_W   = 128,
  parameter logic [31:0] CPU_IDCODE = 32'h1000_1001,
  parameter logic [31:0] RAM_IDCODE = 32'h1000_2001
) (
  // processor test access port
  input  logic                            cpu_tck_i,
  input  logic                            cpu_tms_i,
  input  logic                            cpu_tdi_i,
  input  logic                            cpu_trst_n_i,
  output logic                            cpu_tdo_o,
  output logic                            cpu_tdo_oe_o,
  input  logic [CPU_IN-1:0]               cpu_pin_in_i,
  output logic [CPU_IN-1:0]               cpu_core_in_o,
  input  logic [CPU_OUT-1:0]              cpu_core_out_i,
  output logic [CPU_OUT-1:0]              cpu_pin_out_o,
  input  logic [MAX_CAP-1:0][CAP_W-1:0]   cpu_dbg_i,
  output logic [MAX_CAP-1:0]              cpu_dbg_capture_o,
  output tap_state_e                      cpu_state_o,
  output logic [IR_W-1:0]                 cpu_instr_o,
  // memory test chip
  input  logic                            ram_tck_i,
  input  logic                            ram_tms_i,
  input  logic                            ram_tdi_i,
  input  logic                            ram_trst_n_i,
  output logic                            ram_tdo_o,
  output logic                            ram_tdo_oe_o,
  input  logic [31:0]                     ram_dataInput_i,
  input  logic [2:0]                      ram_writeAddress_i,
  input  logic [2:0]                      ram_readAddress_i,
  input  logic                            ram_writeEnable_i,
  input  logic                            ram_writeClock_i,
  output logic [31:0]                     ram_dataOutput_o,
  output tap_state_e                      ram_state_o,
  output logic [IR_W-1:0]                 ram_instr_o
);

  jtag_tap #(
    .N_IN   (CPU_IN),
    .N_OUT  (CPU_OUT),
    .N_CAP  (MAX_CAP),
    .CAP_W  (CAP_W),
    .IDCODE (CPU_IDCODE)
  ) u_cpu_tap (
    .tck_i      (cpu_tck_i),
    .tms_i      (cpu_tms_i),
    .tdi_i      (cpu_tdi_i),
    .trst_n_i   (cpu_trst_n_i),
    .tdo_o      (cpu_tdo_o),
    .tdo_oe_o   (cpu_tdo_oe_o),
    .pin_in_i   (cpu_pin_in_i),
    .core_in_o  (cpu_core_in_o),
    .core_out_i (cpu_core_out_i),
    .pin_out_o  (cpu_pin_out_o),
    .cap_data_i (cpu_dbg_i),
    .dbg_capture_o (cpu_dbg_capture_o),
    .state_o    (cpu_state_o),
    .instr_o    (cpu_instr_o)
  );

  jtag_ram_chip #(.IDCODE(RAM_IDCODE)) u_ram_chip (
    .tck_i              (ram_tck_i),
    .tms_i              (ram_tms_i),
    .tdi_i              (ram_tdi_i),
    .trst_n_i           (ram_trst_n_i),
    .tdo_o              (ram_tdo_o),
    .tdo_oe_o           (ram_tdo_oe_o),
    .ram_dataInput_i    (ram_dataInput_i),
    .ram_writeAddress_i (ram_writeAddress_i),
    .ram_readAddress_i  (ram_readAddress_i),
    .ram_writeEnable_i  (ram_writeEnable_i),
    .ram_writeClock_i   (ram_writeClock_i),
    .ram_dataOutput_o   (ram_dataOutput_o),
    .state_o            (ram_state_o),
    .instr_o            (ram_instr_o)
  );

endmodule
