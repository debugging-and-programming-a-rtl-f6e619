// jtag_pkg: types and constants shared by the IEEE 1149.1 test access port (TAP) blocks.
//
// It holds the sixteen TAP controller states, the strobes the controller hands to the
// registers, the instruction opcodes, and the data register selector produced by the
// instruction decoder.
//
// What follows the standard: the state set and its names, the all-ones BYPASS opcode, the
// "01" pattern captured into the two low instruction register bits, and the 32-bit IDCODE
// with a 1 in its least significant bit. What is this design's own choice: the 4-bit
// instruction length and every opcode other than BYPASS. The four debug scan instructions
// (one per processor module whose registers are observed) are an extension of the
// standard set: one instruction per register group, so each group shifts out as its own
// serial word.
package jtag_pkg;

  // Instruction register length.
  localparam int unsigned IR_W = 4;

  // The 16 states of the TAP controller (IEEE 1149.1 figure of the state diagram).
  typedef enum logic [3:0] {
    TEST_LOGIC_RESET = 4'h0,
    RUN_TEST_IDLE    = 4'h1,
    SELECT_DR_SCAN   = 4'h2,
    CAPTURE_DR       = 4'h3,
    SHIFT_DR         = 4'h4,
    EXIT1_DR         = 4'h5,
    PAUSE_DR         = 4'h6,
    EXIT2_DR         = 4'h7,
    UPDATE_DR        = 4'h8,
    SELECT_IR_SCAN   = 4'h9,
    CAPTURE_IR       = 4'hA,
    SHIFT_IR         = 4'hB,
    EXIT1_IR         = 4'hC,
    PAUSE_IR         = 4'hD,
    EXIT2_IR         = 4'hE,
    UPDATE_IR        = 4'hF
  } tap_state_e;

  // One-per-state strobes derived from the controller state. Capture and shift act on
  // the rising edge of TCK; update acts on the falling edge, as the standard requires.
  typedef struct packed {
    logic reset;       // in Test-Logic-Reset
    logic capture_dr;
    logic shift_dr;
    logic update_dr;
    logic capture_ir;
    logic shift_ir;
    logic update_ir;
  } tap_ctrl_t;

  // Instruction opcodes.
  typedef enum logic [IR_W-1:0] {
    I_EXTEST         = 4'b0000,
    I_SAMPLE         = 4'b0001,
    I_PRELOAD        = 4'b0010,
    I_INTEST         = 4'b0011,
    I_IDCODE         = 4'b0100,
    I_SCAN_TRAM_ADDR = 4'b1000,  // debug scan of the tram_Addressable module registers
    I_SCAN_TRAM_BANK = 4'b1001,  // debug scan of the tram_Bank module registers
    I_SCAN_DEB_CA    = 4'b1010,  // debug scan of the deb_ca module registers
    I_SCAN_DEB_B     = 4'b1011,  // debug scan of the deb_b module registers
    I_BYPASS         = 4'b1111
  } instr_e;

  // Number of design-specific debug capture registers the instruction set can address.
  localparam int unsigned MAX_CAP = 4;

  // Which data register sits between TDI and TDO.
  typedef enum logic [2:0] {
    DR_BYPASS = 3'd0,
    DR_IDCODE = 3'd1,
    DR_BSR    = 3'd2,
    DR_CAP0   = 3'd4,
    DR_CAP1   = 3'd5,
    DR_CAP2   = 3'd6,
    DR_CAP3   = 3'd7
  } dr_sel_e;

  // Decoded instruction: selected data register and boundary cell modes.
  typedef struct packed {
    dr_sel_e dr_sel;
    logic    core_in_from_bsr;   // input cells drive the core (INTEST)
    logic    pin_out_from_bsr;   // output cells drive the device pins (EXTEST)
  } dec_t;

  // IR capture value: "01" in the two low bits, as the standard requires.
  localparam logic [IR_W-1:0] IR_CAPTURE = {{(IR_W-2){1'b0}}, 2'b01};

endpackage
