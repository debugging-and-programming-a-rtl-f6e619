// jtag_ir_decoder: turns the current instruction into the data register selection and
// the modes of the boundary-scan cells.
//
// Purely combinational. EXTEST selects the boundary register and lets the output cells
// drive the device pins; INTEST selects it and lets the input cells drive the core;
// SAMPLE and PRELOAD select it with the device working normally; IDCODE selects the
// identification register; the four debug scan instructions each select one design
// specific capture register (only those below N_CAP exist); BYPASS and every opcode that
// is not defined select the one-bit bypass register, as the standard requires for
// unused codes.
//
// Interface: instr_i in, dec_o out (selection and two mode bits, see jtag_pkg::dec_t).
// The instruction meanings follow the standard and the design's debug extension; the
// opcodes are this design's own choice.
module jtag_ir_decoder
  import jtag_pkg::*;
#(
  parameter int unsigned N_CAP = 4   // number of debug capture registers present (0..4)
) (
  input  logic [IR_W-1:0] instr_i,
  output dec_t            dec_o
);

  always_comb begin
    dec_o        = '0;
    dec_o.dr_sel = DR_BYPASS;
    case (instr_i)
      I_EXTEST: begin
        dec_o.dr_sel           = DR_BSR;
        dec_o.pin_out_from_bsr = 1'b1;
      end
      I_SAMPLE, I_PRELOAD: dec_o.dr_sel = DR_BSR;
      I_INTEST: begin
        dec_o.dr_sel           = DR_BSR;
        dec_o.core_in_from_bsr = 1'b1;
      end
      I_IDCODE:         dec_o.dr_sel = DR_IDCODE;
      I_SCAN_TRAM_ADDR: if (N_CAP > 0) dec_o.dr_sel = DR_CAP0;
      I_SCAN_TRAM_BANK: if (N_CAP > 1) dec_o.dr_sel = DR_CAP1;
      I_SCAN_DEB_CA:    if (N_CAP > 2) dec_o.dr_sel = DR_CAP2;
      I_SCAN_DEB_B:     if (N_CAP > 3) dec_o.dr_sel = DR_CAP3;
      default:          dec_o.dr_sel = DR_BYPASS;
    endcase
  end

endmodule
