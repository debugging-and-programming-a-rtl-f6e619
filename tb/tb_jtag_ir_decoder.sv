// tb_jtag_ir_decoder: checks every one of the 16 opcodes against the instruction table,
// with all four debug capture registers present and with none.
module tb_jtag_ir_decoder;
  import jtag_pkg::*;

  logic [IR_W-1:0] instr;
  dec_t dec4, dec0;
  int checks = 0, failures = 0;

  jtag_ir_decoder #(.N_CAP(4)) dut4 (.instr_i(instr), .dec_o(dec4));
  jtag_ir_decoder #(.N_CAP(0)) dut0 (.instr_i(instr), .dec_o(dec0));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s opcode %b", what, instr); end
  endtask

  initial begin
    for (int op = 0; op < 16; op++) begin
      dr_sel_e s4, s0;
      logic in_m, out_m;
      instr = 4'(op);
      #1;
      // expected values, written out from the instruction table
      in_m = 0; out_m = 0;
      case (op)
        0:  begin s4 = DR_BSR; out_m = 1; end   // EXTEST
        1:  s4 = DR_BSR;                        // SAMPLE
        2:  s4 = DR_BSR;                        // PRELOAD
        3:  begin s4 = DR_BSR; in_m = 1; end    // INTEST
        4:  s4 = DR_IDCODE;
        8:  s4 = DR_CAP0;
        9:  s4 = DR_CAP1;
        10: s4 = DR_CAP2;
        11: s4 = DR_CAP3;
        default: s4 = DR_BYPASS;
      endcase
      s0 = (op >= 8 && op <= 11) ? DR_BYPASS : s4;
      check(dec4.dr_sel == s4, "register select, 4 capture registers");
      check(dec0.dr_sel == s0, "register select, no capture registers");
      check(dec4.core_in_from_bsr == in_m && dec0.core_in_from_bsr == in_m, "INTEST mode");
      check(dec4.pin_out_from_bsr == out_m && dec0.pin_out_from_bsr == out_m, "EXTEST mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
