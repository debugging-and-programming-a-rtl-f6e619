// tb_jtag_ir: checks the instruction register: reset to IDCODE, the 0001 capture pattern
// shifted out first, the held instruction staying put while shifting, the update on the
// falling edge of TCK, and the return to IDCODE in Test-Logic-Reset.
module tb_jtag_ir;
  import jtag_pkg::*;

  logic tck = 0, trst_n = 1, tdi = 0;
  tap_ctrl_t ctrl = '0;
  logic [IR_W-1:0] instr;
  logic so;
  int checks = 0, failures = 0;

  jtag_ir dut (.tck_i(tck), .trst_n_i(trst_n), .tdi_i(tdi), .ctrl_i(ctrl), .instr_o(instr), .ir_so_o(so));

  always #5 tck = ~tck;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // One TCK cycle with the given strobes: set after a rising edge, held to the next.
  task automatic cyc(tap_ctrl_t c, logic d);
    @(posedge tck); #1;
    ctrl = c; tdi = d;
  endtask

  task automatic load(logic [IR_W-1:0] op, output logic [IR_W-1:0] captured);
    tap_ctrl_t c;
    c = '0; c.capture_ir = 1; cyc(c, 0);
    c = '0; c.shift_ir = 1;
    for (int i = 0; i < IR_W; i++) begin
      cyc(c, op[i]);
      captured[i] = so;          // no shift has acted on bit i yet
    end
    c = '0; c.update_ir = 1; cyc(c, 0);   // returns before the falling edge
  endtask

  logic [IR_W-1:0] cap, prev;

  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    @(negedge tck);
    check(instr == I_IDCODE, "TRST gives IDCODE");
    for (int k = 0; k < 20; k++) begin
      logic [IR_W-1:0] op;
      op = IR_W'($urandom);
      prev = instr;
      load(op, cap);
      // after the rising edge that begins the update cycle, before its falling edge
      check(instr == prev, "hold stage unchanged before the update edge");
      @(negedge tck); #1;
      check(cap == IR_CAPTURE, "capture pattern 0001 shifted out");
      check(instr == op, "instruction updated on falling edge");
      ctrl = '0;
    end
    // Test-Logic-Reset strobe
    begin
      tap_ctrl_t c; c = '0; c.reset = 1; cyc(c, 0);
      @(negedge tck); #1;
      check(instr == I_IDCODE, "Test-Logic-Reset gives IDCODE");
      c = '0; cyc(c, 0);
    end
    // shifting without update does not change the instruction
    begin
      tap_ctrl_t c; c = '0; c.shift_ir = 1;
      repeat (6) cyc(c, 1);
      c = '0; cyc(c, 0); @(negedge tck);
      check(instr == I_IDCODE, "no update, no change");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
