// tb_jtag_bypass_reg: checks that the bypass register captures 0, delays TDI by exactly
// one TCK cycle in Shift-DR, and ignores the strobes when it is not selected.
module tb_jtag_bypass_reg;
  import jtag_pkg::*;

  logic tck = 0, trst_n = 1, tdi = 0, sel = 0;
  tap_ctrl_t ctrl = '0;
  logic so;
  int checks = 0, failures = 0;

  jtag_bypass_reg dut (.tck_i(tck), .trst_n_i(trst_n), .tdi_i(tdi), .ctrl_i(ctrl), .sel_i(sel), .so_o(so));

  always #5 tck = ~tck;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cyc(tap_ctrl_t c, logic d);
    @(posedge tck); #1;
    ctrl = c; tdi = d;
  endtask

  initial begin
    tap_ctrl_t c;
    logic prev;
    #1 trst_n = 0;
    #11 trst_n = 1;
    sel = 1;
    for (int k = 0; k < 10; k++) begin
      c = '0; c.capture_dr = 1; cyc(c, 1);
      c = '0; c.shift_dr = 1;
      cyc(c, 0);
      check(so == 1'b0, "captures 0");
      prev = 0;
      for (int i = 0; i < 40; i++) begin
        logic d;
        d = 1'($urandom);
        cyc(c, d);
        if (i > 0) check(so == prev, "one-cycle delay");
        prev = d;
      end
      // the last bit arrives one cycle later
      c = '0; cyc(c, 0);
      check(so == prev, "one-cycle delay, last bit");
    end
    // not selected: strobes have no effect
    c = '0; c.shift_dr = 1; cyc(c, 1); cyc(c, 1);
    sel = 0;
    c = '0; c.capture_dr = 1; cyc(c, 0);
    c = '0; c.shift_dr = 1; cyc(c, 0); cyc(c, 0);
    check(so == 1'b1, "unselected register holds");
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
