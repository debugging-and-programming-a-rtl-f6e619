// tb_jtag_idcode_reg: checks that the identification register shifts out its 32-bit code
// least significant bit first after Capture-DR, that TDI follows 32 cycles later, and
// that an unselected register ignores the strobes.
module tb_jtag_idcode_reg;
  import jtag_pkg::*;

  localparam logic [31:0] ID = 32'h4BA0_0477 | 32'h1;

  logic tck = 0, trst_n = 1, tdi = 0, sel = 0;
  tap_ctrl_t ctrl = '0;
  logic so;
  int checks = 0, failures = 0;

  jtag_idcode_reg #(.IDCODE(ID)) dut (.tck_i(tck), .trst_n_i(trst_n), .tdi_i(tdi), .ctrl_i(ctrl), .sel_i(sel), .so_o(so));

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
    logic [63:0] din, dout;
    #1 trst_n = 0;
    #11 trst_n = 1;
    sel = 1;
    for (int k = 0; k < 4; k++) begin
      din = {$urandom, $urandom};
      c = '0; c.capture_dr = 1; cyc(c, 0);
      c = '0; c.shift_dr = 1;
      for (int i = 0; i < 64; i++) begin
        cyc(c, din[i]);
        dout[i] = so;
      end
      c = '0; cyc(c, 0);
      check(dout[31:0] == ID, "IDCODE shifted out, bit 0 first");
      check(dout[63:32] == din[31:0], "TDI appears after 32 cycles");
    end
    sel = 0;
    c = '0; c.capture_dr = 1; cyc(c, 0);
    c = '0; c.shift_dr = 1; cyc(c, 0);
    check(so == din[32], "unselected register holds");
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
