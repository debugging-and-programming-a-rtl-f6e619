// tb_jtag_capture_reg: checks that a debug capture register takes a snapshot of its
// parallel input in Capture-DR, shifts it out bit 0 first, is not disturbed by later
// changes of the input, and does nothing when unselected. WIDTH is set to 40 here.
module tb_jtag_capture_reg;
  import jtag_pkg::*;

  localparam int W = 40;

  logic tck = 0, trst_n = 1, tdi = 0, sel = 0;
  tap_ctrl_t ctrl = '0;
  logic [W-1:0] data = '0;
  logic so;
  int checks = 0, failures = 0;

  jtag_capture_reg #(.WIDTH(W)) dut (.tck_i(tck), .trst_n_i(trst_n), .tdi_i(tdi), .ctrl_i(ctrl), .sel_i(sel), .data_i(data), .so_o(so));

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
    logic [W-1:0] snap, dout, din;
    #1 trst_n = 0;
    #11 trst_n = 1;
    sel = 1;
    for (int k = 0; k < 10; k++) begin
      data = {$urandom, $urandom};
      snap = data;
      din  = {$urandom, $urandom};
      c = '0; c.capture_dr = 1; cyc(c, 0);
      c = '0; c.shift_dr = 1;
      for (int i = 0; i < W; i++) begin
        cyc(c, din[i]);
        if (i == 1) data = ~data;          // the snapshot must not follow the input
        dout[i] = so;
      end
      c = '0; cyc(c, 0);
      check(dout == snap, "snapshot shifted out bit 0 first");
      // what was shifted in now fills the register
      c = '0; c.shift_dr = 1;
      cyc(c, 0);
      check(so == din[0], "shifted-in data follows");
    end
    sel = 0;
    c = '0; c.capture_dr = 1; cyc(c, 0);
    c = '0; cyc(c, 0);
    check(so == din[0], "unselected register does not capture");
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
