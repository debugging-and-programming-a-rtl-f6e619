// tb_jtag_bsr: checks the boundary-scan register (5 input and 4 output cells here):
// transparent pins in normal mode, capture of pins and core outputs in chain order,
// shift and update, the two drive modes (INTEST on the core side, EXTEST on the pin
// side), the falling-edge timing of the update, and that an unselected register holds.
module tb_jtag_bsr;
  import jtag_pkg::*;

  localparam int NI = 5, NO = 4, N = NI + NO;

  logic tck = 0, trst_n = 1, tdi = 0, sel = 0, in_m = 0, out_m = 0;
  tap_ctrl_t ctrl = '0;
  logic [NI-1:0] pin_in = '0, core_in;
  logic [NO-1:0] core_out = '0, pin_out;
  logic so;
  int checks = 0, failures = 0;

  jtag_bsr #(.N_IN(NI), .N_OUT(NO)) dut (
    .tck_i(tck), .trst_n_i(trst_n), .tdi_i(tdi), .ctrl_i(ctrl), .sel_i(sel),
    .core_in_from_bsr_i(in_m), .pin_out_from_bsr_i(out_m),
    .pin_in_i(pin_in), .core_in_o(core_in), .core_out_i(core_out), .pin_out_o(pin_out), .so_o(so));

  always #5 tck = ~tck;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic cyc(tap_ctrl_t c, logic d);
    @(posedge tck); #1;
    ctrl = c; tdi = d;
  endtask

  // capture, shift N bits (din in, dout out), then update
  task automatic scan(input logic [N-1:0] din, output logic [N-1:0] dout);
    tap_ctrl_t c;
    c = '0; c.capture_dr = 1; cyc(c, 0);
    c = '0; c.shift_dr = 1;
    for (int i = 0; i < N; i++) begin
      cyc(c, din[i]);
      dout[i] = so;
    end
    c = '0; cyc(c, 0);
    c = '0; c.update_dr = 1; cyc(c, 0);
  endtask

  initial begin
    logic [N-1:0] w, cap, prev_w;
    #1 trst_n = 0;
    #11 trst_n = 1;
    // normal mode: the register is transparent
    for (int k = 0; k < 8; k++) begin
      pin_in = NI'($urandom); core_out = NO'($urandom); #1;
      check(core_in == pin_in && pin_out == core_out, "transparent in normal mode");
    end
    sel = 1;
    prev_w = '0;
    for (int k = 0; k < 12; k++) begin
      logic [NI-1:0] pi_s; logic [NO-1:0] co_s;
      in_m  = k[0];
      out_m = k[1];
      pin_in = NI'($urandom); core_out = NO'($urandom);
      pi_s = pin_in; co_s = core_out;
      w = N'({$urandom, $urandom});
      scan(w, cap);
      check(cap == {pi_s, co_s}, "capture of pins and core outputs in chain order");
      // the update cycle has begun; its falling edge has not come yet
      check(core_in == (in_m ? prev_w[N-1:NO] : pin_in), "core side before the update edge");
      @(negedge tck); #1;
      ctrl = '0;
      check(core_in == (in_m ? w[N-1:NO] : pin_in), "core side after update (INTEST mode)");
      check(pin_out == (out_m ? w[NO-1:0] : core_out), "pin side after update (EXTEST mode)");
      prev_w = w;
    end
    // unselected: update has no effect
    in_m = 1; out_m = 1; sel = 0;
    begin
      logic [N-1:0] dummy;
      scan(~prev_w, dummy);
      @(negedge tck); #1; ctrl = '0;
      check(core_in == prev_w[N-1:NO] && pin_out == prev_w[NO-1:0], "unselected register holds");
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
