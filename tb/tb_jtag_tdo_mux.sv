// tb_jtag_tdo_mux: checks that TDO carries the selected data register's serial output,
// or the instruction register's on the instruction path, that it changes only on the
// falling edge of TCK, and that the enable is high exactly in Shift-IR and Shift-DR.
module tb_jtag_tdo_mux;
  import jtag_pkg::*;

  logic tck = 0, trst_n = 1;
  tap_state_e state = TEST_LOGIC_RESET;
  dr_sel_e sel = DR_BYPASS;
  logic ir_so = 0, byp = 0, idc = 0, bsr = 0;
  logic [MAX_CAP-1:0] cap = '0;
  logic tdo, oe;
  int checks = 0, failures = 0;

  jtag_tdo_mux dut (.tck_i(tck), .trst_n_i(trst_n), .state_i(state), .dr_sel_i(sel), .ir_so_i(ir_so),
    .bypass_so_i(byp), .idcode_so_i(idc), .bsr_so_i(bsr), .cap_so_i(cap), .tdo_o(tdo), .tdo_oe_o(oe));

  always #5 tck = ~tck;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t (state %s sel %s)", what, $time, state.name(), sel.name()); end
  endtask

  localparam dr_sel_e SELS [7] = '{DR_BYPASS, DR_IDCODE, DR_BSR, DR_CAP0, DR_CAP1, DR_CAP2, DR_CAP3};

  initial begin
    logic exp_tdo, exp_oe, old_tdo, old_oe;
    #1 trst_n = 0;
    #11 trst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(posedge tck); #1;
      state = tap_state_e'($urandom_range(0, 15));
      sel   = SELS[$urandom_range(0, 6)];
      {ir_so, byp, idc, bsr, cap} = 8'($urandom);
      // reference: which source should appear
      if (int'(state) >= 9) exp_tdo = ir_so;
      else case (sel)
        DR_BYPASS: exp_tdo = byp;
        DR_IDCODE: exp_tdo = idc;
        DR_BSR:    exp_tdo = bsr;
        DR_CAP0:   exp_tdo = cap[0];
        DR_CAP1:   exp_tdo = cap[1];
        DR_CAP2:   exp_tdo = cap[2];
        default:   exp_tdo = cap[3];
      endcase
      exp_oe = (state == SHIFT_DR) || (state == SHIFT_IR);
      old_tdo = tdo; old_oe = oe;
      #2;
      check(tdo == old_tdo && oe == old_oe, "no change before the falling edge");
      @(negedge tck); #1;
      check(tdo == exp_tdo, "selected source on TDO");
      check(oe == exp_oe, "enable only in shift states");
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
