// tb_jtag_tap: drives a complete test access port through its four JTAG pins only
// (6 input cells, 5 output cells, four 16-bit debug capture registers here) and checks
// every instruction: IDCODE after reset, the IR capture pattern, BYPASS and undefined
// opcodes, SAMPLE, PRELOAD with EXTEST and INTEST, the four debug scans, a shift with a
// pause, TMS reset and the TDO enable.
module tb_jtag_tap;
  import jtag_pkg::*;

  localparam int NI = 6, NO = 5, CW = 16, N = NI + NO;
  localparam logic [31:0] ID = 32'h0ABC_D123;

  jtag_drv_if #(.MAXW(64)) j ();

  logic [NI-1:0] pin_in = '0, core_in;
  logic [NO-1:0] core_out = '0, pin_out;
  logic [3:0][CW-1:0] dbg = '0;
  logic [3:0] dbg_cap;
  int n_strobe [4];
  tap_state_e state;
  logic [IR_W-1:0] instr;
  int checks = 0, failures = 0;

  jtag_tap #(.N_IN(NI), .N_OUT(NO), .N_CAP(4), .CAP_W(CW), .IDCODE(ID)) dut (
    .tck_i(j.tck), .tms_i(j.tms), .tdi_i(j.tdi), .trst_n_i(j.trst_n), .tdo_o(j.tdo), .tdo_oe_o(j.tdo_oe),
    .pin_in_i(pin_in), .core_in_o(core_in), .core_out_i(core_out), .pin_out_o(pin_out),
    .cap_data_i(dbg), .dbg_capture_o(dbg_cap), .state_o(state), .instr_o(instr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [63:0] din, dout;

  // capture strobes towards the core: count them, and check they come only in Capture-DR
  always @(posedge j.tck) begin
    for (int g = 0; g < 4; g++) if (dbg_cap[g]) n_strobe[g]++;
    if (dbg_cap != 0 && state != CAPTURE_DR) begin
      failures++; $display("FAIL capture strobe outside Capture-DR at %0t", $time);
    end
  end

  task automatic load_ir(logic [IR_W-1:0] op);
    j.shift_ir(IR_W, 64'(op), dout);
    check(dout[IR_W-1:0] == IR_CAPTURE, "IR capture pattern on TDO");
    check(instr == op, "instruction loaded");
  endtask

  initial begin
    j.trst();
    check(instr == I_IDCODE && state == RUN_TEST_IDLE, "IDCODE after TRST");
    check(!j.tdo_oe, "TDO disabled while idle");
    j.shift_dr(32, 64'h0, dout);
    check(dout[31:0] == ID, "IDCODE read");

    // BYPASS: one bit of delay, first bit 0
    load_ir(I_BYPASS);
    din = {$urandom, $urandom};
    j.shift_dr(40, din, dout);
    check(dout[0] == 1'b0 && dout[39:1] == din[38:0], "BYPASS one-bit delay");
    // undefined opcode acts as BYPASS
    load_ir(4'b0101);
    j.shift_dr(20, din, dout);
    check(dout[0] == 1'b0 && dout[19:1] == din[18:0], "undefined opcode is BYPASS");

    // SAMPLE: capture pins and core outputs, device keeps working
    load_ir(I_SAMPLE);
    pin_in = NI'($urandom); core_out = NO'($urandom);
    j.shift_dr(N, 64'h0, dout);
    check(dout[N-1:0] == {pin_in, core_out}, "SAMPLE captures pins and core outputs");
    check(core_in == pin_in && pin_out == core_out, "SAMPLE leaves the device working");

    // PRELOAD a pattern, then EXTEST drives it onto the output pins
    load_ir(I_PRELOAD);
    din = {$urandom, $urandom};
    j.shift_dr(N, din, dout);
    check(pin_out == core_out, "PRELOAD does not drive pins");
    load_ir(I_EXTEST);
    check(pin_out == din[NO-1:0], "EXTEST drives the preloaded pattern");
    check(core_in == pin_in, "EXTEST leaves core inputs from pins");
    // EXTEST captures the input pins
    pin_in = NI'($urandom);
    j.shift_dr(N, din, dout);
    check(dout[N-1:NO] == pin_in, "EXTEST captures input pins");

    // INTEST: the scan chain drives the core
    load_ir(I_PRELOAD);
    din = {$urandom, $urandom};
    j.shift_dr(N, din, dout);
    load_ir(I_INTEST);
    check(core_in == din[N-1:NO], "INTEST drives the core inputs");
    core_out = NO'($urandom);
    j.shift_dr(N, din, dout);
    check(dout[NO-1:0] == core_out, "INTEST captures core outputs");

    // debug scans, one per register group
    for (int g = 0; g < 4; g++) begin
      for (int h = 0; h < 4; h++) dbg[h] = CW'($urandom);
      load_ir(IR_W'(int'(I_SCAN_TRAM_ADDR) + g));
      j.shift_dr(CW, 64'h0, dout);
      check(dout[CW-1:0] == dbg[g], "debug scan returns its register group");
      check(n_strobe[g] == 1 && n_strobe.sum() == g + 1, "one capture strobe for this group only");
    end

    // a scan interrupted by Pause-DR gives the same result
    dbg[3] = CW'($urandom);
    j.shift_dr(CW, 64'h0, dout, 7);
    check(dout[CW-1:0] == dbg[3], "debug scan through Pause-DR");

    // TMS reset returns to IDCODE
    j.tms_reset();
    check(instr == I_IDCODE, "TMS reset gives IDCODE");
    check(j.n_pause > 0 && j.n_tms_reset > 0 && j.n_trst > 0, "all reset and pause paths used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
