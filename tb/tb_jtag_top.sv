// tb_jtag_top: end-to-end test of both designs at their default sizes (32 processor inputs
// and outputs, four 128-bit debug register groups; the 72-cell memory test chip), driven
// only through their JTAG pins and device pins. It counts how often each mechanism ran
// (TRST and TMS reset, IR capture, BYPASS, IDCODE, SAMPLE, PRELOAD, EXTEST, INTEST, each
// debug scan, Pause-DR) and counts a failure for any that never ran.
module tb_jtag_top;
  import jtag_pkg::*;

  jtag_drv_if #(.MAXW(256)) jc ();   // tester on the processor port
  jtag_drv_if #(.MAXW(256)) jr ();   // tester on the memory test chip

  logic [31:0]           cpu_pin_in = '0, cpu_core_in, cpu_core_out = '0, cpu_pin_out;
  logic [3:0][127:0]     cpu_dbg = '0;
  logic [3:0]            cpu_dbg_cap;
  tap_state_e            cpu_state, ram_state;
  logic [IR_W-1:0]       cpu_instr, ram_instr;
  logic [31:0] din = '0, dout;
  logic [2:0]  wa = '0, ra = '0;
  logic        we = 0, wclk = 0;
  int checks = 0, failures = 0;

  jtag_top dut (
    .cpu_tck_i(jc.tck), .cpu_tms_i(jc.tms), .cpu_tdi_i(jc.tdi), .cpu_trst_n_i(jc.trst_n),
    .cpu_tdo_o(jc.tdo), .cpu_tdo_oe_o(jc.tdo_oe),
    .cpu_pin_in_i(cpu_pin_in), .cpu_core_in_o(cpu_core_in), .cpu_core_out_i(cpu_core_out),
    .cpu_pin_out_o(cpu_pin_out), .cpu_dbg_i(cpu_dbg), .cpu_dbg_capture_o(cpu_dbg_cap), .cpu_state_o(cpu_state), .cpu_instr_o(cpu_instr),
    .ram_tck_i(jr.tck), .ram_tms_i(jr.tms), .ram_tdi_i(jr.tdi), .ram_trst_n_i(jr.trst_n),
    .ram_tdo_o(jr.tdo), .ram_tdo_oe_o(jr.tdo_oe),
    .ram_dataInput_i(din), .ram_writeAddress_i(wa), .ram_readAddress_i(ra),
    .ram_writeEnable_i(we), .ram_writeClock_i(wclk), .ram_dataOutput_o(dout),
    .ram_state_o(ram_state), .ram_instr_o(ram_instr));

  // mechanism counters
  int n_ircap, n_bypass, n_idcode, n_sample, n_preload, n_extest, n_intest;
  int n_scan [4];
  int n_strobe [4];

  always @(posedge jc.tck) for (int g = 0; g < 4; g++) if (cpu_dbg_cap[g]) n_strobe[g]++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [255:0] so;

  task automatic cpu_ir(logic [IR_W-1:0] op);
    jc.shift_ir(IR_W, 256'(op), so);
    check(so[1:0] == 2'b01, "processor port IR capture");
    check(cpu_instr == op, "processor port instruction");
    n_ircap++;
  endtask

  task automatic ram_ir(logic [IR_W-1:0] op);
    jr.shift_ir(IR_W, 256'(op), so);
    check(so[1:0] == 2'b01, "test chip IR capture");
    check(ram_instr == op, "test chip instruction");
    n_ircap++;
  endtask

  // memory test chip scan word (see jtag_ram_chip): 32 output cells, then the inputs
  function automatic logic [71:0] word(logic [31:0] d, logic [2:0] a_w, logic [2:0] a_r,
                                       logic en, logic clk);
    logic [39:0] ins;
    for (int i = 0; i < 32; i++) ins[i] = d[31-i];
    for (int i = 0; i < 3; i++)  ins[32+i] = a_w[2-i];
    for (int i = 0; i < 3; i++)  ins[35+i] = a_r[2-i];
    ins[38] = en;
    ins[39] = clk;
    return {ins, 32'h0};
  endfunction

  logic [255:0] r;
  logic [31:0]  mem [8];

  initial begin
    fork jc.trst(); jr.trst(); join

    // ---------------- processor test access port ----------------
    check(cpu_instr == I_IDCODE, "processor port IDCODE after reset");
    jc.shift_dr(32, '0, so);
    check(so[31:0] == 32'h1000_1001, "processor IDCODE");
    n_idcode++;

    cpu_ir(I_BYPASS);
    r = {8{$urandom}};
    jc.shift_dr(100, r, so);
    check(so[0] == 0 && so[99:1] == r[98:0], "processor BYPASS");
    n_bypass++;

    cpu_ir(I_SAMPLE);
    cpu_pin_in = $urandom; cpu_core_out = $urandom;
    jc.shift_dr(64, '0, so);
    check(so[63:0] == {cpu_pin_in, cpu_core_out}, "processor SAMPLE");
    check(cpu_core_in == cpu_pin_in && cpu_pin_out == cpu_core_out, "processor works during SAMPLE");
    n_sample++;

    cpu_ir(I_PRELOAD);
    r = {8{$urandom}};
    jc.shift_dr(64, r, so);
    n_preload++;
    cpu_ir(I_EXTEST);
    check(cpu_pin_out == r[31:0], "processor EXTEST drives output pins");
    n_extest++;
    cpu_ir(I_INTEST);
    check(cpu_core_in == r[63:32], "processor INTEST drives the core");
    n_intest++;

    for (int g = 0; g < 4; g++) begin
      for (int h = 0; h < 4; h++) cpu_dbg[h] = {$urandom, $urandom, $urandom, $urandom};
      cpu_ir(IR_W'(int'(I_SCAN_TRAM_ADDR) + g));
      r = cpu_dbg[g];
      // the group is captured in Capture-DR; later changes do not reach the scan
      fork
        jc.shift_dr(128, '0, so, (g == 3) ? 50 : 0);
        begin #200; cpu_dbg[g] = ~cpu_dbg[g]; end
      join
      check(so[127:0] == r[127:0], "processor debug scan of one register group");
      n_scan[g]++;
    end

    jc.tms_reset();
    check(cpu_instr == I_IDCODE, "processor TMS reset");

    // ---------------- memory test chip ----------------
    check(ram_instr == I_IDCODE, "test chip IDCODE after reset");
    jr.shift_dr(32, '0, so);
    check(so[31:0] == 32'h1000_2001, "test chip IDCODE");
    n_idcode++;
    ram_ir(I_BYPASS);
    jr.shift_dr(8, 256'hB5, so);
    check(so[7:1] == 7'h35 && so[0] == 0, "test chip BYPASS");
    n_bypass++;

    ram_ir(I_SAMPLE);
    din = 32'hF656_ACAD; wa = 0; ra = 2; we = 0; wclk = 1;
    jr.shift_dr(72, '0, so);
    check(so[71:32] == word(32'hF656_ACAD, 0, 2, 0, 1) >> 32, "test chip SAMPLE");
    n_sample++;
    wclk = 0;

    ram_ir(I_PRELOAD);
    jr.shift_dr(72, 256'(word(32'hF656_ACAD, 0, 2, 0, 1)), so);
    n_preload++;
    ram_ir(I_INTEST);
    n_intest++;
    for (int a = 0; a < 8; a++) begin
      mem[a] = $urandom;
      jr.shift_dr(72, 256'(word(mem[a], 3'(a), 0, 1, 0)), so);
      jr.shift_dr(72, 256'(word(mem[a], 3'(a), 0, 1, 1)), so);
      jr.shift_dr(72, 256'(word(mem[a], 3'(a), 0, 0, 0)), so);
    end
    for (int a = 0; a < 8; a++) begin
      jr.shift_dr(72, 256'(word('0, 0, 3'(a), 0, 0)), so);
      jr.shift_dr(72, 256'(word('0, 0, 3'(a), 0, 0)), so);
      check(so[31:0] == mem[a], "test chip INTEST write and read back");
    end

    ram_ir(I_PRELOAD);
    jr.shift_dr(72, 256'(word('0, 0, 0, 0, 0)) | 256'h0BAD_F00D, so, 30);
    n_preload++;
    ram_ir(I_EXTEST);
    check(dout == 32'h0BAD_F00D, "test chip EXTEST drives the output pins");
    n_extest++;

    ram_ir(I_BYPASS);
    ra = 3'd4; #1;
    check(dout == mem[4], "test chip memory readable at its pins");

    // ---------------- coverage of the mechanisms ----------------
    check(jc.n_trst > 0 && jr.n_trst > 0, "TRST used");
    check(jc.n_tms_reset > 0, "TMS reset used");
    check(jc.n_pause + jr.n_pause >= 2, "Pause-DR used");
    check(n_ircap > 0, "IR capture used");
    check(n_bypass > 0, "BYPASS used");
    check(n_idcode > 0, "IDCODE used");
    check(n_sample > 0, "SAMPLE used");
    check(n_preload > 0, "PRELOAD used");
    check(n_extest > 0, "EXTEST used");
    check(n_intest > 0, "INTEST used");
    foreach (n_scan[g]) check(n_scan[g] > 0, "debug scan used");
    foreach (n_strobe[g]) check(n_strobe[g] == n_scan[g], "one capture strobe to the core per debug scan");
    $display("mechanisms: ircap=%0d bypass=%0d idcode=%0d sample=%0d preload=%0d extest=%0d intest=%0d scans=%0d/%0d/%0d/%0d pause=%0d tck=%0d",
             n_ircap, n_bypass, n_idcode, n_sample, n_preload, n_extest, n_intest,
             n_scan[0], n_scan[1], n_scan[2], n_scan[3], jc.n_pause + jr.n_pause, jc.n_tck + jr.n_tck);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
