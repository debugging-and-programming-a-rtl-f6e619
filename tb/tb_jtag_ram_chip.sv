// tb_jtag_ram_chip: runs the JTAG test chip (8 x 32-bit memory in its test access port)
// through its JTAG pins. It reads IDCODE, passes data through BYPASS, samples the pins,
// preloads the 40-bit input vector used to exercise this chip and applies it to the
// memory with INTEST (checking that it reaches the memory inputs), writes and reads back
// all eight words through the scan chain alone, drives the output pins with EXTEST, and
// finally uses the memory through its pins in normal mode.
module tb_jtag_ram_chip;
  import jtag_pkg::*;

  localparam logic [31:0] ID = 32'h1000_2001;
  // The input vector, one character per input cell, in the order the bits enter TDI:
  // ram_dataInput_i[31..0], ram_writeAddress_i[2..0], ram_readAddress_i[2..0],
  // ram_writeEnable_i, ram_writeClock_i.
  localparam string VEC = {"11110110010101101010110010101101", "000", "010", "0", "1"};

  jtag_drv_if #(.MAXW(128)) j ();

  logic [31:0] din = '0, dout;
  logic [2:0]  wa = '0, ra = '0;
  logic        we = 0, wclk = 0;
  tap_state_e  state;
  logic [IR_W-1:0] instr;
  int checks = 0, failures = 0;

  jtag_ram_chip #(.IDCODE(ID)) dut (
    .tck_i(j.tck), .tms_i(j.tms), .tdi_i(j.tdi), .trst_n_i(j.trst_n), .tdo_o(j.tdo), .tdo_oe_o(j.tdo_oe),
    .ram_dataInput_i(din), .ram_writeAddress_i(wa), .ram_readAddress_i(ra),
    .ram_writeEnable_i(we), .ram_writeClock_i(wclk), .ram_dataOutput_o(dout),
    .state_o(state), .instr_o(instr));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  logic [127:0] so;

  task automatic load_ir(logic [IR_W-1:0] op);
    j.shift_ir(IR_W, 128'(op), so);
    check(so[1:0] == 2'b01, "IR capture pattern");
  endtask

  // 72-bit scan word: output cells in bits 0..31, input cells (TDO side first) above.
  function automatic logic [71:0] word(logic [31:0] d, logic [2:0] a_w, logic [2:0] a_r,
                                       logic en, logic clk, logic [31:0] outs);
    logic [39:0] ins;
    for (int i = 0; i < 32; i++) ins[i] = d[31-i];
    for (int i = 0; i < 3; i++)  ins[32+i] = a_w[2-i];
    for (int i = 0; i < 3; i++)  ins[35+i] = a_r[2-i];
    ins[38] = en;
    ins[39] = clk;
    return {ins, outs};
  endfunction

  // Write one word using only the scan chain (INTEST must be loaded).
  task automatic scan_write(logic [2:0] a, logic [31:0] d);
    j.shift_dr(72, 128'(word(d, a, 3'd0, 1'b1, 1'b0, '0)), so);
    j.shift_dr(72, 128'(word(d, a, 3'd0, 1'b1, 1'b1, '0)), so);   // write clock rises
    j.shift_dr(72, 128'(word(d, a, 3'd0, 1'b0, 1'b0, '0)), so);
  endtask

  // Read one word using only the scan chain: set the read address, then capture.
  task automatic scan_read(logic [2:0] a, output logic [31:0] d);
    j.shift_dr(72, 128'(word('0, 3'd0, a, 1'b0, 1'b0, '0)), so);
    j.shift_dr(72, 128'(word('0, 3'd0, a, 1'b0, 1'b0, '0)), so);
    d = so[31:0];
  endtask

  // state trace, repeats collapsed, recorded while 'tracing' is set
  bit tracing = 0;
  tap_state_e trace [$];
  always @(negedge j.tck)
    if (tracing && (trace.size() == 0 || trace[$] != state)) trace.push_back(state);

  // the state sequence of loading BYPASS and making one data scan
  localparam tap_state_e BYPASS_SEQ [14] = '{RUN_TEST_IDLE, SELECT_DR_SCAN, SELECT_IR_SCAN,
      CAPTURE_IR, SHIFT_IR, EXIT1_IR, UPDATE_IR, RUN_TEST_IDLE, SELECT_DR_SCAN, CAPTURE_DR,
      SHIFT_DR, EXIT1_DR, UPDATE_DR, RUN_TEST_IDLE};

  logic [39:0] v;
  logic [31:0] mem [8];
  logic [31:0] rd;

  initial begin
    for (int k = 0; k < 40; k++) v[k] = (VEC[k] == "1");
    j.trst();
    check(instr == I_IDCODE, "IDCODE after reset");
    j.shift_dr(32, '0, so);
    check(so[31:0] == ID, "IDCODE read");

    tracing = 1;
    load_ir(I_BYPASS);
    j.shift_dr(16, 128'h5A3C, so);
    #1 tracing = 0;
    check(so[15:1] == 15'h5A3C && so[0] == 1'b0, "BYPASS");
    check(trace.size() == 14, "BYPASS state sequence length");
    foreach (BYPASS_SEQ[i]) check(i < trace.size() && trace[i] == BYPASS_SEQ[i], "BYPASS state sequence");

    // SAMPLE the pins carrying the vector
    load_ir(I_SAMPLE);
    din = 32'hF656_ACAD; wa = 3'd0; ra = 3'd2; we = 1'b0; wclk = 1'b1;
    j.shift_dr(72, '0, so);
    check(so[71:32] == v, "SAMPLE captures the input vector in chain order");
    check(so[31:0] == dout, "SAMPLE captures the memory output");
    din = '0; ra = '0; wclk = 0;

    // put a known word at address 2 through the pins (normal operation under SAMPLE)
    din = 32'h2222_7777; wa = 3'd2; we = 1; #5 wclk = 1; #5 wclk = 0; we = 0; din = '0; wa = '0;

    // PRELOAD the vector and apply it to the memory with INTEST
    load_ir(I_PRELOAD);
    j.shift_dr(72, 128'({v, 32'h0}), so);
    load_ir(I_INTEST);
    // the vector's read address (2) is at the memory: the output cells capture word 2
    j.shift_dr(72, 128'({v, 32'h0}), so);
    check(so[31:0] == 32'h2222_7777, "vector read address reaches the memory");
    // the same vector with the write enable set and a fresh rising write clock writes
    // its data word at its write address (0)
    j.shift_dr(72, 128'(word(32'hF656_ACAD, 3'd0, 3'd0, 1'b1, 1'b0, '0)), so);
    j.shift_dr(72, 128'(word(32'hF656_ACAD, 3'd0, 3'd0, 1'b1, 1'b1, '0)), so);
    scan_read(3'd0, rd);
    check(rd == 32'hF656_ACAD, "vector data word reaches the memory");
    scan_read(3'd2, rd);
    check(rd == 32'h2222_7777, "write enable low in the vector: word 2 untouched");

    // write and read back all eight words through the scan chain alone
    for (int a = 0; a < 8; a++) begin
      mem[a] = $urandom;
      scan_write(3'(a), mem[a]);
    end
    for (int a = 7; a >= 0; a--) begin
      scan_read(3'(a), rd);
      check(rd == mem[a], "INTEST write and read back");
    end
    // pins must not affect the memory under INTEST
    we = 1; wclk = 1; #20; wclk = 0; we = 0;
    scan_read(3'd0, rd);
    check(rd == mem[0], "pins isolated from the core under INTEST");

    // EXTEST: the output pins show the preloaded pattern
    load_ir(I_PRELOAD);
    j.shift_dr(72, 128'(word('0, '0, '0, 0, 0, 32'hCAFE_0042)), so);
    load_ir(I_EXTEST);
    check(dout == 32'hCAFE_0042, "EXTEST drives the output pins");
    din = 32'h1357_9BDF; wa = 3'd5;
    j.shift_dr(72, '0, so);
    check(so[71:32] == word(32'h1357_9BDF, 3'd5, 3'd0, 0, 0, '0) >> 32, "EXTEST captures the input pins");

    // normal operation through the pins
    load_ir(I_BYPASS);
    din = 32'hA5A5_0F0F; wa = 3'd3; we = 1; #5 wclk = 1; #5 wclk = 0; we = 0;
    ra = 3'd3; #1;
    check(dout == 32'hA5A5_0F0F, "memory works through its pins in BYPASS");
    ra = 3'd6; #1;
    check(dout == mem[6], "earlier scan write visible at the pins");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
