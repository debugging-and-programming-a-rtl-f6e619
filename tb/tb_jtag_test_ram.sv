// tb_jtag_test_ram: writes random words at random addresses on the write clock, with and
// without the write enable, and checks the asynchronous read port against a model array.
module tb_jtag_test_ram;
  logic [31:0] din = '0, dout;
  logic [2:0]  wa = '0, ra = '0;
  logic        we = 0, wclk = 0;
  logic [31:0] model [8];
  int checks = 0, failures = 0;

  jtag_test_ram dut (.ram_dataInput_i(din), .ram_writeAddress_i(wa), .ram_readAddress_i(ra),
    .ram_writeEnable_i(we), .ram_writeClock_i(wclk), .ram_dataOutput_o(dout));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic write(logic [2:0] a, logic [31:0] d, logic en);
    wa = a; din = d; we = en; #1;
    wclk = 1; #1;
    wclk = 0; #1;
    if (en) model[a] = d;
  endtask

  initial begin
    for (int a = 0; a < 8; a++) write(3'(a), $urandom, 1'b1);
    for (int k = 0; k < 400; k++) begin
      write(3'($urandom), $urandom, 1'($urandom));
      ra = 3'($urandom); #1;
      check(dout == model[ra], "read matches");
    end
    // asynchronous read: the data follows the address without a clock
    for (int a = 0; a < 8; a++) begin
      ra = 3'(a); #1;
      check(dout == model[a], "asynchronous read");
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
