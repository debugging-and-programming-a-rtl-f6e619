// jtag_drv_if: a JTAG tester for simulation, the behaviour of the debug adapter that drives
// TCK, TMS and TDI of a test access port and reads its TDO.
//
// TCK has a period of 2*HALF time units. Each call of clk() drives TMS and TDI while TCK
// is low, samples TDO just before the rising edge and lowers TCK again after HALF, so TDO
// (which the port changes on the falling edge) is read in the middle of its bit. The
// scan tasks start and end in Run-Test/Idle and shift words least significant bit first.
// Counters record how often each TAP action was driven, for the end-to-end tests.
interface jtag_drv_if #(
  parameter int unsigned MAXW = 256,
  parameter int unsigned HALF = 5
);
  logic tck    = 1'b0;
  logic tms    = 1'b1;
  logic tdi    = 1'b0;
  logic trst_n = 1'b1;
  logic tdo;
  logic tdo_oe;

  int unsigned n_tck        = 0;
  int unsigned n_pause      = 0;
  int unsigned n_tms_reset  = 0;
  int unsigned n_trst       = 0;

  task automatic clk(input logic tms_v, input logic tdi_v, output logic tdo_v);
    tms = tms_v;
    tdi = tdi_v;
    #HALF;
    tdo_v = tdo;
    tck = 1'b1;
    n_tck++;
    #HALF;
    tck = 1'b0;
  endtask

  task automatic step(input logic tms_v);
    logic unused;
    clk(tms_v, 1'b0, unused);
  endtask

  // Asynchronous reset through TRST_N, then to Run-Test/Idle.
  task automatic trst();
    trst_n = 1'b0;
    #(4*HALF);
    trst_n = 1'b1;
    #HALF;
    n_trst++;
    step(1'b0);
  endtask

  // Five TCK cycles with TMS high reach Test-Logic-Reset from any state; then Idle.
  task automatic tms_reset();
    repeat (5) step(1'b1);
    n_tms_reset++;
    step(1'b0);
  endtask

  // Shift the n low bits of din through the selected path; dout gets what came out.
  // pause_at > 0 visits Pause (Exit1, Pause twice, Exit2) after that many bits.
  task automatic shift(input bit ir, input int n, input logic [MAXW-1:0] din,
                       output logic [MAXW-1:0] dout, input int pause_at = 0);
    logic b;
    dout = '0;
    step(1'b1);                      // Select-DR-Scan
    if (ir) step(1'b1);              // Select-IR-Scan
    step(1'b0);                      // Capture
    step(1'b0);                      // Shift
    for (int i = 0; i < n; i++) begin
      clk((i == n-1) || (pause_at > 0 && i == pause_at-1), din[i], b);
      dout[i] = b;
      if (pause_at > 0 && i == pause_at-1 && i != n-1) begin
        step(1'b0);                  // Pause
        step(1'b0);                  // stay in Pause
        step(1'b1);                  // Exit2
        step(1'b0);                  // back to Shift
        n_pause++;
      end
    end
    step(1'b1);                      // Update
    step(1'b0);                      // Run-Test/Idle
  endtask

  task automatic shift_ir(input int n, input logic [MAXW-1:0] din, output logic [MAXW-1:0] dout);
    shift(1'b1, n, din, dout);
  endtask

  task automatic shift_dr(input int n, input logic [MAXW-1:0] din, output logic [MAXW-1:0] dout,
                          input int pause_at = 0);
    shift(1'b0, n, din, dout, pause_at);
  endtask

endinterface
