// jtag_bsc: one boundary-scan cell, placed between a device pin and the core.
//
// A capture/shift flip-flop and an update flip-flop. In Capture-DR the first loads the
// parallel input (the pin for an input cell, the core output for an output cell); in
// Shift-DR it takes the serial input from its neighbour nearer TDI. On the falling edge of
// TCK in Update-DR the update flip-flop copies it. The parallel output is the update
// flip-flop when mode_i is set (the test instruction lets the register drive) and the
// parallel input otherwise, so the device works normally under SAMPLE, PRELOAD and BYPASS.
// This is the common capture/update cell of the standard; its exact cell type is this
// design's own choice.
//
// Interface: TCK, TRST_N, strobes gated by the register select, mode_i, pi_i/po_o
// (parallel), si_i/so_o (serial).
module jtag_bsc (
  input  logic tck_i,
  input  logic trst_n_i,
  input  logic capture_i,
  input  logic shift_i,
  input  logic update_i,
  input  logic mode_i,
  input  logic pi_i,
  input  logic si_i,
  output logic so_o,
  output logic po_o
);

  logic cap_q, upd_q;

  always_ff @(posedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i)      cap_q <= 1'b0;
    else if (capture_i) cap_q <= pi_i;
    else if (shift_i)   cap_q <= si_i;
  end

  always_ff @(negedge tck_i or negedge trst_n_i) begin
    if (!trst_n_i)     upd_q <= 1'b0;
    else if (update_i) upd_q <= cap_q;
  end

  assign so_o = cap_q;
  assign po_o = mode_i ? upd_q : pi_i;

endmodule
