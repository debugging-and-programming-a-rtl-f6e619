// jtag_bsr: the boundary-scan register, a chain of boundary-scan cells around the core.
//
// There is one cell per device input (between the input pin and the core) and one per
// device output (between the core and the output pin). The serial path runs from TDI
// through the input cells and then through the output cells to TDO. Chain position 0 is
// the cell next to TDO: positions 0..N_OUT-1 are the output cells (position j serves
// core_out_i[j]) and positions N_OUT..N_OUT+N_IN-1 the input cells (position N_OUT+k serves
// pin_in_i[k]). A word shifted in least significant bit first therefore ends up with its
// bit j in position j: the first N_OUT bits land in the output cells, the next N_IN bits
// in the input cells.
//
// The cells capture, shift and update only when the decoder selects this register
// (EXTEST, INTEST, SAMPLE, PRELOAD). core_in_from_bsr_i makes the input cells drive the
// core (INTEST); pin_out_from_bsr_i makes the output cells drive the pins (EXTEST).
// The order inputs-then-outputs along the chain follows the block diagram of the design;
// the numbering is this design's own choice.
module jtag_bsr
  import jtag_pkg::*;
#(
  parameter int unsigned N_IN  = 40,
  parameter int unsigned N_OUT = 32
) (
  input  logic             tck_i,
  input  logic             trst_n_i,
  input  logic             tdi_i,
  input  tap_ctrl_t        ctrl_i,
  input  logic             sel_i,
  input  logic             core_in_from_bsr_i,
  input  logic             pin_out_from_bsr_i,
  input  logic [N_IN-1:0]  pin_in_i,
  output logic [N_IN-1:0]  core_in_o,
  input  logic [N_OUT-1:0] core_out_i,
  output logic [N_OUT-1:0] pin_out_o,
  output logic             so_o
);

  localparam int unsigned N = N_IN + N_OUT;

  logic [N-1:0] pi, po, mode;
  logic [N:0]   chain;   // chain[j] is the serial input of cell j; chain[N] is TDI

  assign pi    = {pin_in_i, core_out_i};
  assign mode  = {{N_IN{core_in_from_bsr_i}}, {N_OUT{pin_out_from_bsr_i}}};
  assign chain[N] = tdi_i;

  for (genvar j = 0; j < N; j++) begin : g_cell
    jtag_bsc u_cell (
      .tck_i     (tck_i),
      .trst_n_i  (trst_n_i),
      .capture_i (sel_i & ctrl_i.capture_dr),
      .shift_i   (sel_i & ctrl_i.shift_dr),
      .update_i  (sel_i & ctrl_i.update_dr),
      .mode_i    (mode[j]),
      .pi_i      (pi[j]),
      .si_i      (chain[j+1]),
      .so_o      (chain[j]),
      .po_o      (po[j])
    );
  end

  assign pin_out_o = po[N_OUT-1:0];
  assign core_in_o = po[N-1:N_OUT];
  assign so_o      = chain[0];

endmodule
