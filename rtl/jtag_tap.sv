// jtag_tap: a complete IEEE 1149.1 test access port wrapped around a core.
//
// It joins the TAP controller, the instruction register and its decoder, the bypass and
// identification registers, the boundary-scan register around the core's N_IN inputs and
// N_OUT outputs, up to four design-specific debug capture registers, and the TDO
// multiplexers. The core itself stays outside: core_in_o goes to its inputs, core_out_i
// comes from its outputs, and cap_data_i carries the internal registers the debug
// instructions observe, one group per capture register (group g is selected by the g-th
// debug scan instruction: tram_Addressable, tram_Bank, deb_ca, deb_b in that order).
// dbg_capture_o[g] is high for the TCK cycle in which group g is being captured, the
// link from the TAP controller back to the processor; the core may use it to hold the
// group steady for that cycle.
//
// Timing: everything runs on TCK. TMS and TDI are sampled on the rising edge; instruction,
// boundary update stages and TDO change on the falling edge. TRST_N is an asynchronous,
// active-low reset; after it the instruction is IDCODE. The set of blocks and the way they
// connect follow the design's block diagrams; widths, opcodes and the default sizes of
// the processor's pin and register groups are this design's own choices.
module jtag_tap
  import jtag_pkg::*;
#(
  parameter int unsigned N_IN   = 32,            // device inputs under boundary scan
  parameter int unsigned N_OUT  = 32,            // device outputs under boundary scan
  parameter int unsigned N_CAP  = 4,             // debug capture registers (0..4)
  parameter int unsigned CAP_W  = 128,           // width of each debug capture register
  parameter logic [31:0] IDCODE = 32'h1000_0001
) (
  input  logic                                       tck_i,
  input  logic                                       tms_i,
  input  logic                                       tdi_i,
  input  logic                                       trst_n_i,
  output logic                                       tdo_o,
  output logic                                       tdo_oe_o,
  input  logic [N_IN-1:0]                            pin_in_i,
  output logic [N_IN-1:0]                            core_in_o,
  input  logic [N_OUT-1:0]                           core_out_i,
  output logic [N_OUT-1:0]                           pin_out_o,
  input  logic [(N_CAP > 0 ? N_CAP : 1)-1:0][CAP_W-1:0] cap_data_i,
  output logic [MAX_CAP-1:0]                         dbg_capture_o,
  output tap_state_e                                 state_o,
  output logic [IR_W-1:0]                            instr_o
);

  tap_ctrl_t          ctrl;
  dec_t               dec;
  logic               ir_so, bypass_so, idcode_so, bsr_so;
  logic [MAX_CAP-1:0] cap_so;

  jtag_tap_fsm u_fsm (
    .tck_i    (tck_i),
    .tms_i    (tms_i),
    .trst_n_i (trst_n_i),
    .state_o  (state_o),
    .ctrl_o   (ctrl)
  );

  jtag_ir u_ir (
    .tck_i    (tck_i),
    .trst_n_i (trst_n_i),
    .tdi_i    (tdi_i),
    .ctrl_i   (ctrl),
    .instr_o  (instr_o),
    .ir_so_o  (ir_so)
  );

  jtag_ir_decoder #(.N_CAP(N_CAP)) u_dec (
    .instr_i (instr_o),
    .dec_o   (dec)
  );

  jtag_bypass_reg u_bypass (
    .tck_i    (tck_i),
    .trst_n_i (trst_n_i),
    .tdi_i    (tdi_i),
    .ctrl_i   (ctrl),
    .sel_i    (dec.dr_sel == DR_BYPASS),
    .so_o     (bypass_so)
  );

  jtag_idcode_reg #(.IDCODE(IDCODE)) u_idcode (
    .tck_i    (tck_i),
    .trst_n_i (trst_n_i),
    .tdi_i    (tdi_i),
    .ctrl_i   (ctrl),
    .sel_i    (dec.dr_sel == DR_IDCODE),
    .so_o     (idcode_so)
  );

  jtag_bsr #(.N_IN(N_IN), .N_OUT(N_OUT)) u_bsr (
    .tck_i              (tck_i),
    .trst_n_i           (trst_n_i),
    .tdi_i              (tdi_i),
    .ctrl_i             (ctrl),
    .sel_i              (dec.dr_sel == DR_BSR),
    .core_in_from_bsr_i (dec.core_in_from_bsr),
    .pin_out_from_bsr_i (dec.pin_out_from_bsr),
    .pin_in_i           (pin_in_i),
    .core_in_o          (core_in_o),
    .core_out_i         (core_out_i),
    .pin_out_o          (pin_out_o),
    .so_o               (bsr_so)
  );

  for (genvar g = 0; g < MAX_CAP; g++) begin : g_cap
    assign dbg_capture_o[g] = ctrl.capture_dr && (dec.dr_sel == dr_sel_e'(3'(int'(DR_CAP0) + g)));
    if (g < N_CAP) begin : g_on
      jtag_capture_reg #(.WIDTH(CAP_W)) u_cap (
        .tck_i    (tck_i),
        .trst_n_i (trst_n_i),
        .tdi_i    (tdi_i),
        .ctrl_i   (ctrl),
        .sel_i    (dec.dr_sel == dr_sel_e'(3'(int'(DR_CAP0) + g))),
        .data_i   (cap_data_i[g]),
        .so_o     (cap_so[g])
      );
    end else begin : g_off
      // Not built; the decoder never selects it.
      assign cap_so[g] = 1'b0;
    end
  end

  jtag_tdo_mux u_tdo (
    .tck_i       (tck_i),
    .trst_n_i    (trst_n_i),
    .state_i     (state_o),
    .dr_sel_i    (dec.dr_sel),
    .ir_so_i     (ir_so),
    .bypass_so_i (bypass_so),
    .idcode_so_i (idcode_so),
    .bsr_so_i    (bsr_so),
    .cap_so_i    (cap_so),
    .tdo_o       (tdo_o),
    .tdo_oe_o    (tdo_oe_o)
  );

endmodule
