// tb_jtag_tap_fsm: checks the TAP controller against a table of the standard's state
// diagram under random TMS, the five-TMS-high reset from every state, and TRST_N.
module tb_jtag_tap_fsm;
  import jtag_pkg::*;

  logic tck = 0, tms = 1, trst_n = 1;
  tap_state_e state;
  tap_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  jtag_tap_fsm dut (.tck_i(tck), .tms_i(tms), .trst_n_i(trst_n), .state_o(state), .ctrl_o(ctrl));

  always #5 tck = ~tck;

  // next[state][tms], written as the pair of successors of each state
  function automatic tap_state_e ref_next(tap_state_e s, logic t);
    tap_state_e n0, n1;
    case (s)
      TEST_LOGIC_RESET: begin n0 = RUN_TEST_IDLE;  n1 = TEST_LOGIC_RESET; end
      RUN_TEST_IDLE:    begin n0 = RUN_TEST_IDLE;  n1 = SELECT_DR_SCAN;   end
      SELECT_DR_SCAN:   begin n0 = CAPTURE_DR;     n1 = SELECT_IR_SCAN;   end
      CAPTURE_DR:       begin n0 = SHIFT_DR;       n1 = EXIT1_DR;         end
      SHIFT_DR:         begin n0 = SHIFT_DR;       n1 = EXIT1_DR;         end
      EXIT1_DR:         begin n0 = PAUSE_DR;       n1 = UPDATE_DR;        end
      PAUSE_DR:         begin n0 = PAUSE_DR;       n1 = EXIT2_DR;         end
      EXIT2_DR:         begin n0 = SHIFT_DR;       n1 = UPDATE_DR;        end
      UPDATE_DR:        begin n0 = RUN_TEST_IDLE;  n1 = SELECT_DR_SCAN;   end
      SELECT_IR_SCAN:   begin n0 = CAPTURE_IR;     n1 = TEST_LOGIC_RESET; end
      CAPTURE_IR:       begin n0 = SHIFT_IR;       n1 = EXIT1_IR;         end
      SHIFT_IR:         begin n0 = SHIFT_IR;       n1 = EXIT1_IR;         end
      EXIT1_IR:         begin n0 = PAUSE_IR;       n1 = UPDATE_IR;        end
      PAUSE_IR:         begin n0 = PAUSE_IR;       n1 = EXIT2_IR;         end
      EXIT2_IR:         begin n0 = SHIFT_IR;       n1 = UPDATE_IR;        end
      default:          begin n0 = RUN_TEST_IDLE;  n1 = SELECT_DR_SCAN;   end // UPDATE_IR
    endcase
    return t ? n1 : n0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%s", what, $time, state.name());
    end
  endtask

  tap_state_e expected;
  bit seen [16];

  initial begin
    #1 trst_n = 0;
    #11 trst_n = 1;
    @(negedge tck);
    check(state == TEST_LOGIC_RESET && ctrl.reset, "after TRST");
    expected = TEST_LOGIC_RESET;
    for (int i = 0; i < 3000; i++) begin
      tms = ($urandom_range(0, 99) < 40);
      expected = ref_next(expected, tms);
      @(negedge tck);
      seen[state] = 1;
      check(state == expected, "transition");
      check(ctrl.capture_dr == (state == CAPTURE_DR) && ctrl.shift_dr == (state == SHIFT_DR) &&
            ctrl.update_dr == (state == UPDATE_DR) && ctrl.capture_ir == (state == CAPTURE_IR) &&
            ctrl.shift_ir == (state == SHIFT_IR) && ctrl.update_ir == (state == UPDATE_IR) &&
            ctrl.reset == (state == TEST_LOGIC_RESET), "strobes");
    end
    foreach (seen[s]) check(seen[s], "every state visited");
    // Five TMS-high cycles reach Test-Logic-Reset from every state.
    for (int s = 0; s < 16; s++) begin
      // walk to state s by random TMS until reached
      while (state != tap_state_e'(s)) begin
        tms = 1'($urandom_range(0, 1)); @(negedge tck);
      end
      tms = 1;
      repeat (5) @(negedge tck);
      check(state == TEST_LOGIC_RESET, "TMS-high reset");
    end
    // TRST_N acts asynchronously, between clock edges.
    tms = 0; repeat (3) @(negedge tck);
    #2 trst_n = 0; #1;
    check(state == TEST_LOGIC_RESET, "asynchronous TRST");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
