// tb_mod_ctrl_logic: exhaustive self-checking test of the feedback gates.
//
// Walks every combination of mode control and chain state. The reference
// is the intended behaviour, written independently of the gate structure:
// the 2/3 pre-scaler is asked to divide by 3 (mc23 = 0) only in /33 mode
// and only when the chain is in its all-zero state.
module tb_mod_ctrl_logic;

  import dmps_pkg::*;

  localparam int unsigned STAGES = 4;

  logic              mc;
  logic [STAGES-1:0] state;
  logic              mc23;
  int                checks = 0;
  int                failures = 0;
  int                n_low = 0;
  logic              expected;

  mod_ctrl_logic #(.DIV_STAGES(STAGES)) dut (
    .mc  (mc),
    .qb0 (~state[0]),
    .q_hi(state[STAGES-1:1]),
    .mc23(mc23)
  );

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int s = 0; s < (1 << STAGES); s++) begin
        mc = 1'(m);
        state = STAGES'(s);
        #1;
        expected = !((dmps_mode_e'(mc) == MODE_DIV33) && (s == 0));
        checks++;
        if (mc23 !== expected) begin
          failures++;
          $display("FAIL mc=%0b state=%0d: mc23=%0b expected %0b", mc, s, mc23, expected);
        end
        if (!mc23) n_low++;
      end
    end
    checks++;
    if (n_low != 1) begin
      failures++;
      $display("FAIL mc23 low in %0d states, expected exactly 1", n_low);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
