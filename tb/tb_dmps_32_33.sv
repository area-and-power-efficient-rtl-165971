// tb_dmps_32_33: end-to-end self-checking test of the 32/33 dual-modulus
// pre-scaler at its default size (no parameter overrides).
//
// A free-running input clock drives the pre-scaler. The testbench counts
// input cycles between rising edges of fout and the cycles fout is high.
// Expected values come from the ratio formula of the package
// (2 * 2**stages, plus one in /33 mode), not from the RTL:
//   phase 1: mode /32 held, every period 32 cycles, 16 high
//   phase 2: mode /33 held, every period 33 cycles, 16 high
//   phase 3: mode chosen at random right after each fout rising edge; the
//            period that follows must match that mode
//   phase 4: mode flipped at random input cycles; every period must be 32
//            or 33 cycles, with one swallow per extra cycle
// It also counts how often each mechanism happened: /32 periods, /33
// periods, mode switches, and 2/3 cycles stretched to three input cycles
// (the swallow), which must occur exactly once per /33 period and never in
// /32 mode. A mechanism that never happened counts as a failure.
module tb_dmps_32_33;

  import dmps_pkg::*;

  logic       fin = 1'b0;
  logic       rst_n = 1'b1;
  dmps_mode_e mode = MODE_DIV32;
  logic       fout;

  int checks = 0;
  int failures = 0;
  int n_div32 = 0;
  int n_div33 = 0;
  int n_switch = 0;
  int n_swallow = 0;
  int swallow_in_period = 0;

  dmps_32_33 dut (.fin(fin), .rst_n(rst_n), .mc(mode), .fout(fout));

  always #5 fin = ~fin;

  // Swallow monitor: a 2/3 output period of three input cycles. Measured on
  // the internal 2/3 output, independently of the control that causes it.
  int   c23 = 0;
  logic fo23_prev = 1'b0;
  always @(posedge fin) begin
    #1;
    c23++;
    if (dut.fo23 && !fo23_prev) begin
      if (c23 == 3) begin
        n_swallow++;
        swallow_in_period++;
      end
      c23 = 0;
    end
    fo23_prev = dut.fo23;
  end

  task automatic check_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Wait for the next rising edge of fout (sampled 1 time unit after each
  // input edge); return the input cycles taken and how many fout was high.
  logic fout_prev = 1'b0;
  task automatic next_period(output int cyc, output int high);
    cyc = 0;
    high = 0;
    forever begin
      @(posedge fin);
      #2;
      cyc++;
      if (fout) high++;
      if (fout && !fout_prev) begin
        fout_prev = fout;
        break;
      end
      fout_prev = fout;
      if (cyc > 100) break;
    end
  endtask

  task automatic run(input int periods, input bit random_mode, input dmps_mode_e fixed);
    int cyc, high;
    dmps_mode_e prev;
    for (int i = 0; i < periods; i++) begin
      prev = mode;
      mode = random_mode ? dmps_mode_e'($urandom_range(0, 1)) : fixed;
      if (mode != prev) n_switch++;
      swallow_in_period = 0;
      next_period(cyc, high);
      check_eq(cyc, int'(div_ratio(DEFAULT_DIV_STAGES, mode)), "output period");
      check_eq(high, 1 << DEFAULT_DIV_STAGES, "output high time");
      check_eq(swallow_in_period, (mode == MODE_DIV33) ? 1 : 0, "swallows per period");
      if (mode == MODE_DIV32) n_div32++;
      else                    n_div33++;
    end
  endtask

  // Phase 4: the mode changes at random input cycles, unrelated to the
  // output. Every period must still be 32 or 33 cycles long, with one
  // swallow for each cycle above 32.
  logic async_on = 1'b0;
  always @(negedge fin) begin
    if (async_on && $urandom_range(0, 19) == 0) begin
      mode = dmps_mode_e'(~mode);
      n_switch++;
    end
  end

  task automatic run_async(input int periods);
    int cyc, high;
    async_on = 1'b1;
    for (int i = 0; i < periods; i++) begin
      swallow_in_period = 0;
      next_period(cyc, high);
      checks++;
      if (cyc != 32 && cyc != 33) begin
        failures++;
        $display("FAIL period %0d with random-time mode changes", cyc);
      end
      check_eq(high, 1 << DEFAULT_DIV_STAGES, "output high time (async mode)");
      check_eq(swallow_in_period, cyc - 32, "swallows per period (async mode)");
      if (cyc == 32) n_div32++;
      else           n_div33++;
    end
    async_on = 1'b0;
  endtask

  initial begin
    int cyc, high;
    #1 rst_n = 1'b0;
    #20;
    checks++;
    if (fout !== 1'b0) begin
      failures++;
      $display("FAIL fout not cleared by reset");
    end
    @(negedge fin);
    rst_n = 1'b1;
    // first rising edge: the 2/3 stage rises on the first input edge and
    // fout on its 8th rising edge, 1 + 7 * 2 input cycles after reset
    next_period(cyc, high);
    check_eq(cyc, 15, "first edge after reset");
    run(40, 1'b0, MODE_DIV32);
    run(40, 1'b0, MODE_DIV33);
    run(400, 1'b1, MODE_DIV32);
    run_async(200);

    $display("mechanisms: div32=%0d div33=%0d switches=%0d swallows=%0d",
             n_div32, n_div33, n_switch, n_swallow);
    checks++;
    if (n_div32 == 0 || n_div33 == 0 || n_switch == 0 || n_swallow == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    check_eq(n_swallow, n_div33, "total swallows equal /33 periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (80000) @(posedge fin);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
