// tb_prescaler_2_3: self-checking test of the divide-by-2/3 pre-scaler.
//
// Counts input clock cycles between rising edges of the output. The control
// is chosen at random right after each output rising edge (where the chain
// of the full pre-scaler changes it), held for that output period, and the
// period must be 2 input cycles for control high and 3 for control low.
// The first phase runs without reset from whatever state the flip-flops
// start in (including the unused one) and must lock within a few cycles.
module tb_prescaler_2_3;

  logic fin = 1'b0;
  logic rst_n = 1'b1;
  logic mc23 = 1'b1;
  logic fo;
  logic fo_prev;
  int   checks = 0;
  int   failures = 0;
  int   cyc;
  int   n_div2 = 0;
  int   n_div3 = 0;
  logic mode_now;

  prescaler_2_3 dut (.fin(fin), .rst_n(rst_n), .mc23(mc23), .fo(fo));

  always #5 fin = ~fin;

  // wait for the next rising edge of fo, return the input cycles it took
  task automatic next_rise(output int n);
    n = 0;
    forever begin
      @(posedge fin);
      #1;
      n++;
      if (fo && !fo_prev) begin
        fo_prev = fo;
        break;
      end
      fo_prev = fo;
      if (n > 10) break;
    end
  endtask

  task automatic run_periods(input int count, input bit random_mode, input logic fixed);
    for (int i = 0; i < count; i++) begin
      mode_now = random_mode ? 1'($urandom_range(0, 1)) : fixed;
      mc23 = mode_now;
      next_rise(cyc);
      checks++;
      if (cyc != (mode_now ? 2 : 3)) begin
        failures++;
        $display("FAIL period %0d with mc23=%0b, expected %0d", cyc, mode_now,
                 mode_now ? 2 : 3);
      end
      if (mode_now) n_div2++;
      else          n_div3++;
    end
  endtask

  initial begin
    // start-up without reset: lock onto the first rising edge
    fo_prev = 1'b1;
    mc23 = 1'b0;
    next_rise(cyc);
    checks++;
    if (cyc > 4) begin
      failures++;
      $display("FAIL no output edge %0d cycles after start without reset", cyc);
    end
    run_periods(20, 1'b0, 1'b0);
    run_periods(20, 1'b0, 1'b1);
    // reset, then random ratio per period
    @(negedge fin);
    rst_n = 1'b0;
    #1;
    checks++;
    if (fo !== 1'b0) begin
      failures++;
      $display("FAIL fo not cleared by reset");
    end
    @(negedge fin);
    rst_n = 1'b1;
    fo_prev = 1'b1;
    next_rise(cyc);
    run_periods(300, 1'b1, 1'b0);
    checks++;
    if (n_div2 < 50 || n_div3 < 50) begin
      failures++;
      $display("FAIL modes not exercised: /2 %0d times, /3 %0d times", n_div2, n_div3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge fin);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
