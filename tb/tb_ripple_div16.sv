// tb_ripple_div16: self-checking test of the divide-by-2 chain.
//
// Clocks the chain from the testbench with an irregular clock (random high
// and low times) and checks after every rising edge that the stages, read
// as a number, equal the number of edges since reset modulo 16, that each
// qb is the complement of its q, and that the last stage completes one
// period every 16 input edges.
module tb_ripple_div16;

  localparam int unsigned STAGES = 4;

  logic              clk_in = 1'b0;
  logic              rst_n = 1'b1;
  logic [STAGES-1:0] q, qb;
  int                checks = 0;
  int                failures = 0;
  int unsigned       edges = 0;
  int unsigned       last_rise = 0;
  int unsigned       out_periods = 0;
  logic              top_prev = 1'b0;

  ripple_div16 #(.DIV_STAGES(STAGES)) dut (.clk_in(clk_in), .rst_n(rst_n), .q(q), .qb(qb));

  initial begin
    #1 rst_n = 1'b0;
    #3;
    checks++;
    if (q !== '0) begin
      failures++;
      $display("FAIL reset did not clear the chain: %b", q);
    end
    rst_n = 1'b1;
    #3;
    for (int i = 0; i < 500; i++) begin
      #($urandom_range(2, 9)) clk_in = 1'b1;
      edges++;
      #1;
      checks++;
      if (q !== STAGES'(edges % (1 << STAGES)) || qb !== ~q) begin
        failures++;
        $display("FAIL after %0d edges: q=%b qb=%b", edges, q, qb);
      end
      if (q[STAGES-1] && !top_prev) begin
        if (last_rise != 0) begin
          checks++;
          if (edges - last_rise != (1 << STAGES)) begin
            failures++;
            $display("FAIL output period %0d edges", edges - last_rise);
          end
          out_periods++;
        end
        last_rise = edges;
      end
      top_prev = q[STAGES-1];
      #($urandom_range(2, 9)) clk_in = 1'b0;
    end
    checks++;
    if (out_periods < 20) begin
      failures++;
      $display("FAIL only %0d output periods seen", out_periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
