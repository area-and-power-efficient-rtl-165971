// tb_tspc_dff: self-checking test of the positive-edge D flip-flop.
//
// Drives random data, checks that q follows d only on rising clock edges
// (a reference copy is taken at each edge), that qb is always the
// complement of q, and that the asynchronous reset clears q at once, even
// between clock edges.
module tb_tspc_dff;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic d = 1'b0;
  logic q, qb;
  int   checks = 0;
  int   failures = 0;
  logic ref_q;

  tspc_dff dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q), .qb(qb));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    #1 rst_n = 1'b0;
    #1;
    check(q, 1'b0, "q in reset");
    check(qb, 1'b1, "qb in reset");
    #12 rst_n = 1'b1;
    ref_q = 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      check(q, ref_q, "q held between edges");
      d = 1'($urandom_range(0, 1));
      #2 check(q, ref_q, "q unchanged by d while clock low");
      @(posedge clk);
      ref_q = d;
      #1;
      check(q, ref_q, "q after rising edge");
      check(qb, ~ref_q, "qb complement");
      if (i == 200) begin
        // asynchronous reset in the middle of the high phase
        d = 1'b1;
        rst_n = 1'b0;
        #1 check(q, 1'b0, "async reset clears q");
        rst_n = 1'b1;
        ref_q = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
