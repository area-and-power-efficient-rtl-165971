// ripple_div16: chain of asynchronous divide-by-2 stages (D-FF3..D-FF6 of
// the 32/33 pre-scaler), dividing the 2/3 pre-scaler output by 16.
//
// Each stage is a D flip-flop whose D is its own inverted output, so it
// toggles on every rising clock edge. The first stage is clocked by clk_in,
// every later stage by the inverted output of the stage before it. Read as
// a number q[DIV_STAGES-1:0], the chain counts up by one on every rising
// edge of clk_in and wraps after 2**DIV_STAGES edges; q[DIV_STAGES-1] is a
// square wave at clk_in / 2**DIV_STAGES.
// The document states the flip-flop count and the overall ratio; clocking
// each stage from the previous stage's inverted output (a ripple counter)
// is this design's choice.
//
// Interface: clk_in, rst_n (async, active low, clears the count); q and qb
// are the true and inverted outputs of every stage, index 0 first.
// Timing: the count settles a ripple delay after each rising clk_in edge.
// Every stage is clocked by a signal derived from the previous stage; this
// is the intended ripple structure, not a gated clock.
module ripple_div16 #(
  parameter int unsigned DIV_STAGES = 4
) (
  input  logic                  clk_in,
  input  logic                  rst_n,
  output logic [DIV_STAGES-1:0] q,
  output logic [DIV_STAGES-1:0] qb
);

  logic [DIV_STAGES-1:0] stage_clk;

  assign stage_clk[0] = clk_in;

  for (genvar i = 0; i < DIV_STAGES; i++) begin : g_stage
    if (i > 0) begin : g_clk
      assign stage_clk[i] = qb[i-1];
    end
    tspc_dff u_dff (
      .clk  (stage_clk[i]),
      .rst_n(rst_n),
      .d    (qb[i]),
      .q    (q[i]),
      .qb   (qb[i])
    );
  end

endmodule
