// tspc_dff: positive-edge D flip-flop with true and inverted outputs.
//
// This is the logic function of the true-single-phase-clock (TSPC) D
// flip-flop that every storage element of the pre-scaler uses. In silicon the
// cell is the 10-transistor split-path TSPC flip-flop (one transistor fewer
// than the 11-transistor regular TSPC cell) fed from the clock-gated adaptive
// supply; both cells sample D on the rising clock edge and drive Q and its
// complement, which is all that matters at the logic level. The split-path
// and regular cells therefore share this one model.
//
// Interface: clk, d in; q, qb out. qb is always the complement of q.
// Timing: q takes d on each rising edge of clk.
// rst_n is an asynchronous active-low reset to q = 0. It is a choice of this
// design, made so that simulation starts from a known phase; the transistor
// cell has no reset and a user who does not need one ties rst_n high.
module tspc_dff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q,
  output logic qb
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

  assign qb = ~q;

endmodule
