// prescaler_2_3: divide-by-2/3 pre-scaler, the only part of the 32/33
// pre-scaler that runs at the full input frequency.
//
// Two D flip-flops (D-FF1, D-FF2) clocked by the input and two NOR gates:
//   D1 = NOR(Q1, Q2)
//   D2 = NOR(QB1, mc23)          (= Q1 and not mc23)
// With mc23 high, D2 is held low, Q2 stays 0 and D-FF1 toggles: divide by 2.
// With mc23 low, D-FF2 copies Q1 and blocks D-FF1 for one extra cycle, so the
// state (Q1,Q2) walks 00 -> 10 -> 01 -> 00: divide by 3.
// The document gives only the function (a 2/3 unit of D-FFs and NAND/NOR
// gates whose control high means divide by 2); this two-NOR form is the
// usual TSPC 2/3 cell and is this design's choice.
//
// Interface: fin (clock), rst_n (async, active low), mc23 (1 = /2, 0 = /3),
// fo = Q1, one rising edge per output period.
// Timing: mc23 is looked at on the input edge that follows each rising edge
// of fo; it must be stable one input cycle after fo rises.
// Start-up: from the unused state 11 the cell falls into the cycle within
// one input period, so it needs no reset to run.
module prescaler_2_3 (
  input  logic fin,
  input  logic rst_n,
  input  logic mc23,
  output logic fo
);

  logic q1, qb1, q2;
  logic d1, d2;

  assign d1 = ~(q1 | q2);     // NOR gate ahead of D-FF1
  assign d2 = ~(qb1 | mc23);  // NOR gate ahead of D-FF2

  tspc_dff u_dff1 (.clk(fin), .rst_n(rst_n), .d(d1), .q(q1), .qb(qb1));
  tspc_dff u_dff2 (.clk(fin), .rst_n(rst_n), .d(d2), .q(q2), .qb());

  assign fo = q1;

endmodule
