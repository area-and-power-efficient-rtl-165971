// mod_ctrl_logic: feedback gates that select the ratio of the 2/3
// pre-scaler from the mode control and the state of the divide-by-2 chain.
//
// The 2/3 pre-scaler divides by 3 only while mc23 is low, and
//   mc23 = NAND2(NOR2(mc, upper), QB3),  upper = OR of Q4..Q6.
// With mc high NOR2 is low and NAND2 is forced high whatever QB3 holds, so
// every 2/3 cycle lasts two input cycles (divide by 32). With mc low, mc23
// goes low only while the chain is in its all-zero state, once in every
// 2**DIV_STAGES cycles of the 2/3 pre-scaler, which adds one input cycle
// per output period (divide by 33).
// NOR2, NAND2 and their roles follow the document; forming "upper" from Q4,
// Q5 and Q6 (NOR1 of Q5/Q6 and NAND1 with QB4 in the 4-stage case) is this
// design's choice of which chain state stretches the cycle. In silicon one
// NOR may be pass-transistor logic; the function is the same.
//
// Interface: mc (1 = /32, 0 = /33), qb0 = inverted output of the first
// chain stage (D-FF3), q_hi = true outputs of the later stages (D-FF4 up),
// mc23 to the 2/3 pre-scaler (1 = /2, 0 = /3). Purely combinational.
// DIV_STAGES must be at least 2.
module mod_ctrl_logic #(
  parameter int unsigned DIV_STAGES = 4
) (
  input  logic                  mc,
  input  logic                  qb0,
  input  logic [DIV_STAGES-1:1] q_hi,
  output logic                  mc23
);

  logic upper;  // some stage above D-FF3 is set (NOR1 + NAND1)
  logic nor2;

  assign upper = |q_hi;
  assign nor2  = ~(mc | upper);
  assign mc23  = ~(nor2 & qb0);

endmodule
