// dmps_32_33: divide-by-32/33 dual-modulus pre-scaler (DMPS) for the
// feedback divider of a PLL.
//
// The input clock drives a 2/3 pre-scaler (D-FF1, D-FF2). Its output clocks
// a chain of DIV_STAGES divide-by-2 stages (D-FF3..D-FF6 for the default 4).
// Feedback gates watch the chain and the mode control: with mc high the
// 2/3 pre-scaler always divides by 2 and fout = fin / 32; with mc low it
// divides by 3 for one of its 16 cycles, and fout = fin / 33.
// The structure (one 2/3 unit, six D-FFs, NOR/NAND feedback, mc high = 32)
// follows the document. In silicon all flip-flops are split-path TSPC cells
// and the whole pre-scaler runs from a clock-gated adaptive supply (AVLS);
// neither has a logic-level effect, so neither appears here.
//
// Interface: fin (input clock), rst_n (async active-low reset of all
// flip-flops, this design's addition), mc (1 = /32, 0 = /33), fout (Q of
// the last stage: 50 % duty in /32 mode, 16 high and 17 low input cycles
// in /33 mode).
// Timing: a change of mc takes effect at the next pass of the chain through
// its all-zero state, i.e. within one output period.
module dmps_32_33
  import dmps_pkg::*;
#(
  parameter int unsigned DIV_STAGES = DEFAULT_DIV_STAGES
) (
  input  logic fin,
  input  logic rst_n,
  input  logic mc,
  output logic fout
);

  logic                  fo23;   // 2/3 pre-scaler output
  logic                  mc23;   // 2/3 ratio select (1 = /2, 0 = /3)
  logic [DIV_STAGES-1:0] cnt_q;
  logic [DIV_STAGES-1:0] cnt_qb;

  prescaler_2_3 u_pre23 (
    .fin  (fin),
    .rst_n(rst_n),
    .mc23 (mc23),
    .fo   (fo23)
  );

  ripple_div16 #(.DIV_STAGES(DIV_STAGES)) u_div (
    .clk_in(fo23),
    .rst_n (rst_n),
    .q     (cnt_q),
    .qb    (cnt_qb)
  );

  mod_ctrl_logic #(.DIV_STAGES(DIV_STAGES)) u_ctrl (
    .mc  (mc),
    .qb0 (cnt_qb[0]),
    .q_hi(cnt_q[DIV_STAGES-1:1]),
    .mc23(mc23)
  );

  assign fout = cnt_q[DIV_STAGES-1];

endmodule
