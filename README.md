# Divide-by-32/33 dual-modulus pre-scaler

A dual-modulus pre-scaler (DMPS) is the first, fastest stage of the feedback
divider in a PLL frequency synthesizer. It takes the VCO output and divides it
by 32 or by 33, depending on a mode-control input. A slower programmable
counter behind it (a pulse/swallow counter, not part of this design) switches
the mode so that the whole loop divides by any integer. Only the first two
flip-flops run at the VCO frequency. This makes a low-power pre-scaler
possible.

This RTL gives the logic of a low-power 32/33 DMPS circuit. In silicon, that
circuit is built from 10-transistor split-path TSPC (true single-phase clock)
flip-flops. Its whole supply comes through an adaptive voltage level source
(AVLS), and one feedback NOR gate is built as pass-transistor logic. None of
these three silicon techniques changes a logic value. The RTL therefore
describes the structure that all variants of the circuit share: six D
flip-flops and a few NOR/NAND gates.

## How 32 and 33 are made

```
            +------------------+  fo23   +-----------------------------+
  fin ----->| 2/3 pre-scaler   |-------->| 4 ripple divide-by-2 stages |--> fout
            | D-FF1, D-FF2     |         | D-FF3 .. D-FF6 (count 0..15) |
            +------------------+         +-----------------------------+
                    ^ mc23                        | QB3, Q4, Q5, Q6
                    |                             v
                    +------- feedback gates <---- mc (1 = /32, 0 = /33)
                             NOR1, NAND1, NOR2, NAND2
```

* The **2/3 pre-scaler** (`prescaler_2_3`) divides `fin` by 2 while `mc23`
  is high and by 3 while it is low.
* The **ripple chain** (`ripple_div16`) divides the 2/3 output by 16. Read as
  a 4-bit number `{Q6,Q5,Q4,Q3}`, it counts up once per 2/3 period.
* The **feedback gates** (`mod_ctrl_logic`) pull `mc23` low only when
  `mc = 0` and the chain is in state 0.

So an output period is 16 periods of the 2/3 stage. In /32 mode, all 16 are
two input cycles long: 16 x 2 = 32. In /33 mode, the period spent in chain
state 0 lasts three cycles: 15 x 2 + 3 = 33. The single extra input cycle is
the "swallowed" pulse.

The output `fout` is Q of the last stage, D-FF6. In /32 mode it is a square
wave, 16 cycles high and 16 low. In /33 mode it is 16 high and 17 low,
because state 0 lies in the low half.

## The 2/3 cell

```
D1 = NOR(Q1, Q2)
D2 = NOR(QB1, mc23)   -- that is, Q1 AND NOT mc23
fo23 = Q1
```

With `mc23 = 1`, D2 stays 0 and D-FF1 toggles. With `mc23 = 0`, D-FF2
follows Q1 one cycle late and holds D-FF1 low for one more cycle. The state
`(Q1,Q2)` then walks 00 -> 10 -> 01 -> 00. The unused state 11 leaves in
one cycle, so the cell starts up without reset.

## When the mode is decided

This is the subtle part of the design. `mc23` is looked at only on one input
edge: the `fin` edge that follows a rising edge of `fo23`. That is when
D-FF2 samples `Q1 AND NOT mc23`. A rising edge of `fo23` also advances the
ripple chain, and the new chain state settles within a ripple delay. So the
decision for each 2/3 period uses the chain state of that same period. The
chain must therefore settle within one input cycle. Only the first stage,
D-FF3, plus the gate path to `mc23` has to be that fast: the later stages
change only on the way into or out of state 0.

As a result, a change of `mc` takes effect at the next pass through chain
state 0. Output periods are measured between rising edges of `fout` (chain
state 8). If `mc` changes right after a rising edge of `fout`, the period
that follows has the new ratio. That is how a swallow counter would drive
it, and it is what the end-to-end test does.

## Feedback gates

`NOR2(mc, upper)` is low whenever `mc` is high. This forces `NAND2` high
regardless of `QB3`, which keeps the 2/3 cell at /2. With `mc` low, `NAND2`
goes low only when `QB3 = 1` and `upper = 0`. Here `upper = Q4 | Q5 | Q6`,
which in gates is `NAND1(NOR1(Q5,Q6), QB4)`. The RTL writes `upper` as an
OR-reduction so that `DIV_STAGES` can change. For the default of 4 this is
exactly the two-gate network.

## Modules and parameters

| module           | role                                                  | parameters |
|------------------|-------------------------------------------------------|------------|
| `dmps_pkg`       | mode enum `MODE_DIV32 = 1`, `MODE_DIV33 = 0`; `div_ratio()` | `DEFAULT_DIV_STAGES = 4` |
| `tspc_dff`       | rising-edge D flip-flop with `q`, `qb`, async reset  | none       |
| `prescaler_2_3`  | 2/3 cell, two flip-flops and two NOR gates           | none       |
| `ripple_div16`   | chain of toggle stages, each clocked by the previous `qb` | `DIV_STAGES = 4` |
| `mod_ctrl_logic` | NOR/NAND feedback producing `mc23`                   | `DIV_STAGES = 4` |
| `dmps_32_33`     | top: `fin`, `rst_n`, `mc` in; `fout` out             | `DIV_STAGES = 4` |

`DIV_STAGES` sets the number of divide-by-2 stages. The ratios are then
`2^(DIV_STAGES+1)` and `2^(DIV_STAGES+1)+1`, for example 16/17 at 3 stages.
It must be at least 2. The default of 4 gives 32/33.

The ripple chain clocks each stage from the previous stage's output. That is
the intended asynchronous structure of this kind of divider, not a gated
clock. Under static timing analysis, each stage output becomes a generated
clock.

## Choices made in this RTL

The following are choices of this RTL, not things the circuit pins down:

* **Reset.** The TSPC flip-flops have no reset. Every flip-flop here has an
  asynchronous active-low `rst_n`, so that simulation starts from a known
  phase. Tie it high to get the original behaviour, which is self-starting.
  After reset, the first rising edge of `fout` comes 15 input cycles after
  the first `fin` edge.
* **2/3 gate network.** The circuit is known to be a 2/3 unit made of D-FFs
  and NAND/NOR gates, with control high meaning /2. The two-NOR form above
  is the usual TSPC 2/3 cell and was chosen for that reason.
* **Chain state that stretches the cycle.** NOR2, NAND2 and the inverted
  output of D-FF3 are given. Using state 0, and therefore `Q4 | Q5 | Q6` as
  the second NOR2 input, is a choice.
* **Output tap.** `fout` is Q of D-FF6. A PLL would use its rising edge.
* **Variants.** Three flavours of the circuit exist:
  1. regular TSPC flip-flops with a pass-transistor NOR;
  2. split-path flip-flops with logic gates;
  3. split-path flip-flops with a pass-transistor NOR.

  All three share the same logic, and this one RTL describes all of them.
* **Not modelled.** The AVLS supply circuit (one clock-gated pMOS and two
  nMOS between VDD and the pre-scaler's supply node) and transistor sizing
  are not modelled. Their effect is power and speed only. The reported
  operating point is 1 GHz, at about 221 uW in 180 nm for the split-path
  version with the pass-transistor NOR. Nothing at RTL level reproduces
  those numbers.

## Simulating

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
  -y rtl -y tb +libext+.sv rtl/dmps_pkg.sv tb/tb_dmps_32_33.sv \
  --top-module tb_dmps_32_33 -o sim
./obj_dir/sim
```

For another testbench, replace `tb_dmps_32_33` with `tb_tspc_dff`,
`tb_prescaler_2_3`, `tb_ripple_div16` or `tb_mod_ctrl_logic`.

What the tests check:

* `tb_dmps_32_33` runs the top at its default size. It holds 40 periods in
  /32, then 40 in /33, then 400 periods with a random mode per period. Each
  period is checked for length (32 or 33 input cycles) and high time (16).
  The test watches the internal 2/3 output and checks that exactly one
  three-cycle 2/3 period (a swallow) falls in each /33 period and none in
  /32. A last phase flips the mode at random input cycles. It checks that
  every period is still 32 or 33 cycles long, with one swallow per extra
  cycle. The test counts /32 periods, /33 periods, mode switches and
  swallows, and fails if any count is zero. It takes well under a second.
* `tb_prescaler_2_3` checks the 2- and 3-cycle periods under a random ratio
  per period, start-up without reset, and reset.
* `tb_ripple_div16` checks the count after each edge of an irregular clock,
  `qb = ~q`, and the output period.
* `tb_mod_ctrl_logic` checks all 32 input combinations against the rule
  "/3 only in /33 mode and chain state 0".
* `tb_tspc_dff` checks random data, that `q` holds between edges, and the
  asynchronous reset.

## Limits

This is a two-state, zero-delay model. It shows that the divider produces
the right ratios and that the mode takes effect at the right time. It
cannot show the timing conditions a real ripple design depends on, such as
the chain settling within one input cycle, and it says nothing about power.
In this model, a mode change at any input cycle gives a period of either
32 or 33. In silicon, a change that races the decision edge can also
violate the flip-flop's setup time.
