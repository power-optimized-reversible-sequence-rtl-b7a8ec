# Reversible sequence generator

A sequence generator is a shift register whose serial input is computed from
its own outputs. This design builds one entirely from reversible gates, the
Feynman (controlled-NOT) gate and the Toffoli (controlled-controlled-NOT)
gate, in place of the AND/OR/NAND gates of a conventional circuit. A
reversible gate maps its input vector one-to-one onto its output vector, so
no information is erased inside the logic. That is the route to circuits with
very low internal dissipation.

Three stages, FF2 -> FF1 -> FF0, are clocked together. The serial input of
FF2 is Z = Q1-bar, taken straight from FF1's complement output, so the
"next-state decoder" is a single wire. On every rising clock edge

    {Q2, Q1, Q0} <= {~Q1, Q2, Q1}

and the register walks the four-state cycle

    100 -> 110 -> 011 -> 001 -> 100 ...

The generator's output is Q2, which repeats the 4-bit pattern 1, 1, 0, 0.

## The two gates

| gate | inputs | outputs | used as |
|------|--------|---------|---------|
| Feynman (`feynman_gate`) | B, A | Y = B, X = A xor B | A = 0: copy (fan-out) of B; A = 1: inverter |
| Toffoli (`toffoli_gate`) | C, B, A | Z = C, Y = B, X = A xor (B and C) | A = 1: X = NAND(B, C) |

A signal in reversible logic may drive only one gate input. Wherever a value
is needed twice, a Feynman gate with A = 0 makes the copy. The constant 1 and
0 inputs are ancilla lines. Outputs that nothing reads, such as the
pass-through lines of a Toffoli gate used as a NAND, are garbage outputs.

## One stage: the reversible latch

`rev_d_latch` is the gate network of one stage:

    FG1 (A=1, B=D)             -> D, D-bar
    TG1 = NAND(D,     EN)      -> set_n
    TG2 = NAND(D-bar, EN)      -> rst_n
    TG3 = NAND(set_n, Q-bar)   -\  cross-coupled pair
    TG4 = NAND(rst_n, Q)       -/
    FG2 (A=0) copies TG3 to Q and to TG4's input
    FG3 (A=0) copies TG4 to Q-bar and to TG3's input

This is a gated D latch from NAND gates, expressed in reversible gates. It is
transparent while EN = 1 and holds while EN = 0. The TG3/FG2/TG4/FG3 ring is
a combinational loop by construction. It is the storage, and Verilator
reports it as `UNOPTFLAT` (circular logic). The simulation settles correctly,
and the latch testbench checks it against a latch model.

## From latch to flip-flop: the main departure

The original design calls each stage a D flip-flop, but its gate network is
the level-sensitive latch above, with CLK on EN. Three such latches on one
clock do not form a shift register. While CLK is high, D2 would pass through
all three stages in the same phase, and with the Q1-bar feedback the ring
would oscillate.

`rev_dff` therefore uses two copies of the latch in master-slave form. A
Feynman gate with A = 1 inverts the clock for the master, which is
transparent while CLK = 0. The slave is transparent while CLK = 1. The stage
captures D at the rising edge and holds it for a whole period. The master's
Q-bar output is an extra garbage output.

What this costs, counted per stage:

| | latch as drawn | `rev_dff` |
|--|--|--|
| Feynman gates | 3 | 7 |
| Toffoli gates | 4 | 8 |
| quantum cost (FG = 1, TG = 5, common literature values) | 23 | 47 |

The whole generator uses 21 Feynman and 24 Toffoli gates. The edge choice
(rising) is this design's own. The original says nothing about clock edges.

## Other points where this design makes its own choice

- **Next-state function.** Z = Q1-bar is read from the drawing of the
  complete generator, where a feedback line runs from FF1's Q1-bar output
  to FF2's D input. The text only says that Z is a function of the register
  outputs.
- **TG2's data input.** The stage is driven with D-bar on TG2, which is what
  a gated D latch needs.
- **Toffoli as NAND.** With A = 1 the Toffoli output is NOT(B and C), as its
  truth table shows.
- **No reset.** None is described, and none is needed. Every one of the
  eight states enters the cycle after one rising edge (010 -> 001,
  101 -> 110, 111 -> 011, 000 -> 100). From the second edge on the output is
  the 1100 pattern, in a phase set by the power-up state.
- **"4-bit".** This is read as the length of the generated pattern. The
  register has three stages.

The conventional generator built from ordinary D flip-flops, given as a
comparison, is not included.

## Files

| file | contents |
|------|----------|
| `rtl/feynman_gate.sv` | Feynman gate |
| `rtl/toffoli_gate.sv` | Toffoli gate |
| `rtl/rev_d_latch.sv` | reversible gated D latch (one drawn stage) |
| `rtl/rev_dff.sv` | master-slave reversible D flip-flop |
| `rtl/rev_seq_gen.sv` | top: three stages and the Q1-bar feedback |
| `tb/tb_*.sv` | one self-checking testbench per module |

Top-level ports of `rev_seq_gen`: `clk` in; `seq_out` (= Q2), `q[2:0]` =
{Q2,Q1,Q0} and `q_n[2:0]` out. Outputs change only after a rising edge. The
design has no parameters.

## Verification

Each testbench compares against values it works out itself and ends with a
`TB_RESULT checks=N failures=M` line.

- `tb_feynman_gate`, `tb_toffoli_gate`: full truth tables, the copy, NOT
  and NAND uses, and that the Toffoli mapping is a bijection.
- `tb_rev_d_latch`: 400 random enable/data steps against a latch model. It
  requires both transparent steps and held steps.
- `tb_rev_dff`: random data changed after the falling edge, while the clock
  is low and while it is high. q must change only at rising edges.
- `tb_rev_seq_gen`: the whole generator.
  - 64 free-running clocks. Each state is checked against the shift rule, the
    outputs must not move between edges, and every 4-bit window of `seq_out`
    must be a rotation of 1100.
  - It then forces each of the eight states into the slave latches, releases
    them, and checks the state after the next edge. This covers the four
    off-cycle states.
  - It counts the four cycle states, D2 = 0 and 1, shifts of 0 and 1, and
    recoveries. A mechanism that never happens counts as a failure.

Run a test with Verilator 5:

    verilator --binary --timing -Irtl tb/tb_rev_seq_gen.sv --top-module tb_rev_seq_gen -Wno-UNOPTFLAT
    ./obj_dir/Vtb_rev_seq_gen

`-Wno-UNOPTFLAT` only quiets the report of the intended storage loops. Runs
take well under a second.

## Changing it

- **Different sequence.** Change the assignment to `d2` in
  `rtl/rev_seq_gen.sv`. To stay reversible, build any decoder logic from
  `feynman_gate` and `toffoli_gate` instances as well.
- **Longer register.** Add `rev_dff` stages.
- **Latch-level timing.** Because the gates are zero-delay, simulation shows
  function, not timing. A real implementation must meet the usual setup and
  hold times of a master-slave latch pair around the rising edge.
