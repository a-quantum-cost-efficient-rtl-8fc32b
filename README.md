# Reversible 8x1 multiplexer from COG gates

An ordinary multiplexer throws information away: from its one output you
cannot tell what the seven unselected inputs were, and erasing bits costs
energy. This design builds an 8x1 multiplexer only from *reversible* gates,
gates whose outputs determine their inputs, so that the whole circuit is a
one-to-one mapping of its eleven inputs (eight data bits, three select bits)
onto eleven outputs. One of those outputs is the multiplexer result; the
other ten are "garbage" outputs that exist only to keep the mapping
reversible. The goal is a small reversible circuit: it uses seven 3-input,
3-output gates, needs no constant (ancilla) inputs, and has ten garbage
outputs.

The RTL is plain synthesizable SystemVerilog. It is a logical model of the
reversible circuit: in CMOS it synthesizes to an ordinary multiplexer plus a
few XOR gates for the garbage outputs, and it makes no claim about energy.

## The COG gate (`rtl/cog_gate.sv`)

Every gate in the design is the same 3x3 COG gate:

| a b c | p q r |
|-------|-------|
| 0 0 0 | 0 0 0 |
| 0 0 1 | 0 0 1 |
| 0 1 0 | 0 1 0 |
| 0 1 1 | 0 1 1 |
| 1 0 0 | 1 1 0 |
| 1 0 1 | 1 0 0 |
| 1 1 0 | 1 0 1 |
| 1 1 1 | 1 1 1 |

or, as logic, `p = a`, `q = b ^ (a & ~c)`, `r = a ? b : c`.

Three properties make it a multiplexer cell:

* `r` is a 2x1 multiplexer with control `a`: `a = 1` picks `b`, `a = 0`
  picks `c`.
* `p` returns the control unchanged. The next gate can take its control from
  here, so one select line can drive a chain of gates without a separate
  copying (fan-out) gate and without a constant input.
* `q` is the garbage output. With `a = 0` the gate is the identity; with
  `a = 1` it swaps `b` and `c` and turns the middle bit into `b XNOR c`. All
  eight output patterns differ.

The table is the COG gate's; the Boolean form is derived from it. It is
also the only reversible 3x3 mapping that keeps `p = a`, leaves `b` and `c`
untouched when `a = 0`, sends 1-0-0 to 1-1-0 and 1-1-1 to itself, and gives
a multiplexer output, which is a quick way to check it.

## Three-stage 4x1 multiplexer (`rtl/rev_mux4.sv`)

Three COG gates form a 4x1 multiplexer:

```
 s1 ──► [stage 1] a      s1 (from stage 1 p) ──► [stage 2] a      s0 ──► [stage 3] a
 d1 ──►           b      d3 ──►                            b      y_hi ─►           b
 d0 ──►           c      d2 ──►                            c      y_lo ─►           c
        r = y_lo                 r = y_hi, p = s1_out                r = y, p = s0_out
```

The select bit that enters first (`s1`) chooses inside each pair of data
inputs; the bit used last (`s0`) chooses the pair. Hence

    y = d[{s0, s1}]      (s0 s1 = 00 -> d0, 01 -> d1, 10 -> d2, 11 -> d3)

Note the bit order: `s0` is the high bit of the index here, the opposite of
the usual convention. This follows the published sum of products of the
multiplexer, and it is the ordering that the three-stage construction
produces. The module returns both select lines (`s1_out` from stage 2,
`s0_out` from stage 3) and the three garbage bits `g[2:0]` (stage 1, 2, 3).
Its six inputs map one-to-one onto its six outputs.

## 8x1 multiplexer (`rtl/rev_mux8.sv`, top level)

```
            i[7:4] ─► rev_mux4 (upper) ── y_hi ─┐
 s1,s0 ───────────►    s1_out,s0_out            ├─► cog_gate (2x1, a = s2) ─► y
            i[3:0] ─► rev_mux4 (lower) ── y_lo ─┘
                       (selects from the upper one)
```

Both 4x1 multiplexers use the same `s1`, `s0`. The lower one receives them
from the pass-through outputs of the upper one, so the select lines are
copied for free. The final COG gate is the 2x1 multiplexer on `s2`: `s2 = 0`
gives the lower result (one of I3..I0), `s2 = 1` the upper one (I7..I4).
Altogether

    y = s0's1's2'I0 + s0's1's2 I4 + s0's1 s2'I1 + s0's1 s2 I5
      + s0 s1's2'I2 + s0 s1's2 I6 + s0 s1 s2'I3 + s0 s1 s2 I7
      = i[{s2, s0, s1}]

### Ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `i` | in | 8 | data inputs I7..I0 |
| `s` | in | 3 | select lines `{s2, s1, s0}` |
| `y` | out | 1 | selected input |
| `s_out` | out | 3 | `{s2, s1, s0}` returned by the last gate on each select chain |
| `g` | out | 7 | garbage outputs: `g[2:0]` lower 4x1, `g[5:3]` upper 4x1, `g[6]` 2x1 gate |

`s_out` equals `s` and is, logically, a wire; it is a separate port because
in a reversible circuit those lines are physical gate outputs and are part of
the one-to-one mapping. A user who needs only the multiplexer connects `i`,
`s` and `y` and leaves `s_out` and `g` open.

### Cost figures

| | |
|---|---|
| COG gates | 7 (3 per 4x1, 1 for the 2x1) |
| constant (ancilla) inputs | 0 |
| garbage outputs | 10 (`s_out` and `g`) |
| gate levels, data input to `y` | 3 |
| gate levels, worst path (`s1` through the select chain) | 5 |

### Timing

The circuit is purely combinational, with no clock and no reset. `y` is valid
one propagation delay after `i` or `s` settles.

## Choices made in this RTL

* **Select bit order.** The design follows the sum of products above, so
  `s = 3'b001` (only `s0` high) selects I2, not I1. To get the
  conventional numbering `y = i[s]`, connect `s[1]` and `s[0]` crosswise at
  the top.
* **Select fan-out.** How the shared `s1`, `s0` reach both 4x1 multiplexers
  is this design's choice: they are chained through the gates' pass-through
  outputs. A Feynman (controlled-NOT) gate per line would also work, at the
  cost of two constant inputs and two more garbage outputs.
* **Gate description.** The COG gate is written from its truth table, not as
  a cascade of smaller reversible gates.
* **Width.** The multiplexer is one bit wide, as described; there are no
  parameters.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops on a time watchdog:

* `tb_cog_gate` - all 8 input patterns against the table above, the
  multiplexer behaviour of `r`, and that no output pattern repeats.
* `tb_rev_mux4` - all 64 input patterns: `y` against the sum of products,
  the returned select lines, the garbage bits against a model built from the
  COG table, and that all 64 output patterns occur exactly once.
* `tb_rev_mux8` - the whole design, end to end: a sweep of the select value
  from 0 to 7 with each one-hot data pattern; all 2048 input patterns against
  the sum of products; a check that the 2048 output patterns are all
  different and that every input is recovered from its outputs. It also
  counts how often each select value and each half of the 2x1 stage was used
  and fails if any never was.

Running a testbench with Verilator:

    verilator --binary --timing --assert -y rtl +libext+.sv tb/tb_rev_mux8.sv \
              --top-module tb_rev_mux8 -o sim
    ./obj_dir/sim

The same command works for `tb_rev_mux4` and `tb_cog_gate`.
