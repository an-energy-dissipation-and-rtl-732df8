# Vedic multipliers in majority logic

This is a family of unsigned binary multipliers (2×2, 4×4, 8×8 and, in
general, N×N) organised after the Urdhva-Tiryakbhyam rule of Vedic
arithmetic: "vertically and crosswise". Every column of partial products is
formed at the same time and then summed. Larger multipliers are built from
four half-size ones. The logic is written with the primitives of
quantum-dot cellular automata (QCA): the three-input majority gate, a
five-input majority gate and the inverter. AND is a majority gate with one
input tied to 0, OR is one with an input tied to 1, and adders are built from
these gates. In QCA these primitives are the cells and their arrangement.
Here they are ordinary synthesizable SystemVerilog, so the design simulates
and synthesizes like any other combinational multiplier. Gate by gate, it
mirrors how a QCA layout would be organised.

All blocks are purely combinational: no clock, no reset, no state. A physical
QCA circuit moves data through four-phase clock zones (switch, hold, release,
relax), and its latency is counted in those phases. That pacing belongs to
the cell layout and has no RTL counterpart here. The RTL gives the logic
function and the gate structure, not cell counts, area, QCA latency or energy.

## Block hierarchy

```
vedic_top                      two multipliers side by side
├── vedic_nxn  (N = 8)         main N x N multiplier
│   ├── vedic_4x4_fa  x (N/4)^2   leaf 4 x 4 multipliers
│   └── vedic_combine             one per internal tree node
│       ├── full_adder  x N          carry-save row
│       ├── rca (N bits)             ripple carry adder
│       └── ha_chain (N/2-1 bits)    incrementer of half adders
└── vedic_4x4_rca              alternative 4 x 4 multiplier
    ├── vedic_2x2  x 4
    ├── rca (4 bits) x 3
    └── qca_or2

full_adder = maj3 + maj5 + inverter
half_adder = qca_and2 + qca_xor2
qca_xor2   = 3 x maj3 + inverter
qca_and2 / qca_or2 = maj3 with one input tied to 0 / 1
```

## Primitives and adders

| module | function | structure |
|---|---|---|
| `maj3` | ab + bc + ca | the QCA majority gate |
| `maj5` | 1 when at least 3 of 5 inputs are 1 | five-input majority |
| `qca_and2`, `qca_or2` | a·b, a+b | `maj3(a,b,0)`, `maj3(a,b,1)` |
| `qca_xor2` | a⊕b | `maj3(~maj3(a,b,0), maj3(a,b,1), 0)`: NAND and OR, ANDed |
| `half_adder` | sum, carry | carry = `qca_and2`, sum = `qca_xor2` |
| `full_adder` | sum, cout | cout = `maj3(a,b,cin)`, sum = `maj5(a,b,cin,~cout,~cout)` |
| `rca` | WIDTH-bit ripple carry adder | WIDTH full adders, default 4 |
| `ha_chain` | adds one bit to a WIDTH-bit word | WIDTH half adders |

The full adder uses two majority gates and one inverter. The inverted carry
enters the five-input gate twice. With at most one input set, those two votes
decide the sum. With two or more set, the sum is 1 only when all three are.

## 2×2 multiplier (`vedic_2x2`)

Vertically, p0 = a0·b0. Crosswise, a1·b0 + a0·b1 goes through a half adder,
giving p1 and a carry. Vertically again, a1·b1 and that carry go through a
second half adder, giving p2 and p3. That is four AND gates and two half
adders.

## The two 4×4 multipliers

**`vedic_4x4_fa`: gate level, used inside the N×N multiplier.** There are
sixteen AND gates. Eight half adders, seven full adders and one XOR reduce
their outputs in three rows. The partial products form four 2×2 groups: LL, HL, LH and HH.
Row 1 is one half adder per group, summing the group's two crosswise
products. Row 2 is a carry-save row that leaves at most two bits per
column. Row 3 is a ripple row that forms p[7:2].

| column | row 2 (carry-save) | row 3 (ripple) |
|---|---|---|
| 2 | FA(a1b1, a2b0, LL carry); a0b2 passes | HA → p2 |
| 3 | HA(HL sum, LH sum); column-2 carry passes | FA → p3 |
| 4 | FA(a3b1, a1b3, a2b2), FA(HL carry, LH carry, column-3 carry) | FA → p4 |
| 5 | HA(the two column-4 carries); HH sum passes | FA → p5 |
| 6 | FA(a3b3, HH carry, column-5 carry) | HA → p6 |
| 7 | column-6 carry | XOR → p7 |

p0 = a0b0 and p1 is the LL half adder's sum. Column 7 needs only an XOR
because the product never exceeds 8 bits. In each row the adder types run
FA, HA, FA, FA, HA, FA and XOR, HA, FA, FA, FA, HA (from column 6 or 7 down
to column 2). This follows the published block diagram. That diagram cannot
be read down to individual wires, so the assignment of partial products to
adders above is this design's own. It is chosen so that every column
reduces exactly.

**`vedic_4x4_rca`: built from 2×2 multipliers.** With LL = aL·bL,
HL = aH·bL, LH = aL·bH and HH = aH·bH (2-bit halves), the design uses three
4-bit ripple carry adders:

- RCA 1 computes HL + LH, giving sum s1 and carry c1.
- RCA 2 computes s1 + LL[3:2]. Its low two sum bits are p[3:2].
- RCA 3 computes HH + {0, c1|c2, s2[3:2]}, giving p[7:4].

p[1:0] = LL[1:0]. The published structure does not show where RCA 2's carry
c2 goes. It has the same weight as c1, and the two are never 1 together, so
a majority-gate OR merges them. This OR is this design's addition. Without
it, 11×15, 14×15, 15×11 and 15×14 would come out wrong.

## N×N multiplier and the combining stage

Write a = {aH, aL} and b = {bH, bL} with H = N/2, and let w = aL·bL,
x = aH·bL, y = aL·bH and z = aH·bH, each N bits wide. Then

    a·b = z·2^N + (x + y)·2^H + w

`vedic_combine` adds the three operands that overlap at weight 2^H: x, y and
t = {z[H-1:0], w[N-1:H]}. It does this in three stages:

1. **N-bit full-adder row.** One full adder per bit adds x[i], y[i] and t[i]
   in carry-save form, giving sums ps and carries gs.
2. **N-bit ripple carry adder.** It adds {z[H], ps[N-1:1]} to gs, which moves
   each carry one place up. ps[0] needs no addition. The adder's top bit also
   absorbs z[H].
3. **(H-1)-bit incrementer.** A half-adder chain adds the RCA's carry out to
   z[N-1:H+1].

The product is assembled as p[H-1:0] = w[H-1:0], p[H] = ps[0],
p[3H:H+1] = the RCA sum and p[2N-1:3H+1] = the incrementer sum. The
incrementer's carry out is always 0 and stays unused. For 8×8 this means an
8-bit full-adder row, an 8-bit RCA and a 3-bit incrementer, which is the
published 8×8 organisation. Compared with adding the partial products in three
full 8-bit ripple adders, it saves both adder length and carry depth.

`vedic_nxn` applies this recursively, written as a generate loop over
levels. Level 0 holds one `vedic_4x4_fa` for every pair of 4-bit digits of a
and b. Each later level joins four blocks of the previous level with a
`vedic_combine` of twice the width. The last level holds the product. N must
be a power of two and at least 4. Anything else stops elaboration with an
error. The parameter `RCA_LEAF` (default 0) swaps the leaves for the RCA-based
4×4 multiplier. The product is the same, only the gate structure changes. The
default leaf is the gate-level one, and the gate counts below assume it.

## Top level (`vedic_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | N | operands of the main multiplier |
| `p` | out | 2N | a·b |
| `rca4_a`, `rca4_b` | in | 4 | operands of the RCA-based 4×4 multiplier |
| `rca4_p` | out | 8 | rca4_a·rca4_b |

Parameter `N` defaults to 8. The RCA-based 4×4 multiplier is a separate
topology and does not feed the main multiplier. It is brought out beside it
so that both 4×4 designs are present and testable.

## How far it can be trusted

- Every multiplier is checked against the built-in `*` operator. This
  covers every 8×8 and 4×4 operand pair, and random and corner operands for
  16×16 and 32×32. Every gate, the half and full adders and the 4-bit RCA
  are checked exhaustively.
- Gate counts for comparison with published QCA cost figures: each 4×4
  multiplier has 16 inverters and each 8×8 has 83, as in the usual
  accounting for this topology. The majority-gate count is higher (65 per
  4×4, 304 per 8×8, against 48 and 249 in that accounting). The reason is
  that a half adder here spends four majority gates, an AND plus a
  three-gate XOR, where the accounting counts two.
- The internal wiring of the gate-level 4×4 multiplier and the bit alignment
  of the combining stage are this design's, derived from the arithmetic.
  The block structure, adder types and widths are the published ones.
- Cell counts, area, QCA clock latency and energy dissipation belong to a
  physical QCA layout and are not modelled.

## Simulating

Every testbench in `tb/` checks itself, ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a time-out. To build one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Mdir obj tb/vedic_top_tb.sv --top-module vedic_top_tb
./obj/Vvedic_top_tb
```

`vedic_top_tb` runs the design at its default size, 8×8 plus the RCA 4×4,
over all operands. It takes well under a second. It also counts how often
the RCA carries into the incrementer, how often that carry ripples further,
and how often each carry of the RCA-based 4×4 fires. A path that was never
exercised counts as a failure. `vedic_nxn_tb` adds the 4×4, 16×16 and 32×32
sizes. To change the main multiplier's width, set `N` on `vedic_top` or
`vedic_nxn`.
