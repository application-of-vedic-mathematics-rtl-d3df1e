# 4x4 Vedic multiplier (Urdhava Tiryagbhyam)

A combinational unsigned 4x4-bit multiplier built from the "vertically and
crosswise" rule of Vedic arithmetic. Both operands are split into two 2-bit
halves. Four 2x2 multipliers form all four half products at the same time.
A short tree of carry look-ahead adders then aligns and adds them into the
8-bit product. The design has no clock, no reset and no parameters at the
top level: a new product appears at `mult` one combinational delay after
`P` or `Q` changes.

## The idea: vertical and crosswise products

Write `P = {pu, pl}` and `Q = {qu, ql}`, where each half is 2 bits. Then

```
P*Q = (pu*qu) << 4   +   (pu*ql + pl*qu) << 2   +   pl*ql
       vertical (left)     crosswise                  vertical (right)
```

Each of the four terms is a 2x2 product of at most 9, so it fits in 4 bits.
All four are computed at once by identical `mul` cells:

| instance | product   | signal | bits          |
|----------|-----------|--------|---------------|
| `M1`     | `pl * ql` | `s0`   | M03 M02 M01 M00 |
| `M2`     | `pl * qu` | `s1`   | M13 M12 M11 M10 |
| `M3`     | `pu * ql` | `s2`   | M23 M22 M21 M20 |
| `M4`     | `pu * qu` | `s3`   | M33 M32 M31 M30 |

## How the partial products are aligned and added

This is the part that is easiest to get wrong. Arranged by bit weight
(column 7 on the left, column 0 on the right), the four products overlap
like this:

```
weight:      7    6    5    4    3    2    1    0
s3 (<<4):   M33  M32  M31  M30
s0:                             M03  M02  M01  M00
s2 (<<2):             M23  M22  M21  M20
s1 (<<2):             M13  M12  M11  M10
```

Only `s3` and `s0` share no columns, so the top row reads
`M33 M32 M31 M30 M03 M02 M01 M00` with no addition. The adders then work
column band by column band:

1. **Bits 1..0** are `s0[1:0]` unchanged. Nothing else has weight below 4.
2. **Ad1** (4-bit carry look-ahead) adds the two crosswise products:
   `{c1, lo1} = s1 + s2`.
3. **Ad2** (4-bit carry look-ahead) adds `lo1` to the slice of the top row
   that covers bits 5..2, `sp = {M31, M30, M03, M02} = {s3[1:0], s0[3:2]}`:
   `{c2, lo2} = lo1 + sp`. `lo2` is product bits 5..2.
4. Both carries `c1` and `c2` have weight 2^6. The **half adder HA** counts
   them: `{hc, hs} = c1 + c2`.
5. The **2-bit look-ahead adder Ad3** adds that count to the remaining top
   row bits `M33 M32 = s3[3:2]`, giving product bits 7..6.

So `mult = {Ad3.sum, lo2, s0[1:0]}`.

### A carry that never fires

An exhaustive sweep of all 256 operand pairs shows that `c1` and `c2` are
never 1 together. `c1` is set only when `s1 + s2 >= 16`. That needs
`9 + 9`, so only for 15 x 15. In that case `lo1 = 2` and `sp = 6`, so Ad2
does not carry. As a result the half adder's `carry` output is constantly 0
in this datapath, and Ad3 never needs a carry out. The structure is kept as
designed: the half adder is still the general way to merge the two carries.
The testbench checks that `hc` stays 0. A synthesis tool will remove this
logic.

Carry activity over the full sweep:

| event                              | operand pairs |
|------------------------------------|---------------|
| Ad1 carries (`c1`), Ad2 does not   | 1             |
| Ad2 carries (`c2`), Ad1 does not   | 49            |
| both (half-adder carry)            | 0             |
| look-ahead carry inside Ad3        | 16            |
| no carry from Ad1 or Ad2           | 206           |

## The cells

- **`mul`**: a 2x2 multiplier that uses the same rule at bit level.
  `q[0] = a0 b0` (vertical), `q[1] = a1 b0 ^ a0 b1` (crosswise), and the
  crosswise carry is added to `a1 b1` (vertical) to give `q[3:2]`. It uses
  four AND gates and two half-adder stages.
- **`lookaheadadder #(WIDTH = 4)`**: a carry look-ahead adder with no carry
  input. Each bit forms generate `g = a & b` and propagate `p = a ^ b`.
  Every carry is then a flat two-level sum of products,
  `c[i+1] = g[i] | p[i] g[i-1] | ... | p[i]..p[1] g[0]`, instead of a
  ripple. The sum is `sum = p ^ c`. The `WIDTH` parameter is a
  generalisation; the multiplier uses `WIDTH = 4` twice.
- **`halfadder`**: `sum = a ^ b`, `carry = a & b`.
- **`lookaheadadder2`**: a 2-bit look-ahead adder without a carry in or a
  carry out. `sum[0] = p0`, `sum[1] = p1 ^ g0`.
- **`vedic4bit`**: the top level. It holds four `mul` cells, two
  `lookaheadadder`, one `halfadder` and one `lookaheadadder2`.

## Interface and timing

| port   | dir | width | meaning                   |
|--------|-----|-------|---------------------------|
| `P`    | in  | 4     | multiplicand X3..X0       |
| `Q`    | in  | 4     | multiplier Y3..Y0         |
| `mult` | out | 8     | unsigned product M7..M0   |

The design is purely combinational. It has no handshake and no latency in
cycles. The longest path runs from a low operand bit through a crosswise
`mul` cell, Ad1, Ad2 and Ad3 to `mult[6]`. On a Spartan-3E FPGA this
organisation has been reported at about 11.8 ns pad to pad, using 37
4-input LUTs and 16 I/O pins. Those numbers come from that toolflow and are
not reproduced here.

## What follows the reference architecture and what is a local choice

These follow the published architecture:

- the split into 2-bit halves;
- the four 2x2 multipliers;
- the alignment shown above;
- two 4-bit carry look-ahead adders, a half adder on their carries and a
  final 2-bit carry look-ahead adder;
- the module names (`vedic4bit`, `mul`, `lookaheadadder`, `halfadder`,
  `lookaheadadder2`), the instance names (`M1`..`M4`, `Ad1`, `Ad2`, `HA`,
  `Ad3`), the top-level port names and the internal signal names (`pl`,
  `pu`, `ql`, `qu`, `s0`..`s3`, `sp`, `lo1`, `lo2`, `c1`, `c2`).

These are local choices:

- the gate-level contents of every cell (only their functions are
  specified);
- which `mul` instance computes which half product;
- the absence of carry inputs on the adders, and of a carry output on the
  2-bit adder;
- the `WIDTH` parameter of `lookaheadadder`;
- unsigned operands;
- the names `hs`, `hc`, `hi` and the cell input names.

The reference describes only the 4x4 size. Larger sizes (8x8 from four 4x4
blocks, and so on) are mentioned as possible, but not worked out, and are
not built here.

## Verification

Each module has an exhaustive self-checking testbench in `tb/`:

| testbench            | what it checks                                               |
|----------------------|--------------------------------------------------------------|
| `tb_mul`             | all 16 products against `a*b`                                |
| `tb_halfadder`       | all 4 input pairs                                            |
| `tb_lookaheadadder`  | all 256 pairs at 4 bits, and all 4096 pairs at 6 bits        |
| `tb_lookaheadadder2` | all 16 pairs against `(a+b) mod 4`                           |
| `tb_vedic4bit`       | see below                                                    |

`tb_vedic4bit` checks:

- two worked examples: 4 x 2 = 8, and 2 x 8 = 16 together with every
  internal value of that example;
- all 256 operand pairs, comparing the product and every intermediate
  signal (`lo1`/`c1`, `sp`, `lo2`/`c2`, the half-adder outputs) with
  integer arithmetic done in the testbench;
- that every carry path in the table above that can fire does fire.

Each testbench ends with the line `TB_RESULT checks=N failures=M` and has a
watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb tb/tb_vedic4bit.sv \
          --top-module tb_vedic4bit -Mdir obj_tb
./obj_tb/Vtb_vedic4bit
```

Swap in any other testbench name to check a single cell. To lint the RTL,
run `verilator --lint-only -Wall -Irtl rtl/vedic4bit.sv`.

## Changing it

- To use a different adder in a stage, replace the `lookaheadadder` or
  `lookaheadadder2` instance. `tb_vedic4bit` checks every stage's result
  independently, so a wrong replacement shows up at the stage where it
  goes wrong.
- To build an 8x8 multiplier the same way, use four `vedic4bit` blocks on
  4-bit halves and the same alignment with twice the widths:
  - `lookaheadadder #(.WIDTH(8))` for the crosswise sum and for the
    middle band;
  - a half adder on the two carries;
  - a 4-bit adder for the top band.

  This extension is not provided or verified here.
