# Wallace tree multiplier with a carry select adder and binary to excess-1 converters

An unsigned N x N multiplier (N = 8 by default) built in three stages:

1. an AND array forms the N partial products;
2. a Wallace tree of half and full adders takes the rows three at a time and
   turns every three rows into two, until only two rows are left;
3. a carry select adder (CSLA) adds those two rows.

In a plain CSLA every block holds two ripple carry adders. One assumes a
carry in of 0, the other a carry in of 1, and a multiplexer picks the right
result once the real carry arrives. Here the second ripple adder is replaced
by a **binary to excess-1 converter (BEC)**. This is a small +1 circuit made
of one inverter and an AND/XOR chain. It derives the carry-in-1 result from
the carry-in-0 result. This keeps the speed of carry selection with fewer
gates than a second adder.

The design is purely combinational: no clock, no reset, no registers.

## Interface

`wallace_csla_bec_mult #(parameter int N = 8)`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `A`  | in  | N     | multiplicand, unsigned |
| `B`  | in  | N     | multiplier, unsigned |
| `M`  | out | 2N    | product `A * B` |

`M` settles one combinational delay after `A` or `B` changes. To pipeline
it, put registers around the module. An FPGA implementation of this
architecture (Spartan-3E) was reported at about 4.9 ns.

## Stage 1: the partial products (`partial_products`)

Row `i` is `A & {N{B[i]}}`, shifted left by `i`, in a 2N-bit row. The module
outputs all rows at full 2N width and ties the unused positions to zero.
Which positions of which row can ever be one forms a staircase, and that
staircase is known when the design is elaborated. The tree uses this fact.

## Stage 2: the Wallace reduction (`wallace_layer`, `wallace_tree`)

### One layer

A layer takes rows `3g, 3g+1, 3g+2` as group `g`. In each column of a group
it places the cell that column needs:

| bits present in the column | cell | output |
|---|---|---|
| 3 | full adder | sum in row `2g`, carry in row `2g+1` one column left |
| 2 | half adder | same |
| 1 | wire | bit copied into row `2g` |
| 0 | none | zero |

Rows left over when the row count is not a multiple of three pass
unchanged. So a layer turns R rows into `2*floor(R/3) + R mod 3`.

**The mask.** A parameter `MASK` (one bit per row and column) tells the
layer which positions can hold a one. The cell for each column is chosen
from `MASK` at elaboration, so no adder is ever placed on a bit that is
known to be zero.

`N_HA` and `N_FA` are local parameters that count the cells a layer uses.
The testbenches read them.

**The top column.** In the top column (bit W-1) a layer forms only the
XOR sum and drops the carry. The tree therefore adds modulo 2^W. For a
multiplier nothing is lost: the product always fits in 2N bits, so that
carry is always zero.

### The tree

`wallace_tree` chains layers in a generate loop. For each level it works
out, at elaboration, three things:

- the number of rows;
- the mask (using the same rule the layer uses to choose its cells);
- the number of layers `NL`.

| N | rows per level | layers | half / full adders per layer |
|---|----------------|--------|------------------------------|
| 4 | 4 → 3 → 2 | 2 | 2/2, 1/3 |
| 8 | 8 → 6 → 4 → 3 → 2 | 4 | 4/12, 3/13, 4/6, 4/7 |

### The 4 x 4 case, step by step

Write `aibj` for `A[i] & B[j]`, which sits at product bit `i+j`.

- **Layer 1** reduces rows 0 to 2:
  - bit 1 (`a1b0`, `a0b1`): half adder, giving s0 and c0;
  - bit 2: full adder, giving s1 and c1;
  - bit 3: full adder, giving s2 and c2;
  - bit 4 (`a3b1`, `a2b2`): half adder, giving s3 and c3;
  - `a0b0` (bit 0) and `a3b2` (bit 5) pass through unchanged.
- **Layer 2** adds row 3 (`a0b3` to `a3b3`, bits 3 to 6):
  - bit 2 (s1 and c0): half adder;
  - bits 3, 4 and 5: full adders;
  - `a3b3` passes at bit 6.
- **Final adder.** Two rows remain. They overlap only on bits 3 to 6. A
  single 4-bit carry select block adds them, and its carry out is product
  bit 7. Bits 0 to 2 (`a0b0`, s0 and the layer-2 sum at bit 2) are copied.

## Stage 3: the final adder (`csla_bec_adder`, `csla_bec_block`, `bec`, `rca`)

At the last level `wallace_tree` finds two columns:

- `LO`, the lowest column where both rows have a bit;
- `HI`, the highest column where either row has a bit.

It places a `csla_bec_adder` of width `HI-LO+1` on those columns. Bits below
`LO` are copied, since at most one row has a bit there. The adder's carry
out becomes bit `HI+1`. If `HI` is already the top bit, that carry is dropped
because it is always zero.

| N | LO..HI | adder width | blocks |
|---|--------|-------------|--------|
| 4 | 3..6   | 4           | 4 |
| 8 | 5..15  | 11          | 4, 4, 3 |

### The carry select block (`csla_bec_block`, W = 4)

The block works like this:

```
{c0, s0} = a + b            (rca, carry in 0)
r1       = {c0, s0} + 1     (bec of W+1 bits: the carry-in-1 result)
{co, s}  = ci ? r1 : {c0, s0}
```

`{c0, s0}` is at most `2^(W+1) - 2`. So adding one never overflows W+1 bits,
and `r1` is exactly the result for a carry in of 1. The carry in reaches
the outputs through one multiplexer only.

### The converter (`bec`)

The converter computes `x = s + 1` without an adder:

```
x[0] = ~s[0]
x[i] =  s[i] ^ t[i],   t[1] = s[0],   t[i] = t[i-1] & s[i-1]
```

With W = 3 this is the 3-input converter: `x0 = ~s0`, `x1 = s1 ^ s0`, an
AND `s1 & s0`, and `s2 ^ (s1 & s0)`. Inside a 4-bit carry select block it is
5 bits wide.

### Chaining (`csla_bec_adder`)

Blocks of `BLK` = 4 bits are chained, and the last block takes the
remainder. `blk_c[k]` is the carry into block `k`, and `blk_c[0]` is the
adder's `ci`. In the multiplier `ci` is 0.

For N = 4 there is a single block with carry in 0, so its converter result
is never selected. The converter does work for N = 8, where blocks 1 and 2
receive real carries.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `wallace_csla_bec_mult` | `N` | 8 | any N ≥ 1; 4 gives the worked example |
| `partial_products` | `N` | 8 | |
| `wallace_tree`, `wallace_layer` | `W`, `ROWS`, `MASK` | 16, 8, all ones | the multiplier sets them from N |
| `csla_bec_adder` | `WIDTH`, `BLK` | 4, 4 | |
| `csla_bec_block`, `rca` | `W` | 4 | |
| `bec` | `W` | 3 | |

## Design choices beyond the original description

- **Width.** The default N = 8 follows the 8-bit operands and 16-bit
  product of the reference simulation. The step-by-step description covers
  only the 4-bit case.
- **Signedness.** Operands are treated as unsigned.
- **More than four rows.** The rule "reduce three rows to two, repeat" is
  implemented as classic Wallace layers: all groups of three are reduced
  in parallel. For N = 4 this is the same as the hand-worked reduction.
- **Masks.** The mask mechanism that picks cells at elaboration, and the
  carry-free top column, are this implementation's own.
- **The block with the converter.** The carry select block with a
  converter follows the usual structure: one ripple adder at carry in 0,
  plus a (W+1)-bit converter on its carry and sum. The source describes the
  regular CSLA and the converter, but does not draw the combined block.
- **Wider final adders.** Chaining 4-bit blocks for final adders wider than
  4 bits is this implementation's own.
- **Not built.** The two comparison designs are not part of this RTL:
  - a plain Wallace multiplier, whose last reduction step is a row of half
    and full adders;
  - a Wallace multiplier with a regular two-adder CSLA.

  FPGA area, delay and power figures are not reproduced.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_half_adder`, `tb_full_adder` | all input combinations |
| `tb_rca` | 4-bit exhaustive, 13-bit random |
| `tb_bec` | 3-bit and 5-bit exhaustive |
| `tb_csla_bec_block` | 4-bit and 3-bit exhaustive; both multiplexer paths used |
| `tb_csla_bec_adder` | 4-bit exhaustive, 11-bit random; block carries of one occur |
| `tb_partial_products` | each row and the row total |
| `tb_wallace_layer` | cell counts of both 4 x 4 layers, passed-through bits, totals preserved |
| `tb_wallace_tree` | 8-, 3- and 2-row trees against integer sums |
| `tb_wallace_csla_bec_mult` | default N = 8 (see below) |
| `tb_mult4` | N = 4: layer structure, adder span 3..6, all 256 pairs |
| `tb_mult_widths` | N = 1, 3, 5, 12, 16 with random operands |

`tb_wallace_csla_bec_mult` runs the default N = 8 multiplier:

- the eight reference vectors (B = 255, with A = 0, 240, 14, 7, 48, 128,
  16, 2);
- all 65536 operand pairs;
- counts of how often an upper block selected its converter result and
  how often it selected its ripple result. Both must occur.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl tb/tb_wallace_csla_bec_mult.sv \
  --top-module tb_wallace_csla_bec_mult
./obj_dir/Vtb_wallace_csla_bec_mult
```

All testbenches finish in well under a second.
