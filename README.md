# 2-D symmetry IIR filters with shared multipliers

A 2-D recursive (IIR) filter for images needs one multiplier per numerator
coefficient: a 3x3 filter has 16. If the filter's magnitude response is
symmetric, many of those coefficients are equal. Diagonal symmetry leaves 10
different values, quadrantal 8, fourfold rotational 4 and octagonal 3. This
RTL groups every delayed signal that is multiplied by the same coefficient and
multiplies the group once. That removes up to 13 of the 16 numerator
multipliers.

The main design is a **multimode filter**. One datapath serves all four
symmetries, and a mode loaded with the coefficients selects which one is used.
Beside it are the eight single-symmetry filters it is built from. There are
two styles, Type-1 and Type-2, for each of the four symmetries.

The RTL implements the architectures described in the article
"Power-Efficient and Cost-Effective 2-D Symmetry Filter Architectures" for
filter order N = 3 and image width M2 = 8, the configuration the article
evaluates. Where this RTL departs from the article or fills a gap, the
sections below say so.

## The filter

Pixels arrive in raster order, one per cycle, from an image that is M2 pixels
wide. A delay of one pixel is z2^-1 = z^-1. A delay of one line is
z1^-1 = z^-M2. The transfer function has a separable denominator:

```
           sum_{i,j=0..3} a_ij z1^-i z2^-j
H = -------------------------------------------------
    (1 - sum_i b_i0 z1^-i) (1 - sum_j b_0j z2^-j)
```

The coefficients satisfy b_k0 = b_0k. The filter is split into two cascaded
recursions. The **Type-1** split runs the line recursion first:

```
Y1 = X + sum_i b0i z1^-i Y1                      (Block 1)
Y  = sum_ij a_ij z1^-i z2^-j Y1 + sum_j b0j z2^-j Y   (Block 2)
```

The **Type-2** split runs the pixel recursion first:

```
Y2 = X + sum_j b0j z2^-j Y2                      (Block 3)
Y  = sum_ij a_ij z1^-i z2^-j Y2 + sum_i b0i z1^-i Y   (Block 4)
```

Neither split adds latency. Y is combinational in the current pixel X, and
everything else comes from registers.

## Symmetry and coefficient sharing

Each symmetry is imposed by equalities among the a_ij. The numerator matrices
below have row i (power of z1) and column j (power of z2):

```
diagonal (a_ij = a_ji)   fourfold (a_ij = a_j(3-i))   quadrantal (a_ij = a_(3-i)j)   octagonal
a00 a01 a02 a03          a00 a01 a02 a00              a00 a01 a02 a03                a00 a01 a01 a00
a01 a11 a12 a13          a02 a11 a11 a01              a10 a11 a12 a13                a01 a11 a11 a01
a02 a12 a22 a23          a01 a11 a11 a02              a10 a11 a12 a13                a01 a11 a11 a01
a03 a13 a23 a33          a00 a02 a01 a00              a00 a01 a02 a03                a00 a01 a01 a00
```

Together the four symmetries use 11 distinct coefficients:
a00 a01 a02 a03 a10 a11 a12 a13 a22 a23 a33. These 11 plus b01, b02 and b03
make up one **coefficient set** (`coefs_t` in `symfilt_pkg`).

`symfilt_pkg::owner(m, i, j)` names the coefficient that a_ij equals under
symmetry m. It works as follows:

- **Diagonal:** sort (i,j).
- **Quadrantal:** fold i to min(i, 3-i).
- **Octagonal:** fold both indices, then sort them.
- **Fourfold rotational:** rotate (i,j) to (j, 3-i) until it reaches a00, a01,
  a02 or a11.

Every connection pattern in the design is derived from this one function.

Multipliers per filter, including 3 in Block 1 or Block 3 and 3 for b01..b03:

| filter | numerator multipliers | total |
|---|---|---|
| diagonal | 10 | 16 |
| fourfold rotational | 4 | 10 |
| quadrantal | 8 | 14 |
| octagonal | 3 | 9 |
| multimode | 11 | 17 |

A general 3x3 filter of the same form needs 22.

## Type-1 datapath: where the delays go

This is the part that needs care. Files: `t1_block1.sv`, `t1_block2.sv`.

**Block 1.** Y1 climbs a column of three shift registers (`line_delay`), each
M2-1 words long. The column nodes are `lvl[i] = Y1 z^-i(M2-1)`. Each node feeds
b0i. The products run back down a transposed chain with one z^-1 register per
level. That register supplies the missing pixel of each line delay, so
b0i sees Y1 delayed by exactly i*M2. No signal is broadcast to all rows.

**Block 2.** Each numerator multiplier sits on a row. The row is the z1
power of its coefficient: a_pq is on row p, column q, as in the published
figures. Block 2 keeps the fixed delays of the general Type-1 structure:

- each level node feeds a short column of two z^-1 registers, and position
  (i,j) reads it after f(j) = 0, 1, 1, 2 registers;
- inside a row, the products of columns 2 and 3 are summed and pass one z^-1
  before the products of columns 0 and 1 join, so they get d(j) = 0, 0, 1, 1
  registers;
- the row sums travel down an output chain that adds one z^-1 per row.

For a position on its own row this gives i(M2-1) + f(j) + d(j) + i = i*M2 + j,
the z1^-i z2^-j it needs. A **pre-adder** in front of each multiplier sums all
the positions that the multiplier's coefficient stands for. This is the
Type-1 rule: paths are added before the multiplier. A position (i,j) moved in
front of the multiplier of a_pq lacks

```
e = (i - p) + d(j) - d(q)
```

registers. These extra ("gray") delays are shared as the article's
delay-arrangement equation does. Each pre-adder is a short chain of stages
0 to 4. Positions needing e extra delays are added at stage e, and each stage
is passed through one z^-1 into the next lower one; stage 0 is the multiplier
input. For a01 under the octagonal symmetry this gives the delays 1, 1, 2, 2,
3, 3, 4 of its seven other positions, the same as the article's equation.

The b0j feedback mirrors row 0: b01 and b02 read Y z^-1, b03 reads Y z^-2,
and b02 and b03 join the delayed part of the row.

**Critical path.** The only tap that is combinational in X is (0,0), that is,
Y1 itself. Under every symmetry it belongs to a00. The RTL adds it last into
a00's pre-adder, and adds the a00 product last into Y. All other terms come
from registers and are summed first. The path from X is therefore the
Block 1 adder, the pre-adder, the multiplier and the final adder: Tm + 3Ta,
as in the article.

## Multimode filter and interconnection boxes

Files: `multimode_filter.sv`, `ib_ctrl.sv`. `multimode_filter` contains:

- one Block 1;
- one Block 2 with all 11 numerator multipliers;
- `ib_ctrl`.

The interconnection boxes either connect or cut a signal path. They are
modelled as two sets of enables:

- **`tap_mask[k]`** (16 bits per multiplier) selects which delayed taps enter
  the pre-adder of multiplier k.
- **`mul_on[k]`** holds a multiplier's input at 0 when the mode does not use
  it.

`mul_on` is constant 1 for a00, a01 and a11, which every mode uses. It
switches only for a02, a03, a10, a12, a13, a22, a23 and a33. These are the
eight multipliers that have a multiplier-connection box in the article.

`ib_ctrl` holds one 11x16-bit pattern per mode, computed at elaboration from
`owner()`, and selects the pattern by mode. In any mode, the multimode filter
gives bit for bit the output of the single-symmetry Type-1 filter of the same
symmetry. The testbenches check this.

## Type-2 datapath

Files: `t2_block3.sv`, `t2_block4.sv`. This is the transpose of Type-1.

- **Block 3** is a transposed three-tap recursion on Y2.
- **Block 4** keeps the fixed paths after the multipliers of the general
  Type-2 structure. In rows 1 to 3, the products of columns 2 and 3 are summed
  and pass one z^-1 before columns 0 and 1 join, so dp = 0, 0, 1, 1. Row 0
  has dp = 0, 1, 1, 2. Row i also adds b0i times Y z^-i.
- The rows are summed down a chain: row 3 -> SR -> + row 2 -> SR -> + row 1 ->
  SR -> + row 0. Each SR holds M2-1 words.
- Position (i,j) therefore still lacks pre(i,j) = i + j - dp_i(j) delays. The
  multiplier of a_pq reads Y2 z^-pre(p,q) from a shared input column, once.
  Its product runs down a dispatch line, and position (i,j) takes it after
  pre(i,j) - pre(p,q) stages. These are the shared ("gray") delays of the
  article's delay-arrangement equation. For a01 under the octagonal symmetry
  they come out as in the article. This is the Type-2 rule: paths are
  dispatched after the multiplier.
- a00*Y2 is added last, which gives the article's Tm + 2Ta path from X.

## Number format

| item | format |
|---|---|
| pixels in and out | 10-bit signed |
| internal words | 16-bit two's complement |
| coefficients | 16-bit, Q2.14 (`COEF_FRAC` = 14), range [-2, 2) |

A product is the 32-bit result of a 16x16 multiply, shifted right
arithmetically by 14 and cut to 16 bits, which truncates it. Sums wrap modulo
2^16. In the top, a pixel enters the 16-bit word shifted left by `IN_SHIFT` = 3.
That gives 3 fraction bits and leaves 3 bits of headroom. Outputs are shifted
back and saturated to 10 bits.

The article fixes the widths: 10-bit input and output, 16-bit coefficients and
registers, 16x16 multipliers. The binary point, truncation, wrap-around,
input shift and saturation are this design's choices.

Because products are truncated after each multiplier, Type-1 and Type-2
filters with the same coefficients differ in the last bits. The grouping of
taps is part of each filter's arithmetic.

## System top and interface (`symfilt_top`)

**Coefficient loading** (`coef_loader`). Write the 14 words on `coef_in`, one
per cycle with `coef_we` high, in this order:

```
b01 b02 b03 a00 a01 a02 a03 a10 a11 a12 a13 a22 a23 a33
```

Gaps between words are allowed. On the edge after the 14th word:

- all 14 words move in parallel into the working registers;
- `mode_in` is latched (0 = diagonal, 1 = fourfold rotational,
  2 = quadrantal, 3 = octagonal);
- every filter's state is cleared;
- `coef_ready` rises.

Writing a new word drops `coef_ready` until the new set is complete.

**Pixel stream.** While `coef_ready` is high, a pixel `x_in` is accepted on
every cycle with `in_valid` high. A cycle with `in_valid` low stalls every
register. The registered outputs follow one cycle after the accepted pixel,
with `out_valid` high:

- `y_mm` is the multimode filter's output;
- `y_t1[k]` and `y_t2[k]` are the outputs of the Type-1 and Type-2 filters;
- k = 0..3 is diagonal, fourfold, quadrantal, octagonal.

All nine filters share the input and the coefficient registers. Each
single-symmetry filter reads only the coefficients it uses.

Parameters: `M2` (image width, default 8) and `IN_SHIFT` (default 3). N = 3 is
fixed by the structure. The image height does not matter: the filters store
three lines, not a frame.

## Files

| file | role |
|---|---|
| `symfilt_pkg.sv` | formats, `coefs_t`, `mode_t`, `cmul`, `owner`, connection patterns |
| `line_delay.sv` | shift register of M2-1 words |
| `t1_block1.sv`, `t1_block2.sv` | Type-1 Block 1 and Block 2 |
| `ib_ctrl.sv`, `multimode_filter.sv` | multimode filter |
| `t1_{diag,frot,quad,oct}_filter.sv` | Type-1 single-symmetry filters |
| `t2_block3.sv`, `t2_block4.sv` | Type-2 Block 3 and Block 4 |
| `t2_{diag,frot,quad,oct}_filter.sv` | Type-2 single-symmetry filters |
| `coef_loader.sv`, `symfilt_top.sv` | coefficient input and top |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, plus:

- `symfilt_ref_pkg.sv`, a software model that evaluates the difference
  equations on the pixel history, with the sharing matrices written out by
  hand;
- `filter_tb_body.svh`, the body shared by the filter testbenches.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/symfilt_pkg.sv tb/symfilt_ref_pkg.sv tb/tb_symfilt_top.sv --top-module tb_symfilt_top
./obj_dir/Vtb_symfilt_top
```

`tb_symfilt_top` runs at the default size. It reproduces the article's power
evaluation workload:

- 100 coefficient sets with stable denominators, with the mode cycling
  through all four;
- 1000 random pixels per set, with random stalls;
- some pixels offered while a set is loading, which must be ignored;
- every tenth set with large coefficients, so that the outputs saturate.

It compares all nine outputs with the model on every pixel, about 1.1 million
checks, and takes about a second. It also counts:

- parallel loads;
- mode switches;
- each mode;
- stalls;
- ignored pixels;
- saturations.

It fails if any of these never occurs.

## Departures from the article and limits

- **Interconnection boxes.** The boxes are not copied switch by switch. The
  connection patterns are derived from the sharing rules above, and the box
  layout is this design's own. The behaviour in each mode is the one the
  article specifies.
- **Delay arrangement.** Both filter types follow the article's delay
  arrangement: the fixed delays of the general structures are kept and the
  extra delays of shared positions are merged, before the multiplier in
  Type-1 and after it in Type-2. The arrangement is built by one rule for
  every symmetry, not copied from the drawings, so register counts can differ
  from them. Block 3 has its own z^-1 chain instead of sharing one register
  with Block 4 as the general Type-2 drawing does. Adder counts also differ;
  for example, the article gives 27 adders for the multimode filter.
- **Critical paths.** The paths from X match Tm+3Ta (Type-1) and Tm+2Ta
  (Type-2). The sums after the multipliers are ordered as adder trees. In
  Type-2 no product then meets more than two adders before a register, so
  every path is within Tm+2Ta. In Type-1 at most three adders follow a
  multiplier. A path that starts at a register also crosses the pre-adder
  stage, one adder (two for a02 under fourfold rotational symmetry), so it
  can reach Tm+4Ta or Tm+5Ta. The article states only the Tm+3Ta figure.
- **Added logic.** The clock enable, synchronous clear, mode latch, output
  register and saturation are additions.
- **Not built.** The comparison designs are not included: the conventional
  2-D filter, and the general (non-symmetric) Type-1 and Type-2 separable
  filters.
- **Not modelled.** The article's power and area figures come from a 0.18 um
  standard-cell implementation and are not reproduced or modelled here.
