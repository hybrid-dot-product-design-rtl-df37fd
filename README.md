# Hybrid bfloat16 dot product for FPGAs with floating-point DSP blocks

This design computes

    P = A_0*B_0 + A_1*B_1 + ... + A_{n-1}*B_{n-1} + ACC

with bfloat16 vectors `A` and `B` (8 exponent bits, 7 fraction bits) and an
IEEE-754 single-precision (SP) accumulator input `ACC` and result `P`. This is
the inner kernel of neural-network training on FPGAs.

On FPGAs whose DSP blocks have hardened SP arithmetic, the obvious mapping is
one DSP block per product, chained through the blocks' adders. Then the
DSP count alone limits how many products a device can compute, and most of
the device's logic sits unused. The hybrid design splits the n products into
two groups:

* **α products in soft logic.** A fused, custom-precision dot product built
  from the device's logic and small fixed-point multipliers. Four bfloat16
  products cost about one DSP block's worth of fixed-point multipliers.
* **β products in hard FP.** DSP blocks in SP mode, chained, one block per
  product.

A core therefore uses about α/4 + β DSP blocks. Changing the split moves the
core's ratio of logic to DSPs towards the ratio of the target device.
The accuracy of the soft part is set by one knob, `W`: the number of fraction
bits each soft product keeps.

The default build is n = 16, split as α = 12 soft products plus β = 4 hard ones
(2 "green" + 2 "blue", see below), with W = 8. This configuration uses
3 + 4 = 7 DSP blocks.

```
 A[0..11],B[0..11]            A[12..13],B[12..13]   A[14..15],B[14..15]   ACC
        |                             |                     |              |
 +------v---------------+     +-------v-------+     +-------v--------------v--+
 | soft_dot             |     | green chain   |     | blue chain              |
 |  12 fused multipliers| P_g | P_g = p12+p13 |     | P_b = p14 + (p15 + ACC) |
 |  adder tree  <-------+-----+               |     |                         |
 |  normalize -> P_l ---+---->| spare adder: P = P_l + P_b <-------------------+
 +----------------------+     +-------+-------+     +-------------------------+
                                      v
                                      P
```

## Hard FP part: two chains and a spare adder (`hard_fp_dot`)

Each DSP block (`dsp_fp32_block`) contains an SP multiplier (`fp32_mul`) and an
SP adder (`fp32_add`). The adder's first operand is either the block's own
product or its third input `az`. Its second operand is either the chain input
from the neighbouring block or `az`. The chain output carries either the
block's sum or its raw product. All three are static parameters.

ACC must be added without spending a fifth DSP block on it. The β blocks
therefore form two chains:

* **Blue chain** (`BETA_B` blocks): `P_b = q0 + (q1 + ... + (q_last + ACC))`.
  The last blue block adds ACC through its third input.
* **Green chain** (`BETA_G` blocks): `P_g = p0 + (p1 + ... + p_last)`.
  The last green block sends its *product* down the chain, so its adder is
  free.

The freed adder is the **spare adder**. Its third input is `P_l`, the soft
part's result, and its chain input is `P_b`, so it produces `P = P_l + P_b`.
`P_g` does not go to the output directly. It is merged into the soft adder
tree, which makes `P_l` already include the green products.

The hard arithmetic rounds every multiply and add to nearest-even SP. The
bfloat16 operands enter the SP multipliers with 16 zero bits appended. On
the FPGA these blocks are hardened. Here they are portable RTL with these
rules:

* subnormal inputs are read as zero;
* results below the normal range flush to a signed zero;
* overflow gives infinity;
* NaN, or an invalid operation, gives the quiet NaN `0x7FC00000`.

## Soft-logic part: an unnormalized tree with truncation (`soft_dot`)

This is the part that takes some care to understand. The soft dot product is
*fused*: it is not assembled from IEEE operators. It saves logic in three ways:

1. **No normalization inside the tree.** Products and partial sums keep their
   leading bit wherever it lands. The datapath widens instead of shifting
   back.
2. **Truncation instead of round-to-nearest.** Rounding to nearest needs an
   incrementer, which can also change the exponent. Truncation needs neither.
3. **Two's-complement mantissas in the adders.** Signs need no separate
   handling in the adders.

### Internal number format

Every operand in the tree is a pair (`e`, `m`):

* `e` is a signed `EXP_W`-bit (default 10) exponent, biased like an SP
  exponent;
* `m` is a two's-complement mantissa with `F` fraction bits, where `F` is
  fixed for each tree level.

The value is `m * 2^(e - 127 - F)`. Zero is `m = 0` with the most negative
exponent, so that alignment never prefers a zero over a real operand.

**Leaves (`bf16_soft_mult`).** Each leaf multiplies the two 8-bit
significands into a 16-bit product in [1, 4). The product has 2 integer bits
and 14 fraction bits.

* The fraction is truncated to `W` bits.
* The sign is applied, which gives a `(W+3)`-bit mantissa with `F = W`.
* The exponent is `ea + eb - 127`, with no range check.

The 10-bit exponent holds products far above or below the SP range, so a
product can temporarily overflow SP and still be cancelled later.
On the FPGA two such 8x8 multipliers share one 18x18 multiplier. This RTL
writes them as plain products and leaves that packing to the tool.

**Tree nodes (`soft_fp_adder`).** A node works in three steps:

1. It keeps the larger exponent.
2. It widens both mantissas by one fraction bit.
3. It shifts the smaller operand right by the exponent difference, then adds.

The output is two bits wider than the input. One bit is a new integer bit for
the carry. The other is a new fraction bit that keeps one more bit of the
shifted operand. Level `k` therefore carries `W+3+2k`-bit mantissas with
`W+k` fraction bits. Bits shifted out are dropped. This is an arithmetic shift
of a two's-complement number, so a negative operand is truncated toward
minus infinity rather than toward zero. That saves an incrementer.

**Tree shape and the P_g merge.** Operands are paired in index order. If a
level has an odd count, its last operand moves up unchanged; only its format
is widened exactly. `P_g` enters at the first level whose count is odd, and
fills the gap there. If no level has an odd count, `P_g` joins at the root
and adds one level. On entry (`pg_merge_conv`), its 24-bit significand is
placed with the leading one directly below the sign bit, so the level keeps
as much of it as its width allows. If the level is narrower than 24 bits,
the rest is truncated. The exponent is set so that the value is unchanged:
`e = e_Pg - level - 1`.

For the defaults (α = 12, W = 8):

| level | operands              | mantissa bits | fraction bits |
|-------|-----------------------|---------------|---------------|
| 0     | 12 products           | 11            | 8             |
| 1     | 6                     | 13            | 9             |
| 2     | 3 sums + P_g = 4      | 15            | 10            |
| 3     | 2                     | 17            | 11            |
| 4     | 1 (root)              | 19            | 12            |

**Normalization (`soft_normalize`).** The root is converted to SP once, at
the end:

1. take the magnitude and find its leading one;
2. shift the leading one to the top;
3. keep the next 23 bits as the SP fraction, truncating the rest;
4. set the exponent to `e + position - F`.

A result below the SP normal range becomes zero, and one above it becomes
infinity. The soft part does not recognise infinity or NaN operands: it
treats them as ordinary numbers with exponent 255.

### Accuracy

Each product loses less than `2^-W` of its own magnitude. Each tree node loses
less than one unit in its output's last place, relative to the larger
exponent. The error of `P` is therefore bounded by a small multiple of
`2^-W` times the sum of the magnitudes of the terms. The testbenches check
the bound `2^-(W-3) * sum|A_i*B_i|`. A larger `W` costs more logic and gives
a smaller error. The hard products are exact SP products, so moving
products from soft to hard (a larger β) also improves accuracy.

## Interface and timing (`hybrid_dot_top`)

| port        | dir | width        | meaning                                      |
|-------------|-----|--------------|----------------------------------------------|
| `clk`       | in  | 1            | clock                                        |
| `rst_n`     | in  | 1            | synchronous, active low; clears valid flags  |
| `in_valid`  | in  | 1            | `a`, `b`, `acc` hold an operation            |
| `a`, `b`    | in  | 16 x n       | bfloat16 vectors, n = ALPHA+BETA_G+BETA_B    |
| `acc`       | in  | 32           | SP value added to the dot product            |
| `out_valid` | out | 1            | `p` holds a result                           |
| `p`         | out | 32           | SP result                                    |

Elements `a[0..ALPHA-1]` go to the soft part, the next `BETA_G` to the green
chain and the last `BETA_B` to the blue chain. Inputs are registered on
`in_valid`. The whole datapath between the registers is combinational, and the
result is registered again. `p` appears with `out_valid` two cycles after
`in_valid`, and a new operation may start every cycle. A real implementation
at speed needs pipeline registers inside the datapath, in the DSP blocks and
between tree levels. Those registers would have to balance the combinational
path `P_g -> soft tree -> P_l -> spare adder`. They are not included here.

## Parameters

| parameter | default | meaning                                                   |
|-----------|---------|-----------------------------------------------------------|
| `ALPHA`   | 12      | number of soft-logic products                             |
| `BETA_G`  | 2       | green-chain DSP blocks (≥ 1; its last block is the spare) |
| `BETA_B`  | 2       | blue-chain DSP blocks (≥ 1; its last block adds ACC)      |
| `W`       | 8       | fraction bits kept per soft product (1..14; 7–9 typical)  |
| `EXP_W`   | 10      | width of the soft part's extended exponent                |

Two n = 16 splits are worth knowing:

* **12 / 2 / 2** (the default): 7 DSP blocks.
* **10 / 4 / 2**: 8.5 DSP blocks, counting a pair of 8x8 multipliers as half
  a block. This split uses more DSPs and less logic.

## How far this RTL follows its source, and where it departs

Taken from the source design:

* the α/β split;
* the green and blue chains, the spare adder and `P = P_l + P_b`;
* ACC added in the blue chain;
* `P_g` merged into the soft tree, keeping its precision;
* the fused soft multipliers: no normalization, truncation to `W` bits, an
  extended exponent;
* two's-complement tree adders that widen by two bits per level;
* one normalization stage at the end;
* the default configuration.

Choices made in this design:

* the exponent width (10 bits);
* the tree's pairing order and the level at which `P_g` joins;
* truncation toward minus infinity for negative operands in the tree;
* truncation in the final normalization;
* the handling of zero, subnormal, infinity and NaN values in both parts;
* the two-register timing with no internal pipeline.

Left out:

* the packing of two 8x8 multipliers into one 18x18 DSP multiplier;
* the DSP blocks' internal registers;
* any device-specific mapping.

The logic and DSP figures of an FPGA implementation cannot be reproduced
from this RTL.

## Files

`rtl/`:

* `hd_pkg.sv`: shared types, DSP operand-select enums, tree-shape functions.
* `fp32_mul.sv`, `fp32_add.sv`: SP multiplier and adder.
* `dsp_fp32_block.sv`: one FP-mode DSP block.
* `hard_fp_dot.sv`: green and blue chains plus the spare adder.
* `bf16_soft_mult.sv`, `soft_fp_adder.sv`, `pg_merge_conv.sv`,
  `soft_normalize.sv`: soft-part building blocks.
* `soft_dot.sv`: the soft-logic dot product.
* `hybrid_dot_top.sv`: the top level.

`tb/`:

* `hd_ref_pkg.sv`: reference models. They work on double-precision reals and
  `$floor`, not on the RTL's bit fields.
* `tb_<module>.sv`: one self-checking testbench per module.

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_hybrid_dot_top` runs the top at its default parameters. It streams 4000
operations with random idle gaps and checks each result bit for bit and for
its two-cycle latency. It also checks the error bound. The test fails if any
of these is never exercised: ACC, the `P_g` merge, alignment loss, negative
soft sums, soft products outside the SP range, cancellation, zero operands,
overflow, back-to-back and gapped issue. It also prints the mean relative
error against the exact result.

Two further testbenches run other configurations:

* `tb_table2_split` builds the 10 / 4 / 2 split at W = 7, 8 and 9 and
  checks it bit for bit. With ALPHA = 10, `P_g` joins at level 1, and level 2
  passes one operand up unpaired.
* `tb_table1_accuracy` is an accuracy experiment with 8 soft and 4 hard
  products at W = 7, 8 and 9. Inputs are random reals with exponents spread
  over ±5, ±10 or ±20, rounded to bfloat16. The error is measured against the
  exact result of the unrounded reals. A plain bfloat16 + SP chain serves as
  the baseline. Its output shows the error falling as W grows. At W = 9 the
  hybrid comes within a few percent of the SP chain's error:

| exponent spread | W = 7   | W = 8   | W = 9   | bf16 + SP chain |
|-----------------|---------|---------|---------|-----------------|
| ±5              | 2.5e-3  | 2.1e-3  | 1.9e-3  | 1.9e-3          |
| ±10             | 2.4e-3  | 1.9e-3  | 1.7e-3  | 1.7e-3          |
| ±20             | 1.9e-3  | 1.6e-3  | 1.5e-3  | 1.5e-3          |

The table gives the aggregate error, sum|error| / sum|exact|. Most of the
baseline's error comes from rounding the inputs to bfloat16.

To simulate, for example the top level:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/hd_pkg.sv tb/hd_ref_pkg.sv tb/tb_hybrid_dot_top.sv \
    --top-module tb_hybrid_dot_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_hybrid_dot_top` with any other testbench name to run it. To try
another split or precision, override `ALPHA`, `BETA_G`, `BETA_B` and `W` on
`hybrid_dot_top`. The tree shape, the widths and the `P_g` merge level follow
from them. `tb_soft_dot` exercises the three possible merge positions: the
leaves, a middle level and the root.
