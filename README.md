# Parallel 8x8 DCT with shift-and-add constant multipliers

This is a two-dimensional discrete cosine transform (DCT) for 8x8 blocks of signed 8-bit samples, the
transform at the heart of JPEG. It takes one column of a block per clock and, after a short fill,
gives one row of coefficients per clock. Throughput is one 8x8 block every 8 clocks. The aim is high
clock rate and little hardware, and the whole transform contains no general multiplier:

* Every weight of the DCT is a constant. A weight is stored as a sign and a 6-bit binary fraction.
  Multiplying by it takes six rows of AND gates, one per weight bit.
* All the AND rows of one output coefficient are added at once in a carry-save adder (CSA) tree. A
  single carry-lookahead adder (CLA) at the end turns the result into a binary number.
* Each 1D transform is one clock of this logic followed by a register. All 8 coefficients are
  computed in parallel.

The RTL follows a published VHDL design: its block structure, unit names (VI, VI0, VII, VII0),
adder tree and bit widths. It adds what that design leaves open: number format, rounding,
pipelining, the buffer between the two 1D stages, handshake and reset. The section
"Choices made in this RTL" lists these.

## What is computed

For a block X (rows i, columns j, N = 8):

    Z_pj = sum_i X_ij * C(p,i)          first 1D-DCT, one column j per clock
    S_pq = sum_j Z_pj * C(q,j)          second 1D-DCT, one row p per clock
    C(p,i) = cos((2i+1) p pi / 2N)      held as round(64*C)/64

`out_row` carries **S_pq unnormalised**. The orthonormal DCT is

    Y_pq = E_p * E_q * (2/N) * S_pq,    E_0 = 1/sqrt(2), E_k = 1 otherwise

so for N = 8, `Y_pq = S_pq/4`, divided by sqrt(2) once for p = 0 and once for q = 0. The scaling is
left to the consumer. In a JPEG encoder it folds into the quantisation table.

Samples are two's complement, -128..127: pixels after the usual JPEG level shift (subtract 128).
Each stage drops its six fraction bits with an arithmetic right shift, which rounds towards minus
infinity. So the result is close to the exact transform, but not equal to it. On full-scale test
blocks the largest deviation of S from the exact real-valued sum was about 28, on values up to 8192.
That is about 7 units of Y. Random blocks stay much closer. The testbench checks every output
against a bound worked out from the weight rounding.

| signal                    | width (N = 8)  | range held              |
|---------------------------|----------------|-------------------------|
| sample X                  | 8              | -128..127               |
| butterfly result, stage 1 | 9              | -256..255               |
| Z (between the stages)    | 12             | -2048..2047             |
| butterfly result, stage 2 | 13             |                         |
| S (output)                | 16             | full range of any block |

## One 1D stage (`dct_1d`)

```
 x0..x7 ──► dct_butterfly ──► s0..s3 = x_i + x_(7-i) ──► dct_vi0_unit        ──► Z0 ─┐
                          │                           └─► dct_vi_unit p=2,4,6 ──► Z2,Z4,Z6
                          └─► d0..d3 = x_i - x_(7-i) ──► dct_vi_unit p=1,3,5,7 ─► Z1,Z3,Z5,Z7
                                                            all eight ──► register ──► z
```

**Butterfly.** The DCT weights of a row are symmetric or antisymmetric about the middle of the
input vector. So the mirrored pair x_i and x_(7-i) is added once for the even rows and subtracted
once for the odd rows. Each row then needs only 4 products instead of 8. The butterfly results are
one bit wider than the inputs.

**Row 0 (`dct_vi0_unit`, "VI0").** Every weight of row 0 is cos 0 = 1, so Z0 = s0+s1+s2+s3 needs
no multiplier. Two CSAs reduce the four operands to a sum/carry pair, and a CLA adds them
(`dct_csa_chain`).

**Rows 1..7 (`dct_vi_unit`, "VI").** Z_p = sum over m of I_m * C(p,m), where I_m are the sums (even
p) or the differences (odd p). This is the most involved part of the design:

1. *Partial products* (`dct_coef_mult`). The weight of operand m has magnitude bits c(0)..c(5).
   Partial product k is the operand shifted left by k and ANDed with c(k). A 9-bit operand thus
   yields rows covering bits 0-8, 1-9, ..., 5-13. A negative weight negates the operand first,
   which needs one extra bit so that -256 stays representable. Every row is sign-extended to the
   tree width, W = 18 bits in stage 1. There are 4 operands × 6 bits = 24 partial products, S0..S23.
   S(4k+m) is bit k of operand m, so S0..S3 form the shift-0 group, S4..S7 the shift-1 group, and
   so on.
2. *Carry-save tree* (`dct_pp_sum`). 22 CSAs reduce the 24 vectors to two, and one CLA adds those
   two. The wiring is the original design's. In the RTL the nets keep that design's names
   S24..S67:
   * level 1: each shift group adds its first three products (S25/S24 .. S35/S34);
   * level 2: each group's fourth product joins (S37/S36 .. S47/S46);
   * levels 3-7: neighbouring groups merge pairwise (S49/S48 .. S67/S66), and the CLA adds the
     last pair.

   Any 3:2 tree of 24 inputs has exactly 22 CSAs. This one is 7 CSAs deep.
3. *Fraction drop.* The sum is shifted right arithmetically by 6 bits. The result is Z_p in the
   same integer scale as Z0.

There are no multipliers or carry chains inside the tree. The only carry propagation per
coefficient is the final CLA (`cla`), which uses 4-bit lookahead groups.

**The weights** (`dct_pkg::coef`) are min(63, round(64*|cos(k*pi/32)|)), with the sign from the
quadrant:

| k·π/16 | 1  | 2  | 3  | 4  | 5  | 6  | 7  |
|--------|----|----|----|----|----|----|----|
| 64·cos | 63 | 59 | 53 | 45 | 36 | 24 | 12 |

For N = 8, row p uses the angle (2m+1)·p·π/16 for operand m. For example, row 1 uses +63, +53,
+36 and +12 on the differences.

Stage 1 uses `dct_1d` with 8-bit inputs and 12-bit outputs (units VI/VI0). Stage 2 uses the same
module with 12-bit inputs and 16-bit outputs (units VII/VII0). There the butterfly gives 13 bits
and the tree is 22 bits wide.

## Between the stages (`dct_transpose`)

Stage 1 produces columns (Z_0j..Z_7j), and stage 2 needs rows (Z_p0..Z_p7). The transpose has two
banks of 8x8 registers of 12 bits each, 1536 flip-flops in all:

* Columns are written into the fill bank, one per valid clock.
* On the clock that writes the 8th column, the banks swap. The full bank is then read on the next
  8 clocks, one row per clock, through an 8:1 multiplexer per word. Meanwhile the next block fills
  the other bank.
* A bank cannot refill in fewer than 8 clocks, so a read always finishes before its bank is
  overwritten. The input never has to wait, and there is no back-pressure signal.

An assertion (`a_no_overrun`) states this rule.

## Interface and timing (`dct_2d`, the top)

| port        | dir | width           | meaning                                            |
|-------------|-----|-----------------|----------------------------------------------------|
| `clk`       | in  | 1               | clock (the original design targets 100 MHz)        |
| `rst_n`     | in  | 1               | synchronous, active low                            |
| `in_valid`  | in  | 1               | `in_col` holds a column                            |
| `in_col`    | in  | N x IW          | `in_col[i]` = X_ij of column j, signed             |
| `out_valid` | out | 1               | `out_row` holds a row                              |
| `out_p`     | out | log2 N          | row index p                                        |
| `out_row`   | out | N x OUTW        | `out_row[q]` = S_pq, signed                        |
| `out_last`  | out | 1               | row N-1 of a block                                 |

* **Input order.** Send columns j = 0..N-1 in order. Idle clocks are allowed inside and between
  blocks. The column counter only advances on `in_valid`, so a block is just the next N valid
  columns.
* **Latency.** Row 0 appears 3 clocks after the clock that accepted column N-1: stage-1 register,
  then transpose bank swap, then stage-2 register. Rows 1..N-1 follow on consecutive clocks.
* **Reset.** Reset drops a partly received block.

| parameter | default | meaning                                                     |
|-----------|---------|-------------------------------------------------------------|
| `N`       | 8       | block size: 4, 8 or 16                                      |
| `IW`      | 8       | sample width                                                |
| `MW`      | 12      | width between the stages, IW + log2 N + 1                   |
| `CW`      | 6       | weight fraction bits (the weight functions assume 6)        |
| `OUTW`    | 16      | output width, MW + log2 N + 1                               |

N = 4 and N = 16 build the same structure with N/2 butterfly cells and N-1 weighted units per
stage. The original design only draws the 24-input adder tree of N = 8. For other sizes the partial
products go through a CSA chain with the same adder count. For N = 16, the weight cos(π/32) rounds
to 64/64, which does not fit six fraction bits, so it is clamped to 63/64.

## Choices made in this RTL

The original design gives the following:

* the butterfly;
* the split into a row-0 unit and weighted units;
* the AND-gate partial products;
* the 22-CSA tree with its node names;
* the two CSAs and a CLA of row 0;
* the 8-bit input, the 9-bit first-stage operands and the 12-bit second-stage inputs;
* 6-bit weight fractions;
* one 10 ns clock per stage.

This RTL decides the rest:

* **Signed samples.** Signed (level-shifted) samples keep both butterfly sums and differences
  within 9 bits.
* **Weights.** Rounded to nearest. A negative weight negates the operand before the AND rows. The
  N = 16 clamp is described above.
* **Constant weights.** Weights are module parameters. The original design keeps each weight in a
  register inside its cell, but nothing ever loads it, so a constant does the same. Synthesis then
  reduces the AND rows to wiring, and the multiplier's cost lies in its adder tree.
* **Fraction handling.** Fraction bits are dropped by floor, once per stage.
* **No normalisation.** The output is not scaled by E_p·E_q·2/N.
* **Pipeline.** One register after each 1D stage, with none inside the arithmetic. Whether the
  combinational path meets 10 ns depends on the target technology. The RTL does not show it.
* **Transpose.** A double-buffered register transpose. The original design only mentions
  registers and multiplexers after the units.
* **Handshake and reset.** A valid-only handshake, the `out_p`/`out_last` tags and a synchronous
  reset.
* **Sizes.** Support for N = 4 and 16, with a CSA chain instead of a drawn tree.
* **CSA outputs.** In each CSA, which output is called the sum and which the carry, and which half
  of a split pair goes to which next CSA. Neither changes any result.

## Files

| file                    | contents                                                          |
|-------------------------|-------------------------------------------------------------------|
| `rtl/dct_pkg.sv`        | weight table and sign/angle folding functions                     |
| `rtl/csa.sv`            | W-bit carry-save adder (3:2)                                      |
| `rtl/cla.sv`            | W-bit carry-lookahead adder, 4-bit groups                         |
| `rtl/dct_butterfly.sv`  | N/2 sum and difference cells                                      |
| `rtl/dct_coef_mult.sv`  | AND-gate partial products of one constant weight                  |
| `rtl/dct_pp_sum.sv`     | 24-input CSA tree (22 CSAs) and CLA, N = 8                        |
| `rtl/dct_csa_chain.sv`  | CSA chain and CLA: row 0, and weighted rows for N ≠ 8              |
| `rtl/dct_vi_unit.sv`    | one weighted coefficient Z_p (VI / VII)                           |
| `rtl/dct_vi0_unit.sv`   | coefficient Z_0 (VI0 / VII0)                                      |
| `rtl/dct_1d.sv`         | one registered 1D-DCT stage                                       |
| `rtl/dct_transpose.sv`  | double-buffered transpose                                         |
| `rtl/dct_2d.sv`         | top: stage 1, transpose, stage 2                                  |
| `tb/dct_ref_pkg.sv`     | reference arithmetic for the testbenches, built from `$cos`       |
| `tb/tb_*.sv`            | one self-checking testbench per module, plus `tb_dct_2d_sizes`    |

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=<n> failures=<m>`, and each has a
watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -Itb -y tb \
        rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct_2d.sv --top-module tb_dct_2d
    ./obj_dir/Vtb_dct_2d

Replace `tb_dct_2d` with any other testbench name. Every testbench runs in well under a second.

What they check:

* **`tb_dct_2d`** runs 60 blocks through the top at its default parameters. Blocks arrive back to
  back (the bank swap under load), with idle clocks inside, and at full scale (all -128, all +127,
  a ±checkerboard). One reset arrives in the middle of a block. Each output is compared
  bit-exactly with an independent model, which does the direct 8-term sums with `$cos`-derived
  weights and floor. Each output must also lie within the analytic rounding bound of the exact
  real transform. The row timing, `out_p` and `out_last` are checked on every clock, and each of
  the four situations above is counted and must occur.
* **`tb_dct_2d_sizes`** does the same, bit-exactly, for N = 4 and N = 16 with blocks back to back.
* **Unit testbenches** cover the 1D stage at both widths (including one-clock latency), each
  weighted unit for all seven rows at both widths, the row-0 units, the partial products of
  positive, negative and sparse weights, the 24-input tree (every input reaches the output), the
  transpose (gaps, back to back, rd_last), and the CSA and CLA.

To change the weight precision, edit `dct_pkg::cos32` (the table is round(64·cos(kπ/32))) together
with `CW`. The 24-input tree in `dct_pp_sum` is specific to 4 operands × 6 bits. Other shapes fall
back to `dct_csa_chain` automatically.
