# Dynamically truncated approximate pipelined multiplier (8 x 8)

An unsigned 8 x 8 multiplier that gives up exactness for lower energy and a
shorter critical path, and lets the user decide, operation by operation, how
much accuracy to give up. Two mechanisms do this:

* **Fixed approximation in the low columns.** The least significant half of
  the partial-product matrix is reduced with cheap logic: OR gates in
  columns 0 to 3 and approximate 4:2 compressors in columns 4 to 6. These
  are sometimes wrong. Column 7 uses compressors that flag their one wrong
  case, and the flag corrects the result. The upper half (columns 8 to 14)
  is reduced exactly.
* **Dynamic input truncation.** A 5-bit control word `trunc` can switch off
  whole groups of three partial-product columns at run time. A switched-off
  group contributes nothing, and its adder cells see no toggling, which is
  where the power saving comes from. A neural-network accelerator, for
  example, can choose `trunc` per layer.

The combinational multiplier sits between an input register and an output
register, so a new multiplication can start every clock cycle and its
product appears two cycles later.

## Interface and timing

`approx_pipe_mult` (top):

| port      | dir | width | meaning |
|-----------|-----|-------|---------|
| `clk`     | in  | 1  | clock, rising edge |
| `rst`     | in  | 1  | synchronous, active high; clears every register |
| `a`       | in  | 8  | multiplicand, unsigned |
| `b`       | in  | 8  | multiplier, unsigned |
| `trunc`   | in  | 5  | truncation word, see below |
| `product` | out | 16 | approximate product |
| `edc_err` | out | 2  | error flags of the two column-7 compressors for this product (informative, already compensated) |

`a`, `b` and `trunc` are captured together at a rising edge n. The product
of those operands is on `product` after edge n+1. There is no handshake: every
cycle is an operation, and throughput is one product per cycle. After reset,
`product` reads 0.

## The truncation word

Partial product `pp[i][j] = b[i] & a[j]` has weight 2^(i+j), so it lies in
column i+j (0 to 14). The fifteen columns form five groups of three. Bit k of
`trunc` governs group k. A 1 forces every partial product of that group to
zero:

| `trunc` bit | 4       | 3      | 2     | 1     | 0     |
|-------------|---------|--------|-------|-------|-------|
| columns     | 14..12  | 11..9  | 8..6  | 5..3  | 2..0  |

For example, `trunc = 5'b00101` keeps columns 14..9 and 5..3 and drops
columns 8..6 and 2..0. `trunc = 0` is the most accurate setting. `trunc =
5'b11111` always gives 0.

Each partial product costs two 2-input AND gates:
`pp[i][j] = (~trunc[k] & b[i]) & a[j]`. The first gate is shared. For a
given row i and group k, the mask `~trunc[k] & b[i]` is formed once and used
by every partial product of that row in that group (`trunc_pp_gen`).

## The reduction tree

This is the core of the design (`pp_reduction`). Column c of an 8 x 8 matrix
holds min(c+1, 15-c) bits. The tree takes a column's bits in row order,
lowest multiplier row first, and treats the three regions differently.

### Columns 0..3: OR, no carries

Each column is collapsed into one bit, the OR of its partial products. No
carry leaves these columns, so a column with m ones counts as 1 instead of
m. The result can only be too small there, by at most 0+1*2+2*4+3*8 = 34.
This costs little, because these columns weigh 1 to 8.

### Columns 4..6: the approximate 4:2 compressor

`approx_compressor42` turns four bits of equal weight into two bits, with no
carry-in and no carry-out:

```
carry = a1 | a2                      (weight 2)
sum   = (a1 ^ a2) ? (a3 & a4) : (a3 | a4)   (weight 1)
```

The carry is a single OR gate and the sum a multiplexer. The value
2*carry + sum equals the number of ones for 12 of the 16 inputs. It is one
too high for `a1..a4 = 1000` and `0100`, and one too low for `0011` and
`1111`. Each of columns 4, 5 and 6 passes its four lowest-row bits through
one such compressor. Their remaining bits pass through unchanged.

### Column 7: error-detecting compressor with compensation

Column 7 holds eight bits, which go into two `edc_compressor42`s:

```
w1 = x1&x2   w2 = x1|x2   w3 = x3&x4   w4 = x3|x4
w5 = w1|w3   w6 = w2&w4
carry = w5|w6   sum = w5^w2^w4   error = w1&w3
```

The carry is always right. The only wrong input is `1111`, which gives 3
instead of 4, and `error` is 1 exactly then. This design adds each `error`
bit back into column 7 in the next reduction level, so column 7 is exact.
`edc_err` shows the two flags.

### Columns 8..14: exact

The upper columns are reduced exactly. The tree uses `acc_compressor42`
(two chained full adders: x1+x2+x3 -> s, cout; s+x4+cin -> sum, carry), full
adders and half adders. A compressor's `cout` feeds the `cin` of the
compressor one column up. `cout` does not depend on `cin`, so the chain does
not ripple.

### Levels and bit counts

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| partial products | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 |
| after level 1 (stage 2) | 1 | 1 | 1 | 1 | 2 | 4 | 5 | 5 | 2 | 2 | 3 | 3 | 1 | 2 | 2 |
| after level 2 (stage 3) | 1 | 1 | 1 | 1 | 2 | 2 | 2 | 2 | 1 | 2 | 2 | 2 | 2 | 2 | 2 |

Level-1 counts include the carries that arrive from the column below. Column
7's five bits are two compressor sums, one carry from column 6 and two
compensation bits. From the second level on, every counter is exact: full
adders, half adders and exact 4:2 compressors. A 16-bit carry-propagate
adder (`+`, architecture left to synthesis) adds the final two rows.

Because everything after the first level is exact, the product is

```
product = sum over columns 0..3 of  OR(column bits)            * 2^c
        + sum over columns 4..6 of (ones + compressor error)   * 2^c
        + sum over columns 7..14 of ones                       * 2^c
```

Here "ones" counts the partial products left after truncation, and
"compressor error" is the +1/-1/0 of the approximate compressor on the
column's four lowest-row bits. The testbenches use this closed form as
their reference model (`tb/amul_ref_pkg.sv`).

## Accuracy

Exhaustive simulation over all 65,536 operand pairs gives the results below.
The error rate is the fraction of products that differ from the exact
product. MRED is the mean of |approximate - exact| / exact over non-zero
exact products.

| `trunc` | error rate | MRED |
|---------|-----------:|-----:|
| 00000 | 67.2 % | 0.0100 |
| 00001 | 80.1 % | 0.0106 |
| 00010 | 93.2 % | 0.0239 |
| 00011 | 94.5 % | 0.0256 |
| 00100 | 98.3 % | 0.136 |
| 00111 | 98.7 % | 0.163 |
| 01000 | 96.5 % | 0.370 |
| 10000 | 88.9 % | 0.478 |
| 11111 | 99.2 % | 1.000 |

`tb_approx_mult_core` prints the table for all 32 words. The words that
leave the upper columns alone (`trunc[4:3] = 00`) are the useful ones. The
others remove most of the product and serve only as extreme power settings.

With `a = 103`, `b = 96` and `trunc` stepped from 0 to 13, the products are
9888, 9888, 9856, 9856, 9248, 9248, 9216, 9216, 4768, 4768, 4736, 4736, 4128
and 4128. Bit 0 has no effect here, because b = 96 has no partial products
below column 5.

## Departures and choices

The description this RTL follows gives the compressor equations, the
truncation scheme, the column regions, the counter types and the pipeline
flow. It does not give the exact placement of each bit in the tree. The
following are this design's own choices:

* **Pipeline depth.** The only registers are one on the inputs and one on the
  output, as in the published flow. There are no registers between
  compression levels.
* **Reset, signedness and handshake.** Reset is synchronous and active high.
  Operands are unsigned. There is no valid/ready.
* **Bit placement.** Which bits meet in which compressor, and in which
  order, is this design's choice.
* **Error compensation.** The compensation for the column-7 compressors adds
  each error flag back as a column-7 bit. The published text names "a simple
  error compensation circuit" without its structure.
* **Conflicting truth table.** The published truth table for the proposed
  compressor does not match its published equations and gate diagram: for
  `0011` it gives carry 1, sum 0, but `carry = a1 | a2` gives 0. The table
  matches the error-detecting compressor row for row. This RTL follows the
  equations and the diagram for `approx_compressor42`, and checks
  `edc_compressor42` against the table.
* **Error-detector output multiplexers.** The published error-detection
  schematic ends in two output multiplexers whose select input cannot be
  determined. They are left out: the compressor outputs its equations
  directly, plus the `error` flag.
* **Waveform mismatch.** A published waveform for the `a = 103`, `b = 96`
  sweep shows products 9248, 9216, 4128 and 4096. This design produces the
  first three of these values, at `trunc` 4-5, 6-7 and 12-13, but not 4096,
  and it gives 9888 for `trunc = 0`. The waveform cannot be aligned to
  `trunc` values precisely enough to resolve this. Results of this RTL may
  therefore differ from the published figures for some settings.
* **Fixed size.** The tree is hand-placed for 8 x 8 with five groups of
  three columns. `trunc_pp_gen` is parameterised (`N`, `TRUNC_W`, `GROUP`),
  but `pp_reduction` is not. Other sizes need a new tree.
* **Not included.** The comparison designs are not part of this RTL: a
  non-pipelined variant with a 4-bit truncation word over a 3-4-4 column
  partition, and a conventional multiplier.

## Files

| file | contents |
|------|----------|
| `rtl/amul_pkg.sv` | sizes (N = 8, TRUNC_W = 5, GROUP = 3) and shared types |
| `rtl/approx_pipe_mult.sv` | top: input/output registers around the core |
| `rtl/approx_mult_core.sv` | combinational multiplier: truncation, tree, final adder |
| `rtl/trunc_pp_gen.sv` | partial products with dynamic truncation and gate sharing |
| `rtl/pp_reduction.sv` | the hand-placed reduction tree |
| `rtl/approx_compressor42.sv` | approximate 4:2 compressor (OR carry, MUX sum) |
| `rtl/edc_compressor42.sv` | error-detecting 4:2 compressor |
| `rtl/acc_compressor42.sv` | exact 4:2 compressor |
| `rtl/full_adder.sv`, `rtl/half_adder.sv` | counters |
| `tb/amul_ref_pkg.sv` | behavioural reference model (closed form above) |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each has a
watchdog. Example with Verilator 5:

```
verilator --binary --timing -y rtl -y tb +libext+.sv \
    rtl/amul_pkg.sv tb/amul_ref_pkg.sv tb/tb_approx_pipe_mult.sv \
    --top-module tb_approx_pipe_mult -Mdir obj
./obj/Vtb_approx_pipe_mult
```

Replace the testbench name to run the others. What each one covers:

* The component benches (`tb_half_adder`, `tb_full_adder`,
  `tb_acc_compressor42`, `tb_approx_compressor42`, `tb_edc_compressor42`)
  are exhaustive.
* `tb_trunc_pp_gen` checks every partial product for all 32 truncation words.
* `tb_pp_reduction` drives 200,000 arbitrary matrices.
* `tb_approx_mult_core` is exhaustive over operands and truncation words
  (about 2 million products, a few seconds).
* `tb_approx_pipe_mult` exercises the top end to end:
  * reset;
  * the two-cycle latency;
  * the 103 x 96 sweep;
  * 40,000 back-to-back random operations.

  It also counts that every truncation bit, the column-7 compensation and
  the approximation all actually occur.

All testbenches pass. Each one has also been run against a deliberately
broken copy of its module and reported failures: for example, a swapped multiplexer polarity, a dropped
compensation bit, or the truncation word bypassing the input register.

To change the partition or the operand width, edit `amul_pkg` and rebuild
`pp_reduction` for the new matrix. The reference model in
`tb/amul_ref_pkg.sv` hard-codes 8 x 8 and groups of three, so it must change
as well.
