# Inexact full-adder cells for approximate ripple carry addition

Image and signal processing can tolerate small arithmetic errors, so an adder
does not have to be exact. In a ripple carry adder (RCA) the cheapest way to
trade accuracy for power and delay is *cell replacement*: the full adders in
the least significant positions are replaced by simpler cells that get a few
input combinations wrong. The number of replaced positions, counted from the
LSB, is called **NAB** (number of approximate bits). Above NAB the adder is
exact.

This library gives three such inexact cells, InXA1, InXA2 and InXA3, an
exact full adder (EFA), and a parameterised N-bit RCA that combines them.
Each inexact cell is wrong in exactly two of its eight input rows, but the
three differ in *which* output is wrong, and that decides how errors behave
in a multi-bit adder. InXA2 is the recommended cell.

All of it is combinational logic: no clock, no reset, no registers.

## The cells

Rows are numbered 1-8 in the order of the input triple `{x, y, cin}` =
000 ... 111. A `*` marks an output that differs from an exact full adder.

| row | x y cin | exact sum cout | InXA1 sum cout | InXA2 sum cout | InXA3 sum cout |
|-----|---------|----------------|----------------|----------------|----------------|
| 1 | 0 0 0 | 0 0 | 0 0  | 0 0  | 1* 0 |
| 2 | 0 0 1 | 1 0 | 1 1* | 1 0  | 1 0  |
| 3 | 0 1 0 | 1 0 | 1 0  | 1 0  | 1 0  |
| 4 | 0 1 1 | 0 1 | 0 1  | 1* 1 | 0 1  |
| 5 | 1 0 0 | 1 0 | 1 0  | 1 0  | 1 0  |
| 6 | 1 0 1 | 0 1 | 0 1  | 1* 1 | 0 1  |
| 7 | 1 1 0 | 0 1 | 0 0* | 0 1  | 0 1  |
| 8 | 1 1 1 | 1 1 | 1 1  | 1 1  | 0* 1 |

The simplest logic for each table, which is what the RTL uses:

| cell  | sum                 | cout              | wrong output |
|-------|---------------------|-------------------|--------------|
| EFA   | x ^ y ^ cin         | maj(x, y, cin)    | none |
| InXA1 | x ^ y ^ cin         | cin               | cout, rows 2 and 7 |
| InXA2 | (x ^ y) \| cin      | maj(x, y, cin)    | sum, rows 4 and 6 |
| InXA3 | ~maj(x, y, cin)     | maj(x, y, cin)    | sum, rows 1 and 8 |

InXA1's carry out is simply its carry in, a wire with no gate. InXA3
replaces the XOR of the sum with an inverter on the carry.

The cells were designed as small transistor circuits (six to eight
transistors, against ten for the exact cell they are compared with). Their
circuits, delay, energy and input capacitance are outside what RTL can
express. Only their logic function is implemented here, and a synthesis tool
will map it to whatever standard cells it has.

## How errors behave in the adder

`inxa_rca` places the chosen inexact cell at bits `0 .. NAB-1` and exact
cells at bits `NAB .. N-1`. This is where the three cells part ways:

* **InXA2**: the carry chain is exact, so a wrong sum bit costs only its own
  weight and nothing propagates upward. Its wrong sum bits are always 1s
  where 0 was due, so the result is never too small, and the error is below
  2^NAB. Bit 0 with carry in 0 is never wrong, since InXA2 errs only when its
  carry in is 1.
* **InXA3**: the carry chain is also exact and the error is also below
  2^NAB in magnitude, but it can go either way (row 1 adds, row 8 subtracts).
  It is wrong when both operand bits and the carry are 0, so in bit
  positions where both operands are zero it sets a 1. With NAB larger than
  the operands' width, 0 + 0 no longer gives 0.
* **InXA1**: the sum is exact but the carry is wrong, and a wrong carry
  travels on: it changes the next cells' sums and can reach the exact upper
  part of the adder. Its mean and relative errors are the worst of the three
  for any NAB below N.

Measured over all 2^24 input pairs of the 12-bit adder (`tb_rca12_sweep`):

| cell  | NAB | error rate | NMED     | MRED     |
|-------|-----|------------|----------|----------|
| InXA1 | 3   | 57.81 %    | 0.000427 | 0.001181 |
| InXA1 | 6   | 82.20 %    | 0.003846 | 0.010442 |
| InXA1 | 9   | 92.49 %    | 0.031197 | 0.077298 |
| InXA1 | 12  | 96.83 %    | 0.250000 | 0.423998 |
| InXA2 | 3   | 25.00 %    | 0.000122 | 0.000338 |
| InXA2 | 6   | 53.32 %    | 0.001740 | 0.004775 |
| InXA2 | 9   | 70.97 %    | 0.015324 | 0.039992 |
| InXA2 | 12  | 81.95 %    | 0.124634 | 0.250974 |
| InXA3 | 3   | 57.81 %    | 0.000210 | 0.000584 |
| InXA3 | 6   | 82.20 %    | 0.001815 | 0.005096 |
| InXA3 | 9   | 92.49 %    | 0.014583 | 0.043438 |
| InXA3 | 12  | 96.83 %    | 0.116694 | 0.480469 |

Metric definitions:

* The error distance is ED = |exact − approximate|.
* NMED is the mean ED divided by the largest exact sum, 2·(2^N − 1).
* MRED is the mean of ED / exact, leaving out the pair 0 + 0.
* The error rate is the share of input pairs with any wrong result bit.

InXA2 always has the lowest error rate. InXA1 and InXA3 have exactly the
same rate. InXA2 also has the lowest NMED at NAB 3 and 6. At NAB 9 and 12,
however, InXA3's NMED is slightly lower. With every cell replaced (NAB 12),
InXA3 has the highest MRED, not InXA1. So the claim that InXA2 is best in
every error measure holds for partial replacement. It does not hold at every
point of the sweep.

## Image addition

The cells were also judged by adding two 8-bit greyscale images pixel by
pixel with a 16-bit RCA, sweeping NAB from 1 to 16. The measures were MSE,
PSNR, MAE, NAE, AD, MD, SC and NK. `tb_image_add` repeats this on two
256 × 256 images that it generates from formulas (given in its header),
since no image files are shipped. On these images:

* InXA2 has a lower MSE than InXA1 at every NAB.
* InXA2 has the smallest maximum error (MD) at every NAB.
* InXA3 is slightly better than InXA2 in MSE at NAB 5-8.
* InXA3 breaks down from NAB 9. Above the 9-bit sum, both operand bits are
  0, so InXA3 writes 1s there.
* The errors of InXA1 and InXA2 stop growing once NAB exceeds 8, because
  the upper inputs are all zero.

Which cell wins at mid-range NAB therefore depends on the pixel statistics.
The PSNR uses 511, the largest 9-bit sum, as its peak value.

## Modules

| file | what it is |
|------|------------|
| `rtl/inxa_pkg.sv` | `cell_e` enum: `CELL_EFA`, `CELL_INXA1`, `CELL_INXA2`, `CELL_INXA3` |
| `rtl/efa_cell.sv` | exact full adder |
| `rtl/inxa1_cell.sv`, `rtl/inxa2_cell.sv`, `rtl/inxa3_cell.sv` | the inexact cells |
| `rtl/inxa_rca.sv` | approximate RCA, parameters `N` (12), `NAB` (6), `CELL` (`CELL_INXA2`) |
| `rtl/inxa_adder_top.sv` | three RCAs side by side, one per inexact cell, parameters `N` (12), `NAB` (6) |

Every cell has the ports `x, y, cin -> sum, cout`.

`inxa_rca` has the ports `a[N-1:0], b[N-1:0], cin -> sum[N-1:0], cout`. Two
settings give the extreme cases:

* `NAB = 0` (or `CELL = CELL_EFA`) gives an exact adder.
* `NAB = N` builds the adder from inexact cells only.

The top has three independent adders, each with its own operands and a
result of N+1 bits (sum with the carry out as MSB):

* `a1, b1 -> r1` for InXA1,
* `a2, b2 -> r2` for InXA2,
* `a3, b3 -> r3` for InXA3.

Their carry in is 0. To use one cell type in your own design, instantiate
`inxa_rca` directly with the cell you want.

Choices made here rather than taken from the cell definitions:

* The default NAB is 6, half of the 12-bit adder.
* `inxa_rca` has a carry-in port.
* The result keeps its carry out.
* The top holds all three adders instead of choosing one.

## Testbenches

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`.

| testbench | what it does | run time |
|-----------|--------------|----------|
| `tb_efa_cell`, `tb_inxa1_cell`, `tb_inxa2_cell`, `tb_inxa3_cell` | all 8 rows against the table above, plus the count of wrong sum and carry rows | instant |
| `tb_inxa_rca` | 8-bit adders for all four cell types at NAB 0, 2, 4, 6, 8; all 65536 pairs plus random pairs with carry in 1; error bounds and error-rate ordering | < 1 s |
| `tb_inxa_adder_top` | the top at its defaults (N = 12, NAB = 6), all 2^24 pairs into each adder, error metrics, and a count of each error mechanism | ~ 5 s |
| `tb_rca12_sweep` | the 12-bit sweep tabulated above | ~ 10 s |
| `tb_image_add` | the image-addition experiment at N = 16, NAB 1-16 | < 1 s |

The expected values in every testbench come from a bit-serial reference
model, not from the RTL. That model steps through the bits and looks each
cell up in its truth table, stored as an 8-bit constant.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -yrtl rtl/inxa_pkg.sv tb/tb_inxa_adder_top.sv \
          --top-module tb_inxa_adder_top -O3
./obj_dir/Vtb_inxa_adder_top
```

## Limits

* The cells model logic only. Transistor count, node capacitance, delay and
  energy were the main argument for these cells. None of them can be
  observed in this RTL, and synthesis will not reproduce the custom circuits.
* The image results come from generated images. They show how the cells
  behave, not the figures obtained on standard photographs.
