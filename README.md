# 8-bit approximate array squarer (AAS) with approximate mirror adders

Squaring an operand is cheaper than a general multiplication: the partial
product matrix of `x * x` is symmetric about its diagonal, so half of it can
be folded away, and what remains is summed by a small array of one-bit full
adders. This design goes one step further and trades accuracy for area,
power and delay: the full adders in the least significant columns of that
array are replaced by *approximate mirror adders* (AMA1 to AMA5), simplified
adders that get a few of their eight input cases wrong. Two parameters pick
which approximate adder is used and how many columns (levels V1 to V7) it
fills, giving a family of 35 approximate squarers plus the exact one. The
errors land in the low-order bits, so the result "fails small": in every
setting the mean error is below 1 % of the largest square, 255^2. Small
operands can still be off by a large relative amount.

The RTL is synthesizable SystemVerilog, purely combinational, with no clock.

## Folding the partial products

For `x = sum a_i 2^i`,

    x^2 = sum_i a_i 2^(2i)  +  sum_(i<j) a_i a_j 2^(i+j+1)

Each pair of off-diagonal products `a_i a_j` and `a_j a_i` is merged into one
product one column further left, and each diagonal product `a_i a_i` is just
`a_i`. For 8 bits that leaves 28 AND gates (`pp_gen`) and 8 bare operand
bits. Writing the operand bits A1 (lsb) to A8 (msb) and the square bits P0
to P15, the columns hold:

| column | bits to add                         | column | bits to add                    |
|--------|-------------------------------------|--------|--------------------------------|
| P0     | A1                                  | P8     | A1A8, A2A7, A3A6, A4A5, A5     |
| P1     | (none, always 0)                    | P9     | A2A8, A3A7, A4A6               |
| P2     | A1A2, A2                            | P10    | A3A8, A4A7, A5A6, A6           |
| P3     | A1A3                                | P11    | A4A8, A5A7                     |
| P4     | A1A4, A2A3, A3                      | P12    | A5A8, A6A7, A7                 |
| P5     | A1A5, A2A4                          | P13    | A6A8                           |
| P6     | A1A6, A2A5, A3A4, A4                | P14    | A7A8, A8                       |
| P7     | A1A7, A2A6, A3A5                    | P15    | (carries only)                 |

The tallest column has `floor(N/2) + 1 = 5` bits, against 8 in a multiplier.

## The adder array

`aas_array` sums the columns with 31 full-adder cells in four ripple rows.
Each cell adds three bits: one from above (a product, or the sum of the row
above), one more bit, and the carry from the column to its right. Its sum
goes down to the next row (or out as a square bit) and its carry goes left
along its row. Which of these bits drives which cell port is given in the
next section.

| row | columns | bit from above              | added bit                                      | result                                            |
|-----|---------|-----------------------------|------------------------------------------------|---------------------------------------------------|
| 1   | 2 .. 14 | first product of the column | second product, or A2 / A8 / 0                 | P2, P3; sums of columns 4..14 go to row 2         |
| 2   | 4 .. 15 | row-1 sum                   | A3, 0, A3A4, A3A5, A3A6, A4A6, A5A6, ...       | P4, P5, P11..P15; sums of columns 6..10 go to row 3 |
| 3   | 6 .. 10 | row-2 sum                   | A4, 0, A5, (row-4 carry), A6                   | P6, P7, P9, P10; column 8's sum goes to row 4      |
| 4   | 8       | row-3 sum                   | A4A5                                           | P8                                                 |

Details that are easy to miss:

* Column 11 of row 2 adds no product. Its other two inputs are the carries
  out of column 10 of row 3 and of row 2.
* Column 9 of row 3 likewise adds the carries of column 8 from rows 3 and 4.
* Columns 13 to 15 of row 2 form a short final ripple. Column 15 takes the
  last row-1 carry, and its own carry (bit 16) is always 0.
* Eleven cells have a constant 0 on one input: the seven places where an
  exact squarer needs only a half adder (P2 to P8), and four cells at the
  left end (column 13 of row 1, columns 13 to 15 of row 2). They are kept as
  full adders, because in approximate columns the approximate adder is used
  with that 0 as a real input. In exact columns synthesis reduces them. A
  hand-optimised exact squarer of the same shape needs 21 full adders and 7
  half adders.

The exact array (LEVEL 0) gives `x * x` for every operand.

## Approximate mirror adders

A mirror adder is a compact static CMOS full adder. The five approximate
variants remove transistors, and this changes their truth tables. At logic
level they are (wrong outputs marked `*`):

| a b cin | exact s c | AMA1 s c | AMA2 s c | AMA3 s c | AMA4 s c | AMA5 s c |
|---------|-----------|----------|----------|----------|----------|----------|
| 0 0 0   | 0 0       | 0 0      | 1* 0     | 1* 0     | 0 0      | 0 0      |
| 0 0 1   | 1 0       | 1 0      | 1 0      | 1 0      | 1 0      | 0* 0     |
| 0 1 0   | 1 0       | 0* 1*    | 1 0      | 0* 1*    | 0* 0     | 1 0      |
| 0 1 1   | 0 1       | 0 1      | 0 1      | 0 1      | 1* 0*    | 1* 1     |
| 1 0 0   | 1 0       | 0* 0     | 1 0      | 1 0      | 0* 1*    | 0* 0     |
| 1 0 1   | 0 1       | 0 1      | 0 1      | 0 1      | 0 1      | 0 1      |
| 1 1 0   | 0 1       | 0 1      | 0 1      | 0 1      | 0 1      | 1* 1     |
| 1 1 1   | 1 1       | 1 1      | 0* 1     | 0* 1     | 1 1      | 1 1      |

As equations: AMA1 `c = b | a&cin`, `s = cin & (a&b | ~c)`; AMA2 `c =
maj(a,b,cin)`, `s = ~c`; AMA3 `c = b | a&cin`, `s = ~c`; AMA4 `c = a`,
`s = cin & (~a | b)`; AMA5 `c = a`, `s = b`. These are the approximate
mirror adders published by Gupta et al. (IEEE TCAD 2013). AMA5 is only two
wires, so at high approximation levels several square bits become plain
copies of operand bits or constants: synthesis of the default configuration
keeps 104 gates and leaves 5 of the 16 outputs without logic.

Since the approximate cells are not symmetric in their inputs, the error of
the squarer depends on which signal drives which port. No single simple rule
is implied by the structure, so `aas_array` uses this assignment, which
reproduces the published error figures of the 35 designs:

* A constant 0 always drives `cin`. The carry from the right then drives `b`.
* Row 1: `a` = first product, `b` = second product, `cin` = carry.
* Lower rows, a cell adding an AND product: `a` = product, `b` = sum from
  above, `cin` = carry.
* Lower rows, a cell adding a bare operand bit (A3, A4, A7): `a` = sum from
  above, `b` = operand bit.
* Row 3, column 8, which adds A5: `a` = sum from above, `b` = carry,
  `cin` = A5.

For an exact full adder the order makes no difference.

## Approximation levels and parameters

Level Vk makes every cell in square columns 2 to k+1 approximate:

| LEVEL | approximate columns | approximate cells |
|-------|---------------------|-------------------|
| 0     | none (exact)        | 0                 |
| 1     | P2                  | 1                 |
| 2     | P2..P3              | 2                 |
| 3     | P2..P4              | 4                 |
| 4     | P2..P5              | 6                 |
| 5     | P2..P6              | 9                 |
| 6     | P2..P7              | 12                |
| 7     | P2..P8              | 16                |

`aas_squarer8` (and `aas_array`) take

* `AMA` of type `aas_pkg::fa_kind_e`: `FA_AMA1` .. `FA_AMA5`;
* `LEVEL`: 0 .. 7.

The defaults are AMA5 at V7. This is the most aggressive setting, with the
smallest area and power of the family in published 45 nm results (about
98 µm² and 2.4 µW against about 181 µm² and 4.4 µW for the exact squarer).
LEVEL 0 is an addition of this RTL: the exact squarer in the same structure.

## Accuracy

Measured by the testbenches over all 256 operands. ER is the error rate and
MED the mean |error|:

| LEVEL | AMA1 ER / MED | AMA2 ER / MED | AMA3 ER / MED | AMA4 ER / MED | AMA5 ER / MED |
|-------|---------------|---------------|---------------|---------------|---------------|
| V1    | 25 % / 1.0    | 50 % / 2.0    | 75 % / 3.0    | 25 % / 1.0    | 25 % / 1.0    |
| V2    | 50 % / 5.0    | 75 % / 7.0    | 88 % / 9.0    | 50 % / 3.0    | 38 % / 3.0    |
| V3    | 75 % / 10.0   | 88 % / 17.0   | 94 % / 19.0   | 75 % / 11.0   | 56 % / 8.0    |
| V4    | 81 % / 24.5   | 94 % / 36.0   | 97 % / 43.0   | 81 % / 21.5   | 66 % / 18.0   |
| V5    | 91 % / 56.0   | 97 % / 81.3   | 98 % / 147.5  | 91 % / 52.0   | 77 % / 39.3   |
| V6    | 92 % / 120.3  | 98 % / 182.2  | 99 % / 310.0  | 92 % / 97.1   | 82 % / 86.8   |
| V7    | 96 % / 231.4  | 100 % / 405.7 | 100 % / 721.5 | 96 % / 216.4  | 88 % / 183.8  |

Over all 35 designs the average ER is 77 %, the average MED 91 and the
average mean squared error (MSE) 3.9e4.

Most published figures agree with these results, to the digits published:

* the largest MED of each adder (231, 405, 721, 216, 183);
* the V1 MED and MSE;
* each adder's average error rate, largest MSE and average MSE;
* the normalised MED (MED / 255^2) of AMA1, AMA2, AMA3 and AMA5;
* the relative error (MRED) of AMA1 and AMA5, and the smallest and average
  MRED of AMA4;
* the averages over all 35 designs.

Two sets of published figures are not reproduced:

* The published mean relative errors of AMA2 and AMA3 are 1.6 to 1.9 times
  larger than computed here, where MRED is |error| / x^2 averaged over all
  256 operands with operand 0 counted as 0. AMA2 is symmetric in its inputs,
  so the difference is not caused by the wiring; the likely cause is a
  different treatment of small operands.
* The normalised MED published for AMA4 (largest 3.56e-3) is given jointly
  with AMA1. It does not agree with AMA4's own published largest MED of 216,
  which is reproduced here.

As an application check, the energy of a gray-scale image, `RMS = sqrt(sum
x^2) / n`, averaged over images (ARMS), was computed with every
configuration. For synthetic 256 x 256 images with an exact ARMS of 0.41,
all 35 configurations stay within 0.014 of the exact value, well inside the
usual 0.05 acceptance band.

## Files

| file                   | contents                                                          |
|------------------------|-------------------------------------------------------------------|
| `rtl/aas_pkg.sv`       | widths, cell-kind enum `fa_kind_e`, `col_kind()` level rule       |
| `rtl/aas_squarer8.sv`  | top: `x[7:0]` in, `p[15:0]` out                                   |
| `rtl/pp_gen.sv`        | 28 AND-gate partial products (`N` parameter)                      |
| `rtl/aas_array.sv`     | the 31-cell adder array                                           |
| `rtl/fa_cell.sv`       | picks an exact or approximate cell from a `fa_kind_e`             |
| `rtl/fa_exact.sv`      | exact full adder                                                  |
| `rtl/ama_fa.sv`        | AMA1..AMA5, chosen by parameter `KIND`                            |
| `tb/aas_ref_pkg.sv`    | reference model: truth tables and a column-by-column array model  |
| `tb/tb_*.sv`           | self-checking testbenches                                         |

Hierarchy: `aas_squarer8` → `pp_gen`, `aas_array` → 31 × `fa_cell` →
`fa_exact` or `ama_fa`.

Timing: the whole squarer is one combinational path. The longest ripple
runs along row 1 (columns 2 to 14) and the final ripple of row 2. The output
is valid one propagation delay after `x` changes. Register it outside if a
pipelined datapath needs it.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. To build and run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/aas_pkg.sv tb/aas_ref_pkg.sv tb/tb_aas_squarer8.sv \
        --top-module tb_aas_squarer8
    ./obj_dir/Vtb_aas_squarer8

Other modules are found through `-Irtl`/`-Itb`. The testbenches are:

* `tb_fa_exact`: the exact adder over all 8 input cases.
* `tb_ama_fa`: each AMA against its truth table. It also checks the number of
  wrong cases per variant (2, 2, 3, 3, 4).
* `tb_pp_gen`: every product for all 256 operands. The products must also
  sum to `x^2`.
* `tb_aas_array`: the array in all 36 configurations against the reference
  model, with partial products formed in the testbench.
* `tb_aas_squarer8`: the top in all 36 configurations. It computes ER, MED,
  MSE, NMED and MRED and compares them with the published figures listed
  above. It also counts operands that the approximation changed or left
  exact, per adder kind.
* `tb_aas_squarer8_full`: the top with default parameters, all 256 operands.
  Its mean error distance must truncate to the published 183.
* `tb_image_energy`: the ARMS workload over four synthetic 256 × 256 images.
  `M_IMAGES` sets the number of images.

To try another setting, override the top's parameters, for example
`aas_squarer8 #(.AMA(aas_pkg::FA_AMA2), .LEVEL(3))`.

## Where this RTL goes beyond or differs from the published design

* The AMA truth tables are those of the standard published adders. The
  published design does not give the port order of each cell; the order used
  here was chosen because it reproduces the published error figures.
* Half-adder positions are full adders with a 0 input. For exact columns
  this makes no functional difference, and synthesis removes the extra
  logic.
* LEVEL 0 (exact) is an addition.
* Area, power and delay cannot be reproduced from RTL. The gate counts above
  come from generic synthesis, not a cell library.
