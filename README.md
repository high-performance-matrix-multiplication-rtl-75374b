# PPI-MO matrix multiplier

A hardware multiplier for two n x n matrices, C = A x B, that does the whole
product in n clock cycles by giving every element of A its own multiplier.
Matrix A is a *parallel, fixed* input: all n^2 of its elements sit on input
ports for the whole operation. Matrix B streams in one column per cycle on n
ports, and one column of C leaves per cycle on n ports. That gives the name:
parallel-parallel input, multiple output (PPI-MO). The design trades area
(n^2 multipliers) for speed: one full matrix product every n cycles, with no
accumulation loop and no feedback anywhere in the datapath.

The default size is n = 4 with 8-bit signed elements.

## How the array computes C

The multipliers form an n x n grid. Cell M_ij sits in multiplier row i and
column j (1-based in this text, 0-based in the code).

* **A is wired transposed.** Cell M_ij multiplies by a_ji, and keeps that
  factor for the whole product.
* **B is broadcast by rows.** In cycle k, element b_ik goes to every cell
  of multiplier row i. Over n cycles, row i of the array sees row i of B,
  b_i1 ... b_in, in order. At any one cycle, the array as a whole sees
  column k of B.
* **Columns are summed.** Each cell registers its product. The n-1 adders
  under column j then add that column:

      sum over i of a_ji * b_ik = c_jk

  So in cycle k the n column sums are exactly column k of C. The result
  therefore leaves in column-major order.

For n = 3 that means 9 multipliers, 9 product registers and 6 adders, and a
product in 3 cycles. In general the counts are:

| resource            | count       | n = 4 |
|---------------------|-------------|-------|
| multipliers         | n^2         | 16    |
| product registers   | n^2         | 16    |
| two-input adders    | n^2 - n     | 12    |
| input ports (A + B) | n^2 + n     | 20    |
| output ports (C)    | n           | 4     |
| cycles per product  | n           | 4     |

The transposed wiring of A is the step that is easiest to get wrong. If M_ij
took a_ij instead, the column sums would give the product of A transposed
with B. The testbenches use non-symmetric random matrices, so they catch
exactly that mistake.

## Interface and timing (`ppimo_mm`)

| port      | dir | width                     | meaning |
|-----------|-----|---------------------------|---------|
| `clk`     | in  | 1                         | clock, rising edge |
| `rst_n`   | in  | 1                         | synchronous reset, active low |
| `a`       | in  | `[N][N]` x `DATA_W`       | A; `a[r][c]` is a_(r+1)(c+1), signed |
| `b_valid` | in  | 1                         | `b_col` holds a column of B |
| `b_col`   | in  | `[N]` x `DATA_W`          | column k of B; `b_col[i]` = b_(i+1)k |
| `c_valid` | out | 1                         | `c_col` holds a column of C |
| `c_idx`   | out | `clog2(N)`                | index k of that column, 0-based |
| `c_last`  | out | 1                         | this is column N-1, the last of a product |
| `c_col`   | out | `[N]` x `2*DATA_W+clog2(N)` | column k of C; `c_col[j]` = c_(j+1)k |

The rules are:

* **Latency.** The C column for a B column accepted at a rising edge
  appears on `c_col` just after that same edge, one clock after it was
  presented. `c_valid` follows `b_valid` with that one-clock delay.
* **Rate.** One column per cycle. With `b_valid` held high, a product
  leaves every N cycles, and products can run back to back.
* **Column count.** After reset, the first valid column is column 0, and
  every N-th valid column closes a product. There is no separate start
  signal; the order of valid columns alone frames the products.
* **A must be stable while its product is in flight.** This applies only to
  the cycles in which `b_valid` is high for that product. Between products,
  and in idle cycles, `a` may change freely. The next product may start with
  a new A on the very next cycle.
* **Gaps.** `b_valid` may drop for any number of cycles inside a product.
  The product registers are enabled only by `b_valid`, so during a gap they
  hold their value (and `c_col` with them) and do not toggle.
* **Reset** clears the product registers and the column counter.

Results are full precision: products are `2*DATA_W` bits and column sums
`2*DATA_W + clog2(N)` bits. No result can overflow. With the defaults, C
elements are 18-bit signed.

The C outputs come straight from the column adders, after the product
registers. The longest combinational path is therefore one product register
feeding a chain of N-1 adders. To register C as well, add a stage after
`column_adder`. That costs one more clock of latency but leaves the rate
unchanged.

## Modules

| file | what it is |
|------|------------|
| `rtl/ppimo_pkg.sv`    | default order `MAT_N = 4`, element width `DATA_W = 8`, and width helpers |
| `rtl/mult_cell.sv`    | one multiplier M_ij and its enabled product register |
| `rtl/column_adder.sv` | the N-1 adders of one column, as a full-precision chain |
| `rtl/ppimo_mm.sv`     | the top: N x N cells, N column adders, column index/valid tracking |

Parameters of `ppimo_mm` are `N` (matrix order) and `DATA_W` (element width).
Any N >= 1 and DATA_W >= 1 elaborate.

## What is fixed by the architecture and what is a choice here

These parts follow the published PPI-MO architecture:

* the n x n multiplier grid with one register per multiplier;
* A as n^2 fixed parallel inputs, wired transposed;
* B broadcast along multiplier rows;
* n^2 - n adders summing the columns;
* one column of C per cycle, column-major, so n cycles per product;
* the evaluated size, 4 x 4.

These parts are choices made in this design:

* **Number format.** Elements are 8-bit two's complement, and results are
  kept at full precision. No element width is given for the architecture.
* **Adder arrangement.** Each column is summed by a chain of adders, not a
  balanced tree. The adder count is the same either way. A tree would shorten
  the path for large N.
* **Valid-based interface.** The `b_valid` / `c_valid` / `c_idx` / `c_last`
  signals, the column counter modulo N, the register enable and the
  synchronous reset are this design's own.
* **A is not registered inside.** Only the n^2 product registers are
  counted for the architecture, so A is taken straight from its ports and the
  source must hold it.

There is also a variant with a single output (PPI-SO) that needs only n input
ports. It is not included, because its internal structure is not defined.

## Verification

Every testbench is self-checking. Each compares against integer arithmetic
computed in the testbench, prints `TB_RESULT checks=<n> failures=<n>`, and
has a watchdog.

* `tb/tb_mult_cell.sv` drives random and extreme operands (-128, 127, -1,
  0) with the enable toggling. It checks the registered product, the hold
  while disabled, and reset.
* `tb/tb_column_adder.sv` tests adders of order 4 and 3 with random and
  extreme 16-bit terms, including four times -32768.
* `tb/tb_ppimo_mm.sv` runs end to end at the default parameters (N = 4,
  8-bit) and streams 300 random products. It checks, after every edge, each
  C element, the one-clock latency, `c_idx` and `c_last`, the output hold
  during gaps, and the N-cycle rate. It also counts these events and fails
  if any of them never happens:
  * back-to-back products with A changed between them;
  * input gaps inside a product, with garbage on A and B during the gap;
  * all-extreme operands;
  * a reset in the middle of a product.
* `tb/tb_ppimo_mm_3x3.sv` builds the array for n = 3 (9 multipliers, 6
  adders). It checks one hand-worked product:

      A = [1 2 3; 4 5 6; 7 8 9],  B = [1 0 -1; 2 1 0; -3 4 2]
      C = [-4 14 5; -4 29 8; -4 44 11]

  It then runs 100 random products back to back, each in 3 cycles.

To run one of them with Verilator 5:

    verilator --binary --timing --assert -Wall -Wno-fatal \
        --top-module tb_ppimo_mm -y rtl -y tb +libext+.sv \
        rtl/ppimo_pkg.sv tb/tb_ppimo_mm.sv
    ./obj_dir/Vtb_ppimo_mm

Replace `tb_ppimo_mm` with any other testbench name. The package must come
first on the command line. Each testbench finishes in well under a second.

## Limits

* Nothing here reproduces the published FPGA results: the 4 x 4 timing,
  slice and LUT figures for a Virtex-4 device, or the energy comparison.
  Those depend on the device, the tools and the element width, and the
  published results give no element width.
* The source must hold A stable for the whole product. Nothing in the design
  checks that, so if A changes in the middle of a product, that product
  comes out wrong.
* Matrices smaller than N can be computed by padding A and B with zero rows
  and columns. A product still takes N cycles. Larger matrices need blocking
  outside this design.
