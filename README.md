# 4x4 constant-matrix multiplier

This design multiplies a 4x4 matrix **A** of small integers (1 to 16) by a
fixed 4x4 matrix **B** of fractional constants. It targets a small FPGA
footprint and high throughput. Three ideas keep it small:

* **B is built into the logic.** No general multipliers are used. Each of
  the 16 elements of B becomes a dedicated circuit of one or two shifted
  copies of the input, with at most one adder or subtractor.
* **Results are fixed point, not floating point.** Every product and sum is
  a 13-bit unsigned word: 7 integer bits and 6 fractional bits.
* **One row of hardware is used four times per matrix.** Row i of C needs
  only row i of A. The datapath therefore computes one row of C at a time.
  That rate exactly matches a dual-port block RAM that delivers two elements
  of A per clock.

The result is one row of C every 2 clocks and one full matrix every 8 clocks.
The design repeats this forever over the matrix held in the RAM.

```
        [ 1    1/8      3     1/4 ]
   B =  [ 3/4  3/2      3/8   2   ]          C = A x B
        [ 1/2  5        7/15  3   ]
        [ 1    140/123  1/4   3/4 ]
```

## Block structure

```
 bram_dual ──2 elements/clk──► fetch ──row of A (R1..R4)──► mult_block ──16 products──► sum_block ──► c_row (row of C)
   16 x 5 bit                  X1..X4, R1..R4             16 x const_mul, registered   4 adders, registered
```

| file | role |
|---|---|
| `rtl/mm_pkg.sv` | sizes, the enum of B's constants, the B matrix (`b_elem`), the default A |
| `rtl/bram_dual.sv` | dual-port, synchronous-read memory holding A (preloaded from `INIT`) |
| `rtl/fetch.sv` | walks the memory and assembles rows of A |
| `rtl/const_mul.sv` | multiplies by one element of B, with shifts and add/subtract only |
| `rtl/mult_block.sv` | 16 `const_mul`s and a register stage |
| `rtl/sum_block.sv` | adds each column of 4 products, output registers R1..R4 |
| `rtl/matmul_top.sv` | wires the four blocks together |

## Number format

An element of C is at most 16 × (1/8 + 3/2 + 5 + 140/123) ≈ 124.2, so 7
integer bits are enough. With 3 fractional bits, every element of B except
7/15 and 140/123 is exact. More fractional bits only improve the estimate of
those two constants. The default is 6 fractional bits (`FRAC_W = 6`), which
truncates them as follows:

* 7/15 ≈ 0.011101₂ = 29/64 = 0.453125
* 140/123 ≈ 1.001000₂ = 72/64 = 1.125

An A element enters as an integer and is converted by shifting it left
`FRAC_W` places. That is why even the ×1 multiplier is a shift rather than a
wire. Products of an integer and a truncated constant are exact, so the
only error in the result comes from truncating the two constants.

To read an output, take `c_row[j]` as an unsigned integer and divide it by
2^FRAC_W. For the default A (16, 15, …, 1 row-major), the outputs × 64 are:

```
 3024  6984  4046  5488
 2192  5000  3002  3952
 1360  3016  1958  2416
  528  1032   914   880
```

## Constant multipliers (`const_mul`)

`const_mul` has one parameter `K` (an enum from `mm_pkg`) that selects the
constant. Each constant gets its own hand-chosen form:

| constant | circuit |
|---|---|
| 1, 1/2, 1/4, 1/8, 2 | one shift |
| 3 = 2 + 1, 5 = 4 + 1, 3/2 = 1 + 1/2 | two shifts, one adder |
| 3/4 = 1 − 1/4, 3/8 = 1/2 − 1/8 | two shifts, one subtractor (instead of two adders for 1/4+1/4+1/4) |
| 7/15, 140/123 | truncate to `FRAC_W` bits, then canonical-signed-digit recoding |

Canonical-signed-digit recoding turns the truncated constant into the
fewest ± powers of two. For example, 29/64 = 1/2 − 1/16 + 1/64 and
72/64 = 1 + 1/8. The recoding is done by a constant function at elaboration,
so the multiplier stays correct for any `FRAC_W ≥ 3`. Hand-deriving these two
forms for one word size would give the same kind of circuit. The recoding is
this implementation's generalisation of that.

All arithmetic is done modulo 2^(7+FRAC_W). The largest product is 16 × 5 =
80, so every term and every result fits. An intermediate that wraps during a
subtraction still gives the right final value.

## Fetch routine and pipeline timing

The memory has two read ports with one clock of latency. The fetch block
drives pair address p on both ports: port a reads address 2p and port b
reads 2p+1. p counts 0..7 and wraps. A 1-bit register `count` toggles every
clock and decides where the returned pair goes:

* `count = 1`: the pair is stored into X1, X2.
* `count = 0`: the pair is stored into X3, X4.
* At the next `count = 1` edge, X1..X4 are copied into the output registers
  R1..R4. At the same edge, X1/X2 take the first pair of the next row.

Each X register is therefore written only every other clock. Just after
reset, the memory output still shows the word from before the first read.
A register `en`, cleared by reset and set one clock later, blocks every store
until real data arrives.

Cycle by cycle, with edge *n* meaning the *n*-th rising edge after `rst`
falls:

| edge | memory output | X1/X2 | X3/X4 | R1..R4 | products | c_row |
|---|---|---|---|---|---|---|
| 1 | A11,A12 appear | – | – | – | – | – |
| 2 | A13,A14 | A11,A12 | – | – | – | – |
| 3 | A21,A22 | | A13,A14 | – | – | – |
| 4 | A23,A24 | A21,A22 | | row 1 | – | – |
| 5 | … | | A23,A24 | | row 1 | – |
| 6 | | A31,A32 | | row 2 | | **row 1** (`row_valid`) |
| 8 | | | | row 3 | | **row 2** |
| 10, 12, 14 … | | | | | | rows 3, 4, 1 … |

So three rows are in flight at once. The output shows row r, R1..R4 hold row
r+1, and X1..X4 collect row r+2. The pipeline has three register stages:
fetch outputs, products, sums. The summation is a single combinational stage
with registers only at its output. A deeper adder tree would shorten the
clock period, but it costs more area than it gains in throughput.

## Interface (`matmul_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active-high reset; clears every register |
| `c_row` | out | 4 × (7+FRAC_W) | current row of C, `c_row[0]..[3]` = C_i1..C_i4 |
| `row_valid` | out | 1 | one-clock pulse when `c_row` takes a new row |
| `row_idx` | out | 2 | which row of C (0..3) is on `c_row` |

| parameter | default | meaning |
|---|---|---|
| `FRAC_W` | 6 | fractional bits; words are 7 + FRAC_W bits (10, 11, 13 and 14 were studied) |
| `INIT` | 16, 15, …, 1 | contents of A, row-major, element i at address i |

`c_row` holds its value between `row_valid` pulses. The first row appears 6
edges after reset is released. After that, rows follow every 2 clocks and
the sequence C row 1, 2, 3, 4, 1, … repeats indefinitely.

## Accuracy

Accuracy is measured as the mean, over the 16 elements, of
|C_fixed − C_exact| / C_exact. For A = 16 … 1:

| word | fractional bits | error |
|---|---|---|
| 10 bit | 3 | 0.474 % |
| 11 bit | 4 | 0.173 % |
| **13 bit (default)** | 6 | **0.0982 %** |
| 14 bit | 7 | 0.0411 % |

13 bits was chosen as the balance between error and area. `FRAC_W` selects
any of these word sizes.

## Departures and choices to be aware of

* **Extra outputs.** `row_valid` and `row_idx` are extra. The original
  interface is just clk, rst and the 52 output bits.
* **Matrix A is a build-time parameter (`INIT`).** The memory has no write
  port. Reading a new matrix at run time would need a write port on
  `bram_dual` and a way to stop the fetch while loading.
* **Start-up gating.** A single register (`en`) handles start-up. It stands
  in for two registers (`erase`, `en`) whose exact behaviour is not
  specified.
* **Reset and widths.** The synchronous active-high reset, the 5-bit A
  element and the one-clock read latency are assumptions. The latency matches
  a Xilinx block RAM.
* **One multiplier module.** `const_mul` is one parameterised module rather
  than 16 separate ones. Each instance still elaborates to a fixed
  shift/add circuit for its own constant.
* **Element placement.** The placement of 1/4 (row 4, column 3) and 7/15
  (row 3, column 3) follows the B matrix above. The listed results above
  confirm this placement.
* **Not built.** These alternatives were evaluated but rejected, so they are
  not included:
  * a three-stage summation pipeline;
  * an earlier "data-stream" fetch with shift registers per port;
  * a single-port memory (16 clocks per matrix);
  * a variant with 19-bit intermediate registers in the 7/15 multiplier.
* **Timing not reproduced.** Clock-rate and area figures depend on the FPGA
  (about 3.3 ns per cycle on a Virtex-5, i.e. roughly 3.8 × 10⁷ matrices/s)
  and cannot be reproduced in simulation.

## Verification

Each testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_const_mul`: every element kind × inputs 0..16 × fractional widths 3,
  4, 6, 7, against a × trunc(B·2^F).
* `tb_bram_dual`: random addresses on both ports, the one-clock latency, and
  that data holds while the address is held.
* `tb_fetch`: a random A behind a RAM model. Checks row order and content,
  first row after 4 edges, rows 2 clocks apart, stability between rows,
  wrap-around, and restart after a second reset.
* `tb_mult_block`, `tb_sum_block`: random stimulus against the reference,
  including the largest products and sums.
* `tb_matmul_top`: four full multipliers side by side:
  * default;
  * random A;
  * all-16 A (largest results);
  * 11-bit words.
  It checks every row, the latency and the 2-clock and 8-clock rates. It
  also checks that start-up discard, X1/X2 and X3/X4 stores, address wrap
  and three-rows-in-flight each occurred.
* `tb_matmul_full`: the top with all defaults. Two matrices are compared
  with the 64 × C table above.
* `tb_accuracy`: the four word sizes. The measured error is checked against
  the table above.

`tb/tb_ref_pkg.sv` holds B as exact fractions and computes the reference
independently of the RTL. `tb/mm_run.sv` is the shared driver/checker for
the end-to-end tests.

## Simulating

With Verilator 5 (packages first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/mm_pkg.sv tb/tb_ref_pkg.sv rtl/const_mul.sv rtl/bram_dual.sv rtl/fetch.sv \
  rtl/mult_block.sv rtl/sum_block.sv rtl/matmul_top.sv tb/mm_run.sv tb/tb_matmul_top.sv \
  --top-module tb_matmul_top
./obj_dir/Vtb_matmul_top
```

Replace the last testbench file and `--top-module` to run any other
testbench. Lint the design with
`verilator --lint-only -Wall rtl/*.sv --top-module matmul_top`. The only
warnings are for package constants that a given module does not use.

## Changing the design

* **Different A:** pass a new `INIT` (elements 1..16). Larger values need
  more integer bits: `INT_W` in `mm_pkg`.
* **Different word size:** set `FRAC_W` (at least 3).
* **Different B:**
  * add the constant to `bconst_e`;
  * give it a shift/add form in `const_mul` (or reuse the CSD branch, which
    works for any constant once its truncated value is defined);
  * update `b_elem` in `mm_pkg`;
  * update `BNUM`/`BDEN` in `tb/tb_ref_pkg.sv`;
  * recheck that `INT_W` covers the largest possible sum.
