# Bit-formatted fixed-point sum of products, and a Butterworth filter built on it

A linear filter spends most of its arithmetic in one sum of products,
`s = c_1 v_1 + ... + c_n v_n`. In fixed point the result only ever leaves the
datapath rounded to a known output format. Many bits of the exact products
cannot change that rounded result, and neither can many bits of the partial
sums. This RTL computes only the bits that can. It guarantees that the output
is a *faithful* rounding: it is at most one output LSB away from the correctly
rounded exact sum, and the error always lies within a known interval.

The design has two parts:

* `bitfmt_sop` is a generic, parameterised sum of products with constant
  coefficients. Its shifts and widths follow from the number formats at
  elaboration time.
* `df1_bitfmt_filter` is an IIR filter in Direct Form I, and the top level.
  It evaluates each output as a single bit-formatted sum of 9 products. The
  defaults are a 4th-order Butterworth low-pass with 16-bit data and a 20-bit
  accumulator.

## Number formats

A fixed-point format is written `(m, l)`:

* `m` is the bit position of the two's-complement sign bit, and `l` is the
  position of the LSB.
* A word of that format has `m - l + 1` bits. The integer `X` it stores means
  `X * 2^l`.
* The product of a `(m_c, l_c)` constant and a `(m_v, l_v)` variable has
  format `(m_c + m_v + 1, l_c + l_v)`.

Throughout, `(m_f, l_f)` is the output format of the sum.

## How the sum is trimmed

The sum is trimmed from both ends.

**Bottom end: guard bits.** Let `n_f` be the number of products that have
bits below the output LSB `l_f`.

* Each product is rounded to the common LSB `l_f - delta`, with
  `delta = ceil(log2(n_f))`. Bits below that position are dropped.
* The error this adds is less than `n_f * 2^(l_f - delta)`, which is at most
  `2^(l_f)`. So the result can move by at most one output LSB.
* The rounding is done inside multiplier `i`, as an arithmetic right shift by
  `d_i = l_f - delta - (l_c_i + l_v_i)`. A product whose LSB is already above
  `l_f - delta` is padded with zeros instead (`d_i < 0`).
* After this step every term has the same LSB. No alignment shifts are needed
  in the adders, and no further rounding happens inside the sum.
* A product that lies entirely below `l_f - delta` contributes nothing and gets
  no multiplier. Removing such terms can lower `n_f`, and therefore `delta`.
  `delta` is recomputed until it stops changing. This iteration runs in a
  constant function at elaboration (`bitfmt_sop.eval_delta`).

**Top end: wrap-around.** The result is known to fit in `(m_f, l_f)`. In two's
complement, the bits above `m_f` of every product and every partial sum then
only repeat the sign, and the overflows of intermediate sums cancel out.

* Every product is cut to the bits `m_f` down to `l_f - delta`.
* All additions are done modulo `2^(m_f - l_f + delta + 1)`.
* For the example this gives a 20-bit accumulator, where the exact sum would
  need 41 bits.

**Final shift.** The accumulator is shifted right by `delta` onto
`(m_f, l_f)`, with the same rounding mode as the products.

**Error guarantee.** Let `e` be the output minus the exact sum:

| mode | interval of `e` |
|---|---|
| truncation (round down) | `sum over shifted products of (-2^(l_i+d_i) + 2^(l_i))  - 2^(l_f) + 2^(l_f-delta)`, up to 0; always inside `(-2^(l_f+1), 0]` |
| round to nearest | `sum (-2^(l_i+d_i-1) + 2^(l_i)) - 2^(l_f-1) + 2^(l_f-delta)` up to `sum 2^(l_i+d_i-1) + 2^(l_f-1)`; always inside `(-2^(l_f), 2^(l_f))` |

With truncation the output is `floor(s)` or one LSB below it. With
round-to-nearest it is `floor(s)` or `ceil(s)`.

All evaluation orders of the sum give the same result, because every term has
the same LSB and the arithmetic is modular. The adder tree is therefore the
most parallel one: a balanced binary tree of `ceil(log2 n)` levels.

## The example filter

```
y(k) = sum_{i=0..4} b_i u(k-i)  +  sum_{i=1..4} (-a_i) y(k-i)
```

The filter is `butter(4, 0.136)`. All constants and variables are 16 bits.

* The input `u` has format `(4,-11)` and is expected in [-13, 13].
* The output `y`, and each `y(k-i)` fed back, has format `(5,-10)`. It is
  known to stay within about ±17.12.
* Each constant `c` is stored as `C = round(c * 2^-l_c)`. Its MSB is
  `m = ceil(log2(-c))` for negative `c` and `floor(log2(c)) + 1` for positive
  `c`, and `l_c = m - 15`.
* The feedback constants are stored already negated, so the filter is one pure
  sum of products.

| term | real constant | `C` | `l_c` | product format | right shift `d_i` |
|---|---|---|---|---|---|
| b0·u(k)   |  0.001328017792779 | 22280  | -24 | (-4,-35) | 21 |
| b1·u(k-1) |  0.005312071171115 | 22280  | -22 | (-2,-33) | 19 |
| b2·u(k-2) |  0.007968106756673 | 16710  | -21 | (-1,-32) | 18 |
| b3·u(k-3) |  0.005312071171115 | 22280  | -22 | (-2,-33) | 19 |
| b4·u(k-4) |  0.001328017792779 | 22280  | -24 | (-4,-35) | 21 |
| -a1·y(k-1) |  2.871116228316502 | 23520  | -13 | (8,-23) | 9 |
| -a2·y(k-2) | -3.208250066295749 | -26282 | -13 | (8,-23) | 9 |
| -a3·y(k-3) |  1.634594881084453 | 26781  | -14 | (7,-24) | 10 |
| -a4·y(k-4) | -0.318709327789667 | -20887 | -16 | (5,-26) | 12 |

All 9 products have bits below `l_f = -10`, so `delta = ceil(log2 9) = 4`. The
products are summed on format `(5,-14)`, which is 20 bits, and the result is
shifted right by 4 to 16 bits.

With truncation, the per-sample error interval is `[-1.4645302e-3, 0]`.
Passed through the error filter `1/A(z)` (DC gain 49.5647, worst-case peak gain
66.8474), it bounds the output error at `[-8.52445e-2, 1.26555e-2]`.

## Hardware structure

```
df1_bitfmt_filter                top: Direct Form I filter
 ├─ tap_delay_line  u_udl        u(k-1) .. u(k-4)
 ├─ tap_delay_line  u_ydl        y(k-1) .. y(k-4)
 └─ bitfmt_sop      u_sop        9-term bit-formatted sum
     ├─ fxp_const_mult  x9       C_i * v_i, shift d_i, keep W_ACC bits
     │   └─ fxp_round_shift
     ├─ mod_sum_tree             balanced modular adder tree, W_ACC bits
     └─ fxp_round_shift          final shift by delta
bitfmt_pkg                       rounding-mode enum, ceil_log2, example constants
```

| module | does |
|---|---|
| `fxp_round_shift` | Right shift with truncation or round-to-nearest (ties go up), or zero padding for negative shifts; wraps the result to the output width. |
| `fxp_const_mult` | Multiplies by a constant parameter and formats the product to the accumulator window. |
| `mod_sum_tree` | N-input W-bit modular adder tree. |
| `bitfmt_sop` | Derives `delta`, `d_i` and `W_ACC` from the formats, and instantiates the multipliers, the tree and the final shift. |
| `tap_delay_line` | Register shift line with enable and synchronous reset. |
| `df1_bitfmt_filter` | Wires the two delay lines and the sum into the filter recursion. |

### Interface and timing of the top

| port | dir | bits | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active low: clears both delay lines and `out_valid` |
| `in_valid` | in | 1 | `u_in` carries a new sample this cycle |
| `u_in` | in | 16 | `u(k)` on (4,-11) |
| `out_valid` | out | 1 | high for one cycle after a sample was accepted |
| `y_out` | out | 16 | `y(k)` on (5,-10); holds until the next sample |

* The filter takes one sample per clock and has no back-pressure.
* `y(k)` is computed combinationally from `u_in` and the registered history.
  It is captured into the output delay line on the edge where `in_valid` is
  high, so the latency is one cycle.
* Because `y(k)` feeds `y(k+1)`, the whole sum of products (a multiplier, four
  adder levels and the final shift) lies on one register-to-register path.
  That path sets the clock rate.
* An assertion in the top checks that `out_valid` follows an accepted sample.

## Trust and departures

The arithmetic is exact to the method:

* the guard-bit rule and the per-product shifts;
* the modular 20-bit accumulator;
* the final shift by `delta`;
* the constants and shifts of the example, which match an integer reference
  program of the same filter (`(22280*U_4) >> 21`, `(-20887*Y_4) >> 12`,
  `Y <- R >> 4`, and so on).

Choices made here, where the method leaves the point open:

* **Interface.** The valid strobe, one sample per cycle, one-cycle latency,
  and reset to the rest state (all past samples zero).
* **Tie rule.** Round-to-nearest breaks ties upward, by adding half an LSB and
  then truncating.
* **Counting terms for `delta`.** The iteration starts from the terms that
  have bits below `l_f`, not from all terms. It drops a term when its MSB lies
  below `l_f - delta`. Both readings give `delta = 4` for the example.
* **Dropped terms.** A dropped term is treated as zero. No multiplier is built
  for it.
* **Constant MSB.** For positive constants the MSB is computed as
  `floor(log2 c) + 1`, which reproduces every product format of the example.
* **Full multipliers.** Each multiplier is written as a full 16x16 product
  followed by a shifter. Removing the product bits that are never used is left
  to synthesis.
* **No overflow detection.** Correctness rests on the output staying within
  its format. For the example this holds for every input in [-13, 13].
* **`DELTA_FORCE`.** This parameter replaces the computed `delta`. It exists
  only to reproduce the comparison points "all bits kept" (`delta = 25`,
  41-bit accumulator) and "no guard bits" (`delta = 0`, 16 bits). The default,
  -1, uses the computed value.

To configure another filter:

* set `NB`, `NA`, `B_INT`, `B_LSB`, `NA_INT` (the negated `a_i`), `NA_LSB`,
  `L_U`, `M_Y` and `L_Y`;
* compute each constant's integer and LSB with the rule in *The example
  filter*;
* choose `M_Y` so that the output range of the filter fits.

`bitfmt_sop` can also be used on its own for any sum of constant products. Its
constants are `int`, so `W_C` is at most 32.

## Verification

Each testbench checks the block against values it computes independently:
real arithmetic, or 64-bit integer arithmetic with the exact sum. Each ends
with a line `TB_RESULT checks=N failures=M`.

| testbench | checks |
|---|---|
| `tb_fxp_round_shift` | truncation, nearest (including ties), zero padding and wrap, against `$floor` in real arithmetic |
| `tb_fxp_const_mult` | four of the example's multipliers, including a narrow wrapping window, with corner inputs |
| `tb_mod_sum_tree` | 9x20-bit and 5x8-bit trees against the integer sum modulo `2^W`; counts the wrapping cases |
| `tb_tap_delay_line` | shift, hold and mid-run reset against a queue model |
| `tb_bitfmt_sop` | `delta = 4` and `W_ACC = 20` for the example; a 3-term case where the iteration must drop a term (`delta = 1`); faithful rounding and the error intervals in both modes, on 6000 random vectors |
| `tb_df1_bitfmt_filter` | the top at its default parameters, over 6000 samples of noise, a ±13 square wave and idle gaps, then a mid-stream reset (see below) |
| `tb_fix_compare` | the three `delta` choices and round-to-nearest side by side on 4000 white-noise samples |

`tb_df1_bitfmt_filter` checks:

* that the output is bit-exact against an integer model of the formatted sum;
* that every `e(k)` lies in `[-1.4645302e-3, 0]`;
* that the output error against a double-precision filter stays in
  `[-8.52445e-2, 1.26555e-2]`;
* the one-cycle latency, hold while idle, and reset.

It also counts how often each mechanism happened: bits truncated from
products, products cut by the top-end wrap, wrapped partial sums, and
non-zero bits dropped by the final shift. A mechanism that never happened
counts as a failure.

Results on these runs:

| implementation | mean output error | max abs error |
|---|---|---|
| `delta = 4` (default) | -0.034 | 0.053 |
| all bits kept (`delta = 25`) | -0.023 | 0.039 |
| no guard bits (`delta = 0`) | -0.206 | 0.27 |
| `delta = 4`, round to nearest | +0.002 | 0.018 |

* The square-wave phase drives `y` close to its peak. There, `-a_1·y(k-1)`
  exceeds the 20-bit window, and partial sums wrap, yet every output stays
  bit-exact.
* Four guard bits give almost the accuracy of keeping all 41 bits, for half
  the accumulator width.

### Running a testbench

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_df1_bitfmt_filter rtl/bitfmt_pkg.sv tb/tb_df1_bitfmt_filter.sv
./obj_dir/Vtb_df1_bitfmt_filter
```

* Replace the testbench name to run another one.
* Verilator is two-state. Every register that is read is reset or
  initialised, so random initial values (`+verilator+rand+reset+2`) do not
  change the results.
* Each testbench runs in well under a second.
* For lint: `verilator --lint-only -Wall -y rtl rtl/bitfmt_pkg.sv rtl/<module>.sv`.
  The remaining warnings are unused upper bits of the shifter's working word,
  which are discarded by design, and unused package constants.
