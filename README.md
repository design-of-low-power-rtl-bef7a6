# Approximate full adders and an LMS noise canceller built on them

Signal-processing outputs such as speech are judged by ear, so the arithmetic
behind them does not have to be exact. This design takes advantage of that
inside the adder itself. The full-adder cell is simplified until a few rows of
its truth table are wrong, and the simplified cells are used only in the
low-order bits of a word. The high-order bits keep exact cells, so an error
can never exceed a few units in the low bits. In silicon a simpler cell has
fewer transistors, less switched capacitance and a shorter carry path, which
allows a lower supply voltage. In RTL, what can be reproduced is the
arithmetic: exactly which results change, and by how much.

The RTL contains:

* a full-adder cell with six variants: exact, and approximations 1 to 5;
* an exact full adder in the 9-transistor "select on A" style;
* ripple-carry and carry-save adders with approximate cells in their `Y`
  low-order positions;
* an 8x8 multiplier built as an exact carry-save array followed by an
  approximate ripple-carry adder;
* an adaptive noise canceller. It is an LMS-trained FIR filter, and its sums
  and weight updates are done by approximate adders.

`anc_top` is the top level. It holds the noise canceller, with the multiplier
beside it on its own ports.

## The full-adder variants

Each variant is a fixed truth table. Wrong entries are marked `*`.

| A B Cin | exact S C | approx 1 S C | approx 2 S C | approx 3 S C | approx 4 S C | approx 5 S C |
|:-------:|:---------:|:------------:|:------------:|:------------:|:------------:|:------------:|
| 0 0 0   | 0 0       | 0 0          | 1* 0         | 1* 0         | 0 0          | 0 0          |
| 0 0 1   | 1 0       | 1 0          | 1 0          | 1 0          | 1 0          | 0* 0         |
| 0 1 0   | 1 0       | 0* 1*        | 1 0          | 0* 1*        | 0* 0         | 1 0          |
| 0 1 1   | 0 1       | 0 1          | 0 1          | 0 1          | 1* 0*        | 1* 0*        |
| 1 0 0   | 1 0       | 0* 0         | 1 0          | 1 0          | 0* 1*        | 0* 1*        |
| 1 0 1   | 0 1       | 0 1          | 0 1          | 0 1          | 0 1          | 0 1          |
| 1 1 0   | 0 1       | 0 1          | 0 1          | 0 1          | 0 1          | 1* 1         |
| 1 1 1   | 1 1       | 1 1          | 0* 1         | 0* 1         | 1 1          | 1 1          |

How each variant was reached:

* **Approximation 1** removes transistors from the mirror adder. The removals
  never create a short or an open, and they cost as few table entries as
  possible.
* **Approximation 2** uses the fact that Sum equals the inverted carry in six
  of the eight rows. It keeps the exact carry and sets Sum = not Cout.
* **Approximation 3** combines the two: it takes the carry of approximation 1
  and sets Sum = not Cout.
* **Approximation 4** sets Cout = A, which is right in six of the eight rows.
* **Approximation 5** is two buffers: Sum = B and Cout = A. It ignores its
  carry input altogether.

`approx_fa` stores approximations 1 to 4 as 8-bit constants indexed by
`{A,B,Cin}`. It builds approximation 5 from two wires. For the exact variant
it instantiates `fa_9t`.

`fa_9t` splits the sum on A: with A = 0 the sum is B xor Cin, and with A = 1
it is B xnor Cin. Its carry uses the same split: B and Cin when A = 0, B or Cin
when A = 1. The conventional 24-transistor mirror adder has exactly the same
logic function, so it is not written separately.

### What the errors add up to

Take an N-bit ripple-carry adder whose `y` low-order cells are approximate,
with random operand bits and carry-in 0. Its mean error has a closed form:

| cell | mean error E[approx - exact] |
|------|------------------------------|
| approx 1 | 0 |
| approx 2 | y/4 |
| approx 3 | 1 - 2^-y |
| approx 4 | (1 - 2^(y-1))/4 |
| approx 5 | 1/2 |

The error does not depend on N, because the exact upper cells add exactly what
they are given. All of it comes from the `y` low sum bits and from the carry
that leaves them. `tb/rca_mean_error_tb.sv` runs every operand pair for
y = 1..6 and reproduces every entry exactly. It also prints the error
variance.

Approximation 1 is the only variant with no bias. That is why it is the
default approximate cell in the adders, the multiplier and the canceller. Accumulation in the LMS filter
would turn any bias into drift.

## Adders: `approx_rca`, `approx_csa`

Both adders take the same three parameters:

* `N`: the width;
* `Y`: how many low-order cells are approximate (0 gives an exact adder);
* `MODE`: which approximate cell is used, a value of `approx_pkg::fa_mode_e`.

`approx_rca` is a plain carry chain. With approximation 5 nothing propagates
through the approximate part, and the carry into bit `Y` is simply `a[Y-1]`.

`approx_csa` is one row of independent cells. It computes
x + y + z = s + (c << 1) exactly when `Y = 0`. The carry vector is returned
unshifted.

Both are purely combinational.

## Multiplier: `approx_mult`

The multiplier is unsigned and `W` x `W`, with `W = 8` by default. It works in
two steps:

1. A linear array of `W-2` exact carry-save rows reduces the partial products
   to two rows.
2. A `2W`-bit `approx_rca` adds those two rows, with `Y = 4` approximate cells.

All error therefore comes from the low bits of the final adder. The error
stays below 2^(Y+1) in magnitude. Over all 65536 operand pairs, with the
default approximation 1, the mean error is -6.5 and the largest error is 15.
The mean is not zero, unlike in a lone adder, because the rows that come out
of a carry-save array are not uniformly random.

The table below gives the mean error of the multiplier for each cell and each
`Y`, over all operand pairs:

| cell | Y=2 | Y=4 | Y=6 | Y=8 |
|------|-----|-----|-----|-----|
| approx 1 | -1.0 | -6.5 | -30.0 | -125.25 |
| approx 2 | 2.0 | 8.5 | 33.0 | 129.375 |
| approx 3 | 2.0 | 8.5 | 33.0 | 129.5 |
| approx 4 | 0.75 | 3.75 | 15.75 | 63.5 |
| approx 5 | 0.5 | 1.0 | 1.5 | 2.0 |

At large `Y`, approximations 4 and 5 have the smallest mean error. Their
largest errors are also the smallest (170 and 128 at Y = 8, against 255 for
the others).

## The noise canceller: `lms_filter` inside `anc_top`

```
 ref_in  x(n) --+--> [16-tap delay line] --> w_i * x(n-i) --> approximate adder tree  --> y(n)
                |                                                                          |
 pri_in  d(n) --|---------------------------------------------------------------> (-) <----+
                |                                                                  |
                +--> e(n) * x(n-i) >> (15 + MU_SHIFT) --> approximate add to w_i <--+--> clean_out = e(n)
```

There are two input streams:

* `ref_in` carries the ambient noise, from a pick-up placed away from the
  speaker.
* `pri_in` carries speech plus that noise, after the noise has travelled some
  unknown acoustic path.

The filter learns the path. Its output `y(n)` is the estimate of the noise in
the primary input, and subtracting it leaves the speech. The difference
`e(n) = d(n) - y(n)` is at once the cleaned output and the error that trains
the weights:

```
e(n)      = d(n) - sum_i w_i(n) x(n-i)
w_i(n+1)  = w_i(n) + mu * e(n) * x(n-i),   mu = 2^-MU_SHIFT
```

### Number format and where the approximation sits

* Samples are signed Q1.15 (`DW = 16`), and so are weights (`CW = 16`).
* Each product `w_i * x(n-i)` is exact, 32 bits wide.
* The 16 products are summed by a balanced tree of 15 adders in 4 levels.
  Each level's sums are the next level's operands, and an odd entry passes
  up unchanged when `TAPS` is not a power of two. Each adder is an
  `ACC_W = 36`-bit `approx_rca` with `ACC_Y = 8` approximate low bits. Those 8
  bits lie well below the output's least significant bit: `y` keeps
  accumulator bits 15 and up. So the approximation costs a fraction of an LSB
  per add. The order of additions matters once they are approximate, so the
  reference model in `tb/` uses the same pairing.
* `y` is the accumulator shifted right by 15 and saturated to 16 bits.
  `e = d - y` is exact and also saturated.
* Weight update: `e * x(n-i)` is exact. It is shifted right arithmetically by
  `15 + MU_SHIFT` and added to the weight by a 16-bit `approx_rca` with
  `UPD_Y = 2` approximate bits. Weights wrap on overflow. With inputs inside
  ±1 and a stable step size they stay well inside that range.
* `mu = 2^-4 = 0.0625`. The LMS step size has to stay between 0 and 0.2 for
  the filter to converge without fluctuating.

### Timing and handshake

The filter is fully parallel: it accepts one sample pair per clock when
`in_valid` is high. On that clock edge it does three things:

* registers `e` and `y`;
* updates all the weights;
* shifts the delay line.

`out_valid` is high in the next cycle, so latency is one clock. When
`in_valid` is low, nothing changes and `out_valid` falls. Reset is
synchronous and active low. It clears the weights, the delay line and the
outputs. The current weights are visible on `weights` (`w_out`).

### `anc_top` ports

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` | in | 1 | a sample pair is present |
| `ref_in` | in | 16 | reference noise sample, Q1.15 |
| `pri_in` | in | 16 | speech + noise sample, Q1.15 |
| `out_valid` | out | 1 | `clean_out` / `noise_est` hold the last sample's results |
| `clean_out` | out | 16 | cleaned speech, e(n) |
| `noise_est` | out | 16 | noise estimate, y(n) |
| `weights` | out | 16 x 16 | filter weights |
| `mul_a`, `mul_b` | in | 8 | multiplier operands (unsigned) |
| `mul_p` | out | 16 | approximate product, combinational |

The microphones and converters that produce the two sample streams are
outside the design.

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The reference models in `tb/` are
independent of the RTL:

* `approx_ref_pkg` writes each cell as Boolean expressions, read row by row
  off the truth table above, where the RTL uses lookup constants.
* `lms_ref_pkg` is an integer model of the filter. It calls that bit-level
  adder model for every addition the hardware makes approximately.

| testbench | what it shows |
|-----------|---------------|
| `fa_9t_tb` | 9T cell equals A+B+Cin on all 8 inputs |
| `approx_fa_tb` | every variant matches its table, and each has the expected number of wrong Sum and Cout rows |
| `approx_rca_tb` | 2000 random vectors on every variant (N=16, Y=4), an exact instance and an all-approximate one |
| `approx_csa_tb` | x+y+z = s+2c for the exact row; approximate rows match the model and agree with the exact row above Y |
| `approx_mult_tb` | all 65536 pairs: the exact instance gives a*b; the approximate one matches a reference carry-save reduction plus approximate adder, with error below 2^(Y+1) |
| `lms_filter_tb` | 3000 samples with random gaps in `in_valid`; every output and weight matches the model; latency is 1 clock; residual noise power is 1% of the input noise |
| `anc_top_tb` | end to end at default parameters (see below) |
| `rca_mean_error_tb` | mean error of all five cells for y = 1..6 against the closed forms above |
| `mult_mean_error_tb` | the 8x8 multiplier with every cell at Y = 2, 4, 6, 8 on all operand pairs: matches the reference bit for bit, and prints mean and largest error |

`anc_top_tb` streams 24000 samples, three seconds at 8 kHz, through `anc_top`
with no parameter overrides:

* The "speech" is three tones whose frequencies step every 4000 samples.
* The noise is white, and reaches the primary input through a 3-tap path.
  Half way through the run that path changes, so the filter has to re-adapt.
* Every sample, noise estimate and weight is compared with the model.
* After convergence the residual noise power is 0.7% of the noise power
  before the path change, and 0.8% after it.
* The test counts how often each behaviour occurs, and fails if any never
  does: weight updates, accumulations where the approximate sum differs from
  the exact one (almost every sample), idle cycles, the path change, and
  inexact multiplier products.

Each testbench has a watchdog.

## Simulating

All design files are in `rtl/`, and packages must be read first. For example,
the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/approx_pkg.sv tb/approx_ref_pkg.sv tb/lms_ref_pkg.sv \
  rtl/fa_9t.sv rtl/approx_fa.sv rtl/approx_rca.sv rtl/approx_csa.sv \
  rtl/approx_mult.sv rtl/lms_filter.sv rtl/anc_top.sv tb/anc_top_tb.sv \
  --top-module anc_top_tb -o sim
./obj_dir/sim
```

It runs in a few seconds. For the other testbenches, swap the last file and
`--top-module`. Linting the RTL at its default parameters with
`verilator --lint-only -Wall` is clean. Built as approximation 5, `approx_fa`
leaves its carry input unused, and the linter says so.

## Changing it

* **Cell choice and how far it reaches.** On `anc_top` these are `MODE`,
  `ACC_Y` and `UPD_Y` for the filter, and `MUL_MODE` and `MUL_Y` for the
  multiplier. On the individual adders they are `MODE` and `Y`.
* **Filter.** `TAPS`, `DW`, `CW` and `MU_SHIFT` (mu = 2^-MU_SHIFT).
* If you change any default, also change the matching `localparam`s in
  `tb/anc_top_tb.sv`, which restates the defaults for its reference model.
* Biased cells (approximations 2 to 5) in the weight update make the weights
  drift. Keep `UPD_Y` small or use approximation 1 there.

## What is specified and what is chosen here

These parts are fixed by the design this RTL follows:

* the five approximate truth tables;
* the mean-error formulas;
* approximate cells in the low bits only, exact cells above;
* the "select on A" structure of the 9T cell's sum;
* the 8x8 multiplier built as an exact carry-save stage plus an approximate
  ripple-carry adder;
* the LMS equations and the bounds on mu;
* the canceller arrangement;
* the 24000-sample recording length.

These are this implementation's own choices:

* **Canceller:** the filter length (16), the balanced pairing of the adder
  tree, the word widths and the Q1.15
  format, mu = 1/16, which additions are approximate (the sum of products and
  the weight update, not the products or `d - y`), the numbers of approximate
  bits, saturation, the valid/one-clock-latency interface and the reset.
* **Adders:** the default cell and the default widths.
* **Multiplier:** the linear (rather than tree-shaped) carry-save array.
* **9T cell:** the select form of its carry.

Two further points:

* Approximation 4 is described in words as computing Sum "like approximation
  1". Its truth table differs from approximation 1 in row 011. The table is
  what is built, and it is also the one that gives the stated mean-error
  formula.
* Circuit-level results have no RTL counterpart and are not reproduced: power,
  delay, voltage scaling, transistor counts and layout area.
