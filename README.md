# Shift-and-add natural logarithm unit

This unit computes `ln(x)` for an argument `x` in `[1/2, 2[` with no
multiplier. It does this by **multiplicative normalization**. Two sequences
run side by side:

    x(i+1) = x(i) * (1 + a_i * 2^-i)        x(1) = x,  a_i in {-1, 0, +1}
    y(i+1) = y(i) - ln(1 + a_i * 2^-i)      y(1) = 0

The digits `a_i` are chosen so that `x(i)` converges to 1. Once `x(p) = 1`,
`y(p) = ln(x)`, because `y` has subtracted the logarithm of every factor
that was multiplied into `x`. Each factor has the form `1 ± 2^-i`, so each
multiplication is really one shift and one add or subtract:
`x ± (x >> i)`. The logarithms `ln(1 ± 2^-i)` come from two small tables
addressed by the step number.

Each step gains at least one bit of convergence, so an N-bit result takes
steps `i = 1 .. N-1`, one per clock. Many steps have `a_i = 0` and change
nothing. With `ACCEL = 1` (the default), the unit jumps straight over runs of
such trivial steps. This roughly halves the average latency, and the result
is bit for bit the same.

## Number formats

| signal | format |
|---|---|
| `x_in`, internal `x` | unsigned, `N+1` bits: 1 integer bit `x_0` (bit `N`) and `N` fraction bits; fraction bit `x_k` (weight `2^-k`) is vector bit `N-k` |
| `y` | two's complement, `N+2` bits, `N` fraction bits (range needed: ±0.6932) |
| step numbers | unsigned, `$clog2(N+1)` bits |

Arguments outside `[1/2, 2[` must be scaled first: write `x = x' * 2^s` with
`x'` in `[1, 2[`, compute `ln(x')`, then add `s * ln 2`. That scaling is not
part of this unit. An assertion in `ln_unit` flags an argument below 1/2.

## Choosing the digit: the subtle part

The digit is read from two bits of the current `x`. No comparison or
multiplication is involved.

* **`x_0 = 1` (x ≥ 1):** `a_i = -x_i`. The step subtracts `x >> i` whenever
  fraction bit `i` is set.
* **`x_0 = 0` (x < 1):** `a_i = +(x_i AND NOT x_{i+1})`. The step adds
  `x >> i` only when bit `i` is the last 1 of a run of ones.

Why this converges: suppose that at step `i`, x > 1. Then the fraction bits
above position `i` are all zero (x = 1.000…01…). Subtracting `x·2^-i` either
leaves x above 1 with at least one more leading zero, or takes it just below
1 with at least `2i` leading ones. The mirror argument holds for x < 1, with
runs of ones. Either way, every step brings x at least one bit closer to
1.000…0. The integer bit `x_0` therefore does double duty: it selects the
digit rule, and it selects add or subtract, in both the x path and the y path.

## Datapath (`ln_unit`)

```
             +------------------+  i   +----------------+
 start ----->|  ln_step_control |----->| ln_skip_detect |  (ACCEL = 1 only;
             |  counter i, busy,|<-----|  next j >= i   |   else step = i)
             |  done            | step +----------------+
             +------------------+
                    | step
      +-------------+-------------------------+
      v                                       v
 +-----------------+   a'_i, x_0     +-----------------+
 | ln_digit_select |---------------->| ln_x_normalizer |  x register:
 +-----------------+                 | x +/- (x >> i)  |  right shifter, gate,
      ^   x                          +-----------------+  add/subtract unit
      +--------------------------------------|
      v step                                  
 +--------+ ln(1+2^-i), ln(1-2^-i) +------------------+
 | ln_lut |----------------------->| ln_y_accumulator |  4:1 mux on {x_0, a'_i},
 +--------+                        |  y - term        |  subtractor, Acc
                                   +------------------+
```

* `ln_x_normalizer` shifts `x` right by `i`. A gate then zeroes the shifted
  value when `a'_i = 0`. The result is added to `x` when `x_0 = 0` and
  subtracted when `x_0 = 1`, and the sum goes back into the `x` register.
  Bits shifted out are dropped.
* `ln_y_accumulator` picks the value to subtract with `{x_0, a'_i}`:
  `01` picks `ln(1+2^-i)`, `11` picks `ln(1-2^-i)`, and `00` or `10` pick 0.
  It subtracts that value from the accumulator.
* `ln_lut` holds both tables, `N` entries each. They are rounded to nearest at
  `N` fraction bits. The tables are computed while the design is elaborated,
  from `ln(1+t) = t - t²/2 + t³/3 - …` and `ln(1-t) = -(t + t²/2 + t³/3 + …)`
  with `t = 2^-i`. This uses exact integer arithmetic with `N+16` guard bits.
  No data file is needed, and any `N` up to 100 works.
* `ln_digit_select` is the digit rule described above.

## Skipping trivial steps (`ACCEL = 1`)

A step with `a_i = 0` leaves both `x` and `y` unchanged. So from counter value
`i`, the next useful step is the first `j ≥ i` whose digit, evaluated on the
*current* `x`, is non-zero. When x > 1 this is the end of the run of zeros
that starts at position `i`. When x < 1 it is the end of the run of ones.

`ln_skip_detect` evaluates the digit rule at every position `1..N-1` in
parallel, masks the positions below `i`, and priority-encodes the lowest
remaining position. The controller then performs step `j` and sets
`i = j + 1`. When no position is left, the operation ends. The skip length is
`s = j - i`.

The cost is a longer combinational path: the priority encoder sits in front
of the shifter and the tables. That longer path offsets the shorter latency,
increasingly so as N grows.

## Timing and handshake

* Raise `start` for one cycle while `busy = 0`. The operand is loaded on that
  edge, `y` is cleared, and the counter is set to `i = 1`.
  A `start` while busy is ignored.
* Each following clock is one iteration. An iteration ends the operation
  without stepping in two cases: `x` is exactly 1, or (accelerated) no
  non-trivial step is left. Otherwise it performs one step. After step `N-1`
  the operation ends.
* `done` pulses for one cycle after the last iteration. `y` is then valid and
  holds until the next `start`.
* **Latency**, counted from the edge that takes `start` to the edge that
  raises `done`, equals the number of iterations:
  * `ACCEL = 0`: `N-1` cycles (fewer if `x` becomes exactly 1 early).
  * `ACCEL = 1`: one cycle per non-trivial step, plus one final cycle unless
    step `N-1` itself was non-trivial.

Measured average latency of the accelerated unit over arguments in `[1, 2[`:

| N | measured average cycles | published figure | plain unit |
|---|---|---|---|
| 8  | 3.38 (all arguments) | 3.4 | 7 |
| 16 | 7.09 (all arguments) | 7.1 | 15 |
| 32 | 15.10 (3000 random) | 15.1 | 31 |
| 64 | 31.03 (3000 random) | 31.1 | 63 |

## Worked examples

The unit reproduces the method's two classic hand examples step for step:

* `x = 1.10111b = 1.71875`, N = 8. The non-trivial steps are `a1 = -1`,
  `a2 = +1`, `a4 = -1` and `a7 = -1`, and `x` reaches exactly 1.
  The result is `y = 0.542969`; `ln(1.71875) = 0.541597`.
* `x = 0.10011b = 0.59375`, N = 10. The non-trivial steps are `a1 = +1`,
  `a3 = +1` and `a9 = -1`. The result is `y = -0.521484`;
  `ln(0.59375) = -0.521297`. The accelerated unit takes 3 cycles instead of 9.

## Accuracy

Two things limit accuracy: the truncating shifter, and the rounding of each
table entry. Both work at `N` fraction bits with no guard bits. Over all
arguments, the largest measured errors against `ln(x)` are:

| N | largest error |
|---|---|
| 8 | 2.6 LSB |
| 16 | 6.0 LSB |
| 32 | 7.9 LSB (random arguments) |

At N = 64 the results match the bit-exact model; against `ln(x)` they agree
to the 2^-53 accuracy of a double-precision reference. The testbenches accept
up to `(2 + N/2)` LSB. To get a result accurate to
`N` bits, build the unit with a few more bits than needed and drop the extra
low bits of `y`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 64 | precision: fraction bits of `x` and `y`; 8, 16, 32 and 64 are the sizes characterised above |
| `ACCEL` | 1 | 1: skip trivial steps; 0: plain unit, one clock per step |

## How far to trust it, and where it departs from the method as published

* Followed from the published method: the two sequences, the digit rules,
  the exit when x = 1, steps 1 to N-1, the
  shift / gate / add-subtract / register datapath, the two tables, the 4:1
  selection and the subtracting accumulator, and the skipping of trivial
  steps.
* This design's own choices:
  * the number formats;
  * truncation in the shifter (the hand examples round the last step up);
  * rounding the tables to nearest;
  * the start/busy/done handshake;
  * a synchronous active-low reset;
  * the one extra cycle that ends an accelerated operation;
  * the insides of the skip circuit and of the bit-selecting logic.
* Not included:
  * the multiplier-based variant, which multiplies by table values
    `1 ± 2^-i` and which the shift-and-add design replaces;
  * argument pre-scaling and the `s·ln 2` correction;
  * the optional first factor `(1 + 2^0)`, which would extend the input
    range down to about 0.21.
* The FPGA clock rates and slice counts reported for this method on a
  Virtex-4 device cannot be checked from RTL alone.

## Files

`rtl/`:

* `ln_pkg.sv`: shared helpers (step-index width, table-entry function)
* `ln_unit.sv`: top level
* `ln_step_control.sv`, `ln_skip_detect.sv`, `ln_digit_select.sv`,
  `ln_x_normalizer.sv`, `ln_lut.sv`, `ln_y_accumulator.sv`: the blocks above

`tb/`:

* one self-checking testbench per block, `tb_<module>.sv`;
* `tb_ln_unit.sv`: end to end at N = 8 and 16 (every argument), N = 32
  (random, plain and accelerated) and N = 64 (random, plain), side by side,
  through `ln_unit_harness.sv`.
  It also checks that every mechanism occurred: add, subtract, trivial and
  skipped steps, and each way an operation can end;
* `tb_ln_unit_full.sv`: the default configuration (N = 64, accelerated),
  4000 random arguments;
* `tb_ln_examples.sv`: the two worked examples, step by step;
* `ln_ref_pkg.sv`: the bit-exact reference model used by the checks. Its
  table values come from a different series, `2·atanh(t/(2+t))`, computed
  exactly, so a wrong table entry cannot hide behind a shared formula.

Every testbench prints `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5 (packages first):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ln_pkg.sv tb/ln_ref_pkg.sv tb/tb_ln_unit.sv --top-module tb_ln_unit
./obj_dir/Vtb_ln_unit
```

Replace `tb_ln_unit` with any other testbench name. `tb_ln_examples` needs
only `rtl/ln_pkg.sv`. Lint the design alone with
`verilator --lint-only -Wall -Irtl -y rtl rtl/ln_pkg.sv rtl/ln_unit.sv`.
