# Sigmoid and sigmoid-derivative units by partitioned linear minimax approximation

These are combinational hardware units that approximate the logistic sigmoid

    sig(x)  = 1 / (1 + e^-x)
    sig'(x) = e^-x / (1 + e^-x)^2 = sig(x) * (1 - sig(x))

for x in (-8, 8), with 7 to 11 accurate fraction bits. They hold no lookup
table, no ROM and no registers. The range [0, 8) is cut into a few intervals,
and on each interval the function is replaced by its first-order minimax line
`c0 + c1*x`: the straight line whose largest error over the interval is as
small as possible. The interval boundaries are chosen so that each interval
can be recognised from a handful of input bits. The coefficients are
constants wired straight into one-hot multiplexors, and one
multiply-accumulate evaluates the line. Negative arguments use the symmetry
of the functions, at the cost of a row of XOR gates.

The design follows a published partitioned-minimax sigmoid design (ten
configurations: both functions at 7, 8, 9, 10 and 11 accurate bits). Where
this RTL departs from it, or fills in details it leaves open, the section
"Departures and own choices" says so.

## Number formats

With K = `ACC` accurate bits:

| signal | format | width |
|---|---|---|
| `x` | two's complement: sign, 3 integer and K fraction bits, range [-8, 8) | K+4 |
| folded magnitude | 3 integer and K fraction bits (x2 x1 x0 . x-1 x-2 ...) | K+3 |
| `c0` | unsigned fraction, LSB 2^-(K+3) | K+3 |
| `c1` | LSB 2^-(K+5): unsigned for the sigmoid (< 1/4), two's complement for the derivative (> -1/8) | K+3 |
| multiply-accumulate result | two's complement, 2K+5 fraction bits | 2K+8 |
| `y` | unsigned fraction, range [0, 1) | K+3 |

Both outputs fit in a fraction: the sigmoid lies in (0, 1) and the derivative
in (0, 1/4].

## Datapath

```
 x ──┬─ sign ─────────────────────────────────────────────┐
     └─ XOR(sign) ─ |x| ─┬─ x2..x-2 ─ interval_select ─ sel (one-hot)
                         │                                 │
                         │                coef_mux ◄───────┘
                         │                 │c0   │c1
                         └───────────► mac_unit: c0 + c1*|x| (+ ½ LSB)
                                           │
                                     clamp to [0, 1)
                                           │
                          sigmoid: XOR(sign) / derivative: as is ──► y
```

1. **Input fold** (`sign_xor`): the integer and fraction bits of `x` are XORed
   with its sign bit. A negative `x` becomes its one's complement, which is
   |x| - 2^-K. This is not quite |x|, but it costs only XOR gates.
2. **Interval select** (`interval_select`): one AND term per interval over
   the five bits x2 x1 x0 x-1 x-2 of the folded value. Exactly one term is
   true.
3. **Coefficient multiplexors** (`coef_mux`): each select line gates that
   interval's constant `c0` and `c1`, and the gated words are ORed together.
4. **Multiply-accumulate** (`mac_unit`): computes `c0 + c1*|x|`, rounded to
   K+3 fraction bits.
5. **Clamp**: a result below 0 becomes 0, and a result of 1 or more becomes
   1 - 2^-(K+3).
6. **Output reflection**, sigmoid only: for a negative `x` the result is
   XORed with the sign, giving 1 - sig(|x|) - 2^-(K+3), which is about
   sig(x). The derivative is even, so its result is used unchanged for
   either sign.

The whole path is combinational. A new `x` gives a new `y` after one
propagation delay, with no clock and no latency in cycles.
`sigmoid_minimax_top` places one sigmoid unit and one derivative unit on a
shared input.

## Intervals and their differentiating bits

This part is the heart of the design. The intervals were built by repeated
halving: start from [0, 8), and split any interval whose minimax error is
still above 2^-K into two equal halves. So every interval is an aligned block
of power-of-two width, with both ends multiples of 1/4. Such a block is
identified by a fixed prefix of x2 x1 x0 x-1 x-2:

| interval | width (quarters) | bits compared | pattern |
|---|---|---|---|
| [4, 8) | 16 | x2 | `1` |
| [6, 8) | 8 | x2 x1 | `11` |
| [0, 1) | 4 | x2 x1 x0 | `000` |
| [3/2, 2) | 2 | x2 x1 x0 x-1 | `0011` |
| [13/4, 7/2) | 1 | all five | `01101` |

Because the patterns of one configuration tile [0, 8), the selects are one-hot
by construction. So no encoder is needed, and the multiplexors are plain
AND-OR gates. `interval_select` asserts the one-hot property in simulation.

The interval sets (interval start points, in units of 1/4; every set ends at 8):

| configuration | intervals | start points |
|---|---|---|
| sigmoid 7 bits | 5 | 0 1 2 3 4 |
| sigmoid 8 bits | 6 | 0 1 3/2 2 3 4 |
| sigmoid 9 bits | 10 | 0 1/2 1 5/4 3/2 2 5/2 3 4 6 |
| sigmoid 10 bits | 15 | 0 1/2 3/4 1 5/4 3/2 7/4 2 9/4 5/2 3 7/2 4 5 6 |
| sigmoid 11 bits | 19 | 0 1/4 1/2 ... 13/4 (every quarter) 7/2 4 9/2 5 6 |
| derivative 7 bits | 5 | 0 1 2 3 4 |
| derivative 8 bits | 6 | 0 1/2 1 2 3 4 |
| derivative 9 bits | 8 | 0 1/2 1 2 5/2 3 4 6 |
| derivative 10 bits | 13 | 0 1/4 1/2 3/4 1 3/2 2 5/2 3 7/2 4 5 6 |
| derivative 11 bits | 16 | 0 1/4 1/2 3/4 1 3/2 2 9/4 5/2 11/4 3 7/2 4 9/2 5 6 |

In `sigmoid_minimax_pkg` each set is stored as a 32-bit start mask (bit q set
when an interval starts at q/4). `interval_select` derives each interval's
pattern from the mask at elaboration. To add a configuration, add a mask and
the coefficients of any new intervals.

## Coefficients

Each interval's `c0` and `c1` are the first-order minimax coefficients of the
function on that interval. The package keeps them as six-decimal numbers, in
millionths, keyed by interval, so an interval shared by several
configurations has one entry. At elaboration they are rounded to nearest in
the formats above. The derivative's slopes are all negative, and the
sigmoid's are all positive and below 1/4. So `c1` can keep its binary point
two places below that of `c0` and still fit in K+3 bits.

All 60 distinct coefficient pairs were recomputed independently as minimax
lines. 59 agree with the published values to within 5e-6. For the derivative
on [5, 6) the published pair (0.020320, -0.002868)
has an error of 0.00068, more than its own published maximum error of
0.000253. This RTL uses the true minimax line, `c0 = 0.027302`,
`c1 = -0.004182`, whose error is 0.000253.

## Multiply-accumulate unit

`mac_unit` is a tree multiplier with one extra row. There is one
partial-product row per bit of |x|: `c1`, sign-extended for the derivative,
shifted, and gated by that bit. Below them sits a row holding `c0` aligned to
the product's binary point. A rounding constant (half an output LSB) is ORed
into that row below `c0`'s LSB, where it costs nothing. The K+4 rows are
reduced to two by levels of 3:2 carry-save rows (`csa_row`). The two rows are
then added by a two-level carry lookahead adder (`cla_adder`, 4-bit groups,
full lookahead across groups). The result is two bits wider than the product,
so no input combination can overflow it.

## Symmetry, and what it costs

- The input fold gives |x| - 2^-K rather than |x|, so a negative argument is
  evaluated 1 LSB closer to 0. For the sigmoid (slope at most 1/4) this adds
  up to 2^-(K+2) of error.
- The sigmoid reflection is a one's complement, 1 - s - 2^-(K+3), so it adds
  one output LSB. As a result `sig_y(x) + sig_y(~x)` is exactly 1 - LSB for
  every code; the testbenches check this.
- The derivative needs no reflection. `dsig_y(x) == dsig_y(~x)` holds exactly
  for every code.
- In the 7- and 8-bit configurations, the minimax line on [4, 8) overshoots
  near x = 8: the sigmoid line reaches 1.0033, and the derivative line drops
  below 0. Without the clamp, the reflected sigmoid near -8 would come out
  near 1, and the derivative near ±8 would wrap to almost 1. The clamp
  removes both. At 9 bits and above it never acts.

## Accuracy

Every input of all ten configurations was simulated. The table gives the
largest absolute error against the exact function:

| bits K | 2^-K | sigmoid | derivative |
|---|---|---|---|
| 7 | 0.007813 | 0.006836 | 0.006513 |
| 8 | 0.003906 | 0.004249 | 0.003955 |
| 9 | 0.001953 | 0.002083 | 0.002104 |
| 10 | 0.000977 | 0.000905 | 0.000726 |
| 11 | 0.000488 | 0.000437 | 0.000545 |

The interval sets were chosen so that the line alone stays within 2^-K. The
hardware adds the rounding of `c0`, `c1` and the output, plus the one-LSB
fold and reflection described above. So several configurations end slightly
above 2^-K, by at most 12 %. The testbenches bound each output by the
configuration's largest minimax error plus 0.625 * 2^-K, the sum of those
terms.

## Departures and own choices

- **Derivative symmetry.** The published description treats sig' as odd and
  sends it through the output XOR gates. sig' is even, and that path would
  output 1 - sig'(|x|). Here the derivative bypasses the output XOR.
- **Range clamp.** Added, for the overshoot described above.
- **Binary point of `c1`, rounding.** The published widths (K+3 bits for |x|,
  `c1` and `c0`) are kept. The placement of `c1`'s binary point, round-to-
  nearest coefficients, and a rounded output are choices made here. With `c1`
  aligned like `c0`, the error reached several times 2^-K.
- **Output format.** A K+3-bit fraction with no integer bit.
- **One coefficient pair** (derivative on [5, 6)) replaced, as described under
  Coefficients.
- **Reduction tree.** The published multiply-accumulate unit uses a
  reduced-area partial-product reduction, which is not specified here. This
  RTL uses a row-wise Wallace-style 3:2 reduction, and its own carry
  lookahead adder structure.
- **Top level.** The published designs are separate sigmoid and derivative
  circuits. `sigmoid_minimax_top` puts both on one input. Each unit remains
  independent.
- **Default accuracy.** `ACC` defaults to 11, the most accurate published
  configuration. Any of 7 to 11 can be built.

Area and delay were not measured against the published figures. Those came
from a commercial ASIC cell library and an Altera FPGA, which are not
reproduced here.

## Files

| file | contents |
|---|---|
| `rtl/sigmoid_minimax_pkg.sv` | formats, interval start masks, coefficient tables, quantisation |
| `rtl/sign_xor.sv` | conditional one's complement (input fold, output reflection) |
| `rtl/interval_select.sv` | differentiating-bit decoder, one-hot select |
| `rtl/coef_mux.sv` | one-hot multiplexors with hard-wired coefficients |
| `rtl/csa_row.sv` | row of full adders (3:2 compressor) |
| `rtl/cla_adder.sv` | two-level carry lookahead adder |
| `rtl/mac_unit.sv` | partial products + c0 row, carry-save tree, final adder |
| `rtl/minimax_approx.sv` | one complete approximator (`FN`, `ACC`) |
| `rtl/sigmoid_minimax_top.sv` | sigmoid and derivative units on one input (`ACC`) |
| `tb/tb_sigmoid_ref_pkg.sv` | independent reference model: its own copy of every coefficient-table row, interval lookup by comparison, real-valued rounding |
| `tb/tb_<block>.sv` | self-checking testbench of each block |
| `tb/tb_approx_check.sv`, `tb/tb_top_check.sv` | per-configuration checkers used by the testbenches |
| `tb/tb_sigmoid_minimax_top.sv` | end to end, all five accuracies, counts the fold, every interval and the clamp |
| `tb/tb_sigmoid_minimax_top_full.sv` | end to end at the default parameters, all 2^15 inputs |

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends the run if it hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sigmoid_minimax_pkg.sv tb/tb_sigmoid_ref_pkg.sv \
    tb/tb_sigmoid_minimax_top_full.sv --top-module tb_sigmoid_minimax_top_full
./obj_dir/Vtb_sigmoid_minimax_top_full
```

Replace the last testbench name to run another one. The packages must come
first on the command line; the other modules are found through `-I`. Each
testbench runs in well under a second.

## Changing the design

- Accuracy: set `ACC` on `sigmoid_minimax_top` (7 to 11). Widths follow
  automatically.
- A new interval set: add a start mask in `start_mask()` and, for intervals
  not yet listed, their `c0`/`c1` in `c0_micro()`/`c1_micro()`. Intervals
  must be aligned power-of-two blocks of quarters.
- Rounding: the output rounding is the `RND_BIT` parameter of `mac_unit`. Set
  it to -1 to truncate instead.
- Pipelining: there are no registers. A register after `coef_mux` or after
  the carry-save tree splits the path roughly in half.
