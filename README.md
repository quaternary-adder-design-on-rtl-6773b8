# Carry-free quaternary signed digit adder/subtractor

A binary adder is slow on wide words because a carry may have to ripple
from the lowest bit to the highest. This design adds and subtracts in a
redundant radix-4 number system, *quaternary signed digits* (QSD), in which
each digit can be any value from -3 to +3. The redundancy lets every digit
position settle its own result after looking only at its neighbour below, so
the core addition takes two digit-steps for any word length: 4, 64 or 128
bits all take the same time.

Binary operands go in and a binary result comes out. Inside, the operands
are converted to QSD, added carry-free, and converted back:

```
 a[WIDTH-1:0] --> to QSD (wiring) -----------------------\
                                                         qsd_adder --> qsd_to_bin --> result[WIDTH:0]
 b[WIDTH-1:0] --> to QSD (wiring) --> qsd_negate (sub) --/          \--> qsd_result (QSD digits)
```

Everything is combinational: there is no clock, reset or pipeline register.
The default width is 64-bit operands (32 digits), with an exact 65-bit result.

## Digit encoding

| quantity | range | wires | code |
|---|---|---|---|
| QSD digit | -3 .. 3 | 3 | two's complement (`3'b100` never occurs) |
| carry between digits | -1 .. 1 | 2 | two's complement (`2'b10` never occurs) |

A vector of digits `x[n-1:0]`, least significant at index 0, has the value
`D = sum(x[i] * 4^i)`. The types `qsd_digit_t` and `qsd_carry_t` are defined
in `qsd_pkg`.

## How carry-free addition works

Adding two digits gives a value from -6 to 6, which does not fit in one
digit. Each position therefore splits its digit sum into two parts,
`a[i] + b[i] = 4*c[i] + w[i]`, a carry `c[i]` for the position above and an
intermediate sum `w[i]` it keeps itself. The split obeys two limits:

* the carry magnitude is at most 1,
* the intermediate sum magnitude is at most 2.

The final digit of position i is `s[i] = w[i] + c[i-1]`, at most 2 + 1 = 3
in magnitude: always a single digit, so the second step never produces a new
carry and nothing ripples. Most sums have several two-digit representations
(3 is `0 3` or `1 -1`); the limits pick exactly one:

| a+b | -6 | -5 | -4 | -3 | -2 | -1 | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| carry c | -1 | -1 | -1 | -1 | 0 | 0 | 0 | 0 | 0 | 1 | 1 | 1 | 1 |
| intermediate w | -2 | -1 | 0 | 1 | -2 | -1 | 0 | 1 | 2 | -1 | 0 | 1 | 2 |

In short: the carry is +1 when the digit sum is 3 or more, -1 when it is
-3 or less, and 0 otherwise; `w = a + b - 4c`.

`qsd_carry_sum_gen` is the first step (one per digit) and
`qsd_second_step_adder` the second. `qsd_adder` puts N of the first and N-1
of the second together: digit 0 receives no carry, so its intermediate sum
is already its result, and the carry leaving the top digit becomes an extra
result digit `s[N]`. The sum of two N-digit numbers thus has N+1 digits and
never overflows.

## Subtraction

Every digit range is symmetric, so a QSD number is negated by negating each
digit on its own, without any borrow. `qsd_negate` does this to B when
`sub = 1`, and the same adder then computes A - B.

## Conversions at the edges

Conversion into QSD needs no gates and is wired inside the top module. A WIDTH-bit two's complement number is cut
into bit pairs; every pair but the top one is an unsigned digit 0..3, and
the top pair, which carries the sign weight, is read as a signed digit
-2..1. The digit vector then has exactly the binary value.

`qsd_to_bin` evaluates `sum(x[i] * 4^i)`. Positive digits are placed as
2-bit fields into one binary word P, the magnitudes of negative digits into
another word M, and the output is P - M. That subtraction is the one
carry-propagating operation in the whole design. The end-to-end delay is
therefore the constant QSD core plus one binary subtraction at the output.
The gain is largest when several additions are chained in QSD form. For
that, the top module also exposes the QSD result digits `qsd_result`.

## Modules

| file | role | parameters (default) |
|---|---|---|
| `rtl/qsd_pkg.sv` | digit and carry types | - |
| `rtl/qsd_negate.sv` | optional digit-wise negation | `N_DIGITS` (32) |
| `rtl/qsd_carry_sum_gen.sv` | first step: carry and intermediate sum of one digit | - |
| `rtl/qsd_second_step_adder.sv` | second step: intermediate sum + carry from below | - |
| `rtl/qsd_adder.sv` | N-digit carry-free adder, N+1 result digits | `N_DIGITS` (32) |
| `rtl/qsd_to_bin.sv` | QSD -> binary | `N_DIGITS` (33), `OUT_W` (2*N_DIGITS+1) |
| `rtl/quaternary_adder_top.sv` | binary adder/subtractor | `WIDTH` (64) |

Top-level ports of `quaternary_adder_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | two's complement operands |
| `sub` | in | 1 | 0: `a + b`, 1: `a - b` |
| `result` | out | WIDTH+1 | exact two's complement result |
| `qsd_result` | out | (WIDTH/2+1) x 3 | the same result as QSD digits |

To change the word length, set `WIDTH` on the top (it must be even); all
inner sizes follow from it.

## Design choices

The carry/sum recoding, its two limits, the two-step structure of N
generators and N-1 second-step adders, digit negation for subtraction, the
3-bit and 2-bit two's complement codes and the conversion formula are those
of the QSD adder this RTL implements. The following are choices of this
implementation:

* Operands are two's complement. The binary-to-QSD mapping uses
  non-negative digits except the signed top digit.
* The first step is written as a 4-bit add and a 13-entry case table, and
  the second step as a 3-bit add. There is no hand-derived gate network.
* The carry out of the top digit is kept as an extra result digit, and the
  binary result is WIDTH+1 bits wide, so no sum or difference overflows.
* QSD to binary conversion is done by the positive/negative split above.
* One `sub` input selects add or subtract.
* The design has no registers. For a clocked system, register the inputs and
  `result` around it.
* The digit code `3'b100` (-4) is not a valid input. The first step maps
  sums it alone can produce to zero.

## Verification

Each module has a self-checking testbench in `tb/` that computes expected
values independently, for example by Horner evaluation of digit strings or
by plain binary arithmetic. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `qsd_carry_sum_gen_tb`, `qsd_second_step_adder_tb`: exhaustive over all
  legal inputs, including the exact output codes.
* `qsd_adder_tb`: 32-digit random and extreme digit strings; checks the
  value and that every result digit is legal.
* `qsd_negate_tb`, `qsd_to_bin_tb`: random plus corner values at default
  sizes.
* `quaternary_adder_top_tb`: end to end at the default 64-bit width, with no
  parameter overrides. It runs 10,000 random and 72 corner operations
  against 65-bit reference arithmetic. It also checks the QSD output and the
  operand digits formed by the wired conversion. It
  also counts, and requires at least once, each of: addition, subtraction,
  positive and negative inner carries, a nonzero top digit, and a result
  outside the 64-bit range.

* `quaternary_adder_sizes_tb`: the top at widths 4, 8, 16, 32 and 128
  bits, 2,000 operations each, add and subtract mixed. Every width must
  produce at least one result that needs the extra bit.

Running one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/qsd_pkg.sv \
    tb/quaternary_adder_top_tb.sv --top-module quaternary_adder_top_tb
./obj_dir/Vquaternary_adder_top_tb
```

Replace the testbench name to run another; the `-Irtl` search path finds
the modules it uses. Each run finishes in well under a second.

Not verified: timing on any FPGA or process. The constant-delay property
holds by construction for the QSD core (two digit-steps deep), but no timing
or area figures come with this RTL.
