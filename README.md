# Test filter 4: a fifth-order IIR filter with a shared shift-add multiplier block

This RTL implements a small, fast IIR filter. All of its multiplications by
constant coefficients are replaced by one shared network of shifts and adders.
The network is built to meet two goals together: few adders (area) and few
adders in series (speed). The coefficients are a 5-tap elliptic IIR test
filter with 10-bit canonic-signed-digit (CSD) coefficients. That filter is a
worked example for multiplier-block reduction in pulse-shaping filters
for mobile receivers. Multiplying by the ten coefficients one by one would take
30 adders. Here the products are formed with 14 operations: 13 two-input
adders/subtractors and one negation. No path has more than three adders in
series.

```
          B(z)     b0 + b1 z^-1 + b2 z^-2 + b3 z^-3 + b4 z^-4
   H(z) = ----  =  -------------------------------------------------
          A(z)     1 + a1 z^-1 + a2 z^-2 + a3 z^-3 + a4 z^-4 + a5 z^-5

   b = ( 331, -89,  75, -89, -155) / 1024
   a = ( 130, 621, 489, 165,  489) / 1024
```

## Structure: transposed direct form I

```
                     +------------------------------------------+
                     |                                          |
 x(n) ---->(-)---- w1(n) ---> [ tf4_mb: 10 products of w1(n) ]  |
            ^                   |a1..a5       |b1..b4     |b0   |
            |                   v             v           v     |
            |           [ tdf_chain A ]  [ tdf_chain B ]-->(+)--+--> [reg] --> y
            |                   |          y_full = b0*w1 + s_b
            +------ s_a --------+
     s_a(n) = sum_{k=1..5} a_k w1(n-k)    s_b(n) = sum_{k=1..4} b_k w1(n-k)
```

The recursive part comes first: `w1(n) = x(n) - sum_{k=1..5} a_k w1(n-k)`.
The output is then `y(n) = sum_{k=0..4} b_k w1(n-k)`. In the transposed form,
every coefficient multiplies the same signal, `w1(n)`. So one multiplier block
(`tf4_mb`) can serve both sums. Each product goes into a chain of registers
(`tdf_chain`) that carries partial sums toward the node that uses them. The
A chain has five stages and feeds the input subtractor. The B chain has four
stages (b1..b4), and b0·w1 is added after it.

The critical path is the feedback loop. It runs from an A-chain register
through the input subtractor, three adder steps of the multiplier block and
one chain adder, and back to the register. This loop cannot be pipelined
without changing the filter. That is why the depth of the multiplier block
matters more here than in an FIR filter.

## The multiplier block (`tf4_mb`)

This is the core of the design. The CSD digits of the coefficients (weights
2^-1 ... 2^-10) are:

| coef | -1 | -2 | -3 | -4 | -5 | -6 | -7 | -8 | -9 | -10 | value·1024 |
|------|----|----|----|----|----|----|----|----|----|-----|-----------:|
| b0   |    |  1 |    |  1 |    |  1 |    | -1 |    | -1  | 331 |
| b1   |    |    | -1 |    |  1 |    |  1 |    |    | -1  | -89 |
| b2   |    |    |    |  1 |    |  1 |    | -1 |    | -1  | 75 |
| b3   |    |    | -1 |    |  1 |    |  1 |    |    | -1  | -89 |
| b4   |    |    | -1 |    | -1 |    |    |  1 |    |  1  | -155 |
| a1   |    |    |  1 |    |    |    |    |    |  1 |     | 130 |
| a2   |  1 |    |  1 |    |    | -1 |    | -1 |    |  1  | 621 |
| a3   |  1 |    |    |    | -1 |    |  1 |    |    |  1  | 489 |
| a4   |    |    |  1 |    |  1 |    |    |  1 |    |  1  | 165 |
| a5   |  1 |    |    |    | -1 |    |  1 |    |    |  1  | 489 |

Three kinds of sharing remove adders:

1. **A horizontal common subexpression.** The digit pattern `[1 0 1]` appears
   inside several coefficients (b0, b2, b4, a2, a4). It is computed once as
   `w2 = w1 + w1>>2` and then used at different shifts.
2. **Vertical common subexpressions.** Some digit columns repeat across
   coefficients two taps apart. In this set the repeats go further: b1 equals
   b3 and a3 equals a5. In the transposed structure each such product is
   computed once and fed to both taps.
3. **Subexpressions that recur at a fixed shift.** The pair `w1>>5 - w1>>3`
   (call it `s1`) is part of b1/b3. Shifted right by two, it is also part of
   a3/a5. The pair `p = w2>>1 - w2>>6` is part of a2. Negated and shifted
   right by two, it is all of b4. Shifts are wiring, so each pair is paid
   for once.

With those, the ten products are:

| product          | expression                            | adder step |
|------------------|---------------------------------------|-----------:|
| w2               | w1 + w1>>2                            | 1 |
| s1               | w1>>5 - w1>>3                         | 1 |
| a1               | w1>>3 + w1>>9                         | 1 |
| p                | w2>>1 - w2>>6                         | 2 |
| b1 = b3          | s1 + (w1>>7 - w1>>10)                 | 2 |
| b2               | w2>>4 - w2>>8                         | 2 |
| a3 = a5          | (w1>>1 + w1>>10) + s1>>2              | 2 |
| a4               | w2>>3 + w2>>8                         | 2 |
| b0               | (w2>>2 - w2>>8) + w1>>6               | 3 |
| a2               | p + w1>>10                            | 3 |
| b4               | -(p>>2)                               | 3 (negation) |

No bit is dropped. A term `w >> s` is computed as `w << (10 - s)`, so each
output is the exact integer `w1 * coef * 1024`. It has 10 more fraction bits
than `w1`. Each intermediate is kept at the smallest scale that is still an
integer: `w2` holds `4·(w1 + w1>>2)`, `s1` holds `32·(w1>>5 - w1>>3)` and `p`
holds `(w2>>1 - w2>>6)/4`. Each use then needs only a left shift.

For comparison, the published counts for this filter are:

- 30 adders for direct CSD multiplication.
- 18 adders with the Bull–Horrocks modified method, in 6 adder steps.
- 16 adders with the reduced adder graph method, in 5 adder steps.
- 20 and 19 adders for their step-limited variants, in 3 steps.
- 14 adders for this method, in 3 steps.

The block also has an immediate assertion. It checks every output against a
plain multiplication by the coefficient table in `tf4_pkg`. It runs in
simulation and synthesis ignores it.

## Number formats

All signals are two's complement.

| signal | width | format |
|--------|------:|--------|
| `x` | 16 | integer sample |
| `w1` | 22 | 4 guard fraction bits, 2 bits of headroom above `x` |
| products and chain sums | 33 | exact: 14 fraction bits (4 guard + 10 coefficient) |
| `y` | 17 | integer, floor of the exact output sum |

Only two points quantise:

- The feedback sum is truncated (arithmetic right shift, i.e. floor) to the
  guard bits of `w1`.
- The output is truncated to an integer.

The widths follow from the filter's gains, so no saturation is needed:

- The sum of |impulse response| of 1/A(z) is 3.8, so `w1` needs 2 headroom bits.
- The sum of |impulse response| of B(z)/A(z) is 1.6, so `y` needs 1 more bit
  than `x`.
- The sum of |a_k| is below 2, so the chain sums need 1 bit above the products.

The widths are set in `tf4_pkg` (`X_W`, `GUARD`, `HEAD`). The coefficients are
fixed by the multiplier block's wiring.

## Interface and timing (`iir_tf4`)

| port | dir | width | meaning |
|------|-----|------:|---------|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous, active low; clears all state |
| `in_valid` | in | 1 | `x` is a sample this cycle |
| `x` | in | 16 | input sample |
| `out_valid` | out | 1 | `y` is the output for the sample taken on the previous edge |
| `y` | out | 17 | output sample |

The filter takes at most one sample per clock. While `in_valid` is low, the
state holds, so the sample rate can be any fraction of the clock. The latency
is one clock: the output register is written on the same edge that takes the
sample.

## Design choices not fixed by the published filter

These follow the published design:

- The coefficient set.
- The transposed direct form I structure with one shared multiplier block.
- The subexpressions and their reuse.
- The limit of three adder steps.

These are this design's own:

- **Feedback sign.** `A(z) = 1 + sum a_k z^-k`. With these coefficients, this
  sign puts all poles inside the unit circle (largest radius 0.884). The
  opposite sign gives a pole at radius 1.23.
- **Coefficient a4.** a4 = 2^-3 + 2^-5 + 2^-8 + 2^-10 (165/1024), with its
  last two digits taken as a second copy of the `[1 0 1]` pattern (`w2>>8`).
  This agrees with the digit table and with the published count of nonzero
  digits (19 in the a's, 21 in the b's).
- **The tree.** The published method uses a tree-structured adder arrangement
  without showing it. The grouping in the table above is this design's; it
  meets the three-step bound.
- **The 14-operation count.** This RTL counts 13 adders plus one negation. In
  synthesis the negation is an inverter and an increment, unless a tool folds
  it into the next adder.
- **Widths, handshake and quantisation.** The word widths, truncation points,
  input handshake, output register and reset are all this design's.

**Frequency response.** With these ten coefficient values and this sign, the
magnitude response is not a clean lowpass at 0.1π. It is -32 dB at DC and
peaks at +1.3 dB near 0.3π. The published coefficient list is most likely a
scaled or renormalised form of the original elliptic design. The scaling
cannot be recovered from the coefficients alone. The hardware computes exactly
the transfer function above. Use the design as a verified implementation of
this coefficient set and of the multiplier-block technique, not as a finished
channel filter.

**Not included.** The GSM and W-CDMA pulse-shaping filters that this technique
targets are 7 and 9 taps with 16-bit coefficients. For them only adder counts
are published: 15 adders for the 7-tap and 19 for the 9-tap filter, both in 3
adder steps. Their coefficients are not published, so their multiplier blocks
cannot be built here. The surrounding dual-mode receiver IF stage is not
included either.

## Files

| file | contents |
|------|----------|
| `rtl/tf4_pkg.sv` | widths, coefficient table, product type |
| `rtl/tf4_mb.sv` | shared multiplier block (combinational) |
| `rtl/tdf_chain.sv` | transposed delay chain with clock enable |
| `rtl/iir_tf4.sv` | the filter (top) |
| `tb/tb_tf4_mb.sv` | MB against plain multiplication, extremes and 2000 random inputs |
| `tb/tb_tdf_chain.sv` | chain against a history model, random stalls, reset |
| `tb/tb_iir_tf4.sv` | whole filter against a bit-exact model |

`tb_iir_tf4` runs the filter at its default sizes. It covers these cases:

- An impulse. It checks y(0) = b0·x, and that the recursion keeps producing
  output after the input is zero.
- A full-scale step. It checks the DC gain 73/2918.
- The input sequence that drives `|w1|` to its maximum. It checks that the
  headroom bits are used and are enough.
- More than 20 000 random full-scale samples with random stalls.
- A reset in the middle of a run.

It also checks the one-clock latency of every sample. The testbench counts
how often each case happened, and fails if one never did.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --top-module tb_iir_tf4 \
    rtl/tf4_pkg.sv rtl/tf4_mb.sv rtl/tdf_chain.sv rtl/iir_tf4.sv tb/tb_iir_tf4.sv
./obj_dir/Vtb_iir_tf4
```

Each testbench ends with a line `TB_RESULT checks=N failures=M`. To check
another coefficient set, change the shift-add expressions in `tf4_mb.sv`
and the table in `tf4_pkg.sv` together. The testbenches take their reference
values from the table, and the assertion in `tf4_mb` flags any mismatch
between the two.
