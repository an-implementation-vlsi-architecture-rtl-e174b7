# Eight-tap FIR filter with Vedic multipliers and Kogge-Stone adders

An FIR filter spends almost all of its logic and delay on multiplications and
additions. This design builds an 8-tap programmable FIR filter in which every
multiplier is a Vedic multiplier and every adder is a Kogge-Stone adder. The
Vedic multiplier is based on the *Urdhva Tiryagbhyam* ("vertically and
crosswise") rule: all partial products of an N x N multiplication are formed
at once from four N/2 x N/2 multiplications. The Kogge-Stone adder is a
parallel-prefix adder whose carry logic is log2(N) levels deep. Both are used
to keep the combinational path from a sample to the filter output short.

Each clock cycle the filter computes

    fout(n) = h0*x(n) + h1*x(n-1) + ... + h7*x(n-7)      (mod 2^16)

where `x(n)` is the current 8-bit sample on `fin` and `h0..h7` are 8-bit
coefficients applied as live inputs. All values are unsigned.

## Structure

```
fir8_vedic                      top: the filter
 +- 7-stage x 8-bit shift register   x(n-1) .. x(n-7)
 +- 8 x vedic_mult (WIDTH=8)          h[k] * x(n-k), 16-bit products
 |    +- vedic_mult_8x8
 |         +- 4 x vedic_mult_4x4
 |         |    +- 4 x vedic_mult_2x2   two half adders
 |         |    +- vedic_combine (H=2)  three ks_adder
 |         +- vedic_combine (H=4)       three ks_adder
 +- 7 x ks_adder (WIDTH=16)           balanced tree, 3 levels
fir_pkg                         shared sizes (TAPS=8, DATA_W=8)
```

`vedic_mult_16x16` and `vedic_mult_32x32` extend the same ladder. They are
reached through `vedic_mult` with `WIDTH=16` or `WIDTH=32`, and are not used
by the filter.

## Filter datapath and timing

The only state is the shift register that holds the seven previous samples.
Tap 0 takes `fin` directly. The eight products go into a balanced tree of
16-bit Kogge-Stone adders: four adders, then two, then one. Each adder drops
its carry out, so `fout` is the exact sum modulo 2^16. At full scale the true
sum needs 19 bits (8 x 255 x 255 = 520 200), so large inputs and coefficients
wrap. The output is as wide as one product; if you need the full sum, widen
the tree (see *Changing the design*).

Timing, at the default sizes:

* `fout` is combinational from `fin`, `h[]` and the shift register. No output
  register is added. A sample's `h0` term appears in the cycle the sample is
  presented, and its `h[k]` term appears k rising edges later. So a single 1
  on `fin` brings out `h0, h1, ..., h7` on `fout` in eight consecutive
  cycles.
* On each rising edge the shift register takes `fin`. With `rst` high it
  clears to zero instead (synchronous, active high).
* The critical path runs from `fin` or `h[k]` through one 8x8 Vedic
  multiplier and three adder levels to `fout`.

| Port   | Dir | Width            | Meaning |
|--------|-----|------------------|---------|
| `clk`  | in  | 1                | rising-edge clock of the shift register |
| `rst`  | in  | 1                | synchronous clear of the shift register |
| `fin`  | in  | `DATA_W` (8)     | sample x(n), unsigned |
| `h`    | in  | `DATA_W` x `TAPS` (unpacked array `h[TAPS]`) | coefficients h0..h7, unsigned; may change every cycle |
| `fout` | out | `2*DATA_W` (16)  | filter output, sum of products mod 2^16 |

## How the Vedic multiplier is put together

This is the least obvious part of the design.

**2x2 cell (`vedic_mult_2x2`).** Bit 0 is the vertical product `a0&b0`. The
crosswise products `a1&b0` and `a0&b1` go into a half adder, whose sum is
bit 1. The second vertical product `a1&b1` and that half adder's carry go into
another half adder, which gives bits 2 and 3.

**Doubling step (`vedic_combine`, then `vedic_mult_4x4` ... `_32x32`).** Split
each 2H-bit operand into halves, `a = {aH, aL}` and `b = {bH, bL}`. Four H x H
multipliers run in parallel:

    q0 = aL*bL   q1 = aH*bL   q2 = aL*bH   q3 = aH*bH      (2H bits each)

The product is `q0 + (q1 + q2)<<H + q3<<2H`. Three Kogge-Stone adders form it:

    s1 = q1 + q2                  2H-bit adder  -> 2H+1 bits
    s2 = s1 + q0[2H-1:H]          2H+1-bit adder -> 2H+2 bits
    s3 = q3 + s2[2H:H]            2H-bit adder  -> 2H+1 bits
    p  = { s3[2H-1:0], s2[H-1:0], q0[H-1:0] }

The low H bits of `q0` pass straight to the product. The top bit of `s2` and
the carry out of `s3` are always zero, because s2 < 2^(2H+1) and the full
product fits in 4H bits. They are left unconnected, and the linter reports
them as unused bits.

An 8x8 multiplier is therefore 16 2x2 cells, four 4-bit combining stages and
one 8-bit combining stage. It has 15 Kogge-Stone adders of 4, 5, 8 and 9 bits.
The ladder is written as one module per size, not as a module that
instantiates itself. `vedic_mult` picks the rung from its `WIDTH` parameter,
which may be 2, 4, 8, 16 or 32; any other value stops elaboration with an
error.

## Kogge-Stone adder (`ks_adder`)

Each bit forms generate `g = a&b` and propagate `p = a^b`. Then
ceil(log2 WIDTH) prefix stages follow. Stage s combines every bit i >= 2^s
with the bit 2^s places below it:

    G' = G | (P & G_below)      P' = P & P_below

Once the last stage is done, `G[i]` is the carry out of bits i..0. The sum is
`p ^ {G[WIDTH-2:0], 0}`, and `G[WIDTH-1]` becomes the extra top bit of the
`WIDTH+1`-bit sum. The adder has no carry input. The network is written as an
unrolled loop in one `always_comb` block. Synthesis sees the same prefix graph
that separate black-cell instances would give. Any `WIDTH >= 1` works.

## What follows the published design and what does not

The following come from the published design:

* eight taps, with coefficients h0..h7 as inputs;
* 8-bit samples and coefficients, and a 16-bit output;
* Vedic multipliers of 8, 16 and 32 bits;
* Kogge-Stone adders of 8 and 16 bits, with no carry input and a carry-out
  bit;
* registers on the input side only, with a combinational path to the output.

The following are this design's own choices, because the published
description does not specify them:

* **Reset.** The published filter has only `clk`, `fin`, `h0..h7` and `fout`.
  `rst` is an addition. Without it, the first seven outputs depend on whatever
  the shift register powered up with.
* **Register count.** The published implementation reports 96 flip-flops. This
  design has 56, the seven 8-bit delay stages. The published description does
  not say what the other flip-flops hold.
* **Adder arrangement.** The filter uses a balanced tree. The multiplier adds
  (q1+q2) first, then the upper half of q0, then q3.
* **Overflow.** The output wraps modulo 2^16 and does not saturate.
* **Signedness.** Everything is unsigned. The Urdhva Tiryagbhyam rule as used
  here is an unsigned method, and the published waveforms use only small
  positive numbers.
* **Coefficients.** They are not stored. Hold them steady for a fixed filter,
  or change them every cycle as the published waveform does.

For comparison, the published implementation on a Xilinx Virtex-II Pro device
reports the following:

* 8-bit multiplier: 126 4-input LUTs and 10.2 ns combinational delay.
* 16-bit multiplier: 538 LUTs and 12.0 ns.
* 32-bit multiplier: 2218 LUTs and 13.9 ns.
* Whole filter: 1459 LUTs and 24.8 ns from input to output.

These numbers belong to that implementation and have not been reproduced with
this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops with a failure if its watchdog
expires.

* `ks_adder_tb`:
  * replays the published 8-bit adder waveform (k1 = 0..6, k2 = k1+4, sums
    4..16) and the 16-bit one (p1 = 0..6, p2 = p1+3, sums 3..15);
  * tests every pair of 5-bit and 8-bit operands;
  * tests full-width carry chains and 20 000 random 16-bit pairs.
* `vedic_mult_2x2_tb`: all 16 operand pairs.
* `vedic_mult_tb`:
  * all pairs at 4 and 8 bits;
  * corner cases, single-bit operands and 20 000 random pairs each at 16 and
    32 bits.
* `fir8_vedic_tb`: runs the filter at its default size against a reference
  model that keeps its own sample history. It covers:
  * clearing by reset;
  * the impulse response, which checks that h[k] appears exactly k cycles
    after the impulse;
  * the published stimulus (fin = 3..7, each coefficient rising by one per
    cycle);
  * 2000 random cycles with the coefficients changing every cycle, the second
    half with large values so that the output wraps;
  * a reset in the middle of a stream.

  It counts how often resets, impulse-latency checks, coefficient changes and
  output wraps happen, and fails if any count is zero.

Each testbench catches at least one deliberately injected bug in its module.

To run one with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl rtl/fir_pkg.sv tb/fir8_vedic_tb.sv \
          --top-module fir8_vedic_tb
./obj_dir/Vfir8_vedic_tb
```

To run another testbench, replace `fir8_vedic_tb` with `ks_adder_tb`,
`vedic_mult_tb` or `vedic_mult_2x2_tb`. `-y rtl` lets Verilator find each
submodule in its own file. To lint a module, use `--lint-only -Wall`. All
testbenches finish in well under a second.

## Changing the design

* `TAPS` (>= 2) sets the filter length. The adder tree pads to the next power
  of two with zero leaves.
* `DATA_W` sets the sample and coefficient width. It must be a width
  `vedic_mult` supports (2, 4, 8, 16, 32). The output is always `2*DATA_W`
  bits.
* To get the sum without wrap-around, widen the tree's adders to
  `2*DATA_W + $clog2(TAPS)` bits and widen `fout` to match.
* To pipeline the filter, put registers between the multipliers and the tree,
  or between tree levels. The output then lags by the number of stages
  added.
