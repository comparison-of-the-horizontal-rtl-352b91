# Multiplierless 6-tap FIR filter: horizontal vs. vertical subexpression sharing

A fixed-coefficient FIR filter needs no multipliers. Each coefficient is
written in canonic signed digit (CSD) form, a sum of a few signed powers of
two, so every product becomes a sum of shifted copies of the input. What the
filter then costs is its number of adders. Common subexpression elimination
(CSE) lowers that number further: a digit pattern that recurs is added once
and reused.

This RTL builds one small linear-phase low-pass filter twice, with the two
kinds of sharing, so that the results can be compared bit for bit:

* **HCSE** (horizontal). It shares the patterns `[1 0 1]` and `[1 0 -1]`
  that occur *inside* a coefficient. The cost is 11 adders, three adder-steps
  deep.
* **VCSE** (vertical). It shares the patterns `[1 1]` and `[1 -1]` that
  occur *across* two neighbouring coefficients. These combine the present
  and the previous sample. The cost is 13 adders, five adder-steps deep.

Both filters compute exactly the same output. The comparison comes out in
favour of the horizontal form. A linear-phase filter has mirrored
coefficients, `h(5-k) = h(k)`. In the horizontal form the products of the
mirrored taps are simply reused. A vertical pattern spans two taps, and in
the mirrored pair its two digits swap places. Where those digits differ in
sign, the shared term comes out negated, and the terms left over from the
pattern land at other delays. The mirrored half therefore needs adders of
its own.

## The filter

Six taps. The coefficients are 16-bit CSD fractions, where digit *j* weighs
2^-j. In the integer columns, the value is scaled by 2^16.

| tap      | CSD digits                                             | ×2^16 |
|----------|--------------------------------------------------------|-------|
| h(0), h(5) | 2^-2 + 2^-6 − 2^-8 + 2^-10 + 2^-12 + 2^-14 − 2^-16   | 17235 |
| h(1), h(4) | 2^-2 − 2^-4 + 2^-8 + 2^-10 + 2^-12 − 2^-14 − 2^-16   | 12619 |
| h(2), h(3) | 2^-2 − 2^-5 + 2^-9 − 2^-15                           | 14462 |

The symmetric half holds 18 non-zero digits. Multiplying the input by the
three distinct coefficients without sharing takes 18 − 3 = 15 adders. The
two sharing schemes bring this down to 11 and 13.

Both filters use the transposed direct form. The *multiplier block* forms
all products from the present input sample. A chain of five delay registers
follows, with one *structural adder* per register. The chain adds each
product group at the delay where it belongs (`sa_chain`):

    y(n) = p0(n) + p1(n-1) + p2(n-2) + p3(n-3) + p4(n-4) + p5(n-5)

The multiplier-block adders are the cost the sharing schemes compete on.
The structural adders are the same in both.

## Horizontal sharing (`hcse_mb`, `hcse_fir`)

Two subexpressions are formed once:

    x2 = x1 + 2^-2 x1          x3 = x1 - 2^-2 x1

Each distinct product is then a sum of four shifted terms, added as a
two-level tree:

    h(0)x1 = 2^-2 x1 + 2^-6 x3 + 2^-10 x2 + 2^-14 x3
    h(1)x1 = 2^-2 x3 + 2^-8 x2 + 2^-12 x3 - 2^-16 x1
    h(2)x1 = 2^-2 x1 - 2^-5 x1 + 2^-9 x1  - 2^-15 x1

This makes 2 + 3 × 3 = 11 adders. The longest path is three adder-steps: one
subexpression adder, then two tree levels. Each pattern lies inside a single
coefficient, so the mirrored taps reuse the three products: `hcse_fir` feeds
`m[0], m[1], m[2], m[2], m[1], m[0]` into the chain.

## Vertical sharing (`vcse_mb`, `vcse_fir`)

This is the harder of the two to follow. A vertical pattern pairs digit *j*
of h(k) with digit *j* of h(k+1). Tap k+1 sees the input one sample later,
so the pattern is built from two samples:

    x4 = x1 + x1[-1]           x5 = x1 - x1[-1]

`vcse_mb` therefore holds the previous sample x1[-1] in a register of its
own. Product groups are named here by the delay at which they enter the
chain.

**Pair h(0)/h(1), delay 0.** Matching digits of equal sign use x4, and
digits of opposite sign use x5. Three pieces come out:

    E8 = 2^-2 x4 + 2^-10 x4 + 2^-12 x4 - 2^-16 x4     (a3, a4, a5: a chain)
    E9 = -2^-8 x5 + 2^-14 x5                           (a6)
    t0 = E8 + E9 + 2^-6 x1                             (a7, a8)

The h(1) digit −2^-4 has no partner. It needs no adder in the block: it goes
straight to the structural adder at delay 1, which subtracts it.

**Pair h(2)/h(3), delay 2.** These two coefficients are equal, so the pair
is h(2)·x4 (a9, a10, a11). Nothing enters at delay 3.

**Pair h(4)/h(5), delay 4.** This is the mirror of the first pair, but the
roles of x1 and x1[-1] are now swapped. E8 uses x4, which is symmetric in
the two samples, so it is reused as is. E9 uses x5, which changes sign, so
it is reused negated. The unpaired digits also trade places. The −2^-4 x1
term now falls at delay 4, where other products already meet, so it costs
adders. The 2^-6 x1 term falls at delay 5, where nothing else lands, so it
goes straight to the structural adder:

    a13 = E9 + 2^-4 x1
    t4  = E8 - a13                                     (a12)
    t5  = 2^-6 x1

The count is 2 + 3 + 1 + 2 + 3 + 2 = 13 adders. The longest path runs
a1 → a3 → a4 → a5 → a8 (or a12), which is five adder-steps. More patterns
are shared than in the horizontal form: a vertical pattern is used sixteen
times, a horizontal one twelve times. Even so, the mirroring costs two extra
adders and the chained E8 costs two extra steps.

The block's output `t[0..5]` is `{t0, 2^-4 x1, h(2)x4, 0, t4, 2^-6 x1}`.
`VCSE_SUB_MASK` in `cse_pkg` tells the chain to subtract `t[1]`. The chain
keeps an adder at delay 3 to keep the structure regular. That adder adds
zero, and synthesis removes it.

## Number format and widths

* The input `x` is a signed `DATA_W`-bit integer. `DATA_W` is 16 by default
  and can be changed freely.
* Internally, each signal is an integer scaled by 2^16. The input is shifted
  left by 16 first, so a right shift by *j* ≤ 16 drops no bits. Nothing is
  rounded or truncated: the output equals Σ h(k)·x(n−k) × 2^16 exactly.
* The output `y` has `DATA_W + 18` bits. The coefficient sum is about 1.35,
  which needs one extra integer bit. The largest intermediate value is
  |x4| = 2|x1|, which fits in the same width. A second headroom bit
  (`GUARD = 2` in `cse_pkg`) is kept as margin. No adder can overflow.
* To get a `DATA_W`-bit result, take `y >>> 16` with a rounding scheme of
  your choice, and saturate if you need to. The filter itself does neither.

## Interface and timing

Both filters, and the top `cse_fir_top` that places them side by side on one
input, use the same interface:

| port     | dir | width       | meaning |
|----------|-----|-------------|---------|
| `clk`    | in  | 1           | rising-edge clock |
| `rst_n`  | in  | 1           | asynchronous, active-low; clears every delay register |
| `en`     | in  | 1           | sample enable; when low, every register holds |
| `x`      | in  | `DATA_W`    | signed input sample |
| `y` (`y_hcse`, `y_vcse`) | out | `DATA_W+18` | signed output, scaled by 2^16 |

The output is not registered. `y(n)` is combinational in the present sample
`x(n)`, plus the registered history, so the latency is zero cycles. The
combinational path from `x` to `y` is the multiplier block's depth plus one
structural adder. That is 4 adders for HCSE and 6 for VCSE. To meet a tight
clock, register `y` outside the filter.

## Files

| file | contents |
|------|----------|
| `rtl/cse_pkg.sv`     | taps, coefficient scaling, headroom, VCSE subtract mask, reference coefficients |
| `rtl/hcse_mb.sv`     | horizontal multiplier block (11 adders) |
| `rtl/vcse_mb.sv`     | vertical multiplier block (13 adders, x1[-1] register) |
| `rtl/sa_chain.sv`    | transposed delay line with structural adders, per-tap subtract |
| `rtl/hcse_fir.sv`    | HCSE filter |
| `rtl/vcse_fir.sv`    | VCSE filter |
| `rtl/cse_fir_top.sv` | both filters on one input |
| `tb/*_tb.sv`         | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M`. All of them check
against integer arithmetic, computed independently of the adder networks:

* `hcse_mb_tb` compares each product with `H_INT[k] * x`.
* `vcse_mb_tb` compares each group with its closed form in x(n) and x(n−1).
  For example, `t4 = 12619·x + (17235 − 1024)·x(n−1)`.
* `sa_chain_tb` uses random product vectors, a mask that subtracts at the
  first and the last stage, random stalls and a reset.
* `hcse_fir_tb` and `vcse_fir_tb` check the impulse response, full-scale
  runs of both signs, a random stream with random stalls, and a reset in the
  middle of the stream. Each is checked against the direct-form sum.
* `cse_fir_top_tb` runs both filters at the default width on one stream.
  Each output is checked against the reference, and the two are checked
  against each other. The test counts the impulse through all six taps,
  samples where x5 ≠ 0, full-scale samples, stalled cycles and resets.
  Any of these that never occurs counts as a failure.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl --top-module cse_fir_top_tb \
        rtl/cse_pkg.sv rtl/sa_chain.sv rtl/hcse_mb.sv rtl/vcse_mb.sv \
        rtl/hcse_fir.sv rtl/vcse_fir.sv rtl/cse_fir_top.sv tb/cse_fir_top_tb.sv
    ./obj_dir/Vcse_fir_top_tb

All the testbenches run in well under a second.

## What is fixed and what was chosen

These parts follow the comparison this filter comes from:

* the coefficients
* the two subexpression sets and the terms of every product
* the adder counts (11 and 13) and the depths (3 and 5 adder-steps)
* the reuse of E8 unchanged and of E9 negated in the mirrored VCSE pair
* the two unpaired VCSE terms being handled by structural adders
* the transposed structure with one structural adder per delay stage

These are this design's own choices:

* **Adder wiring.** Only the terms, the counts and the depths are fixed. The
  pairing of terms inside each tree, and the naming a1…a13, are one
  arrangement that meets them. In VCSE, E8 is built as a chain rather than a
  tree, which matches the five-step depth. A tree would reach four steps.
* **Number format.** The 2^16 scaling, exact arithmetic, the input width and
  the output width.
* **Control.** The sample enable, the asynchronous reset, the unregistered
  output, and the VCSE previous-sample register placed inside the
  multiplier block.
* **Delay 3 in VCSE.** The chain keeps an adder there that adds zero. It
  follows the rule of one structural adder per delay stage.

## Not covered

The comparison also reports adder savings for longer linear-phase filters,
with 30, 50, 80 and 120 taps. It reports them for elliptic IIR filters too,
of order 5, 11 and 15, and over coefficient wordlengths from 8 to more than
20 bits. It gives only the specifications and the savings for these filters,
not their coefficients or subexpressions, so no RTL is given for them. The
design here is hard-wired to the one 6-tap filter. A different coefficient
set needs new multiplier blocks, since the shift-and-add networks *are* the
coefficients. `sa_chain` can be reused as it is for any tap count. The plain
CSD realisation without sharing, with 15 adders, is not built.
