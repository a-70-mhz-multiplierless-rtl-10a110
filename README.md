# 31-tap multiplierless FIR Hilbert transformer

This core turns a real sampled signal into an analytic signal: an in-phase part (I)
and a quadrature part (Q) shifted by 90 degrees. A digital-IF receiver uses it for
I/Q demodulation right after its ADC. The Q path is a 31-tap anti-symmetric FIR
filter whose coefficients are canonic-signed-digit (CSD) constants. It has no
multipliers. Every tap product is a handful of shifted words, and the words that
several products share are formed only once (common-subexpression elimination, CSE).
The partial sums never propagate a carry: they move along a folded transposed delay
chain in carry-save form. A single carry-select adder resolves them at the output.
One sample enters per clock and two samples leave per clock.

The architecture follows a published 0.35 µm standard-cell chip (31 taps, 8-bit I/O,
16-bit internal word, 71 MHz, about 33k transistors). The SystemVerilog here was
written from that description. Where the description stops, choices were made and
are listed under "Own choices and departures" below.

## Interface and timing

`ht_top` (parameter `INT_W`, default 16)

| port     | dir | width | meaning |
|----------|-----|-------|---------|
| `clk`    | in  | 1 | sample clock |
| `rst_n`  | in  | 1 | asynchronous active-low reset; clears all state |
| `x_in`   | in  | 8 | input sample, two's complement |
| `y_out1` | out | 8 | real part (I): `x_in` delayed 17 cycles |
| `y_out2` | out | 8 | imaginary part (Q): Hilbert-filtered `x_in`, integer part clipped to -128..127 |

Suppose a sample is presented in cycle *n*, i.e. it is sampled at the clock edge that
ends cycle *n*. Its contribution through tap *p* then appears on `y_out2` in cycle
*n*+2+*p*. The centre tap is *p* = 15, so the centre falls in cycle *n*+17. The
sample itself appears on `y_out1` in that same cycle *n*+17. The two outputs are
therefore time-aligned. The 17 cycles are one input register, the 15-stage half-length
delay and one output register.

## The filter

An ideal discrete Hilbert transformer has h(m) = 2/(πm) for odd m and 0 for even
m. Windowing it to 31 taps and shifting it to be causal gives an anti-symmetric
filter with a zero centre tap: h(30-k) = -h(k), and h(k) = 0 for every odd k.
Only eight coefficients are distinct: h(0), h(2), ..., h(14). Each is a 16-digit CSD
number with digits in {-1, 0, +1} at weights 2^-1 ... 2^-16. As integers scaled by
2^16 they are:

| h(0) | h(2) | h(4) | h(6) | h(8) | h(10) | h(12) | h(14) |
|------|------|------|------|------|-------|-------|-------|
| -2237 | -1340 | -1176 | -385 | -2689 | 4610 | 11475 | 40877 |

`ht_pkg` holds the digit masks (`CSD_POS`, `CSD_NEG`), written left to right from
2^-1 to 2^-16. The gain of this set over the passband 0.05 fs to 0.45 fs lies
between -1.39 dB and +1.38 dB. It has exact zeros at DC and at fs/2, and the phase
is exactly 90 degrees. The published specification quotes a ripple of 0.92 dB,
which these digits do not reach. The testbench checks the gain against the response
of the digits themselves. Because of the coefficient sign convention, Q comes out
+90 degrees relative to I (the I-to-Q phase measured in simulation is +90.0°).

## Multiplier block (`ht_mcm`)

This is the part that makes the design small, and the one that takes some care to
follow.

**Shared words.** From the registered input x the block forms, once per sample:

* `X`: x aligned to the internal fixed point (FRAC = INT_W - 9 fraction bits).
* `A = X - X·2^-2`: the *horizontal* subexpression. Across all coefficients, the
  most frequent two-digit pattern is "10n": +1 at weight 2^-j and -1 at 2^-(j+2)
  in the same coefficient. Every such pair becomes the single term `A >>> j`. Its
  mirror "n01" becomes `-A >>> j`. The design has nine such uses: h(12) alone has
  four, and h(0), h(4), h(6) and h(14) have the rest.
* `V = X[n] + X[n-2]`: the *vertical* subexpression. Once the horizontal pairs are
  removed, the most frequent pattern left is the same -1 digit, at the same weight,
  in two neighbouring non-zero coefficients h(k) and h(k+2). Neighbouring non-zero
  taps sit two positions apart, so they see samples two cycles apart. One V term
  therefore replaces both digits. Two such pairs are used: weight 2^-6 shared by
  h(2) and h(4), and weight 2^-16 shared by h(6) and h(8). V needs the only storage
  in the block: a two-sample delay of x.

All remaining digits are single shifted copies of X. Each coefficient's split is
held in `PLN_*`, `HOR_*` and `VER_*` of `ht_pkg`. An elaboration-time check in
`ht_mcm` rebuilds every coefficient from its split and compares it with the CSD
value.

**Two products per coefficient.** The filter is folded, so coefficient h(k) is used
at tap k and, negated, at tap 30-k. The block delivers `lo[i]` for tap 2i and `hi[i]`
for tap 30-2i. `hi` is built from the negated shared words, so no negation happens
after the sum. A vertical pair (k, k+2) is injected once per half. In the lower half
it enters at tap k, riding on `lo[k/2]`, and covers x[n-k] and x[n-k-2]. In the upper
half it enters at tap 28-k = 30-(k+2), riding on `hi[k/2+1]`. So `lo[i]` and
`hi[i]` of a coefficient that takes part in a vertical pair are not exact negatives
of each other. Only their contributions summed over the whole filter are right.

**Carry-save products.** Each product has at most five terms (`MAX_TERMS`). A
linear chain of 3:2 carry-save adders (`ht_csa`) reduces them to a sum word and a
carry word. No carry is propagated. `A` and `V` themselves are formed with ordinary
two-input adders.

## Folded transposed carry-save chain (`ht_fold_chain`)

In transposed form, tap position p adds its product to the partial sum coming from
position p+1, with one register between positions, and position 0 gives the output.
The 30 register stages are laid out as a U:

* Positions 30..16 take the upper-half products `hi[i]`. Position 30 starts the
  chain.
* Positions 14..0 take the lower-half products `lo[i]`.
* Odd positions and the centre carry zero coefficients, so they are bare register
  stages.

Every partial sum is a sum word plus a carry word, so each stage is a pair of
16-bit registers (960 flip-flops in all). A stage that adds a product (itself a
pair) uses two 3:2 adders, one full-adder delay each. This doubling of the
registers is the price of removing carry propagation from every tap.

## Vector merge adder and output (`ht_vma`, `ht_top`)

The carry-save pair leaving position 0 goes to `ht_vma`, a square-root carry-select
adder. Its blocks are 2, 2, 3, 4 and 5 bits wide from the LSB. Above the first
block, each block adds twice, once for carry-in 0 and once for carry-in 1, and the
carry from below picks one result. The adder sits between the last chain stage and
the output register. It is the only carry-propagating adder on the accumulation
path; the only others form the shared words `A` and `V`.

The result has FRAC = 7 fraction bits (at INT_W = 16). `y_out2` is its integer
part, rounded toward minus infinity and clipped to the 8-bit range. The filter's
absolute coefficient sum is about 1.98, so a full-scale input with the worst sign
pattern reaches ±252 and needs the clip.

## Precision

At INT_W = 16 the right shifts drop product bits below 2^-7 of an input LSB. The
output then differs from the floor of the exact result by at most one LSB: 90 % of
outputs on a pseudo-noise stream are exact. INT_W ≥ 25 gives FRAC ≥ 16. Then no
bit is lost, and `y_out2` equals floor(Σ h(p)·x[n-p]), clipped, bit for bit. One
testbench runs at that width to prove the CSE structure and the fold exact.

## Own choices and departures

These follow the published design:

* 31 taps and the CSD digits.
* The anti-symmetric fold.
* Horizontal-then-vertical CSE with patterns "10n" and "n0n".
* Carry-save tap adders with a sum register and a carry register per stage.
* A square-root carry-select final adder.
* A 15-stage real-part delay.
* 8-bit I/O and a 16-bit internal word.

These are this design's own choices:

* The exact subexpression pairs, found with the published two-step procedure
  rather than copied from its final table.
* A two-sample delay for the vertical subexpression.
* Plain adders for `A` and `V`. The published drawing shows carry-save adders there.
  These adders and the up-to-three-level carry-save reduction sit between the input
  register and the first chain register. That path is therefore longer than the
  single full adder the published design claims for everything except the final
  adder. A register after the multiplier block would restore that claim, at one
  more cycle of latency on both outputs.
* Two's complement I/O.
* The input and output registers, and so the 17-cycle latency.
* Output scaling (integer part), truncation toward minus infinity, and clipping.
* The asynchronous active-low reset.
* The carry-select block widths.
* Negating V terms after their shift, which keeps x[n] = x[n-2] = -128 from
  overflowing.

Not part of this RTL: the RF/IF front end and ADC of the receiver, the 80 → 40 MHz
decimation after the I/Q stage, and the pad ring. The chip's clock rate (71 MHz),
area and power depend on the cell library and cannot be judged from RTL.

## Files

`rtl/`

* `ht_pkg.sv`: sizes, CSD masks, CSE split, check functions.
* `ht_csa.sv`: 3:2 carry-save adder.
* `ht_vma.sv`: square-root carry-select adder.
* `ht_delay_line.sv`: real-part delay.
* `ht_mcm.sv`: multiplier block.
* `ht_fold_chain.sv`: folded carry-save chain.
* `ht_top.sv`: the core.

`tb/` has one self-checking testbench per module. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`.

* `tb_ht_top`: defaults, end to end. Impulses, 3000 pseudo-noise samples and
  worst-case patterns. Checks ±1 LSB against the exact convolution and the 17-cycle
  alignment. Clipping both ways, both carry-select outcomes and a non-zero vertical
  term must each occur.
* `tb_ht_top_exact`: the same stimulus at INT_W = 25, compared bit for bit.
* `tb_ht_tone`: sine sweep from 0.05 fs to 0.445 fs. Checks the phase at
  90° ± 2°, the gain against |H(f)| of the digits within 0.25 dB, and zeros at DC
  and fs/2.
* `tb_ht_mcm`, `tb_ht_fold_chain`, `tb_ht_csa`, `tb_ht_vma`, `tb_ht_delay_line`:
  unit tests with independent references.

To simulate with Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_ht_top rtl/ht_pkg.sv tb/tb_ht_top.sv
./obj_dir/Vtb_ht_top
```

The package must come first on the command line. To use a different coefficient
set, change the `CSD_*` masks and a matching split in `PLN_*`, `HOR_*` and
`VER_*`. Elaboration stops with an error if a split does not add up to its
coefficient or needs more than `MAX_TERMS` terms.
