# Multiplier-less two-channel PR analysis filter bank (SOPOT, 16-bit accuracy)

This is the analysis half of a two-channel perfect-reconstruction (PR) filter
bank. It has no multipliers: every coefficient is a sum of two or three signed
powers of two (SOPOT), so each product is made from shifts and adds. Two
ideas keep the hardware small:

* **Multiplier blocks.** Both sub-filters are in transposed form, so all the
  taps of a filter multiply the *same* sample. One shared shift-and-add network
  (a *multiplier block*, MB) therefore makes every product at once and reuses
  partial results. The 13 products of beta(z) cost 10 adders and the 15
  products of alpha(z) cost 9.
* **Per-signal word lengths.** Every product is rounded to its own word
  length, and every register is only as wide as its worst case needs. The word
  lengths meet a 16-bit output accuracy (round-off noise below -96 dB). The
  register widths make overflow impossible.

The bank splits an 8-bit input stream into a lowpass and a highpass subband,
each at half the input rate. Its 39 dB stopbands match the published design
exactly: H0 has a stopband of -39.08 dB and a passband edge at 0.4 pi, H1
-39.5 dB, and the system delay is 23 samples.

## The structure

The input x(n) is split into two polyphase streams, xe(m) = x(2m) and
xo(m) = x(2m-1). Two FIR filters, beta(z) and alpha(z), then form the
subbands:

```
  x(n) --+--> [down 2] -- xe --> [z^-N] ----------(+)--> [x 0.5] --+------------> y0 (lowpass)
         |                                         ^                |
         |                                     [beta(z)]       [-alpha(z)]
         |                                         |                |
         +-> [z^-1] -> [down 2] -- xo -------------+--> [z^-M] ----(+)----------> y1 (highpass)
```

```
  y0(m) = 0.5 * ( xe(m-N) + sum_k beta[k] xo(m-k) )
  y1(m) = xo(m-M) - sum_k alpha[k] y0(m-k)
```

At full rate these are the analysis filters

```
  H0(z) = ( z^-2N + z^-1 beta(z^2) ) / 2
  H1(z) = -alpha(z^2) H0(z) + z^-(2M+1)
```

The structure is PR for any alpha and beta. A synthesis bank that runs the
same steps backwards undoes it exactly, whatever the coefficients are. So
rounding the coefficients to SOPOT values costs stopband attenuation, never
reconstruction. beta(z) approximates a delay of N - 1/2 samples and alpha(z)
one of M - N - 1/2 samples. This design uses N = 3 and M = 8.

Only the analysis side is implemented. No synthesis structure or word lengths
were given for the published design. The synthesis bank would mirror the
figure above with the adders turned into subtractors, but it would need its
own word-length design.

## Coefficients and multiplier blocks

Each entry is the coefficient of z^-n:

| n | beta[n] | x 2^8 | alpha[n] | x 2^9 |
|---|---|---|---|---|
| 0 | 2^-5 + 2^-7 | 10 | -2^-7 | -4 |
| 1 | -2^-3 + 2^-6 - 2^-8 | -29 | 2^-5 - 2^-7 | 12 |
| 2 | 2^-1 + 2^-5 + 2^-8 | 137 | -2^-4 + 2^-6 - 2^-8 | -26 |
| 3 | 2^0 - 2^-2 - 2^-6 | 188 | 2^-4 + 2^-6 + 2^-8 | 42 |
| 4 | -2^-2 - 2^-4 + 2^-7 | -78 | -2^-2 + 2^-4 + 2^-7 | -92 |
| 5 | 2^-2 - 2^-5 - 2^-7 | 54 | 2^-1 + 2^-3 - 2^-6 | 312 |
| 6 | -2^-3 - 2^-5 | -40 | 2^-1 + 2^-3 + 2^-5 | 336 |
| 7 | 2^-3 - 2^-7 | 30 | -2^-2 + 2^-5 | -112 |
| 8 | -2^-3 + 2^-5 + 2^-8 | -23 | 2^-3 - 2^-9 | 63 |
| 9 | 2^-4 | 16 | -2^-4 - 2^-6 | -40 |
| 10 | -2^-5 - 2^-6 + 2^-8 | -11 | 2^-4 - 2^-6 + 2^-9 | 25 |
| 11 | 2^-5 - 2^-7 | 6 | -2^-5 + 2^-8 | -14 |
| 12 | -2^-6 | -4 | 2^-6 | 8 |
| 13 | | | -2^-7 | -4 |
| 14 | | | 2^-8 | 2 |

The beta coefficients sum to exactly 1 and the alpha coefficients to 1 - 2^-7.
Written as integers, the coefficients are odd numbers (the "fundamentals")
shifted left. A multiplier block builds each distinct fundamental with one
adder or subtractor, from the input and the fundamentals already built:

* `beta_mb` uses 10 adders:
  3 = 2+1, 5 = 4+1, 15 = 16-1, 11 = 8+3, 23 = 3·8-1, 27 = 3·8+3,
  29 = 32-3, 39 = 5·8-1, 47 = 3·16-1, 137 = 5·32-23.
* `alpha_mb` uses 9 adders:
  3 = 2+1, 5 = 4+1, 7 = 8-1, 63 = 64-1, 13 = 8+5, 21 = 16+5,
  25 = 5·4+5, 23 = 16+7, 39 = 32+7.

Ten and nine are the smallest possible counts, since there are that many
distinct fundamentals. The published design reports the same counts. The
particular adder graphs above are this design's own. A negative coefficient
is a negated fundamental; a synthesis tool merges the negation into the chain
adder that follows, which then subtracts.

## Number formats, rounding and overflow

This section covers the part of the design that is hardest to follow.
Formats are written `<i|f>`: i integer bits (sign included), f fractional
bits, two's complement.

| signal | format | note |
|---|---|---|
| x (input) | <1\|7> | 8 bits, in [-1, 1) |
| beta products | <1\|11> … <1\|15> | exact: 7 + the smallest exponent of the coefficient |
| beta output | <3\|15> | exact |
| y0 (lowpass out, alpha in) | <2\|16> | exact: the 0.5 factor only moves the binary point |
| alpha products, before Q{.} | 25 fractional bits | exact |
| alpha products, after Q{.} | <2\|17>, <2\|18> or <2\|19> | rounded, see below |
| alpha output | <4\|19> | 23 bits |
| y1 (highpass out) | <4\|19> | 23 bits |

**Where round-off happens.** Each tap has a rounding operator Q{.} (`q_round`)
between its product and the adder chain. It rounds to nearest: it adds half an
LSB and drops the bits below, so ties go up. Every beta product is already
exact at its word length, so the beta branch and the whole lowpass output are
error-free. The alpha taps keep these numbers of fractional bits:

```
alpha tap n :  0  1  2  3  4  5  6  7  8  9 10 11 12 13 14
frac bits   : 18 18 17 17 17 18 18 18 17 17 17 17 19 17 17
```

The chain adders never round. Every register carries 19 fractional bits,
where its partial sum reaches that far. The highpass error is therefore just
the sum of 15 independent rounding errors. On random input its measured power
is -103.2 dB, well below the -96 dB of a 16-bit target. (The published figure
of -96.6 dB comes from a noise model that is 6 dB more pessimistic than
Δ²/12.)

**Why nothing overflows (L1 scaling).** In the transposed chain

```
r[L]   <= Q{p[L]}
r[k]   <= Q{p[k]} + r[k+1]
y       = Q{p[0]} + r[1]
```

register r[k] holds the sum over the taps j ≥ k. Its worst case is therefore
x_max · sum_{j≥k} |h[j]| (plus half an LSB per rounded tap).
`sopot_fb_pkg` computes these bounds from the coefficient table at
elaboration time (`beta_reg_int`, `alpha_reg_int`). Each register gets the
fewest integer bits that hold its bound, with x_max = 1 for beta and 2 for
alpha. The sums of |h| are 2.445 for beta and 2.133 for alpha. So the beta
output needs <3|15>, y0 is at most 1.72, the alpha output needs <4|19>, and
|y1| ≤ 1 + 2·2.133 < 8 fits the 23-bit output. Assertions in
`transposed_fir` and `sopot_analysis_fb` check every register and output in
simulation. No saturation logic is needed.

The published design sizes registers from partial sums taken from tap 0
upwards, which is the other chain direction. Its per-register formats
therefore differ from the ones here. The end formats are the same: beta
output <3|15>, alpha output <4|19>.

## Interface and timing (`sopot_analysis_fb`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst_n | in | 1 | asynchronous reset, active low; clears all state |
| in_valid | in | 1 | x holds a sample this cycle |
| x | in | 8 | input sample, <1\|7> |
| out_valid | out | 1 | a subband pair is on y0/y1 (one cycle) |
| y0 | out | 18 | lowpass sample, <2\|16> |
| y1 | out | 23 | highpass sample, <4\|19> |

* At most one input sample per clock, with gaps allowed. The first sample
  after reset is x(0), and samples before it count as zero.
* One output pair for every two input samples.
* Latency: `out_valid` rises 3 clock edges after the edge that accepts the
  even sample x(2m).
  1. The pair (xe, xo) is registered.
  2. The beta branch and the lowpass adder settle, and y0 is registered.
  3. The alpha branch and the highpass subtraction settle, and both outputs
     are registered.
* The filter states and the z^-N and z^-M delay lines advance only on their
  stage's sample strobe. The pipeline therefore adds clock latency but does
  not change the transfer functions.
* The longest combinational path is in the beta stage: five adders in a row.
  They are the multiplier block (137 = 5·32 - (3·8 - 1) is three adders
  deep), one chain adder and the lowpass adder. The alpha stage has four: its
  multiplier block (two deep), a chain adder and the 24-bit subtraction.
* Assertions check the pacing: neither the internal pair strobe nor
  `out_valid` is ever high in two consecutive cycles.

## Modules

| file | what it is |
|---|---|
| `rtl/sopot_fb_pkg.sv` | formats, coefficients, tap word lengths, L1 register sizing |
| `rtl/sopot_analysis_fb.sv` | top level, as in the figure above, with the 3-stage pipeline |
| `rtl/polyphase_split.sv` | the two decimators: pairs (x(2m), x(2m-1)) |
| `rtl/delay_line.sv` | z^-N and z^-M at the subband rate |
| `rtl/beta_filter.sv` | beta(z): `beta_mb` and a `transposed_fir` chain |
| `rtl/alpha_filter.sv` | alpha(z): `alpha_mb` and a `transposed_fir` chain |
| `rtl/beta_mb.sv`, `rtl/alpha_mb.sv` | the multiplier blocks (10 and 9 adders) |
| `rtl/transposed_fir.sv` | generic transposed-form chain with per-tap Q{.} and per-register widths |
| `rtl/q_round.sv` | the round-to-nearest operator |

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=… failures=…`. The reference values come from
`tb/fb_ref.svh`, which rebuilds every coefficient from its power-of-two terms
independently of the RTL.

* `tb_sopot_analysis_fb` runs the full-size design end to end on 6000
  samples with random input gaps. The input includes random data, worst-case
  blocks for both outputs in both directions, a sine and an impulse. Every
  output pair is checked three ways:
  * bit-exact against the polyphase equations with per-tap rounding;
  * y0 against the full-rate H0, which it must equal exactly;
  * y1 against the full-rate H1: the round-off noise power must stay below
    -96 dB.
  
  The testbench also checks the 3-cycle latency, and it fails if gaps,
  back-to-back input, rounding or the large-value cases never occurred.
* `tb_fb_freq_response` measures the impulse responses on the hardware and
  evaluates them on 512 frequencies. It gets H0 -39.084 dB (stopband from
  0.6 pi), H1 -39.498 dB (stopband up to 0.4 pi) and 0 dB passband gains.
* The unit testbenches cover the following:
  * `q_round`: exhaustive sweeps.
  * The multiplier blocks: all inputs for beta, extremes plus 20000 random
    values for alpha.
  * The delay line and the polyphase split: random enables, and a reset in
    mid-stream.
  * The chain: a small 4-tap configuration with mixed word lengths.
  * The two filters: worst-case input stretches that reach their L1 bounds.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sopot_fb_pkg.sv tb/tb_sopot_analysis_fb.sv --top-module tb_sopot_analysis_fb
./obj_dir/Vtb_sopot_analysis_fb
```

Replace the testbench name to run another one. Every testbench finishes in
well under a second.

## Where this design departs from the published one

* **Register widths.** Registers are sized by the L1 rule for this chain's
  tap order, as described above. They are not copied register by register
  from the published design.
* **Register fractions.** The published method may drop one fractional bit
  at a register to save adder cells. That option is not used here: the
  adders are exact. As a result the alpha registers r[1]..r[12] carry 19
  fractional bits, where most registers of the published design carry 18. The noise is no worse;
  the cost is a few extra adder cells.
* **Multiplier-block graphs.** Only the adder counts were published. The
  graphs here have the same counts.
* **This design's own choices.** The rounding tie rule (ties up), the
  handshake, the pipelining and the reset were not published.
* **Not implemented.**
  * The synthesis bank.
  * A second published example with an IIR beta(z) (lattice denominator,
    N = 4, M = 11). Its hardware structure and word lengths were not given.
  * The design-time random search that chose the coefficients and word
    lengths. It is software, and its results are built into the package.

## Changing the design

The coefficients, tap word lengths and formats are all in `sopot_fb_pkg`, and
the register widths follow from them automatically. A new coefficient set
needs the following changes:

* In the package: `BETA_COEF`/`ALPHA_COEF`, the `*_PWL_FRAC` lists and, if the
  tap counts change, `*_TAPS` and `*_PW`.
* In `beta_mb`/`alpha_mb`: new adder graphs.
* In `tb/fb_ref.svh`: the power-of-two term lists.

The reference testbenches then recheck everything. Keep `BETA_RF`/`ALPHA_RF`
at least as large as the largest tap word length.
