# Stochastic-computing low-pass filters: FIR and IIR

In stochastic computing (SC) a number is a stream of random bits. Its value
is set by how often the stream is 1. In the *bipolar* format used here, a
stream of length L with L1 ones means (2·L1 − L)/L, a value in [−1, 1].
Arithmetic becomes very cheap in this format:

* negating a value is one XOR (or inverter) on its stream;
* a weighted sum Σ wᵢ·vᵢ / Σ|wᵢ| is a multiplexer. The mux picks stream i
  with probability |wᵢ|/Σ|wᵢ| and passes the inverted stream when wᵢ < 0.

The price is time and accuracy. One result takes a whole stream (here
2¹⁰ = 1024 clock cycles), and the random sampling adds noise. The gain is
area, power and tolerance of bit flips. A flipped stream bit moves the value
by only 2/L, while a flipped binary MSB moves it by half the range.

This repository holds six SC low-pass filters (cut-off 0.1·π rad/sample)
meant for cleaning noisy ECG signals:

| instance | structure | random number sources |
|---|---|---|
| LFSR-SF  | 24th-order FIR | one LFSR per tap, one LFSR for the mux selects |
| Sobol-SF | 24th-order FIR | one Sobol generator per tap and one for the selects |
| CeMux-SF | 24th-order FIR | a single shared LFSR; a counter drives the selects |
| LFSR-SI  | 6th-order IIR (3 second-order sections) | as LFSR-SF |
| Sobol-SI | 6th-order IIR | as Sobol-SF |
| CeMux-SI | 6th-order IIR | as CeMux-SF |

`sc_filter_top` instantiates all six side by side on one input stream.
Each filter can also be used on its own (`sc_fir`, `sc_iir_cascade`,
`sc_iir`).

## Number formats and timing

* Samples `x[n]` and results `y[n]` are W = 10-bit two's complement numbers
  with 9 fraction bits, so they lie in [−1, 1).
* Streams are 2ᴷ = 1024 bits long (K = 10). A stochastic number generator
  (SNG) compares a K-bit random number r with the threshold
  thr = (x + 1)/2 · 2ᴷ and outputs `r < thr`. This threshold is the sample
  with its sign bit inverted, left-aligned to K bits. Every random source
  here visits each K-bit value exactly once per period. So an unmodified
  stream has exactly thr ones and represents x without error. All error
  comes from *combining* streams.
* Handshake: a sample is taken when `x_valid && x_ready`. The filter then
  runs one stream bit per cycle for 2ᴷ cycles, with `x_ready` low. Its
  result appears with a one-cycle `y_valid` pulse 2ᴷ + 1 cycles after the
  sample was taken. `x_ready` is high again in that same cycle. Throughput
  is therefore one sample per 1025 cycles. An IIR cascade of S sections is
  a pipeline, so its latency is S·1025 cycles at the same throughput.
* Reset is asynchronous and active low (`rst_n`). It clears every delay line
  and counter.

## How a filter computes one output (`sc_fir`)

```
x[n] ─► D ─► D ─► … ─► D            binary delay line (W-bit registers)
 │      │    │          │
SNG    SNG  SNG   …    SNG          one stochastic stream per tap
 │      │    │          │
XOR    XOR  XOR        XOR ◄─ sign(b[i]) and error-injection flip[i]
 └──────┴────┴──┬───────┘
       weighted mux tree ◄── K-bit select word
                │
             counter ─► × Σ|b| ─► y[n]
```

1. **Binary delay line.** Samples are delayed as W-bit binary words, not as
   1024-bit streams. Each tap has its own SNG. Storing streams instead would
   need 1024-bit registers per tap.
2. **Signs.** An XOR per tap inverts the stream of a tap whose coefficient is
   negative.
3. **Weighted mux tree (`wmux_tree`).** This is a full binary tree of 2:1
   muxes with K levels and 2ᴷ leaves. Tap i is hard-wired to `LEAVES[i]`
   consecutive leaves, so it is chosen with probability `LEAVES[i]/2ᴷ`.
   This is how the coefficient magnitudes are encoded. Level l (l = 0 at the
   root) uses select bit K−1−l, so the selected leaf index equals the select
   word. Runs of leaves that belong to the same tap fold away in synthesis.
   The 3-input example of 8 leaves with weights 2/8, 5/8 and 1/8 is the
   module's default.
4. **Counter (`s2b_counter`).** It counts the ones of the tree output over
   the period and subtracts 2ᴷ⁻¹, which gives the bipolar value
   v = Σ bᵢ x[n−i] / Σ|bᵢ|. It then multiplies by the constant
   `GAIN_Q / 2^GF` ≈ Σ|bᵢ|, rounds and saturates. The result y[n] is in the
   same format as x[n].

### Coefficients as leaf counts

A coefficient set b is turned into leaf counts as follows:

    LEAVES[i] ≈ 2ᴷ · |b[i]| / Σ|b|      (rounded by largest remainder, so that Σ LEAVES = 2ᴷ)
    NEG[i]    = (b[i] < 0)
    GAIN_Q    = round(2^GF · Σ|b|)

The default FIR is a 25-tap Hamming-windowed sinc with cut-off 0.1·π and
unity DC gain. Its leaf counts are
`1 1 0 3 8 17 30 46 64 82 97 107 111 107 97 82 64 46 30 17 8 3 0 1 2`.
The negative taps are 0, 1, 23 and 24, and `GAIN_Q` = 258 (Σ|b| = 1.009).
A coefficient smaller than 2⁻¹¹·Σ|b| gets no leaf at all. Coefficient
precision is therefore 1/1024 of Σ|b|.

## Three ways to make the random numbers

The accuracy of an SC filter depends mostly on its random number sources
(RNS). The filter's `KIND` parameter (`sc_pkg::rns_kind_e`) picks one of
three.

**LFSR (`lfsr_rns`, `RNS_LFSR`).** This is a 10-bit Fibonacci LFSR with
polynomial x¹⁰ + x⁷ + 1. Extra logic inverts the feedback bit whenever the
nine low bits are zero. This inserts the all-zero state, so the period is
exactly 1024 and covers every value once. Each tap's LFSR starts from its
own seed, 397·(i+1)+5 mod 1024. The mux-select LFSR (and, in the IIR, the
two-way-select LFSR) uses the reciprocal polynomial x¹⁰ + x³ + 1. Two LFSRs
with the same polynomial produce time-shifted copies of one sequence, and
correlation between the select and the data streams biases a mux adder.

**Sobol (`sobol_rns`, `RNS_SOBOL`).** This is a low-discrepancy sequence,
which samples [0, 1) much more evenly than a pseudo-random one. Point n is
the XOR of the direction vectors v_j selected by the bits of the Gray code
of n. In hardware this becomes an incremental update with four parts:

* a K-bit index counter n;
* a least-significant-zero detector (`lsz_detector`), whose output c is the
  address;
* a direction-vector store of K words;
* a register that XORs in v_(c+1) every cycle: x(n+1) = x(n) ⊕ v_(c+1).

The direction vectors are constants computed at elaboration time by
`sc_pkg::sobol_dir` from a primitive polynomial and initial odd numbers.
Dimension 0 is the van der Corput sequence. Dimensions 1–7 use the first
entries of the usual Joe–Kuo table. Tap i uses dimension 1 + (i mod 6). The
mux selects use dimension 0 and the IIR two-way select uses dimension 7.
Every dimension is a permutation of 0…1023 over one period.

**CeMux (`RNS_CEMUX`).** The correlation-enhanced mux adder uses a single
shared LFSR. Its probability conversion array (`pcc_array`) compares every
tap against that same random number r:

* a positive-weight tap gives `r < thr`;
* a negative-weight tap gives `¬(¬r < thr)`, which is the stream of −x.

All data streams therefore have the form "r below some threshold". They are
maximally positively correlated (stochastic cross-correlation +1). Whichever
input the mux picks in a given cycle, the output bit is then a consistent
sample of one underlying comparison, and the select noise largely cancels.
The select word is the frame's own bit counter, a "precise sampler": over a
period every leaf is visited exactly once. The signs live in the PCC, so
there are no XOR gates. CeMux needs one RNS per filter instead of one per
tap.

Because the correlation is what makes CeMux accurate, bit flips on its data
streams hurt it more than the other variants. A flipped bit breaks the
shared-threshold structure.

## IIR sections (`sc_iir`) and the 6th-order cascade (`sc_iir_cascade`)

A section computes

    y[n] = Σ_{i=0..M} b[i]·x[n−i] − Σ_{j=1..N} a[j]·y[n−j]

It has two halves built like the FIR above:

* a feed-forward module with a binary delay line of x, SNGs, sign XORs and a
  mux tree weighted by |b|;
* a feedback module with a binary delay line of the section's own past
  outputs, SNGs, XORs with the sign of −a[j], and a mux tree weighted by |a|.

A two-way mux combines the two trees. It takes the feedback tree with
probability `MIX_T/2ᴷ` = Σ|a| / (Σ|a| + Σ|b|), so the combined stream
carries y/(Σ|a| + Σ|b|). The counter multiplies by `GAIN_Q/2^GF` =
Σ|a| + Σ|b|. The result is y[n], which also enters the feedback delay line
for the next sample. In CeMux-SI one shared LFSR feeds both PCC arrays, and
the frame counter drives both trees.

The 6th-order low-pass is a cascade of three such second-order sections. The
defaults are a Butterworth design, cut-off 0.1·π. Each section is scaled to
unity DC gain, so intermediate signals stay inside [−1, 1). The sections are
ordered by rising pole Q. All sections share the feed-forward shape
(1, 2, 1)·g:

| section | a1, a2 | FB leaves (|a1|, |a2|) | MIX_T | GAIN_Q (Σ|a|+Σ|b|, ×256) |
|---|---|---|---|---|
| 0 | −1.4649, 0.5403 | 748, 276 | 987 | 533 |
| 1 | −1.5610, 0.6414 | 726, 298 | 988 | 584 |
| 2 | −1.7612, 0.8519 | 690, 334 | 990 | 692 |

### Why the SC IIR is much less accurate than the SC FIR

For a narrow low-pass section, Σ|b| = 1 + a1 + a2 is tiny (0.075–0.09)
next to Σ|a| (2.0–2.6). Only about 35 of the 1024 bits of a period carry the
input. Each period's error is also nearly the same from one sample to the
next, because every generator restarts its sequence each period. The loop
does not average that error away: it amplifies a constant error by
1/(1 + a1 + a2), about 11 for the sharpest section. The one-step error of
each section is small, as expected for the hardware. The recursion then
turns it into a visible offset.

| one section (default, step/sine test, 0 % flips) | LFSR | Sobol | CeMux |
|---|---|---|---|
| error of one step (hardware vs its own equation) | 0.033 | 0.008 | 0.028 |
| RMS error vs exact recursion | 0.34 | 0.07 | 0.28 |

Sobol generators handle this best, and the LFSR variant worst. The LFSR
section's bias depends strongly on the seeds chosen. Keep this in mind
before using LFSR-SI for anything but comparison.

## Error injection

Every filter has a `flip` input: one bit per feed-forward tap stream, XORed
into that stream before the sign XOR. In the PCC variant it is XORed into
the PCC output. Driving it from a random source with probability p models a
bit-flip rate p on the filter's input streams. For the IIR cascade it acts
on the first section, i.e. at the filter input. Tie it to zero in normal
use.

## Measured accuracy

The measurements come from `tb_sc_filter_top`: all six filters at default
size, on 150 samples per error rate of a synthetic noisy ECG-like signal
(P, QRS and T bumps plus ±0.15 uniform noise). Each value is the RMS error
against the exact filter with the same quantised coefficients. Units are
full scale (1.0), one run per rate.

| flip rate | LFSR-SF | Sobol-SF | CeMux-SF | LFSR-SI | Sobol-SI | CeMux-SI |
|---|---|---|---|---|---|---|
| 0 %    | 0.042 | 0.0055 | 0.0086 | 0.61 | 0.21 | 0.15 |
| 0.1 %  | 0.045 | 0.0058 | 0.0080 | 0.64 | 0.23 | 0.15 |
| 0.25 % | 0.044 | 0.0063 | 0.0088 | 0.65 | 0.24 | 0.16 |
| 0.5 %  | 0.045 | 0.0073 | 0.0099 | 0.63 | 0.23 | 0.15 |
| 1 %    | 0.045 | 0.0075 | 0.0116 | 0.63 | 0.22 | 0.15 |
| 1.5 %  | 0.042 | 0.0108 | 0.0100 | 0.64 | 0.23 | 0.15 |
| 2 %    | 0.042 | 0.0107 | 0.0131 | 0.65 | 0.19 | 0.16 |

The FIR filters degrade gracefully under bit flips. The Sobol and CeMux
FIRs stay within about 1 % of full scale at 2 % flips. `tb_sc_orders` runs
the smaller sizes: FIR orders 10 and 16, IIR orders 2 and 4 (one and two
sections). It gives FIR errors of 0.04–0.06 (LFSR) and 0.007–0.008
(Sobol, CeMux), and IIR errors of 0.47–0.52, 0.12–0.16 and 0.08–0.09 for
LFSR, Sobol and CeMux.

The noise and the flip pattern come from `$urandom`, so these figures move
a little with the simulator's seed (`+verilator+seed+N`). The order-10
LFSR FIR, for example, ranges from about 0.06 to 0.07. The hardware's own
random sources are fixed by their seeds and do not change.

## Files

| file | contents |
|---|---|
| `rtl/sc_pkg.sv` | RNS kind enum, LFSR tap table, Sobol direction numbers |
| `rtl/lfsr_rns.sv` | LFSR random source with all-zero state |
| `rtl/lsz_detector.sv` | least-significant-zero detector |
| `rtl/sobol_rns.sv` | Gray-code Sobol generator |
| `rtl/sng.sv` | stochastic number generator (RNS + comparator) |
| `rtl/pcc_array.sv` | CeMux probability conversion array |
| `rtl/wmux_tree.sv` | hard-wired weighted mux tree |
| `rtl/s2b_counter.sv` | stream-to-binary counter with gain |
| `rtl/sc_fir.sv` | SC FIR filter, three variants |
| `rtl/sc_iir.sv` | SC IIR direct-form section, three variants |
| `rtl/sc_iir_cascade.sv` | cascade of second-order sections |
| `rtl/sc_filter_top.sv` | the six filters side by side |
| `tb/tb_*.sv` | self-checking testbench per module, plus `tb_sc_orders` |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes.
To run one with Verilator 5:

    verilator --binary --timing -Irtl -y rtl -y tb rtl/sc_pkg.sv \
        tb/tb_sc_filter_top.sv --top-module tb_sc_filter_top
    ./obj_dir/Vtb_sc_filter_top

`tb_sc_filter_top` uses the default parameters throughout. It simulates
about 1.1 million cycles in a few seconds.

## Changing the design

* **Stream length.** Set K (2ᴷ cycles per sample). Re-derive `LEAVES` so
  they sum to 2ᴷ, and set `MIX_T` on the same 2ᴷ scale. K must be at least
  W and between 3 and 16.
* **Other coefficients.** Use the leaf-count formulas above. For an IIR
  section, also set `MIX_T` = round(2ᴷ·Σ|a|/(Σ|a|+Σ|b|)),
  `GAIN_Q` = round(2^GF·(Σ|a|+Σ|b|)) and `FB_NEG[j]` = (−a[j] < 0).
  Keep each section's gain near 1, or intermediate values saturate.
* **Filter order.** `ORDER` for the FIR. `NSEC` for the cascade, with one
  entry per section in each array parameter.

## What follows the published architecture and what is this design's own

Taken from the published architecture:

* the binary delay line feeding one SNG per tap;
* sign handling by XOR (LFSR and Sobol variants) or by the PCC (CeMux);
* the hard-wired weighted mux tree with the select MSB at the root;
* the LFSR with all-zero state insertion and distinct seeds;
* the Gray-code Sobol generator with its LSZ address generator;
* the CeMux PCC with its inverted RNS and the counter as select source;
* the IIR's two modules joined by a two-way mux and fed back from the
  counter;
* the cascade of second-order sections;
* error injection by XOR on the input streams;
* the sizes: 24th-order FIR, 6th-order IIR, 1024-bit streams.

Choices made here:

* the sample width (10 bits) and the handshake;
* the LFSR polynomial, the seeds, and the reciprocal polynomial for select
  LFSRs;
* the Sobol polynomials and the dimension assignment;
* the coefficient values (the filter type is only specified as a low-pass
  with cut-off 0.1·π; a Hamming-windowed sinc FIR and a Butterworth IIR are
  used);
* the largest-remainder quantisation to leaves;
* the two-way mux probability and the output gain stage that undoes the mux
  scaling;
* the sign convention of the feedback XORs, which follows
  y = Σb·x − Σa·y;
* applying flips only to feed-forward streams of the first IIR section;
* the reset behaviour.

Not included:

* the conventional binary FIR/IIR filters that SC designs are usually
  compared against;
* any area or power figures, which need a standard-cell flow.
