# Three-stage decimation filter for a hearing-aid sigma-delta converter

A hearing aid digitises sound with an oversampling (sigma-delta) converter.
It produces short words at a rate far above the audio band, 1.28 MHz here.
The decimation filter turns that stream into ordinary audio samples. It
removes the shaped quantisation noise above the band of interest and lowers
the sample rate by 64, to 20 kHz. The ear is most sensitive below 4 kHz, so
the useful band is 0–4 kHz.

The filter is three cheap stages instead of one long FIR at the high rate.
Each stage runs at the lowest rate it can:

```
 6 bit @ 1.28 MHz   11 bit @ 80 kHz        12 bit @ 40 kHz          13 bit @ 20 kHz
 ──────────────► CIC, 5 stages, ÷16 ──► half-band FIR, ÷2 ──► corrector FIR, ÷2 ──►
                 (adders only)          11 taps, transposed    11 taps, symmetric,
                                        form, 2 phases         distributed arithmetic
```

| stage | rate in → out | width in → out | what it costs |
|---|---|---|---|
| CIC (`cic_decimator`) | 1.28 MHz → 80 kHz | 6 → 11 | 5 accumulators, 5 subtractors, 26-bit words |
| half-band (`halfband_fir`) | 80 → 40 kHz | 11 → 12 | 6 even taps + centre tap, stepped at 40 kHz |
| corrector (`corrector_fir`) | 40 → 20 kHz | 12 → 13 | 6 folded taps, one bit-serial DA unit, 32-word table |

`decimation_filter_top` wires the three stages in a chain. Everything runs
on one clock. Rate changes are one-clock enables (`*_valid`), not derived
clocks. At the nominal 1.28 MHz clock, `in_valid` is simply tied high. A
faster clock works too, with `in_valid` as the sample enable.

## Stage 1: cascaded integrator-comb (CIC) decimator

The transfer function is H(z) = ((1 − z^−16)/(1 − z^−1))^5. This is five
cascaded 16-sample moving sums, a sinc⁵ response with nulls at every
multiple of 80 kHz. These are exactly the frequencies that would alias onto
the base band after decimation by 16. The filter is built in the usual
multiplier-free way:

* **Five integrators** (`cic_integrator`, y ← y + x) at the input rate.
* **A rate switch** (`clock_divider`). It counts input samples and passes
  every 16th value of the last integrator to the comb section.
* **Five combs** (`cic_comb`, y = x − x₋₁, differential delay D = 1) at the
  low rate. Because they run after the rate change, each comb needs one
  delay register instead of 16.

The DC gain is 16⁵ = 2²⁰. With a 6-bit input, every internal word is
6 + 20 = 26 bits. The integrators **overflow on purpose**: they wrap around
in two's complement. The combs take differences, and because the final
result fits in 26 bits, the wrap-around cancels exactly. Do not add
saturation to the integrators. It would break this.

The 11-bit output is the top 11 of the 26 bits (truncation). A settled
input x gives 32·x, so −32 gives −1024. The integrators are chained through
registers, which adds N − 1 = 4 samples of pure delay. Output j is the
full-rate filter output at input index 16j + 10. `out_valid` comes 6 clocks
after the 16th input of each group.

## Stage 2: half-band FIR, transposed form split into two phases

A half-band low-pass filter has its transition band centred on a quarter of
its input rate. All of its odd taps are zero except the centre tap, which is
exactly ½. For the 11 taps h[0..10], that leaves h[0], h[2], h[4] (mirrored
in h[10], h[8], h[6]) and h[5] = ½.

The filter is in **transposed direct form**. Each new input is multiplied by
every tap at once, and the products are added into a chain of partial-sum
registers. So there is only one adder between registers. Because the filter
also decimates by 2 and the odd taps are zero, each kept output
y(2m+1) = Σ h[k]·x(2m+1−k) splits into two parts:

* The **even taps** only ever multiply odd-numbered inputs. They form a
  6-tap transposed chain that steps once per *output* (40 kHz):
  `e = h0·x + r1`, `r[j] ← h[2j]·x + r[j+1]`, `r5 ← h10·x`.
* The **centre tap** only ever multiplies even-numbered inputs, two of them
  back: ½·x(2m−4). A 3-word delay line holds them.

The result is the same as filtering at 80 kHz and discarding every other
output. The difference is that no work is done for the discarded ones. The
Q1.15 sum is rounded (round half up) to one fractional bit more than the
input. This is the 12th bit, so the DC gain is 2 in output LSBs. The sum is
then saturated to 12 bits. A full-scale step overshoots by about 5 %, so
saturation does happen, and `sat` flags it.

## Stage 3: droop corrector with distributed arithmetic

The CIC response droops slightly across the pass band: about −0.18 dB at
4 kHz. Together with the half-band stage, it also leaves some energy between
10 and 20 kHz. The corrector is an 11-tap linear-phase FIR at 40 kHz. Its
pass band (0–4 kHz) follows the inverse of the CIC droop, and its stop band
starts at 15 kHz. Every second result is kept (20 kHz).

**Folding.** The taps are symmetric. The delay-line words that share a
coefficient are therefore added first:

    u[k] = x(n−k) + x(n−10+k), k = 0..4;   u[5] = x(n−5)

This leaves an inner product of six 13-bit words with six constants:
y = Σ f[k]·u[k].

**Distributed arithmetic (`da_processor`).** The six products are not
computed one by one. The unit walks through the bit positions of the inputs,
least significant bit first, one position per clock:

1. Bit j of all six inputs forms a 6-bit address.
2. The table holds, for every address, the sum of the coefficients whose
   bit is set: F_j = Σ f[k]·u[k]_j.
3. The accumulator adds F_j. At the sign bit it subtracts, because that bit
   has negative weight in two's complement. The sum is then shifted right by
   one. The bit shifted out is the next serial result bit (`y_lsp`).

After 13 clocks, the accumulator holds the upper part of Σ f[k]·u[k] and
the shifted-out bits hold the lower part. The datapath has no multiplier:
one table, one adder/subtractor and shift registers.

**Offset binary coding (OBC, the default `OBC = 1`).** Each input bit is
read as ±1 instead of 0/1. The table entry becomes F̂_j = Σ f[k]·(2u[k]_j − 1).
It is antisymmetric: inverting all the address bits negates the entry. So
only half the table is stored (32 words instead of 64). The bit of the last
input, u[5], selects the sign and inverts the other five address bits.
Because x = ½(Σ ±2^j x̂_j − 1), the accumulator starts from −A₀ instead of 0,
where A₀ = Σ f[k]. The finished sum is then exactly 2y, and y is read one bit
higher. `OBC = 0` gives the plain 2^N-word table. Both variants produce the
same y, and the testbench checks both.

The table is **computed at elaboration** from the coefficient parameter by a
constant function. No data file is needed. With OBC, entry a is
Σ_{i<N−1} (a_i ? f[i] : −f[i]) − f[N−1]. Without OBC, it is
Σ_{i: a_i = 1} f[i].

**Timing.** After every second input, `start` pulses one clock later. The
unit is busy for 13 clocks, `done` follows, and the rounded, saturated
13-bit result appears one clock after that. So `out_valid` comes 16 clocks
after the input. In the full chain, corrector inputs are 32 clocks apart and
inner products 64 clocks apart, which leaves plenty of margin. An assertion
in `da_processor` fires if `start` comes while it is busy.

## Coefficients and frequency response

All coefficients are 16-bit Q1.15. Each filter's taps sum to exactly 32768
(DC gain 1). They are in `rtl/decim_pkg.sv`.

| filter | taps | design |
|---|---|---|
| half-band | 575, 0, −2346, 0, 9963, 16384, 9963, 0, −2346, 0, 575 | minimax over integer taps, pass 0–12 kHz, stop 28–40 kHz at 80 kHz; −43.8 dB stop band, ±0.64 % pass-band ripple |
| corrector | 377, −67, −2155, −48, 9979, 16596, 9979, −48, −2155, −67, 377 | least squares, pass 0–4 kHz = 1/(CIC droop), stop 15–20 kHz at 40 kHz; about −50 dB stop band |

The overall gain from a 6-bit input LSB to a 13-bit output LSB is
32 · 2 · 2 = 128. In simulation, a 4 kHz tone of amplitude 31 comes out with
a peak of 3843 (ideal 3968, −0.3 dB). A 30 kHz tone of the same amplitude comes out
with a peak of 5 (about −58 dB).

## Where this design departs from its specification, and what it had to choose

The rates, the stage order, the decimation factors, the 5 CIC stages with
D = 1, the 11-tap FIR stages, the transposed half-band form, the symmetric
direct-form corrector, distributed arithmetic with offset binary coding, and
the 6/11/12/13-bit word widths all follow the published design. The rest is
this design's own choice:

* **Coefficients** were not published. The sets above were designed for
  this implementation.
* **Stop-band depth.** The specification asks for −65 dB, and that figure
  seems to include the CIC's own attenuation. Two 11-tap stages cannot reach
  it on their own: the half-band reaches −43.8 dB and the corrector about
  −50 dB.
* **Half-band band edges.** The specification gives a 20 kHz pass band and a
  35 kHz cut-off at 80 kHz. A half-band filter cannot have those, because
  its edges must be symmetric about 20 kHz. 12 / 28 kHz was chosen.
* **Distributed arithmetic** is used in the corrector only. In the
  transposed half-band, every tap multiplies the same input, so it is not an
  inner product. Its products are written as constant multiplications, which
  synthesis turns into shift-and-add logic.
* **The CIC specification** once mentions a sinc⁶ response. The 5-stage
  structure it describes everywhere else (sinc⁵) was built.
* **Clocking.** One clock with enables, rather than a divided clock for the
  comb section.
* **Word-length reduction.** CIC output by truncation. FIR outputs rounded
  half up and saturated. The output stays in two's complement.
* **Output phase.** Which sample of each decimation group is kept: the last
  one of each group after reset.
* **Reset.** Synchronous, active low, clears all state.

Not included: the analog sigma-delta modulator that feeds the filter, and
the comb-FIR-FIR variant with a single 22-tap low-pass FIR, which serves
only as a comparison for this architecture.

## Files

| file | content |
|---|---|
| `rtl/decim_pkg.sv` | widths, rates, coefficient tables |
| `rtl/cic_integrator.sv`, `rtl/cic_comb.sv`, `rtl/clock_divider.sv` | CIC building blocks |
| `rtl/cic_decimator.sv` | 5-stage ÷16 CIC |
| `rtl/halfband_fir.sv` | 11-tap half-band, two-phase transposed form, ÷2 |
| `rtl/da_processor.sv` | distributed-arithmetic inner product, plain or OBC table |
| `rtl/corrector_fir.sv` | 11-tap folded corrector on `da_processor`, ÷2 |
| `rtl/decimation_filter_top.sv` | the chain; intermediate outputs and saturation flags are ports |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_decimation_filter_sparse.sv` | whole chain with one sample every 100 clocks |
| `tb/sigma_delta_modulator_model.sv`, `tb/tb_sigma_delta_workload.sv` | behavioural modulator and the converter test built on it |

Every testbench compares the design with an independent model, and finishes
with one line, `TB_RESULT checks=N failures=M`. For a FIR stage, the model is
a direct convolution. For the CIC, it is the 76-tap impulse response
(16-boxcar)⁵. For the DA unit, it is a plain Σ f·x. Each testbench also
checks rates and latencies, and has a watchdog.

`tb_decimation_filter_top` runs the whole chain at full size. The input is
48,384 samples: random data, a full-scale square wave, a 4 kHz tone and a
30 kHz tone. The test checks every sample at 80, 40 and 20 kHz. It also
requires that each of these happened at least once: integrator wrap-around,
both saturations, and an OBC inner product with a negative sign-controlling
input.

`tb_sigma_delta_workload` puts a behavioural first-order sigma-delta
modulator (`tb/sigma_delta_modulator_model.sv`) in front of the filter. The
modulator has an integrator, a 1-bit quantiser and 1-bit DAC feedback, and
codes each bit as ±31. It is fed a 4 kHz sine of amplitude 0.5. A sine fit
at the 20 kHz output recovers an amplitude of 1964, against 1984 expected.
The residual is 4.7 RMS, about 49 dB below the tone.

`tb_decimation_filter_sparse` clocks the filter 100 times faster than its
sample rate, as in a 128 MHz system with a 1.28 MHz modulator: `in_valid` is
high on one clock in 100. Every output at 80, 40 and 20 kHz must match the
model and a second copy of the filter fed on every clock. The final outputs
must come exactly 6,400 clocks apart.

## Simulating

With Verilator 5 (the package must come first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/decim_pkg.sv rtl/cic_integrator.sv rtl/cic_comb.sv rtl/clock_divider.sv \
  rtl/cic_decimator.sv rtl/halfband_fir.sv rtl/da_processor.sv rtl/corrector_fir.sv \
  rtl/decimation_filter_top.sv tb/tb_decimation_filter_top.sv \
  --top-module tb_decimation_filter_top -o sim
./obj_dir/sim
```

Replace the testbench file and top-module name to run another test; the
sigma-delta test also needs `tb/sigma_delta_modulator_model.sv`. The
full-chain test takes well under a second.

To change a filter, edit its coefficients in `decim_pkg.sv`. Keep the
half-band odd taps at zero and the centre tap at 16384, because the
two-phase structure relies on them. The DA table follows automatically from
`CORR_UNIQ_COEF`, the first six corrector taps. Keep that consistent with
`CORR_COEF`.
