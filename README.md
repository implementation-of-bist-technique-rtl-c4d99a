# Built-in self-test for an FPGA's embedded ADC

An FPGA that contains an analog-to-digital converter can test that
converter with its own fabric: load a test design, let it measure the
ADC, then reconfigure the device and the test logic costs nothing. This
RTL is such a test design. It has three parts:

* a **static test** that measures gain error, offset, differential
  nonlinearity (DNL) and integral nonlinearity (INL) from a code-density
  histogram of a sine wave;
* a **dynamic test** that takes the FFT of a record of conversions and
  computes THD, SNR, SINAD, SFDR and the effective number of bits (ENOB);
* a **second-order delta-sigma modulator** that turns a digital sine into
  a 1-bit stream. An output pin drives it off chip. An external RC filter
  smooths it into an analog test signal for the ADC, so no signal
  generator is needed.

Each test is started by a push button. It collects conversions from the
free-running ADC, computes its figures, raises `done` and holds the
results until the next press. The target ADC is a 12-bit, up to 1 MS/s
unipolar converter with a one-clock data-ready pulse per conversion.

```
             +-------------------------- bist_top ---------------------------+
 adc_code -->| static_bist:  start_sync -> histogram -> static_engine        |--> static_result
 adc_drdy -->|                                         (seq_divider, cordic) |
             | dynamic_bist: start_sync -> fft_engine -> spectrum_metrics    |--> dynamic_result
             |                             (cordic)      (log2_fx)           |
 dac_sample->| ds_modulator                                                  |--> dac_out (pin)
             +---------------------------------------------------------------+
 outside: ADC, sine synthesizer feeding dac_sample, output pad, RC filter, read-out of results
```

## Static test: from a histogram to DNL and INL

`static_bist` clears a 4096-bin histogram (`histogram`) and counts
200,000 conversions into it. The ADC input is an overdriving sine with
offset C and amplitude A. Both are given in LSB on the `sine_offset` and
`sine_ampl` inputs (Q16.16). `static_engine` then works in LSB units. The
bottom of the input range is 0, and the ideal first transition is at
1 LSB. M = 2^N − 1 = 4095 is the number of transitions.

1. **Transition levels.** For a sine, the fraction of samples below
   transition k equals the cumulative histogram CH[k−1] = H[0] + … +
   H[k−1] divided by the sample count S. Inverting the sine's
   distribution gives

   T[k] = C − A · cos(π · CH[k−1] / S).

   Each level needs one sequential division (CH/S, 42 clocks) and one
   CORDIC cosine (27 clocks). The result is stored in a 4096-word memory
   as Q.16. The engine accumulates Σ T, Σ k·T and Σ T² exactly in 48-,
   64- and 80-bit registers.
2. **Best-fit gain and offset.** Least squares of G·T[k] + Vos against the
   ideal levels k gives

   G = M (Σ kT − 2^(N−1) Σ T) / (M Σ T² − (Σ T)²),
   Vos = 2^(N−1) − G · Σ T / M.

   These use 128-bit integer arithmetic and one 128-bit sequential
   divider, run twice. G is kept in Q.30.
3. **Linearity.** On a second walk over the stored levels:
   - INL[k] = G·T[k] + Vos − k for k = 1 … M;
   - DNL[k] = G·(T[k+1] − T[k]) − 1 for k = 1 … M−1.

   The engine keeps the minimum and maximum of each. It also stores
   both curves per code in two memories. After a run, they can be read
   through `curve_probe_addr` to plot DNL and INL against the code.

Results (`static_result_t` in `bist_pkg`):

- `gain`: G, in Q2.30.
- `gain_err_pct`: (G − 1)·100, in Q.16.
- `offset_lsb`: Vos, in Q.16.
- `dnl_min`, `dnl_max`, `inl_min`, `inl_max`: in Q.16 LSB.

A full run takes about 320,000 clocks after collection. Because the fit
uses every level, the INL curve is relative to a best-fit line, not to
the end points.

The only approximations in the static path are these:

- T[k] is rounded to 2^-16 LSB.
- The cosine is accurate to about 2^-22.
- G is rounded to 2^-30.

Against a double-precision evaluation of the same formulas, the results
agree to better than 0.001 LSB. The gain and offset are only as accurate
as the C and A supplied. A wrong stimulus amplitude shows up directly as
a gain error.

## Dynamic test: FFT and spectral figures

`dynamic_bist` stores the next 4096 conversions into `fft_engine`'s
memory, after subtracting mid-scale. Each sample is written at its
bit-reversed address, scaled by 2^12. The engine is an in-place radix-2
decimation-in-time FFT. It has separate real and imaginary memories of
40-bit words. It does no scaling between stages, because 12 input bits
plus 12 bits of growth plus 12 fraction bits fit in 40 bits. The engine
computes each twiddle factor once per (stage, index) with the CORDIC,
then reuses it across the blocks of that stage. Its cost is 4 clocks per
butterfly plus about 28 per twiddle, about 213,000 clocks for 4096
points.

`spectrum_metrics` reads bins 1 … N/2 twice and uses the power
P = re² + im²:

- **Pass 1** finds the fundamental as the largest bin. DC is excluded.
- **Pass 2** splits the remaining bins into the following:
  - harmonics: bins h·kf for h = 2 … 11, folded about Nyquist so that
    aliased harmonics are found;
  - noise: every other bin;
  - the largest spur: the largest bin other than the fundamental.

A serial fixed-point log2 (16 fraction bits) then gives, with
10·log10(2) = 3.0103:

| figure | definition |
|---|---|
| THD   | 10 log10(Ps / Pharmonics) (positive dB) |
| SNR   | 10 log10(Ps / Pnoise) |
| SINAD | 10 log10(Ps / (Pnoise + Pharmonics)) |
| SFDR  | 10 log10(Ps / Plargest spur) |
| ENOB  | (SINAD − 1.76) / 6.02 |

These are single-bin powers with no window. With a non-coherent
stimulus, leakage from the fundamental counts as noise and lowers SNR.
This is a property of the method, not of the RTL. Choose a stimulus
frequency that fits a whole number of periods in the record. While idle,
any spectrum bin can be read through `spec_probe_addr`.

## Delta-sigma DAC

`ds_modulator` uses 24-bit two's complement words with 4 integer and 20
fraction bits. It has four adders and two registers, arranged as two
integrators:

```
s1  = x − q;          r1 <= r1 + s1          (adders 1, 2)
s2  = (r1 + s1) − q;  r2 <= r2 + s2          (adders 3, 4)
q   = +1.0 if r2 >= 0 else −1.0;   dac_out = ~sign(r2)
```

The second integrator takes the first one's sum before its register.
This gives the classic transfer function
Y = z⁻¹X + (1 − z⁻¹)²E, which is stable for inputs up to about ±0.8 of
full scale. The default half-scale sine is well inside that. A constant
input x gives a density of ones of (x + 1)/2. `dac_en` lets the
modulator run slower than the system clock.

## Where this departs from, or adds to, the reference design

- **Arithmetic.** The reference design computed in floating point. This
  RTL uses fixed point with exact sums, so its results differ from a
  floating-point run in the 4th to 5th decimal place.
- **Choices the reference design leaves open.** This design makes its
  own choices for:
  - the record length of the dynamic test (4096);
  - the histogram counter width (18 bits);
  - how the fundamental is found;
  - whether "ten harmonics" includes the fundamental (here it does not:
    2nd to 11th);
  - the transition-level formula of the histogram method;
  - the sign convention of the gain error;
  - the reset (asynchronous, active low);
  - the button handling (synchronised, edge-detected, ignored during a
    run, no debouncing).
- **One top for both tests.** The static and dynamic tests were separate
  top levels in the reference design. Here they sit side by side in
  `bist_top` and share the ADC port.
- **Read-out ports.** Results and the histogram, curve and spectrum read-out
  ports stand in for on-chip logic analyzers read over JTAG. Those, the
  ADC, the sine synthesizer that feeds `dac_sample`, the output pad and
  the analog filter are not part of the RTL.
- **What is not modelled.** Uncalibrated vs. calibrated ADC modes, and
  bipolar input, are properties of the converter, not of this logic.
  Bipolar codes would need the stimulus parameters expressed from the
  bottom of the range.

## Files

| file | contents |
|---|---|
| `rtl/bist_pkg.sv` | widths, result structs, CORDIC arctangent table (round(atan(2^-i)/2π · 2^32)) |
| `rtl/bist_top.sv` | top level |
| `rtl/static_bist.sv`, `rtl/histogram.sv`, `rtl/static_engine.sv` | static test |
| `rtl/dynamic_bist.sv`, `rtl/fft_engine.sv`, `rtl/spectrum_metrics.sv` | dynamic test |
| `rtl/ds_modulator.sv` | delta-sigma DAC |
| `rtl/cordic.sv`, `rtl/seq_divider.sv`, `rtl/log2_fx.sv`, `rtl/start_sync.sv` | helpers |
| `tb/tb_*.sv` | self-checking testbenches, one per block |
| `tb/adc_model.sv` | behavioural ADC with a known gain, offset and bent levels |
| `tb/tb_static_4bit.sv` | the static test on a 4-bit converter with one level moved by 0.4 LSB |
| `tb/static_ref_pkg.sv`, `tb/dyn_ref_pkg.sv` | floating-point reference calculations |

Top-level parameters and their defaults:

| parameter | default | meaning |
|---|---|---|
| `N_BITS` | 12 | ADC resolution |
| `NUM_SAMPLES` | 200000 | conversions per static test |
| `CW` | 18 | histogram counter width (must hold NUM_SAMPLES) |
| `LOG2N` | 12 | dynamic record length 2^LOG2N |
| `DW` | 40 | FFT word width |
| `NH` | 10 | harmonics counted in THD |
| `DS_WIDTH`, `DS_FRAC` | 24, 20 | delta-sigma word format |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Testbenches compare against values computed independently in
floating point. They check the clock counts of each run, and have a
watchdog. For example, the end-to-end test at full size (about 2 million
clocks, a few seconds):

```
verilator --binary --timing --assert -Irtl -Itb rtl/bist_pkg.sv \
    tb/static_ref_pkg.sv tb/dyn_ref_pkg.sv tb/tb_bist_top.sv --top-module tb_bist_top
./obj_dir/Vtb_bist_top
```

The end-to-end test does the following:

- It runs the static test on a 0.5 V ± 0.55 V sine.
- It checks that a second button press during a run is ignored.
- It reads the histogram back and compares it with the testbench's own
  count.
- It reads the DNL and INL of all 4095 codes back and compares them with
  the reference.
- It runs the dynamic test on the filtered delta-sigma output of a
  half-scale sine.
- It checks that the tone arrives at the expected amplitude after the
  filter, within 2 %.

Block testbenches use smaller sizes (8-bit histograms, 256-point FFTs)
to stay short. Change a block's parameters in its testbench to try
others. `NUM_SAMPLES` must fit in `CW` bits.
