# Digital anti-aliasing FIR filter with an on-chip test-signal generator

A voice-band receiver has to keep its base band to 0–3400 Hz. Everything
above that is interference, and left in place it aliases into the band once
the signal is resampled. This design does that band limiting with one long
linear-phase FIR low-pass filter: order 1500 (1501 taps), cut-off 3400 Hz,
sample rate 50 kHz, Hamming window, 10-bit data and coefficients. All 1501
products are formed and summed in parallel once per sample.

The filter has a test source on the same chip, so the whole experiment runs
from one 50 MHz clock:

* a 2000 Hz base band tone;
* a sinusoidal interferer just above the pass band, at 3500 Hz or 3900 Hz,
  with the same amplitude as the tone (input SNR 1:1);
* pseudo-random noise at about a quarter of the tone amplitude (SNR 4:1).

The test source and the filter each give a 10-bit word per sample. On the
board these words drive two DACs, one for the filter input and one for its
output, so an oscilloscope can show the signal before and after filtering.

The architecture follows the published design *"Design and Implementation
of a Digital Anti-Aliasing Filter using FPGA for Communication Systems"*
(Cyclone II, DE2-70 board). That source gives the structure, sizes and
frequency codes. Where it leaves something open, this RTL makes its own
choice; each one is listed in
[Choices made here](#choices-made-here-and-departures-from-the-original).

## Block structure

```
 clk 50 MHz ──► ddfs_fsam ──► sam_en (1 strobe / 20 us) ─────────┬───────────┐
                   └──► f_sam (50 kHz square wave, DAC clock)    │           │
                                                                 ▼           ▼
 signal_simulator ────────────────────────────────────────► inp_filter ─► fir_lpf ─► fir_scaler ─► out_filter
   ├─ ddfs_signal        2000 Hz tone   (phase_accumulator + sine_rom "ROM0")
   ├─ ddfs_interference  3500/3900 Hz   (2:1 code mux + phase_accumulator + sine_rom "ROM1")
   ├─ dpng               40-bit shift-register noise
   └─ adder / selects    s_s_and_n, n_sin, sin1_sin2
```

| module | role |
|---|---|
| `aaf_pkg` | shared widths, the four frequency codes, constant functions for the sine table and the filter taps |
| `phase_accumulator` | 32-bit accumulator with clock enable and asynchronous clear |
| `sine_rom` | 16384 x 10-bit sine table, synchronous read |
| `ddfs_signal` | base band tone synthesizer |
| `ddfs_interference` | interferer synthesizer with 3500/3900 Hz code select |
| `dpng` | pseudo-noise generator |
| `signal_simulator` | the three generators and the adder that forms the filter input |
| `ddfs_fsam` | sample-strobe synthesizer |
| `fir_lpf` | 1501-tap direct-form FIR filter |
| `fir_scaler` | 30-bit sum to 10-bit output (shift and saturate) |
| `aaf_top` | the whole system |

`aaf_top` ports: `clk`, `rst` (asynchronous, active high), the three set-up
switches `s_s_and_n` (1 = add an interferer), `n_sin` (1 = noise, 0 =
sinusoid) and `sin1_sin2` (1 = 3500 Hz, 0 = 3900 Hz), and the outputs
`f_sam`, `inp_filter[9:0]` and `out_filter[9:0]`, both words two's
complement. The DACs, the analog smoothing filter after the output DAC, the
oscillator and the lab equipment are outside the RTL.

## One clock, one sample strobe

The original design clocks the generators and the filter directly with the
50 kHz sample pulse. Here everything runs on the 50 MHz clock. `ddfs_fsam`
makes a one-clock strobe `sam_en` at each rising edge of its pulse, and every
other register uses `sam_en` as its clock enable. The pulse comes from a
32-bit accumulator that adds `L_SAM = 4294967` every clock:
F = 50 MHz · 4294967 / 2^32 = 49 999.99 Hz. Strobes are therefore 1000
clocks apart, with one 1001-clock gap about every 14 000 samples.

Each strobe moves the pipeline one step:

1. The phase accumulators step, and the sine ROMs register the word for the
   phase they held before the strobe.
2. `signal_simulator` registers `inp_filter` from the ROM words and the
   noise word present before the strobe.
3. `fir_lpf` shifts in the `inp_filter` value present before the strobe and
   loads `sout` with the full convolution, which includes that value.
   `out_filter` is valid one clock after the strobe.

The path from accumulator to filter output is therefore three strobes long,
plus the filter's own group delay of 750 samples (15 ms).

## Frequency synthesizers

Each synthesizer is a direct digital synthesizer (DDFS): a 32-bit phase
accumulator stepped by a frequency code L at each sample strobe. Its top 14
bits address a one-period sine table. The output frequency is
F = F_sam · L / 2^32, so L = 2^32 · F / F_sam, with a resolution of
50 kHz / 2^32 = 11.6 µHz.

| signal | F | L (parameter of `aaf_top`) |
|---|---|---|
| base band tone | 2000 Hz | `L_SIG = 171798692` |
| interferer 1 | 3500 Hz | `L_SIN1 = 300647711` |
| interferer 2 | 3900 Hz | `L_SIN2 = 335007449` |
| sample strobe (at 50 MHz) | 50 kHz | `L_SAM = 4294967` |

The table has 16384 words, each X(a) = 512 + floor(511 · sin(2π·a/16384)).
The words are offset binary in 1..1023, with mid-scale at 512. No data file
is needed: `aaf_pkg::sine_sample` computes the table when the design is
elaborated, and `sine_rom` loads it into its array in an `initial` block,
which synthesis tools map to ROM contents. ROM0 and ROM1 are two instances
of the same module. Switching `sin1_sin2` changes only the phase step, so
the interferer changes frequency without a phase jump.

## Noise generator

`dpng` has a 40-bit register that shifts left at each strobe. The bit
shifted in is NOT(SH[39] XOR SH[2]). Because of the inversion, the
all-zero state left by reset is a running state; the all-ones state is the
one that would lock. The top six bits minus 32 give a noise word in −32..31,
which is registered twice (two strobes of latency).

Consecutive noise words share five of their six bits, so the noise is
strongly correlated from one sample to the next. Its spectrum falls off with
frequency instead of being flat. Most of its power therefore lies inside the
filter's pass band, and the filter removes less of it than it would remove
of white noise; see the results below. The taps 39 and 2 come from the
original design. Whether they give the maximal period of 2^40 − 1 has not
been verified.

## Forming the filter input

The adder in `signal_simulator` turns the ROM words into signed values by
subtracting 512, giving −511..511. It scales the noise word by 4 (±128,
about 25 % of the tone) and forms

```
x = (tone + interferer) >>> 1      s_s_and_n = 1   (interferer = sinusoid or noise by n_sin)
x =  tone               >>> 1      s_s_and_n = 0
```

Halving lets two full-scale sines fit in 10 signed bits. It is applied in
every set-up, so the tone stays at the same level (amplitude ≈ 255) when the
interferer is switched on or off.

## The FIR filter (`fir_lpf`)

This is the bulk of the logic: a 1500-stage delay line of 10-bit registers,
1501 signed 10 x 10 constant multipliers, and one 1501-input adder with a
30-bit result. On each strobe it computes

    sout = Σ_{m=0}^{1500} h(m) · x(n−m)

The current input `din` is x(n) and feeds tap 0 directly. The registers
hold x(n−1) to x(n−1500). The whole sum is computed in the single clock in
which `sam_en` is high. The original design's count of "75 million operations per
second" counts this work spread over the sample period: 1501 products per
20 µs.

### Coefficients

The taps are the ideal low-pass response times a Hamming window, with
n = m − 750:

    h(0) = 2·Fc/Fs,   h(n) = sin(2π·n·Fc/Fs) / (π·n),   Fc = 3400 Hz, Fs = 50 kHz
    w(m) = 0.54 − 0.46·cos(2π·m/1500)
    tap m = round(h · w · 2^11)

`aaf_pkg::fir_coef` evaluates this at elaboration, and each tap becomes a
`localparam`, so the multipliers are multiplications by constants. The
scale 2^11 is the largest power of two at which the centre tap (0.136 ·
2048 = 279) still fits in 10 signed bits. The taps then sum to 2047, so
dividing the sum by 2^11 gives unity gain in the pass band.

Rounding to 10 bits has a cost. Only 747 of the 1501 taps are non-zero:
the outer 283 taps on each side round to zero, and so do many taps near the
zero crossings of the sinc. The quantised response, computed from the taps
and confirmed in simulation at the test frequencies:

| frequency | gain |
|---|---|
| 2000 Hz | −0.02 dB |
| 3400 Hz (cut-off) | −6.1 dB |
| 3500 Hz | −37.5 dB |
| 3900 Hz | −57 dB |
| stop band 3.5–25 kHz | median about −50 dB, highest peaks about −34.5 dB |

The stop band floor is set by the 10-bit coefficients, not by the filter
order. Quantisation error adds an irregular ripple, whose peaks are near
−35 dB. The 3900 Hz test tone happens to fall in a deep notch of that
ripple. The original design quotes −60 dB and a 0.9 Hz transition band. A
1500th-order Hamming design has a transition band of roughly
3.3 · 50 kHz / 1500 ≈ 110 Hz. The original measured 20 dB at 3500 Hz and
60 dB at 3900 Hz.

### Word widths

Each product has 20 bits. The largest possible sum is 511 · Σ|h| =
511 · 5547 ≈ 2.8·10^6, which fits the 30-bit adder output with room to
spare. `fir_scaler` shifts the sum right by 11 (rounding toward −∞) and
saturates it to −512..511. With the inputs the simulator produces,
saturation never happens; it only guards against other inputs.

### Cost

1501 parallel multipliers cannot all be implemented as hard multipliers on
most FPGAs. Being constants, they reduce to shift-and-add logic. About half
the taps are zero, and those vanish entirely. Still, a single-cycle
1501-input adder tree will not meet a 50 MHz clock without pipelining. This
is harmless, because the sum has 1000 clocks to settle, but a timing
constraint (a multicycle path on `sout`) or pipeline registers in the adder
tree are needed for timing closure.

The RTL has been linted with Verilator and elaborated with Yosys' slang
front end at full size. Coarse synthesis in Yosys handles the generators
and the scaler in seconds. For the filter, its run time grows roughly with
the cube of the tap count: 301 taps took 19 s, 601 taps 2.5 min, and the
full 1501-tap filter did not finish within 10 minutes. No FPGA place and
route has been run on this RTL.

## Results in simulation

`tb_aaf_top` runs the complete system at its default parameters (50 MHz
clock, 50 kHz strobe, 1501 taps) through the four set-ups: 8400 samples,
8.4 million clocks, a few seconds with Verilator. It analyses 500 samples
of each set-up, which hold whole periods of 2000, 3500 and 3900 Hz:

| set-up | measured | original design |
|---|---|---|
| tone only | output = input delayed by 750 samples, within 3 LSB; tone gain −0.02 dB | no distortion (linear phase) |
| + 3500 Hz | interferer −37.5 dB | 20 dB |
| + 3900 Hz | interferer −56.7 dB | 60 dB |
| + noise | noise power −4.7 dB | 5 dB |

## Choices made here, and departures from the original

* One 50 MHz clock domain with a sample-strobe clock enable, instead of
  clocking logic with the sample pulse. The sample-pulse accumulator has an
  asynchronous clear; in the original it has none.
* Coefficient scale 2^11 with rounding to nearest, and no passband
  renormalisation: the unquantised windowed taps sum to 0.99984. The source
  says only "signed 10 bits".
* The scaler rule (shift by 11, saturate) is this design's. The source shows
  a scaler block but not what it does. Its schematic feeds the output pin
  from bits [9:0] of the sum, which cannot be the filtered signal; the
  scaled word is used here instead.
* The adder scaling (halving, noise × 4) and the polarity of the switches
  are this design's. The interferer levels follow the source's stated SNRs.
* The sine-table address convention (address a holds the sample of phase
  a) is this design's. The source indexes its formula from 1 to 16384.
* All registers that the source gives a clear input are cleared by `rst`,
  and so are the added registers. The sine ROM output registers are not
  cleared, so the first two or three samples after reset are undefined;
  they leave the filter after 1501 samples.
* The interferer multiplexer sits inside `ddfs_interference`, as in the
  source's synthesizer diagram. The source's top-level schematic draws it
  outside.
* A single filter. The original suggests cascading several identical
  filters for more attenuation and a narrower transition band, but does not
  design such a cascade; it is not built here.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. The reference models (sine table, taps,
noise register, scaler, single-frequency DFT) are in `tb/aaf_ref_pkg.sv`,
written separately from the RTL. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/aaf_pkg.sv tb/aaf_ref_pkg.sv tb/tb_aaf_top.sv --top-module tb_aaf_top
./obj_dir/Vtb_aaf_top
```

Replace `tb_aaf_top` with any of `tb_phase_accumulator`, `tb_sine_rom`,
`tb_ddfs_signal`, `tb_ddfs_interference`, `tb_ddfs_fsam`, `tb_dpng`,
`tb_signal_simulator`, `tb_fir_lpf` or `tb_fir_scaler`.

| testbench | checks |
|---|---|
| `tb_phase_accumulator` | random codes and enables against a model, wrap-around, asynchronous clear |
| `tb_sine_rom` | all 16384 words, landmark values, read latency, hold |
| `tb_ddfs_signal` | every sample against the model; 2000 Hz and 5000 Hz by counting crossings |
| `tb_ddfs_interference` | 3500 and 3900 Hz, select polarity, phase continuity across a switch |
| `tb_ddfs_fsam` | pulse against a model, 1000/1001-clock spacing, 100 strobes in 2 ms |
| `tb_dpng` | 20 000 noise words against the register model; range and mean |
| `tb_signal_simulator` | the four set-ups, switched on the fly, against models of all generators |
| `tb_fir_lpf` | full 1501-tap impulse response, 3200 random samples against direct convolution, latency, hold, clear |
| `tb_fir_scaler` | edges, clipping points, random sums |
| `tb_aaf_top` | the whole system at default size, as in [Results in simulation](#results-in-simulation) |

## Changing the design

* Frequencies: change the `L_*` parameters of `aaf_top`, using
  L = 2^32 · F / F_ref. Moving the strobe (`L_SAM`) moves every generated
  frequency and the filter's cut-off with it, since all are set relative to
  the sample rate.
* Filter: `fir_lpf` takes `NTAPS`, `FC_HZ`, `FS_HZ`, `CW` and `QSHIFT`, and
  recomputes its taps at elaboration. If you change `QSHIFT`, keep the
  scaler's `SHIFT` equal to it. Keep `QSHIFT` small enough that the centre
  tap (about 2·Fc/Fs · 2^QSHIFT) fits in `CW` bits, and keep the sum width
  `SW` at least DW + CW + log2(NTAPS).
* `aaf_top` exposes `NTAPS`. The filter's frequency parameters are fixed to
  3400 Hz and 50 kHz there.
