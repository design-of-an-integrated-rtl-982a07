# On-line fault detection and diagnosis core for rotary actuators

This is a small, low-rate ASIC core that watches an electromechanical actuator,
for example a motor-driven pipeline valve, through one sensor. It reports how
often the sensor signal "surprised" a predictor during the last two seconds.
A healthy actuator produces a signal whose short-term power is predictable. A
braking load, worn gears or broken teeth change the amplitude or the frequency
content, and the prediction error jumps. The core reduces this to one number
per frame of 256 error samples: the **fault detection index (FDI)**, 0 to 255.
An external host reads it over SPI and can build a histogram of FDI values over
a test cycle. The shape of that histogram separates fault types: a spread of
values for a light fault, a spike near 255 for a heavy one.

The core also has a **built-in self-test**. In normal service the outputs sit at
zero for long periods, which says nothing about whether the detection logic
still works. With the test pin high, a pseudo-random pattern replaces the
sensor data, and the FDI must then show detections.

## Signal chain

```
 SPI word ─► 9/7 wavelet ─► a/d select ─► test mux ─► power ─┬─► LMS predictor ─► e ─► |e|>0.25 ─► count per 256 ─► FDI ─► SPI (sdo)
 (12-bit      (lifting,      (b14)         (tst)      (mean   │   (5 taps, step mu)   (FDS output)
  sample)      /2 rate)                     ▲          of x²)  └─ z^-1 ─┘
                                           TPG (LFSR)
```

| Stage | Module | What it does |
|---|---|---|
| Serial interface | `fdd_spi` | Takes in 16-bit command words, buffers the 12-bit data with a sample or step-size strobe, holds the sub-band select, and sends the FDI value out |
| Wavelet | `dwt97` | One-level 9/7 lifting DWT. Gives approximation (low band) and detail (high band) coefficients at half the sample rate |
| Test pattern | `tpg` | 8-bit LFSR with seed stepping. Gives 255 × 256 = 65280 patterns before they repeat |
| Power | `power_est` | Mean of the squared coefficient over a short sliding window |
| Predictor | `lms_filter` | 5-tap LMS filter. Predicts the power from its previous 5 values. Its error `e` is the fault detection system (FDS) output |
| Index | `fdi` | Flags each `|e| > 0.25` and counts the flags in frames of 256 |
| Glue | `fds`, `fdd_top` | `fds` chains the wavelet, the multiplexers, the power stage, the delay and the LMS filter. `fdd_top` adds the SPI slave and the index |
| Shared | `fdd_pkg` | Widths, number format, command-word struct, sub-band and command enums, saturation helper |

The chain of stages, the 9/7 lifting wavelet, the 5-tap LMS filter, the
threshold of 0.25, the frame of 256, the SPI word layout and the BIST structure
come from the published design. The number format, the power window, the
encodings and the timing inside each stage are choices made here. Each file's
header comment says which is which.

## Number format

Every internal 16-bit bus is signed two's complement with **11 fractional
bits**. So 1.0 is the full scale of the 12-bit ADC, and a sample is a Q1.11 value
sign-extended to the bus. Two facts fix this scale:

* The test pattern puts its 8 LFSR bits at bus bits [10:3], which is 0 to just
  under 1.0 on this scale.
* The error is meant to lie between 0 and 1 and is compared with 0.25, which is
  512 here.

The wavelet's low band has a DC gain of √2. A full-scale sensor signal
therefore reaches about 1.41 and still fits. The power (1.0 for a full-scale
signal) and the prediction saturate at the bus limits.

## Serial interface and timing

The core has one clock, which also serves as the SPI bit clock. The reference
operating point is a 4096 Hz clock with 256 Hz sensor samples. That is exactly
16 clocks per sample, so the master sends one 16-bit word per sample and can
hold `cs_n` low all the time.

Command word (MSB first on `sdi`, sampled on the rising edge):

| Bits | Meaning |
|---|---|
| b15 | 0: b11..b0 is a sensor sample (signed). 1: b11..b0 is the LMS step size mu (unsigned, 11 fractional bits, so mu = 0.1 is 205) |
| b14 | Sub-band for the power stage. 0: approximation (slow signals such as torque or strain). 1: detail (vibration) |
| b13..b12 | Ignored |
| b11..b0 | Data |

During every word, `sdo` sends the FDI value that was current when the word
began, MSB first. The MSB is already on the pin before the first edge, and
each rising edge shifts the next bit out.

Latency from the last bit of a sample word:

* clock 1: the decoded sample is available;
* clock 2: the wavelet output, every second sample;
* clock 3: the power;
* clock 4: the error `e`;
* clock 5: the FDI register, at the end of a frame.

A new FDI value therefore appears on `sdo` two words after the sample that
completed its frame. At the reference rates, `e` comes every 32 clocks (128 Hz)
and FDI every 8192 clocks (2 s). The stages need at least 4 clocks between
samples, and an assertion in `fds` checks this.

`rst` is a synchronous, active-high reset. After reset mu is 0, so the
predictor does not adapt until a mu word arrives. Load mu first.

## The wavelet stage

`dwt97` computes the CDF 9/7 wavelet in lifting form on a continuous stream.
Samples are paired as (even, odd). When a pair completes, all four lifting
steps run in one clock, each using the values it needs from earlier pairs:

```
d1[n] = o[n]  + α(e[n] + e[n+1])        α = -1.586134342
a1[n] = e[n]  + β(d1[n-1] + d1[n])      β = -0.052980119
d2[n] = d1[n] + γ(a1[n] + a1[n+1])      γ =  0.882911076
a2[n] = a1[n] + δ(d2[n-1] + d2[n])      δ =  0.443506852
a = K·a2,  d = d2/K                     K =  1.149604398
```

Steps 1 and 3 look one pair ahead, so the pair completed at time n yields the
coefficients of pair n−2. Only five earlier values are stored, so there is no
sample buffer. There is no multiplier either: each constant (12 fractional
bits) is applied as a sum of shifted copies of the operand, one per set bit.
Internal values carry 4 guard bits in 24-bit words. The stream starts from a
zero state, so the first two output pairs are start-up transients.

## Power, prediction and why the error flags a fault

The power stage squares each selected coefficient and averages the last two
squares. A healthy actuator running its normal cycle gives a power signal that
changes slowly compared with the coefficient rate.

The LMS filter predicts the power sample from the five before it (the z^-1
delay feeds it the previous value):
`y = Σ w[i]·x[n-i]`, `e = p[n] − y`, `w[i] += mu·e·x[n-i]`.
The prediction and the update are done in one clock with five parallel
products. The weights have 20 fractional bits in 24 bits and saturate.
The step size sits in a register inside the filter. A mu word loads it once,
at calibration, and the new value applies from the next sample.

Once the weights have converged on the normal signal, `e` stays small.
Changes slower than the adaptation are tracked and do not raise the error.
What does raise it is a change in amplitude or frequency content, such as a
braking load or gear damage, because it moves the power faster than the
weights adapt. The step size sets that speed: a larger mu adapts faster and
flags fewer slow changes. The published operating point is mu = 0.1. mu
must be set together with the sensor gain for each installation.

## Fault detection index

`fdi` compares `|e|` with 0.25 (strictly greater) and counts the flags over
non-overlapping frames of 256 error samples:
FDI[j] = Σ FD[k] for k = 256·j … 256·j+255. The count is stored at the end of
each frame and saturates at 255, so a frame in which every sample was flagged
reads 255. Summing over a frame reduces the data rate by 256, and a single
noisy crossing only adds 1 to the count.

## Built-in self-test

`tpg` (test pattern generator) is an 8-stage Fibonacci LFSR with the
polynomial x⁸+x⁶+x⁵+x⁴+1. It has a seed register, a comparator and an 8-bit
counter:

* Each pattern sequence starts at the seed.
* When the LFSR's next state equals the seed, the 255 non-zero states have all
  been used. The seed is then incremented, skipping 0, and loaded into the
  LFSR. This shifts the next sequence so that the pattern does not simply
  repeat.
* The counter counts the sequences. After 256 of them (65280 patterns) it wraps
  and `all_done` pulses.

The pattern is the LFSR state at bus bits [10:3]: values from 8/2048 to
2040/2048.

With `tst` = 1 the pattern replaces the chosen wavelet sub-band in front of
the power stage, one pattern per coefficient. The master keeps sending words
during the test, and their content does not matter. A complete test takes
130560 words (8.5 minutes at 4096 Hz). The pattern is random from one
coefficient to the next, so the predictor cannot follow it. In simulation,
every one of the 255 test frames shows detections, with a mean FDI of about
29. This is the self-test signature the host checks.

The power window length sets this signature. Averaging over 4 squares smooths
the pattern so much that almost no sample crosses the threshold, and the
self-test would be useless. This is why the window is 2 (`WIN_LOG2` = 1). The
published self-test runs reach FDI values near saturation. This
implementation does not reproduce those levels: the power stage and the
fixed-point format behind them are not specified, and the ones chosen here
give the lower signature.

## Detection sensitivity

The threshold is absolute: 0.25 of full-scale power. The predictor follows
anything that changes slowly or regularly compared with its adaptation. Two
consequences follow:

* a steady rise in load or vibration level gives one burst of errors at the
  transition, not a lasting index;
* a lasting index needs power fluctuations that are irregular and larger than
  about a quarter of full scale.

`tb_valve_cycles` shows this on synthetic stand-ins for four valve campaigns:
two torque cases with a brake load and two vibration cases with worn or broken
gear teeth. It uses mu = 0.1 and signal levels taken from measured cases. The
faulty cycles then give mean FDI values between 0 and 1. The core does not
reach the high and sustained index values reported for the real sensor
recordings. Matching those levels would take the recordings themselves, and
the power-stage and number-format details that set the sensitivity, which
are not specified.

Before use, calibrate the three values that set the sensitivity:

* the sensor gain, so that the power of a healthy signal sits well inside the
  range;
* mu;
* if needed, `fdi.THRESHOLD`.

## Departures and open points

* **Power stage algorithm.** Only its purpose is known (a power estimate over
  a limited time frame). The sliding mean of squares and its length are
  choices made here.
* **Number formats** of samples, mu, buses and weights are chosen here; see
  above.
* **Bit encodings** of b15 and b14 are chosen here. Only their meanings are
  known.
* **Single clock.** The serial clock and the core clock are one signal. This
  works at the reference rates. A faster SPI clock would need a separate clock
  domain, which is not implemented.
* **Clock gating.** The published chip gates its clocks to save power. Here the
  registers use enables (valid strobes), which a gating tool can turn into
  gated clocks. No gating cells are instantiated.
* **Test multiplexer position.** It is placed after the sub-band multiplexer,
  in front of the power stage, as in the block diagram. So the test pattern
  goes through power, prediction and index, but not through the wavelet.
* **FDI framing.** Non-overlapping frames of 256, as in the defining equation.
  Saturation is at 255, not 256.
* **Wavelet boundaries.** The stream starts from zero. There is no symmetric
  extension, since the input has no end.
* **Not part of the RTL:** the sensors, the ADC, the SPI master and the
  histogram, which is computed by the host from the FDI series.

## Simulating

All code is SystemVerilog-2017. The testbenches check their own results and
print `TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fdd_pkg.sv tb/fdd_ref_pkg.sv tb/tb_fdd_top.sv --top-module tb_fdd_top
./obj_dir/Vtb_fdd_top
```

Replace `tb_fdd_top` with any other testbench.

| Testbench | Covers |
|---|---|
| `tb_fdd_top` | Whole core through its pins, at default sizes: the saturated index (mu = 0, strong signal), an amplitude jump in each sub-band, and the complete 65280-pattern self-test. Every word read from `sdo` is compared with a reference chain. It counts each mechanism (mu load, both sub-bands, test mode, threshold crossings, frames, saturation) and fails if one never happened. Runs in a few seconds. |
| `tb_valve_cycles` | Four 90-second valve campaigns (one normal and one faulty cycle each) with synthetic torque and vibration signals, at default sizes. Every `sdo` word is compared with the reference chain, the frame rate is checked, and the FDI histogram of each faulty cycle is printed |
| `tb_fds` | Detection chain alone, bit-exact against the reference chain in all three modes, plus detection of amplitude jumps |
| `tb_dwt97` | Bit-exact against an integer lifting model. Also checks the DC gain of √2 on the low band and the rejection of the alternating sequence |
| `tb_power_est` | Windows of 2 and 4 against a mean-of-squares model, saturation, return to zero |
| `tb_lms_filter` | Bit-exact against an integer LMS model. Also checks convergence to an error below 0.01 at mu = 0.1, the error spike on a jump, and frozen weights at mu = 0 |
| `tb_fdi` | Threshold edges (±0.25 is not a fault, one LSB more is), frame count, saturation, valid timing |
| `tb_tpg` | 255 distinct non-zero states per sequence, seed stepping, output bit placement, `all_done` after exactly 65280 patterns |
| `tb_fdd_spi` | Random sample and mu words, back to back and with gaps: decoding, b14, and the `sdo` contents |

`tb/fdd_ref_pkg.sv` holds the integer reference models shared by the
testbenches. They use ordinary multiplications and 64-bit arithmetic, not the
shift-add and bus-width code of the RTL.

Parameters worth changing: `power_est.WIN_LOG2` (power window),
`lms_filter.WW/WF` (weight precision), `fdi.N/THRESHOLD/FDI_MAX`,
`dwt97.GUARD`, `tpg.SEED0`. The shared widths and the 11-bit fraction are in
`fdd_pkg`. The reference models in `tb/fdd_ref_pkg.sv` assume the defaults,
except for the power window, so update them if you change anything else.
