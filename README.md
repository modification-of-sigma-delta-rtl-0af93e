# Spike-to-analog Sigma-Delta MASH DAC (FPGA part)

Digital neurons talk in spikes: a value is carried by how often a neuron
fires. To drive an analog load (an actuator, a speaker, a sensor interface)
from such a neuron, the firing rate has to become a voltage again. This
design does that with an oversampled Sigma-Delta DAC in a two-stage MASH
(multi-stage noise shaping) arrangement, split between an FPGA and a small
analog board:

* the FPGA counts spikes per sample window, holds each count for OSR
  modulator ticks and truncates it in two cascaded stages, each with a
  noise-shaping error-feedback loop;
* stage 1 leaves as a single bit on a GPIO pin (a 1-bit DAC);
* stage 2 re-quantises the error that stage 1 left behind to 3 bits and
  drives a 7-branch thermometer DAC through seven switch lines;
* on the analog side the stage-2 signal is high-pass filtered (two stages),
  added to the stage-1 bit and low-pass filtered, so that stage 2 cancels
  most of stage 1's truncation noise.

The RTL here is the FPGA part. The analog part (thermometer DAC with its
transimpedance amplifier, two high-pass stages, summing amplifier,
reconstruction low-pass) has no logic function and is not modelled; its
FPGA-side signals are ports of the top.

The design follows a published converter that was built on a Cyclone V GX
board with a 50 MHz clock and tested with a 15 Hz sine at OSR 10, 100 and
1000. That publication describes the structure (spike rate decoder, two
truncation stages with a feedback path, a raised loop-filter order, 1-bit
and 3-bit DACs, thermometer decoding) but not word widths, coefficients or
timing. Everything numeric below that is not the 50 MHz clock, the OSR
values, the 1-bit/3-bit split or the seven thermometer lines is this
design's own choice, and is marked as such.

## Signal path

```
 spike_in ──► spike_rate_decoder ──► x_hold ──► mash_modulator ──┬─ q1 ──► dac1_out ─────────► GPIO (1-bit DAC)
                 ▲   (count/window)   (ZOH)       ▲  stage 1     │
                 │ sample_stb                     │  stage 2     └─ q2 ──► thermometer_decoder ─► therm_out[6:0]
              rate_gen ── tick (clk/TICK_DIV) ────┘                          (lines A..G)      └► dac2_msb_out
```

| module | role |
|---|---|
| `sd_dac_pkg` | loop-filter coefficients `(-1)^(k+1)·C(L,k)` |
| `rate_gen` | clock enables: `tick` every `TICK_DIV` clocks, `sample_stb` every `OSR` ticks |
| `spike_rate_decoder` | counts rising edges of `spike_in` per window, saturating |
| `noise_loop_filter` | error-feedback filter of order L |
| `sd_truncator` | one truncation stage: add feedback, keep top bits, clamp, return error |
| `mash_modulator` | the two stages, offset for stage 2, output alignment |
| `thermometer_decoder` | 3-bit code to 7 thermometer lines |
| `sd_mash_dac_top` | wiring, zero-order hold, output registers |

Everything runs in one clock domain; the lower rates are clock enables,
not divided clocks.

## Rates

With the defaults (`TICK_DIV = 50`, `OSR = 100`) and a 50 MHz clock:

| quantity | value |
|---|---|
| modulator tick | 50 MHz / 50 = 1 MHz |
| sample rate (one spike-counting window) | 1 MHz / 100 = 10 kHz, 5000 clocks |
| samples per period of a 15 Hz signal | 667 |
| largest count per window | 255 (8-bit sample); more spikes saturate |

The spike train must be synchronous to `clk`. A rising edge counts as one
spike, so spikes must be separated by at least one low cycle; the densest
train that still counts 255 per window needs 510 clocks per window.
With `OSR = 10` at `TICK_DIV = 50`, a window is 500 clocks and can count at
most 250 spikes.

## Truncation with noise-shaping feedback

Each stage (`sd_truncator`) works on a signed word `x` and, every tick,
computes

```
v = x + fb                       fb from the loop filter
q = clamp(floor(v / 2^S), 0, 2^B - 1)      B = 1 (stage 1) or 3 (stage 2)
e = v - q·2^S                    the part the DAC will not see
```

`e` is fed back through `noise_loop_filter`, which forms
`fb = Σ_{k=1..L} (-1)^(k+1) C(L,k) e[n-k]`, i.e. `fb = e[n-1]` for L = 1 and
`fb = 2e[n-1] - e[n-2]` for L = 2. Substituting gives the defining identity
of the stage:

```
q·2^S = x - (1 - z^-1)^L · e
```

The truncation error reaches the output only through `(1 - z^-1)^L`, a
high-pass; its low-frequency part, where the signal is, is small. The
higher L, the stronger the suppression near DC and the larger the error at
high frequencies. Raising the loop order was the modification the original
work was about; here the order is a parameter, default 2 for both stages
(the order before the change is taken to be 1).

**Overload.** A 1-bit stage with L = 2 cannot always output the code the
loop asks for: `floor(v/2^S)` regularly reaches -1 or 2. The code is then
clamped (`ovl`) and the whole difference stays in `e`, which becomes larger
than one step. This is normal operation for stage 1 (it clamps on roughly
one tick in three for a mid-range sine), not a fault. If `e` leaves its
register range it saturates (`esat`); then the identity above no longer
holds exactly. That happens near the ends of the input range: a constant
input of 255 saturates stage 1 continuously. The first-order stage never
clamps.

## The two stages

`mash_modulator` with `SAMPLE_W = 8`:

| | stage 1 | stage 2 |
|---|---|---|
| input | sample `x`, 0..255 | `e1 + 512` (stage-1 error plus offset) |
| shift S | 8 | 7 (`SAMPLE_W + 2 - STAGE2_BITS`) |
| code | 1 bit, weight 256 | 3 bits, 0..7, weight 128 |
| error register | 11 bits signed (±1024) | 11 bits signed |
| loop order | `ORDER1` (2) | `ORDER2` (2) |

The whole 8-bit sample range is one stage-1 step. Stage 2 covers a
stage-1 error of -512..+511 with its eight codes; the offset of 512 makes its
codes unsigned, as the thermometer DAC needs, and idles the stage-2 code at
4 when the input is zero.

Stage 2 works on the registered stage-1 error, one tick after stage 1, so
stage 1's bit is delayed by one register inside `mash_modulator` to leave
both codes aligned. If the stage-2 output is passed through
`(1 - z^-1)^ORDER1`, scaled by 128/256 relative to stage 1 and added, the
stage-1 error cancels:

```
Y = 256·q1 + 128·(1 - z^-1)^ORDER1 · q2
  = x - (1 - z^-1)^(ORDER1 + ORDER2) · e2
```

The constant offset disappears because `(1 - z^-1)` removes DC. This is
the job of the analog high-pass and summing stages. The testbenches
compute `Y` digitally with exactly this formula and check it. How closely
real filters follow it depends on their component values, their matching
and the DAC levels, none of which this RTL controls. Two such effects
limited the original hardware:
* unequal thermometer levels (7 branches reaching 4.22 V against 3.3 V
  for the GPIO bit);
* a 1-bit DAC in stage 2.

`dac2_msb_out` carries the stage-2 MSB for the 1-bit variant. In that
variant the two lower bits are simply lost, so stage 2 cannot cancel the
stage-1 error, and this output is there only to reproduce it.

## Thermometer lines

`therm_out[i]` is high when the stage-2 code is greater than `i`: code 0
turns on no branch, code 7 all seven. `therm_out[0]` drives branch A and
`therm_out[6]` branch G. Which lettered branch gets which threshold is a
choice made here; with matched branches the order does not matter.

## Timing

* `sample`/`sample_valid`: one clock after the window-closing strobe; a
  spike in the strobe cycle belongs to the closing window.
* `x_hold` loads one clock later and is used from the next tick on.
* `dac1_out`, `therm_out` and `dac2_msb_out` are registered on the tick
  and switch on the same clock edge. Sampled at ticks, the outputs show a
  new sample 3 ticks after the modulator first uses it:
  - the stage-1 register;
  - the stage-2 register, which also carries the alignment delay of stage 1;
  - the output register.
* End to end, a spike window reaches the pins one window plus about
  3 ticks after it opened. The analog low-pass adds its own delay on top.

## Parameters of `sd_mash_dac_top`

| parameter | default | origin |
|---|---|---|
| `TICK_DIV` | 50 | design choice (1 MHz tick at 50 MHz) |
| `OSR` | 100 | published test values 10, 100, 1000 |
| `SAMPLE_W` | 8 | design choice |
| `ORDER1`, `ORDER2` | 2, 2 | design choice; orders 1..4 supported |
| `STAGE2_BITS` | 3 | published (3-bit truncator and DAC) |

`therm_out` is `2^STAGE2_BITS - 1` bits wide.

## Status flags

* `sample_sat`: the last window had more than 255 spikes.
* `stage1_ovl`: stage 1 clamped, aligned with `q1`.
* `stage2_ovl`: stage 2 clamped.
* `err_sat`: an error register saturated.

All four are for monitoring only; nothing in the design reacts to them.

## Testbenches

Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_rate_gen` | tick and strobe spacing, at small sizes and at the defaults |
| `tb_spike_rate_decoder` | random spike trains against an edge-counting model; saturation of a 4-bit instance |
| `tb_noise_loop_filter` | orders 1, 2, 3 against hand-written coefficients |
| `tb_sd_truncator` | tick-by-tick model match; mean of the output equals a constant input; clamp and saturation |
| `tb_mash_modulator` | model match of both stages; the cancellation identity above on every tick; output means for orders 2/2 and 1/1 |
| `tb_thermometer_decoder` | all codes, contiguity, hold |
| `tb_sd_mash_dac_top` | end to end at `TICK_DIV = 8`: decoded samples, thermometer code, 3-tick latency, window mean of `Y`, each mechanism (decoder saturation, both clamps, error saturation) at least once |
| `tb_sd_mash_dac_top_full` | the same at every default, one full period of a 15 Hz sine (about 3.5 M clocks) |
| `tb_workloads` (uses `tb_dac_run`) | one 15 Hz period each at OSR 10 and OSR 1000, and at OSR 100 with loop orders 1/1 |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/sd_dac_pkg.sv tb/tb_sd_mash_dac_top_full.sv \
    --top-module tb_sd_mash_dac_top_full -o sim
./obj_dir/sim
```

The package file must come first; every other module is found through `-y`. All testbenches finish
in seconds.

## Known limits and departures

* No analog behaviour is modelled. Signal-to-noise, ENOB and latency figures
  measured on the original analog output (latencies of 22 and 50 samples)
  depend on the filters and are not reproduced or checked here. The
  testbenches check the ideal digital recombination `Y` only.
* Word widths, loop coefficients, stage-2 offset and scaling, saturation
  behaviour, tick rate, the edge-counting decoder, reset (synchronous,
  active low) and the pipeline alignment are design choices; the original
  gives the structure but not these details.
* With second-order loops a 1-bit stage 1 overloads near the ends of the
  input range. That is inherent in the structure and is reported by
  `err_sat`, not prevented.
