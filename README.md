# Adaptive-resolution neural recording channel

Implanted brain-recording systems spend most of their power on the radio.
Yet most of a neural recording is idle background. Only short episodes,
such as the run-up to a seizure, carry the information a clinician needs.
This channel therefore digitises the electrode signal with 8-bit resolution
while the signal is active and with coarse resolution while it is idle.
Fewer meaningful bits per sample then need to be transmitted.

The output rate never changes, only the resolution does. The ADC is an
oversampling converter, so resolution is set by how fast the modulator is
clocked. The channel switches between a high oversampling clock (32 kHz for
8 bits) and a low one (8 kHz for about 4 bits). Both run at a fixed Nyquist
rate of 1 kHz for a 500 Hz EEG band. The receiver gets one sample per
Nyquist period plus a flag that tells it which resolution the sample has.

The channel is also DC-coupled. Electrode offsets of tens of millivolts are
removed inside the modulator loop, not by a coupling capacitor. A slowly
tracked baseline then recentres the digital output.

The architecture follows a published thesis on a DC-coupled direct-ADC
neural channel with input-adaptive resolution. The digital back-end and the
DAC control logic are synthesizable RTL. The analog front-end is a
behavioural model, so the whole channel can be simulated end to end.

## Signal chain

```
 electrodes ──► afe_model ──── mod_bit ────┬──► dac_step_selector ──► afe_model (DAC step)
 (vinp,vinn)   integrator +                │
               comparator +                └──► adaptive_backend
               switched-cap DAC                   decimation_filter ──► dout, dout_res
                    ▲                             baseline_calc  ──► dc_value (back to decimator)
                    │  f_os, phi1, phi2           activity_detector ─► CLOCK SELECTOR
                    └──────────────────────────── clock_gen ◄────────┘
                                                  dac_phase_gen
```

`neural_adc_top` wires one channel together. A single clock, the 128 kHz
reference `clk`, runs all logic. Every derived clock (f_os, f_s) is a
divider tap that is also brought out as a signal. Logic acts on one-cycle
enable strobes (`os_rise`, `os_fall`, `fs_tick`), not on the derived clocks'
edges.

## The modulator: a delta loop with an integrating DAC

This is the least conventional part and the one to understand first.

The loop is a delta modulator wrapped in a delta-sigma loop. A Gm-C
integrator accumulates the difference between the electrode voltage and a
DAC output `v_dac`. A comparator takes the integrator's sign once per
oversampling period, and that bit is `mod_bit`. The DAC output *follows the
input*: each bit moves `v_dac` up or down by a small step. Over time the DAC
output is an integrated copy of the input, DC included. That is why an input
offset does not saturate the loop. The offset just becomes a DC level of
`v_dac`.

Seen from the bitstream, the signal transfer is a difference, (1 − z⁻¹), and
the quantisation noise is shaped twice, (1 − z⁻¹)². Because of the
difference, the bitstream encodes the *slope* of the input. An up/down
counter that adds ±step per bit therefore rebuilds the *amplitude*.

**The DAC needs no multi-bit array.** It is one small capacitor C_S = 10 fF
switched onto an integrating capacitor C_INT = 10 pF. A voltage step V_step
on C_S's far plate moves the shared node by C_S/(C_S+C_INT)·V_step. With
these values a 20 mV step becomes about 20 µV at `v_dac`. Each period has
two phases:

- **phi2 (switch S2).** A unity-gain buffer copies `v_dac` onto C_S's far
  plate. Without this copy, the previous step's release would leave the
  plate off by V_step, and the next connection would undo the last step.
- **phi1 (switch S1).** C_S is joined to C_INT while V_step is applied. When
  phi1 opens, V_step returns to zero and only the floating plate moves.

**Step sizes from the last two bits.** In a plain delta modulator the DAC
moves by ±1 step per bit. Here the change depends on the previous bit and
the current bit, v[n-1] and v[n]:

| v[n-1] v[n] | change of v_dac |
|:-----------:|:---------------:|
| 0 0         | −1 step         |
| 0 1         | +3 steps        |
| 1 0         | −3 steps        |
| 1 1         | +1 step         |

A reversal of direction takes a triple step, while continuing in the same
direction takes a single one. `dac_step_selector` registers v[n-1] and
presents the step as a sign (`step_up`) and a size (`step_x3`). The 1× and
3× sizes map onto the 20 mV and 60 mV step voltages. `dac_phase_gen` makes
phi2 in the high half of f_os and phi1 in the low half. Each phase starts
one reference cycle after its half begins, so the two never overlap.

The modulator's bit is decided on the rising edge of f_os. Both the
decimator and the step selector take that bit on the falling edge, which is
half an oversampling period later. Charge sharing (phi1) follows in that
same low half.

## Adaptive resolution and the decimator

`decimation_filter` is an 8-bit up/down counter with a down sampler.

- **Counting.** On each modulator bit, the counter moves up or down by
  `step_high` in high resolution or by `step_low` in low resolution.
- **Low-resolution steps.** Low resolution uses a larger DAC step, 80 µV
  instead of 20 µV in the default model. The counter step is scaled by the
  same ratio (1 and 4), so codes mean the same voltage in both modes. Only
  the resolution changes, not the gain.
- **Reset and saturation.** The counter resets to mid-scale (128), which
  stands for 0 V. It saturates at 0 and 255.
- **Down sampling.** At every f_s tick, the counter value is copied to
  `dout` together with the mode it was counted in (`dout_res`).
  `dout_valid` pulses one cycle later.

`clock_gen` contains an 8-bit counter on the reference clock. Tap k runs at
f_ref / 2^(k+1). Three 3-bit selects pick the taps for f_OS_high, f_OS_low
and f_s. With f_ref = 128 kHz, taps 1, 3 and 6 give 32 kHz, 8 kHz and
1 kHz. The CLOCK SELECTOR request from the activity detector is acted on
only at a rising edge of f_s. At that edge both oversampling taps are low,
so the mux switches without a glitch. Each Nyquist sample is also counted
entirely in one mode.

## Baseline tracking

`baseline_calc` follows the slow DC level of the decimated signal.

- **Update rule.** It takes every N-th output sample C and updates the
  baseline with a 7:1 weighting: DC ← (7·DC + C) / 8. This is built from
  shifts and adds and truncates.
- **DC value.** The design outputs DC value = baseline − 128. That is how
  far the signal's DC has drifted from mid-scale.
- **Correction.** At each update the decimator subtracts the new DC value
  once from its counter, pulling the output back towards 128. The baseline
  is measured on this corrected output, so the loop acts like a slow
  integral controller: the DC value shrinks towards zero as the offset is
  removed.

The correction matters for the activity detector. Its thresholds are fixed
codes, so without recentring a drifting offset would look like activity.
N is programmable, and 19 is a typical value. If N is too short, an event
is absorbed into the baseline. If it is too long, drift is caught late.
N = 0 disables updates.

## Activity detection with hysteresis

`activity_detector` compares each decimated sample with two hysteresis
bands. The user sets the mid-high level, the mid-low level and a band
width. The outer levels are HIGH = mid-high + band and LOW = mid-low − band.

| Flag | Becomes 1 when | Falls back to 0 when |
|------|----------------|----------------------|
| `flag_high` | the signal rises above HIGH | the signal is at or below mid-high |
| `flag_low` (1 while the signal is above the lower band) | the signal is back at or above mid-low | the signal drops below LOW |

Each flag picks the level its own comparison uses. Each comparison is the
sign bit of a 10-bit subtraction.

CLOCK SELECTOR = 1, which means high resolution, when the two flags are
equal:

- both 1: the signal is above the upper band;
- both 0: the signal is below the lower band;
- otherwise the signal is in the quiet middle, and the selector is 0.

With the example levels 138/118 and band 8, the outer thresholds are 146 and
110. A burst that reaches 150 switches to high resolution. The channel
returns to low resolution only once the signal is back between 118 and 138.

## Configuration

All user settings are in one packed struct, `nadc_pkg::backend_cfg_t`:

| Field | Width | Example | Meaning |
|-------|-------|---------|---------|
| `sel_clk_nyq`  | 3 | 6   | f_s tap (1 kHz at 128 kHz) |
| `sel_clk_high` | 3 | 1   | f_OS_high tap (32 kHz) |
| `sel_clk_low`  | 3 | 3   | f_OS_low tap (8 kHz) |
| `hyst_band`    | 5 | 8   | hysteresis band |
| `mid_high_thr` | 8 | 138 | mid-high level |
| `mid_low_thr`  | 8 | 118 | mid-low level |
| `step_high`    | 8 | 1   | counter step, high resolution |
| `step_low`     | 8 | 4 (or 7) | counter step, low resolution |
| `dc_period`    | 8 | 19  | N, samples between baseline updates |

`step_low` must match the ratio of the front-end's low-resolution and
high-resolution unit steps. With the model's 80 mV and 20 mV steps, that
ratio is 4. The reference configuration uses 7, which suits a front-end
with a correspondingly larger coarse step. The back-end testbench uses 7.
The channel testbench uses 4 because it has the analog model attached.

## How far to trust it, and where it departs

- **The front-end is a behavioural model.** `afe_model` has:
  - a single-pole Gm-C integrator (83 dB DC gain, 20 Hz pole) clipped at
    ±1.2 V, evaluated in real time between comparator decisions;
  - an offset-free comparator and an ideal buffer;
  - instantaneous charge sharing.

  It reproduces the loop's behaviour, not noise, device settling or other
  transistor effects. The integrator's finite gain matters after a large
  input step. While the DAC slews at one 20 µV step per period, the
  integrator leaks instead of winding up, so the loop settles without
  ringing. A 50 mV step is followed within 100 µV after about 35 ms at
  64 kHz. This agrees with the roughly 40 ms reported for the real circuit.
- **Slope limit.** In a run of equal bits the DAC moves one unit step per
  period. At 64 kHz and 20 µV steps that allows 1.28 mV/ms. A 1 mV sine is
  therefore followed up to about 200 Hz; a 1 mV, 500 Hz test tone
  overloads the model. After a direction change, the real continuous-time
  circuit was reported to need a large step of about 4 unit steps instead
  of the nominal 3.
  The model keeps 3× by default. Its `X3_RATIO` parameter sets the
  larger multiple, for example 4.0. The digital step selector is the same
  either way, because it only chooses between the unit step and the large
  one. A larger large step does not lift the slope limit, which is set by
  runs of equal bits.
- **The DC value is subtracted once per update,** not on every count. The
  counter is an integrator, so a continuous subtraction would ramp it.
- **One channel is built.** The clock divider could be shared across
  channels, but that sharing is not modelled. At a 128 kHz reference the
  design serves a 500 Hz band. A 10 kHz, 64-channel system would need
  64 instances and a much faster reference clock.
- **Single-clock implementation.** Derived clocks appear only as data
  signals, and state updates on enable strobes. This is an implementation
  choice. The logic's function does not depend on it.
- **The transistor circuits are not provided as RTL.** These are:
  - the differential-difference Gm-C integrator with its common-mode
    feedback;
  - the buffer OTA;
  - the StrongArm comparator;
  - the switches and capacitors.

  Their combined behaviour is what `afe_model` stands in for.

## Bench stimulus generator

The back-end was also meant to be measured on its own, with no front-end.
A small FPGA design stands in for the modulator and supplies everything
else the back-end needs. `meas_stimulus_gen` is that design. It sits in
the top next to the channel, unconnected to it, and its ports carry a
`meas_` prefix.

- **Reference clock.** `clk_out` is `clk_in` divided by 782: it toggles
  every 391 `clk_in` cycles. From a 50 MHz board clock this is 63.9 kHz.
- **Reset.** `reset_out` (active low) rises 511 `clk_in` cycles after
  `reset_in` is released.
- **Settings.** While `reset_out` is low, the generator loads the
  thresholds 112 and 144, band 14 and the tap selects 1 (low), 0 (high)
  and 5 (Nyquist) on `clk_out` edges. Three test LEDs light when the
  threshold and band registers read back as expected. With a 63.9 kHz
  reference these taps give 16 kHz and 32 kHz oversampling and a 1 kHz
  sample rate. The counter steps and the baseline period are not among
  the generator's outputs.
- **Bitstream replay.** The back-end returns its oversampling clock as
  `clk_chip_in`. On each rising edge the generator puts the next stored
  bit on `ud_out`. The loop has 512 slots: bits 0 to 510 of the memory are
  played, and slot 511 outputs 0 and wraps to address 0. The replay
  address is reset asynchronously by `reset_out`, because the back-end's
  oversampling clock does not run while the back-end is held in reset.

The memory holds 1024 bits, read from `rtl/meas_bitstream.mem` with
`$readmemb`. The bench used a bitstream made from a recorded EEG signal.
The file here is synthetic instead: a first-order sigma-delta of a
density d_k. An accumulator adds d_k for bit k and emits 1 whenever it
reaches 1, subtracting 1 again. d_k is 1/2 for bits 0 to 127 (idle),
9/16 for 128 to 255 (a rise), 3/8 for 256 to 511 (a fall) and 1/2 for
the rest. Only the first 511 bits are replayed.

`bench_replay_tb` wires the generator to `adaptive_backend` as on the
bench, with a 50 MHz `clk_in` and counter steps 1 and 4. Over 70 output
samples (70 ms, several replay loops) it checks these things:

- one sample arrives every 64 reference cycles;
- each sample's resolution flag matches the mode it was counted in;
- the rise crosses the upper outer threshold (158);
- the fall crosses the lower one (98);
- the mode switches both ways, and the baseline updates.

## Files

| File | Contents |
|------|----------|
| `rtl/nadc_pkg.sv` | widths, `res_t` mode enum, `backend_cfg_t`, the two-bit step table |
| `rtl/clock_gen.sv` | divider, tap selects, glitch-free mode switch |
| `rtl/decimation_filter.sv` | up/down counter, DC correction, down sampler |
| `rtl/baseline_calc.sv` | 7:1 baseline tracker |
| `rtl/activity_detector.sv` | hysteresis comparators, CLOCK SELECTOR |
| `rtl/adaptive_backend.sv` | the digital back-end |
| `rtl/dac_step_selector.sv` | DAC step from the last two bits |
| `rtl/dac_phase_gen.sv` | non-overlapping phi1/phi2 |
| `rtl/afe_model.sv` | behavioural analog front-end (not synthesizable) |
| `rtl/neural_adc_top.sv` | one complete channel, plus the bench stimulus generator |
| `rtl/meas_stimulus_gen.sv` | bench stimulus generator: reference clock, reset, settings, bitstream replay |
| `rtl/meas_bitstream.mem` | 1024-bit replay pattern (formula above) |
| `tb/<module>_tb.sv` | self-checking testbench for each module |
| `tb/neural_adc_osr64_tb.sv` | whole channel at 64/16 kHz with a 50 mV offset |
| `tb/bench_replay_tb.sv` | bench generator driving the back-end in closed loop |

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and ends with
`$finish`. A watchdog stops a hung run.

`neural_adc_top_tb` runs the whole channel with default sizes. It applies:

- a 2 mV electrode offset;
- a 100 µV, 10 Hz background tone;
- twice, a 1 mV, 20 Hz burst for 0.5 s, followed by 0.7 s of idle.

It then checks the following:

- one output sample arrives every 128 reference cycles;
- the idle output sits near mid-scale in low resolution, so the offset is
  removed;
- each burst switches the channel to high resolution, and idle switches it
  back;
- between samples, `dout` tracks the input's change, within 12 codes in high
  resolution and 24 in low.

It also counts each mechanism and fails if one never occurs: switches both
ways, baseline updates, and 1× and 3× DAC steps.
The same testbench runs the bench generator next to the channel. It
checks every replayed bit against its own copy of the memory, and checks
the loaded settings and the LEDs.

`neural_adc_osr64_tb` repeats these checks at the faster clock setting:
64 kHz and 16 kHz oversampling (taps 0 and 2). There each half of f_os is a
single reference cycle, so the DAC phases run with no gap. The electrode
offset in this test is 50 mV. The decimator saturates while the loop pulls
in. The baseline tracker then recentres the output before the checks
start.

Each end-to-end test simulates a few seconds of signal in under a second
of run time. Compilation takes longer than the run.

## Simulating

List the package first, then the modules, then the testbench. For the
whole channel with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module neural_adc_top_tb \
  rtl/nadc_pkg.sv rtl/clock_gen.sv rtl/decimation_filter.sv \
  rtl/baseline_calc.sv rtl/activity_detector.sv rtl/adaptive_backend.sv \
  rtl/dac_step_selector.sv rtl/dac_phase_gen.sv rtl/afe_model.sv \
  rtl/meas_stimulus_gen.sv rtl/neural_adc_top.sv tb/neural_adc_top_tb.sv
./obj_dir/Vneural_adc_top_tb
```

A unit test needs only the package, its module and the modules below it:

```
verilator --binary --timing --timescale 1ns/1ps --top-module baseline_calc_tb \
  rtl/nadc_pkg.sv rtl/baseline_calc.sv tb/baseline_calc_tb.sv
./obj_dir/Vbaseline_calc_tb
```

Run from the directory that holds `rtl/`: the generator reads
`rtl/meas_bitstream.mem` by that relative path.

The synthesizable modules are `clock_gen`, `decimation_filter`,
`baseline_calc`, `activity_detector`, `adaptive_backend`,
`dac_step_selector`, `dac_phase_gen` and `meas_stimulus_gen`. `afe_model` uses `real` signals
and is for simulation only. The same holds for `neural_adc_top`, which
contains it. To synthesize the digital part of a channel, take
`adaptive_backend` with `dac_step_selector` and `dac_phase_gen`.
