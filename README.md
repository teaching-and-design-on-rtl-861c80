# Subdividing interpolator for sinusoidal quadrature signals

Optical encoders, linear scales and quadrature laser interferometers give two
sine signals that are roughly 90 degrees apart. A plain quadrature counter
resolves a quarter of one signal period. This design digitises both signals
and measures the angle *within* the period, so each period can be divided
into up to 1600 steps. The steps leave the interpolator as ordinary
quadrature pulses, so any 4X up/down counter can count them. The counter
front end that follows is part of the design too.

The real signals are not ideal. Amplitude and DC offset differ between the
two channels and drift with laser power, distance and encoder mounting. The
phase difference is not exactly 90 degrees. The interpolator therefore
measures each channel's offset and amplitude again in every signal period.
It normalises one channel with them and takes the arccos of the result. An
arccos needs only one channel, so no ratio of the two signals is ever formed
and there is no division by a value that can pass through zero.

The structure follows a published teaching design built from two
programmable logic devices. A larger device holds the interpolation. A small
CPLD holds the noise filter, the 4X decoder and the counter. The arithmetic
formats, the pipeline and several details noted below are choices made for
this RTL.

## Signal path

```
 ADC X ─┬─ square_wave_conv ─┐  (rising edge = new cycle)
        └─ norm_tracker ◄────┘  offset, amp of X ──┐
 ADC Y ─┬─ square_wave_conv ─┐                     │
        └─ norm_tracker ◄────┘  offset, amp of Y ──┤
                                                   ▼
   chosen channel ──► normalizer ──► acos_rom ──► phase_subdivider ──► quad_pulse_gen ──► pulse_a/b
   sign of other channel ─────────────(delayed)──┘      │ position, cycles, dir
                                                        ▼
   pulse_a/b ──► noise_filter (x2) ──► quad_decoder (4X) ──► updown_counter ──► count
                 └──────────────── quad_counter (counter front end) ─────────┘
```

`interp_module_top` holds `interpolator` and `quad_counter` side by side. It
wires the pulse outputs straight into the counter front end. One period of
forward motion adds `subdiv` to `count`.

## Angle within a period (the core of the design)

**Normalisation.** `normalizer` computes `(sample - offset) / amp`. The
result is a signed number with 10 fraction bits (1024 = 1.0). It is clamped
to ±1.0 when the sample lies outside the tracked range. The divider is a
restoring divider unrolled over the 10 quotient bits. It accepts one sample
per clock.

**Arccos.** `acos_rom` holds `acos(n/1024) / 2π · 65536` for all 2049
inputs. This is the angle as a fraction of a period, 0 to 32768 (0 to 180
degrees). A constant function fills the table during elaboration from
`$acos`, so there is no data file. A table read takes one clock.

**Choosing the half period.** An arccos only gives 0 to 180 degrees. Write
the signals as A = cos θ and B = cos(θ − φ), with φ near 90 degrees. B is
positive while θ is in the first half period. So when A is interpolated,
θ = acos when B > offset, and θ = 1 − acos otherwise (in fractions of a
period). When B is interpolated, the rule is mirrored. The sign is taken
from the raw sample without hysteresis. Near the crests, where the choice
can be wrong, both candidates are close to each other.

If φ is off 90 degrees by d, the angle can be mirrored by up to 2·d near
the crests. This error does not accumulate: counting stays correct, and only
the angle reported inside that stretch is off. The source design claims use
down to a 45 degree error. In simulation at 50 and 130 degrees, the count
over 6 to 9 periods came out exact when read a quarter period past a zero of
A. A stop near the crest at 130 degrees read about 78 degrees off, close to
the 2·d = 80 degree bound.

**Channel choice.** Either channel can drive the arccos (`use_b`). Both give
the same position. The one with less noise or more amplitude can be picked.

**Subdivision and unwrapping.** `phase_subdivider` scales the full angle to
`k = floor(θ · subdiv / 65536)`, where `subdiv` is 1 to 1600 and set at run
time. It adds the change of k since the last sample to the fine position.
The change is taken modulo `subdiv` into ±subdiv/2. A wrap in the forward
(backward) direction moves `cycles` up (down). `dir` holds the sign of the
latest change. So the signal may move by up to half a period between two
samples. If `subdiv` or `use_b` changes, the next sample becomes the new
reference and the position does not jump. After that, `position` counts in
the new unit.

**Accuracy.** The arccos is steep near ±1.0. There, one step of the 10-bit
normalised value is worth about 0.007 of a period, about 11 steps at 1600×.
The tests allow 1.5 % of a period plus 2 steps. Observed errors were 0 to 9
steps at 1600× and at most 1 step at 25× to 400×.

## Offset and amplitude, every period

`square_wave_conv` turns each channel into a square wave about its tracked
offset. Its hysteresis is ±amp/8. The rising edge of the square wave starts
a new cycle for that channel. Within a cycle, `norm_tracker` keeps the
largest and smallest codes. At the next cycle start it loads
`offset = (max+min)/2` and `amp = (max−min)/2`. The amplitude is never less
than 1. After reset the tracker holds mid-scale offset and quarter-scale
amplitude until the first full cycle has passed. Give the interpolator a
few periods of motion before trusting its position. If the motion turns
round within a cycle, that cycle's extremes are incomplete. The next full
cycle corrects them.

## Pulse output and counter front end

`quad_pulse_gen` follows the fine position one Gray-code step at a time:
00 → 10 → 11 → 01 forward, so A leads B. Steps are at least `STEP_CYCLES`
(4) clocks apart, so each level passes the filter downstream. When the
position runs ahead, the difference is kept and worked off later. Steps are
never lost, only delayed. `pulse_busy` shows the lag.

`noise_filter` keeps a 2-bit history per channel. Its output takes a new
level only after the input has held that level on three consecutive rising
clock edges. Spikes shorter than three clocks are removed. Schmitt-trigger
pin buffers sit ahead of it in hardware and are not modelled.

`quad_decoder` compares the present and previous states. Each legal
transition gives one count, up when A leads B (4X decoding). A transition
where both channels change is illegal. It gives no count and raises
`illegal` for one clock. `updown_counter` is a 32-bit wrap-around counter.

## Timing

* Input: at most one sample pair per clock (`adc_valid`), as 12-bit
  straight-binary codes.
* The sample reaches `position`, `cycles` and `dir` three clocks later
  (normaliser register, ROM register, accumulator).
* Pulse output: one step per 4 clocks at most. That is 2.5 M steps/s at
  10 MHz.
* Counter front end: a clean step reaches `count` five clocks after it
  appears on the pins (three filter clocks, decoder, counter).
* Everything runs on one clock with a synchronous, active-low reset.

## Where this RTL differs from the source design

* **Input rates.** The source reports 5 kHz signals at 1600× and 100 kHz at
  400×. That is 8 M and 40 M steps/s. With 4 clocks per step, this RTL needs
  a clock of 32 MHz and 160 MHz for those rates. At 10 MHz the count
  arrives late but complete. Phase tracking itself allows input frequencies
  up to half the sample rate.
* **Noise filter speed.** The filter follows the three-edge rule of the
  filter description. The source's filter measurements show an input at
  half the clock rate passing, which a three-edge filter cannot do. The
  fastest input this filter passes has a period of 6 clocks.
* **Illegal transitions** are flagged and not counted. In the source they
  simply produce a wrong count.
* **Using both channels together** for one result is mentioned in the
  source without saying how. Only one channel at a time is used here.
* A reference input shown in the source's interpolation simulations has no
  described function and is not built.
* Everything analog or bought in is outside this RTL: Schmitt input
  buffers, the offset-removing conditioning circuit, the 12-bit ADC, the
  8051 board that reads `count`, JTAG/boundary scan, and the test equipment.
  The test equipment is the motor driver, LVDT electronics, oscillator and
  interferometer optics.

## Files

| file | role |
|---|---|
| `rtl/interp_pkg.sv` | shared widths (`ADC_W`=12, `MAX_SUBDIV`=1600, `NORM_W`=10, `PH_W`=16, `POS_W`=`COUNT_W`=32) and the Gray table |
| `rtl/interp_module_top.sv` | whole module: interpolator + counter front end |
| `rtl/interpolator.sv` | interpolation datapath |
| `rtl/square_wave_conv.sv`, `rtl/norm_tracker.sv` | cycle detection, offset/amplitude tracking |
| `rtl/normalizer.sv`, `rtl/acos_rom.sv`, `rtl/phase_subdivider.sv` | angle, subdivision, unwrapping |
| `rtl/quad_pulse_gen.sv` | quadrature pulse output |
| `rtl/quad_counter.sv`, `rtl/noise_filter.sv`, `rtl/quad_decoder.sv`, `rtl/updown_counter.sv` | counter front end |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_half_turn.sv` | half a turn of a 1024-period encoder: 819200 counts at 1600×, 51200 back at 100× |

Top-level ports: `adc_valid`, `adc_x`, `adc_y` (samples), `subdiv`
(1 to 1600), `use_b` (channel for the arccos). Outputs: `pulse_a`/`pulse_b`,
`position`, `cycles`, `interp_dir`, `step_idx` (step within the period),
`pulse_busy`, and from the counter `count`, `count_dir`, `illegal`.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends a run that hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/interp_pkg.sv \
          tb/tb_interp_module_top.sv --top-module tb_interp_module_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. The same `-y rtl` search
finds every module. `tb_interp_module_top` runs the full design at its
default parameters. It covers 1600, 400, 100 and 25 steps per period, both
directions, both channels, 80 and 90 degree phase difference, and drifting
amplitude and offset. It checks that `count` equals `position` after every
segment. It also counts how often each mechanism happened: per-cycle
refresh, forward and backward wraps, direction reversals, pulse backlog,
and setting switches. `tb_half_turn` takes about two seconds.
`tb_interpolator` also runs the interpolator alone at 50 and 130 degree
phase difference.

## Changing it

* Finer angle: raise `NORM_W`. The ROM grows as 2^(NORM_W+1)+1 words.
  Raise `PH_W` if `MAX_SUBDIV` is raised well beyond 1600.
* Faster pulse output: lower `STEP_CYCLES` on `interpolator`. It must stay
  at 3 or more while the three-edge filter counts the pulses.
* Wider hysteresis for noisy signals: change the `amp >> 3` in
  `square_wave_conv`.
