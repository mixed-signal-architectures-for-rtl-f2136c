# PCM-input class-D audio amplifier: digital front end

This RTL turns a PCM audio stream (16-bit CD audio by default, up to 24-bit
DVD audio) directly into the gate commands of
a full H-bridge power stage. It needs no DAC and no analog amplifier. An LC
filter and the speaker are the only parts between the bridge and the sound.

Plain PWM of a PCM signal distorts badly, so the chain treats the signal in
four steps:

1. It oversamples the audio by 16.
2. It moves each pulse edge toward where an analog (natural) PWM comparator
   would place it.
3. It shapes the requantization noise to 7 bits, so that the shortest pulse
   is about 11 ns. Real power MOSFETs can switch at that speed.
4. It drives the bridge with 3-level PWM. A silent input then causes no
   switching at all.

Before the pulses reach the bridge, they are placed inside time guards. Dead
time is inserted between the two switches of each leg. A single feedback bit,
the sign of the load current, corrects the pulse widths for the error that
the dead time causes.

The chain is small: a few hundred word-level cells, one multiplier for the
interpolation filter and one for the pulse-edge estimate. It is meant to fit
a low-cost FPGA next to a discrete MOS bridge.

```
 PCM 16b @ FIN ──► oversampler ──► cross_point_dc ──► noise_shaper ──► time_guard ──► pwm3_modulator ──► deadtime_gen x2 ──► gates
  (valid/ready)    x16, 4 x2 FIR    natural-PWM        16 → 7 bits      guards and      3-level,           break-before-
                   stages, 1 MAC    edge estimate      5th order        current-sign    128-tick           make per leg
                                                                        correction ◄──  carrier
                                                                             ▲
                                                      i_pos (load current sign, 1 bit, from the power stage)
```

## Clocking and pacing

Everything runs on one clock, `clk`. Its frequency is 2^p · M · FIN:
128 ticks per carrier period times 16 carrier periods per input sample. For
CD audio (FIN = 44.1 kS/s) that is 90.3168 MHz, or 2048 clocks per PCM
sample. This is a standard audio master-clock multiple. One tick, 11.07 ns,
is the finest pulse-width step. For 96 kS/s DVD audio the same structure
needs 196.608 MHz, with a 5.09 ns tick.

The PWM carrier sets the pace of the whole chain:

* At tick 0 of every carrier period (`period_start`), one oversampled sample
  is popped from the oversampler's output FIFO.
* That sample passes the cross-point estimator, the noise shaper and the
  word correction, one clock each.
* The finished word waits in the modulator, which applies it from the next
  carrier period on.
* The oversampler refills its FIFO. Whenever it has room for another 16
  outputs, it asks for a PCM sample (`pcm_ready`). At steady state this
  happens once every 2048 clocks.

The PCM source must answer each request (`pcm_valid`, `pcm_data`). If the
FIFO is empty when a period starts, the chain plays a zero sample and pulses
`status.underrun`. This happens once after reset, before the first frame is
ready.

The latency from a PCM sample to the bridge output is about 9.5 input
samples (≈ 215 µs at 44.1 kS/s), as measured in simulation. Most of it is
the group delay of the linear-phase interpolation filters.

## The oversampler: four x2 stages on one MAC

Interpolating by 16 in one FIR would need a filter of a few hundred taps.
Here the factor is split into four x2 stages:

| Stage | Order | Taps | Input rate |
|-------|-------|------|------------|
| 1 | 32 | 33 | FIN |
| 2 | 11 | 12 | 2·FIN |
| 3 | 5 | 6 | 4·FIN |
| 4 | 3 | 4 | 8·FIN |

Each stage is computed in polyphase form. The zeros that a x2 upsampler
would insert are never multiplied:

    y[2m+p] = Σ_j h[2j+p] · x[m-j],   p = 0, 1

The filters are equiripple (Parks-McClellan) designs for one mask:

* The pass band ends at 0.4·FIN.
* The stop band starts at (stage input rate − 0.4·FIN).
* Each filter is normalised to a gain of 2, so each polyphase branch sums to
  about 1.0.
* The coefficients are rounded to 12 bits with 10 fractional bits.

Stage 1 is then a half-band filter. Its phase 0 holds only the centre tap
(exactly 1.0), so that phase costs a single multiply. The coefficient
program in `amp_pkg.sv` stores only the non-zero taps. Each entry is a
(coefficient, delay-line index) pair, with a first entry and a count for
each (stage, phase). A frame, meaning one PCM input giving 16 outputs, costs:

    1·(1+16) + 2·(6+6) + 4·(3+3) + 8·(2+2) = 97 multiply-accumulates

At 44.1 kS/s that is 4.28 million MAC/s.

A sequencer walks through the stages in order:

1. Stage 1 turns one input into 2 outputs in work buffer 0.
2. Stage 2 turns those 2 into 4 outputs in buffer 1.
3. Stage 3 turns those 4 into 8 outputs in buffer 0.
4. Stage 4 turns those 8 into 16 outputs and writes them to the output FIFO.

The MAC issues one product on every clock of a frame; nothing else costs a
cycle of its own:

* A branch's sum is rounded, saturated and stored in the clock after its last
  product. In that same clock the first product of the next branch is issued:
  the accumulator still holds the finished sum until the clock edge.
* The next input of a stage is shifted into that stage's delay line on the
  edge that ends the previous branch's last product. That product has already
  read the old contents.
* The ping-pong buffers are safe. A stage's first input was written many
  clocks before it is needed, and a buffer is only rewritten two stages later,
  after all of its values have been shifted out.

A frame therefore keeps the sequencer busy for **98 clocks**: 97 products and
one final store. A new input can be taken every 99 clocks. With a dedicated
filter clock, that is a MAC clock of 4.4 MHz for 44.1 kS/s input and 9.5 MHz
for 96 kS/s input. Here the MAC runs on the 2048·FIN PWM clock instead and is
idle 95 % of the time.

The one `mac_unit` (16 × 12 → 34-bit accumulator at the default width) is
shared by all stages. After each stage, results are rounded to nearest and
saturated to the sample width.

Measured response of the rounded coefficients:

| Stage | Pass-band ripple | Stop-band attenuation |
|-------|------------------|-----------------------|
| 1 | 0.04 dB | 53 dB |
| 2 | 0.02 dB | 63 dB |
| 3 | 0.04 dB | 52 dB |
| 4 | 0.08 dB | 47 dB |

## Natural-PWM edge estimate (`cross_point_dc`)

Uniform PWM sets each pulse width from the sample taken at the start of the
carrier period. An analog comparator would instead end the pulse where the
carrier ramp meets the moving signal.

Assume the signal is linear between x[n] and x[n+1], and let
D = |x[n+1]| − |x[n]|. The ramp runs from 0 to full scale over one period.
It crosses |x| at τ = |x[n]| / (1 − D) periods. Computing that needs a
division.

The block keeps the first-order term of the expansion instead:
τ ≈ |x[n]|·(1 + D). In signed form this is

    y[n] = x[n] + x[n] · (|x[n+1]| − |x[n]|)

The cost is one multiplication per sample. The estimate needs the next
sample, so it adds one sample of latency. The testbench also checks the
result against the exact crossing, within the expected second-order error.

## Noise shaper

The noise shaper cuts the word from 16 to p = 7 bits. This sets the pulse
resolution to 1/(16 · 44.1 kHz · 2^7) ≈ 11 ns. It is an error-feedback
loop: the residue of each rounding is fed back through
H(z) = 1 − (1 − z⁻¹)⁵.

    u[n] = x[n] + 5e[n-1] − 10e[n-2] + 10e[n-3] − 5e[n-4] + e[n-5]
    y[n] = round(u[n] / 512)            (saturated to -64 … 63)
    e[n] = u[n] − 512·y[n]

The output is therefore y = x − (1 − z⁻¹)⁵·e. The quantization noise gets a
5th-order high-pass shape, and the signal passes at unity gain. All the
coefficients are shifts and adds.

A 5th-order loop can run away when the quantizer clips. On overload, the
word saturates, `status.ns_overload` pulses, and the stored residue is
clamped to ±1 output step. The feedback can add up to about ±16 steps, so
inputs above roughly 75 % of full scale can overload the 7-bit range.

## Three-level PWM and the pulse word

A 7-bit sawtooth counter defines a 128-tick carrier period. At 44.1 kS/s
that is 705.6 kHz. `pwm3_modulator` contains two `pwm2_modulator`s that
share the counter:

* A positive word pulses leg A high while leg B stays low.
* A negative word pulses leg B high while leg A stays low.
* A zero word leaves both legs low.

Because a zero word produces no pulse, a silent input causes no switching
losses. A pulse is the interval start ≤ count < start + width. The start
field carries the time guard.

A 7-bit word y becomes a pulse of 2·|y| ticks, so |y| = 64 fills the whole
period. The bridge output averaged over a period is then y/64 of the supply.

## Time guards, dead time and the current-sign feedback

These are the three corrections that make the pulses match what the power
stage can actually produce.

**Time guards** (`time_guard`):

* Every pulse starts `TG_TICKS` (3 ticks, 33 ns) after the start of the
  carrier period.
* Every pulse ends at least `TG_TICKS` before the end of the period, so the
  width is capped at 128 − 2·TG.
* A non-zero pulse shorter than TG is raised to TG.
* A zero word stays zero.

Very short highs or lows, a few tens of ns, cannot be reproduced by the MOS
switches, so the guards avoid them.

**Dead time** (`deadtime_gen`, one per leg): when a leg command changes, the
conducting switch turns off at once. The other switch turns on only after
`DT_TICKS` (2 ticks, 22 ns) with both off. The complementary P/N pair can
therefore never conduct together, and an assertion checks this.

**Current-sign feedback.** While both switches of a leg are off, the body
diodes set the leg voltage, and the direction of the load current decides
which diode conducts:

* If the current flows in the pulse's own direction, the dead time eats into
  the pulse. Example: positive current leaving leg A during an A pulse.
* If the current flows the other way, the dead time adds to the pulse.

`time_guard` reads the 1-bit current sign `i_pos`. It passes the sign
through a two-flop synchroniser and samples it once per word. It then
lengthens the pulse by `COMP_TICKS` (2 ticks) in the first case and
shortens it by `COMP_TICKS` in the second.

With `COMP_TICKS = DT_TICKS` the correction cancels the dead-time error,
which is known only at the resolution of one tick. The status pulses
`comp_ext` / `comp_cut` and `clamp_lo` / `clamp_hi` report each correction.

## Top-level interface (`digital_amp_top`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | 2048 · FIN (90.3168 MHz for 44.1 kS/s) |
| `rst_n` | in | 1 | asynchronous, active low |
| `pcm_valid` / `pcm_ready` / `pcm_data` | in/out/in | 1/1/`PCM_W` | PCM samples, signed fractions (Q1.15 at 16 bits); transfer when both are high |
| `i_pos` | in | 1 | load-current sign, asynchronous (1 = current leaves leg A) |
| `gates` | out | 4 | `gates_t` {a_hs, a_ls, b_hs, b_ls}: switch on-commands for the gate drivers |
| `status` | out | 6 | `amp_status_t` one-clock event pulses: underrun, ns_overload, clamp_lo, clamp_hi, comp_ext, comp_cut |

The gate outputs are logical "switch on" commands. Gate-drive polarity,
level shifting for the high-side P-MOS, and the driver buffers belong to the
power stage.

Parameters (defaults): `TG_TICKS` = 3, `COMP_TICKS` = 2, `DT_TICKS` = 2,
`FIFO_DEPTH` = 32, `PCM_W` = 16. `PCM_W` is the PCM sample width, 16 to 24.
The oversampler (accumulator `PCM_W` + 18 bits) and the edge estimate work
at that width. The noise shaper reduces it to 7 bits. The package `amp_pkg` holds:

* the word widths: `DATA_W` = 16 (the default sample width), `COEF_W` = 12,
  `P_BITS` = 7;
* `OSR` = 16;
* the coefficient program;
* the shared structs.

Changing `P_BITS` changes the carrier length (2^P_BITS ticks), and with it
the clock that a given FIN needs.

## Simulating

Every testbench ends with a line `TB_RESULT checks=N failures=M`. For
example, to run the end-to-end test with plain Verilator from the project
root:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/amp_pkg.sv rtl/*.sv tb/hbridge_model.sv tb/tb_digital_amp_top.sv \
        --top-module tb_digital_amp_top -Mdir obj_top -o sim
    ./obj_top/sim

For a unit test, pass `amp_pkg.sv`, the module file, and the files of any
modules it instantiates. For example, `pwm3_modulator` needs
`pwm2_modulator.sv`, and `oversampler` needs `mac_unit.sv`.

| Testbench | What it establishes |
|-----------|---------------------|
| `tb_oversampler` | Matches bit for bit an independent zero-stuffing model that uses the full impulse responses. Checks 16 outputs per input, a frame of 98 busy clocks, and that input is refused while the FIFO lacks room. A 24-bit build runs in lockstep and matches its own 24-bit model. |
| `tb_mac_unit` | Random accumulation runs against a 64-bit model. |
| `tb_cross_point_dc` | Exact fixed-point result, plus agreement with the exact linear-interpolation crossing. |
| `tb_noise_shaper` | Agrees word for word with a loop model. Also checks unity DC gain to within 1/50 step and that overload is reported. |
| `tb_pwm2_modulator`, `tb_pwm3_modulator` | Pulse position and width per period, leg selection by sign, no pulse for zero or missing words, 128-clock period. |
| `tb_time_guard` | Width rules, guard clamping and feedback direction for random words and current signs. |
| `tb_deadtime_gen` | Exact dead time, no overlap, recovery from pulses shorter than the dead time. |
| `tb_digital_amp_top` | The whole chain at its default parameters, into a behavioural bridge with an R-L load that closes the current-sign loop. Details below. |
| `tb_tone_1khz` | A 0.5 full-scale 1 kHz tone at 16 bit / 44.1 kS/s. Details below. |
| `tb_load_change` | THD with and without the current-sign feedback, at 4 Ω and 8 Ω. Details below. |
| `tb_feedback_power` | THD against output level, open loop against 1-bit feedback. Details below. |
| `tb_dvd_audio` | The tone at 96 kS/s, through a 24-bit and a 16-bit build side by side. Details below. |

`tb_digital_amp_top` checks that:

* the bridge output, averaged per input period, follows a 0.6 full-scale
  sine to within 3 % of full scale (1.1 % measured);
* one PCM sample is requested every 2048 clocks;
* the bridge never shoots through;
* every mechanism above occurs at least once.

`tb_tone_1khz` runs the tone through the same bridge model. It measures a
fundamental of 0.499 and THD (harmonics 2–9) of about 0.2 %. This covers the
digital modulation with an idealised bridge and a crude averaging filter. It
is not a prediction of the analog distortion.

`tb_load_change` runs four amplifiers side by side on the same tone: with
the current-sign correction (`COMP_TICKS` = 2) and without it
(`COMP_TICKS` = 0), each into a 4 Ω and an 8 Ω load.

| Load | THD with correction | THD without correction |
|------|---------------------|------------------------|
| 4 Ω | 0.198 % | 1.65 % |
| 8 Ω | 0.196 % | 1.62 % |

Without the correction, the 2-tick dead time removes or adds a body-diode
interval on every pulse. The test checks that the correction lowers the THD
at both loads, and that it makes the THD change less with the load.
`tb/amp_tone_bench.sv` is the tone source, bridge and DFT bench that this
test instantiates four times.

`tb_feedback_power` sweeps the tone level into 4 Ω, with the correction off
(open loop) and on. Power is given for the model's 25 V bridge.

| Level | Power | THD open loop | THD with feedback |
|-------|-------|---------------|-------------------|
| 0.2 | 3 W | 3.89 % | 0.62 % |
| 0.4 | 12 W | 2.06 % | 0.25 % |
| 0.6 | 28 W | 1.39 % | 0.20 % |
| 0.8 | 50 W | 1.05 % | 0.19 % |

The dead-time error is a fixed time per pulse, so it weighs most at low
levels. The test checks that the feedback lowers THD at every level, keeps
it below 1 %, and that THD with feedback does not rise with the level.

`tb_dvd_audio` builds the top with `PCM_W` = 24 and plays the tone at
96 kS/s. The clock is then 196.608 MHz, and the bridge model integrates with
that period. A 16-bit build runs beside it on the same tone.

| Build | THD | Fundamental |
|-------|-----|-------------|
| 24 bit, 96 kS/s | 0.136 % | 0.4994 |
| 16 bit, 96 kS/s | 0.122 % | 0.4994 |

The 7-bit noise shaper sets the distortion, so the two widths agree. The test
checks both fundamentals, THD below 0.5 %, and that the two THD values are
within 0.05 % of each other.

`tb/hbridge_model.sv` is a behavioural model for testbenches only. It models
ideal switches, body-diode clamping during dead time, and a series R-L load.

## Where this RTL departs from, or goes beyond, the underlying design

* **Filter coefficients are this design's own.** They are equiripple designs
  at the stage orders and band edges described above. After 12-bit rounding,
  three stages reach 47–53 dB of stop-band attenuation, below a 60 dB target.
  Wider coefficients (`COEF_W`) would close the gap. The 12-bit width here
  applies to the coefficients; samples keep the PCM width.
* **Clock.** The MAC shares the single PWM clock and is idle between
  frames. A separate filter clock (at least 99 · FIN) would be enough.
* **Input width and rate.** The default build takes 16-bit samples. 24-bit
  input needs `PCM_W` = 24, which widens the oversampler and the edge
  estimate. Higher sample rates only need a faster `clk`, 2048 · FIN:
  196.608 MHz for 96 kS/s.
* **Choices of this design:**
  * the word-to-width mapping (2·|y| ticks);
  * the guard rule (fixed start, minimum and maximum width);
  * a fixed ±`COMP_TICKS` correction per word as the form of the
    current-sign feedback;
  * the dead-time value;
  * zero output on underrun;
  * the tick resolution of all timing corrections, 11.07 ns rather than
    10 ns.
* **Alternatives not built:**
  * 2-level PWM;
  * uniform PWM without the edge estimate;
  * the linear-interpolation (division) estimator;
  * higher-order Newton-Raphson or Lagrange estimators;
  * the analog-controller feedback loop.
* **Outside the digital logic:** the power stage itself, the LC filter
  (4th-order Butterworth, 20 kHz) and the circuit that senses the current
  sign are analog or discrete. They are not part of this RTL. The current
  sign enters on `i_pos`.

## Files

* `rtl/amp_pkg.sv`: widths, the interpolation program and the shared structs
* `rtl/mac_unit.sv`, `rtl/oversampler.sv`: interpolation
* `rtl/cross_point_dc.sv`: natural-PWM edge estimate
* `rtl/noise_shaper.sv`: noise shaper
* `rtl/pwm2_modulator.sv`, `rtl/pwm3_modulator.sv`: modulators
* `rtl/time_guard.sv`, `rtl/deadtime_gen.sv`: word correction and dead time
* `rtl/digital_amp_top.sv`: the top level
* `tb/`: one testbench per module, the end-to-end test, the tone, load-change,
  output-level and 96 kS/s tests with their shared bench `amp_tone_bench.sv`, and the
  behavioural bridge model
