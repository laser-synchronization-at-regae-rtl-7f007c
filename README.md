# Laser-to-RF phase lock with digital phase detection at an intermediate frequency

This is the FPGA part of a feedback loop that keeps a mode-locked Ti:sapphire
laser (about 83 MHz repetition rate) locked in phase to a 3 GHz RF reference.
The usual way to do this mixes a 3 GHz harmonic of the laser pulse train with
the reference down to DC, so the phase error is a baseband voltage. That voltage
picks up ground loops and interference. Here the harmonic is mixed down to an
intermediate frequency (IF) of about 25 MHz instead. The IF is digitised, and
its phase is measured digitally. Only a phase number is passed on, not a
fragile DC level. A PI controller turns the phase error into a word for a DAC.
The DAC drives a piezo in the laser cavity through an amplifier.

Everything from the ADC word to the DAC word is in `rtl/`. The analog parts are
not: the RF front end, the down-converter, the ADC and DAC, and the piezo
amplifier. Host access to the registers (a PCIe bus on the original board) is
also left out. The registers and monitor taps are plain ports of the top level.

## Frequency plan: why the LO table has five entries

| Quantity | Value |
|---|---|
| RF reference | 2.9979 GHz |
| Down-converter LO | 3.0229 GHz |
| IF | 24.983 MHz |
| ADC clock fs | 124.91 MHz (= f_RF / 24) |
| Laser repetition rate | 83.275 MHz (36th harmonic = f_RF) |

The IF is exactly fs/5, so one IF period is exactly five ADC samples. The
digital local oscillator is therefore a fixed 5-entry cos/sin table, stepped
once per sample (`lo_lut`). The same fact makes the 5-sample moving average
work well. The mixers produce a baseband term and a term at 2·IF = 2fs/5.
Any five consecutive samples of the 2·IF term add up to zero, so the moving
sum removes it exactly.

## Signal chain

All stages run on the 125 MHz ADC clock. After the decimator, data moves at
one sample per 100 clocks (1.2491 MS/s) with a one-cycle `valid` strobe.

| Stage | Module | In → out | What it does |
|---|---|---|---|
| LO table | `lo_lut` | → 2×18 | cos/sin of 2πk/5, k = 0..4 |
| Mixers | `iq_mixer` | 16 × 18 → 2×34 | x·cos, x·sin |
| Moving average | `moving_avg` (×2) | 34 → 37 | sum of the last 5 products |
| Decimation | `decimator` | 37 → 18 | every 100th sum, shifted right by 17, saturated |
| (the four above) | `quad_detector` | 16 → I/Q 2×18 | quadrature detector |
| Phase shifter | `iq_rotator` | I/Q → I/Q | rotation by a host-set angle a |
| CORDIC | `cordic` | I/Q → A 18, P 18 | vectoring mode, 17 iterations |
| IIR + bypass | `iir_filter` | P 18 → 18 | biquad (notch or low-pass), or bypass |
| Set-point | `phase_error` | 18 → 18 | e = set-point − filtered phase |
| PI controller | `pi_controller` | 18 → 17 | series PI, see below |
| Feed-forward | `ff_offset_adder` | 17 + 17 → 18 | adds the coarse piezo offset; DAC word |
| Top | `laser_sync_top` | ADC → DAC | wires the chain, brings out monitor taps |

Shared widths, types and the host-register and monitor structs are in
`rtl/lsync_pkg.sv`.

The rotator lets the operator set the lock point once the laser is locked. It
does this in software, with no RF phase shifter in front of the down-converter.
The IIR stage either notches out the piezo's mechanical resonance (about
50 kHz) or low-passes the phase to lower the loop bandwidth.

## Number formats

Getting the fixed-point conventions right is the main thing to understand
before changing the chain.

**I/Q.** Take an ADC tone of amplitude A and phase φ relative to the table. The
decimated outputs are

    I =  5·A·L·cos φ / 2^18,    Q = −5·A·L·sin φ / 2^18,    L = 2^17 − 1.

A full-scale ADC tone (A = 32767) gives |I/Q| ≈ 81 900, about 0.63 of the
18-bit range. This leaves room for the rotator. Because Q is x·sin, the
measured phase atan2(Q, I) is **−φ**. The sign convention is carried through
the whole loop, and the top-level testbench's laser model uses it.

**Phase.** The phase is a signed 18-bit number where 2^17 means π, so one LSB is
2.4·10⁻⁵ rad (about 1.3 fs at 3 GHz). Arithmetic wraps modulo 2π. This is
intended: the CORDIC output, the set-point and the error are all circular
quantities. The error `set-point − phase` is always the short way round.

**Amplitude.** The amplitude is unsigned 18-bit, with the same LSB as I/Q. The
CORDIC gain of 1.6468 is removed by multiplying by 79594/2^17.

**Rotator words.** cos(a) and sin(a) are signed Q1.17 words written by the host.
A rotation by a adds +a to the measured phase.

**IIR coefficients.** These are signed Q2.16, with range −2 to just under 2.
The filter computes

    y[n] = b0·x[n] + b1·x[n−1] + b2·x[n−2] − a1·y[n−1] − a2·y[n−2]

Products are summed at full width, shifted right by 16 and saturated to 18
bits. For a notch at f0 with pole radius r at the 1.2491 MS/s phase rate, use
w0 = 2π·f0/1.2491 MHz, b = (1, −2cos w0, 1), a1 = −2r·cos w0 and a2 = r².
For a first-order low-pass with pole p, use b0 = 1−p, a1 = −p and set the
rest to 0.

**PI controller.** The widths around the controller are fixed: 16-bit Kp and Ki,
a 25-bit proportional product, a 25-bit accumulator, a 33-bit integral product
and a 17-bit output. These are combined as a series PI:

    p   = (e·Kp)[33:9]                 25 bits
    acc = clip25(acc + p)              integrator; clipping sets int_sat
    u   = clip17(p[24:8] + (acc[24:8]·Ki)[32:16])

In continuous-time terms, u ≈ Kp·e/2^17 · (1 + (Ki/2^16)·Σ). Ki sets the
integral gain relative to the proportional gain, per update. The integrator
clips instead of wrapping, which limits wind-up.

**DAC word.** The DAC word is u + offset, 18 bits, and never overflows. The
offset is the feed-forward term that places the piezo coarsely. It is applied
continuously, so the piezo can be moved with the loop open (Kp = Ki = 0).

## Timing

- The ADC delivers one sample per clock (`adc_valid` high). The controller
  updates once every 100 clocks, and `ctrl_update` pulses for each new
  controller output.
- Latency, counted from the clock edge that takes the last sample of a
  decimation group to the edge that loads the new DAC word, is 28 edges:
  - 4 for the detector (input register, mixer, moving sum, decimator)
  - 1 for the rotator
  - 18 for the CORDIC
  - 1 for the IIR
  - 1 for the error
  - 2 for the PI controller
  - 1 for the DAC register

  That is small compared with the 100-clock update period.
- The CORDIC is iterative and accepts a new vector only when idle. An
  assertion checks that no vector arrives while it is busy.
- The DAC holds its word between updates.

## Host registers and monitor points

`cfg` (`lsync_cfg_t`) contains:

- the rotator cos/sin
- the five IIR coefficients and `iir_bypass`
- the phase set-point
- Kp and Ki
- the feed-forward offset

`mon` (`lsync_mon_t`) carries these taps:

- the ADC word
- decimated and rotated I/Q
- amplitude and phase
- the phase after the IIR/bypass multiplexer
- the error
- the integrator (top 17 bits) and its clip flag
- the PI output and the DAC word

A bus interface for the host would register `cfg` and sample `mon`.

## What is fixed and what was chosen

These follow the original system:

- the block order
- the 5-entry LO table
- the 5-sample moving average and decimation by 100
- the rotator matrix
- 17 CORDIC iterations
- an IIR stage usable as notch or low-pass, with a bypass multiplexer
- set-point subtraction, a PI controller and an additive feed-forward offset
- the bus widths listed in the table above

These are this implementation's own choices:

- every binary-point position and shift amount, and the sign convention of Q
- the IIR structure. The original specifies only "notch or low-pass". One
  direct-form-I biquad with host coefficients is used here.
- how the PI branches are combined (series form, see above). The printed
  widths admit this reading, but the exact wiring is an interpretation.
- saturation of the integrator and outputs, and modulo-2π wrap of the error
- an iterative CORDIC, valid strobes and register stages
- an asynchronous active-low reset that clears all state. At reset the table
  pointer is at entry 0.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/lsync_pkg.sv \
        tb/tb_laser_sync_top.sv --top-module tb_laser_sync_top -o sim
    ./obj_dir/sim

Replace the testbench name to run another one. The package file must come
first on the command line.

`tb_laser_sync_top` runs the whole design at its default sizes. It closes the
loop through a model of the laser, in which the piezo word changes the laser
frequency. It then goes through these stages:

1. open-loop phase and amplitude measurement
2. a rotator step
3. lock with a frequency drift that the integrator must absorb
4. a set-point step
5. notch mode, with a 0.01 rad oscillation at 50 kHz (the piezo resonance)
   added to the laser phase, then low-pass mode
6. an open loop with a large error, which clips the integrator

It counts each of these mechanisms and fails if one never happens. In lock,
the error stays within 3 phase LSB without the disturbance and within 10 LSB
with it. The notch cuts the 50 kHz swing from about 690 LSB in the measured
phase to about 20 LSB in the filtered phase.

The block testbenches compare against models computed in the testbench:

- real-valued cos/sin, rotation, atan2 and sqrt for the table, rotator and
  CORDIC
- a difference-equation model for the IIR, plus a check that a 50 kHz tone
  is suppressed
- the PI formula above

## Limits

- The analog parts, the board bus and the laser are modelled only as far as
  the top-level testbench needs them. The loop gain and noise of the real
  laser are not represented, so loop stability with real Kp/Ki values has to
  be checked on hardware.
- The measured jitter of the real system (10–20 fs) depends on the analog
  front end. The digital phase resolution of 1.3 fs per LSB is not the limit.
- No coarse (stepper-motor) tuning or 83 MHz bucket detection is included.
