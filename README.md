# Digital interface for a MEMS vibratory gyroscope

A vibratory MEMS gyroscope measures rotation through the Coriolis force. A
proof mass is kept oscillating along a drive axis at its mechanical
resonance. When the device rotates, a force proportional to the angular rate
and to the mass velocity pushes the mass along a second axis, the sense
axis. The electronics therefore have two jobs:

- keep the drive oscillation at resonance and at constant amplitude;
- measure the small sense-axis motion synchronously with the drive motion,
  then turn it into a calibrated angular-rate word.

This repository holds the SystemVerilog for such an interface:

- behavioural models of the analog front end: capacitance-to-voltage
  converters and 4th-order sigma-delta modulators;
- the complete synthesizable digital core that closes the drive loop,
  filters, demodulates and compensates;
- a host interface: SPI with parity, plus a 1k x 16 calibration memory.

Both pick-off channels, drive and sense, are built the same way, so both
channels delay the signal by the same amount. This means the oscillator
that is locked to the drive channel can demodulate the sense channel with
no phase calibration.

```
 MEMS  dc_drive ─► cv_frontend ─► sdm_crff4 ─3b─► filter_chain ─► drive_loop ──► drive_force
 element                                                          │  (sweep, PLL, NCO,
                                                                  │   PID, phase shift)
                                                                  ▼ NCO cos/sin
       dc_sense ─► cv_frontend ─► sdm_crff4 ─3b─► filter_chain ─► demodulator ─► temp_comp ─► rate_out
                                                                                  ▲ temp
  SPI ◄─► spi_slave ◄─► reg_bank / nvram            self_test ──► st_force
```

Everything runs in one clock domain, the 2 MHz modulator clock. Valid
strobes mark the lower sample rates.

## Analog front end (behavioural models)

`cv_frontend` applies the C/V relation `Vo = Vb·ΔC / Cint`:

- Vb = 3.35 V: a 5 V proof mass against a 1.65 V common mode.
- `gain_sel` chooses Cint = 2 pF or 4 pF. In silicon this is a PMOS switch,
  so the same chip can serve sensing elements with different sensitivity.
- Units are integers: attofarad in, microvolt out. This keeps the models
  acceptable to synthesis-oriented front ends.

`sdm_crff4` models a 4th-order low-pass sigma-delta modulator with a
cascade-of-resonators feed-forward (CRFF) loop:

- Coefficients: A1..A4 = 0.8, 0.6, 0.4, 1.0; C1..C4 = 1.167, 0.5, 0.4, 0.05;
  B1 = 1.167; input feed-forward B5 = 1.8; no resonator feedback
  (G1 = G2 = 0).
- Integrators 1 and 3 delay by one sample and 2 and 4 do not, which mirrors
  the two-phase switched-capacitor timing.
- The quantizer is a 7-comparator flash with thresholds at (2k−6)/7 of full
  scale, giving 8 levels. Its thermometer code goes back through an 8-level
  DAC, (2l−7)/7, and out through `therm2bin` as a 3-bit code on every clock.
- Full scale is 1 V (`VREF_UV`).
- The states are 2^16/VREF fixed point, not real numbers.

Both models are only good enough to feed the digital core realistic data.
They are not circuit models: there is no kT/C noise, no finite op-amp gain
and no anti-alias filter.

## Filter chain (one per channel)

`filter_chain` runs these stages in order:

1. **CIC decimator** (`cic_decimator`). Order 4, ratio 2^`dec_log2`, default
   32. Each code is mapped to an odd level 2·code−7 in −7..+7. At ratio 32
   the full-precision output is exactly 4 + 4·5 = 24 bits. Ratio 16 is
   shifted left by 4 to keep the same scale. Rate: 62.5 kHz. The IIR
   coefficients below are computed for ratio 32; at ratio 16 every corner
   frequency doubles, so they must be recomputed for it.
2. **IIR band-pass**. 10 kHz, Q 0.7: wide enough for any drive resonance
   between about 8 and 12 kHz.
3. **Two IIR band-stops**. 12.0 and 12.6 kHz, Q 4. Staggered notches remove
   the sense-mode resonance. The test requires more than 60 dB at 12.0 kHz;
   the measured value is about 127 dB.
4. **CIC interpolator** (`cic_interpolator`). Order 3, ×4 to 250 kHz, gain
   removed by a shift.
5. **IIR low-pass correction**. 25 kHz: removes interpolation images and
   residual noise.

Output: 24-bit words every 8 clocks.

Every IIR filter is an `iir_stage`, a biquad in **transposed direct form
II**:

```
y  = b0·x + s1
s1 = b1·x − a1·y + s2
s2 = b2·x − a2·y
```

- Coefficients are Q2.22. The states keep the full product precision, so
  narrow notches do not drift.
- The stage owns two multipliers and two adders and works through the
  equations in four clock steps:
  1. compute y;
  2. update s1;
  3. update s2;
  4. write the result.
  `out_valid` comes 4 cycles after `in_valid`.
- `busy` stays high in between, and an assertion flags a sample that
  arrives too early.
- The coefficient sets are in `gyro_pkg`, together with the formulas that
  produced them (bilinear biquads). To move a filter, recompute its five
  numbers with those formulas.

## Drive loop

The hard part of the design is getting the resonator moving. Until it
oscillates there is nothing to lock to. `drive_loop` combines five blocks.

**`amp_detector`** reports the peak magnitude of the filtered drive signal
over each 64-sample window, which is several oscillation periods.

**`drive_mode_ctrl`** chooses between two modes:

- *Start-up mode.* The force is applied at a fixed large amplitude
  (`startup_amp`). The NCO frequency steps from `fmin` to `fmax` by `fstep`
  once per amplitude window, then starts over; `sweep_count` counts the
  passes.
- Once the amplitude exceeds `amp_on_th`, the oscillation is established.
  The block pulses `to_normal` and hands the current sweep frequency to the
  PLL.
- *Normal mode* ends after 8 windows below `amp_off_th`, or when the
  `restart` register bit is set. The loop then falls back to start-up.

**`drive_pll` with `nco`** locks the NCO to the oscillation:

- The NCO has a 32-bit phase accumulator and a 1024-entry quarter-wave sine
  table, computed at elaboration. It is the PLL's oscillator.
- The phase detector reads the NCO phase at each rising zero crossing of
  the drive signal. Once locked, the NCO sine is in phase with the signal,
  so that phase is the error.
- Two details make it robust:
  - **Qualification.** A crossing counts only after the signal has been
    below `−hyst`. Noise on a small signal therefore cannot produce false
    crossings, which is what defeats a plain phase-frequency detector at
    start-up.
  - **Interpolation.** The NCO phase is interpolated linearly back to the
    exact crossing between two samples. At 62.5 kHz sampling and 10 kHz,
    the sample grid alone would add about 1/25 turn of jitter.
- The loop filter is proportional-integral with shift gains (`kp_sh`,
  `ki_sh`) and a clamp to [`fmin`, `fmax`].
- `lock` is set after 16 crossings with |error| < 1024/65536 turn. It is
  cleared when the error exceeds 4 times that.

**`pid_ctrl`** sets the drive amplitude in normal mode:

- On every amplitude window:
  - e = target − amp;
  - u = (kp·e + Σki·e + kd·Δe) / 2^16;
  - u is clamped to 0..32767.
- In start-up mode it outputs `startup_amp` and presets its integrator to
  that value, so the switch to normal mode causes no jump.

**Force generator.** `drive_force = drive_amp · sin(NCO phase + phase_offset)`.

- The offset (register 0x408) makes up for the delay of the modulator,
  the filters and the loop, so that force and velocity are in phase (the
  oscillation condition).
- The reset value 0x3C00 suits the default filter chain and a 10 kHz
  resonator.

## Demodulation, compensation, self-test

**`demodulator`** multiplies each filtered sense sample by the NCO cosine
(rate) and sine (quadrature) at the same instant. It doubles the products to
undo the ½ of mixing. Each product then goes through a 1 kHz biquad
low-pass (another `iir_stage`).

**`temp_comp`** removes the zero-rate output (ZRO) and corrects the scale
factor (SF) over temperature:

```
rate_c = (rate − ZRO(T)) · SF(T)
ZRO(T) = z0 + z1·T + z2·T²
SF(T)  = s0 + s1·T + s2·T²
```

- T is the temperature code as a fraction of full scale (T/2^15).
- Each polynomial is evaluated by a `poly_unit`, a Horner evaluator with one
  multiplier. Its `done` comes DEG+2 cycles after `start`.
- ZRO coefficients are register values shifted left by 8.
- SF coefficients are Q2.14, so 0x4000 means 1.0.
- The coefficients are meant to be loaded from the NVRAM into the
  registers by the host.

**`self_test`** injects a force on the sense electrodes when enabled:

- The force is `st_force = st_amp · sin(NCO + offset)`, the same waveform
  as the drive force. That waveform is in velocity phase, just like a
  Coriolis force, so the chain sees the stimulus as a known rate.
- After 2048 rate samples it compares the rate with [`st_lo`, `st_hi`]. It
  then reports `st_done` and `st_pass`.

## Host interface

`spi_slave` uses SPI mode 0, MSB first, in 33-bit frames:

| bits  | content                                         |
|-------|-------------------------------------------------|
| 0     | 1 = write, 0 = read                              |
| 1–15  | word address                                    |
| 16–31 | data (host → chip on write, chip → host on read) |
| 32    | even-parity bit over the whole frame             |

- A write happens only if exactly 33 bits arrived with even parity.
  Otherwise it is dropped and the 8-bit `parity_errors` counter increments.
- Read data on MISO carries its own even-parity bit.
- The SPI pins are synchronised into the core clock, so SCLK must not
  exceed clk/8 (250 kHz).

Address map (`reg_bank`, reset values in brackets):

| address       | register |
|---------------|----------|
| 0x000–0x3FF   | NVRAM, 1k × 16 (`nvram`) |
| 0x400         | control: [0] self-test enable, [1] C/V gain, [4:2] log2 decimation (5), [5] drive restart |
| 0x401         | amplitude target (8192) |
| 0x402–0x404   | PID kp, ki, kd (128, 32, 0) |
| 0x405–0x407   | sweep fmin, fmax, step: NCO frequency word >> 16 (262, 393, 13 → 8.0–12.0 kHz) |
| 0x408         | force phase offset, 2^-16 turn (0x3C00) |
| 0x409, 0x40A  | amplitude on / off thresholds (4096, 1024) |
| 0x40B         | PLL [3:0] kp shift (6), [7:4] ki shift (2) |
| 0x40C         | PLL hysteresis (256) |
| 0x40D         | start-up drive amplitude (16384) |
| 0x40E         | self-test amplitude (0) |
| 0x40F, 0x410  | self-test window low, high |
| 0x411–0x413   | ZRO z0..z2 (0) |
| 0x414–0x416   | SF s0..s2 (0x4000, 0, 0) |
| 0x420 (ro)    | [0] normal mode, [1] PLL lock, [2] self-test pass, [3] self-test done, [15:8] parity errors |
| 0x421, 0x422 (ro) | rate [23:8], [7:0] |
| 0x423, 0x424 (ro) | quadrature [23:8], amplitude [23:8] |
| 0x425, 0x426 (ro) | NCO frequency word [31:16], drive amplitude |

The reset values give a working drive loop for a resonator between 8 and
12 kHz with no host action.

## Files

- `rtl/gyro_pkg.sv`: shared types, widths, coefficient sets and the
  configuration/status structs.
- `rtl/<block>.sv`: one module per file.
  - Top: `gyro_asic_top`, with the analog models and the digital core.
  - Digital ASIC: `gyro_digital_core`.
  - Helper: `sine_lut`, used by `nco`.
- `tb/tb_<block>.sv`: one self-checking testbench per block.
  - Each prints `TB_RESULT checks=N failures=M` and has a watchdog.
  - Reference values are computed independently in the testbench: real
    arithmetic filter models, bit-exact integer models, or closed-form
    expectations.
- `tb/tb_gyro_asic_top.sv`: the end-to-end test. It runs the whole design at
  its default parameters against a behavioural gyroscope:
  - a drive resonator with f0 = 10 kHz and Q = 20;
  - a sense pick-off with a Coriolis term, a quadrature term and the
    self-test force.

  It runs these steps in order:
  1. start-up sweep and switch to normal mode;
  2. PLL lock and amplitude regulation;
  3. ±250 °/s rate steps and a ±500 °/s transfer sweep with a linearity
     check;
  4. SPI register and NVRAM access, including a frame with bad parity;
  5. ZRO and SF compensation;
  6. self-test;
  7. a forced restart with a fall-back to start-up.

  It counts each of these mechanisms and fails if one never occurs. It
  covers about 150 ms of operation and runs in under a second.

- `tb/tb_snr_chain.sv`: one channel, from modulator model to filter-chain
  output, with a 10 kHz tone. It reports the SNR in a 1 kHz band and over
  the whole output band.

## Simulating

With Verilator 5, compile the package and the testbench and let Verilator
find the modules in `rtl/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl +libext+.sv --top-module tb_gyro_asic_top \
    rtl/gyro_pkg.sv tb/tb_gyro_asic_top.sv -Mdir obj_top -o sim
./obj_top/sim
```

The same command, with the names changed, builds every other
`tb_<block>` testbench. `tb_gyro_asic_top` accepts `+trace` to print the
drive-loop state every 500 µs.

## Trust and departures

What is verified in simulation:

- every block against an independent model;
- the closed loop:
  - the drive locks within 0.1 % of the resonator frequency and holds the
    amplitude set point;
  - +250 °/s and −250 °/s give rate words of about ±524 500;
  - a five-point sweep over the full scale of ±500 °/s gives ±1 049 000,
    about an eighth of the 24-bit range, with 0.006 % of full scale
    deviation from a straight line. The gyroscope model is linear, so this
    measures the electronics alone.

- the noise of one channel (`tb_snr_chain`): a 10 kHz tone at half the
  modulator full scale, passed through the modulator model and the filter
  chain, gives a signal-to-noise ratio of 124.5 dB in a 1 kHz band around the
  tone. Over the whole 0–125 kHz output band it is only 56 dB. The limit
  there is the tone's image at 52.5 kHz left by the ×4 interpolation, which
  the rate low-pass removes.

What is not verified:

- noise sources of real circuits (thermal noise, clock jitter, op-amp
  limits). The modulator model is ideal apart from its quantizer, so the
  figure above is an upper bound.

Choices this design makes where the reference description is silent or
brief:

- **Filter corners and orders.** The 10 kHz band-pass, the 12.0/12.6 kHz
  notches, the 25 kHz and 1 kHz low-passes and the single biquad per
  filter all assume a drive near 10 kHz and a sense resonance near 12 kHz.
  Retune `gyro_pkg` for another sensing element.
- **Demodulation after filtering.** The sense channel is demodulated after
  its filter chain, using the drive NCO. It is not demodulated on the raw
  bit-stream.
- **The modified phase detector.** The hysteresis-qualified,
  interpolating zero-crossing detector is this design's version of a phase
  detector that tolerates noisy start-up signals.
- **The start-up sweep** acts on the NCO frequency. An analog sweep current
  source is not modelled.
- **Formats and control details:**
  - all number formats, gains and thresholds;
  - the register map;
  - the SPI frame layout;
  - the self-test stimulus and pass window;
  - the quadratic order of the compensation.
- **The NVRAM** is a plain synchronous array. The non-volatile cell and its
  programming are not modelled, so contents do not survive a reset of the
  simulation.
- **Outside the RTL, reached through ports:**
  - the MEMS element;
  - the force DACs;
  - the band-gap reference and regulators;
  - the anti-alias filter;
  - the temperature sensor.
