# Four-channel DPLL phasemeter

This is the digital core of a phasemeter for space interferometry (LISA-type
laser links). A photodiode delivers a heterodyne beat note between 2 and
20 MHz. The phasemeter has to report the phase of that beat note with
micro-radian noise at millihertz frequencies. The signal is sampled at
50 MHz, and each channel locks a numerically controlled oscillator (NCO)
onto it with a digital phase-locked loop (DPLL). The oscillator's frequency
word and its accumulated phase are then the measurement. Four such channels
run side by side, one per quadrant of a quadrant photodiode. A decimated
record of all four is read by a PC over an enhanced parallel port (EPP).
A pseudo-random-noise (PRN) code link on the same board measures the light
travel time between two stations and carries data: a code is sent out as
phase modulation, and a delay-locked loop (DLL) finds the returning code in a
channel's phase error.

The RTL follows the architecture of the LISA phasemeter prototype
described in "LISA phasemeter development: Advanced prototyping". That
description fixes the loop structure, the four channels, the 50 MHz
sampling, a 104-bit phase accumulator fed by a 60-bit phase increment
register, the readout paths (EPP, a digital I/O board, two DACs) and an
internal test-signal NCO. It names a PRN-code DLL for ranging and data
transfer as part of the same breadboard. It does not give filter designs, gains, most word
widths, the decimation factor or any interface protocol. Those are choices
made here; each is listed under "Choices made here" and in the header
comment of its file.

## The tracking loop (`dpll_channel`)

```
            +--> x --> I-LUT (sin)   mixer -> LPF(K_IQ) ---------------> I (amplitude)
 sample --->|         ^
            +--> x --> Q-LUT (cos)   mixer -> LPF(K_IQ) --+------------> Q (phase error)
                      ^                                   |
                      | top 12 bits of PA[59:0]           v
              PA (104 b) <--- PIR (60 b) <--- pir_init + PI controller
                      |
                      +--> LPF(K_PA) -------------------------------> PA (phase)
```

How the loop works:

- The NCO phase accumulator `PA` adds the phase increment register `PIR`
  every clock. One PIR LSB is 2^-60 of a cycle per sample, so the NCO runs
  at `f = PIR * 50 MHz / 2^60`. That is a frequency resolution of
  4.3e-11 Hz.
- The top 12 bits of the fractional part address two 4096 x 16-bit tables.
  The I table holds sin(x) and the Q table cos(x).
- With an input `A sin(phi_in)` and NCO phase `phi_nco`:
  - The Q product is `(A/2) sin(phi_in - phi_nco)` plus a component at
    twice the input frequency. Its low-pass output is the phase error.
  - The I product gives `(A/2) cos(phi_in - phi_nco)`. In lock this is the
    amplitude.
- The PI controller computes `corr = err*2^kp + sum(err*2^ki)`. The PIR
  loads `pir_init + corr` every clock, so the loop drives the phase error
  to zero.
- Because the loop has an integrator (a type-2 loop), a constant frequency
  offset leaves no static phase error.

Loop gain in practice. A half-scale input (amplitude 2^14) gives an error
slope of about 2^28 per radian. With `kp_shift = 24`, each radian of error
moves the NCO by about 2π/256 rad per sample. With `ki_shift = 17` the loop
is near critically damped (damping about 0.9). The bandwidth is about
200 kHz. The benches allow 6000 samples for lock. For other input
amplitudes, move both shifts by the same number of bits as the amplitude
changes.

Latency: the loop delay from PA to the next PIR update is six clocks
(table, mixer, filter, controller, PIR, PA). All stages are registered.

The twice-frequency ripple is the part that is easy to misread:

- The first-order loop filter (K_IQ = 3) passes part of the 2f product:
  about 11 % at a 5 MHz input and about 26 % at 2 MHz.
- That ripple reaches the PIR through the proportional path. The
  instantaneous PIR therefore wobbles by tens of kHz at 2 to 3 MHz inputs.
- The PA integrates the PIR. On the phase the ripple is about a milliradian
  at the 2f rate, and the PA low-pass filter removes it before decimation.
- Read the frequency from the PA advance between records, or average the
  PIR.

## Reading the phase word

The 104-bit PA is `A:B`. `B = PA[59:0]` is the fraction of a cycle and
`A = PA[103:60]` counts whole cycles, so

    phase [rad] = 2*pi * (A + B / 2^60)

The cycle counter overflows only after 2^44 cycles, months at 20 MHz. The
phase is therefore unwrapped in hardware. The host converts it to radians in
floating point. The PA branch is low-pass filtered (first order, K_PA = 21
by default) before decimation, as an anti-aliasing filter. For a constant
frequency this filter delays the phase ramp by exactly 2^K_PA samples. The
filter forms the difference input minus output modulo 2^104, so it works on
the unwrapped phase without overflow.

## Inputs and the test oscillator

Each channel registers either its ADC sample (16-bit two's complement) or
the output of its own test NCO, chosen by `tst_cfg[c].use_nco`. The test NCO
has the same 60-bit phase accumulator and sine table as the loop NCO. Its
output is attenuated by `2^amp_shift`. With it, the whole loop and readout
can be checked without the analog front end, which is how the prototype's
noise floor was first measured.

## Decimation and the readout record

`downsampler` copies the filtered I, Q, PA and the PIR of all channels, plus
the alignment signals, in one clock every 2^DECIM_LOG2 clocks. The default
DECIM_LOG2 = 21 gives 23.8 records/s. It increments an 8-bit sequence number
and pulses `rec_valid`. The record is 133 bytes, least significant byte
first:

| bytes              | content                                              |
|--------------------|------------------------------------------------------|
| 0                  | sequence number                                      |
| 1 + 29c .. +3      | channel c: filtered I (signed 32 bit)                |
| 1 + 29c + 4 .. +7  | channel c: filtered Q (signed 32 bit)                |
| 1 + 29c + 8 .. +20 | channel c: filtered PA (104 bit)                     |
| 1 + 29c + 21 .. +28| channel c: PIR (60 bit, zero-padded to 64)           |
| 117 .. 124         | horizontal alignment (signed 64 bit, 2^-60 cycle)    |
| 125 .. 132         | vertical alignment (signed 64 bit, 2^-60 cycle)      |

## EPP host port (`epp_readout`)

The port follows the IEEE 1284 EPP handshake. The host pulls `nAddrStrobe`
or `nDataStrobe` low, with `nWrite` low for a write. The port answers by
raising `nWait` once the transfer is done. It lowers `nWait` again after the
host releases the strobe. Strobes are synchronised with two flip-flops, so
the port runs from the 50 MHz clock.

Register map:

| cycle         | action                                                        |
|---------------|---------------------------------------------------------------|
| address write | sets the byte pointer and freezes a copy of the current record |
| address read  | returns the pointer                                           |
| data read     | returns the frozen byte at the pointer, then increments it    |
| data write    | acknowledged, ignored                                         |

To read a record, write address 0, then do 133 data reads. The frozen copy
keeps the record consistent even if a new one arrives during the read. With
a fast host a byte takes about 120 ns.

The bidirectional data bus is split into `epp_d_in`, `epp_d_out` and
`epp_d_oe` for the pad ring.

## DIOB stream and DAC outputs

- **DIOB stream** (`diob_port`). While `diob_en` is high, one intermediate
  signal of one channel leaves every clock as a 32-bit word with a strobe.
  It is meant for a DMA capture board, for debugging the loop at full rate.
  Signal codes (`pm_pkg::diob_sel_e`):

  | code | signal                          |
  |------|---------------------------------|
  | 0    | input sample                    |
  | 1, 2 | I and Q products                |
  | 3, 4 | I and Q filter outputs          |
  | 5    | PI output, bits 59:28           |
  | 6    | PIR, bits 59:28                 |
  | 7    | PA fraction, bits 59:28         |

- **DAC outputs** (`dac_if`, two instances). Each takes the PI-controller
  output of a chosen channel, which is the frequency feedback. It shifts the
  value right by `dacN_shift`, saturates it to 14 bits and outputs offset
  binary (8192 = zero). The codes suit a 14-bit straight-binary DAC such as
  the AD9744. They are intended for laser frequency stabilisation; the
  control law for the laser is outside this RTL. With `dacN_prn` high the
  DAC instead carries the PRN chip as ±2^58 before the shift. A shift of
  46 gives ±4096 codes around mid-scale, which can drive an electro-optic
  phase modulator for ranging.

## Quadrant alignment (`quadrant_alignment`)

Channels 0 to 3 are taken as photodiode quadrants top-left, top-right,
bottom-left and bottom-right. The block forms two signals from the filtered
fractional phases:

- horizontal = (A + C) - (B + D)
- vertical = (A + B) - (C + D)

Each pairwise difference is wrapped to half a cycle first. The signals are
recorded with the channel data. If the channels are used for unrelated
signals, the two values have no meaning.

## PRN ranging and data link (`prn_code_gen`, `prn_dll`)

The transmitter is a 10-bit Fibonacci LFSR (x^10 + x^3 + 1). It gives an
m-sequence of 1023 chips, one chip per 64 clocks (781.25 kchip/s). The
register starts from all ones, so every code period begins in the same
state. One data bit is latched at each period start and XORed onto the
whole period. `prn_chip` is meant for an optical phase modulator, driven
through either DAC (`dacN_prn`). The generator's `tx_phase` output is the
transmit code phase in clocks.

The receiver does not demodulate the optical phase itself. It uses the
channel DPLL for that. The DPLL bandwidth (about 100 kHz at the default
gains) is far below the chip rate, so the loop cannot follow the chips. The
phase steps therefore appear almost whole in the low-passed Q signal (phase
error) of the channel chosen by `prn_ch_sel`. The DLL correlates Q with
three copies of the code: early (half a chip ahead), prompt and late (half
a chip behind). Each sum runs over one whole code period. At the end of
each period:

- **Search.** If |prompt| < `prn_acq_thresh`, the local code moves by half
  a chip. A full search of 2046 steps takes at most 2046 periods (2.7 s).
- **Track.** Otherwise the loop takes early minus late and multiplies it
  by the sign of the prompt. A data bit flips all three sums, and the
  prompt sign cancels that flip. The result is shifted right by
  `prn_dll_shift`, limited to a quarter chip, and kept.
- The stored step is added when the local code phase next passes half a
  period. Adding it at the wrap instead would let a backward step recross
  the wrap and make a near-empty extra period. That period would then fail
  the threshold and drop the lock.
- `prn_delay` is the transmit phase minus the local phase, modulo one
  period, in clocks with 8 fraction bits. `prn_data_bit` is the sign of the
  prompt. `prn_tracking` shows whether the threshold was met.
  `prn_valid` pulses once per period.

The delay includes a fixed latency of the analog path, the ADC, the channel
filters and the DLL input register. Calibrate it out. The local code is
sampled at whole clocks, which leaves a bias of up to half a clock. With
input noise the delay jitters by a fraction of a clock from period to
period; average it. The tracking gain depends on the signal level: set
`prn_dll_shift` so that one clock of error gives about half a clock of step
The end-to-end bench uses 24 for a 0.03-cycle modulation on a half-scale
input with 31 chips of 32 clocks. The gain grows with the code length, so
the default 1023-chip code needs about 5 more. Set `prn_acq_thresh` to
about half the expected prompt, which grows with the period length.

## Configuration

All settings are top-level inputs (structs in `pm_pkg`):

- `ch_cfg[c]` sets the loop of each channel:
  - `pir_init`: the nominal frequency word. Set it near the expected beat
    frequency; the benches start the loops about 12 kHz away.
  - `kp_shift` and `ki_shift`: the gains.
  - `loop_en`: 0 opens the loop and clears the integrator.
- `tst_cfg[c]` sets the input select, the test NCO frequency and its
  attenuation.

Parameters of `phasemeter_top`:

| parameter  | default | meaning                                                |
|------------|---------|--------------------------------------------------------|
| DECIM_LOG2 | 21      | records every 2^21 clocks                              |
| K_IQ       | 3       | I/Q loop filter corner, about fs/(2π·8) = 1 MHz        |
| K_PA       | 21      | PA anti-alias filter, corner about 3.8 Hz              |
| PRN_N      | 10      | PRN LFSR length, code of 2^N - 1 chips                 |
| PRN_TAPS   | 10'h204 | LFSR feedback taps (x^10 + x^3 + 1)                    |
| PRN_CHIP_LOG2 | 6    | 2^6 clocks per chip                                    |

The PRN link takes `prn_data_in`, `prn_ch_sel`, `prn_dll_shift` and
`prn_acq_thresh` as inputs. Its results are top-level outputs and are not
part of the EPP record.

## Choices made here

These points are not given by the design description:

- 16-bit ADC samples, 4096 x 16-bit sine tables, 32-bit products, 14-bit DAC
  codes, 32-bit DIOB words.
- All three low-pass filters are first-order IIR filters with
  power-of-two time constants.
- PI gains are powers of two, set at run time. The controller wraps modulo
  2^60 instead of saturating.
- The Q branch uses the cosine and drives the loop.
- The PIR goes into the record unfiltered.
- Decimation is 2^21, done by picking samples: the PA filter does the band
  limiting.
- The EPP register map and record format, the DIOB selector and the DAC
  scaling are this design's own.
- The quadrant order and alignment formulas are this design's own.
- The two DACs are shared by the four channels through channel selects.
- Reset is synchronous and active high and clears every register.
- The whole PRN link: code family, length and chip rate, one data bit per
  period, the early/prompt/late correlator, the search and the loop law.
  The DLL takes its input from a channel's Q signal.

Not included: the analog anti-aliasing filters, the ADC and DAC chips, the
clock oscillator, the host-side floating-point processing, the laser
controller and the optical phase modulator.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The system-level benches are:

- `phasemeter_top_tb`: all four channels at 2, 3, 5 and 17 MHz, from test
  NCOs and ADC-format sines, at decimation 2^8. Records are read over EPP.
  It checks frequency, amplitude, phase advance between records (within
  1e-3 cycle), DIOB and DAC words and the alignment signals. Then channel 3
  is phase-modulated by the PRN chip, delayed by 100 and then 300 clocks,
  using a 31-chip code of 32 clocks per chip. The DLL must search, track,
  and measure a delay change of 200 ± 1 clocks (the bench measures 199.9).
  Meanwhile DAC1 carries the chip, and its code is checked every clock.
  It also counts that every mechanism was exercised.
- `phasemeter_full_tb`: the same with all parameters at their defaults. It
  runs three full-size records, 6.3 million clocks, in a few seconds of
  simulation.
- `prn_dll_tb`: a 31-chip code with noise as large as the signal, random
  data bits, delays of 157 and 400 clocks. The mean delay is within 0.6
  clock of the true delay. At most two data bits, around the moments of
  lock, may be decoded wrongly.
- `phase_noise_tb`: 5 MHz inputs from the test NCO and from an ideal ADC
  sine. It uses 150 records at decimation 2^12 and K_PA = 10. The
  residual phase noise is 1.8 to 2.4e-6 rad/√Hz, against the
  2π·10⁻⁶ = 6.3e-6 rad/√Hz requirement. That is white noise up to the
  6 kHz record Nyquist frequency. The millihertz band cannot be reached in
  simulation.

To run a bench with Verilator:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
        rtl/pm_pkg.sv tb/phasemeter_top_tb.sv --top-module phasemeter_top_tb -o sim
    ./obj_dir/sim

The simulator has no X state. Everything that is read is reset or
initialised, and the sine tables are filled in an `initial` block (a ROM
initialised at configuration on an FPGA).
