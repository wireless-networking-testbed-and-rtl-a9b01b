# WiNeTestEr DSP site: FPGA channel emulation in SystemVerilog

WiNeTestEr is a wireless channel emulator. The antennas of the devices under
test are replaced by coaxial cables, and every one-way radio link between two
devices runs through a *DSP site*. The site digitizes the transmitted signal,
imposes a multipath fading channel on it in an FPGA, and converts the result
back to analog for the receiver. Because the signal is processed digitally, one
site can make several delayed, faded copies of the signal (multipath), which a
plain programmable attenuator cannot.

This repository holds synthesizable RTL for the digital part of one site: the
FPGA datapath between the RF boards' ADCs and DACs, and the registers the
site's processor uses to control it.

## What one site does

A site carries two RF boards. Each board has one receive chain, which
digitizes one transmitting device as 12-bit I/Q samples. It also has three
transmit chains, each with a 16-bit I/Q DAC pair cabled towards a different
receiving device. The FPGA copies each input to the three outputs of its own
board. Every output gets its own, independent channel. One site therefore
emulates six one-way links:

```
              +-------------------- multi_tap_channel (x6) --------------------+
 adc_in[k] -->|  tap 0: tap_delay_line -> complex_tap_mult <- sos_fading_gen    |
  12b I/Q     |  tap 1:       ...                                              |--> fpga_attenuator --> iq_corrector --> dac_out[o]
              |  ...                                                    (sum)  |     0..69 dB, 0.1 dB   gain/phase/DC    16b I/Q
              |  tap 6:       ...                                              |
              +----------------------------------------------------------------+
   o = 3k, 3k+1, 3k+2                          site_regs <-- cfg (processor register writes)
```

A channel is a sum of up to seven taps. Each tap is one propagation path: a
delay, then multiplication by a complex coefficient `rho(t)*phi(t)` that
carries the path's gain and its time-varying Rayleigh fading. After the
channel, each output has a digital attenuator (0 to 69 dB in 0.1 dB steps).
It is followed by an I/Q pre-correction that compensates the analog
quadrature modulator's gain, phase and DC mismatch.

The analog parts of the RF boards are outside the FPGA: step attenuators,
mixers, filters, VGAs, PLL, converters and supplies. So are the combiner
boards, the circulators and the processor. Only their digital interfaces are
ports of the top module: samples in, DAC words out, and the control words of
the input step attenuator (0 to 64 dB) and the output attenuator (0 to
28 dB).

## Files

| file | role |
|---|---|
| `rtl/winetester_pkg.sv` | widths, I/Q and coefficient types, register address map |
| `rtl/winetester_site.sv` | top: two inputs, six outputs, register file |
| `rtl/site_regs.sv` | register decode; output and RF-board control registers |
| `rtl/multi_tap_channel.sv` | seven taps and their sum |
| `rtl/tap_delay_line.sv` | per-tap programmable delay in a dual-port RAM |
| `rtl/sos_fading_gen.sv` | per-tap sum-of-sinusoids fading coefficient |
| `rtl/sine_rom.sv` | the fading generator's single sine table (one block RAM) |
| `rtl/complex_tap_mult.sv` | complex sample x coefficient |
| `rtl/fpga_attenuator.sv` | 0 to 69 dB attenuation in 0.1 dB steps, to the 16-bit DAC scale |
| `rtl/iq_corrector.sv` | I/Q gain, phase and DC pre-correction |
| `tb/tb_<module>.sv` | a self-checking testbench per module |
| `tb/tb_channel_profiles.sv` | the ITU Vehicular A based channel profiles, run through a full-size site |

## The tap delay line

Each tap's delay is a circular buffer in a dual-port RAM, 1024 words of
24 bits (12-bit I and Q). To delay by `L'` samples, the write address counts
0, 1, ..., L' and wraps to 0. The read address is always one ahead of the
write address, and it wraps at the same place. The buffer is therefore
exactly `L'+1` words long. The word read in any clock is the oldest one in
it, written `L'` clocks earlier. For `L' = 6`:

```
input     x0 x1 x2 x3 x4 x5 x6 x7 x8
write      0  1  2  3  4  5  6  0  1
read       1  2  3  4  5  6  0  1  2
output     -  -  -  -  -  -  x0 x1 x2
```

The RAM's read port is registered, as in a block RAM, which adds one clock
to every tap alike. So the tap output is `din(t - 1 - L')`. `L' = 0` bypasses
the RAM through the same register, so the rule holds for every delay. `L'`
ranges over 0..1023, which gives 1 to 1024 clocks in all. Relative delays
between taps are exact.

Changing `L'` takes effect at once. If the write address is beyond the new
`L'`, it wraps on the next clock. The RAM is never cleared. After reset, or
after the delay grows, the first `L'+1` outputs of a tap are whatever the
memory held. Software should program delays before it opens the output
attenuator.

A delay `tau` is programmed as `L' = ceil(tau * f_s)`. The hardware has no
notion of the sample rate. It counts one sample per clock. Two figures for
the converter clock exist: 200 MHz (100 MHz of bandwidth, Nyquist sampled)
and 100 MHz (the rate at which a 1024-sample memory was described as
1.024 us). The RTL is the same either way. Only the conversion from
nanoseconds to `L'` differs (see "Channel profiles").

## The fading generator

Each tap's coefficient is a sum of sinusoids:

```
h.i = g * sum_{n<8} sin(theta_I[n]),     h.q = g * sum_{n<8} sin(theta_Q[n])
theta[n] += inc[n]  once per update (every UPDATE_DIV = 32 clocks)
```

With random angles of arrival, software picks each sinusoid's frequency as
`f_D * cos(alpha_n)`. It adds a small random offset to each frequency and
each initial phase (phase-frequency dithering). This makes the
coefficients of different taps and different outputs statistically
independent Rayleigh processes. The hardware only accumulates whatever
increments and initial phases it is given. All 16 sinusoids of a tap are
individually programmable, so a channel can be reproduced exactly, down to
the individual components of each tap.

**Memory.** All sinusoids of a generator share one 1024 x 16-bit sine table,
which is one 18 Kbit block RAM. The table is read once per clock, one
sinusoid at a time. The sequence inside each 32-clock update period is:

| clock in period | action |
|---|---|
| 0 | clear both accumulators; read sinusoid 0 (I); advance its phase |
| 1 .. 15 | read sinusoids 1..15 (8..15 are Q), each phase then advanced; add the previous read |
| 16 | add the last read |
| 17 | `h = saturate((acc * g) >> 17)`, `h_upd` pulses |
| 18 .. 31 | idle (register writes here affect the next period cleanly) |

`UPDATE_DIV` must be at least `2*N_SIN + 2`. A slower update rate needs no
more hardware. It lowers the highest Doppler shift representable without
aliasing and stretches the staircase of the coefficient.

**Programming a Doppler frequency.** For clock `f_clk`:

```
inc = round(f * 2^32 * UPDATE_DIV / f_clk)
```

At 100 MHz this gives 252,886 for 184 Hz and 1,374 for 1 Hz. Resolution is
0.73 mHz.

**Scaling.** The sine words are `round(32767 sin(2 pi k/1024))`. The gain `g`
is unsigned Q0.16. It should include both the tap's path gain and the
normalisation. With 8 sinusoids per component, each sum has mean square
4, so `g = sqrt(2)/4` (23170) gives `E|h|^2 = 1`, that is 0 dB, and a tap at
`G` dB uses `g = 23170 * 10^(G/20)`. The coefficient is 16-bit signed with 14 fractional
bits (range +/-2) and saturates. Every register resets to zero, so a
generator nobody has programmed outputs 0 and its tap is off.

## Number formats and gain staging

| point | format |
|---|---|
| ADC sample | 12-bit signed I and Q |
| coefficient `h` | 16-bit signed, 14 fractional bits |
| tap product | 29-bit signed, 14 fractional bits over the input scale |
| tap sum (7 taps) | 32-bit signed, same scale |
| attenuator gain | `round(2^15 * 10^(-code/200))`, code in 0.1 dB, 0..690 |
| DAC word | 16-bit signed: `sat16((sum * gain) >> 25)` |
| I/Q correction | `I' = gI*I/2^14 + dcI`, `Q' = (gQ*Q + p*I)/2^14 + dcQ`, Q2.14 coefficients, saturating |

At 0 dB attenuation, a full-scale 12-bit input through a unit coefficient
gives a full-scale 16-bit word. The four extra DAC bits keep resolution when the
signal is attenuated. A channel whose taps add up to more than unity can
saturate the output. The `sat` port flags each output in every clock where
this happens. Shifts truncate toward minus infinity.

## Registers

Word-addressed writes, 16-bit address and 32-bit data (`cfg.we`, `cfg.addr`,
`cfg.data`). There is no read-back.

| addr[15:13] | addr[12:10] | addr[5:0] | register |
|---|---|---|---|
| output 0..5 | tap 0..6 | 0 | delay `L'` (clamped to 1023) |
| | | 1 | tap gain `g` (Q0.16) |
| | | 16+n / 24+n | phase increment of I / Q sinusoid n |
| | | 32+n / 40+n | initial phase of I / Q sinusoid n (takes effect at once) |
| output 0..5 | 7 | 0 | FPGA attenuation, 0.1 dB units (clamped to 690) |
| | | 1, 2 | I gain, Q gain (Q2.14) |
| | | 3 | phase term: fraction of I added to Q (Q2.14) |
| | | 4, 5 | I, Q DC offset (DAC LSBs) |
| | | 6 | output analog attenuator code, dB (clamped to 28) |
| 7 | any | k | input k's step attenuator code, dB (clamped to 64) |

After reset, every attenuator is at its maximum and every tap gain is 0, so
the site is silent until software opens a path. I/Q correction resets to the
identity.

## Timing

Every port carries one sample per clock. There is no valid or ready signal.
Through a tap with delay `L'`, an input sample reaches `dac_out` after
`5 + L'` clocks. These are the delay line's read register, the multiplier,
the tap sum, the attenuator and the I/Q correction. A new coefficient
(`coef_upd`) is used by the multiplier in the clock after it appears.
Register writes to the output stage take one clock. A change of attenuation
code takes one more, for the gain lookup.

All flops reset asynchronously on `rst_n` low. Memories are not reset.

## Channel profiles

Sizes needed by the profiles used to evaluate WiNeTestEr:

| profile | taps | longest delay | samples at 100 / 200 MHz | fits in 7 taps x 1024 |
|---|---|---|---|---|
| Environment 1: one tap, 0 dB, 1 Hz Doppler | 1 | 0 ns | 0 / 0 | yes |
| Environments 2, 3, 4: first 2, 3, 4 taps of ITU Vehicular A, 184 Hz Doppler | 2-4 | 1090 ns | 109 / 218 | yes |
| ITU Vehicular A, all six taps (0, -1, -9, -10, -15, -20 dB) | 6 | 2510 ns | 251 / 502 | yes |

The largest delay is 1023 clocks, which is 10.2 us at 100 MHz or 5.1 us at
200 MHz.

Each tap uses 2 block RAMs of 18 Kbit for its delay memory and 1 for its sine
table. Six outputs of seven taps take 126 block RAMs. The Virtex-4 device on
the site board has 376.

`tb/tb_channel_profiles.sv` programs each of these profiles into a
full-size site with the profile's delays (at 100 MHz) and tap gains. It
checks every output word against a model. It also runs one tap at the real
184 Hz Doppler for enough clocks to see the coefficient move.

## Where this RTL goes beyond its source, or departs from it

The source material describes the tap structure and the delay-line
addressing in detail. It also gives the counts: 2 inputs, 6 outputs, 7 taps,
1024-sample delays, 12-bit ADCs, 16-bit DACs. It gives the FPGA
attenuation's range and step, and the purpose of the I/Q adjustment. The
following are this design's own choices, and the places to look first if
you compare it against real WiNeTestEr hardware:

- **Fading generator internals.** The published structure generates one
  Rayleigh channel from one block RAM, with optimized word lengths and update
  rate. Its details were not available. This one is a plain time-multiplexed
  sum of sinusoids. The sizes are chosen here: 8 sinusoids per component,
  32-bit phases, 16-bit table, 1 update per 32 clocks. It is not the
  published optimized structure, though it shares its key property of one
  block RAM per channel.
- **Where the tap gain is applied.** Here it is inside the fading generator.
- **Which input feeds which output.** Here each board's input feeds that
  board's three outputs.
- **The order of the output stages.** Here it is channel, then attenuator,
  then I/Q correction.
- **The I/Q correction formula.** It was chosen here.
- **The register map and bus.** Both are defined here, and there is no
  read-back.
- **The one-clock RAM read latency.** It is added to every tap.
- **No line-of-sight (Rician) component.** Every listed profile has a
  K-factor of -99 dB.
- **Parameter changes take effect when written.** Two sites emulating the
  two directions of a reciprocal link must apply settings at the same
  moment. That is done by software, which writes at an agreed time.
  Registers are not double-buffered.

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/winetester_pkg.sv tb/tb_winetester_site.sv --top-module tb_winetester_site
./obj_dir/Vtb_winetester_site
```

Substitute any `tb_<name>` for the module-level tests, or `tb_channel_profiles`
(a few seconds; it simulates 3 ms of a 184 Hz fading tap). `tb_winetester_site`
runs the whole site at its default size. It uses the ITU Vehicular A delays
on output 0, a maximum-delay, saturating tap on output 3, a
fading tap and silent outputs. It counts every mechanism it expects to see.
It runs in well under a second. The testbenches model the expected values
themselves: sine and dB tables from floating-point math, and products in
64-bit integers. They do not reuse the RTL's functions.

Parameters worth changing: `N_TAPS`, `MAX_DELAY` (delay memory depth),
`N_SIN` (1 to 8 sinusoids per component, limited by the register map) and
`UPDATE_DIV` on `winetester_site`. For more than 6 outputs or 7 taps, the
address fields in `winetester_pkg` must be widened.
