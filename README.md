# Built-in self-test for a sigma-delta ADC

This is the digital half of a sigma-delta ADC that can test itself: it
measures its own offset, gain and SNDR without an FFT, a processor or a
sample memory. The idea comes from controlled sine-wave fitting. The ADC is
driven with a sine wave whose amplitude and phase are known exactly. A
bit-exact copy of that sine is then subtracted from the ADC's response,
and what is left is noise plus distortion. The power of that residue is
measured by accumulating squares, and compared with a threshold. All of it
is adders, registers, one serial (shift-and-add) multiplier and two small
digital oscillators.

The analog second-order sigma-delta modulator (the *modulator under test*,
MUT) is not part of this RTL. It has a test mode (pin `T`) in which its
input is a single-bit digital stream, converted on chip into a two-level
charge, instead of the analog input. Everything else is here:
stimulus generation, decimation, the three-step analysis and a serial
control port.

```
                 +--------+ d_bsg    +-----------+ d_mut
   a21, AmpS --->|  SBSG  |--------->|    MUT    |-------+------------------+
                 +--------+          | (outside) |       |                  |
                                     +-----------+       v (+)              |
                 +--------+   +-----------+        +-----------+       +----v----+
 a21, Y_AMP ---->|  RBSG  |-->| z^-2 phase|------->| D_MUT -   |------>|  MUX    |
                 +--------+   | compens.  |   (-)  |  D_REF    | 2 bit | (step 3 |
                              +-----------+        +-----------+       | = diff) |
                                                                       +----+----+
                                                                            v 2 bit
   +----------------------------- controller + serial port ---+   +---------------+
   |                                                           |   | sinc^3 /128   |
   +-----------------------------------------------------------+   +-------+-------+
                                                                            v 24 bit  y_DEC (ADC output)
                    Y_OS <--- offset estimator <--------------------------+ |
                                                                          | v
                                             y_RES = y_DEC - Y_OS (Y_OS/2 in step 3)
                                                  |                       |
                      amplitude estimator <-------+-----> power estimator (serial multiplier)
                        Y_AMP -> window decision           P_THDN -> threshold decision
```

## The three BIST steps

A test is defined by one frequency word `a21`, two amplitude words and
the pass/fail limits. The controller runs three steps. Each step
discards 4 decimated samples for settling, then analyses N = 2048 decimated
samples, i.e. 2^18 modulator clocks at an oversampling ratio of 128. The
frequency is chosen so that the 2048 samples hold a whole number of tone
periods (coherent sampling). Sums over the window then cancel the tone
exactly.

1. **Offset.** The stimulus generator (SBSG) plays the test tone; the
   decimated output is averaged: `Y_OS = (1/N) * sum y_DEC`. Over whole
   periods the tone averages to zero, so `Y_OS` is the ADC offset (plus the
   mean of its noise).

2. **Amplitude.** The SBSG plays a louder tone. The offset-free output is
   rectified and averaged: `Y_AMP = (1/N) * sum |y_DEC - Y_OS|`. The mean
   of |sin| is 2/pi of the peak. The step-2 stimulus is made pi/2 louder,
   so `Y_AMP` is the tone amplitude at the ADC output without a multiplier.
   `Y_AMP` is checked against an amplitude window, which catches gain errors.

3. **THD+N power.** The SBSG plays the test tone again. In the same clock
   the reference generator (RBSG) is started with `Y_AMP` as its amplitude.
   The RBSG's bit-stream is delayed by two clocks, which is the
   modulator's own signal delay. It is then subtracted from the MUT's
   bit-stream before decimation. What remains after decimation is noise,
   distortion and offset. The offset is removed and the squares are
   accumulated: `P_THDN = (1/N) * sum y_RES^2`. P_THDN below the threshold
   passes.

The subtraction happens on the single-bit side, before the decimation
filter. That costs one 2-bit subtractor instead of a multi-bit reference
path. It works because the modulator's in-band content is the same before
and after decimation.

SNDR follows from the two measurements: the signal power is (amplitude)^2/2,
with the amplitude known from the test set-up and confirmed by `Y_AMP`,
over `P_THDN`.

## Bit-stream generators (`bsg`)

Both generators are the same circuit: a two-register digital resonator
whose output is turned into a bit-stream by a second-order digital
sigma-delta modulator. The modulator's output bit is fed back into the
resonator, so the resonator never needs a multi-bit multiplier:

```
v2 = R2 + (bit ? -a21 : +a21)      R2 <= v2        (Register 2, starts at AmpS)
v1 = R1 + (v2 >>> 6)               R1 <= v1        (Register 1, starts at 0; a12 = 2^-6)
modulator input = v1
modulator:  i1' = i1 + v1 - fb ;  i2 <= i2 + i1' - fb ;  bit = (i2 >= 0) ;  fb = bit ? +2^30 : -2^30
```

The modulator has a delay-free first integrator and a delaying second one.
Its signal transfer function is exactly z^-1 and its noise transfer
function is (1 - z^-1)^2. With STF = z^-1 the bit fed back is the
resonator's own previous output plus shaped noise, so the loop is a
lossless resonator:

* frequency: `f = f_CLK * acos(1 - a12*a21/2) / (2*pi)` (for a12*a21 < 2);
* amplitude: the tone's peak is `Register2_init * k` with
  `k = sqrt(a12 / a21)` (to first order), not `Register2_init` itself.
  At 1 kHz and 6.144 MHz, k = 15.16.

Number format: 32-bit two's complement, full scale (0 dBFS) = 2^30, and
`a21` in the same Q2.30 format. The integrators are 34 bits. Everything
wraps. The generator overloads when its tone approaches full scale:
keep the modulator input below about 0.8.

## Setting up a test

For a tone of `j` cycles per 2^18 clocks (coherent for N = 2048,
OSR = 128), an amplitude `A` (full scale 1) and a sinc^3 response `|H|`
at that frequency:

```
w      = 2*pi*j / 2^18
a21    = round( 2*(1 - cos w) * 64 * 2^30 )              -> REG_A21
k      = sqrt( (1/64) / (a21 / 2^30) )
|H|    = ( sin(128*pi*j/2^18) / (128*sin(pi*j/2^18)) )^3
AmpS13 = A*|H| / k * 2^30                                -> REG_AMPS_H  (steps 1 and 3)
a2     = A * (pi/2) * (2/k)                              (step-2 tone, full scale 1)
AmpS2  = a2 / k * 2^30                                   -> REG_AMPS_C  (step 2)
Y_AMP expected = a2*(2/pi)*|H| * 2^21 * 2^8              (its units, see below)
P_THDN threshold for SNDR S dB = (A*|H|)^2/2 * 10^(-S/10) * 2^51
```

The factor 2/k in `a2` needs explaining. The RBSG is loaded with `Y_AMP`
unchanged. With the formats below, a `Y_AMP` word produces a reference
tone 2/k times what it should be. Scaling the step-2 stimulus by 2/k makes
up for it. This costs no hardware, because the step-2 amplitude is a
precomputed setup word anyway. When k = 2 (about 7.6 kHz at 6.144 MHz) it
reduces to the plain A*pi/2. The step-2 tone is smaller than A*pi/2 at
low frequencies and larger at high ones. Above roughly 7.5 kHz, at
-6 dBFS, it exceeds 0.7 of full scale and the generator overloads. That
sets the test bandwidth (see the results below).

## Output response analyzer

* **Decimation filter (`decimation_filter`)**: a third-order CIC (sinc^3)
  decimator by 128. Its 2-bit input is +1/-1 for the plain MUT stream.
  The output is 24 bits with a DC gain of 2^21, so a full-scale input
  gives 2^21. One output every 128 clocks with a one-cycle `dout_valid`.
  This is also the ADC's normal output (`adc_out`).
* **Difference stream (`residue_mux`)**: in step 3 the 2-bit input is
  `D_MUT - D_REF` (-1, 0, +1), which is (y_MUT - y_REF)/2. That is half
  the scale of the plain stream, so the top level subtracts `Y_OS/2` in
  step 3. P_THDN is then the residue power of the half-scale signal.
  The 2^51 in the threshold formula above includes that factor.
* **Offset estimator**: 35-bit accumulator of 24-bit samples;
  `Y_OS = acc >>> 11` (24 bits).
* **Amplitude estimator**: the absolute value costs no negator. For a
  negative sample the 23 magnitude bits are inverted, and the sign bit
  enters the 35-bit adder as carry-in, which adds `~x + 1 = |x|`.
  `Y_AMP` is the upper 32 accumulator bits: mean |y| with 8 fraction bits.
* **Power estimator**: a 24-cycle shift-and-add multiplier squares each
  sample. There are 128 clocks between samples, so a serial multiplier is
  enough. The 47-bit square is added to a 47-bit accumulator.
  `P_THDN` is the mean power with 11 fraction bits (the sum itself). The
  accumulator saturates (flag `ovf` in the status word) instead of
  wrapping.
* **Decisions**: `amplitude_decision` passes if `lo <= Y_AMP <= hi`.
  `thdn_decision` subtracts the threshold from P_THDN and passes on a
  negative result.

## Controller and serial port

`bist_controller` holds the parameter registers and sequences the steps.
`serial_io` is its SPI-style slave: mode 0, MSB first, asynchronous to
`clk` through two-flop synchronizers. Each SCLK phase must last at least
4 `clk` periods. A frame is 8 header bits `{write, 000, addr[3:0]}` and
then 48 data bits. On a read, the data comes out on `sio_sdo` during the
48 data clocks.

| addr | register | width |
|---|---|---|
| 0 | a21 (frequency word, Q2.30) | 32 |
| 1 | AmpS for steps 1 and 3 | 32 |
| 2 | AmpS for step 2 | 32 |
| 3 / 4 | Y_AMP window low / high (Q24.8) | 32 |
| 5 | THD+N threshold | 47 |
| 6 | control: write 1 to bit 0 to start | 1 |
| 7 | status {ovf, amp_pass, thdn_pass, done, busy} (read) | 5 |
| 8 / 9 / 10 | Y_OS / Y_AMP / P_THDN (read) | 24 / 32 / 47 |

A run takes 3 x (2048 + 4) x 128 = 787,968 clocks (up to 128 fewer,
depending on the decimation phase at start), about 0.13 s at 6.144 MHz.
`mut_test` (the MUT's `T` pin) is high for the whole run. At all other times `d_bsg` is held at 1, which is what the modulator needs to convert its analog input normally. `bist_done`
rises in the same cycle as the two decisions' `*_valid` outputs.

## Files

| file | contents |
|---|---|
| `rtl/bist_pkg.sv` | widths, step and source enums, register map |
| `rtl/bist_adc_top.sv` | top level; the MUT connects to `mut_test`, `d_bsg`, `d_mut` |
| `rtl/bsg.sv` | resonator + digital sigma-delta bit-stream generator |
| `rtl/phase_compensator.sv` | z^-2 on the reference stream |
| `rtl/residue_mux.sv` | 2-bit subtractor and source MUX |
| `rtl/decimation_filter.sv` | sinc^3 decimator |
| `rtl/offset_estimator.sv`, `rtl/amplitude_estimator.sv`, `rtl/power_estimator.sv`, `rtl/serial_multiplier.sv` | estimators |
| `rtl/amplitude_decision.sv`, `rtl/thdn_decision.sv` | decision makers |
| `rtl/bist_controller.sv`, `rtl/serial_io.sv` | sequencer, registers, serial port |
| `tb/mut_model.sv` | behavioural (real-valued) model of the MUT, simulation only |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_workloads.sv` |

Top-level parameters: `N_L2` (log2 of samples per step, default 11), `R`
(oversampling ratio, 128) and `SETTLE` (discarded samples per step, 4).
The widths are in `bist_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops
itself. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/bist_pkg.sv \
          tb/tb_bist_adc_top.sv --top-module tb_bist_adc_top
obj_dir/Vtb_bist_adc_top
```

Replace `tb_bist_adc_top` with any other `tb_<module>` to test one block.
`tb_bist_adc_top` runs the full-size design three times in about 1.5 s:
* the -6 dBFS, ~1 kHz test with a good modulator;
* the same test with a faulty one (10 % gain error, high noise);
* a ~7.6 kHz test.

It checks Y_OS and Y_AMP against values computed from the model and both
decisions, and counts each step, discarded sample, serial access and
decision outcome. `tb_workloads` runs the amplitude and frequency sweeps
(18 runs, about 10 s).

## Results with the behavioural modulator

The modulator model is ideal second order with STF = z^-2. It adds an
offset of -55.7 dBFS and uniform input noise of peak 1e-3. These
numbers show what the BIST reports for such a modulator, not what a
real chip does.

| test | result |
|---|---|
| -6 dBFS, 43/2^18 f_CLK (~1 kHz) | Y_OS within 0.3 % of the model offset, Y_AMP within 0.01 % of its expected value, SNDR 76.8 dB, pass |
| same, 10 % gain error and 50x noise | SNDR 45.5 dB, amplitude and THD+N fail |
| dynamic range (SNDR at -60 dBFS + 60 dB) | 83.2 dB; SNDR rises 10 dB per 10 dB of amplitude up to the noise floor |
| test bandwidth at -6 dBFS | SNDR about 76 dB up to 4 kHz, 66 to 72 dB at 6 and 7 kHz (it varies with the noise seed), 56 to 57 dB at 8 kHz; from 10 kHz the stimulus generator overloads and the measurement is meaningless |

Every testbench was also run against a deliberately broken copy of its
module, and each broken copy failed its testbench.

## Where this design departs from the published one, and its limits

* **Decimation filter.** The published prototype uses a larger filter
  (about 15 K gates) whose structure is not given. The sinc^3 used here
  has passband droop: |H| = 0.998 at 1 kHz, 0.88 at 7.6 kHz. Its alias
  rejection is weaker too. `|H|` enters the setup values, so the
  procedure still holds, but the measured noise floor includes more
  shaped quantization noise than a sharper filter would pass.
* **Step-2 amplitude.** The published procedure uses A_S*pi/2 in step 2
  and loads Y_AMP directly into the reference generator. Both cannot hold
  at all frequencies, because the reference generator's Register 2 sets
  a tone k = sqrt(a12/a21) times larger. This design keeps the direct
  load and puts the correction into the step-2 setup word (factor 2/k).
  As a result the -4 dBFS test does not overload the generator at 1 kHz
  here, but tests above about 7.5 kHz at -6 dBFS do.
* **Number formats, encodings and the control interface are this
  design's own.** This covers the full scale 2^30, Q2.30 for a21, the
  choice of Y_AMP bits, the 2-bit difference encoding with Y_OS/2, the
  P_THDN saturation, the SPI frame and register map, the settling
  discard and the reset style (asynchronous, active low). The published
  design gives the widths (32, 34, 24, 35, 47), a12 = 2^-6, N = 2048,
  OSR = 128, the estimator circuits and the z^-2 compensator, and those
  are followed.
* **Phase alignment is fixed.** The reference is delayed by exactly two
  clocks, matching a modulator whose STF phase is z^-2. A modulator with
  a different delay leaves a residue tone; there is no calibration loop.
* **Not included:** the analog modulator itself (a behavioural model is
  in `tb/`), and any embedded memory for stored test programs (the setup
  words are loaded over the serial port).

Synthesized coarsely, the whole design is about 310 word-level cells and
1,200 flip-flop bits.
