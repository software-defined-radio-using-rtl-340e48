# QPSK software-defined radio transceiver

A complete digital QPSK link (transmitter and receiver) for one FPGA clock
domain. Data bytes are cut into 2-bit symbols, differentially encoded, shaped
with a raised-cosine filter, and modulated onto a carrier at a quarter of the
clock rate. The samples go out to a 14-bit DAC. On the way back, samples from
a 14-bit ADC are mixed down by a local oscillator, filtered and decimated to
one complex value per symbol, then decided and decoded back into bytes.

The receiver's local oscillator is not locked to the transmitter's. A
decision-directed phase-locked loop measures how far each received symbol is
rotated away from the nearest constellation point. It steers the
oscillator's frequency until the constellation stops turning. The loop can
settle at any of the four QPSK lock points. Differential coding of the symbol
stream makes the decoded data independent of two of them (0 and 180 degrees;
see *Phase ambiguity* below).

At the intended 50 MHz clock the carrier is 12.5 MHz, the symbol rate
6.25 MHz (8 samples per symbol) and the byte rate 1.5625 MHz.

```
 data_rom -> tdm_8to2 -> diff_encoder -> qpsk_mapper -+-> polyphase_interp (I) -+
 (bytes)     (4 symbols   (XOR            (+-1/sqrt2)  +-> polyphase_interp (Q) -+-> upconverter -> adac_format -> dac_code
              per byte)    integrator)                                              I cos - Q sin    (signed ->
                                                                                                      offset binary)
                                                      [ DAC -> channel -> ADC : outside this design ]

 adc_code -> adac_format -> downconverter -+-> polyphase_decim (X) -+-> symbol_slicer -> diff_decoder -> sym_delay -> tdm_2to8 -> rx_byte
                            r cos, -r sin  +-> polyphase_decim (Y) -+                      (XOR with      (3 symbols)  (4 symbols
                                 ^                                  |                       previous)                  -> byte)
                                 |        carrier_recovery <--------+
                                 +------- phase_detector -> loop_filter -> freq_track
                       freq - adj         I*Y - Q*X        PI (Kp, Ki)    x K, held 8 samples
```

## Rates and handshakes

Everything runs on `clk`, with a synchronous, active-high `rst`. The rates
are set by counters rather than clock enables:

* A free-running 3-bit counter in the top strobes `sym_stb` once every 8
  clocks. Each strobe makes `tdm_8to2` emit the next symbol.
* Every fourth symbol, `tdm_8to2` pulses `byte_req`. `data_rom` then shows
  the next byte, which is used at the next group's first strobe.
* The symbol passes through the encoder and mapper with one-clock `*_vld`
  pulses. The interpolators restart their phase counter on that pulse and
  then emit one sample per clock.
* In the receiver, each decimator has its own phase counter, reset to
  `DEC_PHASE`. It produces X and Y with a `y_vld` pulse every 8 clocks, and
  every later stage is driven by that pulse.

There is no symbol-timing recovery. Transmitter and receiver share the clock,
and `DEC_PHASE` fixes the sampling instant. `DEC_PHASE = 0` samples at the
pulse peak when the ADC code is the DAC code delayed by one register. A
channel with a different delay needs a different `DEC_PHASE`.

## Number formats

| Point | Format |
|---|---|
| Mapper output, interpolator in/out | signed 32 bit, 31 fraction bits; symbol levels +-1518500250 = +-1/sqrt(2) |
| Filter taps | signed 16 bit, 14 fraction bits |
| Oscillator | 32-bit phase accumulator; increment 2^30 = clock/4; 1024-entry table, signed 16 bit, full scale 32767 |
| DAC / ADC code | 14-bit offset binary: code = signed value + 8192, i.e. the MSB inverted |
| Mixer outputs, decimator outputs X/Y | signed 16 bit, 15 fraction bits |
| Phase error | signed 18 bit |
| Kp, Ki | signed 32 bit, 31 fraction bits |
| Loop filter output | signed 32 bit, 15 fraction bits |
| K | signed 32-bit integer |
| Frequency correction `freq_adj` | signed 32 bit, in oscillator increment units (2^-32 of the clock rate) |

The interpolator divides by 2 (`SHIFT = 15`) so that raised-cosine overshoot
stays inside the 32-bit range. The decimator's DC gain is about 2
(`SHIFT = 16`). With a direct loopback each axis of a received symbol is about
13770 LSB at the decimator output. Both filters saturate instead of wrapping.

## The raised-cosine filters

Both filters use the same 64 taps (`qpsk_pkg::RC_COEF`):

    h[n] = sinc(t) * cos(pi*B*t) / (1 - (2*B*t)^2),   t = (n - 31.5)/8,   B = 0.5

The taps are scaled so that the two centre taps are 16384, then rounded.

* **Interpolator.** Zero-stuffing by 8 and then filtering would waste 7 of 8
  multiplications. Instead the filter is split into 8 phases of 8 taps.
  Output phase p of symbol m is `sum_k h[8k+p] * x[m-k]`: 8 multipliers
  whose coefficients are selected by the phase counter.
* **Decimator.** The input is dealt into 8 branches. When a sample of branch
  q arrives, it enters that branch's 8-sample delay line. The branch's taps
  `h[8k + 7 - q]` produce a partial sum, which is accumulated. The sample of
  branch 7 completes the output. Again 8 multipliers, busy every clock.

The same raised-cosine pulse is used at both ends, so the combined response
is not free of inter-symbol interference. The residual ISI at the symbol
instants is about 12% from each neighbour. In the worst case this closes the
eye to about 56% of its opening. That is ample for hard decisions without
noise, but a root-raised-cosine pair would be the better choice in a noisy
channel. The source design asked for a 64-tap filter with a pass band to
0.25*pi and a stop band from 0.325*pi at -30 dB. The roll-off of 0.5 and the
16-bit taps are this implementation's choices.

## The carrier-recovery loop

This is the part that needs care when the design is changed.

**Phase detector.** With hard decisions `I^ = sign(X)` and `Q^ = sign(Y)`,
`err = I^*Y - Q^*X`. If a corner of amplitude A per axis is rotated by a
small angle d, then `err = 2A*sin(d)`. The error is positive when the
constellation has turned counter-clockwise. The error is not divided by the
signal magnitudes. The gain K below absorbs the amplitude instead, so K has
to be recomputed when the signal level changes.

**Loop filter.** A PI filter runs once per symbol:
`integ += Ki*err; v = Kp*err + integ`. Kp and Ki follow from the loop
bandwidth BW and the symbol rate fs, with theta = 2*pi*BW/fs:

    Kp = 2*sqrt(2)*theta / (1 + sqrt(2)*theta + theta^2)
    Ki = 4*theta^2       / (1 + sqrt(2)*theta + theta^2)

At BW = 1 kHz and fs = 6.25 MHz these give Kp = 6097576 and Ki = 8669 in
Q.31. That is the setting used in all tests.

**Gain K and the oscillator.** `freq_track` holds v for the whole symbol and
multiplies it by K in a 4-cycle pipelined multiplier. The product (scaled by
2^-15) is subtracted from the receive oscillator's phase increment on every
one of the symbol's 8 samples. Applying the correction as a frequency change
gives the second integration of a type-2 loop, which follows a constant
frequency offset with zero steady-state phase error. For the PI formulas to
hold, K must turn "detector LSBs" into "increment LSBs per sample":

    K = -2^32 / (2*pi * 8 * 2A) = -2^32 / (32*pi*A)

The sign is negative because the correction is subtracted. With A = 13770
this gives K = -3102.

**Behaviour.** The receive oscillator is set 1e-5 of the clock rate (42950
LSB) above the carrier. With the settings above, the mean correction settles
at about 42850 within a few thousand symbols. `carrier_rec_reset` clears the
integrator and the held correction. While it is held, the constellation
keeps turning. The observation ports (`x_out`, `y_out`, `phase_err`,
`freq_adj`) show lock.

## Phase ambiguity and differential coding

A QPSK loop cannot tell which quadrant is "first", so it locks with a fixed
error of 0, 90, 180 or 270 degrees. The transmitter therefore sends each bit
of a symbol as a running XOR (`e[n] = e[n-1] ^ d[n]`). The receiver decodes
with `d[n] = e[n] ^ e[n-1]`.

* An inversion of I, of Q, or of both cancels in this difference. The
  180-degree lock is the inversion of both bits. The slicer's own inversion
  is also removed this way: its sign-bit-then-NOT decision is inverted with
  respect to the mapper.
* A 90- or 270-degree lock exchanges I and Q (`(I, Q) -> (-Q, I)`). The
  per-bit XOR cannot undo this: the decoded symbols then come out with their
  two bits swapped.

The end-to-end test shows both cases. With an inverted channel the image
comes back intact. After a loop reset in the middle of a frequency offset,
the loop happened to settle 90 degrees away and the image came back with
its bit pairs swapped. Removing all four ambiguities would take a
modulo-4 phase-difference code (Gray-mapped quadrant numbers, an adder
instead of an XOR). That is not what this design implements.

## Byte alignment

The receiver must group symbols into bytes at the same boundaries as the
transmitter. `tdm_2to8` starts counting at reset. `sym_delay` delays the
decoded stream by `SYS_DELAY` symbols so that the total latency is a whole
number of bytes. With the pipeline as built, `SYS_DELAY = 3`; the original
design used 2 for its own latencies. Any change to a latency on the symbol
path, including the channel delay, needs a matching change here. The
received image then appears 5 bytes after the first byte counted from the
start of transmission. That is 20 symbol periods (160 clocks, 3.2 us at 50 MHz)
from data memory to received byte, the same end-to-end delay that the original
design quotes for its run-time budget. A receiver that stores an
N-byte image therefore keeps bytes 5 to N + 4 of the received stream.

## Data source

`data_rom` holds `ROM_DEPTH` bytes (625 by default: a 25 x 25 pixel, 8-bit
colour plane). It is loaded through `load_we`/`load_addr`/`load_data`. Until
`tx_run` is raised, and again after the last byte (`tx_done` high), it
supplies zero bytes. The loop can lock on this padding before the payload
starts. Storing the received bytes is left to whatever is connected to
`rx_byte`/`rx_byte_vld`.

## Files

| File | Contents |
|---|---|
| `rtl/qpsk_pkg.sv` | rates, symbol type, raised-cosine taps |
| `rtl/qpsk_sdr_top.sv` | the whole transceiver |
| `rtl/data_rom.sv`, `rtl/tdm_8to2.sv`, `rtl/diff_encoder.sv`, `rtl/qpsk_mapper.sv` | transmit data path |
| `rtl/polyphase_interp.sv`, `rtl/polyphase_decim.sv` | raised-cosine filters |
| `rtl/nco.sv`, `rtl/upconverter.sv`, `rtl/downconverter.sv` | oscillator and mixers |
| `rtl/adac_format.sv` | signed <-> offset-binary converter codes |
| `rtl/phase_detector.sv`, `rtl/loop_filter.sv`, `rtl/freq_track.sv`, `rtl/carrier_recovery.sv` | carrier-recovery loop |
| `rtl/symbol_slicer.sv`, `rtl/diff_decoder.sv`, `rtl/sym_delay.sv`, `rtl/tdm_2to8.sv` | receive data path |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_qpsk_colour_image.sv` | a full-colour 25 x 25 image (1875 bytes) through the whole link |

`nco` fills its sine table at start-up with `$sin`. Simulators and
most FPGA tools evaluate this; a flow that does not must supply the same
table as a memory initialisation file.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl rtl/qpsk_pkg.sv \
        tb/tb_qpsk_sdr_top.sv --top-module tb_qpsk_sdr_top
    ./obj_dir/Vtb_qpsk_sdr_top

Replace the testbench name to run another. `tb_qpsk_sdr_top` uses every
default parameter. It loads a 625-byte test image, loops the DAC back to
the ADC, and runs three transfers from reset:

1. a direct channel;
2. an inverted channel;
3. a loop held in reset and then released.

For each it checks that the frequency offset is tracked and that the image
comes back byte for byte at one byte per 32 clocks. It also checks that the
memory stops after the last byte. It takes well under a second.

`tb_qpsk_colour_image` sets `ROM_DEPTH` to 1875 and sends a full-colour
25 x 25 test picture: three 625-byte planes, red, green and blue, one after
the other. It uses an inverted channel with the same frequency offset. Every
byte of all three planes must come back unchanged. The image must start at
the same received byte as the single plane does, so that no colour is
inverted or shifted.

The module testbenches compare against independent models. Examples: a
direct 64-tap convolution for both filters, `$sin`/`$cos` for the oscillator,
64-bit arithmetic for the loop filter. `tb_carrier_recovery` closes the loop
around a behavioural rotating-phasor channel. It checks frequency pull-in,
residual phase and the 7-clock response latency. On every symbol it also
compares the phase error and the correction with a bit-exact integer model
of the detector, the PI filter and the gain stage.

## Not included

* The DAC, the ADC and the analog path between them. The top has
  `dac_code` out and `adc_code` in; the testbench connects them through a
  register.
* Capturing and storing the received image, and the board's DSP processor
  that controls the converters.
* Symbol-timing recovery and automatic gain control. Neither is part of the
  original design, which shares one clock between transmitter and receiver.
