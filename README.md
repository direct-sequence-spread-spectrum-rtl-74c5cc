# DS-SS offset-QPSK baseband transmitter

This is the baseband half of a small spread-spectrum sensor transmitter. A
sensor is sampled by a 12-bit A/D converter. The readings are packed into
128-bit frames. Each frame goes out as a short burst of direct-sequence spread
spectrum. Each data bit is multiplied by a 127-chip pseudo-noise (PN) code at
10 Mchip/s, so a narrowband bit stream becomes a noise-like wideband signal.
The receiver can pull it back out by correlating with the same code.

The modulation is offset QPSK with differential encoding:

* The odd bits of the frame ride on the I channel and the even bits on the Q channel.
* Each channel is differentially encoded and spread with its own PN code.
* Every chip is shaped as a half sine, four samples per chip.
* The Q channel runs half a chip (two samples) behind I. With half-sine
  chips this gives a constant-envelope signal.

The two 12-bit sample streams feed two D/A converters. The analog I/Q
up-conversion to the 2.4 GHz band happens off-chip.

The logic is split over two FPGAs, as on the original two-FPGA prototype
board:

* `fpga_i` does almost everything: the A/D, the framing, both encoders and the I channel.
* `fpga_q` spreads and shapes the Q channel.
* `dsss_tx` wires the two together.

This structure and the numbers that define the signal follow the published
design "Direct Sequence Spread Spectrum Transmitter using FPGAs" (Pandya,
D'Souza, Chae). These numbers are 128 bits per frame, 127 chips per bit,
4 samples per chip, 10 MHz chips, 80 MHz board clock, 12-bit A/D and the
2-sample Q offset. Everything that publication leaves open was filled in here;
those choices are listed in the last section.

## Rates

| quantity | value | where it comes from |
|---|---|---|
| board clock | 80 MHz | published design |
| sample rate (D/A clock) | 40 MHz | 4 samples x 10 MHz chips |
| chip rate | 10 MHz | published design |
| chips per bit | 127 | published design |
| bits per frame | 128 (64 on I, 64 on Q) | published design |
| burst length | 64 x 127 x 4 = 32,512 samples = 812.8 us | follows |
| burst bit rate | 2 bits / 12.7 us = 157.5 kbit/s | follows (published: "~150 kbps") |
| A/D period T | 1/3 s (26,666,667 clocks) | this design's choice |
| frame period | 6 x T = 2 s, so 64 bit/s on average | chosen to match the published 64 bps average |

## The frame

The frame is 128 bits, sent most significant bit first:

| bits | field | value |
|---|---|---|
| 127:112 | preamble | `1110 1101 0011 0111` |
| 111:104 | frame sync | `1000 1111` |
| 103:88 | unit ID | parameter `UNIT_ID` |
| 87:72 | sequence number | counts frames from 0 after reset |
| 71:0 | sensor data | six 12-bit A/D readings, oldest first |

Bit 127 is frame bit 1, an odd bit, so it is the first I bit. Bit 126 is the
first Q bit, and so on. `frame_assembler` does this split when it loads the
frame: it fills a 64-bit I shift register and a 64-bit Q shift register.
After that, each `advance` moves both registers to the next pair.

## Differential encoding

Read logic 1 as +1 and logic 0 as -1. Each encoded bit is then the product of
the input bit and the previous encoded bit. In logic terms it is
`q <= ~(d ^ q)`, the XNOR truth table:

| in | previous out | out |
|---|---|---|
| 0 | 0 | 1 |
| 0 | 1 | 0 |
| 1 | 0 | 0 |
| 1 | 1 | 1 |

The receiver undoes this the same way: raw = XNOR(this encoded bit, previous
encoded bit). Both encoders are reset to +1 (logic 1) at the start of every
frame, so each burst decodes on its own.

## Spreading and shaping

`spread_shape` holds one encoded bit for 127 chips. Each chip is
XNOR(bit, PN chip), which is again a +-1 product.

The PN codes are maximal-length 7-stage LFSR sequences, so their period is
exactly 127. They are:

* I: a[n+7] = a[n] ^ a[n+1]
* Q: a[n+7] = a[n] ^ a[n+3]

Both start from the all-ones state. Each bit therefore carries exactly one
full code period.

`pulse_shaper` turns a chip and a sample index k into a 12-bit two's complement word:

* `+/- round(2047 * sin(pi*k/4))`, which gives 0, 1447, 2047, 1447 for k = 0..3.
* A 1-chip gives the positive half-sine and a 0-chip the negative one.
* Between bursts the output is 0, which is mid-scale for the D/A.

With the Q samples two positions later, I^2 + Q^2 is the same at every sample.
The I/Q trajectory is therefore a circle.

## The half-chip offset across two devices

This is the part that needs the most care. The Q channel lives on another
device, yet it must start exactly two samples after I, take each new bit
exactly 127 chips after the last, and never see a bit change under it. The
scheme is:

1. **One timebase.** Both devices run from the same 80 MHz clock and reset.
   Each has its own `clk_gen`, which produces a one-cycle `sample_en` every
   second clock. Every sample-rate register in the design advances only on
   `sample_en` cycles, so the two devices' sample instants are in phase.
2. **I start.** When six new A/D readings have arrived, `tx_ctrl` does three
   steps:
   * It loads the frame and resets the encoders (LOAD).
   * One clock later it encodes bit pair 0 (ENC0).
   * On the next `sample_en` cycle it starts the I channel (START).

   The I channel takes its first encoded bit in that cycle. After that it
   takes one bit at the end of every 127th chip. Each take raises `bit_take`.
3. **Q start.** `q_offset_ctrl` delays each I `bit_take` event by two
   `sample_en` periods in a 2-stage shift register. The delayed event is the
   instant the Q channel takes the same pair's Q bit. Only the first delayed
   event of a frame is sent to `fpga_q` as `q_start`. After that, `fpga_q`
   counts 127 chips on its own, and these counts land on the same instants.
4. **Next pair.** One clock after each delayed event, `advance` shifts the
   frame registers. One clock after that, the encoders take the new pair.
   By then both channels have taken the current pair. The next I take is
   506 samples away, so `q_bit` from `fpga_i` is stable whenever `fpga_q`
   samples it.
5. **End of burst.** After the 64th bit the I channel raises `done`.
   `tx_ctrl` stays in the transmission state for one more chip (GUARD) while
   Q finishes its last two samples. It then goes back to collecting readings.

Timeline in 40 MHz sample periods, where t = 0 is the cycle in which I starts:

```
t = 0        I takes bit 0, I sample (0,0,k=0) appears at t = 1
t = 2        q_start: Q takes bit 0; Q sample 0 appears at t = 3
t = 2 + 1clk advance: frame registers shift; encoders update one clock later
t = 508      I takes bit 1       t = 510   Q takes bit 1, then advance
...
t = 32512    I puts out its last sample and raises done; Q two samples later
```

The inter-device signals are `q_bit` (held for a whole bit) and `q_start` (one
pulse per frame). The published design describes only a start signal from the
I device to the Q device; holding `q_bit` and using the Q device's own count
for later bits is this design's way of filling that in.

## Clocks and converters

`clk_gen` also makes the D/A clock, which is the 40 MHz clock inverted. It is
driven from a register, so it has no glitches. Its rising edge falls one board
clock after each sample update, in the middle of the time the word is stable.

`adc_if` pulses `adc_convst` once every `PERIOD` clocks. It then waits
`CONV_CYCLES` (8) clocks and latches the parallel 12-bit `adc_data`. The
converter itself, the D/A converters and the RF board are not part of the
RTL: their signals are the ports of `dsss_tx`.

The transmission-state LEDs are:

* `led_i`: high from START to the end of GUARD.
* `led_q`: high while the Q channel is active.

## Files

| file | contents |
|---|---|
| `rtl/dsss_pkg.sv` | constants, frame layout, half-sine table, PN feedback masks |
| `rtl/clk_gen.sv` | 40 MHz sample enable and inverted D/A clock |
| `rtl/adc_if.sv` | periodic A/D read |
| `rtl/frame_assembler.sv` | sample buffer, frame build, odd/even split, bit-pair shifter |
| `rtl/diff_encoder.sv` | XNOR differential encoder |
| `rtl/pn_gen.sv` | 127-chip LFSR |
| `rtl/pulse_shaper.sv` | half-sine lookup, 4 samples per chip |
| `rtl/spread_shape.sv` | one channel: bit hold, spreading, sequencing, shaping |
| `rtl/q_offset_ctrl.sv` | 2-sample delay of bit-take events, `q_start`, `advance` |
| `rtl/tx_ctrl.sv` | frame trigger and transmission state machine |
| `rtl/fpga_i.sv`, `rtl/fpga_q.sv` | the two devices |
| `rtl/dsss_tx.sv` | top: both devices wired together |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/dsss_ref_pkg.sv` | reference model: PN recurrences, `sin()`, frame builder |
| `tb/dsss_rx_check.sv` | testbench receiver: sample-exact compare, despreading, decoding |
| `tb/adc_model.sv` | behavioural A/D converter |

Parameters of `dsss_tx`:

* `ADC_PERIOD` (default 26,666,667 clocks): the A/D period.
* `UNIT_ID` (default 16'h0001): the unit ID sent in each frame.

The signal constants are in `dsss_pkg`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/dsss_pkg.sv tb/dsss_ref_pkg.sv tb/dsss_tx_tb.sv --top-module dsss_tx_tb
./obj_dir/Vdsss_tx_tb
```

Swap in any other `tb/<module>_tb.sv` and `--top-module` the same way.

* `dsss_tx_tb` uses a 12,000-clock A/D period and sends three frames. It
  checks every sample of both channels against the reference and decodes
  every field. It also checks the Q offset, the burst length, the frame
  spacing, the A/D period, the D/A clocks and the LEDs, and that each of
  these events happened.
* `dsss_tx_full_tb` keeps every default and simulates 2 s of operation
  (160 M clocks, a few minutes) up to and through the first burst.

## How far to trust it

What the testbenches establish:

* Every module has its own testbench against an independent model. For
  example, the PN codes are checked against their recurrences and the shaper
  against `sin()`.
* Each testbench was also run against a deliberately broken copy of its
  module, and every one of them reported failures.
* The end-to-end runs show that the D/A sample streams are exactly the
  intended OQPSK waveform.
* A correlating receiver recovers the frame from those streams.

What they do not establish:

* Nothing has been run on hardware.
* Timing between two physical devices (skew on `q_bit`/`q_start`) is not
  modelled.

## Choices made here that the published design does not fix

* **Frame fields.** Only the list of fields is published. The preamble and
  sync values are taken from a bit pattern printed in its block diagram.
  The field widths, the sequence counter and the six readings per frame are
  choices made here.
* **A/D protocol and period.** The convert strobe and the 8-cycle conversion
  time are assumed, and so is T = 1/3 s.
* **PN codes.** The polynomials and the seed are assumed; only the 127-chip
  length is published.
* **Shaping.** The half-sine sampling phase (sin(pi*k/4)), the amplitude and
  the D/A word format are assumed.
* **Encoder start.** The encoder reference at frame start is +1.
* **Q offset.** The published text describes the Q offset both as a delay on
  the Q path and as a delayed start signal. The delayed start is built; the
  two give the same output.
* **Modulation name.** The parameter table calls the modulation DQPSK; the
  text calls it OQPSK. Both are built: differential encoding with a Q offset.
* **Clocking.** One clock with enables is used instead of separate 40 MHz or
  10 MHz clock domains.
* **Reset.** Reset is synchronous and active high.
