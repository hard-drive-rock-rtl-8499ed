# Hard-drive music player: FPGA tone generator

A hard drive's head actuator is a voice coil, like a loudspeaker's. Driven with
an audio-frequency current it moves, and the drive makes a tone. This RTL is
the FPGA part of a four-voice instrument built on that idea. A microcontroller
holds the song and plays it note by note. Whenever a note or the volume
changes, it sends a pitch and a volume for each of the four tracks over SPI.
The FPGA turns each track into a sine tone and drives one H-bridge board per
hard drive with a 40 MHz PWM stream.

```
 microcontroller ──SPI──> spi_rx ──notes[0..3]──> note_core x4 ──> H-bridge boards ──> drive coils
 (song, buttons,          (frame check,            (sine DDS, volume,
  volume knob)             clock crossing,          PWM, bridge steering)
                           watchdog)
```

Everything runs from one 40 MHz clock (`clk`), except the SPI shift register,
which runs on `sck`.

## The command frame

One SPI transaction updates all tracks at once. It has no header and no
checksum. What keeps it safe is its length:

* `cs` is **active high**. The controller raises it, sends the frame and
  lowers it.
* SPI mode 0: `sck` idles low and `sdi` is sampled on the rising edge, MSB
  first.
* For each track in turn, track 0 first, 24 bits are sent: the tune word's
  high byte, its low byte, then the volume byte.
* A frame counts only if exactly 96 bits (`24 * N_TRACKS`) were clocked in
  while `cs` was high. Any other length is dropped and the tracks keep playing
  what they had. A dropped byte therefore can never turn a volume into half a
  tune word.

The **tune word** is the phase increment of the track's oscillator. One unit
is 40 MHz / 2^8 / 2^16 = 2.384 Hz, so the controller sends
`round_down(f / 2.38418579)`. A tune word of 0 is a rest. The **volume** scales
the amplitude linearly, and 0 is silent. To pause, the controller sends a
frame of all zeros.

## Crossing from `sck` to `clk`

The shift register, the bit counter and the "exactly 96 bits" flag live in the
`sck` domain. The bit counter is cleared asynchronously while `cs` is low. The
`clk` domain passes `cs` through a two-flip-flop synchroniser. While the
synchronised `cs` is low, it copies the whole shift register and the flag on
every clock.

This is the only crossing. It is safe because the `sck`-domain registers change
only on `sck` edges, and `sck` toggles only while `cs` is high. The condition
is that the controller leaves at least three `clk` periods (75 ns) between an
edge of `cs` and the nearest `sck` edge. At the controller's 244 kHz SPI clock,
that margin is easy to meet.

The notes change three to four clocks after `cs` falls. `reset` also clears
the `sck`-domain counter and flag asynchronously, because that domain has no
clock while `cs` is low.

## Watchdog

If the controller hangs in the middle of a note, the drives would hum
forever. To prevent this, `spi_rx` counts clocks since the last frame whose
content differed from the previous one. When the `WD_W`-bit counter saturates,
every track is silenced. That takes 2^26 clocks = 1.68 s at the default. A
repeat of the same frame does not re-arm it; a frame with different content
does.

This also means that a single note held for more than 1.68 s without any other
change is cut off. That is how the original system behaves. A controller that
wants longer notes has to vary a frame, or the counter must be made wider
(`WD_W = 27` gives 3.36 s).

## Tone synthesis (`wave_gen`, `sine_lut`)

Each track is a direct digital synthesiser that is clocked once per sample. A
sample is produced every 256 clocks, which gives 156.25 kHz.

* A 16-bit phase accumulator adds the current tune word per sample.
* Bit 15 of the phase is the sign. Bit 14 selects a rising or a falling
  quadrant. Bits 13..4 address a 1024 x 8-bit table that holds only the first
  quarter of a sine.
* Falling quadrants read the table backwards, using the complemented address.
  Table entry i is `round(255 * sin(pi/2 * (i + 0.5) / 1024))`. Because of
  the half-step offset, reading backwards gives exactly the mirror image.
* The table is computed during elaboration by an integer Taylor series. No
  data file is needed.
* The output is a sign bit plus an unsigned 8-bit amplitude, registered at the
  sample.

**Note changes wait for the end of a wave.** A new tune word is taken only at
the sample where the accumulator has just wrapped after a negative half-wave,
so every note ends on a whole cycle. If the track is silent (tune word 0), the
new word is taken at once. At the switch, a zero sample is emitted and the
accumulator restarts at the new tune word. The wave therefore never jumps,
and there is no net DC pulse on the coil. As a result, a new note starts up to
one period of the old note late: 2.3 ms for A4.

## Volume and PWM (`note_core`, `pwm_gen`)

* The volume is copied into the track at each sample request. A volume change
  therefore never alters a PWM period that has already started.
* The magnitude is `round(amplitude * volume / 256)`. The result is guarded
  against overflow past 255, which 8-bit operands cannot actually reach.
* `pwm_gen` runs a free 8-bit counter. The sample request is the clock where
  the counter is 0. The PWM bit is high while `counter < magnitude`, so within
  each 256-clock window the output is high for exactly `magnitude` clocks, and
  magnitude 0 is truly silent. After reset, the counter starts at 128.
* Sample k is requested at clock edge S_k. It controls the bridge outputs from
  edge S_k + 2 to edge S_k + 257: one clock for the PWM compare register and
  one for the output register. The sign is delayed by one clock inside
  `note_core`, so that the sign and the PWM bit of the same sample reach the
  bridge together.

## Driving the H-bridge (`output_gen`)

Each output board is an N-channel H-bridge with two half-bridge gate drivers.
The drivers supply the dead time. Per side, `*_en` enables the driver and
`*_high` selects the high-side FET (otherwise the low-side FET is on).

| state                 | left_en | left_high | right_en | right_high |
|-----------------------|---------|-----------|----------|------------|
| reset                 | 0       | 0         | 0        | 0          |
| PWM low               | 1       | 0         | 1        | 0          |
| PWM high, positive    | 1       | 0         | 1        | 1          |
| PWM high, negative    | 1       | 1         | 1        | 0          |

While the PWM bit is low, both low-side FETs are on and the coil freewheels.
The two high sides are never on together; an assertion in `output_gen` checks
this.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `hdr_top`, `spi_rx` | `N_TRACKS` | 4 | tracks, frame length 24 bits each |
| `hdr_top`, `spi_rx` | `WD_W` | 26 | watchdog counter width, 2^WD_W clocks |
| `sine_lut` | `ADDR_W`, `AMP_W` | 10, 8 | quarter-wave table depth and width |

The shared widths are in `hdr_pkg`: a 16-bit tune word, 8-bit volume,
amplitude and PWM counter, and a 10-bit table address. The wave generator
assumes the table address sits just below the two quadrant bits of the
accumulator.

## Where this RTL departs from the original design, and what it adds

* **Switch point.** The original logic switches notes at the crossing from
  the positive to the negative half-wave, although its own description speaks
  of the end of the wave. This RTL switches at the end of the wave. It also
  restarts the accumulator at the new tune word instead of at zero.
* **Falling quadrants.** The original addressed falling quadrants with
  `0 - index`. That reads the 0-degree entry at the 90-degree point, once per
  quarter. This RTL uses the complement, with a table built to match.
* **Sign alignment.** The one-clock sign delay in `note_core` is new. Without
  it, the last PWM clock of each sample is steered by the next sample's sign.
* **PWM compare.** The original describes its compare both as "less than or
  equal" and as "less than". This RTL uses "less than".
* **Clock crossing.** The `cs` synchroniser and the asynchronous reset of the
  `sck` domain are additions.
* **Watchdog.** It silences the tracks as soon as it trips. The original
  zeroed them only while a valid frame was held.
* **Watchdog length.** The original quotes about 3.4 s, but its counter is 26
  bits wide, which is 1.68 s. This RTL follows the counter width.
* **Sine table.** The original loads the table from a file that is not
  available. Its contents here are the formula given above.

Not in this RTL: the microcontroller and its firmware (song storage, play and
pause buttons, volume knob through the ADC, the MIDI-derived note tables), the
H-bridge boards and the drives. Their signals are the ports of `hdr_top`.

## Files

| file | content |
|------|---------|
| `rtl/hdr_pkg.sv` | widths, the `note_packet_t` struct (tune word and volume) |
| `rtl/hdr_top.sv` | top: `spi_rx` and one `note_core` per track |
| `rtl/spi_rx.sv` | SPI slave, frame check, clock crossing, watchdog |
| `rtl/note_core.sv` | one track: `wave_gen`, volume, `pwm_gen`, `output_gen` |
| `rtl/wave_gen.sv`, `rtl/sine_lut.sv` | phase accumulator and quarter-wave sine table |
| `rtl/pwm_gen.sv`, `rtl/output_gen.sv` | PWM counter and H-bridge steering |
| `tb/tb_<module>.sv` | self-checking unit testbenches |
| `tb/tb_hdr_top.sv` | end-to-end scenario with a shortened watchdog |
| `tb/tb_hdr_top_full.sv` | default sizes, 244 kHz SPI, including the 1.68 s watchdog |
| `tb/tb_hdr_frame_demo.sv` | two-tone demonstration frame, pitch measured at the outputs |
| `tb/sam_spi_model.sv` | model of the controller's SPI transmitter |
| `tb/track_monitor.sv` | per-track reference model and checker |

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and stop by themselves.
From the project root:

```
verilator --binary --timing --assert -j 0 -y rtl -y tb rtl/hdr_pkg.sv \
          tb/tb_hdr_top.sv --top-module tb_hdr_top -o sim
./obj_dir/sim
```

Replace `tb_hdr_top` with any other testbench name. The unit and end-to-end
testbenches finish in seconds. `tb_hdr_top_full` simulates 1.7 s of real time
(about 68 million clocks) and takes about a minute.

`track_monitor` recomputes every sample of every track with real arithmetic.
It checks each 256-clock window of the bridge outputs to the exact clock
count. A change to the datapath therefore shows up as a window mismatch, with
the time, the expected magnitude and the counts that were observed.

In a two-state simulator, an asynchronous clear acts only on an edge. The
testbenches therefore raise `reset` and lower `cs` after time zero. Do the same
in a new testbench. Otherwise the `sck`-domain bit counter starts at a random
value, and the first frame is rejected.

## How far it is verified

Every module has a self-checking testbench, and each testbench was shown to
catch a deliberately broken copy of its module. The checks cover:

* every table entry;
* sample-by-sample agreement of the synthesiser with a real-arithmetic model;
* the PWM duty and period;
* all bridge states;
* frame acceptance and rejection, update latency, and watchdog trip and
  recovery;
* window-exact agreement of all four tracks through chords, deferred note
  changes, rests, volume changes, pause and watchdog silence;
* pitch measured at the outputs.

Timing closure on an FPGA has not been examined. The sine table reads
asynchronously, which maps to distributed memory or logic rather than block
RAM.
