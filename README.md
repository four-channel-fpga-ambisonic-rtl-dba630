# Four-source ambisonic panner on an FPGA

This design takes four mono audio streams from a PC over USB and places each one at
its own point on a plane around the listener. It plays the result through four
loudspeakers at the corners of a square. The placement uses two-dimensional
third-order ambisonics:

- each source is *encoded* into a set of circular-harmonic signals that depend only on
  its direction and distance;
- the four encoded sets are added into one sound field;
- the field is *decoded* once for every loudspeaker position.

A 1024 x 768 display shows a map of the four sources. Push buttons move them, and four
stored presets can be recalled. When a preset changes, the sources glide to their new
places instead of jumping.

The hard trigonometry is done ahead of time. Every coefficient the encoders need is
stored in tables addressed by the source coordinate, so the real-time datapath does
only two things: multiply 16-bit numbers and add them.

## Signal flow

```
 USB FIFO chip ──► usb_reader ──► 4 samples per frame ──────────────┐
 (DLP-USB245M)     (8-state reader, 4096-byte buffer)               │
                                                                    ▼
 buttons ─► debounce ─► ambisonic_ui ─► preset_manager ─► sync_coord ─► coeff_full ─► enc_multiplier x4
                         │   (65 MHz video domain)          (3 flops)   (11 ROMs)           │
                         ▼                                                                  ▼
                   xvga timing, map, blobs, ring                                         summing
                                                                                            │
                                                    pcm1681_driver ◄── output latch ◄── decoder x4
                                                    (sclk, bclk, lrclk, 4 data lines)    (corner speakers)
```

There are two clock domains:

- **Audio:** 36.864 MHz, which is 768 clocks per 48 kHz frame. The board generates
  36.818 MHz, which plays 0.1 % slow; that is harmless.
- **Video:** 65 MHz, for XGA.

Only the four 17-bit source coordinates cross from the video domain to the audio domain.

## The audio frame: one pulse paces everything

The DAC driver produces a one-clock `ready` pulse at the start of every 48 kHz frame,
when the word clock rises. Each stage of the datapath starts on that pulse, or on the
`valid` of the stage before it, and then holds its result until the next pulse.
Stages never stall one another: every stage is sized to finish well inside a frame.

| stage | clocks after its start | what happens |
|---|---|---|
| `usb_reader` | 0 | on `ready`, publishes the four samples it assembled during the last frame |
| `coeff_full` | 6 | latches the four coordinates; for each source in turn reads all eleven ROMs at once (3-bit counter; its MSB ends the pass) |
| `enc_multiplier` x4 | 19 | one multiplier per encoder, 16 products one per clock; keeps bits [31:16] |
| `summing` | 1 | adds the four encoders harmonic by harmonic: 18-bit sum, arithmetic shift right by 2 |
| `decoder` x4 | 19 | 16 products with the speaker's coefficients into a small memory, then one 20-bit sum; the low 16 bits are the output |
| output latch | next `ready` | the four speaker samples go to the DAC driver, which sends them during the following frame |

The whole chain takes about 45 clocks out of 768, so a sample from the USB stream
reaches the DAC pins two frames after it was published.

## Coefficients

Ambisonic coefficients are the circular harmonics of the source azimuth `a`. Elevation
is always zero in this design, so of the 16 third-order components
`W X Y Z R S T U V K L M N O P Q`, five (Z, S, T, K, O) are always zero and 11 are
stored:

```
W = 1/sqrt(2)   X = cos a      Y = sin a      R = -1/2
U = cos 2a      V = sin 2a     L = -k cos a   M = -k sin a    (k = sqrt(3/8)·sqrt(45/32))
P = cos 3a      Q = sin 3a
```

All coefficients are signed Q1.15 numbers.

**Coordinates.** A coordinate is a 17-bit word `{x[5:0], y[5:0], z[4:0]}`. `x` and `y`
are signed units from -32 to 31, and `z` is carried but always 0.

**Encoding tables.** Each of the eleven encoding ROMs (`coeff_rom`) holds 4096 words,
addressed by `{x, y}` in two's complement. A word is built in three steps:

1. scale the harmonic value by 0.96 × 2^15;
2. clamp: a value above 32760 becomes 32767, and one below -32760 becomes -32768;
3. if the distance `d = sqrt(x² + y²)` is beyond 20 units, multiply by
   `(44 - (d - 20)) / 44`, then truncate toward zero.

Step 3 is the distance fall-off. A source beyond radius 20 gets quieter, and the blue
ring on the screen marks that radius.

**Decoding table.** The decoders' table (`coeff_static`) covers only the four speaker
positions, (±31, ±31). It uses gain 0.95 and no fall-off. For the corner at (31, 31)
this gives W = 0x55fb, X = Y = 0x3ccc, and so on.

**How the tables are filled.** Both tables are computed when the design is elaborated,
from the formulas in `ambi_pkg`. No data files are used, and a synthesis tool turns the
arrays into block RAM contents.

**Arithmetic.** The rules are:

- a product keeps its top 16 bits, which is floor(a·b / 65536);
- the mix is (Σ of 4) >>> 2, stored in 16 bits;
- a speaker sample is the low 16 bits of the sum of its 16 products.

With unweighted coefficients and only four speakers, a source placed exactly between
two speakers seems to fade out. This is a property of the method, not a fault.

## USB input

The DLP-USB245M holds bytes from the PC in its own FIFO. It signals that a byte is
waiting by pulling RXF# low, and it puts the byte on the bus while the FPGA holds RD#
low.

`usb_reader` runs an 8-state machine, one byte per pass:

- IDLE → DATA_AVAILABLE → WAIT_READ_1 → WAIT_READ_2 → READ_BYTE → BYTE_INC → DONE → WAIT;
- RD# is low in the first four states, so it is simply the inverted MSB of the state;
- the byte is written into the FPGA's 4096-byte buffer (`byte_fifo`) two clocks before
  RD# rises;
- RXF# passes through two flip-flops before the state machine sees it;
- the machine waits in WAIT until RXF# is low and the buffer has room.

A frame is 8 bytes: four 16-bit samples, low byte first, channel 0 first.

**Fill gate.** Playback starts only once the buffer is full, and stops when the buffer
runs empty. From then on the reader takes one frame out of the buffer after every
`ready`. If a frame is not complete when the next `ready` comes, it repeats the old
frame and pulses `underrun`.

When the buffer fills, `second_notify` lights an LED for 2^24 clocks (about 0.45 s).
A second `second_notify` does the same when the buffer empties. These two LEDs make
stream problems visible.

## DAC output (PCM1681)

All DAC clocks come from one counter of 768 audio clocks, and every output is
registered, so the edges line up:

| clock | rate | divide |
|---|---|---|
| `sclk` | 192 fs | /4 |
| `bclk` | 48 fs | /16 |
| `lrclk` | fs | /768 |

The format is left-justified, 16 bits, MSB first:

- data changes on falling `bclk` edges, and `lrclk` rises on one of them;
- each half of `lrclk` is 24 bit clocks long: 16 data bits, then 8 zeros;
- `lrclk` high carries the left channel.

The four data lines carry:

| line | left | right |
|---|---|---|
| 0 | speaker (31,31) | speaker (31,-31) |
| 1 | speaker (-31,31) | speaker (-31,-31) |
| 2 | raw sample of source 0 | W component of source 0 |
| 3 | W component of the mix | speaker (31,31) |

Lines 2 and 3 are test points: they show the input and the middle of the chain.

The format pins are driven as follows, and are parameters of the driver:

- `fmt = 2'b10`
- `demp = 0`
- `mute = 0`

## Display, presets and movement (65 MHz)

**Timing.** `xvga` generates XGA timing: 1344 clocks per line and 806 lines per frame.

**Map.** `ambisonic_ui` draws the position map:

- a white square border from (256,128) to (768,640);
- a 16 × 16 blob for each source: yellow, cyan, magenta and white;
- a blue ring of radius 160 pixels (20 units) around the centre (512,384).

The ring is drawn where `R² - 800 < d² < R²`. Its squared distance takes two pipeline
stages, so the other layers and the sync and blank signals are delayed by two clocks to
match.

**Blob positions.** A blob's top-left corner is at `((u + 32) × 8) + map origin`, and
`coord_translate` does that conversion. Positions are re-read once per frame, at the
falling edge of vsync, so a blob never tears.

**Presets.** `preset_manager` stores the x and y of every source in each of four
presets, as signed 6-bit values.

- Preset buttons 0–3 choose the active preset; button 0 wins if several are pressed.
- Switches [5:2] choose which sources the arrow buttons move. They are active low: a
  source is selected while its switch reads 0.
- A held arrow moves each chosen source one unit per frame within the active preset,
  limited to -16..15. Up means smaller y.

**Gliding.** The coordinates sent to the display and to the audio datapath are a
separate set of registers. Each frame, each axis of each one moves one unit toward the
stored value of the active preset. Switching presets therefore glides the sources
across the map, and the sound moves with them.

**Crossing into the audio domain.** `sync_coord` passes each coordinate word through
three flip-flops on the audio clock. `coeff_full` then latches the coordinates only on
`ready`. A word in the middle of changing could still be caught for one frame, but it
only ever moves by one unit per video frame.

All eight buttons go through `debounce`, which takes a new level only after the input
has been steady for 270000 clocks (about 4 ms at 65 MHz).

**Test pictures.** Switches [1:0] replace the map for setting up a monitor: `01` shows
a one-pixel white outline of the visible area, and `10` shows colour bars, with the
colour taken from `hcount[8:6]`. Any other setting shows the map.

## Where this RTL departs from, or goes beyond, its source description

These points follow the original system:

- the module breakdown;
- the number formats;
- the state machine;
- the DAC timing;
- the gains and fall-off formula;
- the speaker table;
- the display geometry.

The following are choices made here:

- **ROM address order:** assumed to be `{x, y}` in two's complement.
- **Harmonic formulas:** computed in closed form. At the origin, where there is no
  azimuth, a = 0 is used.
- **Glide:** the published coordinates converge exactly on the stored ones. The
  original stopped within one unit.
- **Reset:** every register that holds state has a synchronous, active-high reset. All presets start at
  the origin. Each clock domain has its own two-flop reset synchroniser.
- **Fill gate and underrun:** the gate is exact (full to start, empty to stop), and an
  underrun repeats the previous frame.
- **Coordinate word:** its z field is 5 bits, so the word is exactly 17 bits.
- **Output width:** the decoder output is 16 bits wide. Only 16 bits are ever sent to
  the DAC.
- **Pipeline registers:** the multiplier operands are registered, and the ROM read
  latency is absorbed by a registered write select. This sets the latencies in the
  table above.
- **Small additions:** a reset input on `xvga`, a `usb_status` output, and the unused
  enter button left out.
- **Speakers:** four speakers are decoded. The DAC has eight channels, so up to eight
  would fit, but the system described builds four decoders and uses the remaining lines
  for test signals.

The two chips (USB FIFO, DAC) and the FPGA's clock synthesisers are not part of the
RTL. The top takes its two clocks as inputs. `tb/` has behavioural models of the two
chips' digital interfaces.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one compares the block with
arithmetic worked out independently in `tb/ambi_ref_pkg.sv`, using `$atan2`, `$cos`
and real-valued gains. Each one ends with a `TB_RESULT checks=N failures=M` line. A
block testbench looks like this:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module decoder_tb \
  -y rtl -y tb +libext+.sv -Irtl rtl/ambi_pkg.sv tb/ambi_ref_pkg.sv tb/decoder_tb.sv
./obj_dir/Vdecoder_tb
```

**End-to-end test.** `tb/ambisonic_top_tb.sv` runs the whole system at its default
sizes: a 4096-byte buffer, the full 270000-clock debounce, and real clock rates. It
takes about 45 s of wall-clock time with Verilator to cover 0.57 s of operation: 34 video frames and
27,000 audio frames. It:

- streams a known sample sequence through the USB model;
- waits for the buffer to fill, checking that playback waits for it;
- compares every DAC frame bit-exactly with a reference chain. Frames just after a
  source moves are skipped, because the crossing point between clock domains is not
  fixed;
- checks the 768-clock frame period;
- drives sources 0 and 1 into the corner, past the fall-off radius and into the edit
  limit, then nudges source 1 up;
- checks that a 2000-clock tap is ignored;
- pauses the host until the buffer runs dry and underruns, then lets it refill;
- switches to preset 1 and checks the one-unit-per-frame glide;
- shows both test pictures and counts their pixels and colours.

Each of these mechanisms is counted, and one that never happens counts as a failure.

**Speeding up simulation.** The block testbenches use smaller parameters where the
defaults would be slow: a 16-entry FIFO, a 20-clock debounce and a 6-bit LED timer.

## Synthesis notes

Each `coeff_rom` fills its table in an `initial` loop that calls `$sin`, `$cos` and
`$sqrt`. Simulators and FPGA synthesis tools accept this. Yosys with the slang front
end synthesises a single `coeff_rom`, but on the full top it reaches its
constant-evaluation step limit. For that flow, raise the limit, or synthesise the ROMs
separately.
