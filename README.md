# Virtual xylophone: letter overlay and audio hardware

A sheet of paper with hand-drawn vertical lines becomes a xylophone. An overhead
camera watches the paper. The player strikes the strips between the lines with a
baton: a microphone with a red tip. Software on a soft processor finds the lines
once at start-up and keeps tracking the red tip in the video. When the
microphone hears a strike, the hardware interrupts the processor. The processor
looks up which strip (region 0..6) the baton is over and starts two custom
peripherals for half a second:

* the **audio core** plays that region's note through the AC97 codec;
* the **letter graphic generator** paints the note's letter (A..G) over the live
  video, by writing pixels straight into the frame buffer that the monitor
  displays.

This repository holds SystemVerilog for those two peripherals and everything
inside them. It does not include the processor, buses, memory controller, video
input/output cores, DMA, timer, interrupt controller, or the software. The top
module brings out the signals where those parts connect.

```
                 register bus (processor)            frame-buffer writes (memory controller)
                        |                                        ^
        +---------------+----------------------------------------|-------+
        | idioscope_top | addr[4]=0                    addr[4]=1 |       |
        |   +-----------v-----------------+      +---------------+--+    |
        |   | letter_graphic_gen          |      | audio_core        |   |
        |   |  FSM, slave regs, master wr-+------+  hit_detector ----+---+--> hit_irq
        |   |  letter_rom x7 (A..G)       |      |  tone_generator   |   |
        |   +-----------------------------+      |  ac97_link <------+---+--> AC97 codec pins
        |                                        +-------------------+   |
        +----------------------------------------------------------------+
```

## How one note is played

1. The microphone sample stream from the codec crosses the hit threshold, so
   `hit_irq` pulses.
2. The interrupt handler maps the latest baton position to a region. It writes
   the region to both cores (letter generator register 8, audio register 1).
   It writes the colour (letter generator register 0). Then it sets both start
   registers (letter generator register 7, audio register 0) and starts a
   0.5 s timer.
3. The letter generator repaints the 128x128 letter again and again, about once
   per millisecond at 100 MHz. The video input overwrites the frame 30 times a
   second, so the letter stays on screen only because it is redrawn many times
   per frame. The audio core plays a square wave.
4. When the timer expires, software clears both start registers. The tone stops
   at once. The letter disappears with the next video frame.

## Letter graphic generator (`letter_graphic_gen`)

This block is the least obvious part of the design.

**Frame buffer.** There is one 32-bit word per pixel. A line is 1024 words
(4096 bytes) and a frame is 512 lines, based at `0x4000_0000`. Only 640x480 of
it is visible. In the pixel word, red, green and blue are 6 bits each. The bus
numbers bits big-endian, so these fields are at bus bits [8:13], [16:21] and
[24:29]. In this RTL's little-endian numbering that is
`{8'h00, r, 2'b00, g, 2'b00, b, 2'b00}` (`idioscope_pkg::pack_pixel`).

**Glyph storage.** Each letter is 16 words of 1024 bits. A word holds eight
glyph rows of 128 bits. The leftmost pixel of the top row is bit 1023 of
word 0. A 1 means "paint this pixel" and a 0 means "leave the video alone".

**Scan.** The state machine reads one ROM word into the 1024-bit `DATA`
register. It then consumes it MSB first by shifting left, and walks a column
counter (0..127) and a row counter (0..127) along the way. For every 1 bit it
writes the colour word to

```
BASE_ADDR + 4096*row_count + 4*col_count
```

and waits for the bus to complete the write. After 1024 bits it fetches the
next word. After 16 words one pass is done (`pass_done` pulses), and the
machine goes back through IDLE. If start is still 1, it begins the next pass
straight away.

```
IDLE -> ROM_WAIT -> SET_ROM_DATA -> RESET_COUNTERS -> CHECK -> SHIFT -> SET_DRAW
                                                        ^                |   |
                                                        |    bit = 1     |   | bit = 0
                                                        |  SET -> DRAW -> CMPLT (wait cmplt)
                                                        |                    |
                                                        +--- COL_ADDR <------+
                                       col wrapped ->  ROW_ADDR -> (1024 bits? next word
                                                                    / 16 words? DONE -> IDLE)
```

**Timing.** Each glyph bit takes 4 clocks (CHECK, SHIFT, SET_DRAW, COL_ADDR).
Each glyph row adds 1 clock and each ROM word adds 3. Each painted pixel adds
2 clocks plus the time spent waiting for `mst_cmplt`. Add one clock each for
IDLE and DONE. With a 0..3 clock bus wait, a pass takes 87k to 98k clocks,
depending on the letter.

**Stopping.** Writing 0 to start returns the machine to IDLE from any state. A
write already issued is completed first.

**Master write handshake.** `mst_wr_req` rises with `mst_addr` and
`mst_wr_data` valid. It stays high, with the address stable, until `mst_cmplt`
is seen high, and then drops for at least one clock. Assertions in the module
check both rules.

## Letter ROMs (`letter_rom`)

There are seven instances, one per letter, with `LETTER` set to 0..6. Each is a
16x1024 memory with a registered read, the same latency as a block RAM. The
original glyphs were scanned bitmaps. Here the contents are computed at
elaboration from an 8x8 outline font for A..G, magnified 16 times. To use other
glyphs, replace the `FONT` table, or the `glyph_word` function for a full
128x128 image.

## Audio core (`audio_core`, `ac97_link`, `hit_detector`, `tone_generator`)

**AC-link.** The codec supplies a 12.288 MHz bit clock. Every 256 bit clocks
(48 kHz), `ac97_link` sends a frame and receives one. A frame is a 16-bit tag
followed by 20-bit slots. The controller drives SYNC and SDATA_OUT after the bit
clock's rising edge and samples SDATA_IN on its falling edge. The link runs in
the system clock domain: it synchronises the bit clock and detects its edges.
The system clock must therefore be at least about 8 times the bit clock; a
100 MHz clock was assumed.

After reset, the link pulses the codec reset and waits for the codec-ready tag.
It then sends six register writes, one per frame. These unmute the outputs,
boost the microphone and select it as the record source. The values suit an
LM4550-type codec. Playback samples go in slots 3 and 4; the microphone comes
from record slot 3.

**Hit detection.** Each microphone sample is turned into a magnitude and shifted
right by `MAG_SHIFT` (8). The result is compared with `THRESHOLD` (4). The
first sample above the threshold after a quiet one raises a one-clock
`hit_irq`, if the interrupt is enabled. A sustained loud sound therefore gives
a single interrupt.

**Tones.** While start is set, the tone generator toggles between +0x2000 and
-0x2000. Each half period lasts `HALF_PERIOD[region]` frames: 109, 97, 92, 82,
73, 69 and 61. These are the notes A3, B3, C4, D4, E4, F4 and G4, rising from
region 0 to region 6. The same sample goes to both channels.

## Register map

The register bus is word-addressed. Writes use `reg_wr`, `reg_addr` and
`reg_wdata`; reads are combinational from `reg_rd_addr` to `reg_rdata`.

| address | core | register |
|---|---|---|
| 0x00 | letter generator | colour, bits 17:12 red, 11:6 green, 5:0 blue |
| 0x07 | letter generator | start (bit 0) |
| 0x08 | letter generator | region 0..6 (7 = draw nothing) |
| 0x10 | audio | start (bit 0), tone on |
| 0x11 | audio | region 0..6 |
| 0x12 | audio | hit interrupt enable (bit 0, reset value 1) |
| 0x13 | audio | status, read only: bit 0 codec ready, bit 1 codec initialised, bit 2 microphone above threshold |

All registers read back. Reset is synchronous and active-low (`rst_n`) in every
module.

## Where this departs from the original, and how far to trust it

The following follow the original design:

* the letter generator's stages and state names;
* the 0x4000_0000 + 4096·row + 4·col address rule;
* the 16x1024-bit glyph layout and its meaning of 1 and 0;
* the start and region registers;
* the repeat-until-cleared behaviour;
* the seven rising tones;
* the hit threshold value 4.

The following are this design's own choices:

* **Address before column step.** The original state diagram advances the
  column counter before computing a painted pixel's address. That would shift
  every painted pixel one column to the right. Here the address is computed
  first.
* **Word length.** The original gives both 1023 and 1024 as the number of bits
  per word. 1024 is used.
* **Extra state.** `ROM_WAIT` covers the ROM read latency.
* **Region capture.** The region is captured at the start of each pass.
* **Stopping mid-pass.** Clearing start stops the machine in any state, not only
  in IDLE.
* **No position register.** The original says software also chooses where the
  letter appears, but its address rule has no offset term. The letter is
  always drawn at the top-left 128x128 corner of the frame (`BASE_ADDR` is a
  parameter).
* **Colour register.** Its location and format are assumed.
* **Glyph shapes.** They are generated, not taken from the original bitmaps.
* **Audio.** The AC97 controller is written from the AC'97 link protocol. The
  original took its controller from elsewhere. The codec register values, the
  microphone scaling before the 0x4 comparison, the tone frequencies and
  amplitude, and the audio register map are all assumptions.
* **Buses.** The processor-side PLB slave and master interfaces are reduced to
  the plain register port and the req/cmplt write handshake described above.

Every block has a self-checking testbench. Each one was also shown to fail when
its block is deliberately broken. No clock frequency was specified anywhere;
100 MHz is assumed wherever a rate matters.

## Simulating

Plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/idioscope_pkg.sv tb/tb_idioscope_top.sv --top-module tb_idioscope_top
./obj_dir/Vtb_idioscope_top
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends
a hung run with a failure.

| testbench | what it runs |
|---|---|
| `tb_idioscope_top` | Two complete notes end to end, with the default configuration. It checks the strike interrupt, the letter pixels and colour, the half period at the codec, repainting, and stop. It counts every mechanism. |
| `tb_workload_seven_notes` | All seven regions in turn. It also reports and checks the pass length against one video frame. |
| `tb_letter_graphic_gen` | Pixel set, address and data for letters A, D and G, the exact clock count of a pass, repeat, stop, and region 7. |
| `tb_letter_rom` | Every bit of two ROMs, and the read latency. |
| `tb_audio_core`, `tb_ac97_link` | The codec protocol, initialisation writes, sample paths, interrupt behaviour and tones. |
| `tb_hit_detector`, `tb_tone_generator` | Threshold edges and half periods. |

`tb/ac97_codec_model.sv` is a behavioural codec used by the audio testbenches.
It generates the bit clock, decodes frames, logs register writes and checks the
SYNC pulse and the frame period. The memory controller is modelled inside the
top-level testbenches as a write acceptor with a random 0..3 clock wait.

## Changing it

* `letter_graphic_gen #(.BASE_ADDR(...))` moves the letter, or points it at
  another frame buffer.
* Glyph size and layout constants live in `idioscope_pkg` (`GLYPH_DIM`,
  `ROM_WORDS`, `ROM_WIDTH`, `LINE_BYTES`). The counters in the state machine
  are sized for 128x128 glyphs.
* `hit_detector #(.THRESHOLD, .MAG_SHIFT)` sets the strike sensitivity.
  `tone_generator #(.AMPLITUDE)` and its `HALF_PERIOD` table set volume and
  pitch.
* To add regions, raise `NUM_REGIONS`, extend the `FONT` and `HALF_PERIOD`
  tables, and widen `region_t`.
