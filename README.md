# HDMI, sound and storage add-on for a Z80 home computer

A ZX Spectrum clone (the Leningrad board) has a composite-style video output,
a one-bit beeper and no mass storage. This design is the logic for an iCE40
HX4K FPGA board that plugs onto the clone's Z80 bus and fixes all three
without touching the computer itself:

* it **watches every memory cycle** that hits the screen area, keeps a private
  copy of the screen, and from that copy draws the picture again as
  **640x480 @ 60 Hz HDMI**, scaled 2x, either by plain pixel doubling or by an
  **edge-smoothing scaler of the hq2x family**, with the border colour around it;
* it adds a **YM2149 / AY-3-8912 sound chip** at the Spectrum 128 ports, mixes
  it with the beeper into stereo PCM, and sends the sound **inside the HDMI
  signal** (data islands) and on an **I2S** output;
* it gives the Z80 a **bit-banged SD card port**, **512 KB of paged SRAM**
  and a **boot ROM** that replaces the built-in ROM at power-on, plus the
  **TR-DOS ROM trap** the floppy interface needs.

Everything is synthesizable SystemVerilog in `rtl/`; every module has a
self-checking testbench in `tb/`.

## Contents

1. Clocks and top level
2. Following the Z80 bus
3. From screen memory to pixels
4. The 2x scaler (hq2x or pixel doubling)
5. HDMI: TMDS, periods, data islands and packets
6. Sound: PSG, mixer, 48 kHz crossing, I2S
7. SD card, paging and ROM control
8. Where this RTL departs from the original design or is thin
9. Simulating and changing it

---

## 1. Clocks and top level

`zx_hdmi_top` has three clock domains:

| Clock | Rate | Source | Used by |
|---|---|---|---|
| `zx_clk` | 3.5 MHz | the Z80 clock, from the bus | screen snooping, PSG, port 0xFE, SD port, audio mixing and 48 kHz sampling |
| `clk_ser` | 125.798 MHz | PLL (outside the RTL, it is a port) | TMDS serializer |
| `clk_pix` | 25.16 MHz = `clk_ser`/5 | divider in `hdmi_serializer` | raster, pixel fetch, scaler, HDMI encoding and packets, I2S, SRAM and ROM control |

The HDMI bit rate is ten bits per pixel, 251.6 Mbit/s per lane. The
serializer reaches it with a 125.798 MHz clock by sending two bits per clock.
The two bits come out as `tmds_rise[3:0]` and `tmds_fall[3:0]`, meant for the
iCE40 DDR output cells. Lanes 0–2 carry data. Lane 3 carries the TMDS clock as
the pattern `0000011111`. The external TMDS level shifter follows the DDR
cells.

The three clocks cross at only a few points:

* **Audio samples** go from `zx_clk` to `clk_pix` through `async_fifo`. It
  uses Gray-coded pointers and 4 entries of 32 bits.
* **The screen** crosses through the dual-port shadow RAM. It is written on
  `zx_clk` and read on `clk_pix`.
* **The border colour and the hq2x switch** change rarely. Each crosses
  through two flip-flops.
* **SRAM and ROM control** run on `clk_pix`. The Z80 strobes reach them
  through two-flop synchronisers. Address and data are stable while a strobe
  is low, so they are sampled directly.

Each domain gets its own synchronised copy of `rst`.

Module tree:

```
zx_hdmi_top
├── screen_shadow        8 KB dual-port copy of 0x4000-0x5FFF
├── ula_port_snoop       border colour and beeper from port 0xFE
├── ym2149               sound chip, ports 0xFFFD / 0xBFFD
├── audio_mixer          beeper + A/B/C -> 16-bit stereo (ABC)
├── frac_tick            48 kHz sample tick in the Z80 clock domain
├── async_fifo           samples into the pixel clock domain
├── sd_spi_port          ports #03 (out) and #01 (in)
├── sram_pager           512 KB SRAM, port 0x7FFD
├── rom_ctrl             boot ROM, ROM disable, TR-DOS ROMCS
├── video_timing         640x480 raster
├── hq2x_scaler          2x scaler, pulls pixels from ...
│   └── zx_pixel_fetch   ... screen layout, attributes, flash
├── zx_palette           4-bit colour -> 24-bit RGB
├── hdmi_packet_picker   which two packets go into each data island
├── hdmi_tx              HDMI periods and three TMDS channels
│   ├── hdmi_packet_assembler  BCH parity, packet -> nibbles
│   └── tmds_encoder x3       8b/10b, control, TERC4, guard bands
├── hdmi_serializer      10 bits -> 2 bits per serial clock, 4 lanes
└── i2s_tx               I2S master, 1.536 MHz bit clock
```

`zx_pkg` holds the shared types and constants: the raster constants, the
4-bit colour type, the TMDS mode enum and the HDMI packet struct.

The Z80 data bus is split into `zx_d_i`, `zx_d_o` and `zx_d_oe`. Four blocks
can answer a read: the boot ROM, the SRAM, the PSG and the SD port. At most
one answers at a time. If two ever did, the priority is the order just given.

## 2. Following the Z80 bus

The add-on never becomes bus master. It only listens, and answers a few reads.

* **`screen_shadow`** samples on each rising `zx_clk` edge. When MREQ and
  either RD or WR are low and `zx_a[15:13] == 3'b010` (0x4000–0x5FFF), it
  stores the byte on the data bus at `zx_a[12:0]`.
  * It catches Z80 reads as well as writes, so any screen byte the CPU touches
    is brought up to date.
  * The memory is 8 KB. It covers the whole window: 6144 bitmap bytes and
    768 attribute bytes, with room to spare.
  * The pixel-clock read port is registered and has one clock of latency.
* **`ula_port_snoop`** watches OUTs to an even port address, which is the
  ULA port 0xFE. Bits 2..0 are the border colour and bit 4 is the beeper.
  Bit 3 (MIC) is ignored.

Port map of the add-on:

| Port | Decoded as | Direction | Block |
|---|---|---|---|
| 0xFE | A0 = 0 | written (snooped) | `ula_port_snoop` |
| 0x7FFD | A15 = 0, A1 = 0 | written | `sram_pager` |
| 0xFFFD / 0xBFFD | A15 = 1, A1 = 0, A14 selects | written and read | `ym2149` |
| #03 | low byte 0x03 | written | `sd_spi_port` |
| #01 | low byte 0x01 | read | `sd_spi_port` |
| #07 | low byte 0x07 | written, bit 0 | `rom_ctrl` (leave boot mode) |

The floppy interface uses #1F, #3F, #5F, #7F and #FF while its ROM is paged
in. All of these have A1 = 1 and a low byte different from the add-on's own
ports, so the two never collide.

## 3. From screen memory to pixels

`video_timing` runs the standard 640x480 raster:

* 800 x 525 clocks per frame;
* horizontal: front porch 16, sync 96, back porch 48;
* vertical: front porch 10, sync 2, back porch 33.

It produces the position, `de`, `hsync`, `vsync` and a frame-start pulse. The
sync signals are **active high** inside this design. The standard DMT mode
uses negative sync pulses; over HDMI only their coding in the control period
matters. Invert them in `video_timing` if a sink insists on the DMT polarity.

`zx_pixel_fetch` turns a source coordinate `(sx, sy)` (256 x 192) into two
shadow reads, using the Spectrum screen layout:

* bitmap address: `{sy[7:6], sy[2:0], sy[5:3], sx[7:3]}`;
* attribute address: `0x1800 + (sy/8)*32 + sx/8`.

The attribute gives ink (bits 2..0), paper (5..3), bright (6) and flash (7).
The result is a 4-bit colour `{bright, g, r, b}`, three clocks after the
request. Flash swaps ink and paper every 16 frames.

`zx_palette` turns the 4-bit colour into 24-bit RGB. A set channel is 0xD7, or
0xFF when bright; a clear channel is 0. These are the usual emulator levels.

The palette sits **after** the scaler. The scaler therefore works, and stores
its buffers, in 4-bit colour, which keeps its memories small (section 4).

## 4. The 2x scaler (hq2x or pixel doubling)

This is the most involved part of the design. `hq2x_scaler` receives the
raster from `video_timing` and delivers the output pixel for each raster
position. It fetches the source pixels it needs itself, through
`zx_pixel_fetch`.

### Geometry

* The 256x192 picture becomes 512x384.
* It is centred in 640x480. It starts at column `H_OFF` = 64 and line
  `V_OFF` = 48.
* Source row *k* is shown on output lines `48+2k` and `48+2k+1`.
* Everything outside the picture is the border colour.

### Buffers and their sizes

| Buffer | Entries x bits | Holds |
|---|---|---|
| `inbuf` | 512 x 4 | two source rows (`2*SRC_W`) |
| `outbuf` | 2048 x 4 | four output lines (`8*SRC_W`): two being written, two being shown |
| `hq_table` | 256 x 4 | four corner flags for each neighbourhood pattern |

With 4-bit colour the three buffers need 11 kbit in total, a few of the HX4K's
32 block RAMs of 4 kbit. The same buffers at 15-bit colour would take
38400 bits plus the table, and at 6-bit (RGB 2:2:2) 15360 bits. Four bits is
also exactly what a Spectrum colour needs, so nothing is lost by storing it.

### Schedule: line pairs

The scaler works in **pairs of output lines**. Pair *L* (L = 0..192) starts at
the first pixel of line `V_OFF − 4 + 2L`, so the first result is ready before
line `V_OFF`. During pair *L*:

1. **Fetch.** Source row *L* streams in from the shadow, one pixel every four
   pixel clocks, and is stored in `inbuf`. One pixel per four clocks is the
   same rate at which plain doubling consumes the source.
2. **Compute.**
   * Output row *L−1* is computed from a 3x3 window. Its top two rows (*L−2*
     and *L−1*) are read back from `inbuf`. Its bottom row is the row-*L*
     pixel arriving at that moment.
   * The window slides one column per source pixel.
   * Each source pixel yields a 2x2 block. The four output pixels are written
     to one half of `outbuf`.
3. **Display.** The other half of `outbuf` holds row *L−2* and is being shown
   at the same time. The halves swap every pair.

A pass takes (256+2) x 4 = 1032 clocks. A line pair has 1600 clocks, so the
pass ends well inside it. Its two extra columns repeat the edge pixels, and
so do the rows at the top and bottom edges. Output is delayed by two clocks:
one for the `outbuf` read and one register. `t_out` is the raster position
delayed by the same amount, so that sync and colour stay aligned.

### The smoothing rule

Neighbourhood, with P = w4:

```
w0 w1 w2
w3 w4 w5
w6 w7 w8
```

1. **Similarity.** Each of the eight neighbours is compared with P.
   * Each colour channel becomes a level: 0 off, 2 on, 3 on and bright.
   * Two colours are *similar* when the sum of the absolute level differences
     is at most `SIM_THRESH` (default 1). So only the same colour, or the same
     colour differing in BRIGHT, counts as similar.
   * This replaces hq2x's YUV threshold test with a cheap RGB-space one.
2. **Pattern.** The eight "different" flags form an 8-bit index into
   `hq_table`. Each entry holds four bits, one for each output corner.
3. **Corners.** A flagged corner takes the colour of the two edge neighbours
   that meet there, but only if those two are similar to each other:

   | Corner | Neighbours |
   |---|---|
   | top left | w1 and w3 |
   | top right | w1 and w5 |
   | bottom left | w7 and w3 |
   | bottom right | w7 and w5 |

   Any other corner repeats P.

The table is filled from this rule: a corner is flagged when its two edge
neighbours differ from P while the opposite edge neighbours do not. This has
the effect of the well-known Scale2x/EPX edge rule. It is written as a
256-entry table so that the datapath matches hq2x's pattern lookup, and other
rules can be loaded by changing how the table is computed.

When `hq2x_en` is low, no corner is flagged and the scaler doubles pixels. The
switch takes effect at any time, and the next frame shows it. The output
`smooth_event` pulses whenever a corner is actually smoothed.

Why not the full hq2x table? Real hq2x blends two or three colours per output
pixel in fixed ratios. A blend of two of the 16 Spectrum colours is in general
not one of the 16 colours, so at 4 bits per pixel blends cannot be
represented. This design keeps the hq2x structure (the window, the
similarity pattern, the 256-entry lookup and the 2x2 output) and uses hard
edges.

## 5. HDMI: TMDS, periods, data islands and packets

### Channel coding (`tmds_encoder`)

One encoder per channel, registered with one clock of latency. It has four
modes:

| Mode | Coding |
|---|---|
| video | DVI 8b/10b: transition minimisation, then DC balance with a running disparity counter. The counter is cleared outside video. |
| control | the four 10-bit control words for C1:C0 |
| TERC4 | the 16-entry code used in data islands |
| guard band | the fixed guard words: video guard bands differ per channel, island guard bands are `0100110011` on channels 1 and 2 |

### Periods (`hdmi_tx`)

Per pixel clock it decides what the link carries:

* **Active video.** Channel 0 is blue, 1 green and 2 red.
* **Video preamble and guard band.** 8 preamble clocks (CTL0..3 = 1,0,0,0),
  then 2 guard-band clocks, placed at the end of the line before each visible
  line.
* **Data island.** One on every line, starting 4 clocks into horizontal
  blanking (`DI_START` = 644). In order:
  1. 8 clocks of preamble (CTL = 1,0,1,0);
  2. 2 clocks of guard band;
  3. two 32-clock packets;
  4. 2 clocks of guard band.

  Total: 76 clocks of the 160-clock blanking.

  * In the island, channel 0 sends TERC4 `{first-clock flag, header bit,
    vsync, hsync}`. The flag is 0 only on the first packet clock.
  * Channels 1 and 2 carry the subpacket nibbles.
* **Control.** Everything else. Channel 0 carries `{vsync, hsync}`.

### Packets

`hdmi_packet_assembler` takes a packet: a 3-byte header and four 7-byte
subpackets. It adds the BCH parity bytes and slices the result into 32 clock
slots:

* the header with its parity gives one bit per clock for channel 0;
* each subpacket gives two bits per clock, spread over channels 1 and 2.

The parity code is BCH(32,24) / BCH(64,56) with the generator
x^8 + x^7 + x^6 + 1, computed bit-serially in a loop.

`hdmi_packet_picker` latches two packets at each island start.

**First packet.** An **Audio Sample** packet, if samples are waiting in the
FIFO, otherwise a null packet.
* Up to four stereo samples are collected at a time. With 48 kHz audio and
  31.5 kHz lines there are about 1.5 per line, so the FIFO never backs up.
* Each 16-bit sample becomes the upper bits of a 24-bit IEC 60958 word.
* Parity and valid bits are set in each word, and block-start flags every
  192 frames.
* The channel-status bits announce 48 kHz PCM.

**Second packet.** In order of priority:
1. the **AVI InfoFrame** once per frame: RGB, 4:3, VIC 1;
2. the **Audio InfoFrame** once per frame: 2 channels;
3. an **Audio Clock Regeneration** packet every 32 lines, with N = 6144 and
   CTS = 25160 (see below);
4. a null packet otherwise.

The InfoFrame checksums are computed in the RTL.

N and CTS follow from CTS = f_pixel x N / (128 x 48 kHz), with N = 6144, the
recommended N for 48 kHz. This gives exactly 25160, so the sink regenerates
exactly 48 kHz from the TMDS clock.

### Serializer (`hdmi_serializer`)

* A mod-5 counter on `clk_ser` makes `clk_pix`. It is high for 2 of every 5
  serial clocks.
* At each pixel-clock period the three 10-bit symbols are loaded into shift
  registers, together with the clock pattern for lane 3.
* Bits leave LSB first, two per serial clock: bit 2k on the rising edge and
  bit 2k+1 on the falling edge.

## 6. Sound

### The sound chip (`ym2149`)

**Register access.**
* An OUT to 0xFFFD (A15 = 1, A14 = 1, A1 = 0) selects a register.
* An OUT to 0xBFFD (A14 = 0) writes it.
* Reads return the selected register. The PSG answers at both 0xBFFD and
  0xFFFD, because Spectrum 128 software reads 0xFFFD.
* R14/R15, the chip's parallel I/O ports, are left out and read 0xFF.
* The chip runs at 1.75 MHz (`zx_clk` / `CLK_DIV`).

**Tone.** Each channel's square wave has the frequency f_clock / (16 x TP),
where TP is its 12-bit period.

**Noise.** A 17-bit LFSR (taps 0 and 3), stepped at a rate set by the 5-bit noise period.

**Mixer.** Per channel, tone and noise are combined as `(tone | tone_off) &
(noise | noise_off)`, where the `_off` bits are the disable bits of R7.

**Envelope.** 32 steps, following the CONTINUE, ATTACK, ALTERNATE and HOLD bits
of R13, which gives all ten distinct shapes. Writing R13 restarts it.

**DAC.** Levels go through the YM2149's 32-step logarithmic curve, 1.5 dB per
step. A 4-bit fixed amplitude uses every other step. The channel outputs are
8-bit levels.

### The mixer (`audio_mixer`)

It produces 16-bit signed left and right channels in **ABC stereo**:

* left = C + B + beeper − offset;
* right = A + B + beeper − offset.

Each PSG channel is scaled by 32. The beeper adds `BEEP_LEVEL`. A fixed
`OFFSET` centres the sum around zero.

### 48 kHz crossing

`frac_tick` is an accumulator divider on `zx_clk`. It makes an exact-average
48 kHz tick, which writes one `{left, right}` pair into `async_fifo`. The
packet picker (HDMI audio) reads the FIFO on the pixel clock and hands each
pair to `i2s_tx` as well.

### I2S output (`i2s_tx`)

* Bit clock: 1.536 MHz = 48 kHz x 2 x 16, made by a fractional divider from
  the pixel clock. The edges jitter by one pixel clock, but the average rate
  is exact.
* Word select: low for left.
* Data: MSB first, one bit after the word-select edge (standard I2S).

## 7. SD card, paging and ROM control

### SD card (`sd_spi_port`)

The Z80 is the SPI master. Software toggles the lines itself:

* `OUT (#03)`: bit 0 is MOSI, bit 1 is SCK and bit 2 is CS (active low).
* `IN (#01)`: returns MISO in bit 0 and 0s elsewhere.

Ports are decoded on the low address byte. There is no SPI controller in the
FPGA.

### Paged SRAM (`sram_pager`)

The 512 KB SRAM is 32 banks of 16 KB.

| Z80 address | Bank |
|---|---|
| 0x4000–0x7FFF | bank 5 |
| 0x8000–0xBFFF | bank 2 |
| 0xC000–0xFFFF | the paged bank |

**Paging register, port 0x7FFD.** Decoded as A15 = 0, A1 = 0.
* The 5-bit bank number is `{d7, d6, d2, d1, d0}`.
* Bit 5 locks the register until reset.
* Bits 3 and 4 are stored but not acted on.

**Read timing.** Reads take two pixel clocks (79 ns) against the SRAM's 45 ns
access time:
1. Address and OE go out in the first clock.
2. Data is latched at the end of the second.

The byte is then driven onto the Z80 bus for as long as RD stays low.

**Own RAM.** `int_ram_dis` keeps the computer's own RAM off the bus during
reads at 0x4000 and above. Writes go to both memories, so the computer's own
video circuit keeps seeing the screen.

### ROM control (`rom_ctrl`)

**Boot mode.**
* After reset, `rom_dis` disables the built-in ROM.
* Reads below 0x4000 are answered from a 4 KB ROM in block RAM, mirrored over
  16 KB. It is loaded from `INIT_FILE`, a hex file with one byte per line;
  with no file it reads as zeros.
* This ROM is meant to hold the SD card loader program.
* Writing a value with bit 0 set to port 0x07 leaves boot mode.

**TR-DOS trap.**
* Outside boot mode, an opcode fetch (MREQ, RD and M1 low) from 0x3D00–0x3DFF
  raises `romcs`. This pages in the floppy interface's TR-DOS ROM.
* `romcs` is driven combinationally in the trapping fetch itself, then held.
* An opcode fetch at 0x4000 or above releases it.

## 8. Where this RTL departs from the original design or is thin

* **Scaler rule.** The table holds an edge rule of the Scale2x kind, with
  4 corner bits per pattern. It is not the published hq2x blend table
  (section 4).
* **Colour depth in the scaler.** The scaler works in 4-bit colour and the
  palette comes after it. The original block diagram passes 24-bit RGB through
  the scaler, while its buffer sizing uses the 4-bit figures. The 4-bit
  variant is the one that fits the FPGA.
* **Mixer width.** The mixer output is 16 bits per channel. One description of
  the original mixer says 12 bits, another says 16 bits feed the HDMI core.
* **I2S bit clock.** It is 1.536 MHz, which 48 kHz x 32 requires. One passage
  in the original says 1.546 MHz.
* **PSG read port.** Register reads answer at 0xFFFD as well as 0xBFFD.
* **Sync polarity.** hsync and vsync are active high internally (section 3).
* **Screen shadow.** Only the normal screen (0x4000–0x5FFF of the Z80 bus) is
  copied. A program that shows the Spectrum 128 second screen (bank 7, bit 3
  of 0x7FFD) is not followed.
* **Boot loader.** The loader program (a FAT file system reader and snapshot
  loader running on the Z80) is software and not included. `rom_ctrl` takes
  any image. The exit port (0x07) and the ROM size (4 KB) are this design's
  choices.
* **Chosen by this design, not given in the original.**
  * island position and size;
  * the ACR interval;
  * the InfoFrame contents;
  * mixer scaling and offset;
  * flash rate;
  * palette levels;
  * SD bit order;
  * paging layout.
* **Outside the RTL.**
  * PLL, DDR output cells and TMDS level shifter;
  * the SRAM chip itself;
  * regulators and level shifters;
  * the Ethernet controller on the board, which has no logic described for it.
* **Device fit.** Fitting on the HX4K (7680 logic cells, 32 block RAMs) has
  not been checked by place and route.

## 9. Simulating and changing it

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with
a watchdog. Run them from the directory that holds `rtl/` and `tb/`. The ROM
testbench reads `tb/rom_test.hex` by that relative path. Example:

```
verilator --binary --timing -Wno-fatal --top-module tb_zx_hdmi_top \
    rtl/zx_pkg.sv $(ls rtl/*.sv | grep -v zx_pkg) tb/tb_zx_hdmi_top.sv
./obj_dir/Vtb_zx_hdmi_top
```

Replace `tb_zx_hdmi_top` with any other testbench. Several of them override
parameters to stay short. Each block testbench runs in about a second; the
end-to-end one simulates for about 12 seconds after an 8-second build.

What the testbenches check:

| Testbench | Checks |
|---|---|
| `tb_zx_hdmi_top` | The whole design at its default parameters. A Z80 bus model reads the boot ROM, writes a test picture into screen memory, sets the border and beeper, programs and reads back the PSG, bit-bangs the SD port, pages all banks through the SRAM model, leaves boot mode and triggers the TR-DOS trap. The TMDS lanes are deserialised and decoded: one frame is compared pixel by pixel with the expected doubled picture, then hq2x is switched on and smoothed pixels are required. Data islands are decoded and their packets BCH-checked; ACR N/CTS, InfoFrames and non-zero, changing audio samples are verified, as are I2S frames. Each mechanism is counted and must occur. |
| `tb_hq2x_scaler` | An independent model of the rule and schedule, over full frames in both modes. |
| `tb_hdmi_tx` | Decodes two frames of symbols back into periods, pixels and packets. |
| `tb_tmds_encoder` | DC balance and decoding of random data. |
| `tb_ym2149` | Tone and noise periods, register read-back, amplitudes and envelope shapes. |
| `tb_i2s_tx` | Bit-clock rate and serial framing. |
| others | Their block against a model written from the rules above. |

Where to change things:

* **Smoothing rule.** Change the function that fills `hq_table` in
  `hq2x_scaler.sv`.
* **Similarity threshold.** Change `SIM_THRESH`.
* **Picture position.** Change `H_OFF` and `V_OFF`.
* **Audio rate or clock.** Change `AUDIO_HZ`, `PIX_HZ` and `ZX_CLK_HZ` on the
  top, and `AUDIO_N` / `AUDIO_CTS` on the packet picker. Keep CTS =
  f_pixel x N / (128 x f_audio).
* **Raster.** Change the constants in `zx_pkg.sv`.
