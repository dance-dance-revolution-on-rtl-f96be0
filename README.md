# Dance-game hardware: beat detection, arrow display and dance-pad input

This is the custom logic of a Dance Dance Revolution style game on an FPGA board.
A processor runs the game itself: it makes the arrows, moves them up the screen
and keeps the score. Around it sit three pieces of hardware:

- **A beat detector.** It listens to the music as it plays, watches the energy of
  the bass band of its spectrum, and raises an interrupt on every beat. Arrows
  can then follow the music.
- **A character-mode SVGA display.** It draws the hollow target arrows, the moving
  coloured arrows and the score from a screen of character codes. The processor
  writes those codes into a dual-port memory.
- **A PlayStation 2 controller interface.** It polls a dance pad and keeps its
  pressed buttons in a register.

The part that takes the most understanding is the beat detector. It has most of
the room below.

## System view

```
 AC'97 codec ──AC-link──► ac97_capture ──sample, strobe──► [FFT core, external]
                                                                 │ bins 0..1023
                                                                 ▼
                                          beat_detect ──beat_irq──► interrupt controller

 processor bus ──port A──► char_bram ──port B──► svga_char_ctrl ──► VGA DAC
                                                   ├ svga_timing
                                                   ├ char_gen_rom
                                                   └ clut
 dance pad ◄──ATT/CLK/CMD/DAT──► psx_pad_if ──buttons register──► processor bus
```

`ddr_top` instantiates all of this. Everything that is a processor-system
component lives outside the top and connects at its ports: the processor, PLB
and OPB buses, DDR controller, AC'97 bus controller, FFT core, clock manager,
UART, GPIOs, interrupt controller and frame buffer.

There are three clock domains. They share no signal inside `ddr_top`, and each
has its own synchronous active-low reset:

| domain  | clock                        | blocks                           |
|---------|------------------------------|----------------------------------|
| audio   | inverted AC'97 BIT_CLK, 12.288 MHz | `ac97_capture`, `beat_detect`, the external FFT (`fft_clk`) |
| pixel   | 40 MHz                       | `svga_char_ctrl`, port B of `char_bram` |
| system  | 100 MHz bus clock            | port A of `char_bram`, `psx_pad_if` |

## Beat detection (`beat_detect`)

### Input

The FFT core takes 1024 consecutive 48 kHz samples and produces their 1024
complex bins. It is configured as a pipelined streaming core: unscaled, with
natural-order output and a clock enable. One frame of 1024 samples lasts
21.3 ms. Its output is
presented to `beat_detect` as `xk_valid`, `xk_index`, `xk_re`, `xk_im`. The
components are 27-bit signed, the unscaled width for 16-bit input
(16 + log2(1024) + 1). Bins may arrive at any rate up to one per clock. Only
bins 0 to 31 are used, which covers 0 to 1.5 kHz at 46.9 Hz per bin. That band
holds the kick drum and the bass.

### Stage 1: energy against one second of history

For each frame the block computes the sub-band energy

    E = sum over k = 0..31 of (re[k]^2 + im[k]^2)

at full precision (59 bits). This needs one pair of multipliers and an
accumulator, and the bin with index 0 restarts the sum.

The last HIST = 47 energies sit in a shift register, which is 47 × 1024 /
48000 = 1.0 s of music. A running sum of the register is kept up to date as
one value enters and the oldest leaves. The frame is a **raw beat** when its
energy exceeds C times the average of the previous 47 frames. The test needs no
divider:

    E · 47 · 256  >  C_Q8 · sum(history)        (C_Q8 = 333, i.e. C = 1.30)

No raw beat is reported until the history has been filled once after reset.

### Stage 2: cleaning up the raw beats

Loud passages give clusters of raw beats, one per frame for a few frames in a
row. A second filter keeps one beat per real beat:

- a counter holds `t`, the number of frames since the last **valid** beat. It
  saturates at 255.
- the last IHIST = 8 intervals between valid beats sit in a second shift
  register, which has its own running sum.
- a raw beat is valid when `t >= MIN_GAP` (4 frames, 85 ms). It must also be
  true that `t >= VALID_NUM/VALID_DEN` (1/2) of the average interval. The second
  test is done as `t · count · 2 >= sum`, and it is skipped while the interval
  history is empty.
- a valid beat pushes `t` into the interval history, sets the counter back to 1
  and pulses `beat_irq`. A saturated `t` is not pushed, because it is not a real
  interval. This happens for the first beat after reset or after a long pause.

So a beat that comes much earlier than the recent tempo is taken as noise. The
minimum gap covers the start of a song, when there is no tempo yet.

### Timing and outputs

`energy_valid`, `raw_beat` and `beat_irq` are one-clock pulses, three clocks
after the cycle that carries bin 31. They always come together: `raw_beat` and
`beat_irq` only pulse with `energy_valid`. `energy` holds the last frame's
energy. `beat_interval` holds the interval of the last valid beat, in frames.
A streaming FFT on the sample clock enable delivers one bin per sample. Bin 31
therefore comes 32 samples (0.67 ms) after the frame's spectrum starts to leave
the core, which happens one frame after the frame was recorded. The interrupt controller must latch the pulse.

### Tuning

C, MIN_GAP, the 1/2 fraction and the depth of the interval history are
parameters with no register interface. On real music, the value of C decides
most of the accuracy. A software-writable threshold would be the first thing to
add.

## Audio capture (`ac97_capture`)

The AC'97 codec sends a 256-bit frame per 48 kHz sample on SDATA_IN. SYNC,
driven by the AC'97 bus controller, marks the start of each frame. This block
sits beside that controller and only listens. It gives the beat detector a
continuous sample stream without going through the processor bus.

Its state machine follows the standard frame layout:

- **TAG** reads slot 0 (16 bits). Bit 0 is "codec ready" and bit 3 is "slot 3
  valid".
- **SKIP** passes slots 1 and 2, 20 bits each.
- **LEFT** shifts in slot 3 and keeps its 16 most significant bits.
- **REST** waits for the next SYNC rise.

Every SYNC rise restarts the frame, so the block realigns by itself. `locked`
shows that the last two SYNC rises were exactly 256 bits apart.

The block must be clocked by the **inverted** BIT_CLK, so that it samples on
falling edges as a controller does. At the end of slot 3 it updates `sample` and
pulses `sample_valid`. It does this only in frames whose tag marks the codec
ready and slot 3 valid. `sample_valid` is the FFT's clock enable. `clk_48k` is a
48 kHz square wave made from the frame position.

## Character display (`svga_char_ctrl`, `char_gen_rom`, `clut`, `char_bram`)

### Screen and memory

The screen is 800x600 at 60 Hz, using a 40 MHz pixel clock and VESA porches with
active-high syncs. It is divided into 100 × 75 cells of 8 × 8 pixels. Cell
(row, col) is word `row*100 + col` of `char_bram`:

| bits  | 15:12        | 11:8   | 7:0            |
|-------|--------------|--------|----------------|
| field | colour index | unused | character code |

`char_bram` is a true dual-port memory of 8192 × 16 bits. Port A, on the bus
clock, reads and writes; it is meant for the processor's BRAM interface. Port B,
on the pixel clock, feeds the display. Reads take one clock. A port A read
during a write to the same address returns the old word.

### Character codes

| codes            | glyph |
|------------------|-------|
| 0x20             | blank |
| 0x30-0x39        | digits, seven-segment style, 5 × 7 pixels |
| 0x43 0x45 0x4F 0x52 0x53 | C E O R S (to label the score "SCORE") |
| 0x7F             | solid block |
| 0x80-0xBF        | filled arrows (moving arrows) |
| 0xC0-0xFF        | hollow arrows (the static target row) |
| others           | blank |

An arrow is 32 × 32 pixels, which is 4 × 4 cells. Its code is
`1 h dd rr cc`:

- `h` selects a hollow arrow.
- `dd` is the direction: 0 left, 1 down, 2 up, 3 right.
- `rr` and `cc` are the tile's row and column inside the arrow.

To draw one arrow, software writes the 16 codes into a 4 × 4 block of cells. For
example, the up arrow's tile at row r, column c is `0x80 | 2<<4 | r<<2 | c`.

The glyphs are computed, not stored. In the up arrow's own coordinates (u across,
v down, 0..31), let d be the distance of a column from the centre line. The
arrow is then:

- the head, for rows 1 ≤ v ≤ 15 with d ≤ v−1
- the shaft, for rows 16 ≤ v ≤ 30 with d ≤ 5

The other directions transpose or mirror u and v. A hollow arrow keeps only the
pixels of the shape that touch the outside.

### Colours

`clut` maps the 4-bit colour index to RGB with the 16-colour IRGB palette. Bit 3
is intensity and adds 0x55; bits 2..0 are red, green and blue, and each gives
0xAA. Entry 6 is brown.

### Pipeline and overlay

`svga_char_ctrl` processes one pixel per clock in five steps:

1. the raster counters (`svga_timing`) and the cell address
2. the memory read
3. the glyph row and the colour index
4. the selected glyph bit and the CLUT colour
5. the output register

The syncs travel with the pixel, so all outputs line up. They lag the raster
counters by four clocks.

A set glyph pixel shows the character colour. A clear one shows black or, with
`ov_en` high, the overlay pixel `ov_rgb`. This lets a frame buffer put a picture
behind the characters. `ov_rgb` is sampled into the output register, so the
source must present each pixel one clock before it appears.

## Dance pad (`psx_pad_if`)

A PlayStation 2 controller, or a dance pad wired as one, is a serial slave. The
exchange works like this:

- the host pulls ATT low and clocks bytes LSB first at 250 kHz.
- both sides change data after a falling CLK edge and sample on the rising one.
- the host sends 0x01 0x42 0x00 0x00 0x00.
- a digital pad answers 0xFF, 0x41, 0x5A and then two button bytes, active low.
  Byte 3 is SELECT L3 R3 START UP RIGHT DOWN LEFT from bit 0. Byte 4 is L2 R2 L1
  R1 TRIANGLE CIRCLE CROSS SQUARE.

The block polls 60 times a second. After a poll whose third byte is 0x5A, it
stores `buttons = ~{byte4, byte3}` (1 = pressed), stores `pad_id`, and pulses
`update`. After a bad poll it sets `error` and keeps the old buttons. It does
not wait for ACK: the fixed gap between bytes is long enough for a pad to
acknowledge. DAT is synchronised, and it needs a pull-up on the board. The
register is brought out as ports; the bus slave that presents it to software is
not part of this RTL.

The rates are parameters: `CLK_HZ`, `PSX_HZ`, `POLL_HZ`, `ATT_SETUP`, `GAP`.

## What comes from the original design and what does not

These points follow the original design:

- the system split
- the beat algorithm: energy of the lowest 32 bins, about one second of history,
  a threshold on the average, and a moving-average check on the time between
  beats
- the 16-bit left-channel 48 kHz capture with a SYNC-derived clock
- the 40 MHz character display with 16 colours in bits 15:12
- arrows added to the character set above 0x7F
- the dual-port memory between bus and display
- the overlay multiplexer
- a controller interface with a button register

These are this implementation's choices:

- all numeric tuning of the beat detector: C = 1.30, the minimum gap, the 1/2
  rule, the interval history depth, and the rule that only valid beats enter
  that history
- the AC'97 slot decoding details and the tag check
- the screen geometry and memory depth
- the arrow shapes and codes
- the palette
- the pad protocol handling and its rates

Known departures:

- **Arrow codes.** The original arrows occupy 0x80-0xBC. Here they use
  0x80-0xFF, because filled and hollow arrows of four directions need 128 tiles
  at this size.
- **Character font.** Only the characters listed above are drawn. The ASCII font
  of the original character generator is not reproduced, and other codes show
  blank.
- **Overlay.** The overlay input is present, but the frame buffer that would
  drive it is not part of this RTL.
- **Beat threshold.** It is a parameter, not a register.

How far to trust it: every block has a self-checking testbench that compares
against values computed independently. The end-to-end test runs at the default
parameters. The beat detector has been checked against a bit-exact reference
model and on synthetic audio made of tones and noise. It has not been tried on
recorded music, so the threshold may need tuning. Nothing has been run on an
FPGA.

## Simulating

All files are SystemVerilog 2017. `rtl/ddr_pkg.sv` must come first. Each
testbench prints one line `TB_RESULT checks=N failures=M` and ends with
`$finish`. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl rtl/ddr_pkg.sv rtl/beat_detect.sv \
    tb/tb_beat_detect.sv --top tb_beat_detect -Mdir obj_bd && obj_bd/Vtb_beat_detect

verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb rtl/ddr_pkg.sv tb/tb_ddr_top.sv \
    --top tb_ddr_top -Mdir obj_top && obj_top/Vtb_ddr_top
```

| testbench | checks |
|-----------|--------|
| `tb_beat_detect` | 200 frames of synthetic bins. Energy, raw and valid beats, intervals and the 3-clock latency are checked against a reference model. Both rejection rules and the history fill are exercised. |
| `tb_ac97_capture` | 300 AC-link frames with random content. Sample order and values, frames with an invalid tag, a frame slip with relock, strobe spacing and the `clk_48k` period are checked. |
| `tb_svga_char_ctrl` | Every pixel of a full frame is checked against a test screen, together with the sync widths, porches and line/frame lengths, and the overlay in the lower half. |
| `tb_char_gen_rom` | All tiles of the four filled arrows are checked pixel by pixel against the row-width description. Hollow arrows, digits and the latency are checked too. |
| `tb_clut`, `tb_char_bram` | All palette entries; random dual-port traffic checked against a shadow copy. |
| `tb_psx_pad_if` | A controller model checks the command bytes, the register contents, the poll and clock periods, and a bad poll. |
| `tb_ddr_top` | Runs the whole design at its default sizes, in about a minute. Arrows, digits and overlay are checked on a captured frame; a pad poll is checked; 140 FFT frames of synthetic music go from the AC-link to the beat interrupts, with two spurious loud frames. Each mechanism must occur at least once. |

The testbench helpers `tb/ac97_codec_model.sv` and `tb/fft_model.sv` are
behavioural only. The first produces the AC-link stream of a codec. The second
is a streaming 1024-point FFT that computes the lowest 32 bins exactly and
outputs zero for the others. It has one frame of latency.
