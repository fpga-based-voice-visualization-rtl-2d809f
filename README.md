# Voice visualiser: speech on a character LCD and a VGA monitor

The signal from a microphone is digitised by an AC'97 audio codec and shown on two
displays in real time. A 16x2 character LCD draws a rough waveform: a
16-column strip with one mark per second, placed in one of four amplitude ranges.
A 1440x900 VGA monitor shows one of four pictures, chosen with three switches.
The pictures are a welcome message, a red square whose height follows the sound,
a scrolling red histogram of recent samples, and a blue sine curve whose amplitude
follows the sound. The captured sound is also sent back to the codec's DAC, so it
can be heard.

The design is written for an FPGA board with an AC'97 codec, a video DAC (ADV7123
type), a 1602 LCD module and a clock manager that turns the board's 100 MHz into
the pixel clock. Those four parts are outside the RTL. Their clocks and pins are
ports of the top module `voice_vis_top`.

## Block structure

```
 codec --BIT_CLK, SDATA_IN--> ac97_controller --l_bus_out/r_bus_out--> back to l_bus/r_bus (loop-back)
       <--SYNC, SDATA_OUT----    ^       |
                      ac97_cmd --+       +-- l_sample (clk) --+--> lcd_controller --> LCD 1602
                   (one register write                         |
                    per frame)                                 +--> sample_cdc (to pixel_clk)
                                                                       |
                        vga_controller --row, column, enable--> image_generator <-- display_rom
                                |                                      |
                                +------ h/v sync, blank ------> video DAC <-- red, green, blue
```

| Module | Clock | Job |
|---|---|---|
| `vv_pkg` | – | Shared widths, AC-link constants, command struct, picture codes, colours |
| `ac97_controller` | BIT_CLK and clk | AC-link frame engine, codec cold reset, sample hand-over to clk |
| `ac97_cmd` | BIT_CLK | Twelve-state codec register set-up |
| `lcd_controller` | clk | LCD initialisation and waveform drawing (states S0–S4) |
| `sample_cdc` | clk → pixel_clk | Toggle handshake carrying the sample to the video side |
| `vga_controller` | pixel_clk | Sync pulses, display enable, row and column |
| `image_generator` | pixel_clk | Colour of every pixel for the selected picture |
| `display_rom` | – | Welcome text and 8x8 glyph table (`rtl/font_rom.hex`) |
| `voice_vis_top` | all three | Wiring, loop-back, one-pixel delay of sync and blank |

There are three clock domains. BIT_CLK (12.288 MHz) comes from the codec. The
system clock `clk` is 100 MHz. The pixel clock is 100 x 16 / 15 = 106.667 MHz,
close to the 106.47 MHz that the 1440x900 at 60 Hz timing calls for; the frame
rate comes out at 60.11 Hz. Samples cross from BIT_CLK to clk inside
`ac97_controller`, and from clk to pixel_clk in `sample_cdc`. Both crossings use
a toggle and a three-flop synchroniser, and the data word is held stable while
the toggle travels. `rst_n` is asynchronous and active low in every domain.

## The AC-link

The codec and FPGA exchange 256-bit frames at 48 kHz (12.288 MHz / 256). A frame is
a 16-bit tag followed by twelve 20-bit slots. SYNC is high during the 16 tag bits.
`bit_count` (0..255) says where the link is in the frame:

| bit_count | Slot | Sent to codec | Received from codec |
|---|---|---|---|
| 0–15 | tag | `F800`: frame valid, slots 1–4 valid, bits 2..0 zero | tag; bit 15 = codec ready |
| 16–35 | 1 | register address byte (bit 7 = read), 12 zeros | – |
| 36–55 | 2 | register data, 4 zeros | – |
| 56–75 | 3 | left PCM, 18 bits + 2 zeros | left ADC sample |
| 76–95 | 4 | right PCM, 18 bits + 2 zeros | right ADC sample |
| 96–255 | 5–12 | zero | ignored |

Outgoing bits change on the rising edge of BIT_CLK and incoming bits are sampled
on the falling edge. The outgoing 96 bits are loaded into a shift register one
bit before the frame starts. The input slots 3 and 4 are shifted into a 40-bit
register. At the end of slot 4 the upper 18 bits of each slot appear on
`l_bus_out`/`r_bus_out`, and `ready` pulses for one BIT_CLK cycle. The
controller also drives the codec's cold reset (`ac97_n_reset`) low for
`RESET_CYCLES` clk cycles after `rst_n` is released. The codec starts BIT_CLK
only after that.

Samples are 18 bits wide and are treated as unsigned numbers from 0 to 2^18−1.
Every display works on that scale.

### Codec set-up (`ac97_cmd`)

One register is written per frame, advancing on `ready`:

| State | Register | Data | Meaning |
|---|---|---|---|
| 0 | 0x02 | 0x8000 | master volume muted during set-up |
| 1 | 0x04 | 0x8000 | headphone volume muted |
| 2 | 0x0A | 0x0000 | PC beep off |
| 3 | 0x0E | 0x0008 | microphone volume |
| 4 | 0x18 | 0x0808 | PCM-out volume |
| 5 | 0x1C | 0x0F0F | record gain |
| 6 | 0x2C | 0xBB80 | DAC rate 48 kHz |
| 7 | 0x32 | 0xBB80 | ADC rate 48 kHz |
| 8 | 0x1A | 0x0000 | record select: microphone |
| 9 | 0x20 | 0x0000 | general purpose |
| 10 | 0x04 | `{3'b0, 31−volume, 3'b0, 31−volume}` | headphone volume |
| 11 | 0x02 | same | master volume, rewritten every frame |

The writes in states 4, 5 and 6 come from the original design's simulation. The
other nine come from the standard AC'97 register map. The machine stays in state
11, so a change of the 5-bit `volume` input takes effect within one frame.
`volume` = 31 is the loudest setting.

## The character LCD (`lcd_controller`)

The LCD runs in 4-bit mode: every byte goes out as two nibbles on DB7..DB4,
upper nibble first. Each nibble is latched by a pulse on E. RW is held low,
so the controller never reads the busy flag. It waits a fixed time after every
instruction instead. A five-state machine does the work:

- **S0, initialisation.** Wait 40 ms after power-on. Send the single nibble
  `0010`, which switches to 4-bit mode. Then send function set `0x2C` (4-bit
  bus, two lines), display control `0x0F` (display on, cursor on, blinking) and
  entry mode `0x06` (increment, no shift).
- **S1, range decision.** Once a second (`COL_CYCLES`), take the current sample
  and find its range, b = `sample[17:16]` + 1. This splits 0..262143 into four
  ranges of 65536. Record the mark for the next of 16 columns.
- **S2, DDRAM address.** Point the LCD at the first cell of line 1.
- **S3, display.** Write the 16 cells of line 1, move to line 2, and write its 16
  cells. Ranges 4 and 3 are drawn in line 1, ranges 2 and 1 in line 2. The higher
  range of a line is drawn as `-` and the lower as `_`, so each column shows the
  level with a resolution of four steps.
- **S4, clear.** Hold the picture for `HOLD_CYCLES` (2 s). Send clear display
  (`0x01`), wait 2 ms and go back to S0.

One round therefore takes about 18 s at the default settings: 16 s to collect
the columns and 2 s to hold the picture.

| Parameter | Default | Meaning |
|---|---|---|
| `POWER_ON_CYCLES` | 4,000,000 | 40 ms power-on wait |
| `E_CYCLES` | 50 | E pulse width, and the low time between nibbles |
| `CMD_CYCLES` | 5,000 | 50 µs after an instruction or character (LCD needs 39 µs) |
| `CLEAR_CYCLES` | 200,000 | 2 ms after clear (LCD needs 1.53 ms) |
| `COL_CYCLES` | 100,000,000 | one column per second |
| `HOLD_CYCLES` | 200,000,000 | picture held for 2 s |

## Video timing (`vga_controller`)

The defaults give 1440x900 at 60 Hz:

| | Display | Front porch | Sync | Back porch | Total |
|---|---|---|---|---|---|
| Horizontal (pixels) | 1440 | 80 | 152 | 232 | 1904 |
| Vertical (lines) | 900 | 1 | 3 | 28 | 932 |

Both syncs are active low (`H_POL`, `V_POL`). Row and column are 32-bit counters.
All outputs are registered. `frame_start` marks the first pixel of a frame. The
video DAC's `n_blank` follows the display enable, and its `n_sync` is held high.
A 1600x1200 mode (64/192/304 and 1/3/46, 162 MHz) can be selected with the same
parameters, but it needs a different pixel clock.

## The pictures (`image_generator`, `display_rom`)

The switches select the picture:

| sw | Picture |
|---|---|
| 000 | Welcome: five centred lines of blue text on white ("Welcome", the supervisor's and author's names, "System is Ready", "PLEASE SPEAK →") |
| 001 | Moving square: a 50x50 red square on white. It moves one pixel right per frame and wraps at the right edge. Its top row is the sample level. |
| 010 | Histogram: 22 red bars, 50 pixels wide (bar k covers columns 50k..50k+49). Each bar rises from the bottom to `BAR_GAP` (50) rows below the level of one sample; a sample of 0x15555 gives a bar over rows 650..899. Every `BAR_FRAMES` frames the bars shift one place left and the newest sample enters on the right. |
| 011 | Sine: a blue sine curve about the middle line, 3 pixels thick with a period of 512 pixels. Its amplitude is sample x 450 / 2^18 and it drifts `SINE_STEP` table steps per frame. |
| others | plain white |

The **sample level** is the screen row that a sample reaches:
`level = 900 − round(sample x 900 / 2^18)`. For example, a sample of 0x15555
gives row 600, so the square covers rows 600..649. A histogram bar for the same sample starts 50 rows lower, at row 650 (the square's bottom edge), as in the original design's simulation.

The welcome text is stored in `display_rom` as five lines padded to 32 characters.
Each character is drawn from an 8x8 glyph (5x7 shapes, bit 7 leftmost) in
`rtl/font_rom.hex`. Only the characters of the message and an arrow (code 0x7F)
are drawn; every other code is blank. The image generator enlarges each glyph
cell 4x (`CHAR_SHIFT`) to 32x32 pixels and spaces the lines 64 pixels apart
(`LINE_SHIFT`), starting at row 320 (`TEXT_Y0`).

The sine table has 256 entries and is computed with `$sin` during elaboration.
The colour output is registered, one pixel clock after row and column, and it is
black outside the display area. The top module delays the syncs and `n_blank`
by one pixel so that they line up with the colour.

## How closely this follows the original design

These parts follow the original design:
- the block structure;
- the AC-link slot use and tag rules;
- the twelve-state codec set-up, with three of its writes;
- the LCD's five states, instructions, 4-bit mode and four ranges;
- the 1440x900 timing table and the 106.667 MHz clock;
- the four switch-selected pictures and their colours;
- the 50-pixel square and bars, and the 22 bars;
- the sample-to-row scaling.

Choices made here:
- **Switch codes.** The codes 000/001/010/011 map to welcome/square/histogram/sine.
  This is the order seen in the original simulations. A list in the original
  description names the pictures in a different order (welcome, histogram,
  moving dots, sine).
- **Entry-mode instruction.** The entry mode is written as `0x06`. The original
  also quotes `0000 0000`, which is not an entry-mode instruction. The chosen
  code matches the stated behaviour: no display shift.
- **Unspecified codec writes.** Nine of the twelve codec writes, and the meaning of
  `volume`, are not given in the original and were chosen here.
- **Unspecified LCD details.** The LCD's characters, its one-second column period,
  the hold time and the E-pulse width were chosen here.
- **Scrolling and sine details.** The histogram's scrolling and the sine picture's
  shape and motion were chosen here. The original names the sine picture but
  does not define it. Its simulation shows blue pixels high on the screen (row
  76) for a one-third-scale sample, which this curve does not reach.
- **Displayed channel.** The displays show the left channel. Each ADC channel is
  looped back to its own DAC channel.
- **Font size and ROM.** The font is small and the ROM read is combinational. The
  original's ROM occupied far more logic: about 3,000 slices and one block RAM.
- **Histogram memory.** The 22 histogram levels are kept in registers.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog.
`tb/ac97_codec_model.sv` is a behavioural model of the codec's digital side. It
generates BIT_CLK once its reset is released, decodes the register writes and
PCM slots it receives, and sends chosen samples and the codec-ready tag.

| Testbench | What it checks |
|---|---|
| `ac97_controller_tb` | SYNC and tag timing, every slot bit against the codec model, loop of random samples, `ready` once per 256 BIT_CLKs, cold reset length, clk-domain hand-over |
| `ac97_cmd_tb` | the twelve writes in order and their data, volume changes in the last state |
| `lcd_controller_tb` | power-on wait, nibble order and E timing, init sequence, 16 range decisions for random samples, DDRAM addresses, all 32 characters, clear and restart (with shortened waits) |
| `vga_controller_tb` | every pixel of full frames at the default 1440x900 timing: sync positions and widths, display enable, row and column |
| `display_rom_tb` | text of every line, line lengths, glyph rows of sample characters |
| `image_generator_tb` | each picture pixel by pixel at chosen points, square position and motion, bar heights and scrolling, sine curve, black outside the display |
| `voice_vis_top_tb` | whole design with shortened LCD waits and full-size video. It counts codec writes, loop-backs, LCD rounds with all four ranges, mode switches, square moves and histogram growth, and each count must be non-zero. |
| `voice_vis_top_full_tb` | whole design at its default parameters. It checks the codec set-up, loop-back, LCD power-on and initialisation up to S1, and one full frame of each of the four pictures. |

A full LCD round at the default waits lasts 18 s of real time, which is too long
to simulate. The complete round is therefore checked with shortened waits, and
the default-size bench stops after the LCD's initialisation.

To run a testbench with Verilator, start from the directory that holds `rtl/` and `tb/`. The glyph table is read from there as `rtl/font_rom.hex`. Verilator finds each module by its file name:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    --top-module voice_vis_top_tb rtl/vv_pkg.sv tb/voice_vis_top_tb.sv
./obj_dir/Vvoice_vis_top_tb
```

Run the other testbenches the same way, with their own name in place of `voice_vis_top_tb`. Each of the two top-level testbenches takes under a minute.
