# Atari 5200 console in SystemVerilog

This is a synthesizable model of the Atari 5200 video game console. It has
four chips on one 8-bit bus:

- **6502C CPU**;
- **ANTIC**, which reads a display program from memory by DMA and turns it into
  playfield codes;
- **GTIA**, which adds colour, sprites, priority and collision detection;
- **POKEY**, which covers the keypad, the joystick pots, sound, timers and interrupts.

There are two differences from the original console:

- It does not make a television signal. GTIA writes RGB pixels into a
  320x192 frame buffer.
- A scan-out reads that buffer at 25 MHz and sends 640x480 video to a DVI
  or VGA transmitter.

The cartridge, the BIOS ROM, the hand controller and the DVI transmitter
chip are outside the design. Their buses are ports of the top module
`atari5200`.

## Clocks and the shared bus

Everything in the console runs on one 14.318 MHz clock (`clk`) with two
clock enables made by `clock_gen`:

| enable   | rate      | used for                                     |
|----------|-----------|----------------------------------------------|
| `cc_en`  | 3.58 MHz  | colour clock: ANTIC pixel generator, GTIA     |
| `phi_en` | 1.79 MHz  | one CPU / bus cycle: CPU, DMA, register bus   |

A scan line is 228 colour clocks, which is 114 bus cycles. A frame is 262 lines.
Lines 8 to 199 carry the 192 displayed lines. The DVI side runs on its own
`clk_pix`, and the only crossing between the two domains is the dual-clock frame buffer.

Memory map, decoded by `mem_map`:

| range     | device                      |
|-----------|-----------------------------|
| 0000-3FFF | 16 KB RAM (`ram`)           |
| 4000-BFFF | cartridge (port)            |
| C000-CFFF | GTIA registers (32 mirrored)|
| D400-D4FF | ANTIC registers             |
| E800-E8FF | POKEY registers             |
| F800-FFFF | BIOS ROM (port)             |

Unmapped reads return FF.

ANTIC owns the bus in any cycle in which it raises `dma_req`. The CPU is
stalled in those cycles by HALT, so ANTIC's address goes out on the bus.
The WSYNC register makes ANTIC pull RDY low until colour clock 210, near the
end of the line. This design ANDs RDY into the same HALT input, because the
console's CPU RDY pin itself is unused.

## The CPU (`cpu6502c`, `cpu_alu`)

The CPU is organised like the real chip's control:

- A small register holds the timing state T and a few sub-stage flags.
- One combinational block looks at the opcode, T and the flags. It produces
  the next address, the next T, the ALU operation and the register writes.

An instruction is decoded into an addressing mode and an access kind (read,
write, read-modify-write, control). The combinational block follows that
mode's cycle table, so all instructions of a mode share one path through
the code. Timing details:

- The extra cycle of a page crossing comes from the carry out of the address adder.
- Branch timing is 2/3/4 cycles.
- Read-modify-write instructions make the NMOS dummy write.
- Decimal ADC/SBC follows the NMOS flag rules (in `cpu_alu`).

Interrupts and HALT:

- NMI, IRQ and reset all run the BRK sequence with the other vector in place
  of the opcode.
- NMI is edge-triggered. Its edge detector keeps running while the CPU is
  halted, so a DLI that comes during a DMA burst is not lost.
- HALT freezes the CPU before its next cycle. When HALT is released, it
  carries on where it stopped.

Limitations:

- Undocumented opcodes execute as 2-cycle NOPs.
- The decimal flags of the 65C02 are not modelled.

## ANTIC (`antic`)

ANTIC works one scan line ahead. During line n its fetch sequencer reads,
one byte per bus cycle:

1. the player/missile bytes;
2. the display-list instruction and, with LMS (bit 6), its two address bytes;
3. the screen bytes (only on the first scan line of a mode line);
4. in character modes, the glyph row for each character.

The fetched bytes go into fetch buffers. At the end of the line they move
to display buffers, and during line n+1 the pixel generator reads them.

The pixel generator makes one 3-bit AN code per colour clock:

| AN    | meaning                  |
|-------|--------------------------|
| 000   | background               |
| 001   | vertical blank           |
| 010   | horizontal blank         |
| 1pp   | playfield pp (0-3)       |

In modes 2, 3 and F a colour clock holds two pixels. ANTIC then sets
`an_hires`, and AN = {1, left pixel, right pixel}.

Display-list instructions:

- mode 0: blank lines (1-8);
- mode 1: jump; with bit 6 set it is jump-and-wait-for-vertical-blank;
- modes 2-F: the 6 character and 8 map modes.

Each mode has its own bytes per line (narrow/normal/wide playfield) and
scan lines per mode line. Bit 7 of an instruction asks for a DLI at the end
of the mode line. ANTIC also raises the vertical-blank interrupt at line
248. Both interrupts go out on NMI, gated by NMIEN and reported in NMIST.
VCOUNT reads the line number divided by 2.

Fine scrolling follows the original chip's instruction bits:

- Bit 4 (horizontal scroll) makes ANTIC fetch the next wider line
  (narrow to normal, normal to wide). It shows that line moved right by
  HSCROL colour clocks, inside the same window.
- Bit 5 (vertical scroll) makes the first mode line of the scrolled region
  start at row VSCROL. The first mode line after the region stops after
  row VSCROL.
- The display-list counter wraps inside its 1 KB block, like the original.

Light pen: a falling edge on `lpen_n` latches the colour clock into PENH
and VCOUNT into PENV.

Mode 3 has no descenders. Its rows 8 and 9 are blank.

The register addresses and the AN encoding are those of the original chip.

## GTIA (`gtia`, `color_lut`)

GTIA has no line or column counters of its own. It recovers the beam
position from the AN codes:

- Vertical blank resets the row.
- The first horizontal blank after it is row 0.
- Each later horizontal blank is the next row.
- The column restarts at colour clock 32 when horizontal blank ends.

In the 160 playfield colour clocks, each colour clock is resolved for its
left and right half (they differ only in high-resolution modes) as follows:

- **Objects.** Four 8-bit players and four 2-bit missiles are placed at
  their horizontal positions with x1/x2/x4 width. Their graphics come from
  the GRAF registers or, with GRACTL, from ANTIC's player/missile DMA.
- **Collisions.** All overlaps are ORed into the 60 collision bits
  (missile-playfield, player-playfield, missile-player, player-player).
  HITCLR clears them.
- **Priority.** PRIOR 1, 2, 4 or 8 selects one of four orders between
  players and playfield. PRIOR bit 4 merges the missiles into a fifth player
  in the colour of playfield 3.
- **Colour.** The winning colour register goes through `color_lut` to
  24-bit RGB.

The two pixels are written to the frame buffer as `{8'h00, R, G, B}` at
address `row*320 + 2*column` and the next word, in the two `clk` cycles
after the colour clock.

TRIG0-3 read the fire buttons. CONSOL reads the three console key lines
(`consol_n`) and drives four output lines (`consol_out`). A key line reads
0 while its output bit is 1, as on the original chip.

The colour table has 16 hues by 8 luminances:

- Hue 0 is grey.
- Every other hue is a luminance ramp Y = 16 + 34*lum, offset by a signed RGB
  vector for the hue (olive, brown, red, purple, blue, green) and clamped.

These RGB values are an approximation made for this design. Change the
vectors in `color_lut` for a different palette.

## Frame buffer and scan-out (`display_buffer`, `dvi_scan`)

`display_buffer` is a 320x192x32-bit simple dual-port memory:
1,966,080 bits, or 245,760 bytes. It has a write port on `clk` and a
registered read port on `clk_pix`.

`dvi_scan` produces standard 640x480 timing (800x525 total, negative syncs)
on `clk_pix`:

- Each source pixel is shown as 2x2.
- The 384 image lines are centred with 48 black lines above and below.
- RGB, HSYNC, VSYNC and DE are aligned to the one-clock read latency.

## POKEY (`pokey` and its parts)

`pokey` is the register file and interrupt logic around five blocks:

- **Audio.** `pokey_audio` and `pokey_poly`:
  - four 8-bit dividers clocked at 64 kHz, 15 kHz or 1.79 MHz (AUDCTL);
  - 16-bit joining of channel pairs and two high-pass filters;
  - distortion from the 4-, 5- and 9/17-bit polynomial counters;
  - 4-bit volume and the volume-only mode.

  A divider with value N divides by N+1. Channels 1, 2 and 4 double as
  timers. RANDOM reads the high polynomial counter.
- **Keypad.** `pokey_keyscan`: a 6-bit scan counter steps once per line.
  When the key sense line KR1_L goes low the code goes into a compare latch.
  When the counter comes round again the key is accepted if KR1_L is still
  low:
  - the key code is latched and the key interrupt is raised;
  - after it, two open scans release the key;
  - SHIFT, CONTROL and BREAK are read on KR2_L at codes 10, 20 and 30.

  The console wires only 4 scan lines to the keypad (`keypad_if`: bits 3..2
  drive one of four rows low, bits 1..0 pick one of four columns). So one
  key answers at four codes per scan. Hits with the same low 4 bits count as
  the same key, not as a second key (parameter `KEY_LINES`).
- **Pots.** `pokey_potscan`: POTGO clears a counter and releases the dump
  transistors. Each pot latches the count when its line reaches logic 1.
  At 228 the scan ends, pots that never charged read 228, and the lines are
  grounded again. The count steps once per line, or once per bus cycle with
  SKCTL bit 2.
- **Interrupts.** IRQST uses 0 for pending, as in the original chip. An
  event sets its bit only while its IRQEN bit is 1, and writing 0 to IRQEN
  clears it. IRQ_L is low while any bit is pending.

- **Serial port.** `pokey_serial` sends and receives asynchronous frames
  (start bit, 8 data bits LSB first, stop bit). Audio channel 4 is the bit
  clock, two underflows per bit.
  - A SEROUT write fills a holding buffer. "Output needed" fires when the
    buffer moves into the shift register. "Transmission finished" fires when
    the last stop bit ends with the buffer empty.
  - A received byte goes to SERIN and fires "input ready".
  - SKSTAT bit 7 reports a frame error and bit 5 an overrun; SKRES clears
    them. SKCTL bit 7 forces the output low.

  Only this one asynchronous mode is offered. The console brings the port
  out as `sio_out`/`sio_in`.

## How far it can be trusted

Every block has a self-checking testbench in `tb/` that compares against
values worked out separately. Each bench was also run against a deliberately
broken copy of its block, and every one caught its fault.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_cpu_alu`         | 108,000 random operations against a reference (binary and decimal) |
| `tb_cpu6502c`        | a hand-assembled program exercising the addressing modes; cycle counts including page crossings and branches; random HALT; IRQ and NMI |
| `tb_antic`           | every AN code of two frames of a mixed display list against a model, and of another frame with fine scrolling and a display list crossing 1 KB; DMA cycles per line; DLI/VBI lines; NMIST; VCOUNT; WSYNC release; light pen |
| `tb_gtia`            | every frame-buffer pixel at priority 1 and 4 against a model; all 16 collision registers; HITCLR |
| `tb_pokey*`          | divider periods, joined pairs, volume, noise, timer rates; debounce; pot counts; IRQ masking and clearing; serial frames, loopback, frame error and overrun; register reads |
| `tb_display_buffer`, `tb_dvi_scan`, `tb_ram`, `tb_mem_map`, `tb_keypad_if`, `tb_color_lut`, `tb_clock_gen` | exhaustive or random checks of the small blocks |
| `tb_atari5200`       | the whole console at its default size for four frames, described below |

`tb_atari5200` plays the parts outside the console:

- a BIOS ROM with a small 6502 program that sets up a display, a player, a
  tone, timers, keypad and pot scanning and both NMIs, then loops on WSYNC;
- a cartridge holding the display list and random screen data;
- a keypad and a pot.

It counts each mechanism and fails if any never happens:

- DMA stalls and WSYNC stalls;
- DLIs, VBIs, timer and key IRQs, each taken by the CPU;
- the pot value read back;
- collisions;
- frame-buffer writes;
- audio changes;
- DVI frames.

It also checks background, player and mode F pixels in the frame buffer.
It runs in about 10 seconds.

Not covered by simulation: real cartridge images. No game ROM is included.
Games such as Defender, Mario Bros and Pac-Man come on 32 KB cartridges,
which fit the 32 KB cartridge window.

## Where this design departs from the original console

- There is no NTSC output. GTIA writes RGB into a frame buffer, and a
  640x480 scan-out shows it.
- There is a single master clock with clock enables, not the two-phase
  phi1/phi2 clocks.
- ANTIC's RDY is merged into the CPU's HALT.
- The colour table RGB values are approximate.
- The exact pixel offsets of fine scrolling are this design's own. Mode 3
  has no descenders.
- The serial port offers only the asynchronous mode clocked by channel 4.
- Not built: VDELAY.

## Simulating

All files are SystemVerilog 2017. The package `atari_pkg` must be read first.
With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps rtl/atari_pkg.sv tb/tb_atari5200.sv \
  -y rtl -y tb --top-module tb_atari5200 -o sim
obj_dir/sim
```

Replace `tb_atari5200` with any other `tb_<block>` to run a single block.
Each testbench prints one line, `TB_RESULT checks=N failures=M`, and stops
itself with a watchdog if it hangs. The testbenches use only `$urandom` for
random data, so they run on two-state simulators.

The top has no parameters. The sizes live in the blocks:

- `clock_gen.CC_DIV`
- `pokey.LINE_CYCLES`
- `pokey.KEY_LINES`
- `pokey_potscan.MAX_COUNT`
- `display_buffer` `WIDTH`/`HEIGHT`/`DW`
- the line and frame constants in `atari_pkg`
