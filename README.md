# A 2D graphics platform for a 640x480, 256-colour VGA display

This RTL accelerates 2D drawing for a small soft-processor system on an FPGA
board with two external memories. The board has a 16-bit SDRAM and a 512 kB
16-bit asynchronous SRAM. The processor never draws into the picture on
screen. It issues drawing instructions that fill, plot and composite into
byte-per-pixel framebuffers in SDRAM. When a frame is complete, one more
instruction copies it into the SRAM. A display pipeline reads the SRAM
continuously, maps every byte through a 256-entry colour palette to 16-bit
colour and drives a VGA monitor at 640x480 and 60 Hz. The copy is timed
against the display, so a frame is never shown half old and half new.

Two Sega Genesis 3-button game pads are read into a register for the
application.

```
             custom instructions                      Avalon-MM, 16-bit
 processor ──► rect | line | circle | copy ──┐
 processor data path ────────────────────────┼─► arbiter ─► SDRAM controller ─► SDRAM
                                             │
 frame-done instruction ─► fb_streamer ◄─────┘ (burst reads of the finished frame)
                              │
                              ├─ SRAM pins (display buffer, one frame)
                              ▼
                 pixel FIFO (2 pixels in @ 50 MHz, 1 out @ 25.2 MHz)
                              ▼
                 palette decoder (256 x RGB565)
                              ▼
                 VGA timing + 30-bit DAC pins
```

## Showing a frame without tearing

This section covers `fb_streamer`, `fb_sdram_reader`, `fb_dma_manager` and
`pixel_fifo`. It is the subtle part of the design.

The SRAM holds the only copy of the picture being displayed. The address map
is one pixel per byte, two pixels per 16-bit word, words 0 to 0x257FF. The SRAM
has one port, and it has two users:

* **Display refill.** The pixel FIFO is written with 16-bit words on the
  50 MHz system clock. It is read one byte per 25.2 MHz pixel clock. The
  manager reads SRAM words in frame order whenever the FIFO level falls below
  `LOW_WM` (a quarter full). It keeps reading until the level reaches
  `HIGH_WM` (nearly full). A read is one SRAM cycle, so refill takes about a
  quarter of the SRAM's cycles.
* **Frame copy.** The `ci_frame_done` instruction raises `copy_req`. The
  streamer starts `fb_sdram_reader` at once. That reader pre-fetches the
  SDRAM frame in bursts of `BURST` words into a small local buffer. The
  manager does not write anything yet. It waits in `C_WAIT` until the
  refill has put the last word of the current frame into the FIFO
  (`frame_end`). Then it writes the new frame from word 0 upwards, one word
  per clock.

From then on there are two rules.

1. **Refill has priority.** A copy write gives way in any clock where the
   FIFO needs data (`write_paused` counts this).
2. **A refill read never passes the copy's write address.** If the display
   catches up with the copy (`read_held`), the read waits for that word to be
   written. This can only happen when the SDRAM is slow.

Both rules together mean the display sees either all of the old frame or all
of the new one. The copy starts when the last visible word has been queued,
which is before the vertical blanking. With a wait-free SDRAM the copy moves
one word per clock, apart from the clocks it gives to refill. A full frame
takes about 3.6 ms. The display reaches the first line of the new frame
only after the vertical blanking (1.4 ms), and then reads more slowly than
the copy writes, so it does not catch up.

The `fb_streamer` registers are:

* Register 0 is the SDRAM byte address of the frame to copy.
* Register 1, bit 0, is busy.

`ci_frame_done` stalls the processor until the last word has been written. Its
result counts the frames handed over.

The pixel FIFO crosses clock domains with Gray-coded pointers and two-flop
synchronisers. Each entry is `{sop, pixel1, pixel0}`, and the low byte leaves
first. The start-of-frame flag travels with the first pixel. The VGA generator
resynchronises on it, so a stream that gets out of step recovers at the next
frame. If the stream runs dry in the visible area, the generator shows black,
pulses `vga_underflow`, and waits for the next start of frame at the screen
origin. This also happens once after reset, so the first frame is black, and
the first `frame_end` (and so the first frame copy) comes in the second
frame.

## Drawing instructions

All drawing engines are Avalon-MM masters on the SDRAM through a round-robin
arbiter. A master keeps the grant while it keeps requesting, and until its
outstanding reads have returned.

Each instruction follows the same protocol. `ci_start` is a one-clock pulse,
with `n`, `dataa` and `datab` held until `ci_done`. The register-setting codes
take one clock. The run code holds the processor until the last write has
been accepted, so the processor waits for as long as the shape takes. All
framebuffers are W bytes per row. Coordinates are signed 16-bit values, packed
as `{y, x}`.

| instruction (`ci_sel`) | n=0 | n=1 | n=2 | n=3 | cycles for the run |
|---|---|---|---|---|---|
| rectangle (0) | base, colour | {y1,x1}, {y2,x2} | run | — | 1 + Σ rows (⌈bytes/2⌉ + 1) |
| line (1) | base, colour | {y1,x1}, {y2,x2} | run | — | points + 1 |
| circle (2) | base, colour | {cy,cx}, radius | run | — | 8 × octant steps + 1 |
| copy (3) | src base, dst base | {sy,sx}, {h,w} | {dy,dx}, {t_en, t_colour} | run | about 1 per byte, plus a few per row |
| frame done (4) | — | — | — | — | until the SRAM copy ends |

The table shows the SDRAM with no wait states. Wait states add clocks one for
one.

* **Rectangle.** The rectangle is filled row by row. The rows use
  `avalon_write_seq`, which writes two pixels per clock, with byte enables at
  an odd start or end. Corners are inclusive, may be given in any order, and
  are clipped to the screen.
* **Line.** The line uses integer Bresenham over all eight octants. It plots
  one point per clock. Points off the screen are stepped over but not
  written.
* **Circle.** The circle uses the midpoint circle algorithm with d = 1 − r. It
  plots eight mirrored points per step, one per clock, and clips them
  individually. It draws the outline only.
* **Copy.** The copy moves a w × h window between two buffers, one row at
  a time through `avalon_copy_seq`. That engine works in chunks of up to
  64 bytes. It first reads every source word of the chunk with back-to-back
  pipelined reads, realigning the bytes into a small buffer. It then writes
  the chunk, two bytes per write wherever the destination address is even.
  Any source and destination alignment works.
* **Transparency.** When `t_en` is set, source bytes equal to `t_colour`
  have their byte enable cleared, so the destination keeps its pixel. A word
  whose two bytes are both transparent costs a clock but no bus cycle. This
  is how layers with transparent areas are composited. The result is the
  number of bytes skipped. The window is not clipped.

## Palette

`palette_decoder` is a 256 × 16 RAM. It is written from the system clock and
read in the pixel clock domain with one clock of latency. At power-up it holds
a fixed 8-bit to RGB565 mapping. Each 8-bit index is read as RGB 3-3-2, and
each field is widened by repeating its top bits.

Writes take effect on the next pixel. A palette change in the middle of a
frame therefore shows in the middle of that frame. The VGA stage widens
RGB565 to the DAC's 10 bits per channel in the same way.

## Game pads

`genesis_if` polls both pads every `POLL_MS` = 60 ms. The first poll happens
right after reset.

A poll takes two phases:

1. Select goes low. After `SETTLE` clocks it samples Up, Down, A and Start.
2. Select goes high. After another `SETTLE` clocks it samples Up, Down, Left,
   Right, B and C.

Pins are active low and pass through a two-flop synchroniser. The register
reads `{start, c, b, a, right, left, down, up}` for player 1 in bits 7:0 and
for player 2 in bits 15:8, with 1 meaning pressed.

The top maps the adapter board onto the 36-bit GPIO header:

| signal | player 1 GPIO | player 2 GPIO |
|---|---|---|
| UP | 35 | 13 |
| DOWN | 31 | 9 |
| LEFT | 27 | 5 |
| RIGHT | 25 | 3 |
| A/B | 33 | 11 |
| START/C | 23 | 1 |
| SELECT (output) | 29 | 7 |

## Top level, `gfx_top`

The defaults are the full design:

* 640 × 480 pixels;
* VGA blanking 160 pixels per line (16 + 96 + 48) and 45 lines per frame
  (10 + 2 + 33);
* a 512-entry pixel FIFO;
* 32-word bursts;
* a 50 MHz system clock.

Two clocks come in: `clk_sys` at 50 MHz and `clk_pix` at 25.2 MHz, each with
its own synchronous reset.

The processor, SDRAM controller, SRAM chip, DAC and clock PLL are outside this
RTL and appear as ports. The top brings out:

* the custom-instruction port (`ci_*`) and the processor's own SDRAM path
  (`host_req/host_rsp`);
* the SDRAM master (`sdram_req/sdram_rsp`, 16-bit data, byte addresses,
  pipelined reads with `readdatavalid`);
* three small register slaves: palette `pal_*`, streamer `fbs_*` and pads
  `gen_*`;
* the SRAM pins, with the data bus split into `dq_o/dq_oe/dq_i` for a pad
  buffer;
* the VGA DAC pins;
* the GPIO header, split into in, out and enable.

Bus types and screen constants are in `gfx_pkg`.

## How it departs from the original design

* **Layer copy method.** The original names copy components that move 8 or
  16 bits per clock. The chunked read-then-write scheme used here is this
  design's own way of getting about one clock per byte with a pipelined
  SDRAM and arbitrary alignment.
* **One instruction port.** The original uses separate custom-instruction
  slots for each primitive. Here the instructions share one port with a
  selector, and operand layouts, result values and register maps are this
  design's own.
* **VGA stage written here.** The VGA timing generator and the 16-to-30-bit
  colour conversion were vendor components in the original. Here they are
  written out in one module with the standard 640x480 timing.
* **Pad polling period.** The pads are polled every 60 ms, not once per video
  frame.
* **Choices the original leaves open.** These are this design's own:
  * FIFO depth, watermarks and burst length;
  * the SDRAM arbitration;
  * clipping of lines, circles and rectangles;
  * negative sync polarity;
  * the read hold that keeps a slow SDRAM from causing tearing.
* **Not covered.** The processor, SD-card loading, the palette and bitmap file
  tools, and the software library are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against a
reference model written in the testbench, and ends by printing
`TB_RESULT checks=N failures=M`. The behavioural models `sdram_model` (with
configurable read latency and random wait states) and `sram_model` stand in
for the memories.

* **Drawing engines.** The rectangle, line, circle and copy engines are
  compared byte for byte with reference drawings. The cases include shapes
  partly or fully off the screen, every octant, and copies with and without
  transparency. The cycle counts in the table above are checked exactly.
* **Frame path.** `fb_dma_manager_tb` and `fb_streamer_tb` check that every
  frame received is entirely one picture. They force paused writes and held
  reads, and check that the copy begins only after the frame end.
* **VGA and pads.** `vga_sync_gen_tb` measures 800 × 525 = 420,000 pixel
  clocks per frame and the porch and sync widths. `genesis_if_tb` checks every
  button on both pads and the poll period.
* **End to end, reduced size.** `gfx_top_tb` runs the whole design at
  64 × 16 with short blanking. It draws, composites, hands frames over, changes
  palette entries and reads the pads. It checks every captured VGA frame
  against the reference image through the palette. It counts each mechanism
  and fails if any of these never happened:
  * clipped points;
  * transparent skips;
  * bus contention;
  * copy waiting for the frame end;
  * paused copy writes;
  * a palette change on screen;
  * pad polls.
* **End to end, full size.** `gfx_top_full_tb` runs the top at its defaults.
  It does a full-screen fill, two diagonals, a radius-239 circle, a
  full-screen transparent layer copy and a frame hand-over. It then checks
  SDRAM, SRAM and the
  captured 640x480 frames, plus line, frame and poll timing. It takes a few
  seconds.

Measured at 50 MHz with a wait-free SDRAM:

| operation | time |
|---|---|
| full-screen rectangle | 3.08 ms |
| circle of radius 239 | 27 µs |
| full-screen layer copy, with transparency | 6.44 ms |
| frame copy into SRAM, frame end to last word | 3.57 ms |

The frame-done instruction also waits up to one frame period (16.7 ms) for
the end of the frame being displayed.

To run a testbench with Verilator 5 (add `-j 8` etc. as you like):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
    -y rtl -y tb +libext+.sv rtl/gfx_pkg.sv tb/gfx_top_tb.sv --top-module gfx_top_tb
obj_dir/Vgfx_top_tb
```

Substitute any other `tb/<name>.sv` and its module name. The testbenches load
memories only after a few reset clocks, so they do not depend on power-up
values and work with `+verilator+rand+reset+2`.

## Files

`rtl/`:

* `gfx_pkg.sv`: types and constants.
* `gfx_top.sv`: the top level.
* Drawing: `ci_draw_rect`, `ci_draw_line`, `ci_draw_circ`, `ci_copy_rect`,
  `ci_frame_done`, with the helpers `avalon_write_seq` and `avalon_copy_seq`.
* Interconnect: `avalon_arbiter`.
* Display: `fb_streamer`, `fb_sdram_reader`, `fb_dma_manager`, `pixel_fifo`,
  `palette_decoder`, `vga_sync_gen`.
* Pads: `genesis_if`.

`tb/`: one `<module>_tb.sv` per module, plus `gfx_top_full_tb.sv`,
`sdram_model.sv` and `sram_model.sv`.
