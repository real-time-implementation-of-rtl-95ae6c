# Sobel edge detector with binary VGA display

This design finds the edges in a small grey-scale picture and shows them on a VGA
monitor. A 90 x 90 image with 8 bits per pixel sits in block RAM. A streaming engine
slides a 3x3 Sobel window over it, one pixel per pixel clock. For each pixel it writes
the gradient magnitude |Gx| + |Gy|, clamped to 255, into a second block RAM. A
640x480 @ 60 Hz VGA controller scans the screen all the time. While the beam is over
the 90 x 90 picture, the display path reads the gradient image and compares each value
with an 8-bit threshold. It drives the one-bit red, green and blue lines all high
(white: edge) or all low (black). The target is a 50 MHz board with a 3-bit VGA port
and no DAC, such as a Spartan-3E starter kit.

The design follows a Master's thesis on real-time Sobel edge detection on a Spartan-3E
FPGA. The thesis gives the arithmetic, the window structure, the VGA timing, the memory
sizes and the top-level ports. The register-level structure, the handshakes and the
pipelining are this implementation's own. The section "Where this design makes its own
choices" lists each departure.

```
             load port                    threshold[7:0]
                 |                              |
                 v                              v
  +-----------------+   rd   +--------------+   wr   +------------------+   rd   +-----------+  r,g,b
  | input frame_ram | -----> | sobel_engine | -----> | output frame_ram | -----> | pixel_gen | ------>
  |   8 x 8100      |        |  counter     |        |   8 x 8100       |        |  compare  |  hsync
  +-----------------+        |  window 3x3  |        +------------------+        |  + delay  |  vsync
                             |  operator    |                                    +-----------+
                             +--------------+                                         ^
                                                          +----------+  hcount,vcount |
  clk 50 MHz --> pixel_clk_div (mod 2) -- pix_ce -------> | vga_sync | ---------------+
                                                          +----------+
```

## The Sobel arithmetic

The window's nine pixels are numbered column by column, with p4 at the centre:

```
  p0  p3  p6
  p1  p4  p7
  p2  p5  p8
```

For the centre pixel:

```
  Gx = (p2 - p0) + 2*(p5 - p3) + (p8 - p6)     bottom row minus top row
  Gy = (p0 - p6) + 2*(p1 - p7) + (p2 - p8)     left column minus right column
  G  = |Gx| + |Gy|,  shown as min(G, 255)
```

`sobel_operator` computes this with no registers, using 11-bit two's-complement numbers.
Gx and Gy lie in -1020..+1020. Each absolute value is found by inverting and adding one
when bit 10 is set. The 11-bit sum (at most 2040) becomes 255 when any of its bits 10..8
is set; otherwise its low byte passes through. The approximation |Gx| + |Gy| replaces the
true magnitude sqrt(Gx² + Gy²), as in the original design. The signs of Gx and Gy do not
affect the result.

## The streaming window and the image border

This is the part that takes most care to follow.

**Border.** Each output pixel needs its eight neighbours, so the image edges need a rule.
This design puts a one-pixel ring of zeros around the image. The engine's row/column
counter walks over 92 x 92 positions in raster order. At a position inside the image it
reads the input RAM; the read address is a running counter, because reads come in raster
order. At a border position it feeds a zero. As a result, every one of the 8100 pixels
gets an output, and the gradient at the image edge is measured against black.

**Window.** `sobel_window` holds three rows of three registers. A new pixel enters the
newest (bottom) row. The pixel leaving that row goes into a `row_buffer`, then into the
middle row of registers, then through a second `row_buffer` into the top row. Each row
buffer is 92 − 3 = 89 pixels long. So three registers plus one buffer delay a pixel by
exactly one bordered row, and the three register rows always show the same three columns
of three consecutive rows. The row buffers are circular buffers: a pointer walks over 89
words, and at each step the old word is read out and the new pixel is written in its
place. Neither the buffers nor the window are reset. Whatever they hold from before a pass
only reaches windows centred on the zero border, and those windows are never written out.

**Pipeline.** The engine steps only on pixel-clock enables. Each stage below is one enabled
clock:

| stage | what happens |
|---|---|
| S0 | counter position → input RAM address (`rd_en`, `rd_addr`) |
| S1 | RAM data, or zero at the border, is shifted into the window |
| S2 | once the newest window pixel is at bordered row ≥ 2 and column ≥ 2, the window is centred on an image pixel: `wr_en` with the next raster address and the magnitude |

Writes come out in raster order, so the output address is also a counter. A pass takes
92·92 + 2 = 8466 pixel clocks: 0.34 ms at 25 MHz, well inside one 16.8 ms video frame.
It writes exactly 8100 pixels. Once the window has filled, it writes one pixel per clock,
except for two clocks at the start of each bordered row.
`busy` rises on the clock that accepts `start` and falls with the last write. A `start`
while busy is ignored.

## The display path

`vga_sync` has a mod-800 pixel counter and a mod-525 line counter. Both count from the
first visible pixel, so the counters are the screen coordinates:

| | visible | front porch | sync pulse (low) | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 33 | 525 |

`hdisplay` and `vdisplay` are high while the counters are below 640 and 480.

`pixel_gen` places the picture at (`IMG_X0`, `IMG_Y0`), which defaults to the top-left
corner. It reads address (y − Y0)·90 + (x − X0) of the gradient RAM while the beam is over
the picture. When the data return one pixel clock later, it sets r = g = b =
(pixel > threshold). Black is driven everywhere else. hsync and vsync pass through the
same two registers, so all five outputs come straight from flip-flops and stay aligned:
the colour and syncs at the pins are two pixel clocks behind the counters. The threshold
is applied at display time. Changing it takes effect on the next pixel, and the Sobel pass
does not need to run again.

## Clocking and reset

There is one clock domain: the 50 MHz board clock. `pixel_clk_div` is a mod-2 counter
that makes the enable `pix_ce`, high on every second clock. The VGA controller, the
display path and the Sobel engine all advance only on that enable, so they run at
25 MHz. The frame rate is 25 MHz / (800 · 525) = 59.5 Hz. `rst` is active high and
synchronous. It clears the counters and pipeline flags and sets both syncs inactive
(high).

## Top-level interface (`image_display`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz clock |
| `rst` | in | 1 | synchronous reset, active high |
| `threshold` | in | 8 | a gradient above this shows white |
| `load_we`, `load_addr`, `load_data` | in | 1, 13, 8 | write one input pixel at raster address row·90 + col |
| `start` | in | 1 | run a Sobel pass over the input RAM |
| `busy` | out | 1 | a pass is in progress |
| `r`, `g`, `b` | out | 1 each | VGA colour; always equal (black or white) |
| `hsync`, `vsync` | out | 1 each | VGA syncs, active low |

| parameter | default | meaning |
|---|---|---|
| `IMG_X0`, `IMG_Y0` | 0, 0 | screen position of the picture's top-left pixel |
| `IN_INIT_FILE` | `""` | optional `$readmemh` file for the input RAM (8100 hex words, raster order) |

The image size (90 x 90), the pixel width and the VGA timing are constants in
`rtl/sobel_pkg.sv`. `sobel_engine` and `pixel_gen` take the image size as parameters.

**Loading an image.** One pass runs by itself on the clock after reset. It processes
whatever the input RAM holds, such as its initial contents from `IN_INIT_FILE`, the way a
board comes up with a pre-loaded image. To show a new image:

1. Write its 8100 pixels through the load port, one per clock.
2. Pulse `start`.
3. Wait for `busy` to fall.

The display shows the gradient RAM all the time, so a pass in progress can be seen as it
is written.

## Where this design makes its own choices

These points follow from the original design's description only loosely, or not at all:

- **Border handling.** The original loops over every pixel and reads one pixel beyond each
  edge of the image. It does not say what is read there. Here the border pixels are zero.
- **Vertical timing.** The original timing table adds up to 521 lines (29-line back porch),
  while its controller uses a mod-525 counter and its pixel-rate calculation uses 525.
  This design keeps 525 lines and the table's 10-line front porch and 2-line pulse, which
  leaves a 33-line back porch (`V_BP`). The horizontal numbers agree with the table.
- **Vertical mask.** One printed form of the vertical mask has a bottom row of −1, 2, 1.
  The Gy formula and the reference code both imply −1, −2, −1, which is used here.
- **Memories.** The original uses the vendor's block-memory generator with 8 x 8100 words,
  write-first mode, and contents from an initialisation file. `frame_ram` is a plain
  inferable RAM with one write port and one registered read port with a read enable. That
  lets the engine and the display share the output RAM. The read enable keeps the
  one-step latency exact when the enable does not come on every clock.
- **Loading and starting.** The original has no load port and no start input; the image
  is fixed at configuration. Both are added here; the automatic pass after reset keeps
  the original behaviour.
- **Pixel clock.** The original divides the clock with a mod-2 counter. Here that counter
  makes a clock enable instead of a second clock.
- **Threshold.** The original binarises with an 8-bit threshold (tested at 150, 100 and
  50). It does not say where the comparison sits or how a value equal to the threshold is
  treated. Here the comparison sits in the display path, and equal counts as black.
- **Picture position.** Not specified in the original; the default is the top-left corner.
- **Not built.** The board's clock managers and VGA connector, and the off-line
  conversion of a colour photograph to a 90 x 90 grey image, have no logic of their own
  here. A separate test step of the original showed the input image itself on the monitor
  through the same RAM-to-VGA path. That step is not part of this top.

## Size

With yosys coarse synthesis, the top uses about 115 flip-flop bits and 131 kbit of
memory. That memory is the two 64.8 kbit frame buffers plus the two 712-bit row buffers.
The logic is a few dozen adders, comparators and multiplexers. The two frame buffers fit
the 216 kbit of block RAM on an XC3S500E.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. `tb/sobel_ref_pkg.sv` holds
a reference Sobel model written straight from the masks with plain integers.

| testbench | what it checks |
|---|---|
| `tb_pixel_clk_div` | enable on every second clock after reset; 50 enables per 100 clocks |
| `tb_vga_sync` | two full frames at 640x480: every counter value, sync and display flag at every pixel; sync pulse lengths and counts; nothing moves without the enable |
| `tb_frame_ram` | contents loaded from an initialisation file; all 8100 words written and read back; 20 000 random mixed operations against a model, including write-first and read-enable hold |
| `tb_row_buffer` | 89-step delay with a random enable |
| `tb_sobel_window` | p0..p8 against the stream history, for 7-pixel and 92-pixel rows |
| `tb_sobel_operator` | Gx, Gy and magnitude for corner cases (±1020, sums around 255, 2040) and 20 000 random windows |
| `tb_sobel_engine` | two full 90 x 90 passes against the reference with a zero border: every write address and value, 8100 reads and writes, one `done`, pass length 8466 pixel clocks, and a `start` while busy ignored |
| `tb_pixel_gen` | colour and sync outputs two enabled clocks after the position, thresholds that hit the equality case, random enable |
| `tb_image_display` | the whole design at its default size: automatic pass after reset, image load, requested pass (16 931 clocks), then three complete VGA frames at thresholds 150, 100 and 50, with every pixel time of hsync, vsync and colour checked against the reference; it also counts border pixels, clamped pixels, white and black pixels and sync pulses |

The end-to-end test runs in a few seconds. To run any testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_image_display.sv \
    --top-module tb_image_display -o sim
./obj_dir/sim
```

Replace `tb_image_display` with another testbench name to run it. Every testbench was also
run against a copy of its module with one deliberate bug, and each reported failures.
Examples of those bugs: a sync pulse one pixel too long, no zero at the border, a
threshold comparison of `>=` instead of `>`, and a row buffer one word short.

What the tests do not cover: the design has not been run on an FPGA or a real monitor. The
test images are synthetic (blocks, a ramp and random texture), not photographs.

## Files

- `rtl/sobel_pkg.sv`: shared constants and types (pixel, window, gradient)
- `rtl/image_display.sv`: top level
- `rtl/pixel_clk_div.sv`: mod-2 pixel enable
- `rtl/vga_sync.sv`: VGA counters and sync decoders
- `rtl/frame_ram.sv`: frame buffer RAM (input and gradient images)
- `rtl/sobel_engine.sv`: raster scan, zero border, write-back
- `rtl/sobel_window.sv`: 3x3 window registers
- `rtl/row_buffer.sv`: row delay lines between window rows
- `rtl/sobel_operator.sv`: Gx, Gy, |Gx| + |Gy|, clamp
- `rtl/pixel_gen.sv`: RAM-to-VGA read, threshold, sync alignment
- `tb/`: one testbench per module, the reference package, and `frame_ram_init.hex`
  (16 words, word k = (37·k + 11) mod 256) for the RAM initialisation test
