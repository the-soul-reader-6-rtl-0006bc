# Playing-card reader in SystemVerilog

This design reads a playing card from a camera image and shows the card on an
8-digit seven-segment display. It uses no processor. A card lies face up and
upright on a dark table. The hardware turns each frame into black and white,
finds the card, cuts out the card's top-left corner (the rank character with
the suit symbol under it) and compares that corner pixel by pixel with 17
stored reference images, called kernels: 13 ranks and 4 suits. The comparison
is an XOR, so every pixel that differs adds 1 to a score. The rank kernel and
the suit kernel with the lowest scores name the card. All 17 comparisons run
at the same time, in the same pass over the frame.

The RTL follows a card-reader design built for a 65 MHz FPGA board with a
camera, VGA output, switches and a seven-segment display. Its block structure,
frame and kernel sizes, and the luminance threshold rule come from that
design. Details that the design leaves open are choices of this
implementation, and each file's header says which is which. The main
differences are listed in "How far to trust it" below.

## The pixel path

Everything runs on one 65 MHz clock. There are two streams:

* **Capture.** `camera_read` takes the camera's byte bus (pixel clock, href,
  vsync, 8 data bits) through a synchroniser. It pairs bytes into RGB 5:6:5
  pixels. `rotate` turns the 320x240 landscape camera image a quarter turn
  clockwise into a 240x320 portrait frame, by computing each pixel's write
  address. The frame is stored in frame buffer 1 (`bram_sdp`, 76800 x 16 bits).
* **Read-out.** `vga_gen` scans a 1024x768 raster (1344x806 clocks per frame,
  about 60 Hz). For each raster position, `mirror` computes the frame-buffer
  address (2 clocks). It can flip the image left to right and can show it 1:1
  or doubled. Frame buffer 1 returns the pixel 2 clocks later. `scale` blacks
  out positions outside the image, and `threshold` turns the pixel into a
  1-bit mask.

So the mask for raster position (h, v) is ready **4 clocks** after `vga_gen`
produced (h, v). The top keeps delayed copies of the counters,
`hcount_pipe`/`vcount_pipe` (`PIX_PIPE = 4`). Every block that works on the
mask uses these delayed copies. The recognition path therefore works on the
displayed stream, not on the stored frame. With scale `00` and no mirroring,
display coordinates and frame coordinates are the same. That is the only
setting in which recognition is meaningful.

## Finding the card

**Threshold.** The luminance is the plain average of the three colour fields,
each first widened to 8 bits: `L = (8R + 4G + 8B) / 3`. A pixel is white (1)
when `L` is above the 8-bit level set on `sw[15:8]`. Level 210 works for a
white card on a dark cloth.

**Centre of mass (`com`).** During the 240x320 frame area, every white pixel
adds its x and y to two sums and 1 to a count. When the raster reaches the
first position below the frame (row 320), two sequential 25-bit dividers
start. About 27 clocks later they give `x_com = Σx/n` and `y_com = Σy/n`. The
symbols printed on the card pull this point slightly off-centre, but it still
lands inside the card, which is all the next step needs. A frame with no white
pixel leaves the old centre in place.

**Edges (`find_edges`).** Each mask pixel is also written into frame buffer 2
(76800 x 1 bit). After each new centre, `find_edges` reads row `y_com` (240
pixels) and column `x_com` (320 pixels) from that buffer into two caches. It
then scans each cache from the frame border inwards. The first white pixel
from the left is the left edge, and likewise from the right, the top and the
bottom. The scan runs from the outside in because the cross-hair often crosses
black symbols on the card. A search from the centre outwards would stop at
those symbols. A whole pass takes about 890 clocks and ends long before the
raster returns to the top of the frame. So the edges stay still while the next
frame is read. The card must be upright: a rotated card gives edges that do
not match its corner.

## Reading the corner

This is the core of the design. Read it together with `xor_score.sv`.

The corner is a 28x69 pixel box whose top-left pixel is at
`(left_edge, top_edge)`. The top 28x40 holds the rank and the 28x29 below it
holds the suit. Each of the 17 `xor_score` instances watches its own window:
the rank window (rows 0..39 of the corner) for the 13 rank kernels, and the
suit window (rows 40..68) for the 4 suit kernels. An instance has two small
memories of the kernel's size:

* **Kernel memory.** Holds the reference image. 1 = white.
* **Corner memory.** Holds this card's pixels in the window.

While the delayed raster is inside the window, `corner_addr` gives the pixel's
row-major offset (`row * 28 + column`). Both memories are read at that
offset, and the current mask pixel is written into the corner memory at the
same offset. The corner memory reads before it writes, so its output is the
pixel stored one frame earlier. Both reads take 2 clocks. The XOR of the two
outputs (1 where they differ) is added to an accumulator. At the next raster
position (0, 0), the accumulator is copied to `score`, `score_valid` pulses,
and the sum starts again.

Over time, this works as follows:

| display frame | corner memory receives | accumulator compares kernel with | `score` shows |
|---|---|---|---|
| N   | corner of frame N   | corner of frame N-1 | result of frame N-2 |
| N+1 | corner of frame N+1 | corner of frame N   | result of frame N-1 |

The score published at the start of frame N+2 describes the corner seen in
frame N. With a still card, that means the card is named two display frames
(about 33 ms) after its edges are known. A score of 0 is a perfect match. The
largest possible score is 1120 for a rank kernel and 812 for a suit kernel,
so scores are 11 bits wide. If the edges move between frames, the stored
corner and the window disagree for one frame, and that frame's score is
meaningless. The reader is meant for a card that holds still.

`comparator` takes the 13 rank scores and the 4 suit scores when they update.
It keeps the lowest of each group, and the lower index wins a tie. It outputs:

* `rank_score` and `suit_score`: 7-bit seven-segment characters. Despite the
  names, these are characters, not scores.
* `card_map = suit * 13 + rank` (0..51).

Index orders: ranks 2, 3, ..., 10, J, Q, K, A (0..12); suits spades, hearts,
clubs, diamonds (0..3).

### Loading kernels

The kernel memories are written through the top's `kernel_*` port, one pixel
per clock:

* `kernel_sel` 0..12 selects a rank kernel and 13..16 a suit kernel.
* `kernel_addr` is `row * 28 + column`.
* `kernel_data` is 1 for white.

A kernel should be made at the same camera distance as the cards will be
read. The corner sizes are fixed, so the design assumes a fixed zoom.

## Display and switches

| switch | use |
|---|---|
| `sw[1:0]` | `00`: frame shown 1:1 (240x320) in the top-left of the screen; other values: 2x (480x640) |
| `sw[2]` | mirror the image left to right |
| `sw[3]` | show the black-and-white mask instead of the camera image |
| `sw[4]` | overlay the centre-of-mass cross-hair (magenta, over the frame) |
| `sw[5]` | overlay the four edge lines (magenta, across the screen) |
| `sw[15:8]` | threshold level |

`vga_out` is 12-bit 4:4:4 colour. It is registered in `vga_mux`, and the syncs
are delayed to match. `ssc` lights one digit at a time, for 2^17 clocks each:

| digit | shows |
|---|---|
| 0 | suit character (S, H, C, d) |
| 1 | rank character (2..9, 0 for ten, J, q, H for king, A) |
| 3..2 | `card_map` in hexadecimal |
| 7..4 | dark |

Both `an` and `ca` are active low, with `ca = {dp, g, f, e, d, c, b, a}`.

## Memory

| memory | size |
|---|---|
| frame buffer 1 (RGB) | 76800 x 16 = 1,228,800 bits |
| frame buffer 2 (mask) | 76800 bits |
| 17 kernel memories | 13 x 1120 + 4 x 812 = 17,808 bits |
| 17 corner memories | 17,808 bits |

The recognition path alone (mask frame, kernels and corners) uses
112,416 bits. All memories are plain arrays that synthesis maps to block RAM.

## Files

| file | block |
|---|---|
| `rtl/card_pkg.sv` | shared sizes, raster timing, types (`rgb565_t`, `edges_t`, `score_t`, ...) |
| `rtl/top_level.sv` | the whole reader |
| `rtl/camera_read.sv`, `rtl/rotate.sv` | capture |
| `rtl/bram_sdp.sv` | 2-clock simple dual-port RAM (frame buffers, kernels) |
| `rtl/vga_gen.sv`, `rtl/mirror.sv`, `rtl/scale.sv`, `rtl/vga_mux.sv` | display |
| `rtl/threshold.sv`, `rtl/com.sv` (+ `rtl/divider.sv`), `rtl/find_edges.sv`, `rtl/crosshair.sv` | finding the card |
| `rtl/corner_addr.sv`, `rtl/xor_score.sv`, `rtl/card_math.sv`, `rtl/comparator.sv` | reading the corner |
| `rtl/ssc.sv` | seven-segment display |

The board's clock generator (100 MHz to 65 MHz) is a vendor clocking
primitive and is not included. The top takes `clk_65mhz` as an input. There
is one synchronous, active-high reset, `rst`. The memories are not reset.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. To build and run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/card_pkg.sv tb/tb_top_level.sv --top-module tb_top_level
./obj_dir/Vtb_top_level
```

`tb_top_level` runs the whole reader at full size:

1. It loads 17 random kernels.
2. A camera model streams a synthetic scene: a white card on a dark table,
   whose corner carries the queen-of-hearts kernels (rank 10, suit 1).
3. It checks the rotated frame buffer, the centre of mass, the four edges, the
   card number and the matching scores, and the two seven-segment digits.
4. It checks displayed pixels in each display mode, mirrored and at 2x.

It also counts how often each mechanism occurred and fails if one never did.
It simulates about 16 display frames (17 M clocks) in roughly 15 seconds.

`tb_card_deck` shows all 52 cards in turn to `card_math`, with 3% of the
corner pixels flipped at random in every frame, and checks that each card is
named correctly.

The block testbenches use shortened rasters where the block does not care
about the full 1344x806 scan. `tb_bram_sdp` and `tb_threshold` run at full
size. `tb_threshold` checks all 65536 colours.

## How far to trust it

Verified by simulation: every block against an independent model in its
testbench, and the whole reader end to end on a synthetic scene. It has not
run on hardware or with a real camera. The following are this
implementation's own choices where the original design gives no detail:

* **Kernel contents are not included.** The original kernels were built into
  the memories. Here they are loaded through a port, so any deck can be used.
* **Seven-segment character shapes and the digit layout** are invented here.
* **The edge criterion** is first white pixel from the border. The original
  only says the edges are found from the pixels under the cross-hair. A
  bright speck on the table exactly on the cross-hair line would be taken as
  the edge.
* **The display timing** is the standard 1024x768 at 60 Hz for a 65 MHz clock.
* **The mirror and scale codes** are only 1:1 and 2x, and the mirror flips
  left to right.
* **The corner-memory timing** is read-before-write, which gives the two-frame
  latency described above.
* **The display-select switches** are `sw[5:3]`. The original routes `sw[7:0]`
  to the display multiplexer without saying what each bit does.
* **Camera details.** The byte order is high byte first. The camera's control
  registers must be set up elsewhere: the design has no configuration bus.

Ideas the original design mentions but does not build are not included:
averaging frames, weighted sub-regions of the kernels, colour for telling
suits apart, a UART link, rotation search, and zoom-independent corner sizes.

## Changing it

The sizes live in `card_pkg.sv`:

* frame: `FRAME_W`, `FRAME_H`
* corner and kernels: `CORNER_W`, `RANK_H`, `SUIT_H`
* raster timing: `H_*`, `V_*`

`xor_score` and `corner_addr` take the window size and row offset as
parameters. `ssc` takes `REFRESH_BITS`. If you change a block's latency,
change `PIX_PIPE` to match. Every block that works on the mask assumes the
4-clock alignment.
