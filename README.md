# Streaming contour detector: zero crossings of the morphological Laplacian

This RTL finds object contours in a grey-level video stream as the pixels
arrive. No frame is stored. A pixel is a contour pixel where the
*morphological Laplacian* changes sign and the local contrast is high
enough. The detector holds a few image lines and emits one contour bit per
input pixel, about two lines behind the input. It was designed for a
camera-to-VGA FPGA platform: a frame grabber delivers the pixels, and the
contour stream goes on to an SDRAM frame buffer that the VGA controller
reads.

Everything is written with 3x3 dilations and erosions. The grey-level stage
and the binary stage use the same generic block, `dilate_erode`. The
zero-crossing test is written so that both stages share their line buffers.

## The algorithm

Let `f` be the 8-bit image and `B` the 3x3 neighbourhood of a pixel (the
pixel and its 8 neighbours).

| quantity | definition | width |
|---|---|---|
| dilation `δf` | max of `f` over `B` | 8 |
| erosion `εf` | min of `f` over `B` | 8 |
| external gradient `g_ext` | `δf − f` (never negative) | 8 |
| internal gradient `g_int` | `f − εf` (never negative) | 8 |
| gradient `g` | `g_ext + g_int` | 9 |
| Laplacian `L` | `g_ext − g_int` | (only its sign is used) |
| `L⁻` | `L ≤ 0`, i.e. `g_ext ≤ g_int` | 1 |
| `L⁺` | `L > 0` = `NOT L⁻` | 1 |
| zero crossing `Z` | `δL⁺ AND δL⁻` | 1 |
| contour `c` | `Z AND (g > Th)` | 1 |

`Z` is 1 where the neighbourhood contains both a positive-Laplacian pixel
and a non-positive one. The threshold `Th` removes weak contours, such as
those caused by noise in flat regions.

### The cost trick: one neighbourhood for both binary operators

Written as above, `Z` needs two binary dilations of two different images
(`L⁺` and `L⁻`). Each would need its own two-line window. But a dilation of
a complement is the complement of an erosion: `δ(Xᶜ) = (εX)ᶜ`. So

    Z = δL⁻ AND NOT εL⁻

Now the binary dilation and erosion both work on `L⁻` and can share one
1-bit neighbourhood extractor. The grey-level stage uses the same sharing
for `δf` and `εf`.

`f` itself is also needed next to `δf` and `εf`, delayed by the stage's
latency. It is taken from the centre of the 8-bit window, which holds
exactly that pixel, so no separate 8-bit line delay is needed.

Line storage of the whole detector at 640-pixel lines:

| storage | bits |
|---|---|
| 8-bit neighbourhood, 2 lines × 640 pixels × 8 (637 per line in RAM) | 10,240 |
| 1-bit neighbourhood, 2 × 640 × 1 | 1,280 |
| contrast-bit delay compensation, 642 × 1 (641 in RAM) | 642 |

## Data flow

```
 in_data ─► dilate_erode (8 bit) ──δf,εf,f──► gradient_laplacian ──L⁻──► dilate_erode (1 bit) ──δL⁻,εL⁻──┐
 in_avail      │ one shared                      g_ext, g_int, L⁻,        │                      one shared │
 in_sof        │ neighbourhood                   g, g > Th                │                   neighbourhood │
               │                                       │ contrast bit                                      ▼
               │                                       └──► delay_line (1 bit, LINEWIDTH+2) ──► AND(δL⁻, NOT εL⁻, contrast)
                                                                                                           │
                                                                             out_contour, out_avail, out_sof ◄┘
```

Inside each `dilate_erode`:

```
            ┌─ edge_handler (fill 0)    ─► max_min (max) ─► reg ─► out_dilate
 in_data ─► neighborhood_extractor ─┤
            └─ edge_handler (fill 1…1) ─► max_min (min) ─► reg ─► out_erode
               window centre x22 ────────────────────────► reg ─► out_center
 in_avail, in_sof ─► scan_counter (column, row of the window centre; border flags)
```

## The neighbourhood extractor and the image border

This part is the hardest to follow and accounts for nearly all of the area.

**Window.** In raster order, a 3x3 window with newest pixel `x33` holds:

```
x11 x12 x13     x11 ◄z⁻¹─ x12 ◄z⁻¹─ x13 ◄─z^-(LINEWIDTH−2)─ x21
x21 x22 x23     x21 ◄z⁻¹─ x22 ◄z⁻¹─ x23 ◄─z^-(LINEWIDTH−2)─ x31
x31 x32 x33     x31 ◄z⁻¹─ x32 ◄z⁻¹─ x33 ◄── new pixel
```

Each window row holds two pixel registers. The pixel that leaves a row goes
through a (LINEWIDTH−2)-pixel `delay_line` and re-enters the row above
exactly one line later. That is two image lines of storage in all. The
`delay_line` is a read-first circular buffer with an output register, which
maps onto one dual-port block RAM. Every element moves only on a pixel
strobe, so idle clocks between pixels do not matter.

`x33` is the input pixel itself, not a register. So the window for pixel
*n* is available in the clock of strobe *n*, and its centre `x22` is pixel
*n − (LINEWIDTH+1)*. A pixel can be processed only once its last neighbour
has arrived, and that neighbour is one line and one pixel later. This is the
detector's basic latency.

**Border handling.** In a 1-D stream, the window of a pixel in column 0
also contains, on its left, pixels from the end of the previous line. The
window of a pixel in the last column contains pixels from the start of the
next line. The rows above line 0 and below the last line hold pixels of
other frames. `edge_handler` replaces every window entry outside the image
with a value that cannot win:

- 0 (−∞) for the dilation;
- all ones (+∞) for the erosion.

The same rule serves the 1-bit stage. As a result, a pixel on the border is
processed with only its neighbours inside the image.

**Counters.** `scan_counter` tracks the image position of the window
*centre*, not of the input pixel:

- the column counter wraps at LINEWIDTH;
- the row counter steps on each column wrap and wraps at COLHEIGHT.

After reset, the first strobe is taken as pixel (0,0), so the counters start
LINEWIDTH+1 positions before it.

`in_sof` marks pixel (0,0) of a frame. It does not move the counters at
once, because the centre is still LINEWIDTH+1 pixels back, in the previous
frame. Instead, `in_sof` arms a short down-counter, and the position is
forced to (0,0) on the strobe where the new frame's first pixel reaches the
centre. With back-to-back frames this changes nothing. After filler pixels,
or a stream that starts in mid-frame, it realigns the counters without
mislabelling the end of the previous frame. Two `in_sof` strobes must be
more than LINEWIDTH+1 strobes apart.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `threshold` | in | 9 | `Th`; a pixel is a contour only if `g > Th` (static) |
| `in_avail` | in | 1 | one-clock strobe per pixel; strobes may be back to back |
| `in_sof` | in | 1 | with the strobe of pixel (0,0) of a frame |
| `in_data` | in | 8 | grey level |
| `out_avail` | out | 1 | one strobe per input strobe, exactly 4 clocks later |
| `out_sof` | out | 1 | with the output strobe of pixel (0,0) |
| `out_contour` | out | 1 | contour bit of that pixel |

The output stream runs 2·(LINEWIDTH+1) pixels behind the input: one line
and one pixel per 3x3 stage. The detector is driven only by input strobes.
Because of this, the last two lines of a frame come out while the next
frame, or trailing filler pixels, go in. A source that stops after its last
frame must send 2·(LINEWIDTH+1) more strobes of any value to flush it.
Outputs before the first `out_sof` after reset belong to no frame.

The pipeline registers sit:

- at the output of each `dilate_erode`;
- after the gradient arithmetic;
- at the final AND.

The longest combinational path is the edge handler plus four
compare-select levels of `max_min`. The design accepts one pixel per clock.

## Files

| file | contents |
|---|---|
| `rtl/contour_pkg.sv` | pixel/gradient widths, default image size, `morph_op_e` |
| `rtl/contour_detector.sv` | top: the two stages, arithmetic, delay compensation, zero crossing |
| `rtl/dilate_erode.sv` | shared-neighbourhood dilation + erosion (any pixel width) |
| `rtl/neighborhood_extractor.sv` | 3x3 window from two line delays |
| `rtl/delay_line.sv` | strobe-enabled RAM delay line |
| `rtl/scan_counter.sv` | column/row counters of the window centre, border flags, resync |
| `rtl/edge_handler.sv` | border substitution (−∞ / +∞) |
| `rtl/max_min.sv` | 9-input max or min |
| `rtl/gradient_laplacian.sv` | `g_ext`, `g_int`, `L⁻`, `g`, `g > Th` |
| `tb/tb_*.sv` | self-checking testbenches, one per module |
| `tb/contour_harness.sv` | stimulus + reference model shared by the end-to-end tests |
| `tb/tb_contour_full.sv` | end-to-end test at the default 640 x 480 |
| `tb/tb_contour_512.sv` | end-to-end test at 512 x 512 |

Parameters: `LINEWIDTH` (default 640) and `COLHEIGHT` (default 480) on
every module that stores or counts pixels, and `WIDTH` (8 or 1) on the
generic pixel blocks. The image must be at least 4 pixels wide and 2 lines
high.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself; a
watchdog ends a run that hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/contour_pkg.sv \
          tb/tb_contour_detector.sv --top-module tb_contour_detector -Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run another one. `tb_contour_full` runs two
640 x 480 frames in about a second.

What the tests establish:

- **End to end** (`tb_contour_detector` at 16 x 12 with three frames and
  filler pixels between them; `tb_contour_full` at the defaults;
  `tb_contour_512`). Frames hold blocks of grey levels, ramps and noise. A
  reference model computes the contour map straight from the definitions
  (max/min over the in-image neighbourhood, `Z` as "both signs present",
  not through the `δL⁻ AND NOT εL⁻` rewrite). Every output pixel is
  compared. The tests also check the 4-clock latency of every strobe and
  the position of `out_sof`. They count, and require, each mechanism:
  - back-to-back strobes and idle gaps;
  - zero crossings rejected by the threshold;
  - contours on the border;
  - counter resync;
  - frame overlap at the output.
- **Per module**. Window taps against a model of the stream, delay length,
  counter positions including resync, substitution for every flag
  combination, max/min, and the gradient/Laplacian arithmetic including
  `L = 0`. Each test was also shown to fail on a deliberately broken copy of
  its module.

## Choices made here, and departures

- **Image size.** The design fixes the size only as `LINEWIDTH` x
  `COLHEIGHT`. 640 x 480, a VGA frame, is this implementation's default.
  A frame of a different size needs new parameters; for example the
  classic 512 x 512 test images need `LINEWIDTH=512, COLHEIGHT=512`.
- **Stream control.** The interface has one strobe per pixel plus a second
  control signal, which is not specified further. It is taken here to be
  a start-of-frame strobe, `in_sof`. The deferred resync is this
  implementation's addition.
- **Delay of `f`.** A delay line on `f` would give `f` the same latency as
  `δf`/`εf`. This design instead reads `f` from the centre of the shared
  8-bit window, which needs no extra storage.
- **Stage-2 register.** The design has a one-pixel register on the `δL⁻`
  branch. Here it is the shared output register of the 1-bit
  `dilate_erode`, which both branches pass through, so they stay aligned.
- **Delay compensation length.** The contrast bit is delayed by
  LINEWIDTH+2 strobes, the exact stage-2 latency including its output
  register. This is "one line" in round terms.
- **Own choices.** Threshold width (9 bits, like `g`), reset polarity,
  pipeline registers and RAM-based delay lines.
- **Not included.** The unoptimised detector, with a separate
  neighbourhood for `δL⁺` and an 8-bit delay line for `f`, is not built.
  The platform around the detector is also left out: video decoder and its
  I2C set-up, frame grabber, SDRAM controller, SDRAM, VGA controller and
  configuration CPLD. Their behaviour is not specified here. The
  detector's input and output streams are the ports where they would
  connect.
