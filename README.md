# Streaming Harris corner detection and frame-to-frame corner matching

This design finds Harris corners in a grey-scale camera stream and pairs each
corner with the same corner in the previous frame. A robot can then estimate
its own planar motion from those pairs. The whole image is never stored. Pixels
arrive one per clock, and every stage is a pipeline that keeps only a few image
rows in line buffers. So a frame's corners are known as soon as its last pixel
has arrived.

Three ideas keep the hardware small:

* **No multipliers in the filters.** The 5x5 Gaussian is replaced by the integer
  template `1/16 * [0 0 1 0 0; 0 1 1 1 0; 1 1 4 1 1; 0 1 1 1 0; 0 0 1 0 0]`.
  Its weights are 1 or 4 and they sum to 16, so it needs only adders and shifts.
  The same template serves as the pre-filter on the pixels and as the three
  low-pass filters on the gradient products.
* **Powers of two for the constants.** The Harris weight is `a = 2^-A_SHIFT`
  (1/16 by default). The corner threshold is `Rmax/64`.
* **Matching by equal response.** Each pixel has its own response value `R`, and
  two different corners almost never share one. So a corner of this frame and a
  corner of the last frame with the same `R` are taken to be the same scene
  point. No descriptor and no search window are needed. A pure translation of
  the scene leaves `R` unchanged.

## Data path

```
pix ──► pre-filter ──► Sobel ──► Ix², Iy², IxIy ──► 3 × low-pass ──► R, Rmax ──► 3×3 NMS ──► corner matcher ──► FIFO 1 (this frame x,y)
 (8b)    lp5_filter    sobel_grad  grad_products     lp5_filter      harris_     nms        corner_matcher    FIFO 2 (last frame x,y)
          5×5           3×3        (22b signed)      5×5 (22b)       response               (RAM 1, RAM 2)
```

| stage | module | window | output | latency (clocks) |
|---|---|---|---|---|
| pre-filter | `lp5_filter` (DW=8, unsigned) | 5×5 | 8-bit pixel | 3 |
| gradient | `sobel_grad` | 3×3 | Ix, Iy, 11-bit signed, ±1020 | 4 |
| products | `grad_products` | – | Ix², Iy², IxIy, 22-bit signed | 1 |
| low-pass | 3 × `lp5_filter` (DW=22, signed) | 5×5 | A, B, C | 3 |
| response | `harris_response` | – | R = AB − C² − (A+B)²/16, 44-bit signed | 2 |
| suppression | `nms` | 3×3 | corner {R, x, y} | 3 |

All widths follow from worst-case ranges. |AB| and |C²| stay below 2^40, and
(A+B)² stays below 2^42, so a 44-bit R cannot overflow. The pipeline therefore
reports a corner 16 clocks after the pixel that completes its last window.

## The stream convention: coordinates travel with the data

This is the part that needs the most care when you change the design.

Every stage has the same port pattern: `valid`, `x`, `y` and data. The
coordinates are the **stream position**, meaning the position of the newest
pixel that has entered. They are not the position of the value the beat
carries.

A K×K stage (`window_gen` inside `lp5_filter`, `sobel_grad` and `nms`) emits
its result on the beat of input position (x, y). That result is centred at
(x − K/2, y − K/2). Each stage therefore outputs exactly one beat per input
beat, frames keep exactly W·H beats, and nothing has to be flushed at the end
of a frame. The cost is that the image content lags the stream position:

* by 2 after the pre-filter,
* by 3 after Sobel,
* by 5 after the low-pass filters,
* by 6 after the suppression window.

`nms` subtracts that lag (parameter `OFS` = 5, plus its own 1). So the
reported corner coordinates are positions in the input image.

Where a window is not wholly inside the frame (x < K−1 or y < K−1), the stage
outputs zero. This is zero padding. As a result, responses within about four
pixels of the image border are computed from partly zero data. The step from
the image to the zero padding looks like an edge, so corners are often
reported near the four corners of the frame. A consumer that does not want
them can ignore corners within a few pixels of the border. Reported
coordinates are never negative. One row or column outside the image, the
smoothing window sees a single product sample, so det(M) is zero there and R
is never positive. The line buffers are never reset,
because the inside test never lets a window read a row that the current frame
has not written.

There is no backpressure between stages. The data path moves only when a pixel
is accepted. Registers downstream of the last accepted pixel still drain,
because each stage forwards its own valid bit.

### Line buffers

`window_gen` follows the usual row-buffer-and-register layout. K−1
`line_buffer` RAMs (one row each: 8 bits × 256 for pixels) hold the previous
rows. A K×K register matrix holds the window. On each accepted pixel at column
x, all line buffers are read at x. One clock later the column of K samples is
shifted into the matrix, and each sample is written one RAM further down the
chain at the same address. The RAM has a registered read and a separate write
port (read-before-write), as a block RAM would.

## Non-maximum suppression and Rmax

A pixel is a corner when its R is strictly greater than all eight neighbours
and strictly greater than Rmax/64.

Rmax is the largest R of the **previous** frame. A streaming design cannot know
the current frame's maximum until the frame has passed. `harris_response`
keeps a running maximum and copies it to `rmax_last` on the frame's last pixel.
`nms` latches `rmax_last >>> 6` when the next frame's first pixel enters, so a
whole frame uses one threshold. After reset Rmax is 0. The first frame is
therefore thresholded only at R > 0 and usually yields more corners.

## Corner matching

`corner_matcher` holds two `corner_ram` memories of `MAX_CORNERS` records
{R, x, y}:

* RAM 1 collects the corners of the frame now arriving, in raster order.
* RAM 2 holds the corners of the last frame.

Two `sync_fifo`s carry the results. FIFO 1 receives the current-frame
coordinates of each match, and FIFO 2 the matching last-frame coordinates. The
two FIFOs are popped independently through `cur_*` and `last_*`.

| state | what happens | input |
|---|---|---|
| CLEAR | After reset, all RAM 2 records are set to zero (`MAX_CORNERS` clocks). | stalled |
| COLLECT | Each corner is written to RAM 1. Corners beyond `MAX_CORNERS` are dropped and counted in `dropped`. | running |
| MATCH | For each RAM 1 record in order, RAM 2 is scanned in order, stopping at the first record with equal R. Both coordinate pairs are pushed, waiting while either FIFO is full. | stalled |
| COPY | RAM 1 is copied to RAM 2, one record per clock, while the next frame already streams in. | running |

The top lowers `pix_ready` from the last pixel of a frame until the matcher
reports `match_done`. That covers the 16-clock drain of the pipeline and the
match itself. The match takes at most n1·(n2 + 3) clocks, where n1 and n2 are
the stored corner counts of the two frames, plus any waiting on full FIFOs.
With the defaults, a frame takes 65,536 clocks plus that stall. At 20 and 15
corners the stall is 18 and 182 clocks (about 1.31 ms per frame at 50 MHz).
The worst case, 256 × 256 corners, gives 131,840 clocks (2.64 ms).

The copy overlaps the new frame safely only because a frame's first corner
(at image row 0 or later) is decided at stream row 6 or later, at least 6·W clocks
into the frame. The copy ends after `MAX_CORNERS` clocks. So keep
`MAX_CORNERS < 6·W`. An assertion in `corner_matcher` checks this, and
another checks that no corner arrives while a match is running.

Equal-R matching has consequences to keep in mind. Symmetric features give
equal R at several places (the four corners of an axis-aligned rectangle, for
example), and then the first stored record with that R wins. Any change in
brightness or in the neighbourhood of a corner, or a move near the border,
changes R and loses the match.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `W`, `H` | 256, 256 | top, filters, `nms`, `harris_response` | frame size; also the line buffer depth |
| `A_SHIFT` | 4 | top, `harris_response` | a = 2^-A_SHIFT |
| `MAX_CORNERS` | 256 | top, `corner_matcher` | records per frame in RAM 1 / RAM 2 |
| `FIFO_DEPTH` | 256 | top, `corner_matcher` | entries in FIFO 1 / FIFO 2 |

The coordinates are 8 bits (`harris_pkg::COORD_W`), so W and H must not exceed
256 without widening them. Widths and the record types `corner_t` and
`coord_t` live in `harris_pkg`.

## Size

At the defaults, coarse synthesis (yosys, memories kept as memory cells) gives
about 141 kbit of RAM and about 3,000 flip-flops. The RAM breaks down as
follows:

* line buffers: 4 × 256 × 8 bits for the pre-filter, 2 × 256 × 8 for Sobel,
  3 × 4 × 256 × 22 for the low-pass filters, and 2 × 256 × 44 for the
  suppression;
* the two corner RAMs: 2 × 256 × 60 bits;
* the two FIFOs: 2 × 256 × 16 bits.

Arithmetic is three 22×22-bit product multipliers, three 46-bit multipliers
for R, and adders everywhere else.

## Top-level interface (`harris_top`)

* `pix_valid`, `pix_ready`, `pix_data[7:0]`: pixels in raster order. A frame is
  exactly W·H accepted pixels, and the top counts the coordinates itself.
* `img_valid`, `img_x`, `img_y`, `img_data`: the accepted pixels, registered
  once (the plain image output).
* `corner_valid`, `corner`: every detected corner, before the matcher. This
  includes corners that are later dropped. `rmax_last` is the last frame's
  maximum.
* `cur_valid`, `cur_ready`, `cur_xy`, and `last_valid`, `last_ready`,
  `last_xy`: matched pairs.
* `frame_corners`, `frame_matches`: counts for the last matched frame.
  `dropped` is a saturating count of lost corners.

Reset is asynchronous and active low. After reset, `pix_ready` stays low for
`MAX_CORNERS` clocks while RAM 2 is cleared.

## Where this design goes its own way

These are the points where the behaviour was chosen rather than given:

* Rmax comes from the previous frame (see above).
* a = 1/16. The source only asks for a power of two in the usual 0 to 0.25
  range.
* Borders are zero-padded, and outputs are aligned by the coordinate-lag rule.
* The Sobel sum has two register stages (row sums, then total). The source
  describes it as finishing in one operation cycle. The throughput is still one
  pixel per clock.
* The corner RAM and FIFO sizes, the matcher's sequencing, the input stall
  during matching, dropping on a full RAM, and valid/ready on the FIFOs are all
  this design's choices.
* The line buffers are a generic two-port RAM in place of a vendor memory core.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`) that
compares its outputs with values computed in the testbench. The testbenches
use random data with idle gaps, check latencies, and end with a `TB_RESULT`
line.

`harris_model_pkg` is a frame-level reference model of the full pipeline. It
recomputes every stage on whole arrays in the same stream coordinates, applies
the suppression and matching rules, and generates a test scene of grey shapes.
Two end-to-end testbenches use it:

* `tb_harris_top` runs 48×40 frames with 16 corner records and 4-entry FIFOs.
  The frames are a scene, the scene moved by (3, 2), random noise, and the
  scene again. It checks every corner, every FIFO entry, the counters, Rmax
  and the image pass-through. It also requires each mechanism to occur: the
  stall while matching, the stall during the reset clear, the wait on a full
  FIFO, drops on a full RAM, threshold rejections, and matches.
* `tb_harris_full` runs the same four frames at the default parameters
  (256×256). It also checks the stall after each frame against the
  n1·(n2 + 3) budget. The moved scene gives 15 of 15 corners matched.

To run one with Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/harris_pkg.sv tb/harris_model_pkg.sv tb/tb_harris_full.sv --top-module tb_harris_full
./obj_dir/Vtb_harris_full
```

Use the same command for any other testbench; the package files are only
needed where they are imported. The testbenches initialise or reset
everything they read, so they also run with `+verilator+rand+reset+2`.
