# Census stereo matching pipeline

This is a streaming processor that turns a rectified stereo pair into a
disparity map. It handles 8-bit grey-level frames of 752×480 pixels. For
each left-image pixel it looks for the best-matching right-image pixel on
the same row, up to 63 pixels to the left. The measure of similarity is
the census transform of a 15×15 window. An 11×11 median filter then
cleans the disparity map.

The architecture is organised around memory bandwidth. The processor
never stores a whole frame. Small single-port SRAMs each hold one image
row, so a whole window column can be read in a single clock: 15 SRAMs are
read while a 16th is written. A chain of six pipeline stages then does
all the arithmetic in one pass over the image.

```
 left  ─► [1] 16 SRAM line buffer ─► [2] concat ─ 15×15 window ─ census ──────────────┐
 right ─► [1] 16 SRAM line buffer ─► [2] concat ─ 15×15 window ─ census ─ [3] HW delay ┤
                                                                      [3] HD extraction (64 Hamming distances, min)
                                                                                      │ raw_*
          out_* ◄─ [5] median 11×11 ◄─ 11×11 window ◄─ concat ◄─ [4] 12 SRAM line buffer
          (stage 6, post-processing, is not part of this RTL)
```

Each numbered stage ends in a register. Stage numbers and block names
follow the original processor.

## Files

| file | module | stage | what it is |
|---|---|---|---|
| `rtl/smp_pkg.sv` | package | – | default sizes |
| `rtl/stereo_matching_top.sv` | `stereo_matching_top` | 1–5 | the pipeline |
| `rtl/sram_sp.sv` | `sram_sp` | 1, 4 | 752×8 single-port SRAM (44 instances) |
| `rtl/line_buffer.sv` | `line_buffer` | 1, 4 | SRAM bank with rotating row pointer |
| `rtl/row_concat.sv` | `row_concat` | 2, 5 | SRAM outputs → window column in row order |
| `rtl/window_buffer.sv` | `window_buffer` | 2, 5 | sliding window registers |
| `rtl/census_hw.sv` | `census_hw` | 2 | census transform ("Hamming weight" calculation) |
| `rtl/hw_delay.sv` | `hw_delay` | 3 | delay line of right-image census strings |
| `rtl/hd_extraction.sv` | `hd_extraction` | 3 | Hamming distances and winner-take-all |
| `rtl/popcount.sv` | `popcount` | 3 | helper: ones count |
| `rtl/median_filter.sv` | `median_filter` | 5 | 11×11 median |
| `rtl/raster_counter.sv` | `raster_counter` | all | pixel position of a pipeline point |

## Line buffers: one row per SRAM, rotating

A window-based matcher needs, at every pixel, the column of pixels
directly above it. Stage 1 gets that column with `NUM_SRAM = window
height + 1` SRAMs per image. Each SRAM is one image row deep in columns
(752 words). All SRAMs in a bank share one address: the column of the
incoming pixel.

* The incoming pixel is **written** into the SRAM of the current row.
* All the other SRAMs are **read** at the same address. Between them they
  return the pixels of the 15 previous rows in that column.

After the last pixel of a row, the write pointer moves to the next SRAM,
wrapping around. The SRAM that held the oldest row is therefore
overwritten by the new one, and no data ever moves between SRAMs. The
price is that the read words come out in SRAM order, not row order. The
concatenation step (`row_concat`) rotates them back, using the index of
the SRAM being written (`wsel`). `rows[0]` is the oldest row, so window
row 0 is the top of the window.

Stage 4 repeats the same structure with 12 SRAMs (11 rows read, 1
written) for the raw disparity map.

Note that the window column at input row *y* spans rows *y*−15 … *y*−1.
The pixel being written is not part of the window until the next row.

## Census transform and disparity search

The window buffer (`window_buffer`) is a 15×15 shift register. Each new
column enters on the right. The census string of the window's centre
pixel has one bit per other pixel: the bit is 1 when that pixel is darker
than the centre. Bits are numbered row by row with the centre skipped,
giving 224 bits. Census strings are computed for both images.

The left image is the reference. Its pixel at column *x* is compared with
the right-image pixels at *x*, *x*−1, … *x*−63. Pixels arrive in raster
order, so the right-image string for *x*−*d* is simply the one computed *d*
pixels earlier. `hw_delay` is a 63-stage shift register of right-image
strings, and all 64 candidates are available together.

`hd_extraction` computes the 64 Hamming distances (ones count of the XOR)
and picks the disparity with the smallest distance. On equal distance the
smaller disparity wins. Everything is in one clock, so the critical path
runs through a 224-bit popcount and a 64-way minimum. Pipelining this
further would change only the lags listed below.

## Median filter

`median_filter` returns the 61st smallest of the 121 values in the 11×11
window. There is no sorting network. The result is built one bit at a
time from the MSB:

1. For bit *b*, form a trial value: the bits already found, with bit *b*
   set.
2. Count the window values below the trial value.
3. If at least 61 values are below, the median is below the trial value,
   and bit *b* is 0. Otherwise bit *b* is 1.

For 8-bit words this needs 8 × 121 comparators and 8 population counts,
all combinational. The disparity map is stored in 8-bit SRAM words, so
the filter works on 8 bits even though disparities only use 6.

## Positions, lags and image borders

All stages advance only when `in_valid` is high. Gaps in the input stall
the whole pipeline, and latencies are therefore counted in accepted
pixels, not clocks. Each window reaches below its centre pixel, so a
result leaves the pipeline well after its pixel entered:

| output | lag behind the input (accepted pixels) | default |
|---|---|---|
| `raw_*` (stage 3) | 8 rows + 12 pixels | 6028 |
| `out_*` (stage 5) | 14 rows + 21 pixels | 10549 |

The lag is about 8 rows for the 15×15 census window plus about 6 rows for
the 11×11 median.

Nothing in the pipeline knows where the frame is, except through
`raster_counter` instances. Each one tracks the (x, y) position of one
pipeline point, starting the right number of pixels "before" row 0,
column 0 of the first frame. Its `live` flag rises when that point reaches
the first real pixel. These positions drive three things:

* the row-end signal of the stage-4 line buffer;
* border masking;
* the coordinates that come out with every result.

Border rules (this design's own):

* `raw_disp` is 0 when the 15×15 window around the pixel leaves the image
  (7-pixel border).
* Candidates *x*−*d* whose own window would leave the image are not
  searched. Near the left edge, the search range shrinks to *x*−7.
* `out_disp` is 0 when the 11×11 median window leaves the image (5-pixel
  border).

Frames are expected back to back. The last rows of frame *n* come out
while the first rows of frame *n*+1 (or any filler pixels) are fed. The
row pointers run on continuously, so frame height need not be a multiple
of the SRAM count.

## Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `in_valid` | in | 1 | a pixel pair is presented; first one after reset is row 0, column 0 |
| `left_pix`, `right_pix` | in | 8 | pixel pair, raster order |
| `raw_valid` | out | 1 | pulses the clock after an accepted pixel once the first frame has reached stage 3 |
| `raw_x`, `raw_y`, `raw_disp` | out | 12, 12, 6 | unfiltered disparity and its position |
| `out_valid` | out | 1 | as `raw_valid`, for stage 5 |
| `out_x`, `out_y`, `out_disp` | out | 12, 12, 8 | median-filtered disparity and its position |

There is one result of each kind per accepted pixel, in raster order.
Two assertions in the top check that:

* `raw_disp` never exceeds the search range allowed at its column;
* `out_disp` stays within the disparity range.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `IMG_W` × `IMG_H` | 752 × 480 | frame size; SRAM depth = `IMG_W` |
| `PIX_W` | 8 | grey level bits |
| `CENSUS_WIN` | 15 | census window; 16 SRAMs per image |
| `DISP_RANGE` | 64 | disparities 0…63 |
| `MEDIAN_WIN` | 11 | median window; 12 SRAMs |

The line buffers hold 44 × 752 bytes, which is 264,704 bits of SRAM.
The top two bits of every stage-4 word are always zero, so synthesis may
trim those 12 SRAMs to 6 bits. The
main register arrays hold about 19,000 flip-flop bits:

* the two 15×15 windows: 3,600 bits;
* the census delay line: 63 × 224 = 14,112 bits;
* the 11×11 median window: 968 bits.

Accepting one pixel per clock, the pipeline would run at 864 frames/s at
312 MHz. The 108 frames/s quoted for the original 312 MHz design
corresponds to 8 clocks per pixel. The reason for that figure is not
known, and this RTL does not model it. With `in_valid` high only every
8th clock, the RTL runs at that rate.

## What is original and what is this design's choice

These parts follow the original processor:

* the six-stage structure;
* 16 + 16 + 12 single-port SRAMs of 752 bytes, with multiple-read,
  single-write access;
* a shared address and write bus per bank;
* a 15×15 census window, Hamming-distance cost, 64-pixel search range and
  11×11 median;
* right-image candidates taken to the left of the reference pixel.

These are this design's own choices:

* the census comparison sense and bit order;
* the tie rule in the disparity search;
* the bit-by-bit median method;
* stalling on `in_valid`;
* reset values;
* border handling;
* the position counters;
* the one-clock SRAM read latency.

These parts are missing:

* **Stage 6 (post-processing).** It is described only as "disparity
  diffusion" producing a depth output. No algorithm is available, so
  `out_*` is the input that stage would take. Depth also needs the camera
  baseline and focal length, which are not known.
* **Physical implementation.** The original was built both flat and as a
  two-tier die stack, split either logic-over-SRAM or by pipeline stages
  (stages 1–3 on one tier, 4–6 on the other). That split changes no
  logic, and the vertical interconnect is not modelled.

## Simulating

Every testbench checks itself against values it computes on its own. Each
ends with `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl rtl/smp_pkg.sv \
    tb/tb_stereo_matching_top.sv --top-module tb_stereo_matching_top -Mdir obj -o sim
./obj/sim
```

Use the same command for any other `tb/tb_*.sv`, changing the file and
`--top-module`.

* `tb_stereo_matching_top` runs the whole pipeline at reduced size:
  100×40 image, 16 disparities, the default windows.
* `tb_stereo_activity` runs five reduced-size frames with rising input
  switching activity: every pixel bit is 1 with probability 0.1, 0.2 …
  0.5. These are the input statistics of the power study the
  architecture was evaluated with.
* `tb_stereo_full` runs it at the default size: two 752×480 frames,
  about 2.9 million checks. It builds in about a minute and simulates in
  about 25 s.

All three pipeline testbenches:

* generate a random texture and a shifted right image with 1% noise;
* compute the census, disparity and median results in plain
  SystemVerilog;
* compare every output;
* check that outputs come in raster order, one per accepted pixel.

They also count that every mechanism was exercised: input stalls, reuse
of the stage-1 and stage-4 SRAMs, border masking, a search range cut at
the left edge, a median that changed a value, and a second frame. At
the default size, about 95% of the raw disparities inside the border
equal the shift used to make the right image.

The block testbenches (`tb_sram_sp`, `tb_line_buffer`, `tb_row_concat`,
`tb_window_buffer`, `tb_census_hw`, `tb_hw_delay`, `tb_hd_extraction`,
`tb_median_filter`, `tb_raster_counter`) each run in well under a second.

## Changing it

* **Window sizes and search range.** These are top-level parameters. The
  SRAM counts, lags and border limits are derived from them. Keep
  `DISP_RANGE` a power of two: the disparity port is `$clog2(DISP_RANGE)`
  bits wide. Keep `IMG_W` larger than `DISP_RANGE` plus the census window.
* **Another cost or filter.** Swap `hd_extraction` or `median_filter`.
  Each captures its result on `en` and is 1 stage deep. A deeper version
  must add its extra stages to `LAG_HD` / `LAG_MED` in the top.
* **A real SRAM macro.** Replace `sram_sp`, keeping its interface: one
  access per clock, write when `we`, read data registered and held.
