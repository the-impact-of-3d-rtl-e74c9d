// smp_pkg: sizes shared by the stereo matching pipeline.
//
// The defaults are the main configuration of the processor: an 8-bit
// grey-level 752x480 stereo pair, a 15x15 census window, a 64-pixel
// disparity search range and an 11x11 median window.  Stage 1 keeps one
// more SRAM row per image than the census window is tall (15 rows read,
// one written), stage 4 one more than the median window (11 read, one
// written), which gives the 16 + 16 + 12 = 44 line-buffer SRAMs of
// 752 bytes each.  COORD_W is this design's choice of width for the
// pixel coordinates that travel with each stage's output.
package smp_pkg;
  localparam int unsigned IMG_W      = 752;
  localparam int unsigned IMG_H      = 480;
  localparam int unsigned PIX_W      = 8;
  localparam int unsigned CENSUS_WIN = 15;
  localparam int unsigned DISP_RANGE = 64;
  localparam int unsigned MEDIAN_WIN = 11;
  localparam int unsigned COORD_W    = 12;
endpackage
