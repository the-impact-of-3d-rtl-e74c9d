// stereo_matching_top: six-stage pipelined census stereo matching
// processor, from a rectified 8-bit stereo pair to a median-filtered
// disparity map.
//
// Pipeline (one left and one right pixel accepted per in_valid, raster
// order, first pixel after reset = row 0, column 0):
//   1  32 line buffers   - 16 SRAMs per image; each pixel is written into
//                          the SRAM of its row while the other 15 are read
//                          at the same column (line_buffer).
//   2  HW calculation    - concatenation into row order, 15x15 window
//                          buffer and census transform (224-bit string)
//                          per image.
//   3  HD extraction     - right census strings pass a 63-stage delay; the
//                          left string is compared with the 64 candidates
//                          x..x-63 by Hamming distance, the smallest wins.
//   4  12 line buffers   - rows of the raw disparity map.
//   5  median filter     - 11x11 median of the disparity map.
//   6  post-processing   - not part of this RTL; its input is out_*.
// All stages advance only on in_valid, so gaps in the input simply stall
// the pipeline.  Because the windows reach below their centre, a
// disparity leaves the pipeline some rows after its pixel entered it:
// 8 rows + 12 pixels for raw_*, 14 rows + 21 pixels for out_* (default
// sizes; counted in accepted pixels).  The bottom rows of a frame are
// therefore output while the next frame is fed; frames follow each other
// without gaps.
//
// Each output carries its own column/row.  raw_disp is 0 where the 15x15
// census window leaves the image, and candidates whose window leaves the
// image are not searched; out_disp is 0 where the 11x11 median window
// leaves the image.  raw_valid/out_valid pulse in the cycle after an
// accepted pixel once the first frame has reached that point.
//
// The stage structure, window sizes, SRAM counts and disparity range
// follow the processor; border handling, the stall-on-in_valid control,
// reset values and the coordinate counters are this design's choices.
module stereo_matching_top #(
  parameter int unsigned IMG_W      = smp_pkg::IMG_W,
  parameter int unsigned IMG_H      = smp_pkg::IMG_H,
  parameter int unsigned PIX_W      = smp_pkg::PIX_W,
  parameter int unsigned CENSUS_WIN = smp_pkg::CENSUS_WIN,
  parameter int unsigned DISP_RANGE = smp_pkg::DISP_RANGE,
  parameter int unsigned MEDIAN_WIN = smp_pkg::MEDIAN_WIN,
  localparam int unsigned DISP_W    = $clog2(DISP_RANGE),
  localparam int unsigned CW        = smp_pkg::COORD_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [PIX_W-1:0]  left_pix,
  input  logic [PIX_W-1:0]  right_pix,
  output logic              raw_valid,
  output logic [CW-1:0]     raw_x,
  output logic [CW-1:0]     raw_y,
  output logic [DISP_W-1:0] raw_disp,
  output logic              out_valid,
  output logic [CW-1:0]     out_x,
  output logic [CW-1:0]     out_y,
  output logic [PIX_W-1:0]  out_disp
);
  localparam int unsigned N      = CENSUS_WIN;
  localparam int unsigned M      = MEDIAN_WIN;
  localparam int unsigned BITS   = N * N - 1;
  localparam int unsigned NS1    = N + 1;             // SRAMs per image
  localparam int unsigned NS4    = M + 1;             // SRAMs of stage 4
  localparam int unsigned AW     = $clog2(IMG_W);
  localparam int unsigned SW1    = $clog2(NS1);
  localparam int unsigned SW4    = $clog2(NS4);
  // census window: rows y-N..y-1, columns x-(N-1)..x, centre index C
  localparam int unsigned C      = N / 2;
  localparam int unsigned CR     = N - 1 - C;         // columns right of centre
  localparam int unsigned OFF1   = (N - C) * IMG_W + CR;
  // median window, same construction
  localparam int unsigned CM     = M / 2;
  localparam int unsigned CMR    = M - 1 - CM;
  localparam int unsigned OFF2   = (M - CM) * IMG_W + CMR;
  // pipeline lags, in accepted pixels, of each labelled point
  localparam int unsigned LAG_CEN = 4 + OFF1;         // census registers
  localparam int unsigned LAG_HD  = LAG_CEN + 1;      // disparity register
  localparam int unsigned LAG_MW  = LAG_HD + 3 + OFF2;// median window
  localparam int unsigned LAG_MED = LAG_MW + 1;       // median register

  logic en;
  assign en = in_valid;

  // ---------------------------------------------------------------- input
  logic [CW-1:0] in_x;
  raster_counter #(.W(IMG_W), .H(IMG_H), .LAG(0), .COORD_W(CW)) u_cnt_in (
    .clk(clk), .rst_n(rst_n), .en(en), .x(in_x), .y(), .live());

  // ------------------------------------------------ stages 1 and 2, per image
  logic [1:0][BITS-1:0] census;
  logic [1:0][PIX_W-1:0] pix;
  assign pix[0] = left_pix;
  assign pix[1] = right_pix;

  for (genvar s = 0; s < 2; s++) begin : g_img
    logic [NS1-1:0][PIX_W-1:0]      raw;
    logic [SW1-1:0]                 wsel;
    logic [NS1-2:0][PIX_W-1:0]      rows;
    logic [N-1:0][N-1:0][PIX_W-1:0] win;

    line_buffer #(.NUM_SRAM(NS1), .DEPTH(IMG_W), .WIDTH(PIX_W)) u_lb (
      .clk(clk), .rst_n(rst_n), .en(en), .addr(AW'(in_x)),
      .last_col(in_x == CW'(IMG_W - 1)), .wdata(pix[s]), .raw(raw), .wsel(wsel));

    row_concat #(.NUM_SRAM(NS1), .WIDTH(PIX_W)) u_cat (
      .raw(raw), .wsel(wsel), .rows(rows));

    window_buffer #(.ROWS(N), .COLS(N), .WIDTH(PIX_W)) u_win (
      .clk(clk), .rst_n(rst_n), .en(en), .col_in(rows), .win(win));

    census_hw #(.N(N), .WIDTH(PIX_W)) u_hw (
      .clk(clk), .rst_n(rst_n), .en(en), .win(win), .census(census[s]));
  end

  // -------------------------------------------------------------- stage 3
  logic [CW-1:0] cen_x, cen_y;
  logic          cen_live;
  raster_counter #(.W(IMG_W), .H(IMG_H), .LAG(LAG_CEN), .COORD_W(CW)) u_cnt_cen (
    .clk(clk), .rst_n(rst_n), .en(en), .x(cen_x), .y(cen_y), .live(cen_live));

  logic                         cen_valid;
  logic [DISP_W-1:0]            d_limit;
  logic [DISP_RANGE-1:0][BITS-1:0] cand;

  assign cen_valid = cen_live
                   && cen_x >= CW'(C) && cen_x <= CW'(IMG_W - 1 - CR)
                   && cen_y >= CW'(C) && cen_y <= CW'(IMG_H - 1 - CR);
  // candidate x-d must keep its window inside the image: d <= x - C
  assign d_limit = (cen_x < CW'(C)) ? '0
                 : (cen_x - CW'(C) >= CW'(DISP_RANGE - 1)) ? DISP_W'(DISP_RANGE - 1)
                 : DISP_W'(cen_x - CW'(C));

  hw_delay #(.DEPTH(DISP_RANGE), .BITS(BITS)) u_dly (
    .clk(clk), .rst_n(rst_n), .en(en), .din(census[1]), .cand(cand));

  hd_extraction #(.D(DISP_RANGE), .BITS(BITS)) u_hd (
    .clk(clk), .rst_n(rst_n), .en(en), .ref_census(census[0]), .cand(cand),
    .d_limit(d_limit), .center_valid(cen_valid), .disp(raw_disp));

  logic hd_live;
  raster_counter #(.W(IMG_W), .H(IMG_H), .LAG(LAG_HD), .COORD_W(CW)) u_cnt_hd (
    .clk(clk), .rst_n(rst_n), .en(en), .x(raw_x), .y(raw_y), .live(hd_live));

  // -------------------------------------------------------- stages 4 and 5
  logic [NS4-1:0][PIX_W-1:0]      raw4;
  logic [SW4-1:0]                 wsel4;
  logic [NS4-2:0][PIX_W-1:0]      rows4;
  logic [M-1:0][M-1:0][PIX_W-1:0] win4;

  line_buffer #(.NUM_SRAM(NS4), .DEPTH(IMG_W), .WIDTH(PIX_W)) u_lb4 (
    .clk(clk), .rst_n(rst_n), .en(en), .addr(AW'(raw_x)),
    .last_col(raw_x == CW'(IMG_W - 1)), .wdata(PIX_W'(raw_disp)),
    .raw(raw4), .wsel(wsel4));

  row_concat #(.NUM_SRAM(NS4), .WIDTH(PIX_W)) u_cat4 (
    .raw(raw4), .wsel(wsel4), .rows(rows4));

  window_buffer #(.ROWS(M), .COLS(M), .WIDTH(PIX_W)) u_win4 (
    .clk(clk), .rst_n(rst_n), .en(en), .col_in(rows4), .win(win4));

  logic [CW-1:0] mw_x, mw_y;
  logic          mw_live, mw_valid;
  raster_counter #(.W(IMG_W), .H(IMG_H), .LAG(LAG_MW), .COORD_W(CW)) u_cnt_mw (
    .clk(clk), .rst_n(rst_n), .en(en), .x(mw_x), .y(mw_y), .live(mw_live));

  assign mw_valid = mw_live
                  && mw_x >= CW'(CM) && mw_x <= CW'(IMG_W - 1 - CMR)
                  && mw_y >= CW'(CM) && mw_y <= CW'(IMG_H - 1 - CMR);

  median_filter #(.M(M), .WIDTH(PIX_W)) u_med (
    .clk(clk), .rst_n(rst_n), .en(en), .win(win4), .center_valid(mw_valid),
    .med(out_disp));

  logic med_live;
  raster_counter #(.W(IMG_W), .H(IMG_H), .LAG(LAG_MED), .COORD_W(CW)) u_cnt_med (
    .clk(clk), .rst_n(rst_n), .en(en), .x(out_x), .y(out_y), .live(med_live));

  // ------------------------------------------------------------- handshake
  logic en_q;
  always_ff @(posedge clk) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end
  assign raw_valid = en_q && hd_live;
  assign out_valid = en_q && med_live;

  // a disparity is never larger than the search range allows at its column
  a_raw_range: assert property (@(posedge clk) disable iff (!rst_n)
    raw_valid |-> (raw_x >= CW'(C) ? 32'(raw_disp) <= 32'(raw_x) - C : raw_disp == '0));
  // the median of values below DISP_RANGE stays below DISP_RANGE
  a_med_range: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |-> 32'(out_disp) < DISP_RANGE);
endmodule
