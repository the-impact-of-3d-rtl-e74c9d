// tb_stereo_matching_top: end-to-end test of the stereo matching pipeline at reduced size (100x40 image, 16-pixel
// search range, 15x15 census and 11x11 median windows as in the defaults).
//
// Generates 2 synthetic stereo frames: a random left texture and a
// right image made by shifting it by a known disparity (2+frame in the
// background, a larger one in a central rectangle) with 1% of the right
// pixels replaced by noise.  The frames are fed back to back with random
// pauses of in_valid, followed by 16 blank rows that push the last rows
// out.  A reference model written here computes, independently of the
// RTL, the census strings, the winner-take-all disparity over the search
// range (smallest Hamming distance, first minimum, candidates with their
// window inside the image) and the median of the disparity map, with 0
// wherever a window leaves the image.  Every raw_* and out_* result of
// the frames is compared with it, the outputs must come in raster order
// (one per accepted pixel), and the test counts how often each mechanism
// of the design was exercised: input stalls, line-buffer SRAM reuse in
// stage 1 and stage 4, border masking, a search range cut by the image
// edge, a median that changed the disparity, and a second frame.
module tb_stereo_matching_top;
  import smp_pkg::*;
  localparam int unsigned W = 100, H = 40, D = 16, N = 15, M = 11, PW = 8;
  localparam int unsigned CWD  = smp_pkg::COORD_W;
  localparam int unsigned DW   = $clog2(D);
  localparam int unsigned BITS = N * N - 1;
  localparam int unsigned C    = N / 2,  CR  = N - 1 - C;
  localparam int unsigned CM   = M / 2,  CMR = M - 1 - CM;
  localparam int unsigned NF   = 2;
  localparam int unsigned FLUSH_ROWS = 16;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [PW-1:0] left_pix = '0, right_pix = '0;
  logic raw_valid, out_valid;
  logic [CWD-1:0] raw_x, raw_y, out_x, out_y;
  logic [DW-1:0] raw_disp;
  logic [PW-1:0] out_disp;

  stereo_matching_top #(.IMG_W(W), .IMG_H(H), .PIX_W(PW), .CENSUS_WIN(N),
                        .DISP_RANGE(D), .MEDIAN_WIN(M)) dut (
    .clk, .rst_n, .in_valid, .left_pix, .right_pix,
    .raw_valid, .raw_x, .raw_y, .raw_disp, .out_valid, .out_x, .out_y, .out_disp);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ images
  logic [PW-1:0] limg [NF][H][W];
  logic [PW-1:0] rimg [NF][H][W];
  logic [7:0]    dtrue [NF][H][W];
  logic [7:0]    raw_ref [NF][H][W];
  logic [7:0]    med_ref [NF][H][W];

  function automatic logic [BITS-1:0] census_of(bit right, int f, int y, int x);
    logic [BITS-1:0] v;
    logic [PW-1:0] ctr, p;
    int k;
    k = 0;
    ctr = right ? rimg[f][y][x] : limg[f][y][x];
    for (int dy = -int'(C); dy <= int'(CR); dy++)
      for (int dx = -int'(C); dx <= int'(CR); dx++)
        if (dy != 0 || dx != 0) begin
          p = right ? rimg[f][y+dy][x+dx] : limg[f][y+dy][x+dx];
          v[k] = (p < ctr);
          k++;
        end
    return v;
  endfunction

  function automatic logic [PW-1:0] rand_pix(int f);
    return PW'($urandom);
  endfunction

  task automatic make_frames();
    for (int f = 0; f < int'(NF); f++)
      for (int y = 0; y < int'(H); y++) begin
        for (int x = 0; x < int'(W); x++) begin
          limg[f][y][x] = rand_pix(f);
          dtrue[f][y][x] = (y >= int'(H) / 4 && y < 3 * int'(H) / 4 &&
                            x >= int'(W) / 3 && x < 2 * int'(W) / 3)
                           ? 8'(D / 2 + 3 + f) : 8'(2 + f);
        end
        for (int x = 0; x < int'(W); x++) begin
          int sx;
          sx = x + int'(dtrue[f][y][x]);
          rimg[f][y][x] = (sx < int'(W) && $urandom_range(0, 99) != 0) ? limg[f][y][sx] : rand_pix(f);
        end
      end
  endtask

  task automatic make_reference();
    logic [BITS-1:0] cl [W];
    logic [BITS-1:0] cr [W];
    for (int f = 0; f < int'(NF); f++) begin
      for (int y = 0; y < int'(H); y++) begin
        bit yin;
        yin = (y >= int'(C) && y <= int'(H - 1 - CR));
        for (int x = 0; x < int'(W); x++) begin
          if (yin && x >= int'(C) && x <= int'(W - 1 - CR)) begin
            cl[x] = census_of(0, f, y, x);
            cr[x] = census_of(1, f, y, x);
          end
        end
        for (int x = 0; x < int'(W); x++) begin
          raw_ref[f][y][x] = 0;
          if (yin && x >= int'(C) && x <= int'(W - 1 - CR)) begin
            int best, bestc;
            best = 0; bestc = $countones(cl[x] ^ cr[x]);
            for (int d = 1; d < int'(D) && x - d >= int'(C); d++) begin
              int c;
              c = $countones(cl[x] ^ cr[x - d]);
              if (c < bestc) begin bestc = c; best = d; end
            end
            raw_ref[f][y][x] = 8'(best);
          end
        end
      end
      for (int y = 0; y < int'(H); y++)
        for (int x = 0; x < int'(W); x++) begin
          med_ref[f][y][x] = 0;
          if (y >= int'(CM) && y <= int'(H - 1 - CMR) && x >= int'(CM) && x <= int'(W - 1 - CMR)) begin
            int hist [256];
            int acc;
            for (int i = 0; i < 256; i++) hist[i] = 0;
            for (int dy = -int'(CM); dy <= int'(CMR); dy++)
              for (int dx = -int'(CM); dx <= int'(CMR); dx++)
                hist[raw_ref[f][y+dy][x+dx]]++;
            acc = 0;
            for (int i = 0; i < 256; i++) begin
              acc += hist[i];
              if (acc >= int'((M * M + 1) / 2)) begin
                med_ref[f][y][x] = 8'(i);
                break;
              end
            end
          end
        end
    end
  endtask

  // ----------------------------------------------------------- monitor
  int raw_f = -1, out_f = -1;
  int raw_n = 0, out_n = 0;
  int exp_raw_x = 0, exp_raw_y = 0, exp_out_x = 0, exp_out_y = 0;
  int n_border = 0, n_limited = 0, n_median_changed = 0, n_frame2 = 0, n_true = 0, n_valid = 0;

  always @(posedge clk) begin
    if (raw_valid) begin
      checks++;
      if (int'(raw_x) != exp_raw_x || int'(raw_y) != exp_raw_y) begin
        failures++;
        if (failures < 20) $display("FAIL raw order: (%0d,%0d) expected (%0d,%0d)", raw_x, raw_y, exp_raw_x, exp_raw_y);
      end
      if (raw_x == 0 && raw_y == 0) raw_f++;
      exp_raw_x = (int'(raw_x) + 1) % int'(W);
      exp_raw_y = (int'(raw_x) == int'(W) - 1) ? (int'(raw_y) + 1) % int'(H) : int'(raw_y);
      if (raw_f >= 0 && raw_f < int'(NF)) begin
        raw_n++;
        checks++;
        if (8'(raw_disp) != raw_ref[raw_f][raw_y][raw_x]) begin
          failures++;
          if (failures < 20) $display("FAIL raw f%0d (%0d,%0d): %0d expected %0d", raw_f, raw_x, raw_y, raw_disp, raw_ref[raw_f][raw_y][raw_x]);
        end
        if (raw_y < CWD'(C) || raw_y > CWD'(H - 1 - CR) || raw_x < CWD'(C) || raw_x > CWD'(W - 1 - CR))
          n_border++;
        else begin
          n_valid++;
          if (int'(raw_x) - int'(C) < int'(D) - 1) n_limited++;
          if (8'(raw_disp) == dtrue[raw_f][raw_y][raw_x]) n_true++;
        end
      end
    end
    if (out_valid) begin
      checks++;
      if (int'(out_x) != exp_out_x || int'(out_y) != exp_out_y) begin
        failures++;
        if (failures < 20) $display("FAIL out order: (%0d,%0d) expected (%0d,%0d)", out_x, out_y, exp_out_x, exp_out_y);
      end
      if (out_x == 0 && out_y == 0) out_f++;
      exp_out_x = (int'(out_x) + 1) % int'(W);
      exp_out_y = (int'(out_x) == int'(W) - 1) ? (int'(out_y) + 1) % int'(H) : int'(out_y);
      if (out_f >= 0 && out_f < int'(NF)) begin
        out_n++;
        checks++;
        if (out_disp != med_ref[out_f][out_y][out_x]) begin
          failures++;
          if (failures < 20) $display("FAIL out f%0d (%0d,%0d): %0d expected %0d", out_f, out_x, out_y, out_disp, med_ref[out_f][out_y][out_x]);
        end
        if (med_ref[out_f][out_y][out_x] != raw_ref[out_f][out_y][out_x]) n_median_changed++;
        if (out_f == 1) n_frame2++;
      end
    end
  end

  // ---------------------------------------------------------- stimulus
  int n_stall = 0, rows_fed = 0;

  task automatic feed(input logic [PW-1:0] l, input logic [PW-1:0] r);
    while ($urandom_range(0, 8 - 1) == 0) begin
      @(negedge clk);
      in_valid = 0;
      n_stall++;
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1; left_pix = l; right_pix = r;
    @(posedge clk);
  endtask

  task automatic expect_seen(input string what, input int n);
    checks++;
    $display("%-34s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    make_frames();
    make_reference();
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < int'(NF); f++)
      for (int y = 0; y < int'(H); y++) begin
        for (int x = 0; x < int'(W); x++) feed(limg[f][y][x], rimg[f][y][x]);
        rows_fed++;
      end
    for (int i = 0; i < int'(FLUSH_ROWS * W); i++) feed('0, '0);
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(posedge clk);
    checks++;
    if (raw_n != int'(NF * W * H) || out_n != int'(NF * W * H)) begin
      failures++;
      $display("FAIL output count raw=%0d out=%0d expected %0d", raw_n, out_n, NF * W * H);
    end
    checks++;
    if (n_true * 100 < n_valid * 50) begin
      failures++;
      $display("FAIL only %0d of %0d disparities match the generated shift", n_true, n_valid);
    end
    $display("disparities equal to the generated shift: %0d of %0d", n_true, n_valid);
    expect_seen("input stall cycles", n_stall);
    expect_seen("stage-1 SRAM rows reused", rows_fed > int'(N + 1) ? rows_fed - int'(N + 1) : 0);
    expect_seen("stage-4 SRAM rows reused", raw_n / int'(W) > int'(M + 1) ? raw_n / int'(W) - int'(M + 1) : 0);
    expect_seen("border pixels masked", n_border);
    expect_seen("search range cut at the left edge", n_limited);
    expect_seen("median changed the disparity", n_median_changed);
    expect_seen("outputs of the second frame", n_frame2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
