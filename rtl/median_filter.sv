// median_filter: median of an M x M window of disparities (stage 5).
//
// The median is the K-th smallest of the M*M values, K = (M*M+1)/2 (the
// 61st of 121 for the 11x11 window).  It is found one bit at a time from
// the most significant bit: with the bits found so far as a prefix, the
// trial value prefix|1<<b is tested by counting the window values below
// it.  If at least K values are below, the median is below the trial
// value and bit b is 0; otherwise bit b is 1.  WIDTH trials of M*M
// comparators and a population count each, no sorting network.  The
// result is captured on each accepted pixel (en); when center_valid is
// low (the window is not inside the image) the result is 0.  The median
// filter and its 11x11 window are the processor's; the bit-by-bit method
// and the zero at the image border are this design's choices.
module median_filter #(
  parameter int unsigned M     = 11,
  parameter int unsigned WIDTH = 8
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               en,
  input  logic [M-1:0][M-1:0][WIDTH-1:0]     win,
  input  logic                               center_valid,
  output logic [WIDTH-1:0]                   med
);
  localparam int unsigned NV = M * M;
  localparam int unsigned K  = (NV + 1) / 2;
  localparam int unsigned NW = $clog2(NV + 1);

  logic [WIDTH-1:0] med_d;

  always_comb begin
    logic [WIDTH-1:0] trial;
    logic [NW-1:0]    below;
    med_d = '0;
    for (int b = int'(WIDTH) - 1; b >= 0; b--) begin
      trial    = med_d;
      trial[b] = 1'b1;
      below    = '0;
      for (int unsigned r = 0; r < M; r++)
        for (int unsigned c = 0; c < M; c++)
          below = below + NW'(win[r][c] < trial);
      if (below < NW'(K)) med_d[b] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  med <= '0;
    else if (en) med <= center_valid ? med_d : '0;
  end
endmodule
