// census_hw: census transform of an N x N window (the "Hamming weight"
// calculation of pipeline stage 2).
//
// Every pixel of the window other than the centre contributes one bit,
// set when that pixel is darker than the centre pixel.  Bits are taken in
// raster order over the window (row 0 first, left to right) with the
// centre skipped, so bit 0 belongs to win[0][0] and the string is N*N-1
// bits long (224 for the 15x15 window).  The string is computed
// combinationally from the window and captured in the stage register on
// each accepted pixel (en), i.e. it is the census of the window that was
// present before that clock edge.  The census transform itself is the
// processor's; the comparison sense and bit order are this design's
// choices.
module census_hw #(
  parameter int unsigned N     = 15,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned BITS = N * N - 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               en,
  input  logic [N-1:0][N-1:0][WIDTH-1:0]     win,
  output logic [BITS-1:0]                    census
);
  localparam int unsigned C = N / 2;

  logic [BITS-1:0] census_d;

  always_comb begin
    int unsigned k;
    k = 0;
    census_d = '0;
    for (int unsigned r = 0; r < N; r++) begin
      for (int unsigned c = 0; c < N; c++) begin
        if (!(r == C && c == C)) begin
          census_d[k] = (win[r][c] < win[C][C]);
          k++;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  census <= '0;
    else if (en) census <= census_d;
  end
endmodule
