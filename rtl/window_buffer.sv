// window_buffer: ROWS x COLS register array that holds the pixels of the
// current matching (or filtering) window.
//
// Each accepted column (en high) enters at column COLS-1 and every stored
// column moves one place to the left, so the window slides one pixel to
// the right per accepted pixel.  win[r][c]: r = 0 is the top row,
// c = COLS-1 the newest column.  The new column is visible on win after
// the clock edge that accepts it.  Zero after reset (this design's
// choice).
module window_buffer #(
  parameter int unsigned ROWS  = 15,
  parameter int unsigned COLS  = 15,
  parameter int unsigned WIDTH = 8
) (
  input  logic                                     clk,
  input  logic                                     rst_n,
  input  logic                                     en,
  input  logic [ROWS-1:0][WIDTH-1:0]               col_in,
  output logic [ROWS-1:0][COLS-1:0][WIDTH-1:0]     win
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win <= '0;
    end else if (en) begin
      for (int unsigned r = 0; r < ROWS; r++) begin
        for (int unsigned c = 0; c + 1 < COLS; c++) win[r][c] <= win[r][c+1];
        win[r][COLS-1] <= col_in[r];
      end
    end
  end
endmodule
