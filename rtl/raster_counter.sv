// raster_counter: pixel position of one point of the pipeline.
//
// Every pipeline stage sees the image in raster order, a fixed number of
// accepted pixels behind the input.  This counter gives that position:
// after reset it stands LAG pixels before row 0, column 0 of the first
// frame (counting back through a previous, non-existent frame) and steps
// once per accepted pixel (en), column first, wrapping at W and H.  live
// rises when the count reaches the first pixel of the first frame and
// stays high, so positions before it can be ignored.  x and y are valid
// in the same cycle as the data they label.  This control logic is this
// design's own; the processor's description gives none.
module raster_counter #(
  parameter int unsigned W       = 752,
  parameter int unsigned H       = 480,
  parameter int unsigned LAG     = 0,
  parameter int unsigned COORD_W = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  output logic [COORD_W-1:0] x,
  output logic [COORD_W-1:0] y,
  output logic               live
);
  localparam int unsigned FRAME = W * H;
  localparam int unsigned START = (FRAME - (LAG % FRAME)) % FRAME;
  localparam int unsigned X0    = START % W;
  localparam int unsigned Y0    = START / W;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x    <= COORD_W'(X0);
      y    <= COORD_W'(Y0);
      live <= (START == 0);
    end else if (en) begin
      if (x == COORD_W'(W - 1)) begin
        x <= '0;
        if (y == COORD_W'(H - 1)) begin
          y    <= '0;
          live <= 1'b1;
        end else begin
          y <= y + 1'b1;
        end
      end else begin
        x <= x + 1'b1;
      end
    end
  end
endmodule
