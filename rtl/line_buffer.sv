// line_buffer: bank of NUM_SRAM single-port SRAMs holding the most recent
// image rows, one row per SRAM, with one multiple-read / single-write
// access per accepted pixel.
//
// For each pixel (en high) the SRAM selected by the write pointer stores
// wdata at column addr, while every other SRAM is read at the same
// column.  The write pointer steps to the next SRAM after the pixel
// flagged last_col, so the rows rotate around the bank and the NUM_SRAM-1
// SRAMs that are read always hold the NUM_SRAM-1 previous rows.  One
// address and one write bus serve the whole bank.
//
// Timing, counted in accepted pixels: the SRAM read data of a pixel is
// captured into the stage register (raw) together with the index of the
// SRAM that was being written (wsel) on the next accepted pixel, so raw
// and wsel describe column addr of pixel t while pixel t+2 is presented.
// row_concat turns raw into row order.  The read/write organisation
// follows the processor; pointer reset to SRAM 0 and the exact register
// placement are this design's choices.
module line_buffer #(
  parameter int unsigned NUM_SRAM = 16,
  parameter int unsigned DEPTH    = 752,
  parameter int unsigned WIDTH    = 8,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned SW      = $clog2(NUM_SRAM)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          en,
  input  logic [AW-1:0]                 addr,
  input  logic                          last_col,
  input  logic [WIDTH-1:0]              wdata,
  output logic [NUM_SRAM-1:0][WIDTH-1:0] raw,
  output logic [SW-1:0]                 wsel
);
  logic [SW-1:0]                    wptr, wptr_d;
  logic [NUM_SRAM-1:0][WIDTH-1:0]   rdata;

  for (genvar i = 0; i < NUM_SRAM; i++) begin : g_sram
    sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_sram (
      .clk   (clk),
      .ce    (en),
      .we    (wptr == SW'(i)),
      .addr  (addr),
      .wdata (wdata),
      .rdata (rdata[i])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr   <= '0;
      wptr_d <= '0;
      raw    <= '0;
      wsel   <= '0;
    end else if (en) begin
      if (last_col) wptr <= (wptr == SW'(NUM_SRAM - 1)) ? '0 : wptr + 1'b1;
      wptr_d <= wptr;
      raw    <= rdata;
      wsel   <= wptr_d;
    end
  end
endmodule
