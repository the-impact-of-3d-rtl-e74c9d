// sram_sp: single-port synchronous SRAM, one read or one write per clock.
//
// Model of the compiled 752 x 8-bit SRAM macro used for every line buffer
// of the processor (44 instances).  When ce is high the word at addr is
// written with wdata if we is high, otherwise it is read; the read word
// appears on rdata after the clock edge and is held until the next read.
// The array is not reset: the surrounding pipeline never uses a word
// before it has been written.  The size follows the processor (depth =
// image width, one byte per word); the one-clock read latency is this
// design's choice.
module sram_sp #(
  parameter int unsigned DEPTH = 752,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
