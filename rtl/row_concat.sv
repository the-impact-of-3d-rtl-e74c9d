// row_concat: the concatenation step in front of a window buffer.
//
// A line buffer returns one word per SRAM, in SRAM order, and the rows
// rotate around the SRAMs.  Given the index wsel of the SRAM that was
// being written (and so holds no valid old row), this combinational block
// lines the other NUM_SRAM-1 words up in row order: rows[NUM_SRAM-2] is
// the row just above the one being written, rows[0] the oldest.  Window
// row 0 is therefore the top of the window.  Purely combinational.
module row_concat #(
  parameter int unsigned NUM_SRAM = 16,
  parameter int unsigned WIDTH    = 8,
  localparam int unsigned SW      = $clog2(NUM_SRAM)
) (
  input  logic [NUM_SRAM-1:0][WIDTH-1:0] raw,
  input  logic [SW-1:0]                  wsel,
  output logic [NUM_SRAM-2:0][WIDTH-1:0] rows
);
  always_comb begin
    for (int unsigned j = 0; j < NUM_SRAM - 1; j++) begin
      // the row written j+1 rows before the current one
      int unsigned idx;
      idx = (int'(wsel) + NUM_SRAM - 1 - j) % NUM_SRAM;
      rows[NUM_SRAM - 2 - j] = raw[idx];
    end
  end
endmodule
