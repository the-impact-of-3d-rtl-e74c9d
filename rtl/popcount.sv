// popcount: number of ones in a BITS-wide vector, combinational.
//
// Helper for the Hamming-distance search: the distance between two
// census strings is the population count of their XOR.  Written as a
// plain adder chain; synthesis is free to rebuild it as a tree.
module popcount #(
  parameter int unsigned BITS = 224,
  localparam int unsigned CW  = $clog2(BITS + 1)
) (
  input  logic [BITS-1:0] din,
  output logic [CW-1:0]   count
);
  always_comb begin
    count = '0;
    for (int unsigned b = 0; b < BITS; b++) count = count + CW'(din[b]);
  end
endmodule
