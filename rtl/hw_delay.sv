// hw_delay: delay line for right-image census strings (stage 3 "HW
// delay").
//
// The reference pixel at column x of the left image is compared with the
// right-image pixels x, x-1, ..., x-(DEPTH-1).  Because pixels arrive in
// raster order, the census string of column x-d reached this point d
// accepted pixels earlier, so a shift register of DEPTH-1 stages makes
// all candidates available together: cand[0] is din itself, cand[d] the
// string accepted d pixels ago.  Shifts on en; cleared by reset.
module hw_delay #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned BITS  = 224
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [BITS-1:0]             din,
  output logic [DEPTH-1:0][BITS-1:0]  cand
);
  logic [DEPTH-1:1][BITS-1:0] dly;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int unsigned d = 1; d < DEPTH; d++) dly[d] <= '0;
    end else if (en) begin
      dly[1] <= din;
      for (int unsigned d = 2; d < DEPTH; d++) dly[d] <= dly[d-1];
    end
  end

  always_comb begin
    cand[0] = din;
    for (int unsigned d = 1; d < DEPTH; d++) cand[d] = dly[d];
  end
endmodule
