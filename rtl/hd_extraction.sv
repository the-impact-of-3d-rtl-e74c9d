// hd_extraction: matching cost and winner-take-all disparity (stage 3 "HD
// extraction").
//
// For each candidate d = 0..D-1 the cost is the Hamming distance between
// the reference (left) census string and the candidate (right) string,
// i.e. the number of ones in their XOR.  The disparity with the smallest
// cost is selected; on equal cost the smaller disparity wins.  Candidates
// above d_limit are not considered (their window would leave the image),
// and when center_valid is low the result is 0.  Costs and selection are
// combinational; the disparity is captured in the stage register on each
// accepted pixel (en).  Hamming-distance cost and minimum selection are
// the processor's; tie rule, d_limit and the zero for invalid pixels are
// this design's choices.
module hd_extraction #(
  parameter int unsigned D    = 64,
  parameter int unsigned BITS = 224,
  localparam int unsigned DW  = $clog2(D),
  localparam int unsigned CW  = $clog2(BITS + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [BITS-1:0]           ref_census,
  input  logic [D-1:0][BITS-1:0]    cand,
  input  logic [DW-1:0]             d_limit,
  input  logic                      center_valid,
  output logic [DW-1:0]             disp
);
  logic [D-1:0][CW-1:0] cost;
  logic [DW-1:0]        best_d;

  // Hamming distance of every candidate
  for (genvar d = 0; d < D; d++) begin : g_cost
    popcount #(.BITS(BITS)) u_pc (.din(ref_census ^ cand[d]), .count(cost[d]));
  end

  // winner-take-all over d = 0..d_limit
  always_comb begin
    logic [CW-1:0] best_c;
    best_c = cost[0];
    best_d = '0;
    for (int unsigned d = 1; d < D; d++) begin
      if (DW'(d) <= d_limit && cost[d] < best_c) begin
        best_c = cost[d];
        best_d = DW'(d);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  disp <= '0;
    else if (en) disp <= center_valid ? best_d : '0;
  end
endmodule
