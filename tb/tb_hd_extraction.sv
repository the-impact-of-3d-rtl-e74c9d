// tb_hd_extraction: self-checking test of the Hamming-distance disparity
// search (64 candidates of 224 bits).
// Candidates are the reference string with a random number of flipped
// bits, so costs are spread and ties occur; some tests plant a unique
// best candidate.  The reference counts ones of the XOR with $countones
// and keeps the first minimum over d = 0..d_limit; an invalid centre must
// give 0.  Checks that the register holds while en is low.
module tb_hd_extraction;
  localparam int unsigned D = 64, BITS = 224, DW = $clog2(D);

  logic clk = 0, rst_n = 0, en = 0, center_valid = 0;
  logic [BITS-1:0] ref_census = '0;
  logic [D-1:0][BITS-1:0] cand = '0;
  logic [DW-1:0] d_limit = '0, disp;
  int checks = 0, failures = 0;

  hd_extraction #(.D(D), .BITS(BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BITS-1:0] flip(logic [BITS-1:0] v, int n);
    for (int i = 0; i < n; i++) v[$urandom_range(0, BITS - 1)] ^= 1'b1;
    return v;
  endfunction

  initial begin
    logic [DW-1:0] exp;
    int ties = 0, limited = 0;
    exp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int best, bestc, plant;
      @(negedge clk);
      for (int i = 0; i < BITS; i += 32) ref_census[i +: 32] = $urandom;
      for (int d = 0; d < D; d++) cand[d] = flip(ref_census, $urandom_range(3, (t % 2) ? 12 : 60));
      plant = $urandom_range(0, D - 1);
      if (t % 4 == 0) cand[plant] = flip(ref_census, 1);
      d_limit = (t % 5 == 0) ? DW'($urandom_range(0, D - 1)) : DW'(D - 1);
      center_valid = (t % 7 != 3);
      en = ($urandom_range(0, 5) != 0);
      best = 0; bestc = $countones(ref_census ^ cand[0]);
      for (int d = 1; d <= int'(d_limit); d++) begin
        int c;
        c = $countones(ref_census ^ cand[d]);
        if (c == bestc) ties++;
        if (c < bestc) begin bestc = c; best = d; end
      end
      if (d_limit != DW'(D - 1)) limited++;
      if (en) exp = center_valid ? DW'(best) : '0;
      @(negedge clk);
      en = 0;
      checks++;
      if (disp != exp) begin
        failures++;
        $display("FAIL t=%0d disp=%0d expected %0d", t, disp, exp);
      end
    end
    $display("equal costs seen: %0d, limited searches: %0d", ties, limited);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
