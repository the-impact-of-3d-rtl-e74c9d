// tb_hw_delay: self-checking test of the census delay line.
// Pushes random 224-bit strings through the default 64-candidate delay
// line with random pauses and checks that cand[d] is the string accepted
// d pushes before the current input, and that cand[0] follows din at once.
module tb_hw_delay;
  localparam int unsigned DEPTH = 64, BITS = 224;

  logic clk = 0, rst_n = 0, en = 0;
  logic [BITS-1:0] din = '0;
  logic [DEPTH-1:0][BITS-1:0] cand;
  int checks = 0, failures = 0;

  hw_delay #(.DEPTH(DEPTH), .BITS(BITS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BITS-1:0] rnd();
    logic [BITS-1:0] v;
    for (int i = 0; i < BITS; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  logic [BITS-1:0] hist[$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      din = rnd();
      en = ($urandom_range(0, 3) != 0);
      #1;
      for (int d = 0; d < DEPTH; d++) begin
        logic [BITS-1:0] exp;
        exp = (d == 0) ? din : ((hist.size() >= d) ? hist[hist.size() - d] : '0);
        checks++;
        if (cand[d] != exp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d cand[%0d]", t, d);
        end
      end
      if (en) hist.push_back(din);
      @(posedge clk);
      #1 en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
