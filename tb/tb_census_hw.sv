// tb_census_hw: self-checking test of the census transform (15x15).
// Drives random windows (some with few grey levels so that equal values
// occur) and compares the registered census string with a reference that
// numbers the window positions row by row and skips the centre.  Also
// checks that the register holds when en is low.
module tb_census_hw;
  localparam int unsigned N = 15, WIDTH = 8, BITS = N * N - 1, C = N / 2;

  logic clk = 0, rst_n = 0, en = 0;
  logic [N-1:0][N-1:0][WIDTH-1:0] win = '0;
  logic [BITS-1:0] census;
  int checks = 0, failures = 0;

  census_hw #(.N(N), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [BITS-1:0] ref_census(logic [N-1:0][N-1:0][WIDTH-1:0] w);
    logic [BITS-1:0] v;
    for (int p = 0; p < N * N; p++) begin
      int r, c;
      r = p / N; c = p % N;
      if (p < C * N + C)      v[p]     = w[r][c] < w[C][C];
      else if (p > C * N + C) v[p - 1] = w[r][c] < w[C][C];
    end
    return v;
  endfunction

  initial begin
    logic [BITS-1:0] exp;
    exp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int levels;
      levels = (t % 3 == 0) ? 4 : 256;
      @(negedge clk);
      for (int r = 0; r < N; r++)
        for (int c = 0; c < N; c++) win[r][c] = WIDTH'($urandom_range(0, levels - 1));
      en = ($urandom_range(0, 3) != 0);
      if (en) exp = ref_census(win);
      @(negedge clk);
      en = 0;
      checks++;
      if (census != exp) begin
        failures++;
        $display("FAIL t=%0d census=%h expected %h", t, census, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
