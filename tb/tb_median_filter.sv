// tb_median_filter: self-checking test of the 11x11 median filter.
// Drives random windows (full 8-bit range, 6-bit disparities, mostly
// constant windows with outliers) and compares with the 61st value of the
// sorted window.  An invalid centre must give 0; the register must hold
// while en is low.
module tb_median_filter;
  localparam int unsigned M = 11, WIDTH = 8, NV = M * M;

  logic clk = 0, rst_n = 0, en = 0, center_valid = 0;
  logic [M-1:0][M-1:0][WIDTH-1:0] win = '0;
  logic [WIDTH-1:0] med;
  int checks = 0, failures = 0;

  median_filter #(.M(M), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp;
    int v[$];
    exp = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int mode, base;
      mode = t % 3;
      base = $urandom_range(0, 63);
      @(negedge clk);
      v.delete();
      for (int r = 0; r < M; r++)
        for (int c = 0; c < M; c++) begin
          int x;
          case (mode)
            0: x = $urandom_range(0, 255);
            1: x = $urandom_range(0, 63);
            default: x = ($urandom_range(0, 9) < 4) ? $urandom_range(0, 63) : base;
          endcase
          win[r][c] = WIDTH'(x);
          v.push_back(x);
        end
      v.sort();
      center_valid = (t % 9 != 4);
      en = ($urandom_range(0, 5) != 0);
      if (en) exp = center_valid ? WIDTH'(v[(NV + 1) / 2 - 1]) : '0;
      @(negedge clk);
      en = 0;
      checks++;
      if (med != exp) begin
        failures++;
        $display("FAIL t=%0d med=%0d expected %0d", t, med, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
