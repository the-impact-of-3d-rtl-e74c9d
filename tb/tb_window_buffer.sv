// tb_window_buffer: self-checking test of the sliding window registers.
// Shifts random columns into a 15x15 window with random pauses on en and
// checks after every accepted column that win[r][c] holds row r of the
// column accepted COLS-1-c columns before the newest; also checks reset
// to zero.
module tb_window_buffer;
  localparam int unsigned ROWS = 15, COLS = 15, WIDTH = 8;

  logic clk = 0, rst_n = 0, en = 0;
  logic [ROWS-1:0][WIDTH-1:0] col_in = '0;
  logic [ROWS-1:0][COLS-1:0][WIDTH-1:0] win;
  int checks = 0, failures = 0;

  window_buffer #(.ROWS(ROWS), .COLS(COLS), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [ROWS-1:0][WIDTH-1:0] hist[$];

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (win != '0) begin failures++; $display("FAIL not zero after reset"); end
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      en = ($urandom_range(0, 4) != 0);
      for (int r = 0; r < ROWS; r++) col_in[r] = WIDTH'($urandom);
      if (en) hist.push_back(col_in);
      @(negedge clk);
      en = 0;
      for (int c = 0; c < COLS; c++) begin
        int idx;
        idx = hist.size() - COLS + c;
        for (int r = 0; r < ROWS; r++) begin
          logic [WIDTH-1:0] exp;
          exp = (idx >= 0) ? hist[idx][r] : '0;
          checks++;
          if (win[r][c] != exp) begin
            failures++;
            $display("FAIL t=%0d win[%0d][%0d]=%h expected %h", t, r, c, win[r][c], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
