// tb_line_buffer: self-checking test of the line-buffer SRAM bank.
// Streams rows of pixels whose values encode (row, column) into a small
// bank (4 SRAMs of 10 words), with random pauses on en.  Two accepted
// pixels after each pixel it checks that wsel names the SRAM of that
// pixel's row and that every other SRAM returns the pixel of the same
// column k rows earlier, k being the SRAM's distance behind wsel.  Also
// counts write-pointer wrap-arounds.
module tb_line_buffer;
  localparam int unsigned N = 4, DEPTH = 10, WIDTH = 8;
  localparam int unsigned AW = $clog2(DEPTH), SW = $clog2(N);
  localparam int unsigned ROWS = 13;

  logic clk = 0, rst_n = 0, en = 0, last_col = 0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0;
  logic [N-1:0][WIDTH-1:0] raw;
  logic [SW-1:0] wsel;
  int checks = 0, failures = 0;

  line_buffer #(.NUM_SRAM(N), .DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WIDTH-1:0] pix(int r, int c);
    return WIDTH'(r * 16 + c + 7);
  endfunction

  int hist_r[$], hist_c[$];
  int edges = 0;

  initial begin
    int wraps = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < DEPTH; c++) begin
        // random idle cycles
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk); en = 0;
        end
        @(negedge clk);
        en = 1; addr = AW'(c); wdata = pix(r, c); last_col = (c == DEPTH - 1);
        hist_r.push_back(r); hist_c.push_back(c);
        @(posedge clk);
        edges++;
        #1;
        if (edges >= 2) begin
          // registers now describe the pixel accepted two edges ago
          int s, rr, cc;
          s = edges - 2;
          rr = hist_r[s]; cc = hist_c[s];
          checks++;
          if (wsel != SW'(rr % N)) begin
            failures++; $display("FAIL wsel=%0d row=%0d", wsel, rr);
          end
          for (int i = 0; i < N; i++) begin
            int k;
            k = (int'(wsel) - i + N) % N;
            if (k != 0 && rr - k >= 0) begin
              checks++;
              if (raw[i] != pix(rr - k, cc)) begin
                failures++;
                $display("FAIL sram %0d row %0d col %0d: %h expected %h", i, rr, cc, raw[i], pix(rr - k, cc));
              end
            end
          end
        end
        if (c == DEPTH - 1 && r % N == N - 1) wraps++;
        @(negedge clk); en = 0;
      end
    end
    checks++;
    if (wraps < 2) begin
      failures++; $display("FAIL write pointer wrapped only %0d times", wraps);
    end
    $display("write pointer wraps: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
