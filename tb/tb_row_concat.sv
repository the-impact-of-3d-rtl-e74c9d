// tb_row_concat: self-checking test of the SRAM-to-row reordering.
// For random SRAM words and every write index it places each word by its
// age (how many rows before the written one it was stored) and compares
// the block's row order with that placement.
module tb_row_concat;
  localparam int unsigned N = 16, WIDTH = 8, SW = $clog2(N);

  logic [N-1:0][WIDTH-1:0] raw;
  logic [SW-1:0] wsel;
  logic [N-2:0][WIDTH-1:0] rows;
  int checks = 0, failures = 0;

  row_concat #(.NUM_SRAM(N), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp [N-1];
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) raw[i] = WIDTH'($urandom);
      wsel = SW'(t % N);
      #1;
      // SRAM i was written 'age' rows before the current one
      for (int i = 0; i < N; i++) begin
        int age;
        age = (int'(wsel) - i + N) % N;
        if (age != 0) exp[N - 1 - age] = raw[i];
      end
      for (int j = 0; j < N - 1; j++) begin
        checks++;
        if (rows[j] != exp[j]) begin
          failures++;
          $display("FAIL wsel=%0d rows[%0d]=%h expected %h", wsel, j, rows[j], exp[j]);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
