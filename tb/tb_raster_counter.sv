// tb_raster_counter: self-checking test of the lagging raster position.
// A 7x3 raster with a lag of 10 pixels must start at raster index
// 21-10 = 11 (x=4, y=1) with live low, step once per en, wrap at the row
// and frame ends and raise live exactly when it reaches (0,0), then keep
// it high through later frames.
module tb_raster_counter;
  localparam int unsigned W = 7, H = 3, LAG = 10, CW = 12;

  logic clk = 0, rst_n = 0, en = 0;
  logic [CW-1:0] x, y;
  logic live;
  int checks = 0, failures = 0;

  raster_counter #(.W(W), .H(H), .LAG(LAG), .COORD_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n = 0;
    for (int t = 0; t < 200; t++) begin
      // raster index of the n-th position: n - LAG, modulo the frame
      idx = ((n - int'(LAG)) % int'(W * H) + int'(W * H)) % int'(W * H);
      checks++;
      if (x != CW'(idx % W) || y != CW'(idx / W) || live != (n >= int'(LAG))) begin
        failures++;
        $display("FAIL n=%0d x=%0d y=%0d live=%0d expected %0d %0d %0d", n, x, y, live,
                 idx % W, idx / W, n >= int'(LAG));
      end
      @(negedge clk);
      en = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (en) n++;
      en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
