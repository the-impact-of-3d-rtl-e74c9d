// tb_sram_sp: self-checking test of the single-port SRAM model.
// Writes random words at random addresses (752 x 8 default size), keeps a
// shadow copy, and checks every read against it, that read data holds
// while the SRAM is not read or is written, and that ce low blocks both
// reads and writes.
module tb_sram_sp;
  localparam int unsigned DEPTH = 752;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 0, ce = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] shadow [DEPTH];
  bit written [DEPTH];

  sram_sp #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s: rdata=%h expected %h", what, rdata, exp);
    end
  endtask

  initial begin
    logic [WIDTH-1:0] last;
    // fill every word
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      ce = 1; we = 1; addr = AW'(a); wdata = WIDTH'($urandom);
      shadow[a] = wdata; written[a] = 1;
    end
    @(negedge clk); ce = 0; we = 0;
    // random mix of reads, writes and idle cycles
    for (int i = 0; i < 20000; i++) begin
      int op, a;
      op = $urandom_range(0, 9);
      a  = $urandom_range(0, DEPTH - 1);
      @(negedge clk);
      addr = AW'(a);
      if (op < 5) begin
        ce = 1; we = 0;
        @(negedge clk);
        ce = 0;
        check(shadow[a], "read");
        last = shadow[a];
      end else if (op < 8) begin
        ce = 1; we = 1; wdata = WIDTH'($urandom);
        shadow[a] = wdata;
        @(negedge clk);
        ce = 0; we = 0;
        if (i > 0) check(last, "hold over write");
      end else begin
        // ce low: neither a write nor a read may happen
        ce = 0; we = $urandom_range(0, 1); wdata = ~shadow[a];
        @(negedge clk);
        we = 0;
        if (i > 0) check(last, "hold while idle");
      end
    end
    // final full read-back
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); ce = 1; we = 0; addr = AW'(a);
      @(negedge clk); ce = 0;
      check(shadow[a], "final read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
