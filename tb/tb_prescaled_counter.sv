// tb_prescaled_counter: self-checking test of the pre-scaled N-bit counter at
// four sizes: the default (N = 64, L = 16), N = 128 (n = 7, eight PEN2
// copies), N = 12 with L = 4 (n = 3, three PEN2 copies, wraps within the
// test) and N = 8. With a random count enable
// each count must equal the number of counted cycles modulo 2^N, PEN1 must be
// bit 0 and every PEN2 copy must equal the AND of the low n bits. The number of
// PEN2 pulses and of full wraps of the 12-bit counter is checked as well.
module tb_prescaled_counter;
  logic clk = 1'b0, rst = 1'b1, cnt = 1'b0;
  logic [127:0] q128;
  logic [7:0]  p2_128;
  logic        p1_128;
  logic [63:0] q64;
  logic [11:0] q12;
  logic [7:0]  q8;
  logic        p1_64, p1_12, p1_8;
  logic [3:0]  p2_64;
  logic [2:0]  p2_12;
  logic [0:0]  p2_8;
  int checks = 0, failures = 0;
  longint unsigned c = 0;
  int pen2_pulses = 0, wraps12 = 0;

  prescaled_counter                  dut64 (.clk(clk), .rst(rst), .cnt(cnt), .q(q64), .pen1(p1_64), .pen2(p2_64));
  prescaled_counter #(.N(128))       dut128 (.clk(clk), .rst(rst), .cnt(cnt), .q(q128), .pen1(p1_128), .pen2(p2_128));
  prescaled_counter #(.N(12), .L(4)) dut12 (.clk(clk), .rst(rst), .cnt(cnt), .q(q12), .pen1(p1_12), .pen2(p2_12));
  prescaled_counter #(.N(8))         dut8  (.clk(clk), .rst(rst), .cnt(cnt), .q(q8),  .pen1(p1_8),  .pen2(p2_8));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h (count %0d) at %0t", what, got, want, c, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(q64, 0, "reset value");
    rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      cnt = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (cnt) begin
        c++;
        if (c % 4096 == 0) wraps12++;
      end
      @(negedge clk);
      check(q64, c, "N=64 count");
      check(q128[63:0], c, "N=128 count, low half");
      check(q128[127:64], 0, "N=128 count, high half");
      check(64'(p2_128), (c % 128 == 127) ? 64'hff : 0, "N=128 PEN2");
      check(64'(p1_128), c % 2, "N=128 PEN1");
      check(64'(q12), c % 4096, "N=12 count");
      check(64'(q8), c % 256, "N=8 count");
      check(64'(p1_64), c % 2, "N=64 PEN1");
      check(64'(p2_64), (c % 64 == 63) ? 64'hf : 0, "N=64 PEN2");
      check(64'(p2_12), (c % 8 == 7) ? 64'h7 : 0, "N=12 PEN2");
      check(64'(p2_8), (c % 8 == 7) ? 64'h1 : 0, "N=8 PEN2");
      check(64'({p1_12, p1_8}), (c % 2) ? 64'h3 : 0, "N=12/8 PEN1");
      if (p2_64[0] && cnt) pen2_pulses++;
    end
    checks++;
    if (pen2_pulses < 20 || wraps12 < 1) begin
      failures++;
      $display("FAIL PEN2 pulses %0d, 12-bit wraps %0d", pen2_pulses, wraps12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
