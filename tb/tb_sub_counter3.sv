// tb_sub_counter3: self-checking test of sub counter C3. A 10-bit instance
// with fan-out limit 4 (three PEN2 copies) is driven with random cnt and a
// PEN2 that the test bench raises on random cycles, through two full wraps;
// a default-size (58-bit) instance is stepped alongside. The count must go up
// by one exactly when cnt and PEN2 are both high.
module tb_sub_counter3;
  localparam int W = 10, L = 4, M = 3;
  logic clk = 1'b0, rst = 1'b1, cnt = 1'b0, pen;
  logic [W-1:0]  q;
  logic [57:0]   qd;
  int checks = 0, failures = 0;
  longint unsigned c = 0;
  int wraps = 0;

  sub_counter3 #(.W(W), .L(L)) dut (
    .clk(clk), .rst(rst), .cnt(cnt), .pen2({M{pen}}), .q(q));
  sub_counter3 dut_full (
    .clk(clk), .rst(rst), .cnt(cnt), .pen2({4{pen}}), .q(qd));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h at %0t", what, got, want, $time);
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
    pen = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      cnt = ($urandom_range(0, 5) != 0);
      pen = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (cnt && pen) begin
        c++;
        if ((c % (1 << W)) == 0) wraps++;
      end
      @(negedge clk);
      check(64'(q), c % (1 << W), "10-bit count");
      check(64'(qd), c, "58-bit count");
    end
    checks++;
    if (wraps < 2) begin
      failures++;
      $display("FAIL counter wrapped only %0d times", wraps);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
