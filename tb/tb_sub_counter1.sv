// tb_sub_counter1: self-checking test of sub counter C1.
// With a random count enable, q0 must be the parity of the number of counts
// and PEN1 must equal it (high on every second count).
module tb_sub_counter1;
  logic clk = 1'b0, rst = 1'b1, cnt = 1'b0, q0, pen1;
  int checks = 0, failures = 0;
  int unsigned counts = 0;

  sub_counter1 dut (.clk(clk), .rst(rst), .cnt(cnt), .q0(q0), .pen1(pen1));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b want %0b at %0t", what, got, want, $time);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(q0, 1'b0, "q0 reset");
    check(pen1, 1'b0, "pen1 reset");
    rst = 1'b0;
    for (int i = 0; i < 500; i++) begin
      cnt = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      if (cnt) counts++;
      @(negedge clk);
      check(q0, counts[0], "q0");
      check(pen1, counts[0], "pen1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
