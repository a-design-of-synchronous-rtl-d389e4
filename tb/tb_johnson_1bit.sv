// tb_johnson_1bit: self-checking test of the 1-bit Johnson counter.
// Drives a random enable for 400 cycles and compares q with a reference that
// inverts on each enabled edge; also checks the reset value and that a held
// enable gives a period-2 square wave.
module tb_johnson_1bit;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, q;
  int checks = 0, failures = 0;
  logic exp_q;

  johnson_1bit dut (.clk(clk), .rst(rst), .en(en), .q(q));

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
    exp_q = 1'b0;
    repeat (2) @(negedge clk);
    check(q, 1'b0, "reset value");
    rst = 1'b0;
    for (int i = 0; i < 400; i++) begin
      en = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (en) exp_q = ~exp_q;
      @(negedge clk);
      check(q, exp_q, "random enable");
    end
    // held enable: square wave of period 2
    en = 1'b1;
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      exp_q = ~exp_q;
      check(q, exp_q, "held enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
