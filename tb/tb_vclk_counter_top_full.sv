// tb_vclk_counter_top_full: the variable-rate counter at its default size
// (64-bit count, fan-out limit 16, four PEN2 copies, 33-bit divider). It
// counts at ratios 1, 4, 3 and 1 with pauses and checks the count, PEN1 and
// PEN2 against a reference every cycle; it requires at least 64 PEN2 pulses
// (carries into the 58-bit high sub counter) and a carry into its second
// enable group (bit 22), reached by counting from reset through 2^16 counts
// at full rate and then checking the high word as it advances.
module tb_vclk_counter_top_full;
  logic clk = 1'b0, rst = 1'b1, cnt = 1'b0;
  logic [32:0] div = 33'd1;
  logic [63:0] q;
  logic        tick, clk_out, pen1;
  logic [3:0]  pen2;
  int checks = 0, failures = 0;
  longint unsigned c = 0;
  int unsigned ph = 0;
  int n_pen2 = 0, n_tick = 0;

  vclk_counter_top dut (
    .clk(clk), .rst(rst), .cnt(cnt), .div(div), .q(q), .tick(tick),
    .clk_out(clk_out), .pen1(pen1), .pen2(pen2));

  always #5 clk = ~clk;

  task automatic check(input logic [63:0] got, input logic [63:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0h want %0h at %0t", what, got, want, $time);
    end
  endtask

  task automatic step(input logic cnt_in);
    int unsigned d;
    cnt = cnt_in;
    d = (div == 0) ? 1 : int'(div);
    #1;
    check(64'(tick), 64'(cnt && ph >= d - 1), "tick");
    if (tick && pen2[0]) n_pen2++;
    @(posedge clk);
    if (cnt) begin
      if (ph >= d - 1) begin
        ph = 0;
        c++;
        n_tick++;
      end else ph++;
    end
    @(negedge clk);
    check(q, c, "count");
    check(64'(pen1), c % 2, "pen1");
    check(64'(pen2), (c % 64 == 63) ? 64'hf : 64'h0, "pen2");
  endtask

  initial begin : watchdog
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    div = 33'd1;  repeat (3000) step($urandom_range(0, 7) != 0);
    div = 33'd4;  repeat (3000) step($urandom_range(0, 7) != 0);
    div = 33'd3;  repeat (3000) step(1'b1);
    div = 33'd1;
    while (c < (longint'(1) << 22) + 100) step(1'b1);
    checks++;
    if (n_pen2 < 64 || q[22] !== 1'b1) begin
      failures++;
      $display("FAIL PEN2 pulses %0d, bit 22 %0b", n_pen2, q[22]);
    end
    $display("counted %0d, PEN2 pulses %0d", c, n_pen2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
