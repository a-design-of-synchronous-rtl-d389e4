// tb_vclk_counter_top: end-to-end test of the variable-rate counter, at
// N = 16, L = 4 (n = 4, C2 = 3 bits, C3 = 12 bits in three enable groups) and
// an 8-bit divider. A reference model keeps its own divider phase and count:
// the count must advance by one exactly in the cycles where cnt is high and
// the phase reaches div-1. The test switches the ratio between 1, 2, 3, 5, 0
// and 7, pauses counting at random, and finally counts at full rate through a
// complete wrap of the 16-bit count. It counts how often each mechanism
// occurred (divider tick, pause, ratio change, PEN1 and PEN2 enables, carries
// into each C3 enable group, full wrap, clk_out edges) and fails if any never
// did.
module tb_vclk_counter_top;
  localparam int N = 16, L = 4, CW = 8, M = 3;
  logic clk = 1'b0, rst = 1'b1, cnt = 1'b0;
  logic [CW-1:0] div = CW'(1);
  logic [N-1:0]  q, q_prev;
  logic          tick, clk_out, clk_out_prev, pen1;
  logic [M-1:0]  pen2;
  int checks = 0, failures = 0;
  int unsigned c = 0, ph = 0;
  int n_tick = 0, n_pause = 0, n_ratio = 0, n_pen1 = 0, n_pen2 = 0;
  int n_wrap = 0, n_clkout = 0;
  int n_group[M];

  vclk_counter_top #(.N(N), .L(L), .CW(CW)) dut (
    .clk(clk), .rst(rst), .cnt(cnt), .div(div), .q(q), .tick(tick),
    .clk_out(clk_out), .pen1(pen1), .pen2(pen2));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: got %0h want %0h (div %0d) at %0t", what, got, want, div, $time);
    end
  endtask

  task automatic mech(input int n, input string what);
    checks++;
    $display("mechanism %-22s occurred %0d times", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never occurred", what);
    end
  endtask

  // One clock cycle: drive at the falling edge, update the model at the
  // rising edge, compare at the next falling edge.
  task automatic step(input logic cnt_in);
    int unsigned d, last;
    cnt = cnt_in;
    d = (div == 0) ? 1 : int'(div);
    last = d - 1;
    #1;
    check(32'(tick), 32'(cnt && ph >= last), "tick");
    if (tick && pen1) n_pen1++;
    if (tick && pen2[0]) n_pen2++;
    if (!cnt) n_pause++;
    q_prev = q;
    clk_out_prev = clk_out;
    @(posedge clk);
    if (cnt) begin
      if (ph >= last) begin
        ph = 0;
        c = (c + 1) % (1 << N);
        n_tick++;
        if (c == 0) n_wrap++;
      end else begin
        ph++;
      end
    end
    @(negedge clk);
    check(32'(q), c, "count");
    check(32'(pen1), c % 2, "pen1");
    check(32'(pen2), (c % 16 == 15) ? 32'h7 : 32'h0, "pen2");
    for (int g = 0; g < M; g++)
      if (q[4 + g*L] != q_prev[4 + g*L]) n_group[g]++;
    if (clk_out && !clk_out_prev) n_clkout++;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ratios[6] = '{1, 2, 3, 5, 0, 7};

  initial begin
    foreach (n_group[g]) n_group[g] = 0;
    repeat (2) @(negedge clk);
    check(32'(q), 0, "reset");
    rst = 1'b0;
    // ratio sweep with random pauses
    for (int r = 0; r < 4; r++) begin
      foreach (ratios[i]) begin
        div = CW'(ratios[i]);
        n_ratio++;
        for (int k = 0; k < 400; k++) step($urandom_range(0, 5) != 0);
      end
    end
    // full-rate counting through a wrap of the 16-bit count
    div = CW'(1);
    n_ratio++;
    while (n_wrap == 0) step(1'b1);
    repeat (50) step(1'b1);
    mech(n_tick, "divider tick");
    mech(n_pause, "pause (cnt low)");
    mech(n_ratio, "ratio change");
    mech(n_pen1, "PEN1 enable");
    mech(n_pen2, "PEN2 enable");
    for (int g = 0; g < M; g++) mech(n_group[g], $sformatf("C3 group %0d carry", g));
    mech(n_wrap, "full wrap");
    mech(n_clkout, "clk_out rising edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
