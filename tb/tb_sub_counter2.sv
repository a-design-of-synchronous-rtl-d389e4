// tb_sub_counter2: self-checking test of sub counter C2 (5 bits, 4 PEN2
// copies, the 64-bit example). The test bench plays the part of C1: it keeps
// the count c of counted cycles and feeds pen1 = c[0]. C2 must hold c[5:1],
// and every PEN2 copy must be high exactly when c[5:0] is all ones, i.e. once
// in every 64 counts.
module tb_sub_counter2;
  localparam int W = 5, M = 4;
  logic clk = 1'b0, rst = 1'b1, cnt = 1'b0, pen1 = 1'b0;
  logic [W-1:0] q;
  logic [M-1:0] pen2;
  int checks = 0, failures = 0;
  int unsigned c = 0;
  int pen2_seen = 0;

  sub_counter2 #(.W(W), .M(M)) dut (
    .clk(clk), .rst(rst), .cnt(cnt), .pen1(pen1), .q(q), .pen2(pen2));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0h want %0h (count %0d) at %0t", what, got, want, c, $time);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      cnt = ($urandom_range(0, 4) != 0);
      @(posedge clk);
      if (cnt) c++;
      @(negedge clk);
      pen1 = c[0];
      check(32'(q), 32'((c >> 1) & 32'h1f), "q = count[5:1]");
      check(32'(pen2), ((c & 32'h3f) == 32'h3f) ? 32'hf : 32'h0, "pen2 copies");
      if (pen2[0] && cnt) pen2_seen++;
    end
    checks++;
    if (pen2_seen < 10) begin
      failures++;
      $display("FAIL too few PEN2 pulses: %0d", pen2_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
