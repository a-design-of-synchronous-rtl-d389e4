// tb_clk_div: self-checking test of the programmable clock divider (8-bit
// count). For each ratio in {0, 1, 2, 3, 4, 5, 7, 10, 255} it resets the
// divider, runs it with a random enable, and checks, against the number k of
// enabled cycles since reset, that tick is high exactly when en is high and
// k mod d = d-1, that clk_out is high when k mod d < ceil(d/2), and that ticks
// come every d enabled cycles. It then lowers the ratio while the count is above
// the new limit and checks the immediate wrap.
module tb_clk_div;
  localparam int CW = 8;
  logic clk = 1'b0, rst = 1'b1, en = 1'b0, tick, clk_out;
  logic [CW-1:0] div = '0;
  int checks = 0, failures = 0;
  int ticks_total = 0;

  clk_div #(.CW(CW)) dut (.clk(clk), .rst(rst), .en(en), .div(div), .tick(tick), .clk_out(clk_out));

  always #5 clk = ~clk;

  task automatic check(input logic got, input logic want, input string what, input int d, input int k);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %0b want %0b (div %0d, k %0d) at %0t", what, got, want, d, k, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ratios[9] = '{0, 1, 2, 3, 4, 5, 7, 10, 255};

  initial begin
    foreach (ratios[r]) begin
      int d, k, h, since, last_gap;
      d = (ratios[r] == 0) ? 1 : ratios[r];
      h = (d + 1) / 2;
      k = 0;
      since = 0;
      rst = 1'b1;
      div = CW'(ratios[r]);
      en = 1'b0;
      @(negedge clk);
      rst = 1'b0;
      for (int i = 0; i < 4 * d + 40; i++) begin
        en = ($urandom_range(0, 3) != 0);
        #1;
        check(tick, en && (k % d == d - 1), "tick", d, k);
        if (k >= 1 && d >= 2) check(clk_out, (k % d) < h, "clk_out", d, k);
        @(posedge clk);
        if (en) begin
          k++;
          since++;
          if (tick) begin
            if (ticks_total > 0 && k > d) begin
              checks++;
              if (since != d) begin
                failures++;
                $display("FAIL tick gap %0d for div %0d", since, d);
              end
            end
            since = 0;
            ticks_total++;
          end
        end
        @(negedge clk);
      end
    end
    // lower the ratio while the count is above the new limit
    rst = 1'b1;
    div = CW'(16);
    en = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    div = CW'(4);
    #1;
    check(tick, 1'b1, "wrap after ratio decrease", 4, 10);
    @(negedge clk);
    #1;
    check(tick, 1'b0, "restart after ratio decrease", 4, 0);
    repeat (3) @(negedge clk);
    #1;
    check(tick, 1'b1, "first tick at new ratio", 4, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
