// sub_counter2: sub counter C2 of the pre-scaled counter, an (n-1)-bit
// backward-carry-propagation counter for bits Q[n-1:1], together with the
// generator of the second pre-scaled enable PEN2.
//
// Counting: bit q[i] (= Q[i+1]) toggles on a clock edge where pen1 and cnt are
// high and all lower bits q[i-1:0] are 1. Each bit has its own AND chain, built
// "backwards": it starts from the most significant operand, which becomes 1
// earliest in a binary sequence, and the late, fast-changing signals are ANDed
// in last, so only the final gate sits on the critical path. PEN1, the enable
// from sub counter C1, goes to the flip-flop enables.
//
// PEN2: a further backward chain forms &q[W-1:0] & cnt (i.e. &Q[n-1:1]). It is
// high during counts 2^n-2 and 2^n-1 and enables M identical 1-bit Johnson
// counters. Each of them goes 0->1 at count 2^n-1 and back to 0 at the next
// count, so every PEN2 copy equals &Q[n-1:0]: one count in every 2^n. The copies
// exist only to split the fan-out into C3; copy g drives bits g*L..g*L+L-1
// there.
//
// Interface: clk, rst (asynchronous, active high), cnt (count enable), pen1
// (from C1), q (bits n-1..1 of the count), pen2 (M copies of PEN2).
// Timing: all outputs are flip-flop outputs updated on the rising edge.
// Own choices: cnt is included in the PEN2 enable chain so that a pause in
// counting cannot toggle the Johnson counters; the default sizes are the
// 64-bit example (W = 5, M = 4).
module sub_counter2 #(
  parameter int unsigned W = 5,   // n-1
  parameter int unsigned M = 4    // number of PEN2 copies
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cnt,
  input  logic         pen1,
  output logic [W-1:0] q,
  output logic [M-1:0] pen2
);

  // Toggle terms: tog[i] for counter bit q[i]; tog[W] is the PEN2 enable.
  logic [W:0] tog;

  for (genvar i = 0; i <= W; i++) begin : g_chain
    // Backward AND chain: start at q[i-1], end with the late signals q[0], cnt.
    always_comb begin
      logic acc;
      acc = 1'b1;
      for (int j = i - 1; j >= 0; j--) acc = acc & q[j];
      tog[i] = acc & cnt;
    end
  end

  // T flip-flops of C2, enabled by PEN1.
  always_ff @(posedge clk or posedge rst) begin
    if (rst)       q <= '0;
    else if (pen1) q <= q ^ tog[W-1:0];
  end

  // Redundant 1-bit Johnson counters producing the M copies of PEN2.
  for (genvar g = 0; g < M; g++) begin : g_pen2
    johnson_1bit u_pen2 (
      .clk (clk),
      .rst (rst),
      .en  (tog[W]),
      .q   (pen2[g])
    );
  end

endmodule
