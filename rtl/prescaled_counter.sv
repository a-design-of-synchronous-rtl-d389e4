// prescaled_counter: N-bit synchronous binary counter whose clock period does
// not grow with N.
//
// The count is split into three sub counters. C1 is bit 0 and toggles on every
// count; it also yields PEN1, high on every second count. C2 holds bits n-1..1
// (n = floor(log2 N)) and uses backward carry propagation, so its toggle logic
// is one AND gate deep on the critical path; it counts when PEN1 is high and
// yields PEN2, high on one count in every 2^n. C3 holds bits N-1..n as a plain
// ripple-carry counter that counts when PEN2 is high; its long carry chain has
// 2^n clock periods to settle. PEN2 comes from m = ceil((N-n)/L) identical
// 1-bit Johnson counters so that no enable drives more than L flip-flops of C3.
// The result is an ordinary binary up-counter: q goes 0, 1, 2, ... and wraps
// to 0 after 2^N - 1.
//
// Interface: clk, rst (asynchronous, active high, clears the count), cnt
// (count enable: the count advances by one on each rising edge where cnt is
// high), q (the count), pen1 and pen2 (the internal pre-scaled enables,
// brought out for observation).
// Timing: q is registered; no combinational path from cnt to q.
// N = 64 and L = 16 are the original's example and fan-out limit. N must be at
// least 4 so that C2 has a bit. The asynchronous reset is this design's choice.
// Lint notes rst as used both asynchronously and synchronously: the synchronous
// use is only the assertions' disable condition, not logic.
module prescaled_counter
  import vcnt_pkg::*;
#(
  parameter int unsigned N = 64,
  parameter int unsigned L = 16,
  localparam int unsigned W2 = c2_width(N),
  localparam int unsigned W3 = c3_width(N),
  localparam int unsigned M  = pen2_copies(N, L)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cnt,
  output logic [N-1:0]  q,
  output logic          pen1,
  output logic [M-1:0]  pen2
);

  localparam int unsigned NL = floor_log2(N);   // n

  logic          q0;
  logic [W2-1:0] q2;
  logic [W3-1:0] q3;

  sub_counter1 u_c1 (
    .clk  (clk),
    .rst  (rst),
    .cnt  (cnt),
    .q0   (q0),
    .pen1 (pen1)
  );

  sub_counter2 #(.W(W2), .M(M)) u_c2 (
    .clk  (clk),
    .rst  (rst),
    .cnt  (cnt),
    .pen1 (pen1),
    .q    (q2),
    .pen2 (pen2)
  );

  sub_counter3 #(.W(W3), .L(L), .M(M)) u_c3 (
    .clk  (clk),
    .rst  (rst),
    .cnt  (cnt),
    .pen2 (pen2),
    .q    (q3)
  );

  assign q = {q3, q2, q0};

  // Invariants of the pre-scaling: PEN1 mirrors bit 0, every PEN2 copy is
  // high exactly when the low n bits are all ones.
  property p_pen1;
    @(posedge clk) disable iff (rst) pen1 == q[0];
  endproperty
  property p_pen2;
    @(posedge clk) disable iff (rst) pen2 == {M{&q[NL-1:0]}};
  endproperty
  a_pen1: assert property (p_pen1);
  a_pen2: assert property (p_pen2);

  initial begin
    if (N < 4) $error("prescaled_counter: N must be at least 4");
  end

endmodule
