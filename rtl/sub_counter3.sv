// sub_counter3: sub counter C3 of the pre-scaled counter, a conventional
// (N-n)-bit synchronous binary counter with a ripple carry chain, holding bits
// Q[N-1:n].
//
// It advances by one on a clock edge where cnt and PEN2 are high, i.e. once
// every 2^n counts. Its carry chain has W-1 AND gates and may take up to 2^n
// clock periods to settle, because PEN2 returns only after 2^n counts; it is a
// multicycle path by construction. PEN2 arrives as M identical copies; the
// flip-flops of C3 are split into groups of L consecutive bits and group g is
// enabled by copy g, so no enable drives more than L flip-flops.
//
// Interface: clk, rst (asynchronous, active high), cnt (count enable), pen2
// (M copies from C2), q (bits N-1..n of the count).
// Timing: q is a register updated on the rising edge.
// The defaults are the 64-bit example: W = 58 bits, fan-out limit L = 16,
// M = ceil(W/L) = 4 copies.
module sub_counter3 #(
  parameter int unsigned W = 58,
  parameter int unsigned L = 16,
  parameter int unsigned M = (W + L - 1) / L
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cnt,
  input  logic [M-1:0] pen2,
  output logic [W-1:0] q
);

  // Ripple carry chain: carry[j] = &q[j-1:0].
  logic [W-1:0] carry;
  logic [W-1:0] tog;

  assign carry[0] = 1'b1;

  // Each bit is enabled by the PEN2 copy of its group.
  for (genvar j = 0; j < W; j++) begin : g_bit
    if (j < W - 1) begin : g_carry
      assign carry[j+1] = carry[j] & q[j];
    end
    assign tog[j]     = cnt & pen2[j / L] & carry[j];
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) q <= '0;
    else     q <= q ^ tog;
  end

endmodule
