// johnson_1bit: one-flip-flop Johnson (twisted-tail) counter.
//
// The flip-flop's inverted output is its own D input, so every enabled clock
// edge inverts the state: with en held high the output is a clock/2 square
// wave. It is cleared to 0 by reset, as the architecture requires (the first
// enabled edge makes the 0->1 change that starts a pre-scaled enable pulse).
// Because the state is a flip-flop output with nothing between it and its
// loads, it serves as a fast, clock-synchronous pre-scaled enable (PEN); several
// identical copies can share the same en to split a large fan-out.
//
// Interface: clk, rst (asynchronous, active high), en, q.
// Timing: q changes on the rising clk edge after en is sampled high.
// The asynchronous reset is a choice of this design; the original only says the
// counter starts at 0.
module johnson_1bit (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic q
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst)     q <= 1'b0;
    else if (en) q <= ~q;
  end

endmodule
