// sub_counter1: sub counter C1, the least significant bit of the pre-scaled
// counter, and the generator of the first pre-scaled enable PEN1.
//
// Bit Q[0] is a toggle flip-flop that inverts on every clock edge at which the
// count enable cnt is high. Next to it sits a 1-bit Johnson counter driven by
// the same cnt, so PEN1 always equals Q[0]: it is high during every second
// count, exactly when the next count carries into bit 1. PEN1 is a separate
// flip-flop so that the output Q[0] and the enable of sub counter C2 do not
// load the same node.
//
// Interface: clk, rst (asynchronous, active high), cnt (count enable),
// q0 (bit 0 of the count), pen1 (enable for C2).
// Timing: both outputs change on the rising edge after cnt is sampled high;
// PEN1 has a period of two counts.
module sub_counter1 (
  input  logic clk,
  input  logic rst,
  input  logic cnt,
  output logic q0,
  output logic pen1
);

  // 1-bit counter: toggles on each counted clock.
  always_ff @(posedge clk or posedge rst) begin
    if (rst)      q0 <= 1'b0;
    else if (cnt) q0 <= q0 ^ 1'b1;
  end

  // 1-bit Johnson counter making PEN1.
  johnson_1bit u_pen1 (
    .clk (clk),
    .rst (rst),
    .en  (cnt),
    .q   (pen1)
  );

endmodule
