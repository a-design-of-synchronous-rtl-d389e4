// clk_div: programmable integer clock divider that sets the counting rate of
// the variable-rate counter.
//
// A CW-bit counter runs from 0 to div-1 and wraps. A magnitude compare
// (count >= div-1) decides the wrap, so lowering div while the counter is above
// the new limit wraps at once instead of running through 2^CW states. Two
// outputs are derived from it:
//   tick    - high for one source-clock cycle in every div cycles (while en is
//             high): the clock enable that makes a circuit on the source clock
//             run at f_clk / div. Valid for any div >= 1; div = 0 acts as 1.
//   clk_out - a registered divided clock, high for ceil(div/2) of every div
//             cycles, its rising edge in the cycle where count is 0. It is a
//             square wave for div >= 2 and stays high for div = 1.
// en = 0 freezes the divider (count, clk_out) and holds tick low.
//
// Interface: clk (source clock), rst (asynchronous, active high), en, div
// (division ratio, may change at any time), tick, clk_out.
// Timing: tick is combinational from the count register and en; clk_out is a
// flip-flop output (no glitches).
// The original gives the divider's purpose (any integer ratio) and a
// synthesised view with a 33-bit count register, an incrementer, a less-than
// and an equality compare and a reset multiplexer; the exact compare rules,
// the en input and the tick output are this design's choices. The original's
// delay-line fine phase control is not part of this block.
module clk_div #(
  parameter int unsigned CW = 33
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  input  logic [CW-1:0] div,
  output logic          tick,
  output logic          clk_out
);

  logic [CW-1:0] count, count_nxt, last, high_len;
  logic          wrap;

  always_comb begin
    last      = (div == '0) ? '0 : div - 1'b1;          // div-1, with 0 read as 1
    high_len  = (div == '0) ? CW'(1) : CW'(({1'b0, div} + 1'b1) >> 1);
    wrap      = (count >= last);
    count_nxt = wrap ? '0 : count + 1'b1;
    tick      = en & wrap;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      count   <= '0;
      clk_out <= 1'b0;
    end else if (en) begin
      count   <= count_nxt;
      clk_out <= (count_nxt < high_len);
    end
  end

endmodule
