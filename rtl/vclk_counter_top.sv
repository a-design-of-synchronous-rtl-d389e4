// vclk_counter_top: variable-rate synchronous binary counter.
//
// A programmable integer clock divider (clk_div) sets how often the N-bit
// pre-scaled counter (prescaled_counter) advances: with cnt high, the count
// goes up by one every div cycles of the source clock clk, so the counting
// speed is chosen at run time without touching the counter itself. The whole
// design is one clock domain: the divider's one-cycle tick is the counter's
// count enable, which keeps the counter's single-cycle timing on clk while it
// counts at clk / div. The divider's registered divided clock is brought out
// as clk_out for circuits that want the slow clock itself.
//
// Interface:
//   clk, rst       source clock (the original takes it from a PLL, which is
//                  outside this design) and asynchronous active-high reset
//   cnt            count enable; low freezes both the divider and the count
//   div            division ratio (0 and 1 both mean: count every cycle)
//   q              the N-bit count
//   tick           high in the cycles where the count advances
//   clk_out        divided clock, period div cycles (div >= 2)
//   pen1, pen2     the counter's pre-scaled enables, for observation
// Timing: q changes on the rising clk edge at the end of a cycle in which
// tick is high; tick depends combinationally on cnt and the divider state.
// The counter structure and N = 64, L = 16 follow the original; driving the
// counter through a clock enable rather than a derived clock is this design's
// choice.
module vclk_counter_top
  import vcnt_pkg::*;
#(
  parameter int unsigned N  = 64,
  parameter int unsigned L  = 16,
  parameter int unsigned CW = 33,
  localparam int unsigned M = pen2_copies(N, L)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          cnt,
  input  logic [CW-1:0] div,
  output logic [N-1:0]  q,
  output logic          tick,
  output logic          clk_out,
  output logic          pen1,
  output logic [M-1:0]  pen2
);

  clk_div #(.CW(CW)) u_div (
    .clk     (clk),
    .rst     (rst),
    .en      (cnt),
    .div     (div),
    .tick    (tick),
    .clk_out (clk_out)
  );

  prescaled_counter #(.N(N), .L(L)) u_cnt (
    .clk  (clk),
    .rst  (rst),
    .cnt  (tick),
    .q    (q),
    .pen1 (pen1),
    .pen2 (pen2)
  );

endmodule
