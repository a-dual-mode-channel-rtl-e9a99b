// clock_gate -- glitch-free clock gate for switching a decoder core off.
//
// The enable is sampled on the falling edge of clk and ANDed with clk, so the
// gated clock gclk only starts or stops while clk is low and never produces a
// short pulse. A change of `en` takes effect from the next rising edge of clk
// that follows a falling edge (at most one cycle later). The turbo and
// Viterbi cores each run on their own gated clock, enabled by the operating
// mode, as the unused core of the chip is disabled by clock gating. Built from
// a negative-edge flip-flop and an AND gate rather than a library cell.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);
  logic en_q;
  always_ff @(negedge clk) en_q <= en;
  assign gclk = clk & en_q;
endmodule
