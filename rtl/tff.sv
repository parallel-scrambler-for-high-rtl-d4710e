// tff -- toggle flip-flop that turns the decision pulses into a square wave.
//
// Every hit from the decision circuit toggles q, so q is a square wave at
// half the hit rate: for a 127-word sequence period, f(q) = word rate / 254,
// slow enough to measure off chip. The toggle register samples t at both
// clock edges (det_reg) because hits last one word, half a clock period;
// that is this design's choice, the published design names only a T flip-flop.
//
// Interface: clk, set (asynchronous, q low), t, q.
// Timing: q changes at the clock edge that samples t high.
module tff (
  input  logic clk,
  input  logic set,
  input  logic t,
  output logic q
);

  det_reg #(.INIT(1'b0)) u_reg (.clk(clk), .set(set), .d(q ^ t), .q(q));

endmodule
