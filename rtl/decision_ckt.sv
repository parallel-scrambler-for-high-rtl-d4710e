// decision_ckt -- pattern detector of the scrambler test chip.
//
// The parallel generator repeats its output words with the period of the
// m-sequence (127 words for a degree-7 polynomial when M and 127 share no
// factor), and every word of that period is different. Comparing the word
// with one fixed PATTERN therefore yields exactly one hit per period; the
// rate of hits shows whether the generator runs correctly at speed. The
// comparison is registered in a double-edge register (det_reg) so that it is
// evaluated for every word, one per clock edge. The published design gives only the
// purpose of this circuit; the equality comparator, the registered output and
// the choice of pattern (the first word after set) are this design's own.
//
// Interface: clk, set (asynchronous, clears hit), word[M-1:0], hit.
// Timing: hit is high for one word time (half a clock period), one word
// after the matching word was on word.
module decision_ckt #(
  parameter int unsigned   M       = 16,
  parameter logic [M-1:0]  PATTERN = '1
) (
  input  logic         clk,
  input  logic         set,
  input  logic [M-1:0] word,
  output logic         hit
);

  logic match;

  assign match = (word == PATTERN);

  det_reg #(.INIT(1'b0)) u_reg (.clk(clk), .set(set), .d(match), .q(hit));

endmodule
