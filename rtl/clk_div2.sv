// clk_div2 -- divide-by-2 clock divider.
//
// A toggle flip-flop on the rising edge of clk_in: clk_out has half the
// frequency of clk_in and, whatever the input duty cycle, a 50 % duty cycle.
// The double-edge registers of the scrambler use both clock phases, so an
// even duty cycle is what lets both half-periods carry one output word.
//
// Interface: clk_in, rst (asynchronous, active high, clk_out low), clk_out.
// Timing: clk_out changes one register delay after each rising clk_in edge.
module clk_div2 (
  input  logic clk_in,
  input  logic rst,
  output logic clk_out
);

  always_ff @(posedge clk_in or posedge rst)
    if (rst) clk_out <= 1'b0;
    else     clk_out <= ~clk_out;

endmodule
