// clk_mux2 -- test-clock selection.
//
// The test chip can be clocked either from an external source landed on a
// probe pad or from an on-chip oscillator; this 2:1 multiplexer picks one.
// The selection is meant to be static during a measurement (it is set before
// the scrambler is started), so no glitch-free switching is provided; that
// is this design's choice, the selection logic itself is not detailed.
//
// Interface: sel_probe (1: probe clock, 0: oscillator clock), clk_probe,
// clk_osc, clk_out. Purely combinational.
module clk_mux2 (
  input  logic sel_probe,
  input  logic clk_probe,
  input  logic clk_osc,
  output logic clk_out
);

  always_comb
    if (sel_probe) clk_out = clk_probe;
    else           clk_out = clk_osc;

endmodule
