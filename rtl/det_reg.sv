// det_reg -- double-edge-triggered D register (DET), one bit.
//
// The register takes d on the rising AND on the falling edge of clk, so data
// moves at twice the clock frequency; this halves the clock rate (and the
// clock-buffer power) a single-edge register would need for the same bit rate.
// The design it stands for is a DET register built from clocked-CMOS (C2MOS)
// stages with one master/slave path per clock phase; that transistor circuit
// is not reproduced here. This RTL gives the same function with two ordinary
// flip-flops, one per edge, whose XOR is the output: at a rising edge
// r <= d ^ f, so q = r ^ f = d; at a falling edge f <= d ^ r, so q = d again.
// q never depends combinationally on clk, so no clock-gated mux is needed.
//
// Interface: clk, set (asynchronous, active high: q becomes INIT at once and
// holds while set is high), d, q.
// Timing: q shows the d sampled at the most recent clock edge of either kind.
module det_reg #(
  parameter logic INIT = 1'b1   // value forced by set
) (
  input  logic clk,
  input  logic set,
  input  logic d,
  output logic q
);

  logic r;  // half updated at rising edges
  logic f;  // half updated at falling edges

  always_ff @(posedge clk or posedge set)
    if (set) r <= INIT;
    else     r <= d ^ f;

  always_ff @(negedge clk or posedge set)
    if (set) f <= 1'b0;
    else     f <= d ^ r;

  assign q = r ^ f;

endmodule
