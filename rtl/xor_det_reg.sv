// xor_det_reg -- double-edge-triggered register with the XOR built in.
//
// This is the basic cell of the parallel generator (scrambler I): it stores
// in1 XOR in2 at every rising and every falling edge of clk. In the circuit it
// models, the two XOR inputs drive the master stage of a double-edge C2MOS
// register directly, which merges the XOR delay with the register's set-up
// path; the critical path of a port is then one such cell. The RTL keeps the
// function only: the XOR and the two-flop double-edge register below
// (rising-edge half r, falling-edge half f, output r ^ f; see det_reg).
//
// Interface: clk, set (asynchronous, active high, forces q to INIT), in1, in2,
// q. Timing: q = in1 ^ in2 as sampled at the most recent edge of clk.
module xor_det_reg #(
  parameter logic INIT = 1'b1   // value forced by set
) (
  input  logic clk,
  input  logic set,
  input  logic in1,
  input  logic in2,
  output logic q
);

  logic r;
  logic f;

  always_ff @(posedge clk or posedge set)
    if (set) r <= INIT;
    else     r <= in1 ^ in2 ^ f;

  always_ff @(negedge clk or posedge set)
    if (set) f <= 1'b0;
    else     f <= in1 ^ in2 ^ r;

  assign q = r ^ f;

endmodule
