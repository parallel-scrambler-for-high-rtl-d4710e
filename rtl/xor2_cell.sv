// xor2_cell -- two-input XOR gate.
//
// In scrambler II the XOR of a port is a separate gate in front of a plain
// double-edge register (det_reg); in the circuit it stands for, the gate is
// a pass-transistor XOR whose output is driven from the inputs rather than
// from the supplies, which is acceptable because such gates are never
// cascaded in the generator. The RTL is the logic function only.
//
// Interface: in1, in2 -> out = in1 ^ in2, purely combinational.
module xor2_cell (
  input  logic in1,
  input  logic in2,
  output logic out
);

  assign out = in1 ^ in2;

endmodule
