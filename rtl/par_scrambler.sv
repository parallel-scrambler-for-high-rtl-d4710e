// par_scrambler -- parallel additive (frame-synchronous) scrambler.
//
// Scrambling XORs the data stream with the m-sequence of P(x); done serially
// this needs a clock at the line bit rate. Here M data bits that would be
// sent one after another (data_in[0] first) are scrambled in one word: each
// is XORed with the generator bit of the same serial position, taken from a
// parallel pseudorandom code generator (prbs_par_gen). Because the operation
// is an XOR with a known sequence, the same module descrambles when both ends
// restart the generator (set) at the same frame position. The data XOR
// follows the serial scrambler, where input data is XORed with the output of
// the last shift-register stage; the word-wide form is this design's own.
//
// Interface: clk, set (asynchronous restart to the seed, e.g. at a frame
// boundary), data_in[M-1:0], data_out[M-1:0].
// Timing: data_out = data_in ^ current generator word, combinational from
// data_in; with double-edge cells the generator word, and so the data word,
// advances at every clock edge. While set is high the first word is applied.
module par_scrambler
  import scr_pkg::*;
#(
  parameter int unsigned N    = 7,
  parameter taps_t       TAPS = TAPS_X7_X6,
  parameter int unsigned M    = 16,
  parameter logic [MAX_N:0] SEED = '1,
  parameter cell_e       CELL = CELL_XOR_DET,
  parameter rsel_e       RSEL = R_MIN
) (
  input  logic         clk,
  input  logic         set,
  input  logic [M-1:0] data_in,
  output logic [M-1:0] data_out
);

  logic [M-1:0] prbs;

  prbs_par_gen #(.N(N), .TAPS(TAPS), .M(M), .SEED(SEED), .CELL(CELL), .RSEL(RSEL))
    u_gen (.clk(clk), .set(set), .out(prbs));

  assign data_out = data_in ^ prbs;

endmodule
