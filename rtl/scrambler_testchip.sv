// scrambler_testchip -- 40 Gb/s parallel scrambler test chip.
//
// Two 16-port parallel pseudorandom code generators for x^7+x^6+1 share one
// clock path. Scrambler I is built from XOR-embedded double-edge registers,
// scrambler II from an XOR2 gate followed by a double-edge register; both
// produce the same bit stream. The clock comes from a probe pad or an on-chip
// oscillator (clk_mux2), is halved by a divide-by-2 stage to get an even duty
// cycle (clk_div2) and clocks the generators, which, with double-edge
// registers, emit one 16-bit word per clock edge: at a 2.5 GHz input clock the
// generators run at 1.25 GHz, each port at 2.5 Gb/s, 40 Gb/s in total. Since
// the word sequence repeats every 127 words, a decision circuit per generator
// fires once per period and a T flip-flop halves that, so tff_i/tff_ii toggle
// at f_in / 254 (about 9.8 MHz for 2.5 GHz), which is easy to measure; the
// generated rate is then f(tff) * 254 * 16 b/s. This block structure follows
// the published test chip; the pad drivers, clock buffer and oscillator are
// analog and appear here only as ports (clk_osc, the outputs).
//
// Beside the test circuit, and not connected to it, stands a parallel data
// scrambler (par_scrambler) with its own clock, restart and data ports: the
// same generator used as the application intends, to scramble a 16-bit
// parallel data word per clock edge.
//
// Interface: clk_probe, clk_osc, sel_probe (1 = probe clock); set
// (asynchronous, active high: loads the generator seeds, clears the decision
// circuits, T flip-flops and divider); out_i/out_ii the generator words
// (out[0] is the earliest bit of a word); tff_i/tff_ii the measurement
// outputs. scr_clk, scr_set, scr_data_in, scr_data_out: the data scrambler.
module scrambler_testchip
  import scr_pkg::*;
#(
  parameter int unsigned    N    = 7,
  parameter taps_t          TAPS = TAPS_X7_X6,
  parameter int unsigned    M    = 16,
  parameter logic [MAX_N:0] SEED = '1,
  parameter rsel_e          RSEL = R_MIN
) (
  input  logic         clk_probe,
  input  logic         clk_osc,
  input  logic         sel_probe,
  input  logic         set,
  output logic [M-1:0] out_i,
  output logic [M-1:0] out_ii,
  output logic         tff_i,
  output logic         tff_ii,
  input  logic         scr_clk,
  input  logic         scr_set,
  input  logic [M-1:0] scr_data_in,
  output logic [M-1:0] scr_data_out
);

  // the first word after set: the pattern the decision circuits look for
  localparam window_t      START   = init_window(TAPS, N, SEED, window_len(TAPS, N, M));
  localparam logic [M-1:0] PATTERN = START[M-1:0];

  logic clk_sel;   // selected test clock
  logic clk_gen;   // divided clock of the generators
  logic hit_i, hit_ii;

  clk_mux2 u_sel (.sel_probe(sel_probe), .clk_probe(clk_probe), .clk_osc(clk_osc),
                  .clk_out(clk_sel));

  clk_div2 u_div (.clk_in(clk_sel), .rst(set), .clk_out(clk_gen));

  // scrambler I: XOR merged into the double-edge register
  prbs_par_gen #(.N(N), .TAPS(TAPS), .M(M), .SEED(SEED), .CELL(CELL_XOR_DET), .RSEL(RSEL))
    u_scr_i (.clk(clk_gen), .set(set), .out(out_i));

  decision_ckt #(.M(M), .PATTERN(PATTERN))
    u_dec_i (.clk(clk_gen), .set(set), .word(out_i), .hit(hit_i));

  tff u_tff_i (.clk(clk_gen), .set(set), .t(hit_i), .q(tff_i));

  // scrambler II: XOR2 gate cascaded with a double-edge register
  prbs_par_gen #(.N(N), .TAPS(TAPS), .M(M), .SEED(SEED), .CELL(CELL_XOR_THEN_DET), .RSEL(RSEL))
    u_scr_ii (.clk(clk_gen), .set(set), .out(out_ii));

  decision_ckt #(.M(M), .PATTERN(PATTERN))
    u_dec_ii (.clk(clk_gen), .set(set), .word(out_ii), .hit(hit_ii));

  tff u_tff_ii (.clk(clk_gen), .set(set), .t(hit_ii), .q(tff_ii));

  // parallel data scrambler, independent of the test circuit
  par_scrambler #(.N(N), .TAPS(TAPS), .M(M), .SEED(SEED), .RSEL(RSEL))
    u_data_scr (.clk(scr_clk), .set(scr_set), .data_in(scr_data_in), .data_out(scr_data_out));

endmodule
