// prbs_par_gen -- parallel pseudorandom code generator.
//
// Produces the m-sequence of the feedback polynomial P(x) M bits at a time:
// output word j is [b(Mj), b(Mj+1), ..., b(Mj+M-1)] of the serial sequence
// b(i) = XOR_q c_q b(i-q), so the M outputs, multiplexed in port order, equal
// the serial scrambler's bit stream. out[0] is the earliest bit of a word.
//
// How it works. L registers hold a window of the last L sequence bits
// (w[0] oldest). Each output cycle the window advances by M bits: a register
// whose bit is still inside the new window copies the register M places
// younger; each of the M newest registers computes a fresh bit as the XOR of
// S registers of the current window, using b(i) = XOR_q c_q b(i - R*q) with
// a power-of-two R chosen per port (see scr_pkg). Every register therefore
// sees at most one XOR of S inputs (one XOR2 for a trinomial) and never
// another register's XOR output through logic: the critical path is one
// register plus one XOR2, whatever M is. The outputs are the M oldest window
// registers, so right after set the first word is b(0..M-1), starting with
// the seed bit x_{N-1} exactly as the serial scrambler does.
//
// For the default polynomial x^7+x^6+1 and M = 16 the window is 16
// registers, one per port, and port p uses R = 1 (p = 0..5), 2 (p = 6..11)
// or 4 (p = 12..15), e.g. b(16) = b(9)^b(10) and b(28) = b(0)^b(4). This
// register count, the per-port XOR2 and the equations follow the published
// method; R_MAX selects the alternative assignment with the largest usable R
// per port (b(16) = b(2)^b(4)), which spreads the fan-out. The general
// register count (smallest window L that lets every port find an R) is this
// design's own rule; for the published examples it gives the published
// counts: 16 (x^7+x^6+1, M=16), 16 (x^11+x^9+1, M=16), 8 (x^7+x^6+1, M=8),
// 10 (x^7+x^4+1, M=5) and 7 (x^7+x^6+1, M=5).
//
// Cells: CELL_XOR_DET (default) uses the XOR-embedded double-edge register,
// CELL_XOR_THEN_DET a separate XOR2 and a double-edge register, CELL_SET
// ordinary rising-edge flip-flops. With double-edge cells a new word appears
// after every clock edge (2 words per clock period); with CELL_SET after
// every rising edge.
//
// Interface: clk; set (asynchronous, active high) loads the start window
// b(0..L-1) grown from SEED (SEED[N-1] = x_{N-1} ... SEED[0] = x_0, all ones by
// default as in the serial Ethernet scrambler); out[M-1:0] the current word.
module prbs_par_gen
  import scr_pkg::*;
#(
  parameter int unsigned N    = 7,                 // polynomial degree
  parameter taps_t       TAPS = TAPS_X7_X6,        // bit q set: c_q = 1
  parameter int unsigned M    = 16,                // parallel outputs
  parameter logic [MAX_N:0] SEED = '1,             // x_{N-1}..x_0 in SEED[N-1:0]
  parameter cell_e       CELL = CELL_XOR_DET,
  parameter rsel_e       RSEL = R_MIN
) (
  input  logic         clk,
  input  logic         set,
  output logic [M-1:0] out
);

  localparam int      L    = window_len(TAPS, N, M);   // registers
  localparam int      S    = tap_count(TAPS, N);       // XOR inputs per port
  localparam window_t INIT = init_window(TAPS, N, SEED, L);

  if (S < 2 || !TAPS[N] || L > MAX_L) begin : g_bad_params
    $error("prbs_par_gen: polynomial needs c_N = 1, at least two taps and L <= MAX_L");
  end

  logic [L-1:0] w;  // sequence window, w[0] oldest

  for (genvar k = 0; k < L; k++) begin : g_bit
    if (k < L - int'(M)) begin : g_shift
      // bit still inside the next window: plain register copy
      if (CELL == CELL_SET) begin : g_set
        always_ff @(posedge clk or posedge set)
          if (set) w[k] <= INIT[k];
          else     w[k] <= w[k + M];
      end else begin : g_det
        det_reg #(.INIT(INIT[k])) u_reg (
          .clk(clk), .set(set), .d(w[k + M]), .q(w[k]));
      end
    end else begin : g_new
      // new bit p of the next word
      localparam int P = k - (L - int'(M));
      logic [S-1:0] xs;   // the S window bits feeding this port
      logic         in1;  // XOR of all sources but the last
      for (genvar s = 0; s < S; s++) begin : g_src
        assign xs[s] = w[src_pos(TAPS, N, L, RSEL, P, s)];
      end
      assign in1 = ^xs[S-2:0];

      if (CELL == CELL_SET) begin : g_set
        always_ff @(posedge clk or posedge set)
          if (set) w[k] <= INIT[k];
          else     w[k] <= in1 ^ xs[S-1];
      end else if (CELL == CELL_XOR_THEN_DET) begin : g_xdet
        logic x;
        xor2_cell u_xor (.in1(in1), .in2(xs[S-1]), .out(x));
        det_reg #(.INIT(INIT[k])) u_reg (
          .clk(clk), .set(set), .d(x), .q(w[k]));
      end else begin : g_xordet
        xor_det_reg #(.INIT(INIT[k])) u_reg (
          .clk(clk), .set(set), .in1(in1), .in2(xs[S-1]), .q(w[k]));
      end
    end
  end

  assign out = w[M-1:0];

endmodule
