// scr_pkg -- shared types and elaboration-time arithmetic of the parallel
// pseudorandom code generator.
//
// A feedback polynomial P(x) = sum c_q x^q (c_0 = c_N = 1) defines the serial
// m-sequence b(i) = XOR_{q=1..N} c_q b(i-q). Because P(x)^R = P(x^R) over GF(2)
// for R a power of two, the same sequence also obeys
//     b(i) = XOR_{q} c_q b(i - R*q)        (R = 1, 2, 4, ...)
// The generator keeps a window of the last L bits in registers and, once per
// output word, produces M new bits. New bit p of a word (p = 0..M-1) picks the
// power of two R_p that makes every b(i - R_p*q) fall inside the window of the
// previous cycle:   R_p*T >= p+1   and   R_p*N <= L+p,
// where T is the lowest tap. L is the smallest window for which every port
// finds such an R_p (never below M). The functions below compute L, R_p and
// the window positions feeding each new bit; they run only at elaboration.
//
// Taps are given as a bit vector: bit q set means c_q = 1 (bit 0 is ignored).
// Serial bit order follows the serial scrambler: b(0) = x_{N-1} (the oldest
// register of the serial shift register), ..., b(N-1) = x_0.
package scr_pkg;

  localparam int unsigned MAX_N = 63;   // highest polynomial degree supported
  localparam int unsigned MAX_L = 512;  // largest register window supported

  typedef logic [MAX_N:0]   taps_t;
  typedef logic [MAX_L-1:0] window_t;

  // Register cell used for every bit of the generator.
  typedef enum logic [1:0] {
    CELL_SET          = 2'd0,  // single-edge flip-flop: one word per clock
    CELL_XOR_DET      = 2'd1,  // XOR folded into a double-edge register (scrambler I)
    CELL_XOR_THEN_DET = 2'd2   // XOR2 gate followed by a double-edge register (scrambler II)
  } cell_e;

  // Which of the usable powers of two a port takes.
  typedef enum logic {
    R_MIN = 1'b0,  // smallest R: sources sit close to the port
    R_MAX = 1'b1   // largest R: sources spread out, lower maximum fan-out
  } rsel_e;

  // x^7 + x^6 + 1 (the 10-Gb/s Ethernet WIS frame scrambler)
  localparam taps_t TAPS_X7_X6 = taps_t'((64'd1 << 7) | (64'd1 << 6));
  // x^7 + x^4 + 1
  localparam taps_t TAPS_X7_X4 = taps_t'((64'd1 << 7) | (64'd1 << 4));
  // x^11 + x^9 + 1 (IEEE 1394b)
  localparam taps_t TAPS_X11_X9 = taps_t'((64'd1 << 11) | (64'd1 << 9));

  // T: lowest q >= 1 with c_q = 1
  function automatic int lowest_tap(taps_t taps, int n);
    for (int q = 1; q <= n; q++)
      if (taps[q]) return q;
    return n;
  endfunction

  // S: number of taps c_1..c_N set (inputs of each XOR)
  function automatic int tap_count(taps_t taps, int n);
    int s = 0;
    for (int q = 1; q <= n; q++)
      if (taps[q]) s++;
    return s;
  endfunction

  // q of the s-th set tap, counted from the highest (s = 0 gives q = N)
  function automatic int tap_q(taps_t taps, int n, int s);
    int k = 0;
    for (int q = n; q >= 1; q--)
      if (taps[q]) begin
        if (k == s) return q;
        k++;
      end
    return n;
  endfunction

  // smallest power of two R with R*T >= p+1
  function automatic int r_lower(int t, int p);
    int r = 1;
    while (r * t < p + 1) r = r * 2;
    return r;
  endfunction

  // register window length L
  function automatic int window_len(taps_t taps, int n, int m);
    int t = lowest_tap(taps, n);
    int l = m;
    for (int p = 0; p < m; p++)
      if (r_lower(t, p) * n - p > l) l = r_lower(t, p) * n - p;
    return l;
  endfunction

  // R used by new bit p
  function automatic int r_port(taps_t taps, int n, int l, rsel_e rsel, int p);
    int t = lowest_tap(taps, n);
    int r = r_lower(t, p);
    if (rsel == R_MAX)
      while (2 * r * n <= l + p) r = r * 2;
    return r;
  endfunction

  // Window position (0 = oldest) of the s-th XOR input of new bit p.
  // The new bit lands at window position L-M+p after the shift, i.e. at
  // position L+p counted in the window of the previous cycle.
  function automatic int src_pos(taps_t taps, int n, int l, rsel_e rsel,
                                 int p, int s);
    return l + p - r_port(taps, n, l, rsel, p) * tap_q(taps, n, s);
  endfunction

  // Window contents right after Set: b(0) .. b(L-1) grown from the seed.
  // seed[N-1] = x_{N-1} is b(0); seed[0] = x_0 is b(N-1).
  function automatic window_t init_window(taps_t taps, int n, logic [MAX_N:0] seed,
                                          int l);
    window_t w = '0;
    for (int i = 0; i < l; i++) begin
      if (i < n) w[i] = seed[n-1-i];
      else begin
        logic b = 1'b0;
        for (int q = 1; q <= n; q++)
          if (taps[q]) b = b ^ w[i-q];
        w[i] = b;
      end
    end
    return w;
  endfunction

endpackage
