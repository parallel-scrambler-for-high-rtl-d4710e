// tb_prbs_par_gen -- self-checking testbench of the parallel generator.
//
// Nine instances cover the configurations the design is built for: the
// default 16-port x^7+x^6+1 generator in both port assignments (smallest and
// largest R), with separate XOR cells and with a non-default seed; 16-port
// x^11+x^9+1; 5-port x^7+x^4+1 (two registers per port); 8-port x^7+x^6+1;
// 5-port x^7+x^6+1 with single-edge flip-flops; the 1-port (serial) case; and
// 30 ports, where the window (32) exceeds M. Every output word is
// compared with a serial reference (gen_checker), the register counts with
// the expected ones, and the XOR source positions of the default generator
// with the published port equations. The M ranges with one register per port
// are checked against the published ones. Set is applied twice to check restart.
module tb_prbs_par_gen;
  import scr_pkg::*;

  logic clk = 1'b0;
  logic set = 1'b0;
  initial #1 set = 1'b1;  // a rising edge, so the asynchronous set acts
  int   checks = 0, failures = 0;

  localparam int NI = 9;
  int c[NI], f[NI], r[NI];

  always #5 clk = ~clk;

  gen_checker #(.N(7),  .TAPS(TAPS_X7_X6),  .M(16), .EXP_L(16)) u0 (clk, set, c[0], f[0], r[0]);
  gen_checker #(.N(7),  .TAPS(TAPS_X7_X6),  .M(16), .RSEL(R_MAX), .EXP_L(16)) u1 (clk, set, c[1], f[1], r[1]);
  gen_checker #(.N(11), .TAPS(TAPS_X11_X9), .M(16), .EXP_L(16), .WORDS(400)) u2 (clk, set, c[2], f[2], r[2]);
  gen_checker #(.N(7),  .TAPS(TAPS_X7_X4),  .M(5),  .EXP_L(10)) u3 (clk, set, c[3], f[3], r[3]);
  gen_checker #(.N(7),  .TAPS(TAPS_X7_X6),  .M(8),  .EXP_L(8))  u4 (clk, set, c[4], f[4], r[4]);
  gen_checker #(.N(7),  .TAPS(TAPS_X7_X6),  .M(5),  .CELL(CELL_SET), .EXP_L(7), .WORDS(150)) u5 (clk, set, c[5], f[5], r[5]);
  gen_checker #(.N(7),  .TAPS(TAPS_X7_X6),  .M(16), .SEED(64'h5a), .CELL(CELL_XOR_THEN_DET),
                .EXP_L(16)) u6 (clk, set, c[6], f[6], r[6]);
  // M = 1: the serial scrambler itself (seven registers, one XOR2)
  gen_checker #(.N(7),  .TAPS(TAPS_X7_X6),  .M(1),  .EXP_L(7))  u7 (clk, set, c[7], f[7], r[7]);
  // M = 30: ports 24-29 need R = 8, window 8*7-24 = 32 registers
  gen_checker #(.N(7),  .TAPS(TAPS_X7_X6),  .M(30), .EXP_L(32)) u8 (clk, set, c[8], f[8], r[8]);

  // published port equations: sources of port p as indices of the previous word
  // x^7+x^6+1, M=16, smallest R: b16=b9+b10 ... b22=b8+b10 ... b28=b0+b4 ...
  function automatic int exp_min(int p, int s);
    int a[16] = '{9,10,11,12,13,14, 8, 9,10,11,12,13, 0,1,2,3};
    return a[p] + s * (p < 6 ? 1 : (p < 12 ? 2 : 4));
  endfunction
  // x^7+x^6+1, M=16, largest R: b16=b2+b4 ... b27=b13+b15, b28=b0+b4 ...
  function automatic int exp_max(int p, int s);
    int a[16] = '{2,3,4,5,6,7,8,9,10,11,12,13, 0,1,2,3};
    return a[p] + s * (p < 12 ? 2 : 4);
  endfunction

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // equations of the default generator against the published ones
    for (int p = 0; p < 16; p++)
      for (int s = 0; s < 2; s++) begin
        expect_eq(src_pos(TAPS_X7_X6, 7, 16, R_MIN, p, s), exp_min(p, s), "x7x6 R_MIN source");
        expect_eq(src_pos(TAPS_X7_X6, 7, 16, R_MAX, p, s), exp_max(p, s), "x7x6 R_MAX source");
      end
    // x^7+x^4+1, M=5, two words of history: b10=b3+b6 ... b13=b6+b9, b14=b0+b6
    for (int p = 0; p < 4; p++) begin
      expect_eq(src_pos(TAPS_X7_X4, 7, 10, R_MIN, p, 0), 3 + p, "x7x4 source 0");
      expect_eq(src_pos(TAPS_X7_X4, 7, 10, R_MIN, p, 1), 6 + p, "x7x4 source 1");
    end
    expect_eq(src_pos(TAPS_X7_X4, 7, 10, R_MIN, 4, 0), 0, "x7x4 port 4 source 0");
    expect_eq(src_pos(TAPS_X7_X4, 7, 10, R_MIN, 4, 1), 6, "x7x4 port 4 source 1");

    // one register per port exactly for M_min(R) <= M <= M_max(R), with
    // M_max = (N-D)*R and M_min = (N+D)*R/2 (x^7+x^6+1: D = 1; R = 2, 4, 8
    // gives 8-12, 16-24, 32-48); just below M_min the window is longer than M
    for (int r = 2; r <= 8; r *= 2) begin
      for (int m = 4 * r; m <= 6 * r; m++)
        expect_eq(window_len(TAPS_X7_X6, 7, m), m, "one register per port");
      checks++;
      if (window_len(TAPS_X7_X6, 7, 4 * r - 1) <= 4 * r - 1) begin
        failures++;
        $display("FAIL M=%0d should need more than M registers", 4 * r - 1);
      end
    end

    // run, restart mid-sequence, run again
    #12 set = 1'b0;
    #1600 set = 1'b1;
    #10 set = 1'b0;
    #2200;
    for (int i = 0; i < NI; i++) begin
      checks += c[i];
      failures += f[i];
      expect_eq(r[i], 2, "completed runs");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
