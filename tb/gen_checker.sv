// gen_checker -- testbench helper: one prbs_par_gen instance checked word by
// word against a bit-serial reference.
//
// The reference is the serial scrambler itself: an N-stage shift register
// X[0..N-1], output X[N-1], feedback XOR of X[q-1] for every tap c_q, loaded
// with the seed (X[k] = x_k). Each output word of the parallel generator must
// equal the next M serial output bits, out[0] first. Words are checked once
// just after set is released and then after every clock edge that advances
// the generator (both edges for double-edge cells, rising edges otherwise),
// which also checks the rate: two words per clock period with double-edge
// cells. The window length of the instance is compared with EXP_L.
module gen_checker
  import scr_pkg::*;
#(
  parameter int unsigned N    = 7,
  parameter taps_t       TAPS = TAPS_X7_X6,
  parameter int unsigned M    = 16,
  parameter logic [MAX_N:0] SEED = '1,
  parameter cell_e       CELL = CELL_XOR_DET,
  parameter rsel_e       RSEL = R_MIN,
  parameter int          EXP_L = 16,
  parameter int          WORDS = 300
) (
  input  logic clk,
  input  logic set,
  output int   checks,
  output int   failures,
  output int   runs
);

  logic [M-1:0] out;
  logic [N-1:0] x;

  prbs_par_gen #(.N(N), .TAPS(TAPS), .M(M), .SEED(SEED), .CELL(CELL), .RSEL(RSEL))
    dut (.clk(clk), .set(set), .out(out));

  task automatic chk();
    logic [M-1:0] exp;
    logic fb;
    for (int p = 0; p < M; p++) begin
      exp[p] = x[N-1];
      fb = 1'b0;
      for (int q = 1; q <= int'(N); q++)
        if (TAPS[q]) fb ^= x[q-1];
      x = {x[N-2:0], fb};
    end
    checks++;
    if (out !== exp) begin
      failures++;
      if (failures < 5)
        $display("gen_checker N=%0d M=%0d: got %h expected %h at %0t", N, M, out, exp, $time);
    end
  endtask

  initial begin
    checks = 0; failures = 0; runs = 0;
    #1;
    checks++;
    if (dut.L != EXP_L) begin
      failures++;
      $display("gen_checker N=%0d M=%0d: %0d registers, expected %0d", N, M, dut.L, EXP_L);
    end
    forever begin
      wait (set === 1'b1);
      wait (set === 1'b0);
      for (int k = 0; k < int'(N); k++) x[k] = SEED[k];
      #1 chk();
      for (int w = 1; w < WORDS && !set; w++) begin
        if (CELL == CELL_SET) @(posedge clk or posedge set);
        else                  @(clk or posedge set);
        if (set) break;
        #1 chk();
      end
      runs++;
    end
  end

endmodule
