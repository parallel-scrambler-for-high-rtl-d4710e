// tb_scrambler_testchip -- end-to-end test of the test chip at its default
// (full) size: 16 ports, x^7+x^6+1, seed all ones.
//
// The chip is run twice, first from the probe clock (period 4), then, after a
// restart, from the oscillator clock (period 6), each time for three sequence
// periods. Checked: every word of scrambler I against a serial reference (one
// word per edge of the divided clock, i.e. one per input clock period),
// scrambler II equal to scrambler I, the interval between T flip-flop toggles
// (127 words = 127 input clock periods, so f(tff) = f_in / 254), and, on its
// own clock, the data scrambler against data XOR reference. Each mechanism
// (both clock sources, restart, decision hits, T-FF toggles of both
// scramblers, data scrambling) is counted and must have happened.
module tb_scrambler_testchip;

  logic        clk_probe = 1'b0, clk_osc = 1'b0, sel_probe = 1'b1, set = 1'b0;
  logic [15:0] out_i, out_ii;
  logic        tff_i, tff_ii;
  logic        scr_clk = 1'b0, scr_set = 1'b0;
  logic [15:0] scr_data_in = '0, scr_data_out;

  int checks = 0, failures = 0;
  int n_probe_runs = 0, n_osc_runs = 0, n_restarts = 0;
  int n_toggle_i = 0, n_toggle_ii = 0, n_data_words = 0, n_words = 0;

  scrambler_testchip dut (
    .clk_probe(clk_probe), .clk_osc(clk_osc), .sel_probe(sel_probe), .set(set),
    .out_i(out_i), .out_ii(out_ii), .tff_i(tff_i), .tff_ii(tff_ii),
    .scr_clk(scr_clk), .scr_set(scr_set), .scr_data_in(scr_data_in),
    .scr_data_out(scr_data_out));

  always #2 clk_probe = ~clk_probe;
  always #3 clk_osc   = ~clk_osc;
  always #5 scr_clk   = ~scr_clk;

  task automatic fail(string what);
    failures++;
    if (failures < 10) $display("FAIL %s at %0t", what, $time);
  endtask

  // serial reference: x^7+x^6+1 shift register, output x6
  function automatic logic [15:0] next_word(ref logic [6:0] x);
    logic [15:0] r;
    for (int p = 0; p < 16; p++) begin
      r[p] = x[6];
      x = {x[5:0], x[6] ^ x[5]};
    end
    return r;
  endfunction

  initial begin : watchdog
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one run of the test circuit: restart, then check WORDS words and the
  // T-FF toggle intervals against the input clock period
  task automatic run(int words, int tclk);
    logic [6:0]  x = '1;
    logic [15:0] e;
    realtime     last_i = 0, last_ii = 0;
    logic        pi, pii;
    int          tog_i = 0, tog_ii = 0;
    set = 1'b1;
    #7 set = 1'b0;
    n_restarts++;
    #1;
    pi = tff_i; pii = tff_ii;
    for (int w = 0; w < words; w++) begin
      if (w > 0) begin
        @(dut.clk_gen);          // a new word after every edge of the divided clock
        #1;
      end
      e = next_word(x);
      n_words++;
      checks++;
      if (out_i !== e) fail($sformatf("scrambler I word %0d: %h expected %h", w, out_i, e));
      checks++;
      if (out_ii !== out_i) fail($sformatf("scrambler II word %0d differs", w));
      if (tff_i !== pi) begin
        if (tog_i > 0) begin
          checks++;
          if ($realtime - last_i != 127.0 * tclk) fail($sformatf("T-FF I interval %0t", $realtime - last_i));
        end
        tog_i++; n_toggle_i++; last_i = $realtime; pi = tff_i;
      end
      if (tff_ii !== pii) begin
        if (tog_ii > 0) begin
          checks++;
          if ($realtime - last_ii != 127.0 * tclk) fail("T-FF II interval");
        end
        tog_ii++; n_toggle_ii++; last_ii = $realtime; pii = tff_ii;
      end
    end
    // three periods: toggles at words 2, 129, 256, 383
    checks++;
    if (tog_i != 4 || tog_ii != 4) fail($sformatf("toggle count %0d/%0d, expected 4", tog_i, tog_ii));
  endtask

  // data scrambler on its own clock
  initial begin
    logic [6:0]  y = '1;
    logic [15:0] e;
    #1 scr_set = 1'b1;
    #3 scr_set = 1'b0;
    for (int w = 0; w < 400; w++) begin
      scr_data_in = 16'($urandom);
      #1 e = next_word(y);
      checks++;
      n_data_words++;
      if (scr_data_out !== (scr_data_in ^ e)) fail($sformatf("data scrambler word %0d", w));
      @(scr_clk);
      #1;
    end
  end

  initial begin
    #1;
    sel_probe = 1'b1;
    run(385, 4);
    n_probe_runs++;
    sel_probe = 1'b0;
    run(385, 6);
    n_osc_runs++;
    // every mechanism must have happened
    checks++; if (n_probe_runs == 0) fail("no run from the probe clock");
    checks++; if (n_osc_runs == 0)   fail("no run from the oscillator clock");
    checks++; if (n_restarts < 2)    fail("no restart");
    checks++; if (n_toggle_i == 0)   fail("no T-FF I toggle");
    checks++; if (n_toggle_ii == 0)  fail("no T-FF II toggle");
    checks++; if (n_data_words == 0) fail("no data word scrambled");
    $display("runs probe=%0d osc=%0d restarts=%0d words=%0d toggles I=%0d II=%0d data words=%0d",
             n_probe_runs, n_osc_runs, n_restarts, n_words, n_toggle_i, n_toggle_ii, n_data_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
