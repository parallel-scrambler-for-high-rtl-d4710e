// tb_decision_ckt -- random words with the pattern inserted at random places;
// hit must be high exactly one word after each matching word, for words
// advancing at both clock edges.
module tb_decision_ckt;

  localparam logic [15:0] PAT = 16'hA5C3;

  logic        clk = 1'b0, set = 1'b0, hit;
  initial #1 set = 1'b1;  // a rising edge, so the asynchronous set acts
  logic [15:0] word = '0;
  int          checks = 0, failures = 0, hits = 0;

  decision_ckt #(.M(16), .PATTERN(PAT)) dut (.clk(clk), .set(set), .word(word), .hit(hit));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic prev_match;
    #2 checks++;
    if (hit !== 1'b0) failures++;
    word = PAT;                 // a match while set is held must not count
    #5 clk = ~clk;
    #2 set = 1'b0;
    prev_match = 1'b0;
    #1;
    for (int i = 0; i < 600; i++) begin
      word = ($urandom % 5 == 0) ? PAT : 16'($urandom);
      if (word == PAT) hits++;
      #2 prev_match = (word == PAT);
      clk = ~clk;
      #1 word = ~word;          // word changes right after the edge
      #1 checks++;
      if (hit !== prev_match) begin
        failures++;
        if (failures < 10) $display("FAIL at %0t: hit=%b expected %b", $time, hit, prev_match);
      end
      #1;
    end
    checks++;
    if (hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
