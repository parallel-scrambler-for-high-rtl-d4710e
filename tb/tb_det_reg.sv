// tb_det_reg -- checks the double-edge register: q must show the d sampled
// at every rising and every falling clock edge, and set must force INIT at
// once and hold it, for both INIT values.
module tb_det_reg;

  logic clk = 1'b0;
  logic set = 1'b0;
  initial #1 set = 1'b1;  // a rising edge, so the asynchronous set acts
  logic d   = 1'b0;
  logic q1, q0;
  int   checks = 0, failures = 0;

  det_reg #(.INIT(1'b1)) dut1 (.clk(clk), .set(set), .d(d), .q(q1));
  det_reg #(.INIT(1'b0)) dut0 (.clk(clk), .set(set), .d(d), .q(q0));

  task automatic expect_q(logic e1, logic e0, string what);
    checks++;
    if (q1 !== e1 || q0 !== e0) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: q1=%b q0=%b expected %b %b", what, $time, q1, q0, e1, e0);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic sampled;
    #3 expect_q(1'b1, 1'b0, "set");
    // clock edges while set is held must not change q
    repeat (4) begin
      #5 clk = ~clk;
      d = ~d;
      #1 expect_q(1'b1, 1'b0, "set held");
    end
    #2 set = 1'b0;
    #1 expect_q(1'b1, 1'b0, "after release");
    for (int i = 0; i < 400; i++) begin
      d = 1'($urandom);
      #2 sampled = d;
      clk = ~clk;          // rising and falling edges alternate
      #1 d = ~d;           // d changes right after the edge
      #1 expect_q(sampled, sampled, clk ? "rising edge" : "falling edge");
      #1;
    end
    // asynchronous set in the middle of a clock phase
    #1 set = 1'b1;
    #1 expect_q(1'b1, 1'b0, "async set");
    set = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
