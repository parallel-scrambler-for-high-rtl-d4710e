// tb_xor_det_reg -- checks the XOR-embedded double-edge register: after every
// rising and every falling clock edge q must equal in1 ^ in2 as sampled at
// that edge; set forces INIT asynchronously.
module tb_xor_det_reg;

  logic clk = 1'b0;
  logic set = 1'b0;
  initial #1 set = 1'b1;  // a rising edge, so the asynchronous set acts
  logic in1 = 1'b0, in2 = 1'b0;
  logic q1, q0;
  int   checks = 0, failures = 0;

  xor_det_reg #(.INIT(1'b1)) dut1 (.clk(clk), .set(set), .in1(in1), .in2(in2), .q(q1));
  xor_det_reg #(.INIT(1'b0)) dut0 (.clk(clk), .set(set), .in1(in1), .in2(in2), .q(q0));

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
    repeat (4) begin
      #5 clk = ~clk;
      in1 = ~in1;
      #1 expect_q(1'b1, 1'b0, "set held");
    end
    #2 set = 1'b0;
    #1 expect_q(1'b1, 1'b0, "after release");
    for (int i = 0; i < 400; i++) begin
      {in1, in2} = 2'($urandom);
      #2 sampled = in1 ^ in2;
      clk = ~clk;
      #1 in2 = ~in2;
      #1 expect_q(sampled, sampled, clk ? "rising edge" : "falling edge");
      #1;
    end
    #1 set = 1'b1;
    #1 expect_q(1'b1, 1'b0, "async set");
    set = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
