// tb_clk_div2 -- the divided clock must stay low under reset, then toggle at
// every rising input edge: period two input periods, high for exactly one.
module tb_clk_div2;

  logic clk = 1'b0, rst = 1'b0, y;
  initial #1 rst = 1'b1;  // a rising edge, so the asynchronous reset acts
  int   checks = 0, failures = 0;

  clk_div2 dut (.clk_in(clk), .rst(rst), .clk_out(y));

  always #5 clk = ~clk;

  task automatic expect_y(logic e, string what);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: out=%b expected %b", what, $time, y, e);
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
    logic e = 1'b0;
    repeat (3) begin
      @(posedge clk);
      #1 expect_y(1'b0, "reset");
    end
    #2 rst = 1'b0;
    for (int i = 0; i < 100; i++) begin
      @(posedge clk);
      e = ~e;
      #1 expect_y(e, "after rising edge");
      @(negedge clk);
      #1 expect_y(e, "after falling edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
