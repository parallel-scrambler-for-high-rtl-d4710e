// tb_tff -- q must toggle at every clock edge (rising or falling) that
// samples t high and hold otherwise; set clears q.
module tb_tff;

  logic clk = 1'b0, set = 1'b0, t = 1'b0, q;
  initial #1 set = 1'b1;  // a rising edge, so the asynchronous set acts
  int   checks = 0, failures = 0, toggles = 0;

  tff dut (.clk(clk), .set(set), .t(t), .q(q));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e = 1'b0;
    #2 checks++;
    if (q !== 1'b0) failures++;
    t = 1'b1;
    #5 clk = ~clk;              // edge under set: no toggle
    #2 checks++;
    if (q !== 1'b0) failures++;
    set = 1'b0;
    for (int i = 0; i < 500; i++) begin
      t = 1'($urandom % 3 == 0);
      #2 if (t) begin e = ~e; toggles++; end
      clk = ~clk;
      #1 t = ~t;
      #1 checks++;
      if (q !== e) begin
        failures++;
        if (failures < 10) $display("FAIL at %0t: q=%b expected %b", $time, q, e);
      end
      #1;
    end
    checks++;
    if (toggles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
