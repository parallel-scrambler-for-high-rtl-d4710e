// tb_clk_mux2 -- the selected clock must follow the probe clock when
// sel_probe is high and the oscillator clock when it is low.
module tb_clk_mux2;

  logic sel, cp = 1'b0, co = 1'b0, y;
  int   checks = 0, failures = 0;

  clk_mux2 dut (.sel_probe(sel), .clk_probe(cp), .clk_osc(co), .clk_out(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      sel = (i % 50) < 25;
      cp  = (i % 4) < 2;
      co  = (i % 6) < 3;
      #1;
      checks++;
      if (y !== (sel ? cp : co)) begin
        failures++;
        $display("FAIL step %0d: sel=%b probe=%b osc=%b out=%b", i, sel, cp, co, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
