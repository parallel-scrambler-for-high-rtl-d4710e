// tb_xor2_cell -- exhaustive check of the XOR2 gate.
module tb_xor2_cell;

  logic a, b, y;
  int   checks = 0, failures = 0;

  xor2_cell dut (.in1(a), .in2(b), .out(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++)
      for (int v = 0; v < 4; v++) begin
        {a, b} = 2'(v);
        #1;
        checks++;
        if (y !== ((v == 1 || v == 2) ? 1'b1 : 1'b0)) begin
          failures++;
          $display("FAIL %b ^ %b gave %b", a, b, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
