// tb_par_scrambler -- scrambles random 16-bit words and descrambles them with
// a second instance. The scrambled word must equal the data XOR the next 16
// bits of a serial x^7+x^6+1 reference (seed all ones), and the descrambled
// word the original data, for one word per clock edge; a mid-stream restart
// (set) must bring both ends back to the start of the sequence.
module tb_par_scrambler;

  logic        clk = 1'b0, set = 1'b0;
  logic [15:0] data = '0, scr, descr;
  logic [6:0]  x;
  int          checks = 0, failures = 0;

  par_scrambler u_tx (.clk(clk), .set(set), .data_in(data), .data_out(scr));
  par_scrambler u_rx (.clk(clk), .set(set), .data_in(scr),  .data_out(descr));

  // next 16 bits of the serial scrambler (seven-stage shift register, output x6)
  function automatic logic [15:0] ref_word();
    logic [15:0] r;
    for (int p = 0; p < 16; p++) begin
      r[p] = x[6];
      x = {x[5:0], x[6] ^ x[5]};
    end
    return r;
  endfunction

  task automatic check_word();
    logic [15:0] k = ref_word();
    checks++;
    if (scr !== (data ^ k) || descr !== data) begin
      failures++;
      if (failures < 10)
        $display("FAIL at %0t: data=%h scr=%h (exp %h) descr=%h", $time, data, scr, data ^ k, descr);
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
    for (int run = 0; run < 2; run++) begin
      #1 set = 1'b1;
      #3 set = 1'b0;
      x = '1;
      for (int i = 0; i < 300; i++) begin
        data = 16'($urandom);
        #1 check_word();
        #1 clk = ~clk;
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
