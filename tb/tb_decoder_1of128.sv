// tb_decoder_1of128: every one of the 128 input codes must raise exactly
// the output line of the same number.
module tb_decoder_1of128;
  logic [6:0] a;
  logic [127:0] y;
  int checks = 0, failures = 0;
  decoder_1of128 #(.W(7)) dut (.*);
  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 128; i++) begin
      a = 7'(i);
      #1;
      for (int j = 0; j < 128; j++) begin
        checks++;
        if (y[j] !== (i == j)) begin failures++; $display("FAIL a=%0d line %0d", i, j); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
