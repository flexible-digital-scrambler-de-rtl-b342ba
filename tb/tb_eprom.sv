// tb_eprom: reads every word through a one-hot word line and compares it
// with (a * 167 + 61) mod 256, then programs random words and reads them
// back, checking that other words are unchanged and that no word line
// selected reads zero.
module tb_eprom;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [127:0] word_line = '0;
  logic [7:0] data, prog_data = 0;
  logic prog_we = 0;
  logic [6:0] prog_addr = 0;
  logic [7:0] ref_mem [128];
  int checks = 0, failures = 0;

  eprom #(.WORDS(128), .LENC_W(4)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all();
    for (int a = 0; a < 128; a++) begin
      word_line = '0; word_line[a] = 1'b1;
      #1;
      checks++;
      if (data !== ref_mem[a]) begin failures++; $display("FAIL word %0d: %h vs %h", a, data, ref_mem[a]); end
    end
    word_line = '0; #1;
    checks++; if (data !== 8'h00) failures++;
  endtask

  initial begin
    for (int a = 0; a < 128; a++) ref_mem[a] = 8'((a * 167 + 61) % 256);
    @(posedge clk);
    read_all();
    for (int n = 0; n < 40; n++) begin
      logic [6:0] ad; logic [7:0] d;
      ad = 7'($urandom_range(0, 127)); d = 8'($urandom_range(0, 255));
      @(negedge clk);
      prog_we = 1; prog_addr = ad; prog_data = d;
      @(negedge clk);
      prog_we = 0;
      ref_mem[ad] = d;
    end
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
