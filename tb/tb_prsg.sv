// tb_prsg: checks the loadable PRSG: cleared by reset, load copies the
// seed, enp steps by x^7 + x^6 + 1 (checked against a model written from the
// recurrence s[n] = s[n-7] XOR s[n-6]), load wins over enp, and from a
// non-zero seed the sequence returns to the seed after exactly 127 steps.
module tb_prsg;
  logic clk = 0, rst_n = 1;
  always #5 clk = ~clk;
  logic load = 0, enp = 0;
  logic [6:0] seed = 0, q;
  int checks = 0, failures = 0;
  bit s[$];   // the generated bit sequence, oldest first

  prsg #(.W(7)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [6:0] window();
    logic [6:0] w;
    for (int i = 0; i < 7; i++) w[i] = s[s.size() - 1 - i];
    return w;
  endfunction

  initial begin
    #1 rst_n = 0;   // a reset edge clears the state
    #1;
    checks++; if (q !== 7'd0) begin failures++; $display("FAIL reset"); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      logic [6:0] sd;
      sd = 7'($urandom_range(1, 127));
      seed <= sd; load <= 1; enp <= (trial % 2 == 1);
      @(posedge clk); load <= 0; enp <= 0;
      #1;
      checks++; if (q !== sd) begin failures++; $display("FAIL load"); end
      s.delete();
      for (int i = 6; i >= 0; i--) s.push_back(sd[i]);
      for (int n = 1; n <= 127; n++) begin
        enp <= 1; @(posedge clk); enp <= 0; #1;
        s.push_back(s[s.size()-7] ^ s[s.size()-6]);
        checks++;
        if (q !== window()) begin failures++; $display("FAIL step %0d", n); end
        if (n < 127) begin
          checks++; if (q === sd) begin failures++; $display("FAIL early repeat at %0d", n); end
        end
        if ($urandom_range(0, 3) == 0) begin
          @(posedge clk); #1;
          checks++; if (q !== window()) begin failures++; $display("FAIL hold"); end
        end
      end
      checks++; if (q !== sd) begin failures++; $display("FAIL period"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
