// tb_bidir_shift_register: checks the W-bit bidirectional shift register
// against a bit-array model under random shift-right, shift-left, hold and
// clear commands.
module tb_bidir_shift_register;
  localparam int W = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, shr = 0, shl = 0, sin_l = 0, sin_r = 0;
  logic [W-1:0] q;
  int checks = 0, failures = 0;
  bit model [W];
  int n_r = 0, n_l = 0, n_c = 0;

  bidir_shift_register #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) model[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int op;
      op = $urandom_range(0, 9);
      clr   <= (op == 0);
      shr   <= (op >= 1 && op <= 4);
      shl   <= (op >= 5 && op <= 8);
      sin_l <= bit'($urandom_range(0, 1));
      sin_r <= bit'($urandom_range(0, 1));
      @(posedge clk);
      #1;
      if (clr) begin
        for (int i = 0; i < W; i++) model[i] = 0; n_c++;
      end else if (shr) begin
        for (int i = W-1; i > 0; i--) model[i] = model[i-1];
        model[0] = sin_l; n_r++;
      end else if (shl) begin
        for (int i = 0; i < W-1; i++) model[i] = model[i+1];
        model[W-1] = sin_r; n_l++;
      end
      for (int i = 0; i < W; i++) begin
        checks++;
        if (q[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cell %0d at step %0d", i, n);
        end
      end
    end
    checks++; if (n_r == 0 || n_l == 0 || n_c == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
