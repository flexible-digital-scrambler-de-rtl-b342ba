// tb_load_counter: random clear, load and count-down commands against an
// integer model; the counter must stop at zero and flag it.
module tb_load_counter;
  localparam int W = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, ld = 0, cde = 0, zero;
  logic [W-1:0] ld_val = 0, q;
  int checks = 0, failures = 0, model = 0, n_sat = 0;

  load_counter #(.W(W)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int op;
      op = $urandom_range(0, 19);
      clr <= (op == 0 || op == 1);
      ld  <= (op == 1 || op == 2 || op == 3);
      cde <= (op >= 4);
      ld_val <= W'($urandom_range(0, 31));
      @(posedge clk); #1;
      if (clr) model = 0;
      else if (ld) model = int'(ld_val);
      else if (cde) begin
        if (model > 0) model--; else n_sat++;
      end
      checks += 2;
      if (int'(q) != model) begin failures++; $display("FAIL q=%0d model=%0d", q, model); end
      if (zero !== (model == 0)) failures++;
    end
    checks++; if (n_sat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
