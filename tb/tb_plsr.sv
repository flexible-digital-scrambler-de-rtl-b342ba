// tb_plsr: checks the programmable length shift register.
//
// 1) For every pair of lengths on the right route (SHR+TRR) and on the left
//    route (SHL+TRL), after filling, tap1 must equal the input delayed by the
//    first segment's length and tap2 the input delayed by L1+L2.
// 2) Without transfer, the right route is the full N-bit register: tap1 is
//    the input delayed by N/2 bits.
module tb_plsr;
  localparam int HALF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, din = 0, tap1, tap2;
  scr_pkg::route_t route = '0;
  logic [4:0] len1 = 1, len2 = 1;
  int checks = 0, failures = 0;
  bit hist[$];   // input history, newest first

  plsr #(.HALF(HALF)) dut (.*);

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(bit left, bit transfer, int l1, int l2, int d1, int d2);
    clr <= 1; @(posedge clk); clr <= 0;
    hist.delete();
    len1 <= 5'(l1); len2 <= 5'(l2);
    route <= left ? '{shr:0, trr:0, shl:1, trl:transfer} : '{shr:1, trr:transfer, shl:0, trl:0};
    for (int n = 0; n < 2*HALF + 8; n++) begin
      bit b;
      b = bit'($urandom_range(0, 1));
      din <= b;
      #1;
      if (hist.size() >= d2) begin
        checks += 2;
        if (tap1 !== hist[d1-1]) begin
          failures++; $display("FAIL tap1 left=%0b l1=%0d l2=%0d", left, l1, l2);
        end
        if (tap2 !== hist[d2-1]) begin
          failures++; $display("FAIL tap2 left=%0b l1=%0d l2=%0d", left, l1, l2);
        end
      end
      @(posedge clk);
      hist.push_front(b);
    end
    route <= '0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int l1 = 1; l1 <= HALF; l1++)
      for (int l2 = 1; l2 <= HALF; l2++) begin
        run(0, 1, l1, l2, l1, l1 + l2);
        run(1, 1, l1, l2, l2, l1 + l2);
      end
    // no transfer: whole first register in the path
    run(0, 0, 3, 5, HALF, HALF + 5);
    run(1, 0, 3, 5, HALF, HALF + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
