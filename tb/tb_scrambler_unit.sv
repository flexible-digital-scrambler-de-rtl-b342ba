// tb_scrambler_unit: checks the operational unit.
//
// Part 1: a scrambler unit on a fixed route and fixed lengths must follow
//   the defining recurrence, T1[n] = S[n] ^ T1[n-a] ^ T1[n-L1-L2] with
//   a = L1 on the right route and a = L2 on the left route (bits before the
//   start count as 0), for every pair of lengths.
// Part 2: a scrambler unit and a de-scrambler unit given the same random
//   route and length for every bit, and the scrambler's output as the
//   de-scrambler's input, must return the original bits (R = S), while the
//   scrambled stream differs from the plain one.
// Both parts check that out_valid follows in_valid by one clock.
module tb_scrambler_unit;
  localparam int HALF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic clr = 0, in_valid = 0, in_bit = 0;
  scr_pkg::route_t route = '0;
  logic [4:0] len1 = 1, len2 = 1;
  logic s_out_valid, s_out_bit, d_out_valid, d_out_bit;
  int checks = 0, failures = 0, n_differ = 0;

  scrambler_unit #(.HALF(HALF)) u_scr (
    .clk, .rst_n, .clr, .descramble(1'b0), .in_valid, .in_bit, .route, .len1, .len2,
    .out_valid(s_out_valid), .out_bit(s_out_bit));

  // the de-scrambler sees the scrambler's output one clock later with the
  // route and lengths of that bit
  scr_pkg::route_t route_d;
  logic [4:0] len1_d, len2_d;
  logic in_bit_d;
  always_ff @(posedge clk) begin
    route_d <= route; len1_d <= len1; len2_d <= len2; in_bit_d <= in_bit;
  end
  scrambler_unit #(.HALF(HALF)) u_dscr (
    .clk, .rst_n, .clr, .descramble(1'b1), .in_valid(s_out_valid), .in_bit(s_out_bit),
    .route(route_d), .len1(len1_d), .len2(len2_d),
    .out_valid(d_out_valid), .out_bit(d_out_bit));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit t_hist[$];   // scrambled history, index = bit number

  task automatic fixed_route(bit left, int l1, int l2);
    @(negedge clk); clr = 1; in_valid = 0; @(negedge clk); clr = 0;
    t_hist.delete();
    len1 = 5'(l1); len2 = 5'(l2);
    route = left ? '{1'b0, 1'b0, 1'b1, 1'b1} : '{1'b1, 1'b1, 1'b0, 1'b0};
    for (int n = 0; n < 3 * HALF; n++) begin
      bit s, e;
      int a;
      s = bit'($urandom_range(0, 1));
      a = left ? l2 : l1;
      e = s ^ ((n - a >= 0) ? t_hist[n - a] : 1'b0) ^ ((n - l1 - l2 >= 0) ? t_hist[n - l1 - l2] : 1'b0);
      t_hist.push_back(e);
      in_bit = s; in_valid = 1;
      @(negedge clk);
      checks += 2;
      if (!s_out_valid) begin failures++; $display("FAIL latency"); end
      if (s_out_bit !== e) begin failures++; $display("FAIL recurrence left=%0b L1=%0d L2=%0d n=%0d", left, l1, l2, n); end
    end
    in_valid = 0;
  endtask

  initial begin
    bit plain_q[$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l1 = 1; l1 <= HALF; l1++)
      for (int l2 = 1; l2 <= HALF; l2 += 3) begin
        fixed_route(0, l1, l2);
        fixed_route(1, l1, l2);
      end
    // part 2: random schedule, scrambler -> de-scrambler
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    for (int n = 0; n < 5000; n++) begin
      bit v, s;
      v = ($urandom_range(0, 4) != 0);
      s = bit'($urandom_range(0, 1));
      in_valid = v; in_bit = s;
      route = $urandom_range(0, 1) ? '{1'b0, 1'b0, 1'b1, 1'b1} : '{1'b1, 1'b1, 1'b0, 1'b0};
      if ($urandom_range(0, 20) == 0) begin
        len1 = 5'($urandom_range(1, HALF)); len2 = 5'($urandom_range(1, HALF));
      end
      if (v) plain_q.push_back(s);
      @(negedge clk);
      checks++;
      if (s_out_valid !== v) begin failures++; $display("FAIL scrambler valid"); end
      if (s_out_valid && s_out_bit != s) n_differ++;
      if (d_out_valid) begin
        checks++;
        if (d_out_bit !== plain_q.pop_front()) begin failures++; $display("FAIL R != S at bit step %0d", n); end
      end
    end
    checks++; if (n_differ < 100) begin failures++; $display("FAIL scrambled stream too close to plain"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
