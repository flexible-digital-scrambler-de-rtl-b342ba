// tb_flex_scrambler: one device used in both modes.
//
// The device is seeded, scrambles three messages (stepping the PRSG with enp
// between them) and its output is recorded; the input is offered every
// cycle so the stall count can be checked: each message of B bits takes
// B + ceil(B / (L1 + L2)) - 1 cycles after its start cycle. The device is
// then switched to de-scramble mode, seeded again the same way, fed the
// recorded streams and must return the original messages. The scrambled
// messages must differ from each other's keystreams (the same plain message
// is sent twice under different codes and must scramble differently).
module tb_flex_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic descramble = 0, seed_load = 0, enp = 0, prog_we = 0;
  logic [6:0] seed = 0, prog_addr = 0, code;
  logic [7:0] prog_data = 0;
  logic in_valid = 0, in_ready, in_bit = 0, out_valid, out_bit, load_c;
  scr_pkg::phase_e phase;
  logic [4:0] len1, len2;
  int checks = 0, failures = 0;

  flex_scrambler dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit msgs [3][$];
  bit outs [3][$];
  int cycles_taken, expect_loads;

  always @(posedge clk) if (rst_n && out_valid) outs_push(out_bit);
  int cur = 0;
  function automatic void outs_push(bit b);
    outs[cur].push_back(b);
  endfunction

  task automatic start(bit first);
    @(negedge clk);
    if (first) begin seed = 7'd77; seed_load = 1; end else enp = 1;
    @(negedge clk);
    seed_load = 0; enp = 0;
  endtask

  task automatic send(int m);
    int k = 0;
    cycles_taken = 0;
    expect_loads = (msgs[m].size() + int'(len1) + int'(len2) - 1) / (int'(len1) + int'(len2));
    while (k < msgs[m].size()) begin
      in_valid = 1; in_bit = msgs[m][k];
      @(posedge clk);
      cycles_taken++;
      if (in_ready) k++;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (cycles_taken != msgs[m].size() + expect_loads) begin
      failures++; $display("FAIL rate: %0d cycles for %0d bits", cycles_taken, msgs[m].size());
    end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      int nb;
      nb = (m == 2) ? msgs[0].size() : $urandom_range(100, 300);
      for (int i = 0; i < nb; i++) msgs[m].push_back(m == 2 ? msgs[0][i] : bit'($urandom_range(0, 1)));
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      start(m == 0);
      cur = m;
      send(m);
    end
    // same plain text, different codes -> different scrambled text
    checks++;
    if (outs[0] == outs[2]) begin failures++; $display("FAIL same output under a new code"); end
    // de-scramble with the same device
    descramble = 1;
    for (int m = 0; m < 3; m++) begin
      bit rec[$];
      rec = outs[m];
      outs[m].delete();
      msgs_swap(m, rec);
      start(m == 0);
      cur = m;
      send(m);
      checks++;
      if (outs[m].size() != rec.size()) begin failures++; $display("FAIL length"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // keep the plain message for comparison while feeding the scrambled one
  bit plain [3][$];
  function automatic void msgs_swap(int m, bit rec[$]);
    plain[m] = msgs[m];
    msgs[m] = rec;
  endfunction


  // compare de-scrambled output with the plain text as it arrives
  int ocount [3] = '{0, 0, 0};
  always @(posedge clk) begin
    if (rst_n && out_valid && descramble) begin
      checks++;
      if (out_bit !== plain[cur][ocount[cur]]) begin
        failures++; $display("FAIL R != S message %0d bit %0d", cur, ocount[cur]);
      end
      ocount[cur]++;
    end
  end
endmodule
