// tb_control_unit: drives the control unit with randomly gapped bit strobes
// and checks, against a schedule model, that each key period is one Load C
// cycle followed by L1 accepted bits on the right route (SHR, TRR) and L2
// on the left route (SHL, TRL), with L1, L2 taken from the word of the EPROM
// selected by the PRSG; that seed_load and enp start a new message (ready
// low, code updated); and that a programmed word changes the lengths.
module tb_control_unit;
  localparam int HALF = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic seed_load = 0, enp = 0, bit_accept = 0, prog_we = 0;
  logic [6:0] seed = 0, prog_addr = 0, code;
  logic [7:0] prog_data = 0;
  logic ready, msg_start, load_c;
  scr_pkg::route_t route;
  scr_pkg::phase_e phase;
  logic [4:0] len1, len2;
  int checks = 0, failures = 0;
  logic [7:0] rom [128];
  logic [6:0] m_code;
  int pos;       // accepted bits in the current key period, -1 = load pending
  int n_a = 0, n_b = 0, n_load = 0, n_gap = 0;

  control_unit #(.HALF(HALF), .PRSG_W(7)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_cycle();
    int l1, l2;
    l1 = int'(rom[m_code][3:0]) + 1;
    l2 = int'(rom[m_code][7:4]) + 1;
    checks += 3;
    if (code !== m_code) begin failures++; $display("FAIL code %0d exp %0d", code, m_code); end
    if (int'(len1) != l1 || int'(len2) != l2) begin failures++; $display("FAIL lengths"); end
    if (pos < 0) begin
      if (!(load_c && !ready && route == '0)) begin failures++; $display("FAIL expected Load C at %0t code %0d", $time, code); end
    end else if (pos < l1) begin
      if (!(ready && !load_c && route == '{1'b1, 1'b1, 1'b0, 1'b0} && phase == scr_pkg::PH_A)) begin
        failures++; $display("FAIL expected right route at pos %0d", pos);
      end
    end else begin
      if (!(ready && !load_c && route == '{1'b0, 1'b0, 1'b1, 1'b1} && phase == scr_pkg::PH_B)) begin
        failures++; $display("FAIL expected left route at pos %0d", pos);
      end
    end
  endtask

  task automatic run_bits(int cycles);
    for (int n = 0; n < cycles; n++) begin
      bit acc;
      check_cycle();
      acc = ready && ($urandom_range(0, 4) != 0);
      bit_accept = acc;
      @(posedge clk);
      if (pos < 0) begin pos = 0; n_load++; end
      else if (acc) begin
        if (pos < int'(rom[m_code][3:0]) + 1) n_a++; else n_b++;
        pos++;
        if (pos == int'(rom[m_code][3:0]) + int'(rom[m_code][7:4]) + 2) pos = -1;
      end else n_gap++;
      @(negedge clk);
    end
  endtask

  initial begin
    for (int a = 0; a < 128; a++) rom[a] = 8'(a * 167 + 61);
    repeat (2) @(negedge clk);
    rst_n = 1;
    m_code = 0; pos = -1;
    pos = -1;
    run_bits(50);
    // switch-on: load the user's seed
    bit_accept = 0;
    seed = 7'd42; seed_load = 1;
    #1; checks++; if (ready || !msg_start) begin failures++; $display("FAIL ready during seed load"); end
    @(negedge clk); seed_load = 0;
    m_code = 7'd42; pos = -1;
    run_bits(300);
    for (int m = 0; m < 6; m++) begin
      if (m == 2) begin
        // reprogram the word the next code selects to the longest lengths
        logic [6:0] nxt;
        nxt = {m_code[5:0], m_code[6] ^ m_code[5]};
        bit_accept = 0;
        prog_we = 1; prog_addr = nxt; prog_data = 8'hff;
        @(posedge clk); rom[nxt] = 8'hff;
        if (pos < 0) begin pos = 0; n_load++; end
        @(negedge clk); prog_we = 0;
      end
      bit_accept = 0;
      enp = 1;
      #1; checks++; if (ready || !msg_start) begin failures++; $display("FAIL ready during enp"); end
      @(negedge clk); enp = 0;
      m_code = {m_code[5:0], m_code[6] ^ m_code[5]}; pos = -1;
      run_bits(200);
    end
    checks++; if (n_a == 0 || n_b == 0 || n_load < 10 || n_gap == 0) failures++;
    $display("right=%0d left=%0d loads=%0d", n_a, n_b, n_load);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
