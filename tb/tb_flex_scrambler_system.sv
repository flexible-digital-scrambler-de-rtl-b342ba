// tb_flex_scrambler_system: end-to-end test of the scrambled link at the
// default sizes (N = 32, 128 EPROM words).
//
// A sender device scrambles random messages; its output goes through a queue
// (the channel) into a receiver device that de-scrambles. Checks:
//   - every receiver output bit equals the plain bit sent (R = S);
//   - every scrambled bit equals an independent bit-level model of the
//     device (PRSG, EPROM formula, key-period route schedule, two registers);
//   - out_valid follows each accepted bit by exactly one clock;
//   - with in_valid held high, a message of B bits takes B cycles plus one
//     load cycle per started key period (plus the message-start cycle);
//   - each message uses the code the PRSG model predicts.
// One message has a single channel bit inverted: the receiver's output must
// first go wrong at that bit, and the next message must be clean again
// (every message starts from emptied registers).
// It also counts the mechanisms the design has (right-route bits, left-route
// bits, Load C reloads, new-message steps, seed loads, EPROM programming,
// input stalls, a scrambled bit differing from the plain bit, a change of
// lengths between messages, a channel error) and fails if one never happened.
module tb_flex_scrambler_system;

  localparam int HALF = 16;
  localparam int PW   = 7;
  localparam int LW   = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // DUT signals
  logic          tx_seed_load = 0, tx_enp = 0, tx_prog_we = 0;
  logic [PW-1:0] tx_seed = '0, tx_prog_addr = '0;
  logic [7:0]    tx_prog_data = '0;
  logic          tx_in_valid = 0, tx_in_bit = 0;
  logic          tx_in_ready, tx_out_valid, tx_out_bit, tx_load_c;
  scr_pkg::phase_e tx_phase;
  logic [LW-1:0] tx_len1, tx_len2;
  logic [PW-1:0] tx_code;
  logic          rx_seed_load = 0, rx_enp = 0, rx_prog_we = 0;
  logic [PW-1:0] rx_seed = '0, rx_prog_addr = '0;
  logic [7:0]    rx_prog_data = '0;
  logic          rx_in_valid, rx_in_bit;
  logic          rx_in_ready, rx_out_valid, rx_out_bit, rx_load_c;
  scr_pkg::phase_e rx_phase;
  logic [LW-1:0] rx_len1, rx_len2;
  logic [PW-1:0] rx_code;

  flex_scrambler_system dut (.*);

  // ---------------- reference model ----------------
  logic [7:0] m_rom [128];
  logic [PW-1:0] m_prsg;
  bit   m_r1 [HALF];
  bit   m_r2 [HALF];
  int   m_pos;      // bit position inside the current key period
  int   m_l1, m_l2;

  function automatic void m_lengths();
    m_l1 = int'(m_rom[m_prsg][3:0]) + 1;
    m_l2 = int'(m_rom[m_prsg][7:4]) + 1;
  endfunction

  function automatic void m_clear();
    for (int i = 0; i < HALF; i++) begin m_r1[i] = 0; m_r2[i] = 0; end
    m_pos = 0;
    m_lengths();
  endfunction

  // one scrambler step of the model; returns T1 for plain bit s
  function automatic bit m_scramble(bit s);
    bit t, a, b;
    if (m_pos == 0) m_lengths();       // Load C reads the current word
    if (m_pos < m_l1) begin            // right route
      a = m_r1[m_l1-1];
      b = m_r2[m_l2-1];
      t = s ^ a ^ b;
      for (int i = HALF-1; i > 0; i--) begin m_r1[i] = m_r1[i-1]; m_r2[i] = m_r2[i-1]; end
      m_r1[0] = t;
      m_r2[0] = a;
    end else begin                     // left route
      a = m_r2[HALF-m_l2];
      b = m_r1[HALF-m_l1];
      t = s ^ a ^ b;
      for (int i = 0; i < HALF-1; i++) begin m_r1[i] = m_r1[i+1]; m_r2[i] = m_r2[i+1]; end
      m_r2[HALF-1] = t;
      m_r1[HALF-1] = a;
    end
    m_pos++;
    if (m_pos == m_l1 + m_l2) m_pos = 0;
    return t;
  endfunction

  // ---------------- channel and scoreboards ----------------
  bit plain_q[$];     // plain bits accepted by the sender, for R = S
  bit model_q[$];     // model T1 per accepted bit
  bit chan_q[$];      // channel between the devices
  int  rx_bits_in = 0;
  logic rx_valid_rand;
  bit  tx_acc_d = 0, rx_acc_d = 0;

  assign rx_in_valid = rx_valid_rand && (chan_q.size() != 0);
  assign rx_in_bit   = (chan_q.size() != 0) ? chan_q[0] : 1'b0;

  // mechanism counters
  int n_right = 0, n_left = 0, n_load = 0, n_enp = 0, n_seed = 0, n_prog = 0;
  int n_stall = 0, n_differ = 0, n_lenchange = 0;

  // channel error injection: one bit of message ERR_MSG is inverted
  localparam int ERR_MSG = 4;
  int cur_msg = 0, tx_out_count = 0, rx_out_count = 0, err_pos = 0;
  int n_err_bits = 0, first_err = -1;

  always @(posedge clk) begin
    if (rst_n) begin
      // latency: out_valid exactly one clock after an accepted bit
      checks++;
      if (tx_out_valid !== tx_acc_d) begin
        failures++; $display("FAIL tx out_valid latency at %0t", $time);
      end
      checks++;
      if (rx_out_valid !== rx_acc_d) begin
        failures++; $display("FAIL rx out_valid latency at %0t", $time);
      end
      if (tx_out_valid) begin
        bit exp;
        exp = model_q.pop_front();
        checks++;
        if (tx_out_bit !== exp) begin
          failures++; $display("FAIL T1 mismatch at %0t: got %0b exp %0b", $time, tx_out_bit, exp);
        end
        chan_q.push_back((cur_msg == ERR_MSG && tx_out_count == err_pos) ? !tx_out_bit : tx_out_bit);
        tx_out_count++;
      end
      if (rx_out_valid) begin
        bit exp;
        exp = plain_q.pop_front();
        if (cur_msg == ERR_MSG) begin
          // a channel error may only spoil bits from the inverted one on
          if (rx_out_bit !== exp) begin
            n_err_bits++;
            if (first_err < 0) first_err = rx_out_count;
          end
        end else begin
          checks++;
          if (rx_out_bit !== exp) begin
            failures++; $display("FAIL R != S at %0t", $time);
          end
        end
        rx_out_count++;
      end
      if (rx_in_valid && rx_in_ready) begin
        void'(chan_q.pop_front());
        rx_bits_in++;
      end
      if (tx_in_valid && tx_in_ready) begin
        if (tx_phase == scr_pkg::PH_A) n_right++;
        if (tx_phase == scr_pkg::PH_B) n_left++;
      end
      if (tx_in_valid && !tx_in_ready) n_stall++;
      if (tx_load_c) n_load++;
      tx_acc_d <= tx_in_valid && tx_in_ready;
      rx_acc_d <= rx_in_valid && rx_in_ready;
      rx_valid_rand <= ($urandom_range(0, 9) < 8);
    end
  end

  // ---------------- stimulus ----------------
  task automatic send_message(int nbits, bit dense, output int cycles);
    int sent = 0;
    cycles = 0;
    while (sent < nbits) begin
      bit s;
      s = bit'($urandom_range(0, 1));
      tx_in_bit   <= s;
      tx_in_valid <= dense ? 1'b1 : ($urandom_range(0, 3) != 0);
      @(posedge clk);
      cycles++;
      if (tx_in_valid && tx_in_ready) begin
        bit t;
        plain_q.push_back(tx_in_bit);
        t = m_scramble(tx_in_bit);
        model_q.push_back(t);
        if (t != tx_in_bit) n_differ++;
        sent++;
      end
    end
    tx_in_valid <= 0;
  endtask

  task automatic new_message(bit first, logic [PW-1:0] seed);
    // wait until the receiver has taken and returned every bit
    while (chan_q.size() != 0 || plain_q.size() != 0 || model_q.size() != 0) @(posedge clk);
    @(posedge clk);
    if (first) begin
      tx_seed_load <= 1; rx_seed_load <= 1; tx_seed <= seed; rx_seed <= seed;
      m_prsg = seed; n_seed++;
    end else begin
      tx_enp <= 1; rx_enp <= 1;
      m_prsg = {m_prsg[5:0], m_prsg[6] ^ m_prsg[5]};
      n_enp++;
    end
    @(posedge clk);
    tx_seed_load <= 0; rx_seed_load <= 0; tx_enp <= 0; rx_enp <= 0;
    m_clear();
    tx_out_count = 0; rx_out_count = 0;
    @(posedge clk);
    checks++;
    if (tx_code !== m_prsg || rx_code !== m_prsg) begin
      failures++; $display("FAIL code: tx %0d rx %0d exp %0d", tx_code, rx_code, m_prsg);
    end
  endtask

  task automatic program_word(logic [PW-1:0] a, logic [7:0] d);
    tx_prog_we <= 1; rx_prog_we <= 1;
    tx_prog_addr <= a; rx_prog_addr <= a; tx_prog_data <= d; rx_prog_data <= d;
    @(posedge clk);
    tx_prog_we <= 0; rx_prog_we <= 0;
    m_rom[a] = d;
    n_prog++;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int cyc, prev_l1, prev_l2, exp_loads;
    for (int a = 0; a < 128; a++) m_rom[a] = 8'(a * 167 + 61);
    rx_valid_rand = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    // the owner's code: reprogram the word the first seed selects
    program_word(7'd93, 8'h3a);
    prev_l1 = -1; prev_l2 = -1;
    for (int msg = 0; msg < 12; msg++) begin
      bit dense;
      int nbits;
      new_message(msg == 0, 7'd93);
      cur_msg = msg;
      dense = (msg % 3 == 0);
      nbits = $urandom_range(60, 500);
      if (msg == ERR_MSG) err_pos = nbits / 2;
      if (m_l1 != prev_l1 || m_l2 != prev_l2) n_lenchange++;
      prev_l1 = m_l1; prev_l2 = m_l2;
      checks++;
      if (int'(tx_len1) != m_l1 || int'(tx_len2) != m_l2) begin
        failures++; $display("FAIL lengths: got %0d/%0d exp %0d/%0d", tx_len1, tx_len2, m_l1, m_l2);
      end
      send_message(nbits, dense, cyc);
      if (dense) begin
        // one load cycle per started key period, the first in the cycle
        // right after the message start
        exp_loads = (nbits + m_l1 + m_l2 - 1) / (m_l1 + m_l2);
        checks++;
        if (cyc != nbits + exp_loads - 1) begin
          failures++;
          $display("FAIL rate: %0d bits took %0d cycles, expected %0d", nbits, cyc, nbits + exp_loads - 1);
        end
      end
    end
    new_message(0, 0);
    cur_msg = -1;
    repeat (5) @(posedge clk);
    $display("channel error: inverted bit %0d, %0d output bits wrong from bit %0d", err_pos, n_err_bits, first_err);
    checks++;
    if (n_err_bits == 0 || first_err != err_pos) begin
      failures++; $display("FAIL channel error not seen where it was injected");
    end
    $display("mechanisms: right=%0d left=%0d loadc=%0d enp=%0d seed=%0d prog=%0d stall=%0d differ=%0d lenchange=%0d",
             n_right, n_left, n_load, n_enp, n_seed, n_prog, n_stall, n_differ, n_lenchange);
    checks++; if (n_right == 0)     begin failures++; $display("FAIL no right-route bits"); end
    checks++; if (n_left == 0)      begin failures++; $display("FAIL no left-route bits"); end
    checks++; if (n_load < 12)      begin failures++; $display("FAIL too few Load C events"); end
    checks++; if (n_enp == 0)       begin failures++; $display("FAIL no new message"); end
    checks++; if (n_seed == 0)      begin failures++; $display("FAIL no seed load"); end
    checks++; if (n_prog == 0)      begin failures++; $display("FAIL no EPROM programming"); end
    checks++; if (n_stall == 0)     begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_differ == 0)    begin failures++; $display("FAIL output never differs from input"); end
    checks++; if (n_lenchange < 2)  begin failures++; $display("FAIL lengths never changed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
