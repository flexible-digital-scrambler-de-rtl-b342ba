// control_unit: generates the route signals and segment lengths for the
// operational unit, one key period after another.
//
// Chain: PRSG -> 1-of-2^PRSG_W decoder -> EPROM word -> (L1, L2).
// Counters A and B hold the bits left in the two parts of the current key
// period. When both are zero, Load C loads A with L1 and B with L2 at the
// next clock edge; no data bit is taken in that cycle (ready low). Then every
// accepted bit (bit_accept) decrements A while it is not zero, on the right
// route (SHR, TRR), and after it B, on the left route (SHL, TRL). A key
// period thus lasts L1 + L2 bits plus one load cycle, and repeats until the
// message ends.
// seed_load (switch-on) loads the PRSG with the user's seed; enp (new
// message) steps it to the next code. Either one clears both counters, so
// the next cycle is a Load C from the new EPROM word, and raises msg_start
// so the operational unit can start from empty registers; ready is low in
// that cycle too. prog_* reprogram EPROM words. HALF must be a power of two.
// The block list, the signal names and the order of events follow the
// source; the one-cycle load, the clearing on a new message and the
// handshake are this design's choices.
module control_unit #(
  parameter int unsigned HALF   = scr_pkg::HALF_DEFAULT,
  parameter int unsigned PRSG_W = scr_pkg::PRSG_W_DEFAULT,
  localparam int unsigned LW     = $clog2(HALF + 1),
  localparam int unsigned LENC_W = $clog2(HALF),
  localparam int unsigned WORDS  = 1 << PRSG_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              seed_load,
  input  logic [PRSG_W-1:0] seed,
  input  logic              enp,
  input  logic              bit_accept,
  input  logic              prog_we,
  input  logic [PRSG_W-1:0] prog_addr,
  input  logic [2*LENC_W-1:0] prog_data,
  output logic              ready,
  output logic              msg_start,
  output logic              load_c,
  output scr_pkg::route_t   route,
  output scr_pkg::phase_e   phase,
  output logic [LW-1:0]     len1,
  output logic [LW-1:0]     len2,
  output logic [PRSG_W-1:0] code
);

  logic [WORDS-1:0]    word_line;
  logic [2*LENC_W-1:0] word;
  logic [LW-1:0]       cnt_a, cnt_b;
  logic                a_zero, b_zero, cdea, cdeb;

  assign msg_start = seed_load || enp;

  prsg #(.W(PRSG_W)) u_prsg (
    .clk, .rst_n,
    .load(seed_load),
    .seed,
    .enp,
    .q   (code)
  );

  decoder_1of128 #(.W(PRSG_W)) u_dec (
    .a(code),
    .y(word_line)
  );

  eprom #(.WORDS(WORDS), .LENC_W(LENC_W)) u_eprom (
    .clk,
    .word_line,
    .data(word),
    .prog_we, .prog_addr, .prog_data
  );

  assign len1 = LW'(word[LENC_W-1:0])        + LW'(1);
  assign len2 = LW'(word[2*LENC_W-1:LENC_W]) + LW'(1);

  load_counter #(.W(LW)) u_cnt_a (
    .clk, .rst_n,
    .clr   (msg_start),
    .ld    (load_c),
    .ld_val(len1),
    .cde   (cdea && bit_accept),
    .q     (cnt_a),
    .zero  (a_zero)
  );

  load_counter #(.W(LW)) u_cnt_b (
    .clk, .rst_n,
    .clr   (msg_start),
    .ld    (load_c),
    .ld_val(len2),
    .cde   (cdeb && bit_accept),
    .q     (cnt_b),
    .zero  (b_zero)
  );

  control_logic u_logic (
    .a_zero, .b_zero,
    .cdea, .cdeb, .load_c,
    .route, .phase
  );

  assign ready = !load_c && !msg_start;

  assert property (@(posedge clk) disable iff (!rst_n) bit_accept |-> ready)
    else $error("control_unit: bit accepted while not ready");

  assert property (@(posedge clk) disable iff (!rst_n) cnt_a <= LW'(HALF) && cnt_b <= LW'(HALF))
    else $error("control_unit: counter beyond the register length");

endmodule
