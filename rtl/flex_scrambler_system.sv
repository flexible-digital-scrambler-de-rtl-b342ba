// flex_scrambler_system: a complete scrambled link, one flexible scrambler
// device at the sender and one configured as de-scrambler at the receiver.
//
// The sender takes plain bits S (tx_in_*) and produces T1 (tx_out_*). The
// channel between the two devices is outside this module: T1 is brought out
// and the receiver's input T2 (rx_in_*) brought in, so a link, a delay or a
// bit error can be placed between them. The receiver returns R (rx_out_*),
// which equals S when T2 = T1 and both devices hold the same EPROM words and
// see the same seed_load/enp events between the same bits. Each device has
// its own seed, new-message and programming inputs, as two separate chips
// would. Timing is that of flex_scrambler: one bit per clock, one clock of
// latency, ready low one cycle per key period.
module flex_scrambler_system #(
  parameter int unsigned HALF   = scr_pkg::HALF_DEFAULT,
  parameter int unsigned PRSG_W = scr_pkg::PRSG_W_DEFAULT,
  localparam int unsigned LW     = $clog2(HALF + 1),
  localparam int unsigned LENC_W = $clog2(HALF)
) (
  input  logic                clk,
  input  logic                rst_n,
  // sender (scrambler)
  input  logic                tx_seed_load,
  input  logic [PRSG_W-1:0]   tx_seed,
  input  logic                tx_enp,
  input  logic                tx_prog_we,
  input  logic [PRSG_W-1:0]   tx_prog_addr,
  input  logic [2*LENC_W-1:0] tx_prog_data,
  input  logic                tx_in_valid,
  output logic                tx_in_ready,
  input  logic                tx_in_bit,
  output logic                tx_out_valid,
  output logic                tx_out_bit,
  output scr_pkg::phase_e     tx_phase,
  output logic                tx_load_c,
  output logic [LW-1:0]       tx_len1,
  output logic [LW-1:0]       tx_len2,
  output logic [PRSG_W-1:0]   tx_code,
  // receiver (de-scrambler)
  input  logic                rx_seed_load,
  input  logic [PRSG_W-1:0]   rx_seed,
  input  logic                rx_enp,
  input  logic                rx_prog_we,
  input  logic [PRSG_W-1:0]   rx_prog_addr,
  input  logic [2*LENC_W-1:0] rx_prog_data,
  input  logic                rx_in_valid,
  output logic                rx_in_ready,
  input  logic                rx_in_bit,
  output logic                rx_out_valid,
  output logic                rx_out_bit,
  output scr_pkg::phase_e     rx_phase,
  output logic                rx_load_c,
  output logic [LW-1:0]       rx_len1,
  output logic [LW-1:0]       rx_len2,
  output logic [PRSG_W-1:0]   rx_code
);

  flex_scrambler #(.HALF(HALF), .PRSG_W(PRSG_W)) u_tx (
    .clk, .rst_n,
    .descramble(1'b0),
    .seed_load (tx_seed_load), .seed(tx_seed), .enp(tx_enp),
    .prog_we   (tx_prog_we), .prog_addr(tx_prog_addr), .prog_data(tx_prog_data),
    .in_valid  (tx_in_valid), .in_ready(tx_in_ready), .in_bit(tx_in_bit),
    .out_valid (tx_out_valid), .out_bit(tx_out_bit),
    .phase     (tx_phase), .load_c(tx_load_c),
    .len1      (tx_len1), .len2(tx_len2), .code(tx_code)
  );

  flex_scrambler #(.HALF(HALF), .PRSG_W(PRSG_W)) u_rx (
    .clk, .rst_n,
    .descramble(1'b1),
    .seed_load (rx_seed_load), .seed(rx_seed), .enp(rx_enp),
    .prog_we   (rx_prog_we), .prog_addr(rx_prog_addr), .prog_data(rx_prog_data),
    .in_valid  (rx_in_valid), .in_ready(rx_in_ready), .in_bit(rx_in_bit),
    .out_valid (rx_out_valid), .out_bit(rx_out_bit),
    .phase     (rx_phase), .load_c(rx_load_c),
    .len1      (rx_len1), .len2(rx_len2), .code(rx_code)
  );

endmodule
