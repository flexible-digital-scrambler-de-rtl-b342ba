// flex_scrambler: one flexible scrambler device, a control unit driving an
// operational unit (PLSR plus modulo-2 adders).
//
// The same device scrambles (descramble = 0) or de-scrambles
// (descramble = 1). Data moves one bit per clock through a valid/ready
// handshake: a bit is taken when in_valid and in_ready are both high, and
// its result appears on out_bit with out_valid one clock later. in_ready
// drops for one cycle at every key-period reload (Load C) and in the cycle
// of seed_load or enp. Two devices that start from the same seed and EPROM
// contents, see the same seed_load/enp events between the same bits and
// process the same stream stay in step, so the de-scrambler returns the
// scrambler's input exactly. status exposes the phase and the current code
// for observation. The composition follows the source's system diagram; the
// handshake and status port are this design's own.
module flex_scrambler #(
  parameter int unsigned HALF   = scr_pkg::HALF_DEFAULT,
  parameter int unsigned PRSG_W = scr_pkg::PRSG_W_DEFAULT,
  localparam int unsigned LW     = $clog2(HALF + 1),
  localparam int unsigned LENC_W = $clog2(HALF)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                descramble,
  // user code and message control
  input  logic                seed_load,
  input  logic [PRSG_W-1:0]   seed,
  input  logic                enp,
  // EPROM programming
  input  logic                prog_we,
  input  logic [PRSG_W-1:0]   prog_addr,
  input  logic [2*LENC_W-1:0] prog_data,
  // serial data
  input  logic                in_valid,
  output logic                in_ready,
  input  logic                in_bit,
  output logic                out_valid,
  output logic                out_bit,
  // observation
  output scr_pkg::phase_e     phase,
  output logic                load_c,
  output logic [LW-1:0]       len1,
  output logic [LW-1:0]       len2,
  output logic [PRSG_W-1:0]   code
);

  scr_pkg::route_t route;
  logic            msg_start, accept;

  assign accept = in_valid && in_ready;

  control_unit #(.HALF(HALF), .PRSG_W(PRSG_W)) u_ctrl (
    .clk, .rst_n,
    .seed_load, .seed, .enp,
    .bit_accept(accept),
    .prog_we, .prog_addr, .prog_data,
    .ready     (in_ready),
    .msg_start,
    .load_c,
    .route,
    .phase,
    .len1, .len2,
    .code
  );

  scrambler_unit #(.HALF(HALF)) u_op (
    .clk, .rst_n,
    .clr      (msg_start),
    .descramble,
    .in_valid (accept),
    .in_bit,
    .route,
    .len1, .len2,
    .out_valid,
    .out_bit
  );

endmodule
