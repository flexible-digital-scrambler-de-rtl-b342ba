// plsr: programmable length shift register of up to N = 2*HALF bits, built
// from two HALF-bit bidirectional shift registers R1 and R2.
//
// The data bit din moves through the two registers along one of two routes:
//   right route (shr): din enters R1 at cell 0 and moves right. With trr the
//     bit leaving R1 is taken from cell len1-1 and handed to cell 0 of R2,
//     which moves right as well; without trr it is taken from R1's last cell.
//   left route (shl): din enters R2 at cell HALF-1 and moves left. With trl
//     the bit leaving R2 is taken from cell HALF-len2 and handed to cell
//     HALF-1 of R1, which moves left; without trl R2's cell 0 is used.
// tap1 is the bit leaving the first register of the route and tap2 the bit
// at depth len of the second one, so on the right route (with trr) tap1 is
// din delayed by L1 and tap2 din delayed by L1+L2; on the left route (with
// trl) they are delays L2 and L1+L2. Lengths run from 1 to HALF. The taps
// are combinational from the register contents; a shift takes effect at the
// clock edge. When neither shr nor shl is set the taps show the right route.
// The two-register bidirectional organisation and the four route signals
// follow the source; the exact tap and transfer points are this design's
// reading of it.
module plsr #(
  parameter int unsigned HALF = scr_pkg::HALF_DEFAULT,
  localparam int unsigned LW  = $clog2(HALF + 1),
  localparam int unsigned IW  = $clog2(HALF)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          din,
  input  scr_pkg::route_t route,
  input  logic [LW-1:0] len1,
  input  logic [LW-1:0] len2,
  output logic          tap1,
  output logic          tap2
);

  logic [HALF-1:0] r1_q, r2_q;
  logic            r1_out_right, r2_out_left;
  logic            r1_sin_r, r2_sin_l;
  logic [IW-1:0]   r1_right_idx, r2_right_idx, r1_left_idx, r2_left_idx;

  // Cell indices of the transfer and tap points (lengths run 1..HALF).
  assign r1_right_idx = IW'(len1 - LW'(1));
  assign r2_right_idx = IW'(len2 - LW'(1));
  assign r1_left_idx  = IW'(LW'(HALF) - len1);
  assign r2_left_idx  = IW'(LW'(HALF) - len2);

  // Transfer points: the cell from which a bit leaves the first register.
  always_comb begin
    r1_out_right = route.trr ? r1_q[r1_right_idx] : r1_q[HALF-1];
    r2_out_left  = route.trl ? r2_q[r2_left_idx]   : r2_q[0];
  end

  assign r2_sin_l = r1_out_right;
  assign r1_sin_r = r2_out_left;

  bidir_shift_register #(.W(HALF)) u_r1 (
    .clk, .rst_n, .clr,
    .shr  (route.shr),
    .shl  (route.shl),
    .sin_l(din),
    .sin_r(r1_sin_r),
    .q    (r1_q)
  );

  bidir_shift_register #(.W(HALF)) u_r2 (
    .clk, .rst_n, .clr,
    .shr  (route.shr),
    .shl  (route.shl),
    .sin_l(r2_sin_l),
    .sin_r(din),
    .q    (r2_q)
  );

  always_comb begin
    if (route.shl) begin
      tap1 = r2_out_left;
      tap2 = r1_q[r1_left_idx];
    end else begin
      tap1 = r1_out_right;
      tap2 = r2_q[r2_right_idx];
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   (route.shr || route.shl) |-> (len1 != '0 && len1 <= LW'(HALF) && len2 != '0 && len2 <= LW'(HALF)))
    else $error("plsr: segment length out of range");

endmodule
