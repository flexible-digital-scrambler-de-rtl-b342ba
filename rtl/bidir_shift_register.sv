// bidir_shift_register: W-bit bidirectional shift register, one of the two
// halves (R1 or R2) of the programmable length shift register.
//
// On shr the contents move one cell towards higher indices ("right") and
// sin_l enters cell 0; on shl they move towards lower indices ("left") and
// sin_r enters cell W-1. With neither the register holds. Every cell is
// visible on q so the PLSR can pick its transfer and tap points. clr
// empties the register synchronously (start of a message); rst_n is an
// asynchronous active-low reset. shr and shl must not be asserted together.
// The source names the bidirectional register; the cell details and the
// clear are this design's own.
module bidir_shift_register #(
  parameter int unsigned W = scr_pkg::HALF_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         shr,
  input  logic         shl,
  input  logic         sin_l,
  input  logic         sin_r,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= '0;
    else if (clr)    q <= '0;
    else if (shr)    q <= {q[W-2:0], sin_l};
    else if (shl)    q <= {sin_r, q[W-1:1]};
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(shr && shl))
    else $error("bidir_shift_register: shr and shl asserted together");

endmodule
