// prsg: loadable pseudo-random sequence generator of the control unit.
//
// A W-bit Fibonacci linear feedback shift register. load copies seed into
// the state (the user's code, given at switch-on); enp (enable PRSG, one
// pulse per new message) advances it by one step; load wins over enp. The
// state is cleared by reset. For W = 7 the feedback polynomial is
// x^7 + x^6 + 1, which visits all 127 non-zero states; an all-zero state
// stays zero. Other widths use the taps of the TAPS parameter. State changes
// at the clock edge and drives q directly. The source asks for a loadable
// PRSG that is cleared at start; the LFSR and its polynomial are this
// design's choice.
module prsg #(
  parameter int unsigned   W    = scr_pkg::PRSG_W_DEFAULT,
  parameter logic [W-1:0]  TAPS = W'(7'b110_0000)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         enp,
  output logic [W-1:0] q
);

  logic fb;
  assign fb = ^(q & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (load)  q <= seed;
    else if (enp)   q <= {q[W-2:0], fb};
  end

endmodule
