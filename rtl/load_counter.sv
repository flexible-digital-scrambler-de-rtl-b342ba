// load_counter: W-bit down counter with load enable (counter A or B).
//
// clr empties it (start of a message), ld copies ld_val, and cde (count down
// enable) decrements it while it is not zero; priority clr > ld > cde. zero
// is high while the count is zero. Changes at the clock edge; reset clears.
// The source names counters with load enables that count down to zero; the
// clear input is this design's addition for message starts.
module load_counter #(
  parameter int unsigned W = $clog2(scr_pkg::HALF_DEFAULT + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         ld,
  input  logic [W-1:0] ld_val,
  input  logic         cde,
  output logic [W-1:0] q,
  output logic         zero
);

  assign zero = (q == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              q <= '0;
    else if (clr)            q <= '0;
    else if (ld)             q <= ld_val;
    else if (cde && !zero)   q <= q - W'(1);
  end

endmodule
