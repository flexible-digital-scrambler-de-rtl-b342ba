// decoder_1of128: one-out-of-2^W decoder (128 outputs for the default W = 7)
// turning the PRSG state into one EPROM word line.
//
// Purely combinational: exactly one bit of y, the one indexed by a, is high.
// The source gives the decoder and its 128 outputs; the structure is plain.
module decoder_1of128 #(
  parameter int unsigned W = scr_pkg::PRSG_W_DEFAULT,
  localparam int unsigned OUTS = 1 << W
) (
  input  logic [W-1:0]    a,
  output logic [OUTS-1:0] y
);

  always_comb begin
    y = '0;
    y[a] = 1'b1;
  end

endmodule
