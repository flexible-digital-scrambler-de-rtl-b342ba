// scrambler_unit: the operational unit, a PLSR plus its modulo-2 adders.
//
// Both configurations compute out = in XOR tap1 XOR tap2, the two taps being
// the PLSR outputs at delays L1 and L1+L2 (or L2 and L1+L2 on the left
// route). They differ only in what is shifted into the PLSR:
//   scrambler (descramble = 0): the output T1 is fed back, giving
//     T1 = S / (1 + F) with F = D^L1 + D^(L1+L2);
//   de-scrambler (descramble = 1): the input T2 is fed forward, giving
//     R = (1 + F) T2, so R = S when T2 = T1 and both units see the same
//     route and lengths for every bit.
// One bit is taken when in_valid is high; the route signals must be valid in
// that cycle. The result is registered: out_valid/out_bit follow one clock
// later. clr empties the PLSR and the output register. The equations and the
// feedback/feed-forward split follow the source; the single mode pin and the
// output register are this design's choice.
module scrambler_unit #(
  parameter int unsigned HALF = scr_pkg::HALF_DEFAULT,
  localparam int unsigned LW  = $clog2(HALF + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            descramble,
  input  logic            in_valid,
  input  logic            in_bit,
  input  scr_pkg::route_t route,
  input  logic [LW-1:0]   len1,
  input  logic [LW-1:0]   len2,
  output logic            out_valid,
  output logic            out_bit
);

  scr_pkg::route_t route_q;  // route gated by the data strobe
  logic tap1, tap2, sum, din;

  assign route_q = in_valid ? route : '0;
  assign sum     = in_bit ^ tap1 ^ tap2;    // the two modulo-2 adders
  assign din     = descramble ? in_bit : sum;

  plsr #(.HALF(HALF)) u_plsr (
    .clk, .rst_n, .clr,
    .din,
    .route(route_q),
    .len1, .len2,
    .tap1, .tap2
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else if (clr) begin
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_bit   <= in_valid ? sum : 1'b0;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (route.shr ^ route.shl))
    else $error("scrambler_unit: bit offered without exactly one route");

endmodule
