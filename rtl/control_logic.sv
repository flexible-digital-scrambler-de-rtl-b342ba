// control_logic: the combinational circuit of the control unit.
//
// From the two counters' zero flags it derives:
//   CDEA (count down enable A) while counter A is not zero, with SHR and TRR
//     (right route: the first part of each key period enters R1);
//   CDEB while A is zero and B is not, with SHL and TRL (left route: the
//     second part enters R2);
//   Load C when both are zero, which reloads both counters from the EPROM.
// No state of its own. The signal set follows the source; deriving all of it
// from the two zero flags is this design's choice.
module control_logic (
  input  logic            a_zero,
  input  logic            b_zero,
  output logic            cdea,
  output logic            cdeb,
  output logic            load_c,
  output scr_pkg::route_t route,
  output scr_pkg::phase_e phase
);

  always_comb begin
    cdea   = !a_zero;
    cdeb   = a_zero && !b_zero;
    load_c = a_zero && b_zero;
    route.shr = cdea;
    route.trr = cdea;
    route.shl = cdeb;
    route.trl = cdeb;
    phase  = cdea ? scr_pkg::PH_A : (cdeb ? scr_pkg::PH_B : scr_pkg::PH_LOAD);
  end

endmodule
