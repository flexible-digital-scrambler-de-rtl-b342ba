// scr_pkg: types and constants shared by the flexible scrambler/de-scrambler.
//
// The operational unit is a programmable length shift register (PLSR) of at
// most N bits, made of two N/2-bit bidirectional shift registers R1 and R2.
// The control unit drives it with four route signals (shift right, transfer
// right, shift left, transfer left) and with the two segment lengths L1 and L2
// read from an EPROM word. The default sizes are this design's own choice
// except for the 128-word EPROM / 1-of-128 decoder, which follows the source.
package scr_pkg;

  // Maximum total delay N of the PLSR (even). Each of R1, R2 holds N/2 bits.
  localparam int unsigned N_DEFAULT    = 32;
  localparam int unsigned HALF_DEFAULT = N_DEFAULT / 2;

  // PRSG width: a 1-out-of-128 decoder needs a 7-bit generator.
  localparam int unsigned PRSG_W_DEFAULT = 7;

  // Route control generated by the combinational circuit of the control unit.
  typedef struct packed {
    logic shr;  // shift right: serial data enters R1 at its left end
    logic trr;  // transfer right: R1 cell L1 feeds the left end of R2
    logic shl;  // shift left: serial data enters R2 at its right end
    logic trl;  // transfer left: R2 cell N/2-L2 feeds the right end of R1
  } route_t;

  // Which half of the key period the unit is in.
  typedef enum logic [1:0] {
    PH_LOAD  = 2'd0,  // counters A and B both zero: Load C
    PH_A     = 2'd1,  // counter A counting down: right route
    PH_B     = 2'd2   // counter B counting down: left route
  } phase_e;

  // Default EPROM contents: word a = (a * 167 + 61) mod 2^WORD_W. The low
  // half of the word is L1-1, the high half L2-1. Any formula would do; the
  // device owner is expected to program its own words.
  function automatic logic [31:0] default_word(input int unsigned addr);
    return 32'(addr * 167 + 61);
  endfunction

endpackage
