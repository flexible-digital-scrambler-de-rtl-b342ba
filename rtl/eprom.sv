// eprom: the code store of the control unit, WORDS words of 2*LENC_W bits.
//
// Each word holds the two segment lengths of one code: bits [LENC_W-1:0]
// are L1-1 and bits [2*LENC_W-1:LENC_W] are L2-1, so every word is a legal
// pair of lengths from 1 to 2^LENC_W. The word is selected by one-hot word
// lines from the 1-of-WORDS decoder and read combinationally (an AND-OR over
// the words, as the word lines of a real EPROM would). The owner programs
// words through a synchronous write port (prog_we, prog_addr, prog_data),
// standing in for the device programmer. The array starts with
// scr_pkg::default_word(a) in word a. The source gives only the EPROM and its
// role; the word layout, the programming port and the default contents are
// this design's choices.
module eprom #(
  parameter int unsigned WORDS  = 128,
  parameter int unsigned LENC_W = $clog2(scr_pkg::HALF_DEFAULT),
  localparam int unsigned DW    = 2 * LENC_W,
  localparam int unsigned AW    = $clog2(WORDS)
) (
  input  logic             clk,
  input  logic [WORDS-1:0] word_line,
  output logic [DW-1:0]    data,
  input  logic             prog_we,
  input  logic [AW-1:0]    prog_addr,
  input  logic [DW-1:0]    prog_data
);

  logic [DW-1:0] mem [WORDS];

  initial begin
    for (int unsigned a = 0; a < WORDS; a++)
      mem[a] = DW'(scr_pkg::default_word(a));
  end

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_data;
  end

  always_comb begin
    data = '0;
    for (int unsigned a = 0; a < WORDS; a++)
      data |= mem[a] & {DW{word_line[a]}};
  end

endmodule
