// alpha_ram: the alpha memory holding the LLRs of the nodes on the current
// path of the decoder tree.
//
// One region per tree stage s < LOG_N: 2**(s-LOG_PE) words for stages above
// LOG_PE (512- and 256-LLR nodes), one word for each smaller stage (a node
// of up to PE LLRs sits in the low lanes of its word).  A word is PE = 128
// LLRs, the output width of the F/G unit, so each F/G cycle writes exactly
// one word.  Two read ports (a node's two halves) and one write port.  Reads
// are combinational, writes take effect at the clock edge; there is no reset
// since every word is written before it is read.  The word layout and the
// asynchronous read are choices of this design.
module alpha_ram
  import polar_pkg::*;
#(
  parameter int unsigned WORDS = ALPHA_WORDS,
  parameter int unsigned LANES = PE
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] rd_addr_a,
  input  logic [$clog2(WORDS)-1:0] rd_addr_b,
  output llr_t                     rd_data_a [LANES],
  output llr_t                     rd_data_b [LANES],
  input  logic                     wr_en,
  input  logic [$clog2(WORDS)-1:0] wr_addr,
  input  llr_t                     wr_data   [LANES]
);
  llr_t mem [WORDS][LANES];

  always_ff @(posedge clk)
    if (wr_en) mem[wr_addr] <= wr_data;

  assign rd_data_a = mem[rd_addr_a];
  assign rd_data_b = mem[rd_addr_b];
endmodule
