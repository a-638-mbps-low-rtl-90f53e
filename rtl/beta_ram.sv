// beta_ram: the bit-estimate (beta) memory with the Combine logic.
//
// For every stage s < LOG_N it keeps the bit-estimate vector of the most
// recent left child of length 2**s ('bl[s]'), which the G operation of the
// parent and the later Combine read.  'cur' holds the last vector produced,
// i.e. a right child waiting for a Combine instruction.
//
// Each write cycle takes a vector of stage 'in_stage', either the leaf
// unit's output (src_cur = 0) or 'cur' (src_cur = 1), and optionally
// combines it, as the right child, with its left sibling (Eq. (3)):
//   beta_v[i] = beta_l[i] ^ beta_r[i]  for i <  2**s
//   beta_v[i] = beta_r[i - 2**s]       for 2**s <= i < 2**(s+1)
// with beta_l = 0 for Combine_0R.  The result goes to 'cur' and, when it is a
// left child (res_left), to bl[stage of result].  'res'/'res_stage' show the
// result combinationally so the root vector (the codeword) can be written to
// the codeword memory in the same cycle.  A whole Combine of any length
// takes one cycle (a choice of this design).  No reset: every vector is
// written before it is read.
module beta_ram
  import polar_pkg::*;
#(
  parameter int unsigned LEN   = N,
  parameter int unsigned LANES = PE
) (
  input  logic                       clk,
  // G-side read: left sibling bits for a G chunk
  input  logic [STW-1:0]             g_stage,
  input  logic [LOG_N-LOG_PE-1:0]    g_chunk,
  output logic [LANES-1:0]           g_beta,
  // write / combine
  input  logic                       wr_en,
  input  logic                       src_cur,
  input  logic [LANES-1:0]           in_beta,
  input  logic [STW-1:0]             in_stage,
  input  logic                       do_comb,
  input  logic                       left_zero,
  input  logic                       res_left,
  output logic [LEN-1:0]             res,
  output logic [STW-1:0]             res_stage
);
  logic [LEN/2-1:0] bl [LOG_N];
  logic [LEN-1:0]   cur;
  logic [LEN-1:0]   v, l, msk;

  assign g_beta = LANES'(bl[g_stage] >> (int'(g_chunk) * LANES));

  always_comb begin
    v = src_cur ? cur : LEN'(in_beta);
    l = (left_zero || int'(in_stage) >= LOG_N) ? '0 : LEN'(bl[in_stage]);
    for (int i = 0; i < LEN; i++) msk[i] = (i < (1 << in_stage));
    if (do_comb) begin
      res       = ((l ^ v) & msk) | ((v & msk) << (1 << in_stage));
      res_stage = in_stage + 1'b1;
    end else begin
      res       = v & msk;
      res_stage = in_stage;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      cur <= res;
      if (res_left && int'(res_stage) < LOG_N) bl[res_stage] <= res[LEN/2-1:0];
    end
  end
endmodule
