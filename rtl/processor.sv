// processor: the processing unit that executes one instruction per cycle.
//
// It holds the F/G unit and the leaf unit, generates the read and write
// addresses of the channel and alpha memories from the instruction's stage
// and the chunk counter, and selects the operands:
//   * F / G on a node of stage s > LOG_PE reads two words, chunk c and
//     chunk c + 2**(s-1-LOG_PE) (the node's two halves), from the channel
//     memory when s = LOG_N or else from the alpha memory, and writes word c
//     of stage s-1; a 1024-LLR node therefore takes 4 cycles, 512 takes 2.
//   * F / G on a node of stage s <= LOG_PE reads one word and pairs lane i
//     with lane i + 2**(s-1) (one cycle).
//   * G takes the left sibling's bits from the beta memory; G_0R forces them
//     to zero.
//   * A leaf reads the node's word and hands its bit-estimate vector to the
//     beta memory, which does the Combine.
//   * A leaf with 'from_g' set is a right child fed directly by the G (or
//     G_0R) of its parent, stage s+1 <= LOG_PE+1, in the same cycle; with the
//     Combine in the beta memory this is the G -> leaf -> Combine path of the
//     decoder (R1, RSPC, 0SPC nodes of any length up to PE, and the 001 and
//     0RepSPC nodes).
// Channel LLRs are sign-extended from QC to QI bits.  Purely combinational:
// every result is written into a memory at the end of the cycle.
module processor
  import polar_pkg::*;
#(
  parameter int unsigned LANES = PE
) (
  input  op_e                               op,
  input  logic [STW-1:0]                    stage,
  input  leaf_e                             leaf,
  input  logic                              left_zero,
  input  logic                              from_g,
  input  logic [LOG_N-LOG_PE-1:0]           chunk,
  // channel memory
  output logic [$clog2(CH_WORDS)-1:0]       ch_addr_a,
  output logic [$clog2(CH_WORDS)-1:0]       ch_addr_b,
  input  ch_llr_t                           ch_data_a [LANES],
  input  ch_llr_t                           ch_data_b [LANES],
  // alpha memory
  output logic [$clog2(ALPHA_WORDS)-1:0]    al_addr_a,
  output logic [$clog2(ALPHA_WORDS)-1:0]    al_addr_b,
  input  llr_t                              al_data_a [LANES],
  input  llr_t                              al_data_b [LANES],
  output logic [$clog2(ALPHA_WORDS)-1:0]    al_wr_addr,
  output llr_t                              al_wr_data [LANES],
  // beta memory
  output logic [STW-1:0]                    g_stage,
  input  logic [LANES-1:0]                  g_beta,
  output logic [LANES-1:0]                  leaf_beta
);
  localparam int unsigned LLW = $clog2(LANES + 1);

  llr_t wa [LANES];
  llr_t wb [LANES];
  llr_t fa [LANES];
  llr_t fb [LANES];
  llr_t fy [LANES];
  llr_t la [LANES];
  int unsigned s, half_words, half_lanes;
  logic        fused, is_g;

  // a fused leaf addresses its parent's LLRs like a G on stage+1
  assign fused      = (op == OP_LEAF) && from_g;
  assign is_g       = (op == OP_G) || fused;
  assign s          = fused ? int'(stage) + 1 : int'(stage);
  assign half_words = (s > LOG_PE) ? (1 << (s - 1 - LOG_PE)) : 0;
  assign half_lanes = (s >= 1) ? (1 << (s - 1)) : 0;

  // address generation
  always_comb begin

    ch_addr_a  = $bits(ch_addr_a)'(int'(chunk));
    ch_addr_b  = $bits(ch_addr_b)'(int'(chunk) + half_words);
    if (op == OP_LEAF && !fused) begin
      al_addr_a = $bits(al_addr_a)'(alpha_addr(s, 0));
      al_addr_b = al_addr_a;
    end else if (s > LOG_PE) begin
      al_addr_a = $bits(al_addr_a)'(alpha_addr(s, int'(chunk)));
      al_addr_b = $bits(al_addr_b)'(alpha_addr(s, int'(chunk) + half_words));
    end else begin
      al_addr_a = $bits(al_addr_a)'(alpha_addr(s, 0));
      al_addr_b = al_addr_a;
    end
    al_wr_addr = $bits(al_wr_addr)'(alpha_addr((s >= 1) ? s - 1 : 0, int'(chunk)));
    g_stage    = (s >= 1) ? STW'(s - 1) : '0;
  end

  // operand selection
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      if (s == LOG_N) begin
        wa[i] = llr_t'(ch_data_a[i]);
        wb[i] = llr_t'(ch_data_b[i]);
      end else begin
        wa[i] = al_data_a[i];
        wb[i] = al_data_b[i];
      end
    end
    // F/G operand pairing
    for (int i = 0; i < LANES; i++) begin
      fa[i] = wa[i];
      if (s > LOG_PE)                  fb[i] = wb[i];
      else if (i + half_lanes < LANES) fb[i] = wa[i + half_lanes];
      else                             fb[i] = '0;
    end
  end

  fg_unit #(.LANES(LANES)) u_fg (
    .a(fa), .b(fb), .beta(g_beta), .is_g(is_g), .left_zero(left_zero),
    .y(fy)
  );

  assign al_wr_data = fy;
  assign la         = fused ? fy : wa;

  leaf_unit #(.LANES(LANES)) u_leaf (
    .alpha(la), .leaf(leaf),
    .len_log((int'(stage) <= LOG_PE) ? LLW'(stage) : LLW'(0)),
    .beta(leaf_beta)
  );
endmodule
