// leaf_unit: all leaf-node (constituent code) decoders of the processing
// unit, selected by the instruction's leaf type.
//
// Input is the node's LLR vector (lane i = position i, lengths up to LANES),
// output its bit-estimate vector, lanes at or above the node length zero.
//   R0       all zero
//   R1       hard decisions, lengths 1..LANES
//   REP      rep_node, lengths 2..REP_MAX (32)
//   SPC      spc_node, lengths 2..LANES
//   REPSPC   repspc_node (length 8)
//   REP1     rep1_node (length 8)
//   01       G_0R then hard decisions, repeated in both halves (length 4)
//   0SPC     G_0R then SPC(4), repeated in both halves (length 8)
//   001      G_0R then the 01 decoder, repeated in both halves (length 8)
//   0REPSPC  G_0R then the RepSPC decoder, repeated in both halves (length 16)
// The 001 and 0RepSPC nodes reuse the 01 and RepSPC logic behind a G_0R stage
// with its bit input forced to zero, as the decoder does.  The length limits
// of R1 and SPC (one alpha word) are a choice of this design; longer such
// nodes are split into smaller ones by the program.  Combinational.
module leaf_unit
  import polar_pkg::*;
#(
  parameter int unsigned LANES = PE
) (
  input  llr_t                       alpha [LANES],
  input  leaf_e                      leaf,
  input  logic [$clog2(LANES+1)-1:0] len_log,
  output logic [LANES-1:0]           beta
);
  // ---- repetition
  llr_t                 rep_in [REP_MAX];
  logic                 rep_bit;
  logic [REP_MAX-1:0]   rep_beta;
  always_comb for (int i = 0; i < REP_MAX; i++) rep_in[i] = alpha[i];
  rep_node #(.MAXLEN(REP_MAX)) u_rep (
    .alpha(rep_in), .len_log($clog2(REP_MAX+1)'(len_log)),
    .bit_est(rep_bit), .beta(rep_beta)
  );

  // ---- SPC over the whole word
  logic [LANES-1:0] spc_beta;
  spc_node #(.MAXLEN(LANES)) u_spc (
    .alpha(alpha), .len_log(len_log), .beta(spc_beta)
  );

  // ---- G_0R front ends
  llr_t g16 [8];    // 16 -> 8 (0RepSPC)
  llr_t g8  [4];    // 8 -> 4  (0SPC, 001)
  llr_t g84 [2];    // 4 -> 2 after g8 (001)
  llr_t g4  [2];    // 4 -> 2  (01)
  always_comb begin
    for (int i = 0; i < 8; i++) g16[i] = g_op(alpha[i], alpha[i+8], 1'b0);
    for (int i = 0; i < 4; i++) g8[i]  = g_op(alpha[i], alpha[i+4], 1'b0);
    for (int i = 0; i < 2; i++) g84[i] = g_op(g8[i], g8[i+2], 1'b0);
    for (int i = 0; i < 2; i++) g4[i]  = g_op(alpha[i], alpha[i+2], 1'b0);
  end

  // ---- fixed-length nodes
  llr_t       a8 [8];
  logic [7:0] repspc_beta, zrepspc_r, rep1_beta;
  logic [3:0] zspc_r;
  always_comb for (int i = 0; i < 8; i++) a8[i] = alpha[i];

  repspc_node u_repspc  (.alpha(a8),  .beta(repspc_beta));
  repspc_node u_zrepspc (.alpha(g16), .beta(zrepspc_r));
  rep1_node   u_rep1    (.alpha(a8),  .beta(rep1_beta));
  spc_node #(.MAXLEN(4)) u_zspc (.alpha(g8), .len_log(3'd2), .beta(zspc_r));

  // ---- selection
  always_comb begin
    beta = '0;
    unique case (leaf)
      LF_R0:      beta = '0;
      LF_R1:      for (int i = 0; i < LANES; i++)
                    beta[i] = (i < (1 << len_log)) ? hard(alpha[i]) : 1'b0;
      LF_REP:     beta[REP_MAX-1:0] = rep_beta;
      LF_SPC:     beta = spc_beta;
      LF_REPSPC:  beta[7:0]  = repspc_beta;
      LF_REP1:    beta[7:0]  = rep1_beta;
      LF_01:      beta[3:0]  = {2{hard(g4[1]), hard(g4[0])}};
      LF_0SPC:    beta[7:0]  = {2{zspc_r}};
      LF_001:     beta[7:0]  = {4{hard(g84[1]), hard(g84[0])}};
      LF_0REPSPC: beta[15:0] = {2{zrepspc_r}};
      default:    beta = '0;
    endcase
  end

  logic unused_rep_bit;
  assign unused_rep_bit = rep_bit;
endmodule
