// repspc_node: decoder of the length-8 RepSPC constituent code (frozen
// pattern 0001 0111): a length-4 repetition code on the left and a length-4
// single-parity-check code on the right.
//
// In one combinational pass it performs F -> Rep(4) -> G -> SPC(4) ->
// Combine, i.e. beta = {beta_r, beta_l ^ beta_r} with beta_l the repeated
// bit.  Bit i of 'beta' is the estimate of codeword position i.
module repspc_node
  import polar_pkg::*;
(
  input  llr_t       alpha [8],
  output logic [7:0] beta
);
  llr_t       al [4];
  llr_t       ar [4];
  logic [3:0] rep_beta, spc_beta;
  logic       rep_bit;

  always_comb
    for (int i = 0; i < 4; i++) al[i] = f_op(alpha[i], alpha[i+4]);

  rep_node #(.MAXLEN(4)) u_rep (
    .alpha(al), .len_log(3'd2), .bit_est(rep_bit), .beta(rep_beta)
  );

  always_comb
    for (int i = 0; i < 4; i++) ar[i] = g_op(alpha[i], alpha[i+4], rep_bit);

  spc_node #(.MAXLEN(4)) u_spc (
    .alpha(ar), .len_log(3'd2), .beta(spc_beta)
  );

  assign beta = {spc_beta, rep_beta ^ spc_beta};
endmodule
