// rep1_node: decoder of the length-8 Rep1 constituent code (frozen pattern
// 0001 1111): a length-4 repetition code on the left, a rate-1 code on the
// right, decoded in a single cycle.
//
// Rather than waiting for the repetition decision, two G blocks compute the
// right-hand LLRs for both possible decisions (beta = 0 and beta = 1) while
// the F block and the Rep block run; Sign blocks give hard decisions and the
// Rep output selects between them.  The upper half of the result is the
// selected hard-decision vector; the lower half is the same vector, inverted
// when the Rep output is 1.  Combinational: only the final 8-bit estimate is
// stored by the caller.
module rep1_node
  import polar_pkg::*;
(
  input  llr_t       alpha [8],
  output logic [7:0] beta
);
  llr_t       al [4];
  logic [3:0] h0, h1, hsel, rep_beta;
  logic       rep_bit;

  always_comb
    for (int i = 0; i < 4; i++) begin
      al[i] = f_op(alpha[i], alpha[i+4]);
      h0[i] = hard(g_op(alpha[i], alpha[i+4], 1'b0));  // G assuming beta = 0
      h1[i] = hard(g_op(alpha[i], alpha[i+4], 1'b1));  // G assuming beta = 1
    end

  rep_node #(.MAXLEN(4)) u_rep (
    .alpha(al), .len_log(3'd2), .bit_est(rep_bit), .beta(rep_beta)
  );

  logic unused_rep_beta;
  assign unused_rep_beta = ^rep_beta;

  assign hsel = rep_bit ? h1 : h0;
  assign beta = {hsel, rep_bit ? ~hsel : hsel};
endmodule
