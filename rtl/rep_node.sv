// rep_node: maximum-likelihood decoder of a repetition code.
//
// A repetition code of length 2**len_log carries one information bit; its ML
// decision is the sign of the sum of the input LLRs (threshold detection).
// Lanes at or above the node length are ignored.  The output 'bit_est' is
// the information bit and 'beta' the whole bit-estimate vector (the bit
// replicated over the node length, zeros above it).  Combinational; the sum
// is kept at full width, so it never saturates.  A sum of exactly zero
// decides 0 (a choice of this design).
module rep_node
  import polar_pkg::*;
#(
  parameter int unsigned MAXLEN = REP_MAX
) (
  input  llr_t                        alpha [MAXLEN],
  input  logic [$clog2(MAXLEN+1)-1:0] len_log,
  output logic                        bit_est,
  output logic [MAXLEN-1:0]           beta
);
  localparam int unsigned SW = QI + $clog2(MAXLEN) + 1;
  logic signed [SW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int i = 0; i < MAXLEN; i++)
      if (i < (1 << len_log)) sum += SW'(alpha[i]);
    bit_est = sum[SW-1];
    for (int i = 0; i < MAXLEN; i++)
      beta[i] = (i < (1 << len_log)) ? bit_est : 1'b0;
  end
endmodule
