// spc_node: maximum-likelihood decoder of a single-parity-check code.
//
// Hard decisions are taken on the first 2**len_log LLRs; if their parity is
// odd, the decision of the least reliable input (smallest magnitude, lowest
// index on a tie, a choice of this design) is flipped.  Lanes at or above the
// node length are ignored and output 0.  Combinational.
module spc_node
  import polar_pkg::*;
#(
  parameter int unsigned MAXLEN = PE
) (
  input  llr_t                        alpha [MAXLEN],
  input  logic [$clog2(MAXLEN+1)-1:0] len_log,
  output logic [MAXLEN-1:0]           beta
);
  logic [MAXLEN-1:0]          h;
  logic                       parity;
  logic [QI-1:0]              min_mag;
  logic [$clog2(MAXLEN)-1:0]  min_idx;

  always_comb begin
    h       = '0;
    parity  = 1'b0;
    min_mag = '1;
    min_idx = '0;
    for (int i = 0; i < MAXLEN; i++) begin
      if (i < (1 << len_log)) begin
        h[i]   = hard(alpha[i]);
        parity = parity ^ h[i];
        if (mag(alpha[i]) < min_mag) begin
          min_mag = mag(alpha[i]);
          min_idx = i[$clog2(MAXLEN)-1:0];
        end
      end
    end
    beta = h;
    if (parity) beta[min_idx] = ~beta[min_idx];
  end
endmodule
