// fg_unit: the F and G blocks of the processing unit.
//
// LANES parallel elements each take one LLR pair (a[i], b[i]) = (alpha_v[i],
// alpha_v[i + N_v/2]) and produce one child LLR, so the unit consumes
// 2*LANES = P = 256 LLRs per cycle as the decoder's F/G blocks do.
//   is_g = 0 : F,   Eq. (1), min-sum.
//   is_g = 1 : G,   Eq. (2), b + a or b - a depending on beta[i].
//   is_g = 1 and left_zero = 1 : G_0R, beta forced to all-zero (mux m0).
// G results saturate to +/-31.  Purely combinational; the caller stores the
// result in the alpha memory at the end of the cycle.
module fg_unit
  import polar_pkg::*;
#(
  parameter int unsigned LANES = PE
) (
  input  llr_t             a    [LANES],
  input  llr_t             b    [LANES],
  input  logic [LANES-1:0] beta,
  input  logic             is_g,
  input  logic             left_zero,
  output llr_t             y    [LANES]
);
  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      if (is_g) y[i] = g_op(a[i], b[i], beta[i] & ~left_zero);
      else      y[i] = f_op(a[i], b[i]);
    end
  end
endmodule
