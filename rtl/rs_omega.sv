// rs_omega: error evaluator polynomial Omega(x) = Lambda(x) S(x) mod x^32.
//
// Only the coefficients below RS_T are kept, because Omega has degree below
// the number of errors (at most 16). Coefficient omega_n is the XOR of all
// products S_i * lambda_j with i + j = n, each product a general GF(2^8)
// multiplier (an AND/XOR network), as the document describes. Purely
// combinational.
module rs_omega (
  input  lrpt_pkg::gf_t syn    [lrpt_pkg::RS_2T],
  input  lrpt_pkg::gf_t lambda [lrpt_pkg::RS_T+1],
  output lrpt_pkg::gf_t omega  [lrpt_pkg::RS_T]
);
  import lrpt_pkg::*;
  always_comb begin
    for (int n = 0; n < RS_T; n++) begin
      omega[n] = 8'h00;
      for (int j = 0; j <= n; j++)
        omega[n] ^= gf_mul(syn[n - j], lambda[j]);
    end
  end
endmodule
