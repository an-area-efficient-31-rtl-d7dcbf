// bch_chien: parallel Chien search of the (31,16) t=3 BCH decoder.
//
// Evaluates the error locator L(x) = L0 + L1 x + L2 x^2 + L3 x^3 at
// beta_i = alpha^-i for every bit position i = 0..30 at once and sets err[i]
// when the value is zero (alpha^-i is a root, so bit i is in error).
// Each evaluation uses the factorized (nested) form
//   L(beta) = ((L3*beta + L2)*beta + L1)*beta + L0
// in which every multiplier is by the constant beta_i, so each position costs
// three constant multipliers (plain XOR networks) and a zero detector.
//
// Factorizing the locator to save gates follows the published design; the
// nested form and the alpha^-i position convention are this design's reading
// of it. Purely combinational.
module bch_chien
  import bch_gf_pkg::*;
(
  input  lambda_t lambda,  // lambda[i] = L_i
  output word_t   err      // err[i] = 1 when bit i is in error
);

  for (genvar i = 0; i < N; i++) begin : g_pos
    localparam gf_t BETA = gf_alpha_pow((N - i) % N);  // alpha^-i
    gf_t v;
    always_comb begin
      v = gf_mul(lambda[3], BETA) ^ lambda[2];
      v = gf_mul(v, BETA) ^ lambda[1];
      v = gf_mul(v, BETA) ^ lambda[0];
      err[i] = (v == '0);
    end
  end

endmodule
