// bch_peterson: error-locator computation of the (31,16) t=3 BCH decoder
// (the block that takes the place of the Berlekamp-Massey key-equation
// solver).
//
// For at most three errors the Peterson system
//   [ 1   0   0  ] [L1]   [S1]
//   [ S2  S1  1  ] [L2] = [S3]
//   [ S4  S3  S2 ] [L3]   [S5]
// is solved in closed form, with L0 = 1:
//   det = S3 + S1*S2                      (= S1^3 + S3 for a binary code)
//   L1  = S1
//   L2  = (S2*S3 + S5) / det
//   L3  = det + S1*L2
// When det = 0 (no error or a single error) the inverse below yields 0, so
// L2 = L3 = 0 and L(x) = 1 + S1*x, which is the correct single-error locator.
// The division is a multiplication by det^30 (four squarings and three
// multiplications), so no lookup table is needed.
//
// L0 is the constant 1 and L1 is S1 itself; both are kept as outputs so
// that the Chien search receives the whole polynomial.
//
// The closed-form solution follows the published design; the inversion
// circuit is this design's own. Purely combinational.
module bch_peterson
  import bch_gf_pkg::*;
(
  input  gf_t     s1,
  input  gf_t     s2,
  input  gf_t     s3,
  input  gf_t     s5,
  output lambda_t lambda   // lambda[i] = L_i, L0 = 1
);

  gf_t det, num, l2;

  always_comb begin
    det       = s3 ^ gf_mul(s1, s2);
    num       = gf_mul(s2, s3) ^ s5;
    l2        = gf_mul(num, gf_inv(det));
    lambda[0] = gf_t'(1);
    lambda[1] = s1;
    lambda[2] = l2;
    lambda[3] = det ^ gf_mul(s1, l2);
  end

endmodule
