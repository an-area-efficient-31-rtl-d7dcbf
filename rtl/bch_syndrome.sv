// bch_syndrome: syndrome calculator of the (31,16) t=3 BCH decoder.
//
// Computes the 2t = 6 syndromes S_j = r(alpha^j), j = 1..6, of a 31-bit
// received word r (bit i is the coefficient of x^i). To save area only the t
// odd syndromes are formed from the word, and the even ones follow from the
// binary-code identity S_2j = S_j^2 (S2 = S1^2, S4 = S2^2, S6 = S3^2).
// Each odd syndrome is found in two steps: the word is reduced modulo the
// minimal polynomial m_j(x) of alpha^j (a 5-bit remainder b_j, a fixed XOR
// network), and b_j is evaluated at alpha^j. For j = 1 the remainder already is
// S1, because m1 is the field polynomial itself.
//
// Deriving 2t syndromes from t computed ones follows the published design;
// the remainder method used for the odd ones is this design's own reading of
// it. Purely combinational: syn is valid in the same cycle as data.
module bch_syndrome
  import bch_gf_pkg::*;
(
  input  word_t data,   // received word
  output syn_t  syn     // syn[j] = S_j, j = 1..6
);

  // r(x) mod m(x) for a degree-M modulus, by long division
  function automatic gf_t poly_rem(word_t r, logic [M:0] m);
    logic [N-1:0] w;
    w = r;
    for (int i = N - 1; i >= int'(M); i--)
      if (w[i]) w[i -: M+1] = w[i -: M+1] ^ m;
    return w[M-1:0];
  endfunction

  // b(beta) for a 5-bit polynomial b and beta = alpha^e
  function automatic gf_t eval_at(gf_t b, int unsigned e);
    gf_t acc;
    acc = '0;
    for (int unsigned k = 0; k < M; k++)
      if (b[k]) acc = acc ^ gf_alpha_pow(e * k);
    return acc;
  endfunction

  gf_t b1, b3, b5;
  gf_t s1, s3, s5;

  always_comb begin
    b1 = poly_rem(data, MIN1);
    b3 = poly_rem(data, MIN3);
    b5 = poly_rem(data, MIN5);
    s1 = b1;
    s3 = eval_at(b3, 3);
    s5 = eval_at(b5, 5);
    syn[1] = s1;
    syn[2] = gf_sq(s1);
    syn[3] = s3;
    syn[4] = gf_sq(gf_sq(s1));
    syn[5] = s5;
    syn[6] = gf_sq(s3);
  end

endmodule
