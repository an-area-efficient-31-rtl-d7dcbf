// bch_gf_pkg: code constants, types and GF(2^5) arithmetic shared by the
// (31,16) triple-error-correcting binary BCH decoder.
//
// The code has length N = 2^M - 1 = 31, K = 16 data bits and corrects T = 3
// errors; these numbers are those of the published design. Field elements are
// 5-bit vectors in polynomial basis over the primitive polynomial
// p(x) = x^5 + x^2 + 1 (alpha is a root of p). The choice of p(x) is this
// design's own: it is the usual primitive polynomial for GF(32), and with it
// the minimal polynomials of alpha, alpha^3 and alpha^5 are
//   m1(x) = x^5 + x^2 + 1
//   m3(x) = x^5 + x^4 + x^3 + x^2 + 1
//   m5(x) = x^5 + x^4 + x^2 + x + 1
// and the generator polynomial g(x) = m1*m3*m5 has degree 15 (hex 8FAF).
//
// All functions are pure combinational logic: multiplication is a shift and
// reduce loop, squaring reuses it, and the inverse is a^30 = a^-1 (so 0 maps
// to 0, which the error locator relies on).
package bch_gf_pkg;

  localparam int unsigned M = 5;           // field degree
  localparam int unsigned N = 31;          // code length
  localparam int unsigned K = 16;          // data bits
  localparam int unsigned T = 3;           // correctable errors

  localparam logic [M:0] PRIM = 6'b100101; // x^5 + x^2 + 1
  localparam logic [M:0] MIN1 = 6'b100101; // minimal polynomial of alpha
  localparam logic [M:0] MIN3 = 6'b111101; // minimal polynomial of alpha^3
  localparam logic [M:0] MIN5 = 6'b110111; // minimal polynomial of alpha^5

  typedef logic [M-1:0]  gf_t;             // one field element
  typedef logic [N-1:0]  word_t;           // one received / corrected word
  typedef gf_t [2*T:1]   syn_t;            // syndromes S1..S6
  typedef gf_t [T:0]     lambda_t;         // locator coefficients L0..L3

  // a * b in GF(2^5)
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [M-1:0] acc;
    logic [M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc = acc ^ sh;
      // multiply sh by alpha: shift and reduce by p(x)
      sh = sh[M-1] ? ((sh << 1) ^ PRIM[M-1:0]) : (sh << 1);
    end
    return acc;
  endfunction

  function automatic gf_t gf_sq(gf_t a);
    return gf_mul(a, a);
  endfunction

  // a^-1 = a^30 = a^2 * a^4 * a^8 * a^16; gives 0 for a = 0
  function automatic gf_t gf_inv(gf_t a);
    gf_t a2, a4, a8, a16;
    a2  = gf_sq(a);
    a4  = gf_sq(a2);
    a8  = gf_sq(a4);
    a16 = gf_sq(a8);
    return gf_mul(gf_mul(a2, a4), gf_mul(a8, a16));
  endfunction

  // alpha^e for any e >= 0 (constant-folded when e is constant)
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t v;
    v = gf_t'(1);
    for (int unsigned i = 0; i < (e % N); i++)
      v = v[M-1] ? ((v << 1) ^ PRIM[M-1:0]) : (v << 1);
    return v;
  endfunction

endpackage
