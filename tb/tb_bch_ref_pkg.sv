// tb_bch_ref_pkg: reference model of GF(2^5) and of the (31,16) BCH code for
// the testbenches. It is written independently of the RTL: multiplication goes
// through log/antilog of alpha (field polynomial x^5 + x^2 + 1), syndromes are
// computed straight from their definition S_j = sum over set bits i of
// alpha^(i*j), and codewords are built as m(x) * g(x) with the generator
// polynomial g(x) = m1*m3*m5 = x^15+x^11+x^10+x^9+x^8+x^7+x^5+x^3+x^2+x+1.
package tb_bch_ref_pkg;

  localparam logic [15:0] GEN = 16'h8FAF;

  function automatic logic [4:0] r_exp(int e);
    logic [5:0] v;
    v = 6'd1;
    for (int i = 0; i < ((e % 31) + 31) % 31; i++) begin
      v = v << 1;
      if (v[5]) v = v ^ 6'h25;
    end
    return v[4:0];
  endfunction

  function automatic int r_log(logic [4:0] a);
    for (int i = 0; i < 31; i++) if (r_exp(i) == a) return i;
    return -1;
  endfunction

  function automatic logic [4:0] r_mul(logic [4:0] a, logic [4:0] b);
    if (a == 0 || b == 0) return 5'd0;
    return r_exp(r_log(a) + r_log(b));
  endfunction

  function automatic logic [4:0] r_syn(logic [30:0] r, int j);
    logic [4:0] s;
    s = '0;
    for (int i = 0; i < 31; i++) if (r[i]) s ^= r_exp(i * j);
    return s;
  endfunction

  // codeword m(x) * g(x) for a 16-bit message
  function automatic logic [30:0] r_encode(logic [15:0] msg);
    logic [30:0] c;
    c = '0;
    for (int i = 0; i < 16; i++) if (msg[i]) c ^= 31'(GEN) << i;
    return c;
  endfunction

  // random error pattern of exactly w distinct bits
  function automatic logic [30:0] r_errpat(int w);
    logic [30:0] e;
    int p;
    e = '0;
    while ($countones(e) < w) begin
      p = int'($urandom_range(30, 0));
      e[p] = 1'b1;
    end
    return e;
  endfunction

endpackage
