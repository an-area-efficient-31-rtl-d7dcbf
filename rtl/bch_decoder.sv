// bch_decoder: (31,16) binary BCH decoder correcting up to three errors.
//
// A 31-bit received word enters on 'data' with in_valid and is captured in the
// buffer register. From the buffered word four combinational stages produce
// the corrected word:
//   bch_syndrome  - S1..S6 (odd ones computed, even ones by squaring)
//   bch_peterson  - error locator L(x) by Peterson's closed form for t = 3
//   bch_chien     - parallel Chien search, one flag per bit position
//   bch_correct   - XOR of the error pattern into the buffered word
// The result is registered and appears on 'origdata' with out_valid two
// clock edges after the word was presented; a new word may be presented in
// every cycle. Bit i of a word is the coefficient of x^i. The locator needs
// only S1, S2, S3 and S5; S4 and S6 from the syndrome block stay unused.
//
// Words with up to three bit errors are restored to the transmitted codeword.
// With more errors the output is not meaningful and no failure flag is given.
//
// The four-stage structure and the 31-bit data/origdata interface follow the
// published design; the clock, reset, valid flags and the register at the
// output are this design's own. rst_n is an active-low synchronous reset.
module bch_decoder
  import bch_gf_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t data,
  output logic  out_valid,
  output word_t origdata
);

  word_t   buf_q;       // buffer register holding the received word
  logic    buf_vld;
  syn_t    syn;
  lambda_t lambda;
  word_t   err;
  word_t   corrected;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      buf_q     <= '0;
      buf_vld   <= 1'b0;
      origdata  <= '0;
      out_valid <= 1'b0;
    end else begin
      buf_vld   <= in_valid;
      if (in_valid) buf_q <= data;
      out_valid <= buf_vld;
      if (buf_vld) origdata <= corrected;
    end
  end

  // the check bits of the code are exactly the degree of g(x) = m1*m3*m5
  if (N - K != T * M) begin : g_bad_code
    $error("bch_decoder: N - K must equal T * M");
  end

  bch_syndrome u_syndrome (
    .data (buf_q),
    .syn  (syn)
  );

  bch_peterson u_peterson (
    .s1     (syn[1]),
    .s2     (syn[2]),
    .s3     (syn[3]),
    .s5     (syn[5]),
    .lambda (lambda)
  );

  bch_chien u_chien (
    .lambda (lambda),
    .err    (err)
  );

  bch_correct u_correct (
    .data     (buf_q),
    .err      (err),
    .origdata (corrected)
  );

endmodule
