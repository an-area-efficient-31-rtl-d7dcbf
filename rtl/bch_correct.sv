// bch_correct: error correction stage of the (31,16) t=3 BCH decoder.
//
// Adds the error pattern found by the Chien search to the received word,
// c(x) = r(x) + e(x) over GF(2), i.e. flips every bit flagged in err.
// The stage is named in the published design; the XOR is the plain way to
// perform it. Purely combinational.
module bch_correct
  import bch_gf_pkg::*;
(
  input  word_t data,      // received word
  input  word_t err,       // error pattern
  output word_t origdata   // corrected word
);

  always_comb origdata = data ^ err;

endmodule
