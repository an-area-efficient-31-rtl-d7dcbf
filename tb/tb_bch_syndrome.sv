// tb_bch_syndrome: checks the six syndromes of bch_syndrome against their
// definition S_j = r(alpha^j), on codewords (all syndromes must be zero),
// codewords with 1..3 errors and fully random words.
module tb_bch_syndrome;
  import bch_gf_pkg::*;
  import tb_bch_ref_pkg::*;

  word_t data;
  syn_t  syn;
  int    checks = 0, failures = 0;
  logic  clk = 0;

  bch_syndrome dut (.data(data), .syn(syn));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_word(word_t w);
    data = w;
    #1;
    for (int j = 1; j <= 6; j++) begin
      checks++;
      if (syn[j] !== r_syn(w, j)) begin
        failures++;
        $display("FAIL word=%h S%0d=%h expected %h", w, j, syn[j], r_syn(w, j));
      end
    end
  endtask

  initial begin
    int zero_ok;
    zero_ok = 0;
    for (int n = 0; n < 400; n++) begin
      word_t c;
      c = r_encode(16'($urandom()));
      data = c;
      #1;
      checks++;
      if (syn !== '0) begin
        failures++;
        $display("FAIL codeword %h has nonzero syndromes", c);
      end
      check_word(c ^ r_errpat(n % 4));
    end
    for (int n = 0; n < 400; n++) check_word(31'($urandom()));
    for (int i = 0; i < 31; i++) check_word(31'(1) << i);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
