// tb_bch_peterson: feeds bch_peterson the syndromes of random error patterns
// of weight 0..3 and compares L(x) with the locator built directly from the
// error positions, L(x) = prod (1 + alpha^p x), which Peterson's solution
// must reproduce exactly (L0 = 1).
module tb_bch_peterson;
  import bch_gf_pkg::*;
  import tb_bch_ref_pkg::*;

  gf_t     s1, s2, s3, s5;
  lambda_t lambda;
  int      checks = 0, failures = 0;
  int      seen[4] = '{0, 0, 0, 0};
  logic    clk = 0;

  bch_peterson dut (.s1(s1), .s2(s2), .s3(s3), .s5(s5), .lambda(lambda));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      word_t e;
      logic [4:0] exp_l[4];
      logic [4:0] nl[4];
      int w;
      w = n % 4;
      e = r_errpat(w);
      exp_l = '{5'd1, 5'd0, 5'd0, 5'd0};
      for (int p = 0; p < 31; p++) if (e[p]) begin
        // multiply by (1 + alpha^p x)
        nl[0] = exp_l[0];
        for (int k = 1; k < 4; k++) nl[k] = exp_l[k] ^ r_mul(exp_l[k-1], r_exp(p));
        exp_l = nl;
      end
      s1 = r_syn(e, 1); s2 = r_syn(e, 2); s3 = r_syn(e, 3); s5 = r_syn(e, 5);
      #1;
      seen[w]++;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (lambda[k] !== exp_l[k]) begin
          failures++;
          $display("FAIL e=%h L%0d=%h expected %h", e, k, lambda[k], exp_l[k]);
        end
      end
    end
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (seen[w] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
