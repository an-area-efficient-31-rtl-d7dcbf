// tb_bch_chien: checks the Chien search on locators with known roots
// (L(x) = prod (1 + alpha^p x) for 0..3 random positions p, expecting exactly
// those bits flagged) and on random locators, whose flags are compared with a
// direct evaluation of L(alpha^-i) for every position i.
module tb_bch_chien;
  import bch_gf_pkg::*;
  import tb_bch_ref_pkg::*;

  lambda_t lambda;
  word_t   err;
  int      checks = 0, failures = 0;
  logic    clk = 0;

  bch_chien dut (.lambda(lambda), .err(err));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      word_t e;
      logic [4:0] l[4];
      logic [4:0] nl[4];
      e = r_errpat(n % 4);
      l = '{5'd1, 5'd0, 5'd0, 5'd0};
      for (int p = 0; p < 31; p++) if (e[p]) begin
        nl[0] = l[0];
        for (int k = 1; k < 4; k++) nl[k] = l[k] ^ r_mul(l[k-1], r_exp(p));
        l = nl;
      end
      for (int k = 0; k < 4; k++) lambda[k] = l[k];
      #1;
      checks++;
      if (err !== e) begin
        failures++;
        $display("FAIL known roots: err=%h expected %h", err, e);
      end
    end
    for (int n = 0; n < 300; n++) begin
      word_t ex;
      for (int k = 0; k < 4; k++) lambda[k] = 5'($urandom());
      for (int i = 0; i < 31; i++) begin
        logic [4:0] v;
        v = lambda[0];
        for (int k = 1; k < 4; k++) v ^= r_mul(lambda[k], r_exp(-i * k));
        ex[i] = (v == 5'd0);
      end
      #1;
      checks++;
      if (err !== ex) begin
        failures++;
        $display("FAIL random locator: err=%h expected %h", err, ex);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
