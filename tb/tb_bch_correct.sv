// tb_bch_correct: checks that the correction stage flips exactly the bits
// flagged in the error pattern, bit by bit.
module tb_bch_correct;
  import bch_gf_pkg::*;

  word_t data, err, origdata;
  int    checks = 0, failures = 0;
  logic  clk = 0;

  bch_correct dut (.data(data), .err(err), .origdata(origdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      data = 31'($urandom());
      err  = (n < 31) ? (31'(1) << n) : 31'($urandom());
      #1;
      for (int i = 0; i < 31; i++) begin
        checks++;
        if (origdata[i] !== (err[i] ? ~data[i] : data[i])) begin
          failures++;
          $display("FAIL data=%h err=%h bit %0d", data, err, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
