// tb_bch_decoder: end-to-end test of the (31,16) BCH decoder at its default
// (and only) configuration. Random 16-bit messages are encoded as
// c(x) = m(x) * g(x), 0..3 random bits are flipped, and the words are
// streamed into the decoder with random idle gaps and back-to-back runs.
// Every output word must equal the transmitted codeword and arrive exactly
// two cycles after its input. A reset in mid-stream must drop words in
// flight. The test counts each case the decoder distinguishes (no error,
// a single error, which takes the singular-matrix path of the locator, two
// and three errors, back-to-back words, idle gaps, reset) and fails if any
// never occurred.
module tb_bch_decoder;
  import bch_gf_pkg::*;
  import tb_bch_ref_pkg::*;

  localparam int LATENCY = 2;
  localparam int WORDS   = 4000;

  logic  clk = 0, rst_n = 0, in_valid = 0, out_valid;
  word_t data = '0, origdata;
  int    checks = 0, failures = 0;
  int    cycle = 0;

  // counts of each mechanism exercised
  int n_w[4] = '{0, 0, 0, 0};
  int n_b2b = 0, n_gap = 0, n_reset = 0, n_out = 0, n_exh = 0;

  word_t exp_q[$];
  int    due_q[$];

  bch_decoder dut (
    .clk, .rst_n, .in_valid, .data, .out_valid, .origdata
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker, half a cycle after each edge
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %h at cycle %0d", origdata, cycle);
      end else begin
        word_t e;
        int due;
        e   = exp_q.pop_front();
        due = due_q.pop_front();
        if (origdata !== e || cycle != due) begin
          failures++;
          $display("FAIL cycle %0d: got %h expected %h (due cycle %0d)",
                   cycle, origdata, e, due);
        end
      end
    end
  end

  initial begin
    logic prev_valid;
    prev_valid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < WORDS; n++) begin
      @(negedge clk);
      if (n == WORDS / 2) begin
        // let earlier words drain, then reset with one word in flight:
        // it must not come out
        in_valid = 0;
        repeat (LATENCY + 1) @(negedge clk);
        in_valid = 1;
        data     = r_encode(16'h1234);
        @(negedge clk);
        rst_n    = 0;
        in_valid = 0;
        @(negedge clk);
        rst_n = 1;
        n_reset++;
        @(negedge clk);
        prev_valid = 0;
      end
      if ($urandom_range(3, 0) == 0) begin
        in_valid = 0;
        data     = 31'($urandom());
        n_gap++;
        prev_valid = 0;
      end else begin
        word_t c;
        int w;
        w = int'($urandom_range(3, 0));
        c = r_encode(16'($urandom()));
        in_valid = 1;
        data     = c ^ r_errpat(w);
        n_w[w]++;
        if (prev_valid) n_b2b++;
        prev_valid = 1;
        exp_q.push_back(c);
        // captured at edge cycle+1, result registered at edge cycle+LATENCY
        due_q.push_back(cycle + LATENCY);
      end
    end
    // exhaustive pass: every error pattern of weight 1, 2 and 3, back to back
    for (int a = 0; a < 31; a++)
      for (int b = a; b < 31; b++)
        for (int d = b; d < 31; d++) begin
          word_t c, e;
          if (b == a && d != a) continue;  // a = b < d repeats a weight-2 case
          e = '0;
          e[a] = 1'b1; e[b] = 1'b1; e[d] = 1'b1;
          @(negedge clk);
          c = r_encode(16'($urandom()));
          in_valid = 1;
          data     = c ^ e;
          n_w[$countones(e)]++;
          n_exh++;
          exp_q.push_back(c);
          due_q.push_back(cycle + LATENCY);
        end
    @(negedge clk);
    in_valid = 0;
    repeat (LATENCY + 3) @(negedge clk);
    checks++;
    if (n_exh != 31 + 465 + 4495) begin
      failures++;
      $display("FAIL exhaustive pass covered %0d patterns", n_exh);
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never came out", exp_q.size());
    end
    $display("mechanisms: no_error=%0d single=%0d double=%0d triple=%0d back_to_back=%0d idle=%0d reset=%0d exhaustive=%0d outputs=%0d",
             n_w[0], n_w[1], n_w[2], n_w[3], n_b2b, n_gap, n_reset, n_exh, n_out);
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (n_w[w] == 0) failures++;
    end
    checks += 3;
    if (n_b2b == 0) failures++;
    if (n_gap == 0) failures++;
    if (n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
