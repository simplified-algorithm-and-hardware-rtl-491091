// tb_golay_error_search: words with four errors and random reliabilities.
// E_P comes from the brute-force reference decoder. The chosen pattern must
// turn the word into a codeword and score as high as the best of E_P and the
// 253 alternatives (found by the reference), done must come 24 clocks after
// start, words must be accepted every 12 clocks, and with search_en low the
// result must be E_P.
module tb_golay_error_search;
  import golay_tb_pkg::*;
  localparam int XW = 8, WORDS = 300;
  logic clk = 0, rst_n = 0, start = 0, search_en = 0, done, out_searched;
  logic [23:0] ep = '0, best_e, tag_in = '0, out_tag;
  logic signed [XW+4:0] p [24];
  logic signed [XW+4:0] best_p;
  int checks = 0, failures = 0;
  int n_soft = 0, n_kept = 0, n_off = 0;

  golay_error_search dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WORDS * 12 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [23:0] r, ep;
    int          pv [24];
    int          best;
    bit          en;
    int          t0;
  } word_t;
  word_t sent [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Result checker.
  initial begin
    int got;
    got = 0;
    forever begin
      @(posedge clk);
      #1;
      if (done) begin
        word_t w;
        w = sent.pop_front();
        checks++;
        if (cyc - w.t0 != 24) begin failures++; $display("latency %0d", cyc - w.t0); end
        checks++;
        if (out_tag != w.r || out_searched != w.en) begin failures++; $display("tag mismatch"); end
        checks++;
        if (w.en) begin
          if (!is_codeword24(w.r ^ best_e) || score(best_e, w.pv) != w.best ||
              int'(best_p) != w.best) begin
            failures++;
            $display("best_e=%h score=%0d/%0d ep=%h", best_e, score(best_e, w.pv), w.best, w.ep);
          end
          if (best_e == w.ep) n_kept++; else n_soft++;
        end else begin
          if (best_e != w.ep) begin failures++; $display("search off but best_e != E_P"); end
          n_off++;
        end
        got++;
        if (got == WORDS) begin
          checks++;
          if (n_soft == 0 || n_kept == 0 || n_off == 0) begin
            failures++;
            $display("paths: soft=%0d kept=%0d off=%0d", n_soft, n_kept, n_off);
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    init();
    foreach (p[k]) p[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < WORDS; t++) begin
      word_t w;
      logic [23:0] c, e;
      c = extend(cw_list[$urandom_range(4095, 0)]);
      e = rand_pattern(4);
      w.r = c ^ e;
      w.ep = hard_ep(w.r);
      w.en = (t % 10) != 9;
      for (int k = 0; k < 24; k++) begin
        // Bits in error tend to be less reliable (closer to zero).
        w.pv[k] = e[k] ? -int'($urandom_range(60, 0)) : -int'($urandom_range(127, 0));
        p[k] <= (XW+5)'(w.pv[k]);
      end
      w.best = best_score(w.ep, w.pv);
      ep <= w.ep;
      tag_in <= w.r;
      search_en <= w.en;
      start <= 1;
      #1;
      w.t0 = cyc;
      sent.push_back(w);
      @(posedge clk);
      start <= 0;
      foreach (p[k]) p[k] <= '0;
      ep <= '0;
      repeat (11) @(posedge clk);
    end
  end
endmodule
