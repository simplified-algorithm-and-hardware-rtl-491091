// tb_golay_soft_decoder: end-to-end test of the soft decoder at its default
// parameters. Random messages are encoded systematically, sent as +/- soft
// samples and hit by 0..4 errors:
//   0..3 errors  the word and message must come back, without the search;
//   4 weak errors (all other samples strong)  the soft search must find the
//                transmitted word;
//   4 random errors  the result must be a codeword whose error pattern scores
//                as high as the best of the six candidates (reference search).
// It also checks the 28-clock latency and the twelve-clock spacing of
// accepted words, and counts the mechanisms: hard-only path, four-error
// search, search keeping E_P, search replacing E_P, input stall while the
// decoder is busy, and words accepted at the full rate.
module tb_golay_soft_decoder;
  import golay_tb_pkg::*;
  localparam int XW = 8, WORDS = 600, LATENCY = 28;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_four_err;
  logic signed [XW-1:0] in_x [24];
  logic [23:0] out_codeword, out_error;
  logic [11:0] out_msg;
  logic signed [XW+4:0] out_score;
  int checks = 0, failures = 0;
  int n_hard = 0, n_search = 0, n_kept = 0, n_replaced = 0, n_stall = 0, n_full_rate = 0;

  golay_soft_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WORDS * 20 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [11:0] m;
    logic [23:0] c, r, ep;
    int          pv [24];
    int          kind;   // errors injected; 5 means four weak errors
    int          t_acc;
  } word_t;
  word_t sent [$];
  word_t pending;
  int cyc = 0, last_acc = -100;
  bit acc_flag = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // Accept monitor: records each word at the clock it is taken.
  always @(posedge clk) begin
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (rst_n && in_valid && in_ready) begin
      word_t w;
      w = pending;
      w.t_acc = cyc;
      checks++;
      if (cyc - last_acc < 12) begin failures++; $display("accepts %0d clocks apart", cyc - last_acc); end
      if (cyc - last_acc == 12) n_full_rate++;
      last_acc = cyc;
      sent.push_back(w);
      acc_flag = 1;
    end
  end

  // Output checker.
  initial begin
    int got;
    got = 0;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid) begin
        word_t w;
        w = sent.pop_front();
        checks++;
        if (cyc - w.t_acc != LATENCY) begin failures++; $display("latency %0d", cyc - w.t_acc); end
        checks++;
        if (w.kind <= 3) begin
          if (out_codeword != w.c || out_msg != w.m || out_four_err || out_error != (w.c ^ w.r)) begin
            failures++;
            $display("%0d errors: got %h expected %h", w.kind, out_codeword, w.c);
          end
          n_hard++;
        end else begin
          int best;
          best = best_score(w.ep, w.pv);
          if (!out_four_err || !is_codeword24(out_codeword) || out_error != (out_codeword ^ w.r) ||
              score(out_error, w.pv) != best || int'(out_score) != best ||
              (w.kind == 5 && (out_codeword != w.c || out_msg != w.m))) begin
            failures++;
            $display("four errors (kind %0d): got %h sent %h score %0d/%0d", w.kind,
                     out_codeword, w.c, score(out_error, w.pv), best);
          end
          n_search++;
          if (out_error == w.ep) n_kept++; else n_replaced++;
        end
        got++;
        if (got == WORDS) begin
          $display("hard-only %0d, searched %0d (E_P kept %0d, replaced %0d), stall clocks %0d, full-rate accepts %0d",
                   n_hard, n_search, n_kept, n_replaced, n_stall, n_full_rate);
          checks++;
          if (n_hard == 0 || n_search == 0 || n_kept == 0 || n_replaced == 0 ||
              n_stall == 0 || n_full_rate == 0) begin
            failures++;
            $display("a mechanism never happened");
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    init();
    foreach (in_x[k]) in_x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    // Inputs change 1 time unit after a clock edge, with blocking writes.
    for (int t = 0; t < WORDS; t++) begin
      word_t w;
      logic [23:0] e;
      w.kind = t % 6;
      w.m = 12'($urandom);
      w.c = extend(sys_cw[w.m]);
      e = rand_pattern(w.kind == 5 ? 4 : w.kind);
      w.r = w.c ^ e;
      for (int k = 0; k < 24; k++) begin
        int mag;
        if (w.kind == 5) mag = e[k] ? int'($urandom_range(15, 1)) : int'($urandom_range(127, 60));
        else if (w.kind == 4) mag = int'($urandom_range(128, 1));
        else mag = e[k] ? int'($urandom_range(40, 1)) : int'($urandom_range(127, 30));
        if (k % 7 == 0 && w.kind != 5 && mag > 127) mag = 128;
        w.pv[k] = -mag;
        // Received bit 0 is a non-negative sample.
        in_x[k] = w.r[k] ? XW'(-mag) : XW'((mag > 127) ? 127 : mag);
        if (!w.r[k] && mag > 127) w.pv[k] = -127;
      end
      w.ep = hard_ep(w.r);
      pending = w;
      in_valid = 1;
      do begin
        @(posedge clk);
        #1;
      end while (!acc_flag);
      acc_flag = 0;
      // Mostly back-to-back; now and then a gap.
      if ($urandom_range(3, 0) == 0) begin
        in_valid = 0;
        repeat ($urandom_range(15, 1)) @(posedge clk);
        #1;
      end
    end
  end
endmodule
