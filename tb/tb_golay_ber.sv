// tb_golay_ber: bit-error-rate run of the soft decoder over an AWGN channel
// with BPSK (bit 0 -> +A, bit 1 -> -A), at the default parameters. Noise is
// Gaussian (Box-Muller on $urandom); samples are rounded and clipped to 8
// bits. For every word the reference hard decoder (nearest codeword, then
// parity) is run on the same hard decisions. The run checks that every
// output is a codeword, that the soft decoder agrees with hard decoding on
// words with at most three errors, and that over the run it makes fewer word
// errors than hard decoding; it prints both bit error rates.
module tb_golay_ber;
  import golay_tb_pkg::*;
  localparam int    XW = 8, WORDS = 1500;
  localparam real   EBN0_DB = 2.0;
  localparam real   AMP = 24.0;        // signal amplitude in sample units
  localparam real   PI = 3.141592653589793;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_four_err;
  logic signed [XW-1:0] in_x [24];
  logic [23:0] out_codeword, out_error;
  logic [11:0] out_msg;
  logic signed [XW+4:0] out_score;
  int checks = 0, failures = 0;

  golay_soft_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (WORDS * 14 + 500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [11:0] m;
    logic [23:0] c, r;
  } word_t;
  word_t sent [$];
  word_t pending;
  bit acc_flag = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  always @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      sent.push_back(pending);
      acc_flag = 1;
    end
  end

  initial begin
    int got, soft_bits, hard_bits, soft_words, hard_words, n4;
    got = 0; soft_bits = 0; hard_bits = 0; soft_words = 0; hard_words = 0; n4 = 0;
    forever begin
      @(posedge clk);
      if (rst_n && out_valid) begin
        word_t w;
        logic [23:0] hard_cw;
        int nerr;
        w = sent.pop_front();
        nerr = weight(w.c ^ w.r);
        hard_cw = w.r ^ hard_ep(w.r);
        checks++;
        if (!is_codeword24(out_codeword)) begin failures++; $display("output not a codeword"); end
        if (nerr <= 3) begin
          checks++;
          if (out_codeword != hard_cw || out_four_err) begin failures++; $display("disagrees with hard decoding"); end
        end
        if (nerr == 4) n4++;
        soft_bits += weight({12'b0, out_msg ^ w.m});
        hard_bits += weight({12'b0, hard_cw[22:11] ^ w.m});
        soft_words += int'(out_codeword != w.c);
        hard_words += int'(hard_cw != w.c);
        got++;
        if (got == WORDS) begin
          $display("Eb/N0 %0.1f dB, %0d words, %0d with four errors", EBN0_DB, WORDS, n4);
          $display("soft: %0d word errors, BER %e", soft_words, real'(soft_bits) / real'(12 * WORDS));
          $display("hard: %0d word errors, BER %e", hard_words, real'(hard_bits) / real'(12 * WORDS));
          checks++;
          if (n4 == 0 || soft_words >= hard_words) begin failures++; $display("soft decoding no better than hard"); end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    real sigma;
    // Rate 1/2: Es/N0 = Eb/N0 / 2; sigma^2 = A^2 / (2 Es/N0).
    sigma = AMP / $sqrt(2.0 * 0.5 * (10.0 ** (EBN0_DB / 10.0)));
    init();
    foreach (in_x[k]) in_x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    for (int t = 0; t < WORDS; t++) begin
      word_t w;
      w.m = 12'($urandom);
      w.c = extend(sys_cw[w.m]);
      for (int k = 0; k < 24; k++) begin
        real y;
        int q;
        y = (w.c[k] ? -AMP : AMP) + sigma * gauss();
        q = $rtoi(y + (y >= 0.0 ? 0.5 : -0.5));
        if (q > 127) q = 127;
        if (q < -128) q = -128;
        in_x[k] = XW'(q);
        w.r[k] = (q < 0);
      end
      pending = w;
      in_valid = 1;
      do begin
        @(posedge clk);
        #1;
      end while (!acc_flag);
      acc_flag = 0;
    end
    in_valid = 0;
  end
endmodule
