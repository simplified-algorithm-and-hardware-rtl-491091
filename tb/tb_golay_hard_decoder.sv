// tb_golay_hard_decoder: random codewords with 0..4 channel errors. Up to three
// errors E_P must equal the injected pattern; with four, E_P must have weight
// four, include the parity bit and turn the word into a codeword. The
// reference decodes by searching all 4096 codewords. Latency must be 2 clocks.
module tb_golay_hard_decoder;
  import golay_tb_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [23:0] in_hard = '0, out_ep;
  int checks = 0, failures = 0;

  golay_hard_decoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 1500; t++) begin
      logic [23:0] c, e, r;
      int w;
      w = t % 5;
      c = extend(cw_list[$urandom_range(4095, 0)]);
      e = rand_pattern(w);
      r = c ^ e;
      in_hard  <= r;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid after one clock"); end
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid after two clocks"); end
      checks++;
      if (w < 4) begin
        if (out_ep != e) begin failures++; $display("w=%0d ep=%h e=%h", w, out_ep, e); end
      end else begin
        if (weight(out_ep) != 4 || !out_ep[23] || !is_codeword24(r ^ out_ep) ||
            out_ep != hard_ep(r)) begin
          failures++;
          $display("four errors: ep=%h r=%h", out_ep, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
