// tb_golay_four_err_detect: random patterns of every weight 0..24; the flag
// must be high exactly for weight four.
module tb_golay_four_err_detect;
  import golay_tb_pkg::*;
  logic [23:0] ep;
  logic four_err;
  int checks = 0, failures = 0;

  golay_four_err_detect dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2500; t++) begin
      int w;
      w = (t % 2) ? 4 : t % 25;
      ep = rand_pattern(w);
      #1;
      checks++;
      if (four_err != (w == 4)) begin failures++; $display("ep=%h flag=%0b", ep, four_err); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
