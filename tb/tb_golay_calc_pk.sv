// tb_golay_calc_pk: checks p_k = -|x_k|, the hard decisions and the one-clock
// latency of golay_calc_pk on random words and on the extreme sample values.
module tb_golay_calc_pk;
  localparam int XW = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [XW-1:0] in_x [24];
  logic signed [XW+4:0] out_p [24];
  logic [23:0] out_hard;
  int checks = 0, failures = 0;

  golay_calc_pk dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [24];
    foreach (in_x[k]) in_x[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      for (int k = 0; k < 24; k++) begin
        case (t % 3)
          0: xs[k] = int'($urandom_range(255, 0)) - 128;
          1: xs[k] = (k % 3 == 0) ? -128 : ((k % 3 == 1) ? 127 : 0);
          default: xs[k] = int'($urandom_range(20, 0)) - 10;
        endcase
        in_x[k] <= XW'(xs[k]);
      end
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      checks++;
      if (!out_valid) begin failures++; $display("no out_valid one clock after input"); end
      for (int k = 0; k < 24; k++) begin
        int expp;
        expp = (xs[k] < 0) ? xs[k] : -xs[k];
        checks++;
        if (int'(out_p[k]) != expp || out_hard[k] != (xs[k] < 0)) begin
          failures++;
          $display("x=%0d p=%0d hard=%0b", xs[k], out_p[k], out_hard[k]);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (out_valid) begin failures++; $display("out_valid stuck"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
