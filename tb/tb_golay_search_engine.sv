// tb_golay_search_engine: one engine over twelve steps (with idle clocks
// mixed in) on random E_P, v and p. The reference evaluates the twelve
// rotations of v in order and keeps the first strictly greatest sum.
module tb_golay_search_engine;
  localparam int XW = 8;
  logic clk = 0, rst_n = 0, start = 0, en = 0;
  logic [22:0] v_init = '0, ep = '0, best_e;
  logic signed [XW+4:0] p [23];
  logic signed [XW+4:0] best_p;
  int checks = 0, failures = 0;

  golay_search_engine dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (p[k]) p[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int t = 0; t < 1000; t++) begin
      logic [22:0] v, e, ref_e;
      int ref_p, pv [23];
      v = 23'($urandom);
      ep <= 23'($urandom);
      v_init <= v;
      for (int k = 0; k < 23; k++) begin
        // Small range so that ties happen.
        pv[k] = (t % 2) ? -int'($urandom_range(3, 0)) : -int'($urandom_range(128, 0));
        p[k] <= (XW+5)'(pv[k]);
      end
      #1;
      ref_p = 0;
      ref_e = '0;
      for (int s = 0; s < 12; s++) begin
        int sum;
        e = ep ^ ((v << s) | (v >> (23 - s)));
        sum = 0;
        for (int k = 0; k < 23; k++) if (e[k]) sum += pv[k];
        if (s == 0 || sum > ref_p) begin ref_p = sum; ref_e = e; end
      end
      start <= 1;
      @(posedge clk);
      start <= 0;
      for (int s = 1; s < 12; s++) begin
        while ($urandom_range(3, 0) == 0) begin
          en <= 0;
          @(posedge clk);
        end
        en <= 1;
        @(posedge clk);
      end
      en <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (int'(best_p) != ref_p || best_e != ref_e) begin
        failures++;
        $display("best_p=%0d/%0d best_e=%h/%h", best_p, ref_p, best_e, ref_e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
