// tb_golay_final_select: random engine results and E_P. Checks the result
// against a sequential reference of the pairwise and running comparisons,
// that done comes twelve clocks after load, that a new load may coincide with
// done, and that with cmp_en low the result is E_P.
module tb_golay_final_select;
  localparam int XW = 8;
  logic clk = 0, rst_n = 0, load = 0, cmp_en = 0, done;
  logic [23:0] ep = '0, best_e;
  logic signed [XW+4:0] ep_value = '0, best_p;
  logic signed [XW+4:0] pa [11], pb [11];
  logic [22:0] ea [11], eb [11];
  int checks = 0, failures = 0;
  int n_ep_kept = 0, n_replaced = 0;

  golay_final_select dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_p;
    logic [23:0] ref_e;
    bit have_ref;
    foreach (pa[i]) begin pa[i] = '0; pb[i] = '0; ea[i] = '0; eb[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    have_ref = 0;
    ref_p = 0;
    ref_e = '0;
    for (int t = 0; t < 1500; t++) begin
      int vpa [11], vpb [11], vep, np;
      logic [22:0] vea [11], veb [11];
      logic [23:0] vepat;
      bit en;
      en = (t % 7) != 0;
      vep = -int'($urandom_range(300, 0));
      vepat = 24'($urandom);
      for (int i = 0; i < 11; i++) begin
        vpa[i] = -int'($urandom_range(400, 0));
        vpb[i] = (i % 3 == 0) ? vpa[i] : -int'($urandom_range(400, 0));
        vea[i] = 23'($urandom);
        veb[i] = 23'($urandom);
        pa[i] <= (XW+5)'(vpa[i]);
        pb[i] <= (XW+5)'(vpb[i]);
        ea[i] <= vea[i];
        eb[i] <= veb[i];
      end
      ep <= vepat;
      ep_value <= (XW+5)'(vep);
      cmp_en <= en;
      load <= 1;
      // The previous word's result is due in this same clock.
      #1;
      if (have_ref) begin
        checks++;
        if (!done || int'(best_p) != ref_p || best_e != ref_e) begin
          failures++;
          $display("done=%0b best_p=%0d/%0d best_e=%h/%h", done, best_p, ref_p, best_e, ref_e);
        end
      end
      np = vep;
      ref_e = vepat;
      if (en) begin
        for (int i = 0; i < 11; i++) begin
          int pk;
          logic [22:0] ek;
          if (vpa[i] > vpb[i]) begin pk = vpa[i]; ek = vea[i]; end
          else begin pk = vpb[i]; ek = veb[i]; end
          if (pk > np) begin np = pk; ref_e = {1'b0, ek}; end
        end
      end
      if (ref_e == vepat) n_ep_kept++; else n_replaced++;
      ref_p = np;
      have_ref = 1;
      @(posedge clk);
      load <= 0;
      for (int c = 1; c < 12; c++) begin
        @(posedge clk);
        #1;
        if (c < 11) begin
          checks++;
          if (done) begin failures++; $display("early done at clock %0d", c); end
        end
      end
    end
    #1;
    checks++;
    if (!done || int'(best_p) != ref_p || best_e != ref_e) begin failures++; $display("last word wrong"); end
    checks++;
    if (n_ep_kept == 0 || n_replaced == 0) begin failures++; $display("a path never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
