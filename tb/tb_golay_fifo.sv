// tb_golay_fifo: random pushes and pops on golay_fifo against a queue model,
// checking read data, full and empty after every clock.
module tb_golay_fifo;
  localparam int WIDTH = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [WIDTH-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] q [$];
  int n_full = 0;

  golay_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (!empty || full) begin failures++; $display("bad flags after reset"); end
    for (int t = 0; t < 4000; t++) begin
      bit do_push, do_pop;
      // Bias towards filling in the first half and draining in the second.
      do_push = !full  && ($urandom_range(99, 0) < ((t / 500) % 2 ? 30 : 70));
      do_pop  = !empty && ($urandom_range(99, 0) < ((t / 500) % 2 ? 70 : 30));
      push  <= do_push;
      pop   <= do_pop;
      wdata <= WIDTH'($urandom);
      #1;
      if (do_pop) begin
        checks++;
        if (rdata != q[0]) begin failures++; $display("rdata %h expected %h", rdata, q[0]); end
      end
      @(posedge clk);
      if (do_pop) void'(q.pop_front());
      if (do_push) q.push_back(wdata);
      push <= 0;
      pop  <= 0;
      #1;
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == DEPTH)) begin
        failures++;
        $display("flags empty=%0b full=%0b with %0d words", empty, full, q.size());
      end
      if (full) n_full++;
    end
    checks++;
    if (n_full == 0) begin failures++; $display("never filled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
