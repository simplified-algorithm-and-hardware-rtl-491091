// golay_fifo: synchronous first-in first-out buffer.
//
// Holds the channel measurements and hard decisions of a received word while
// the hard decoder works out its error pattern E_P; the search block reads the
// entry back when E_P arrives. It is a register array with read and write
// pointers one bit wider than the address, so full and empty are told apart.
//
// Interface: push writes wdata when not full; rdata always shows the oldest
// entry (first-word fall-through) and pop removes it when not empty. Push and
// pop may happen in the same clock. The published design only names this buffer; its
// depth, width and fall-through behaviour are this design's choices.
module golay_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 4   // a power of two
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             do_push, do_pop;

  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rdata   = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= wdata;
  end

  // A write into a full buffer or a read from an empty one loses a word.
  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
