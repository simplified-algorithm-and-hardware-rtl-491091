// golay_soft_decoder: soft-decision decoder for the (24,12,8) extended Golay
// code that corrects up to four errors.
//
// A hard-decision decoder corrects up to three errors. A word with four
// errors lies at distance four from six codewords, and the hard decoder's
// pattern E_P is only one of the six weight-4 patterns that explain it. This
// decoder then chooses among the candidates by channel reliability: each bit
// gets the measurement p_k = -|x_k|, a candidate pattern scores the sum of
// p_k over its ones, and the highest score (the least reliable bits) wins.
// The search tries E_P xor every weight-7 codeword of the (23,12) code (all
// 253) plus E_P itself, which covers the five other weight-4 candidates.
//
// Pipeline (one word accepted at most every twelve clocks):
//   clock 0      word accepted (in_valid and in_ready)
//   clock 1      p_k and hard decisions registered, written into the FIFO
//   clock 2      syndrome of the hard decisions
//   clock 3      hard decoder delivers E_P; four-error detection; the FIFO
//                entry is read and the search starts (the engines only run
//                if four errors were detected)
//   clock 3..14  22 search engines scan the 253 codewords
//   clock 15..27 the 22 engine results are reduced and compared with E_P
//   clock 28     out_valid with the corrected word
// The latency is 28 clocks; a new word may follow every 12 clocks, so up to
// three words are in flight and two in the search at once.
//
// Interface: in_x holds the 24 soft samples of a word (a non-negative sample
// means bit 0). out_codeword is the corrected word, out_msg its 12
// information bits (bits 22..11 under systematic encoding with
// g(x) = x^11+x^10+x^6+x^5+x^4+x^2+1), out_error the pattern removed and
// out_four_err tells whether the soft search was used and out_score is
// the sum of p_k over out_error. The block structure,
// the twelve-clock stage and the search follow the published design; the handshake,
// sample width, bit conventions and hard decoder insides are this design's.
module golay_soft_decoder
  import golay_pkg::*;
#(
  parameter int unsigned XW         = 8,  // soft sample width
  parameter int unsigned FIFO_DEPTH = 4   // words buffered for the search
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [XW-1:0] in_x [N],
  output logic                 out_valid,
  output word24_t              out_codeword,
  output logic [K-1:0]         out_msg,
  output word24_t              out_error,
  output logic                 out_four_err,
  output logic signed [XW+4:0] out_score
);

  localparam int unsigned PW = XW + 5;

  // ------------------------------------------------------- input admission
  logic [3:0] gap;     // clocks until the next word may be accepted
  logic       accept;
  logic       fifo_full, fifo_empty;

  assign in_ready = (gap == 0) && !fifo_full;
  assign accept   = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gap <= '0;
    end else if (accept) begin
      gap <= 4'(STAGE_CLKS - 1);
    end else if (gap != 0) begin
      gap <= gap - 1'b1;
    end
  end

  // ------------------------------------------------------- calculating p_k
  logic                 pk_valid;
  logic signed [PW-1:0] pk [N];
  word24_t              hard;

  golay_calc_pk #(.XW(XW)) u_calc_pk (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (accept),
    .in_x      (in_x),
    .out_valid (pk_valid),
    .out_p     (pk),
    .out_hard  (hard)
  );

  // ------------------------------------------------------- FIFO
  localparam int unsigned FW = N * PW + N;

  logic [FW-1:0] fifo_wdata, fifo_rdata;
  logic signed [PW-1:0] pk_f [N];
  word24_t              hard_f;

  always_comb begin
    fifo_wdata[N-1:0] = hard;
    for (int k = 0; k < int'(N); k++) fifo_wdata[N + k*PW +: PW] = pk[k];
    hard_f = fifo_rdata[N-1:0];
    for (int k = 0; k < int'(N); k++) pk_f[k] = fifo_rdata[N + k*PW +: PW];
  end

  logic    ep_valid;
  word24_t ep;
  logic    four_err;

  golay_fifo #(.WIDTH(FW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (pk_valid),
    .wdata (fifo_wdata),
    .pop   (ep_valid),
    .rdata (fifo_rdata),
    .full  (fifo_full),
    .empty (fifo_empty)
  );

  // ------------------------------------------------------- hard decoder
  golay_hard_decoder u_hard (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (pk_valid),
    .in_hard   (hard),
    .out_valid (ep_valid),
    .out_ep    (ep)
  );

  golay_four_err_detect u_detect (
    .ep       (ep),
    .four_err (four_err)
  );

  // ------------------------------------------------------- search
  logic                 s_done, s_searched;
  word24_t              s_best_e, s_hard;
  logic signed [PW-1:0] s_best_p;

  golay_error_search #(.XW(XW), .TAGW(N)) u_search (
    .clk          (clk),
    .rst_n        (rst_n),
    .start        (ep_valid),
    .search_en    (four_err),
    .ep           (ep),
    .p            (pk_f),
    .tag_in       (hard_f),
    .done         (s_done),
    .best_e       (s_best_e),
    .best_p       (s_best_p),
    .out_tag      (s_hard),
    .out_searched (s_searched)
  );

  // ------------------------------------------------------- output
  word24_t corrected;
  assign corrected = s_hard ^ s_best_e;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= s_done;
    end
  end

  always_ff @(posedge clk) begin
    if (s_done) begin
      out_codeword <= corrected;
      out_msg      <= corrected[N23-1 -: K];
      out_error    <= s_best_e;
      out_four_err <= s_searched;
      out_score    <= s_best_p;
    end
  end

  a_fifo_has_word: assert property (@(posedge clk) disable iff (!rst_n) ep_valid |-> !fifo_empty);

endmodule
