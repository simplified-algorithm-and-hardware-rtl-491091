// golay_calc_pk: channel measurement of every bit of a received word.
//
// For each of the 24 soft samples x_k it forms the channel measurement
// p_k = -|x_k| (the scaled log-ratio of bit-error to bit-correct probability,
// with the amplitude and noise power taken as constant over a word) and the
// hard decision (1 when x_k is negative). A larger p_k (closer to zero) marks
// a less reliable bit, so the most likely error pattern is the one whose
// p_k sum is largest.
//
// Interface: in_valid/in_x are registered; out_valid/out_p/out_hard follow one
// clock later. p_k is XW+5 bits wide so that a sum of all 24 values cannot
// overflow. The measurement p_k = -|x_k| comes from the published design; the sample width,
// the sign-to-bit mapping and the register stage are this design's choices.
module golay_calc_pk
  import golay_pkg::*;
#(
  parameter int unsigned XW = 8   // soft sample width, two's complement
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] in_x [N],
  output logic                 out_valid,
  output logic signed [XW+4:0] out_p [N],
  output word24_t              out_hard
);

  logic signed [XW+4:0] p_c [N];
  word24_t              hard_c;

  always_comb begin
    for (int k = 0; k < int'(N); k++) begin
      // Sign-extend, then negate the positive samples: p = -|x|.
      p_c[k]    = in_x[k][XW-1] ? (XW+5)'(in_x[k]) : -(XW+5)'(in_x[k]);
      hard_c[k] = in_x[k][XW-1];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_p    <= p_c;
      out_hard <= hard_c;
    end
  end

endmodule
