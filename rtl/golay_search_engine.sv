// golay_search_engine: one search engine of the error-pattern search.
//
// Each clock the engine forms a candidate error pattern e_a = E_P xor v, where
// v is a weight-7 codeword of the (23,12) Golay code, so r xor e_a is again a
// codeword. Twenty-three multiplexers pass p_k where e_a has a one and zero
// elsewhere; their sum P_a is the modified likelihood of the candidate. The
// engine keeps the largest P_a seen and its pattern (P_tmp, e_tmp), updating
// only when P_a is strictly greater. v is then rotated left by one place, which
// gives the next codeword of the same cyclic orbit.
//
// Timing: on start the engine evaluates v_init against ep/p and loads the
// result unconditionally; on each later clock with en high it evaluates the
// rotated v. ep and p must hold their values between start and the last en.
// best_p/best_e show the running result one clock after each step.
// The datapath follows the published design; loading the first candidate
// unconditionally (instead of comparing with an initial zero, which a
// non-positive p_k sum could never beat) is this design's choice.
module golay_search_engine
  import golay_pkg::*;
#(
  parameter int unsigned XW = 8   // soft sample width; p_k is XW+5 bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 en,
  input  word23_t              v_init,
  input  word23_t              ep,
  input  logic signed [XW+4:0] p [N23],
  output logic signed [XW+4:0] best_p,
  output word23_t              best_e
);

  word23_t              v, v_cur, e_a;
  logic signed [XW+4:0] p_a;

  assign v_cur = start ? v_init : v;
  assign e_a   = ep ^ v_cur;

  // 23 multiplexers and their adder.
  always_comb begin
    p_a = '0;
    for (int k = 0; k < int'(N23); k++) begin
      p_a = p_a + (e_a[k] ? p[k] : '0);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v      <= '0;
      best_p <= '0;
      best_e <= '0;
    end else if (start) begin
      v      <= rotl23(v_cur, 1);
      best_p <= p_a;
      best_e <= e_a;
    end else if (en) begin
      v <= rotl23(v_cur, 1);
      if (p_a > best_p) begin
        best_p <= p_a;
        best_e <= e_a;
      end
    end
  end

endmodule
