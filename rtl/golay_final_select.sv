// golay_final_select: picks the most likely error pattern from the engines.
//
// The 22 engine results arrive as two groups of 11 (group a: engines that
// start at v_i, group b: engines that start at v_i rotated by 12). On load
// both groups are captured in shift registers, which then deliver one pair
// (a_i, b_i) per clock (parallel-to-serial conversion). Each pair is reduced
// to the better one, a_i if P_a > P_b and b_i otherwise, and that winner is
// compared with the running best P, which starts at the likelihood of E_P
// itself (the sum of p_k over the ones of E_P). A winner replaces P only when
// strictly greater, so E_P is kept on ties.
//
// Timing: load in clock L; the pairs are compared in clocks L+1..L+11; done
// is high in clock L+12 with best_e/best_p, and a new load may come in that
// same clock. With cmp_en low at load the pairs are skipped and the result
// is E_P. The pairwise comparison and serial comparison follow the published design;
// the sign convention (P starts at the sum of p_k = -|x_k|) follows its
// equation for the modified likelihood.
module golay_final_select
  import golay_pkg::*;
#(
  parameter int unsigned XW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 load,
  input  logic                 cmp_en,
  input  word24_t              ep,
  input  logic signed [XW+4:0] ep_value,
  input  logic signed [XW+4:0] pa [NUM_V],
  input  word23_t              ea [NUM_V],
  input  logic signed [XW+4:0] pb [NUM_V],
  input  word23_t              eb [NUM_V],
  output logic                 done,
  output logic signed [XW+4:0] best_p,
  output word24_t              best_e
);

  logic signed [XW+4:0] sa_p [NUM_V];
  logic signed [XW+4:0] sb_p [NUM_V];
  word23_t              sa_e [NUM_V];
  word23_t              sb_e [NUM_V];
  logic [3:0]           cnt;       // pairs still to compare
  logic                 running, use_pairs;

  // Equation 13 on the pair at the head of the shift registers.
  logic signed [XW+4:0] pk;
  word23_t              ek;
  always_comb begin
    if (sa_p[0] > sb_p[0]) begin
      pk = sa_p[0];
      ek = sa_e[0];
    end else begin
      pk = sb_p[0];
      ek = sb_e[0];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running <= 1'b0;
      done    <= 1'b0;
      cnt     <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        running <= 1'b1;
        cnt     <= 4'(NUM_V);
      end else if (running) begin
        cnt <= cnt - 1'b1;
        if (cnt == 4'd1) begin
          running <= 1'b0;
          done    <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (load) begin
      sa_p      <= pa;
      sa_e      <= ea;
      sb_p      <= pb;
      sb_e      <= eb;
      use_pairs <= cmp_en;
      best_p    <= ep_value;
      best_e    <= ep;
    end else if (running) begin
      for (int i = 0; i < int'(NUM_V) - 1; i++) begin
        sa_p[i] <= sa_p[i+1];
        sa_e[i] <= sa_e[i+1];
        sb_p[i] <= sb_p[i+1];
        sb_e[i] <= sb_e[i+1];
      end
      if (use_pairs && pk > best_p) begin
        best_p <= pk;
        best_e <= {1'b0, ek};
      end
    end
  end

endmodule
