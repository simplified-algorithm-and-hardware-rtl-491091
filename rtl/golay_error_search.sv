// golay_error_search: search for the most likely error pattern of a word.
//
// Every weight-4 error pattern that explains a received word with four errors
// differs from the hard decoder's pattern E_P by a weight-8 codeword through
// the parity bit, i.e. by one of the 253 weight-7 codewords of the (23,12)
// code. Those 253 words are 23 cyclic rotations of 11 base words v_i, so the
// search uses 22 engines in pairs: engine a_i starts at v_i and steps through
// rotations 0..11, engine b_i starts at v_i rotated by 12 and steps through
// rotations 12..22. In twelve clocks every codeword is tried exactly once;
// each engine keeps its best candidate. The 22 results then go to
// golay_final_select, which reduces them over the next twelve clocks while
// the engines already search the following word.
//
// Interface: start (one clock) takes ep, p and tag; search_en says whether the
// word holds four errors. With search_en low the engines stay idle and the
// result is E_P. done pulses 24 clocks after start with best_e (the chosen
// error pattern), out_tag (tag_in of that word) and out_searched (search_en
// of that word), with best_p its score. start may come at most once every twelve clocks. The engine
// array and the two-stage reduction follow the published design; the pairing of the
// engines, the choice of base words and the tag are this design's.
module golay_error_search
  import golay_pkg::*;
#(
  parameter int unsigned XW   = 8,    // soft sample width; p_k is XW+5 bits
  parameter int unsigned TAGW = 24    // side data carried along with a word
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 search_en,
  input  word24_t              ep,
  input  logic signed [XW+4:0] p [N],
  input  logic [TAGW-1:0]      tag_in,
  output logic                 done,
  output word24_t              best_e,
  output logic signed [XW+4:0] best_p,
  output logic [TAGW-1:0]      out_tag,
  output logic                 out_searched
);

  // ---------------------------------------------------------------- stage 1
  logic                 run, run_en, results_ready;
  logic [3:0]           step;          // steps taken since start
  word24_t              ep_r;
  logic signed [XW+4:0] p_r [N];
  logic signed [XW+4:0] p_eng [N23];
  word23_t              ep_eng;
  logic signed [XW+4:0] ep_value_c, ep_value_r;
  logic [TAGW-1:0]      tag1;
  logic                 sen1;

  // During the start clock the engines see the inputs directly.
  always_comb begin
    for (int k = 0; k < int'(N23); k++) p_eng[k] = start ? p[k] : p_r[k];
    ep_eng = start ? ep[N23-1:0] : ep_r[N23-1:0];
  end

  // Likelihood of E_P itself: sum of p_k over its ones, parity bit included.
  always_comb begin
    ep_value_c = '0;
    for (int k = 0; k < int'(N); k++) ep_value_c = ep_value_c + (ep[k] ? p[k] : '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run           <= 1'b0;
      step          <= '0;
      results_ready <= 1'b0;
    end else begin
      results_ready <= 1'b0;
      if (start) begin
        run  <= 1'b1;
        step <= 4'd1;
      end else if (run) begin
        step <= step + 1'b1;
        if (step == 4'(STAGE_CLKS - 1)) begin
          run           <= 1'b0;
          results_ready <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      ep_r       <= ep;
      p_r        <= p;
      ep_value_r <= ep_value_c;
      tag1       <= tag_in;
      sen1       <= search_en;
    end
  end

  assign run_en = run && sen1;

  logic signed [XW+4:0] pa [NUM_V];
  logic signed [XW+4:0] pb [NUM_V];
  word23_t              ea [NUM_V];
  word23_t              eb [NUM_V];

  for (genvar i = 0; i < int'(NUM_V); i++) begin : g_pair
    golay_search_engine #(.XW(XW)) u_eng_a (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (start && search_en),
      .en     (run_en),
      .v_init (GOLAY_V[i]),
      .ep     (ep_eng),
      .p      (p_eng),
      .best_p (pa[i]),
      .best_e (ea[i])
    );
    // Covers rotations 12..22: eleven steps, the twelfth clock is skipped.
    golay_search_engine #(.XW(XW)) u_eng_b (
      .clk    (clk),
      .rst_n  (rst_n),
      .start  (start && search_en),
      .en     (run_en && step != 4'(STAGE_CLKS - 1)),
      .v_init (rotl23(GOLAY_V[i], STAGE_CLKS)),
      .ep     (ep_eng),
      .p      (p_eng),
      .best_p (pb[i]),
      .best_e (eb[i])
    );
  end

  // ---------------------------------------------------------------- stage 2
  logic [TAGW-1:0] tag2;
  logic            sen2;

  always_ff @(posedge clk) begin
    if (results_ready) begin
      tag2 <= tag1;
      sen2 <= sen1;
    end
  end

  golay_final_select #(.XW(XW)) u_select (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (results_ready),
    .cmp_en   (sen1),
    .ep       (ep_r),
    .ep_value (ep_value_r),
    .pa       (pa),
    .ea       (ea),
    .pb       (pb),
    .eb       (eb),
    .done     (done),
    .best_p   (best_p),
    .best_e   (best_e)
  );

  assign out_tag      = tag2;
  assign out_searched = sen2;

  a_start_spacing: assert property (@(posedge clk) disable iff (!rst_n) start |-> !run);

endmodule
