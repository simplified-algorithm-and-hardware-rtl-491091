// golay_hard_decoder: hard-decision decoder giving the error pattern E_P.
//
// The first 23 hard decisions form a word of the perfect (23,12,7) cyclic
// Golay code. Its syndrome r(x) mod g(x) (11 bits) selects one of 2048 coset
// leaders, the unique error pattern of weight 0..3 with that syndrome; the
// leader table is a ROM filled at elaboration by enumerating every pattern of
// weight 1 to 3. Bit 23 of E_P is then set when the word corrected in its
// first 23 bits still has odd overall parity, so that r xor E_P is always a
// codeword of the (24,12,8) code. With up to three channel errors E_P is the
// true error; with four it has weight four and is one of six candidates.
//
// Interface: in_valid/in_hard are taken each clock; out_valid/out_ep follow
// two clocks later (syndrome register, then table register). The published design
// uses an algebraic decoder for this block and gives only its function; the
// syndrome-table decoder here is this design's simplest equivalent.
module golay_hard_decoder
  import golay_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  word24_t in_hard,
  output logic    out_valid,
  output word24_t out_ep
);

  typedef logic [(1<<NSYN)-1:0][N23-1:0] leader_tbl_t;

  function automatic leader_tbl_t build_leaders();
    leader_tbl_t         t;
    logic [NSYN-1:0]     s1 [N23];
    for (int s = 0; s < (1 << NSYN); s++) t[s] = '0;
    for (int i = 0; i < int'(N23); i++) s1[i] = syndrome23(word23_t'(1) << i);
    for (int i = 0; i < int'(N23); i++) begin
      t[s1[i]] = word23_t'(1) << i;
      for (int j = i + 1; j < int'(N23); j++) begin
        t[s1[i] ^ s1[j]] = (word23_t'(1) << i) | (word23_t'(1) << j);
        for (int l = j + 1; l < int'(N23); l++) begin
          t[s1[i] ^ s1[j] ^ s1[l]] =
            (word23_t'(1) << i) | (word23_t'(1) << j) | (word23_t'(1) << l);
        end
      end
    end
    return t;
  endfunction

  localparam leader_tbl_t LEADERS = build_leaders();

  // Stage 1: syndrome and overall parity of the received word.
  logic            v1;
  logic [NSYN-1:0] syn1;
  logic            par1;

  // Stage 2: coset leader and parity correction.
  word23_t         lead;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      syn1 <= syndrome23(in_hard[N23-1:0]);
      par1 <= ^in_hard;
    end
  end

  assign lead = LEADERS[syn1];

  always_ff @(posedge clk) begin
    if (v1) out_ep <= {par1 ^ (^lead), lead};
  end

endmodule
