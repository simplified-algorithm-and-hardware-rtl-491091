// golay_pkg: constants, types and helper functions shared by the (24,12,8)
// extended Golay soft decoder.
//
// Code convention (this design's choice): bit k of a 23-bit word is the
// coefficient of x^k of the cyclic (23,12,7) Golay code generated by
// g(x) = x^11 + x^10 + x^6 + x^5 + x^4 + x^2 + 1. Bit 23 of a 24-bit word is
// the overall (even) parity bit that extends it to the (24,12,8) code.
// Messages are encoded systematically, so codeword bits 22..11 are the
// information bits.
//
// GOLAY_V holds the 11 base codewords v_i of the search. The 253 weight-7
// codewords of the (23,12) code fall into 11 cyclic orbits of 23 rotations
// each; v_i is the numerically smallest member of orbit i (rotating v_i left
// by 0..22 places gives the whole orbit).
package golay_pkg;

  localparam int unsigned N          = 24;   // extended code length
  localparam int unsigned N23        = 23;   // cyclic Golay code length
  localparam int unsigned K          = 12;   // information bits
  localparam int unsigned NSYN       = 11;   // syndrome bits, N23 - K
  localparam int unsigned NUM_V      = 11;   // cyclic orbits of weight-7 codewords
  localparam int unsigned STAGE_CLKS = 12;   // clocks per pipeline stage

  localparam logic [NSYN:0] G_POLY = 12'hC75;

  typedef logic [N23-1:0] word23_t;
  typedef logic [N-1:0]   word24_t;

  localparam word23_t GOLAY_V [NUM_V] = '{
    23'h000C75, 23'h00254B, 23'h005E09, 23'h0081B3, 23'h00A88D, 23'h014585,
    23'h01C843, 23'h021253, 23'h026911, 23'h0320E1, 23'h046245
  };

  // Remainder of a 23-bit polynomial divided by g(x): the syndrome.
  function automatic logic [NSYN-1:0] syndrome23(input word23_t w);
    logic [N23-1:0] r;
    r = w;
    for (int i = N23 - 1; i >= int'(NSYN); i--) begin
      if (r[i]) r[i -: NSYN+1] = r[i -: NSYN+1] ^ G_POLY;
    end
    return r[NSYN-1:0];
  endfunction

  // Rotate a 23-bit word left by n places (multiply by x^n mod x^23 - 1).
  function automatic word23_t rotl23(input word23_t w, input int unsigned n);
    int unsigned m;
    m = n % N23;
    return (m == 0) ? w : word23_t'((w << m) | (w >> (N23 - m)));
  endfunction

endpackage
