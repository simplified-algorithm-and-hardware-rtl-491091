// golay_tb_pkg: reference model of the (24,12,8) extended Golay code for the
// testbenches. It builds the code by brute force: every codeword is m(x)g(x)
// for one of the 4096 message polynomials, and decoding searches that list,
// so it shares no algorithm with the decoder under test.
package golay_tb_pkg;

  localparam logic [11:0] G = 12'hC75;  // x^11+x^10+x^6+x^5+x^4+x^2+1

  logic [22:0] cw_list [4096];  // all codewords m(x)g(x), indexed by m
  logic [22:0] sys_cw  [4096];  // codeword whose bits 22..11 equal the index
  logic [22:0] w7_list [253];   // the weight-7 codewords
  int          n_w7;

  function automatic logic [22:0] polymul(input logic [11:0] m);
    logic [22:0] r;
    r = '0;
    for (int i = 0; i < 12; i++) if (m[i]) r ^= 23'(G) << i;
    return r;
  endfunction

  function automatic int weight(input logic [23:0] w);
    int n;
    n = 0;
    for (int i = 0; i < 24; i++) n += int'(w[i]);
    return n;
  endfunction

  function automatic void init();
    n_w7 = 0;
    for (int m = 0; m < 4096; m++) begin
      cw_list[m] = polymul(12'(m));
      sys_cw[cw_list[m][22:11]] = cw_list[m];
      if (weight({1'b0, cw_list[m]}) == 7) begin
        w7_list[n_w7] = cw_list[m];
        n_w7++;
      end
    end
  endfunction

  function automatic logic [23:0] extend(input logic [22:0] c);
    return {^c, c};
  endfunction

  function automatic bit is_codeword24(input logic [23:0] w);
    for (int m = 0; m < 4096; m++) if (extend(cw_list[m]) == w) return 1'b1;
    return 1'b0;
  endfunction

  // Hard decoding: nearest 23-bit codeword, then the parity bit.
  function automatic logic [23:0] hard_ep(input logic [23:0] r);
    int          best_d;
    logic [22:0] best_c;
    logic [22:0] e;
    best_d = 99;
    best_c = '0;
    for (int m = 0; m < 4096; m++) begin
      int d;
      d = weight({1'b0, cw_list[m] ^ r[22:0]});
      if (d < best_d) begin
        best_d = d;
        best_c = cw_list[m];
      end
    end
    e = best_c ^ r[22:0];
    return {r[23] ^ (^best_c), e};
  endfunction

  function automatic int score(input logic [23:0] e, input int p [24]);
    int s;
    s = 0;
    for (int k = 0; k < 24; k++) if (e[k]) s += p[k];
    return s;
  endfunction

  // Highest score over E_P and E_P xor every weight-8 codeword through the
  // parity bit.
  function automatic int best_score(input logic [23:0] ep, input int p [24]);
    int b;
    b = score(ep, p);
    for (int i = 0; i < 253; i++) begin
      int s;
      s = score(ep ^ {1'b1, w7_list[i]}, p);
      if (s > b) b = s;
    end
    return b;
  endfunction

  // A random 24-bit pattern of the given weight.
  function automatic logic [23:0] rand_pattern(input int w);
    logic [23:0] e;
    e = '0;
    while (weight(e) < w) e[$urandom_range(23, 0)] = 1'b1;
    return e;
  endfunction

endpackage
