// golay_four_err_detect: flags a received word that holds four errors.
//
// The (24,12,8) code corrects three errors. A word four errors away from the
// code makes the hard decoder return a pattern E_P of weight exactly four
// (three bits in the 23-bit part plus the parity bit), and no word with
// fewer errors does. The block therefore counts the ones in E_P with an adder
// tree and compares the count with four.
//
// Interface: purely combinational, ep in, four_err out. The published design takes its
// detector from earlier work and gives only the function; the weight test is
// this design's equivalent.
module golay_four_err_detect
  import golay_pkg::*;
(
  input  word24_t ep,
  output logic    four_err
);

  logic [4:0] weight;

  always_comb begin
    weight = '0;
    for (int k = 0; k < int'(N); k++) weight = weight + 5'(ep[k]);
  end

  assign four_err = (weight == 5'd4);

endmodule
