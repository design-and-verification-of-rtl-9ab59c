// bm322: branch metric building block of the (3,2,2) decoder.
//
// Combinational Hamming distance between the received 3-bit sequence rx and one code
// word vx: the number of bit positions in which they differ, 0 to 3, on two bits. The
// BMU instantiates it once for each of the eight code words; that structure and the
// 2-bit result follow the BMU diagram, the bit-count circuit is this design's own.
module bm322
  import viterbi322_pkg::*;
(
  input  code_t rx,
  input  code_t vx,
  output hd_t   hd
);

  code_t diff;

  always_comb begin
    diff = rx ^ vx;
    hd   = hd_t'({1'b0, diff[0]} + {1'b0, diff[1]} + {1'b0, diff[2]});
  end

endmodule
