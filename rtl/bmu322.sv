// bmu322: branch metric unit of the (3,2,2) decoder.
//
// Eight bm322 blocks compare the received sequence rx with each possible branch label
// 000..111 and the eight 2-bit Hamming distances are captured in registers when the load
// enable `le` is high, as in the BMU diagram. Output hd[c] is the branch metric of every
// trellis branch whose code word is c; the 32 branches of one trellis stage each use one
// of these eight values (the diagram fans each register out to four branch names,
// HD(4*s+u+1) for the branch leaving state s with input u).
//
// Timing: hd is valid the cycle after le. Reset clears the registers.
module bmu322
  import viterbi322_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  le,                 // load enable
  input  code_t rx,                 // received sequence {V3,V2,V1}
  output hd_t   hd [NSTATES]        // hd[c]: distance of rx from code word c
);

  hd_t hd_c [NSTATES];

  for (genvar c = 0; c < NSTATES; c++) begin : g_bm
    bm322 u_bm (.rx(rx), .vx(code_t'(c)), .hd(hd_c[c]));

    always_ff @(posedge clk) begin
      if (rst)     hd[c] <= '0;
      else if (le) hd[c] <= hd_c[c];
    end
  end

endmodule
