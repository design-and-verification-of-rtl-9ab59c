// pm_memory: path metric memory of the (3,2,2) decoder, eight 4-bit registers.
//
// Written with the ACS results when `we` is high. Reset and the block-start pulse `init`
// load the starting metrics of a block: 0 for state 000, where the encoder starts, and all
// ones (unreachable) for the other seven states. The 8 x 4-bit size and the we enable come
// from the decoder block diagram; the starting values from the trellis examples, which
// begin with metric 0 in state 000 and infinity elsewhere. `init` is this design's own.
//
// Timing: a_out changes the cycle after we or init; init wins over we.
module pm_memory
  import viterbi322_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic init,
  input  logic we,
  input  pm_t  a_in  [NSTATES],
  output pm_t  a_out [NSTATES]
);

  always_ff @(posedge clk) begin
    for (int s = 0; s < NSTATES; s++) begin
      if (rst || init) a_out[s] <= (s == 0) ? pm_t'('0) : PM_INF;
      else if (we)     a_out[s] <= a_in[s];
    end
  end

endmodule
