// acsu322: add-compare-select unit (path metric unit) of the (3,2,2) decoder.
//
// One acs322 element per destination state d = {a,b,c}. Its four predecessors are
// {j[1], a, j[0]} for backward label j, and the branch from that predecessor carries the
// code word enc_out(pred, {b,c}); the element therefore receives the stored metric of each
// predecessor and the BMU distance of that code word. This wiring is the trellis of the
// encoder state diagram; it is fixed at elaboration time.
//
// Timing: with `ae` high for one cycle, a_in (the new path metrics) and bx (the backward
// labels for the path memory) are valid from the next cycle until the next ae.
module acsu322
  import viterbi322_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ae,
  input  pm_t    a_out [NSTATES],    // stored path metrics
  input  hd_t    hd    [NSTATES],    // branch metric per code word
  output pm_t    a_in  [NSTATES],    // updated path metrics
  output label_t bx    [NSTATES]     // surviving backward label per state
);

  for (genvar d = 0; d < NSTATES; d++) begin : g_state
    pm_t ppm [4];
    hd_t bhd [4];
    for (genvar j = 0; j < 4; j++) begin : g_br
      localparam state_t PRED = pred_state(state_t'(d), label_t'(j));
      localparam code_t  CW   = enc_out(PRED, sym_of(state_t'(d)));
      assign ppm[j] = a_out[PRED];
      assign bhd[j] = hd[CW];
    end
    acs322 u_acs (
      .clk(clk), .rst(rst), .ae(ae),
      .ppm(ppm), .hd(bhd),
      .bx(bx[d]), .pm_out(a_in[d])
    );
  end

endmodule
