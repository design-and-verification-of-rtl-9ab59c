// acs322: add-compare-select element for one destination state of the (3,2,2) trellis.
//
// The four incoming branches are numbered by their backward label 00, 01, 10, 11. When the
// add enable `ae` is high each predecessor path metric ppm[j] is added to its branch
// metric hd[j] and the four sums are registered. A predecessor whose metric is all ones
// (unreachable) keeps that value instead of adding (the "hold" path of the ACS diagram).
// Two <= comparators pick the smaller of sums 00/01 and of 10/11, a third picks between
// the two winners; the output is the surviving backward label bx and its metric. The
// structure (hold on 4'b1111, registered sums, a tree of <= comparators choosing the upper
// input on a tie) follows the ACS diagram. Clamping a sum at all ones instead of letting
// the 4-bit adder wrap is this design's own choice, so that a large metric can never turn
// into a small one.
//
// Timing: bx and pm_out are combinational from the sum registers, valid the cycle after ae.
module acs322
  import viterbi322_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ae,
  input  pm_t    ppm [4],     // predecessor path metrics, by backward label
  input  hd_t    hd  [4],     // branch metrics, by backward label
  output label_t bx,          // surviving backward label
  output pm_t    pm_out       // new path metric
);

  pm_t sum [4];

  for (genvar j = 0; j < 4; j++) begin : g_add
    logic [PM_W:0] full;
    pm_t           add;
    always_comb begin
      full = {1'b0, ppm[j]} + {{(PM_W+1-HD_W){1'b0}}, hd[j]};
      if (ppm[j] == PM_INF || full[PM_W]) add = PM_INF;
      else                                 add = full[PM_W-1:0];
    end
    always_ff @(posedge clk) begin
      if (rst)     sum[j] <= PM_INF;
      else if (ae) sum[j] <= add;
    end
  end

  logic   sel_lo, sel_hi, sel_top;
  pm_t    win_lo, win_hi;
  label_t lab_lo, lab_hi;

  always_comb begin
    sel_lo  = (sum[0] <= sum[1]);
    win_lo  = sel_lo ? sum[0] : sum[1];
    lab_lo  = sel_lo ? 2'b00 : 2'b01;
    sel_hi  = (sum[2] <= sum[3]);
    win_hi  = sel_hi ? sum[2] : sum[3];
    lab_hi  = sel_hi ? 2'b10 : 2'b11;
    sel_top = (win_lo <= win_hi);
    bx      = sel_top ? lab_lo : lab_hi;
    pm_out  = sel_top ? win_lo : win_hi;
  end

endmodule
