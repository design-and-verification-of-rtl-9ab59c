// tb_acsu322: random path metrics (some unreachable, all ones) and branch metrics; after
// an ae pulse every state's new metric and surviving label must equal the minimum over its
// four predecessors, computed here from the trellis equations, with metrics sticking at
// 15 and the lowest label winning a tie. Without ae the outputs must not move.
`timescale 1ns/1ps
module tb_acsu322;
  import viterbi_ref_pkg::*;

  logic       clk = 0, rst = 1, ae = 0;
  logic [3:0] a_out [8];
  logic [1:0] hd [8];
  logic [3:0] a_in [8];
  logic [1:0] bx [8];

  acsu322 dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, ties = 0, sats = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    int em [8]; logic [1:0] el [8];
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      for (int s = 0; s < 8; s++) begin
        automatic int r = $urandom_range(0, 9);
        a_out[s] = (r == 0) ? 4'hF : (r < 3) ? 4'(13 + $urandom_range(0, 1)) : 4'($urandom_range(0, 6));
        hd[s]    = 2'($urandom);
      end
      for (int d = 0; d < 8; d++) begin
        int sums [4];
        em[d] = 99;
        for (int j = 0; j < 4; j++) begin
          automatic logic [2:0] p = {j[1], d[2], j[0]};
          automatic int m = int'(a_out[p]);
          sums[j] = (m == 15) ? 15 : m + int'(hd[ref_enc(p, d[1:0])]);
          if (sums[j] > 15) begin sums[j] = 15; sats++; end
          if (sums[j] < em[d]) begin em[d] = sums[j]; el[d] = 2'(j); end
          else if (sums[j] == em[d]) ties++;
        end
      end
      ae = 1;
      @(negedge clk);
      ae = 0;
      for (int d = 0; d < 8; d++) begin
        check(int'(a_in[d]) == em[d], $sformatf("metric of state %0d: %0d vs %0d", d, a_in[d], em[d]));
        check(bx[d] == el[d], $sformatf("label of state %0d", d));
      end
      // inputs change without ae: results hold
      foreach (a_out[s]) a_out[s] = 4'($urandom);
      @(negedge clk);
      for (int d = 0; d < 8; d++) check(int'(a_in[d]) == em[d], "held without ae");
    end
    check(ties > 0 && sats > 0, "ties and saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
