// tb_bmu322: the eight branch metrics must be the Hamming distances of the received word
// from 000..111, captured only when le is high.
`timescale 1ns/1ps
module tb_bmu322;
  import viterbi_ref_pkg::*;

  logic       clk = 0, rst = 1, le = 0;
  logic [2:0] rx = '0;
  logic [1:0] hd [8];

  bmu322 dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic [2:0] held;
    held = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 300; i++) begin
      automatic logic [2:0] x = 3'($urandom);
      automatic bit l = (i == 0) || ($urandom_range(0, 2) != 0);
      rx = x; le = l;
      @(negedge clk);
      if (l) held = x;
      for (int c = 0; c < 8; c++)
        check(int'(hd[c]) == ref_hd(held, 3'(c)), $sformatf("hd[%0d] for rx %b", c, held));
    end
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
