// tb_pm_memory: starting metrics after reset and init (0 for state 000, 15 elsewhere),
// writes with we, and init taking precedence over we.
`timescale 1ns/1ps
module tb_pm_memory;

  logic       clk = 0, rst = 1, init = 0, we = 0;
  logic [3:0] a_in [8];
  logic [3:0] a_out [8];

  pm_memory dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic check_start();
    for (int s = 0; s < 8; s++) check(a_out[s] == ((s == 0) ? 4'd0 : 4'd15), "starting metric");
  endtask

  initial begin
    logic [3:0] model [8];
    foreach (a_in[s]) a_in[s] = 4'($urandom);
    repeat (2) @(negedge clk);
    rst = 0;
    check_start();
    foreach (model[s]) model[s] = (s == 0) ? 4'd0 : 4'd15;
    for (int i = 0; i < 200; i++) begin
      automatic int op = $urandom_range(0, 5);
      foreach (a_in[s]) a_in[s] = 4'($urandom);
      we = (op < 4); init = (op == 5 || op == 3);
      @(negedge clk);
      if (init) foreach (model[s]) model[s] = (s == 0) ? 4'd0 : 4'd15;
      else if (we) model = a_in;
      for (int s = 0; s < 8; s++) check(a_out[s] == model[s], $sformatf("metric %0d", s));
    end
    we = 0; init = 1; @(negedge clk); init = 0;
    check_start();
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
