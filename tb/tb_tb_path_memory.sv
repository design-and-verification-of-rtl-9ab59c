// tb_tb_path_memory: writes random label stages into the 9/8-deep path memory, then reads
// them back by rotation as a traceback does: bit 0 must show the 9 newest stages and bit 1
// the 8 newest, newest first, and a full rotation must leave the memory unchanged so that
// the next traceback reads the same stages.
`timescale 1ns/1ps
module tb_tb_path_memory;

  localparam int L0 = 9, L1 = 8;

  logic       clk = 0, rst = 1, we = 0, rot0 = 0, rot1 = 0;
  logic [1:0] p_in [8];
  logic [1:0] p_out [8];

  tb_path_memory #(.L0(L0), .L1(L1)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [1:0] hist [$][8];       // every stage written, oldest first

  task automatic write_stage();
    logic [1:0] st [8];
    foreach (st[s]) st[s] = 2'($urandom);
    p_in = st; we = 1;
    @(negedge clk);
    we = 0;
    hist.push_back(st);
  endtask

  // read a whole traceback's worth: L1 rotations of both, then the extra bit-0 rotation
  task automatic read_all();
    int n = hist.size();
    for (int k = 0; k < L0; k++) begin
      for (int s = 0; s < 8; s++) begin
        check(p_out[s][0] == hist[n-1-k][s][0], $sformatf("bit 0, depth %0d, state %0d", k, s));
        if (k < L1)
          check(p_out[s][1] == hist[n-1-k][s][1], $sformatf("bit 1, depth %0d, state %0d", k, s));
      end
      rot0 = 1; rot1 = (k < L1);
      @(negedge clk);
      rot0 = 0; rot1 = 0;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 30; r++) begin
      write_stage();
      if (hist.size() >= L0) begin
        read_all();
        read_all();     // unchanged by the first read
      end
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
