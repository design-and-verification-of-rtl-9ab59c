// tb_conv_encoder322: checks every code word and state of the encoder against the
// connection equations, over random symbols with idle cycles and block restarts (clr).
`timescale 1ns/1ps
module tb_conv_encoder322;
  import viterbi_ref_pkg::*;

  logic       clk = 0, rst = 1, clr = 0, en = 0;
  logic [1:0] u = '0;
  logic [2:0] v, state;
  logic       v_valid;

  conv_encoder322 dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    logic [2:0] st;
    st = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 400; i++) begin
      automatic logic [1:0] x = 2'($urandom);
      automatic bit go = ($urandom_range(0, 3) != 0);
      automatic bit c  = ($urandom_range(0, 19) == 0);
      en = go; u = x; clr = c;
      @(negedge clk);
      if (c) st = '0;
      if (go) begin
        check(v_valid, "v_valid after en");
        check(v == ref_enc(st, x), $sformatf("code word from state %b input %b", st, x));
        st = ref_next(st, x);
      end else begin
        check(!v_valid, "no v_valid without en");
      end
      check(state == st, "register contents");
    end
    // fixed points of the state diagram: 000 --01/101--> 001 --01/110--> 001
    en = 1; clr = 1; u = 2'b01; @(negedge clk);
    check(v == 3'b101 && state == 3'b001, "000 -01/101-> 001");
    clr = 0; @(negedge clk);
    check(v == 3'b110 && state == 3'b001, "001 -01/110-> 001");
    u = 2'b10; @(negedge clk);
    check(v == 3'b101 && state == 3'b010, "001 -10/101-> 010");
    en = 0;
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
