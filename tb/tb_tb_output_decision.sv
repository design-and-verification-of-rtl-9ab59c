// tb_tb_output_decision: the unit is driven as in a decoder, with a label memory modelled
// here. For random path metrics and labels it must start from the lowest-numbered state of
// smallest metric, follow the labels for TB_STEPS steps (tb_done on the last), release the
// symbol of the state one step further back ({s22,b1} in the storage-efficient wiring,
// {s21,s11} in the conventional one, each checked in its own instance), raise sync_error
// when the smallest metric reaches the threshold, and mark the N_SYM-th release with
// block_done. The last releases of each block are flush passes, whose traceback follows
// the labels one step less each time and releases {s21,s11}.
`timescale 1ns/1ps
module tb_tb_output_decision;

  localparam int N_SYM = 12, THR = 8;

  logic       clk = 0, rst = 1, init = 0;
  logic       be [2] = '{0, 0}, te [2] = '{0, 0}, oe [2] = '{0, 0}, flush [2] = '{0, 0};   // [1]: storage-efficient
  logic [3:0] a_out [8];
  logic [1:0] p_out_p [8], p_out_c [8];
  logic [1:0] dx_p, dx_c;
  logic       v_p, v_c, se_p, se_c, td_p, td_c, bd_p, bd_c;
  logic [2:0] ts_p, ts_c;

  tb_output_decision #(.PROPOSED(1'b1), .TB_STEPS(8), .N_SYM(N_SYM), .SYNC_THRESH(THR)) dut_p (
    .clk, .rst, .init, .be(be[1]), .te(te[1]), .oe(oe[1]), .flush(flush[1]), .a_out, .p_out(p_out_p), .dx(dx_p), .dx_valid(v_p),
    .sync_error(se_p), .tb_done(td_p), .block_done(bd_p), .tb_state(ts_p));
  tb_output_decision #(.PROPOSED(1'b0), .TB_STEPS(10), .N_SYM(N_SYM), .SYNC_THRESH(THR)) dut_c (
    .clk, .rst, .init, .be(be[0]), .te(te[0]), .oe(oe[0]), .flush(flush[0]), .a_out, .p_out(p_out_c), .dx(dx_c), .dx_valid(v_c),
    .sync_error(se_c), .tb_done(td_c), .block_done(bd_c), .tb_state(ts_c));

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_sync = 0, n_flush = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  logic [1:0] lab [12][8];        // lab[k]: labels k stages back from the newest

  // one traceback of `steps` steps for one instance; returns the released symbol
  task automatic run(bit prop, int steps, int rel);
    int best = 0;
    logic [2:0] s;
    logic [1:0] expect_sym;
    int l0, kk, follow;
    for (int k = 1; k < 8; k++) if (a_out[k] < a_out[best]) best = k;
    l0 = prop ? steps + 1 : steps;
    kk = (rel >= N_SYM - l0) ? rel - (N_SYM - l0 - 1) : 0;   // flush pass
    follow = (prop && kk == 0) ? steps : l0 - kk;
    s = 3'(best);
    flush[prop] = (rel >= N_SYM - l0 - 1);
    for (int k = 0; k < follow; k++) begin
      logic [1:0] b = lab[k][s];
      s = {b[1], s[2], b[0]};
    end
    // efficient wiring outside a flush: symbol of the state one further step back
    expect_sym = (prop && kk == 0) ? {s[2], lab[steps][s][0]} : {s[1], s[0]};
    if (kk > 0) n_flush++;
    // drive
    be[prop] = 1;
    @(negedge clk); be[prop] = 0;
    check((prop ? ts_p : ts_c) == 3'(best), "start state is the best state");
    check((prop ? se_p : se_c) == (int'(a_out[best]) >= THR), "sync_error");
    if (int'(a_out[best]) >= THR) n_sync++;
    for (int k = 0; k < steps; k++) begin
      foreach (p_out_p[x]) begin p_out_p[x] = lab[k][x]; p_out_c[x] = lab[k][x]; end
      te[prop] = 1;
      #1;
      check((prop ? td_p : td_c) == (k == steps - 1), "tb_done on the last step only");
      @(negedge clk); te[prop] = 0;
    end
    foreach (p_out_p[x]) begin p_out_p[x] = lab[steps][x]; p_out_c[x] = lab[steps][x]; end
    oe[prop] = 1;
    #1;
    check((prop ? v_p : v_c), "dx_valid with oe");
    check((prop ? dx_p : dx_c) == expect_sym, $sformatf("released symbol (prop=%0d)", prop));
    check((prop ? bd_p : bd_c) == (rel == N_SYM - 1), "block_done on the last symbol");
    @(negedge clk); oe[prop] = 0;
    #1;
    check(!(prop ? v_p : v_c) && (prop ? dx_p : dx_c) == 2'b00, "dx idle without oe");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    for (int blk = 0; blk < 6; blk++) begin
      for (int rel = 0; rel < N_SYM; rel++) begin
        automatic int base = $urandom_range(0, 10);
        foreach (a_out[s]) a_out[s] = 4'(base + $urandom_range(0, 5));
        foreach (lab[k, s]) lab[k][s] = 2'($urandom);
        run(1'b1, 8, rel);
        run(1'b0, 10, rel);
        // block_done is seen by both; the decoder clears the count with init
        if (rel == N_SYM - 1) begin init = 1; @(negedge clk); init = 0; flush = '{0, 0}; end
      end
    end
    check(n_sync > 0, "sync_error exercised");
    check(n_flush == 6 * (9 + 10), "flush passes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
