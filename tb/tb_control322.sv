// tb_control322: drives the sequencer with seq_rdy pulses and plays the traceback unit
// (tb_done after STEPS te cycles, block_done on the NB-th oe). Checks, cycle by cycle, the
// enable order LOAD/le, ADD/ae, STORE/we while the memory fills and then START/be,
// STEPS x TRACE/te, OUTPUT/oe with rot0 on the extra cycle; after a block's last sequence
// the START/TRACE/OUTPUT passes without input (flush) and init with the last symbol;
// a sequence that arrives while busy being taken up straight after; overrun when a
// second one arrives while one is already waiting; and, after a reset, sequences arriving
// in the STORE or OUTPUT cycle going to LOAD in the next cycle.
`timescale 1ns/1ps
module tb_control322;

  localparam int FILL = 4, STEPS = 3, NB = 6;   // NB: sequences = symbols per block

  logic clk = 0, rst = 1, seq_rdy = 0, tb_done, block_done;
  logic le, ae, we, be, te, oe, rot0, rot1, init, flush, overrun;

  control322 #(.FILL(FILL), .EXTRA_ROT0(1'b1), .N_SYM(NB)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_te = 0, n_oe = 0, n_flush = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // stand-in for the traceback unit's counters
  assign tb_done    = te && (n_te == STEPS - 1);
  assign block_done = oe && (n_oe == NB - 1);
  always @(posedge clk) begin
    if (be) n_te <= 0; else if (te) n_te <= n_te + 1;
    if (rst || init) n_oe <= 0; else if (oe) n_oe <= n_oe + 1;
  end

  // expected enables of the current cycle: {le,ae,we,be,te,oe,rot0,rot1,init}
  task automatic expect_cycle(logic [8:0] e, string what);
    #1;
    check({le, ae, we, be, te, oe, rot0, rot1, init} == e,
          $sformatf("%s: got %b", what, {le, ae, we, be, te, oe, rot0, rot1, init}));
    @(negedge clk);
  endtask

  localparam logic [8:0] LE = 9'b100000000, AE = 9'b010000000, WE = 9'b001000000,
                         BE = 9'b000100000, TE = 9'b000010110,
                         OE = 9'b000001100, INIT = 9'b000000001, NONE = 9'b0;

  // one sequence processed with nothing else arriving; `written` stages before it
  task automatic one_seq(int written, int released);
    seq_rdy = 1;
    @(negedge clk); seq_rdy = 0;
    expect_cycle(LE, "load");
    expect_cycle(AE, "add");
    expect_cycle(WE, "store");
    if (written + 1 >= FILL) begin
      expect_cycle(BE, "start");
      for (int k = 0; k < STEPS; k++) expect_cycle(TE, "trace");
      expect_cycle((released == NB - 1) ? (OE | INIT) : OE, "output");
    end
    // after the block's last sequence: releases without input until block_done
    if (written == NB - 1) begin
      for (int r = released + 1; r < NB; r++) begin
        #1 check(flush, "flush high at the end of a block");
        expect_cycle(BE, "flush start");
        for (int k = 0; k < STEPS; k++) expect_cycle(TE, "flush trace");
        expect_cycle((r == NB - 1) ? (OE | INIT) : OE, "flush output");
        n_flush++;
      end
      #1 check(!flush, "flush low in a new block");
    end
    expect_cycle(NONE, "idle");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    expect_cycle(NONE, "idle after reset");
    // two blocks: FILL-1 filling sequences, then NB releases each
    for (int b = 0; b < 2; b++) begin
      for (int i = 0; i < NB; i++) one_seq(i, i - (FILL - 1));
    end
    // a sequence arriving during the traceback is taken up right after the release
    for (int i = 0; i < FILL - 1; i++) one_seq(i, -1);
    seq_rdy = 1; @(negedge clk); seq_rdy = 0;
    expect_cycle(LE, "load A"); expect_cycle(AE, "add A"); expect_cycle(WE, "store A");
    expect_cycle(BE, "start A");
    seq_rdy = 1;
    expect_cycle(TE, "trace A");
    seq_rdy = 0;
    for (int k = 1; k < STEPS; k++) expect_cycle(TE, "trace A");
    expect_cycle(OE, "output A");
    expect_cycle(LE, "load B, queued");
    expect_cycle(AE, "add B"); expect_cycle(WE, "store B");
    expect_cycle(BE, "start B");
    check(!overrun, "no overrun yet");
    // two more while B traces back: the second one overruns
    seq_rdy = 1; @(negedge clk); seq_rdy = 0; @(negedge clk);
    seq_rdy = 1; @(negedge clk); seq_rdy = 0;
    check(overrun, "overrun on a second waiting sequence");
    // after a reset: sequences arriving in the STORE or OUTPUT cycle go straight to LOAD
    // (the fastest fill, one sequence per 3 cycles), without being left pending
    rst = 1; repeat (2) @(negedge clk); rst = 0;
    check(!overrun, "overrun cleared by reset");
    seq_rdy = 1; @(negedge clk); seq_rdy = 0;
    for (int i = 0; i < FILL; i++) begin
      expect_cycle(LE, "back-to-back load"); expect_cycle(AE, "back-to-back add");
      seq_rdy = (i < FILL - 1);
      expect_cycle(WE, "back-to-back store");
      seq_rdy = 0;
    end
    expect_cycle(BE, "start");
    for (int k = 0; k < STEPS; k++) expect_cycle(TE, "trace");
    seq_rdy = 1;
    expect_cycle(OE, "output, next sequence arrives");
    seq_rdy = 0;
    expect_cycle(LE, "load straight after output"); expect_cycle(AE, "add"); expect_cycle(WE, "store");
    expect_cycle(BE, "start");
    for (int k = 0; k < STEPS; k++) expect_cycle(TE, "trace");
    expect_cycle(OE, "output");
    expect_cycle(NONE, "nothing left pending");
    expect_cycle(NONE, "idle");
    check(!overrun, "no overrun at the fastest rate");
    check(n_flush == 2 * (FILL - 1), "end-of-block releases");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
