// tb_viterbi322_top: end-to-end test of the coded link at the default sizes.
//
// Random 2-bit symbols go through the encoder, a channel that flips chosen bits, and the
// decoder. Every decoded symbol is compared with a reference decoder fed with the same
// received sequences, and with the symbol actually sent wherever the channel was clean.
// Blocks exercise: filling at the highest rate (a sequence every 3 cycles, each one taken
// straight from the end of the previous one), steady state with the latency checked on
// every symbol whose sequence the decoder took at once, sequences queued while it is
// busy, corrected channel errors, a very noisy block that must raise seq_error, the move to
// the releases at the end of each block that need no further input, the move to the next
// block on block_done, and finally an overrun. Each of these is counted and a
// failure is counted for any that never happened.
`timescale 1ns/1ps
module tb_viterbi322_top;
  import viterbi_ref_pkg::*;

  localparam int N_SYM  = 32;      // decoder defaults
  localparam int L0     = 9;
  localparam int THRESH = 8; 
  localparam int LAT    = 13;      // seq_rdy to Dx_valid, storage-efficient arrangement
  localparam int FLUSH_GAP = 10;   // between end-of-block releases (8 traceback steps + 2)

  logic       clock = 0, reset = 1;
  logic       enc_clr = 0, enc_en = 0;
  logic [1:0] enc_u = '0;
  logic [2:0] enc_v;
  logic       enc_v_valid;
  logic [2:0] dec_rx = '0;
  logic       dec_seq_rdy = 0;
  logic [1:0] dec_dx;
  logic       dec_dx_valid, dec_seq_error, dec_block_done, dec_overrun;

  viterbi322_top dut (.*);

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clock) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // expected releases
  typedef struct { logic [1:0] sym; logic [1:0] sent; bit clean; bit sparse; bit sync; bit flush; longint due; } exp_t;
  exp_t exp_q [$];
  ref_decoder rd = new(L0, THRESH);

  int n_flush = 0, n_fill_fast = 0, n_out = 0, n_queued = 0, n_corrected = 0, n_sync = 0,
      n_blocks = 0, n_overrun = 0, n_lat = 0, n_direct = 0;

  // one sequence: encode u, corrupt with err, present to the decoder, wait gap cycles
  logic [2:0] enc_model = '0;
  bit         sparse_blk = 0;          // isolated single-bit errors only
  logic [1:0] sent_hist [$];
  bit         err_hist  [$];
  task automatic send(logic [1:0] u, logic [2:0] err, bit first, int gap, bit noisy_rx = 0);
    logic [1:0] sym; bit se; int bm; logic [2:0] rx; bit direct;
    @(negedge clock);
    enc_en = 1; enc_u = u; enc_clr = first;
    @(negedge clock);
    enc_en = 0; enc_clr = 0;
    check(enc_v_valid, "encoder valid");
    if (first) enc_model = '0;
    check(enc_v == ref_enc(enc_model, u), "encoder code word");
    enc_model = ref_next(enc_model, u);
    rx = noisy_rx ? rd.worst_rx() : enc_v ^ err;
    dec_rx = rx; dec_seq_rdy = 1;
    #1;
    // taken at once (in IDLE, or in the last cycle of the previous word) or left waiting
    direct = dut.u_dec.u_ctl.take;
    if (!direct) n_queued++;
    else if (dut.u_dec.u_ctl.state != dut.u_dec.u_ctl.IDLE) n_direct++;
    sent_hist.push_back(u); err_hist.push_back(err != 0 || noisy_rx);
    if (rd.step(rx, sym, se, bm)) begin
      exp_t e;
      int idx = rd.t - L0 - 1;             // index of the released symbol in this block
      e.sym = sym; e.sent = sent_hist[idx];
      e.clean = 1;
      for (int k = 0; k < sent_hist.size(); k++) if (err_hist[k]) e.clean = 0;
      e.sync = se;
      e.sparse = sparse_blk;
      e.flush = 0;
      e.due  = direct ? longint'($time / 10) + longint'(LAT) : -1;
      exp_q.push_back(e);
      // last sequence of the block: the symbols still held follow without input
      if (rd.t == N_SYM) begin
        for (int k = 1; k <= L0; k++) begin
          exp_t f = e;
          f.sym  = rd.flush(k);
          f.sent = sent_hist[idx + k];
          f.sync = rd.flush_sync();
          f.due  = (e.due < 0) ? -1 : e.due + k * FLUSH_GAP;
          f.flush = 1;
          exp_q.push_back(f);
        end
      end
    end
    @(negedge clock);
    dec_seq_rdy = 0;
    repeat (gap - 1) @(negedge clock);
  endtask

  // compare every release
  always @(posedge clock) if (!reset && dec_dx_valid) begin
    n_out++;
    if (exp_q.size() == 0) check(0, "unexpected Dx_valid");
    else begin
      exp_t e;
      e = exp_q.pop_front();
      check(dec_dx == e.sym, $sformatf("Dx %0d, reference %0d", dec_dx, e.sym));
      check(dec_seq_error == e.sync, "seq_error against reference");
      if (e.sync) n_sync++;
      if (e.flush) n_flush++;
      if (e.clean) check(dec_dx == e.sent, "clean channel: Dx equals sent symbol");
      if (e.sparse) check(dec_dx == e.sent, "isolated channel errors corrected");
      if (!e.clean && dec_dx == e.sent) n_corrected++;
      if (e.due >= 0) begin
        check(longint'($time / 10) == e.due, $sformatf("latency: out at %0d, due %0d", $time / 10, e.due));
        n_lat++;
      end
    end
    if (dec_block_done) begin
      n_blocks++;
      check(exp_q.size() == 0 && rd.t == N_SYM, "block_done with last symbol");
    end
  end

  // a block of N_SYM sequences; its last L0 symbols come out after the last sequence
  task automatic block(int mode);
    rd.start_block();
    sparse_blk = (mode == 1);
    sent_hist.delete(); err_hist.delete();
    for (int i = 0; i < N_SYM; i++) begin
      logic [1:0] u = 2'($urandom);
      logic [2:0] err = '0;
      int gap = LAT + 1;
      bit noisy = 0;
      case (mode)
        0: if (i < L0 + 1) begin gap = 3; n_fill_fast++; end   // fastest fill, clean
        1: if (i % 16 == 5) err = 3'b001 << (i % 3);           // isolated errors
        2: begin if (i % 7 == 3) gap = 5; if ($urandom_range(0, 30) == 0) err = 3'($urandom); end
        3: noisy = (i >= 4);                                   // channel lost
        default: ;
      endcase
      send(u, err, i == 0, gap, noisy);
    end
    // wait for the block's last release
    repeat (LAT + L0 * FLUSH_GAP + 20) @(negedge clock);
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 0;
    block(0);
    block(1);
    block(2);
    block(3);
    block(1);
    check(exp_q.size() == 0, "all releases seen");
    // overrun: two sequences back to back while the decoder traces back
    begin
      int before_q;
      for (int i = 0; i < L0 + 3; i++) begin
        @(negedge clock); dec_rx = 3'($urandom); dec_seq_rdy = 1;
        @(negedge clock); dec_seq_rdy = 0;
      end
      repeat (2) @(negedge clock);
      if (dec_overrun) n_overrun++;
      check(dec_overrun, "overrun raised");
      before_q = 0;
    end
    $display("mechanisms: flush=%0d fast_fill=%0d releases=%0d latency_checked=%0d queued=%0d corrected=%0d sync_error=%0d blocks=%0d overrun=%0d direct=%0d",
             n_flush, n_fill_fast, n_out, n_lat, n_queued, n_corrected, n_sync, n_blocks, n_overrun, n_direct);
    check(n_fill_fast > 0, "fast fill exercised");
    check(n_flush == 5 * L0, "end-of-block releases");
    check(n_lat > 0, "latency measured");
    check(n_queued > 0, "queued sequence exercised");
    check(n_direct > 0, "sequence taken straight from the end of the previous one");
    check(n_corrected > 0, "channel error corrected");
    check(n_sync > 0, "seq_error raised");
    check(n_blocks >= 5, "block_done seen for every block");
    check(n_overrun > 0, "overrun exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
