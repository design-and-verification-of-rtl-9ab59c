// tb_viterbi322_decoder: the decoder in both path memory arrangements, side by side.
//
// The same received stream (encoded random symbols with occasional bit errors) feeds a
// storage-efficient decoder (9/8-deep label registers) and a conventional one (10/10). Each
// is compared symbol by symbol with a reference decoder of its own release depth, the
// release latency is checked (13 and 15 cycles after seq_rdy), and both must reproduce the
// sent symbols while the channel is clean. The conventional decoder's first symbol comes
// one sequence later than the storage-efficient one's; after the block's last sequence
// both release the symbols they still hold, 10 and 12 cycles apart.
`timescale 1ns/1ps
module tb_viterbi322_decoder;
  import viterbi_ref_pkg::*;

  localparam int N_SYM = 24;

  logic       clock = 0, reset = 1;
  logic [2:0] rx = '0;
  logic       seq_rdy = 0;
  logic [1:0] dx_p, dx_c;
  logic       v_p, v_c, se_p, se_c, bd_p, bd_c, ov_p, ov_c;

  viterbi322_decoder #(.PROPOSED(1'b1), .N_SYM(N_SYM)) dut_p (
    .clock, .reset, .Rx(rx), .seq_rdy, .Dx(dx_p), .Dx_valid(v_p), .seq_error(se_p),
    .block_done(bd_p), .overrun(ov_p));
  viterbi322_decoder #(.PROPOSED(1'b0), .N_SYM(N_SYM)) dut_c (
    .clock, .reset, .Rx(rx), .seq_rdy, .Dx(dx_c), .Dx_valid(v_c), .seq_error(se_c),
    .block_done(bd_c), .overrun(ov_c));

  always #5 clock = ~clock;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  typedef struct { logic [1:0] sym; logic [1:0] sent; bit clean; longint due; } exp_t;
  exp_t q_p [$], q_c [$];
  ref_decoder rp = new(9, 8), rc = new(10, 8);
  logic [1:0] sent [$];
  int first_err = 1 << 30;
  int n_p = 0, n_c = 0;

  task automatic push(input ref_decoder r, ref exp_t q [$], input logic [2:0] x, input longint lat);
    logic [1:0] s; bit se; int bm;
    if (r.step(x, s, se, bm)) begin
      exp_t e;
      e.sym = s; e.sent = sent[r.t - r.l0 - 1]; e.clean = (r.t - r.l0 - 1) < first_err;
      e.due = longint'($time / 10) + lat;
      q.push_back(e);
      if (r.t == N_SYM) begin
        // after the block's last sequence: the remaining symbols, one traceback apart
        for (int k = 1; k <= r.l0; k++) begin
          exp_t f = e;
          f.sym  = r.flush(k);
          f.sent = sent[r.t - r.l0 - 1 + k];
          f.clean = (r.t - r.l0 - 1 + k) < first_err;
          f.due  = e.due + k * (lat - 3);
          q.push_back(f);
        end
      end
    end
  endtask

  always @(posedge clock) if (!reset) begin
    if (v_p) begin
      exp_t e; e = q_p.pop_front(); n_p++;
      check(dx_p == e.sym, "storage-efficient: Dx against reference");
      check(longint'($time / 10) == e.due, "storage-efficient: latency 13");
      if (e.clean) check(dx_p == e.sent, "storage-efficient: clean symbol decoded");
    end
    if (v_c) begin
      exp_t e; e = q_c.pop_front(); n_c++;
      check(dx_c == e.sym, "conventional: Dx against reference");
      check(longint'($time / 10) == e.due, "conventional: latency 15");
      if (e.clean) check(dx_c == e.sent, "conventional: clean symbol decoded");
    end
  end

  initial begin
    logic [2:0] st;
    st = '0;
    repeat (3) @(negedge clock);
    reset = 0;
    for (int i = 0; i < N_SYM; i++) begin
      automatic logic [1:0] u = 2'($urandom);
      automatic logic [2:0] x = ref_enc(st, u);
      st = ref_next(st, u);
      sent.push_back(u);
      if (i >= 14 && i % 6 == 0) begin
        x ^= 3'b001 << (i % 3);
        if (first_err > i) first_err = i;
      end
      rx = x; seq_rdy = 1;
      push(rp, q_p, x, 13);
      push(rc, q_c, x, 15);
      @(negedge clock); seq_rdy = 0;
      repeat (15) @(negedge clock);
    end
    repeat (200) @(negedge clock);
    check(n_p == N_SYM, $sformatf("storage-efficient released %0d", n_p));
    check(n_c == N_SYM, $sformatf("conventional released %0d", n_c));
    check(!ov_p && !ov_c, "no overrun");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
