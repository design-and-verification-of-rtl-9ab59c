// tb_waveform_replay: replays the published simulation scenario on both path memory
// arrangements and compares them, as the original comparison of the two decoders did.
//
// The received stream is the 20-word sequence shown in the published waveforms
// (0 1 1 6 5 3 2 3 5 6 5 1 3 0 2 3 5 1 0 4), one block of N_SYM = 20. As in those plots the
// first words arrive close together (one every 3 cycles, the fastest the decoder takes
// while its path memory fills) and later ones are spaced out (one every 16 cycles). The
// same words go to a storage-efficient decoder (PROPOSED=1) and a conventional one
// (PROPOSED=0). Checked:
//   * every released symbol against a reference decoder of the same release depth (9 or 10),
//     including the symbols released after the block's last word;
//   * the latency from seq_rdy to Dx_valid (13 and 15 cycles);
//   * the storage-efficient decoder's first symbol follows the 10th word, the conventional
//     one's the 11th, so the efficient decoder answers earlier, as the plots show;
//   * both release exactly 20 symbols and signal block_done once;
//   * the symbol positions at which the two decoders differ are the ones at which the two
//     references differ (the comparison of the two simulations).
// The word values and the fast-then-slow arrival come from the published plots; the exact
// spacing, in cycles, is this testbench's own, since the plots give no cycle counts.
`timescale 1ns/1ps
module tb_waveform_replay;
  import viterbi_ref_pkg::*;

  localparam int N_SYM = 20;
  localparam logic [2:0] WORDS [N_SYM] = '{3'd0, 3'd1, 3'd1, 3'd6, 3'd5, 3'd3, 3'd2, 3'd3,
                                          3'd5, 3'd6, 3'd5, 3'd1, 3'd3, 3'd0, 3'd2, 3'd3,
                                          3'd5, 3'd1, 3'd0, 3'd4};

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

  typedef struct { logic [1:0] sym; longint due; } exp_t;
  exp_t q_p [$], q_c [$];
  ref_decoder rp = new(9, 8), rc = new(10, 8);
  logic [1:0] ref_p [$], ref_c [$], got_p [$], got_c [$];
  int sent = 0;                 // words given to the decoders so far
  int first_p = -1, first_c = -1;
  int nbd_p = 0, nbd_c = 0;

  task automatic push(input ref_decoder r, ref exp_t q [$], ref logic [1:0] syms [$],
                      input logic [2:0] x, input longint lat);
    logic [1:0] s; bit se; int bm;
    if (r.step(x, s, se, bm)) begin
      exp_t e;
      e.sym = s; e.due = longint'($time / 10) + lat;
      q.push_back(e); syms.push_back(s);
      if (r.t == N_SYM) begin
        for (int k = 1; k <= r.l0; k++) begin
          exp_t f;
          f.sym = r.flush(k);
          f.due = e.due + k * (lat - 3);
          q.push_back(f); syms.push_back(f.sym);
        end
      end
    end
  endtask

  always @(posedge clock) if (!reset) begin
    if (v_p) begin
      exp_t e; e = q_p.pop_front();
      if (first_p < 0) first_p = sent;
      got_p.push_back(dx_p);
      check(dx_p == e.sym, "storage-efficient: Dx against reference");
      check(longint'($time / 10) == e.due, $sformatf("storage-efficient: latency (due %0d)", e.due));
    end
    if (v_c) begin
      exp_t e; e = q_c.pop_front();
      if (first_c < 0) first_c = sent;
      got_c.push_back(dx_c);
      check(dx_c == e.sym, "conventional: Dx against reference");
      check(longint'($time / 10) == e.due, "conventional: latency");
    end
    if (bd_p) nbd_p++;
    if (bd_c) nbd_c++;
  end

  initial begin
    int ndiff_dut, ndiff_ref;
    repeat (3) @(negedge clock);
    reset = 0;
    @(negedge clock);
    for (int i = 0; i < N_SYM; i++) begin
      rx = WORDS[i]; seq_rdy = 1;
      sent = i + 1;
      push(rp, q_p, ref_p, WORDS[i], 13);
      push(rc, q_c, ref_c, WORDS[i], 15);
      @(negedge clock); seq_rdy = 0;
      repeat ((i < 9) ? 2 : 15) @(negedge clock);
    end
    repeat (200) @(negedge clock);

    check(first_p == 10, $sformatf("storage-efficient first symbol after word %0d (10)", first_p));
    check(first_c == 11, $sformatf("conventional first symbol after word %0d (11)", first_c));
    check(got_p.size() == N_SYM, $sformatf("storage-efficient released %0d", got_p.size()));
    check(got_c.size() == N_SYM, $sformatf("conventional released %0d", got_c.size()));
    check(nbd_p == 1 && nbd_c == 1, "one block_done each");
    check(!ov_p && !ov_c, "no overrun");
    ndiff_dut = 0; ndiff_ref = 0;
    for (int i = 0; i < N_SYM && i < got_p.size() && i < got_c.size(); i++) begin
      if (got_p[i] != got_c[i]) ndiff_dut++;
      if (ref_p[i] != ref_c[i]) ndiff_ref++;
      check((got_p[i] != got_c[i]) == (ref_p[i] != ref_c[i]),
            $sformatf("difference between arrangements at symbol %0d", i));
    end
    $display("symbols where the two arrangements differ: %0d (reference %0d)", ndiff_dut, ndiff_ref);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
