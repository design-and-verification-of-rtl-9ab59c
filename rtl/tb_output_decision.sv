// tb_output_decision: start-state selection, traceback register and output decision of
// the (3,2,2) decoder.
//
// be (start state): a <= comparator tree finds the state with the smallest path metric
//    (the lowest-numbered one on a tie) and loads it into the traceback register
//    {s22,s21,s11}. If that smallest metric is at or above SYNC_THRESH the decoder is out of
//    step with the received sequence and sync_error is raised until the next be.
//    tb_ptr is loaded with TB_STEPS.
// te (traceback): an 8:1 multiplexer picks the backward label b = {b2,b1} of the current
//    state from the path memory outputs; the register moves to the predecessor
//    {b2, s22, b1} and tb_ptr counts down. tb_done marks the last step (tb_ptr = 1).
// oe (output decision): the decoded symbol is released with dx_valid, which is oe itself
//    (the symbol is valid exactly in the OUTPUT cycle). In the conventional
//    arrangement (PROPOSED = 0) it is {s21,s11} of the traceback register. In the
//    storage-efficient one it is {s22, b1}, taken one stage earlier: the register's s22 and
//    the bit-0 label of the oldest stored stage, so the oldest bit-1 label and the last
//    traceback step are not needed. symbol_cnt counts released symbols; block_done marks
//    the release of the N_SYM-th symbol of a block, and `init` clears the count.
// flush: once the last sequence of a block has been stored, the control unit repeats
//    be/te/oe without new input. Pass k (k = 1, 2, ...) stops following the labels k steps
//    earlier than a full traceback, so it releases the symbol k stages newer, always from
//    {s21,s11}; the memory is turned as usual. After L0 such passes all symbols of the
//    block are out.
// The two output wirings, the comparator, the threshold compare with be, tb_ptr and
// symbol_cnt are those of the two output decision diagrams; the way a flush pass shortens
// the traceback is this design's own. The threshold value and the
// block length are not given and are parameters here; dx is driven to 0 instead of
// floating when no symbol is released.
module tb_output_decision
  import viterbi322_pkg::*;
#(
  parameter bit          PROPOSED    = 1'b1,
  parameter int unsigned TB_STEPS    = 8,     // traceback steps per symbol
  parameter int unsigned N_SYM       = 32,    // symbols per block
  parameter int unsigned SYNC_THRESH = 8     // out-of-sync threshold on the best metric
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   init,
  input  logic   be,
  input  logic   te,
  input  logic   oe,
  input  logic   flush,           // block input complete: releases shorten the traceback
  input  pm_t    a_out [NSTATES],
  input  label_t p_out [NSTATES],
  output sym_t   dx,
  output logic   dx_valid,
  output logic   sync_error,
  output logic   tb_done,
  output logic   block_done,
  output state_t tb_state          // {s22,s21,s11}, for observation
);

  localparam int unsigned PTR_W = $clog2(TB_STEPS + 1);
  localparam int unsigned CNT_W = $clog2(N_SYM + 1);

  state_t            st;           // {s22, s21, s11}
  logic [PTR_W-1:0]  tb_ptr;
  logic [CNT_W-1:0]  symbol_cnt;
  logic [PTR_W:0]    fl;           // flush passes done (k)

  // Minimum search over the eight path metrics.
  state_t min_st;
  pm_t    min_metric;
  always_comb begin
    min_st     = '0;
    min_metric = a_out[0];
    for (int s = 1; s < NSTATES; s++) begin
      if (!(min_metric <= a_out[s])) begin
        min_st     = state_t'(s);
        min_metric = a_out[s];
      end
    end
  end

  label_t b;
  assign b = p_out[st];

  // The traceback register follows the labels for L0 - k steps of pass k (k = 0 outside
  // the flush); the memory still turns a full traceback's worth. For k = 0 in the
  // storage-efficient wiring the last of the L0 steps is replaced by the {s22,b1} output.
  // Step i of a pass is the one with tb_ptr = TB_STEPS - i.
  localparam int unsigned L0 = PROPOSED ? TB_STEPS + 1 : TB_STEPS;
  logic follow;
  assign follow = (int'(TB_STEPS) - int'(tb_ptr)) < (int'(L0) - int'(fl));

  always_ff @(posedge clk) begin
    if (rst) begin
      st         <= '0;
      tb_ptr     <= '0;
      sync_error <= 1'b0;
    end else if (be) begin
      st         <= min_st;
      tb_ptr     <= PTR_W'(TB_STEPS);
      sync_error <= (min_metric >= pm_t'(SYNC_THRESH));
    end else if (te) begin
      if (follow) st <= {b[1], st[2], b[0]};
      tb_ptr     <= tb_ptr - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst || init) begin
      symbol_cnt <= '0;
      fl         <= '0;
    end else if (oe) begin
      symbol_cnt <= symbol_cnt + 1'b1;
      if (flush) fl <= fl + 1'b1;
    end
  end

  assign tb_done    = te && (tb_ptr == PTR_W'(1));
  assign block_done = oe && (symbol_cnt == CNT_W'(N_SYM - 1));
  assign dx_valid   = oe;
  assign dx         = !oe ? sym_t'('0) :
                      (PROPOSED && fl == '0) ? {st[2], b[0]} : {st[1], st[0]};
  assign tb_state   = st;

endmodule
