// viterbi322_decoder: hard-decision traceback Viterbi decoder for the (3,2,2) code with
// the storage-efficient path memory.
//
// A received 3-bit sequence Rx, marked by a one-cycle seq_rdy pulse, is captured in an
// input register. The control unit then loads the eight branch metrics (BMU), adds and
// compares them against the stored path metrics (ACSU), and writes the new metrics into the
// path metric memory and the eight surviving backward labels into the traceback path
// memory. Once the path memory holds enough stages, every further sequence is followed by
// a traceback from the best state and the release of one decoded 2-bit symbol on Dx with
// Dx_valid. seq_error reports that the best path metric reached SYNC_THRESH.
//
// PROPOSED = 1 (default) is the storage-efficient arrangement: bit-0 label registers 9
// deep, bit-1 registers 8 deep, 8 traceback steps, and the symbol taken from {s22, b1}.
// PROPOSED = 0 gives the conventional one: both registers 10 deep, 10 steps, symbol from
// {s21, s11}. In both, the first symbol comes out after L0 + 1 sequences and each later
// sequence releases the symbol received L0 sequences earlier. A block is N_SYM sequences;
// after its last one the decoder releases the L0 symbols still held, one shortened
// traceback each, raises block_done with the N_SYM-th symbol and starts the next block
// from fresh path metrics.
//
// Timing: one sequence every 3 cycles while filling, then TB_STEPS + 5 cycles per sequence
// (13 with the defaults): Dx_valid rises TB_STEPS + 5 cycles after the seq_rdy pulse when
// the pulse finds the decoder idle or in the last cycle of the previous sequence. The
// end-of-block releases follow every TB_STEPS + 2 cycles.
// seq_rdy pulses closer together than that are queued one deep; a second one raises
// overrun. The block structure and port list follow the decoder's block diagram and signal
// table; the input register, the queue and the overrun flag are this design's own.
module viterbi322_decoder
  import viterbi322_pkg::*;
#(
  parameter bit          PROPOSED    = 1'b1,
  parameter int unsigned T_CONV      = 10,   // conventional path memory length
  parameter int unsigned N_SYM       = 32,   // decoded symbols per block
  parameter int unsigned SYNC_THRESH = 8
) (
  input  logic  clock,
  input  logic  reset,        // synchronous, active high
  input  code_t Rx,
  input  logic  seq_rdy,
  output sym_t  Dx,
  output logic  Dx_valid,
  output logic  seq_error,
  output logic  block_done,
  output logic  overrun
);

  localparam int unsigned L0       = PROPOSED ? T_CONV - 1 : T_CONV;
  localparam int unsigned L1       = PROPOSED ? T_CONV - 2 : T_CONV;
  localparam int unsigned TB_STEPS = L1;
  localparam int unsigned FILL     = L0 + 1;

  code_t  rx_q;
  logic   le, ae, we, be, te, oe, rot0, rot1, init, flush, tb_done;
  hd_t    hd    [NSTATES];
  pm_t    a_out [NSTATES];
  pm_t    a_in  [NSTATES];
  label_t bx    [NSTATES];
  label_t p_out [NSTATES];
  state_t tb_state;

  always_ff @(posedge clock) begin
    if (reset)        rx_q <= '0;
    else if (seq_rdy) rx_q <= Rx;
  end

  control322 #(.FILL(FILL), .EXTRA_ROT0(PROPOSED), .N_SYM(N_SYM)) u_ctl (
    .clk(clock), .rst(reset), .seq_rdy(seq_rdy), .tb_done(tb_done), .block_done(block_done),
    .le(le), .ae(ae), .we(we), .be(be), .te(te), .oe(oe), .rot0(rot0), .rot1(rot1),
    .init(init), .flush(flush), .overrun(overrun)
  );

  bmu322 u_bmu (.clk(clock), .rst(reset), .le(le), .rx(rx_q), .hd(hd));

  acsu322 u_acsu (
    .clk(clock), .rst(reset), .ae(ae), .a_out(a_out), .hd(hd), .a_in(a_in), .bx(bx)
  );

  pm_memory u_pmm (
    .clk(clock), .rst(reset), .init(init), .we(we), .a_in(a_in), .a_out(a_out)
  );

  tb_path_memory #(.L0(L0), .L1(L1)) u_pm (
    .clk(clock), .rst(reset), .we(we), .rot0(rot0), .rot1(rot1), .p_in(bx), .p_out(p_out)
  );

  tb_output_decision #(
    .PROPOSED(PROPOSED), .TB_STEPS(TB_STEPS), .N_SYM(N_SYM), .SYNC_THRESH(SYNC_THRESH)
  ) u_tod (
    .clk(clock), .rst(reset), .init(init), .be(be), .te(te), .oe(oe), .flush(flush),
    .a_out(a_out), .p_out(p_out),
    .dx(Dx), .dx_valid(Dx_valid), .sync_error(seq_error),
    .tb_done(tb_done), .block_done(block_done), .tb_state(tb_state)
  );

endmodule
