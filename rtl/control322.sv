// control322: sequencer of the (3,2,2) decoder.
//
// A state machine moves each received sequence through the pipeline by raising one
// control signal per state:
//   IDLE   wait for a received sequence (seq_rdy, remembered in `pend` if it comes while
//          the decoder is busy; one arriving in the last cycle of STORE or OUTPUT is taken
//          straight to LOAD, as in IDLE)
//   LOAD   le: branch metrics into the BMU registers
//   ADD    ae: path metric + branch metric sums into the ACS registers
//   STORE  we: new path metrics and backward labels into the two memories; wr_ptr counts
//          the stages written, up to FILL
//   START  be: best state into the traceback register          (once wr_ptr = FILL)
//   TRACE  te: one traceback step per cycle until tb_done
//   OUTPUT oe: release one decoded symbol; rot0 also turns the bit-0 path memory once more
//          when EXTRA_ROT0 is set (storage-efficient arrangement)
// After OUTPUT the machine returns to LOAD or IDLE for the next sequence. Once the N_SYM-th
// sequence of a block is stored, `flush` is high and OUTPUT goes straight back to START,
// releasing the symbols still in the memory one traceback at a time (the traceback unit
// shortens each pass); on block_done it pulses init (fresh path metrics, counters cleared)
// and returns to IDLE. A sequence arriving meanwhile waits for the next block. The states,
// their order, their enables and the return from OUTPUT to START at the end of a block
// follow the decoder state diagram; the exact end-of-block condition, and leaving STORE
// straight for START or IDLE instead of passing LOAD again, are this design's own.
//
// Timing per sequence once the memory is full: LOAD, ADD, STORE, START, TB_STEPS x TRACE,
// OUTPUT, i.e. TB_STEPS + 5 cycles; while filling, 3 cycles; each flush release
// TB_STEPS + 2 cycles.
module control322 #(
  parameter int unsigned FILL       = 10,     // stages written before the first traceback
  parameter bit          EXTRA_ROT0 = 1'b1,
  parameter int unsigned N_SYM      = 32      // received sequences (and symbols) per block
) (
  input  logic clk,
  input  logic rst,
  input  logic seq_rdy,
  input  logic tb_done,
  input  logic block_done,
  output logic le,
  output logic ae,
  output logic we,
  output logic be,
  output logic te,
  output logic oe,
  output logic rot0,
  output logic rot1,
  output logic init,
  output logic flush,         // all sequences of the block stored: releases without input
  output logic overrun        // a sequence arrived while another was still pending
);

  typedef enum logic [2:0] {
    IDLE, LOAD, ADD, STORE, START, TRACE, OUTPUT
  } ctl_state_e;

  localparam int unsigned WP_W = $clog2(FILL + 1);

  // a block must at least fill the path memory
  if (N_SYM < FILL) begin : g_check
    $error("control322: N_SYM (%0d) must not be smaller than FILL (%0d)", N_SYM, FILL);
  end
  localparam int unsigned RC_W = $clog2(N_SYM + 1);

  ctl_state_e       state, state_n;
  logic [WP_W-1:0]  wr_ptr;
  logic             pend;
  logic             take;         // seq_rdy starts LOAD at once, so it need not wait
  logic             full_n;
  logic [RC_W-1:0]  rcv_cnt;      // sequences stored in this block
  logic             last_n;       // this STORE is the block's last

  assign last_n = (rcv_cnt == RC_W'(N_SYM - 1));
  assign flush  = (rcv_cnt == RC_W'(N_SYM));

  assign full_n = (wr_ptr >= WP_W'(FILL - 1));   // this STORE fills the memory

  always_comb begin
    state_n = state;
    le = 1'b0; ae = 1'b0; we = 1'b0; be = 1'b0; te = 1'b0; oe = 1'b0; init = 1'b0;
    unique case (state)
      IDLE:   if (pend || seq_rdy) state_n = LOAD;
      LOAD:   begin le = 1'b1; state_n = ADD; end
      ADD:    begin ae = 1'b1; state_n = STORE; end
      STORE:  begin
                we = 1'b1;
                if (full_n || last_n) state_n = START;
                else if (pend || seq_rdy) state_n = LOAD;
                else           state_n = IDLE;
              end
      START:  begin be = 1'b1; state_n = TRACE; end
      TRACE:  begin te = 1'b1; if (tb_done) state_n = OUTPUT; end
      OUTPUT: begin
                oe = 1'b1;
                if (block_done) begin init = 1'b1; state_n = IDLE; end
                else if (flush) state_n = START;
                else if (pend || seq_rdy) state_n = LOAD;
                else            state_n = IDLE;
              end
      default: state_n = IDLE;
    endcase
    take = seq_rdy && !pend && (state_n == LOAD);
    rot1 = te;
    rot0 = te || (oe && EXTRA_ROT0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= IDLE;
      wr_ptr  <= '0;
      rcv_cnt <= '0;
      pend    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      state <= state_n;
      if (init)                  rcv_cnt <= '0;
      else if (we)               rcv_cnt <= rcv_cnt + 1'b1;
      if (init)                  wr_ptr <= '0;
      else if (we && !full_n)    wr_ptr <= wr_ptr + 1'b1;
      else if (we)               wr_ptr <= WP_W'(FILL);
      // a seq_rdy that moves the machine to LOAD directly is consumed at once
      if (seq_rdy && !take) begin
        overrun <= overrun | (pend && !le);
        pend    <= 1'b1;
      end else if (le) begin
        pend    <= 1'b0;
      end
    end
  end

endmodule
