// viterbi322_top: transmitter and receiver of the (3,2,2) coded link, side by side.
//
// The convolutional encoder turns 2-bit symbols into 3-bit code words; the Viterbi
// decoder recovers the symbols from received 3-bit sequences. The channel between them is
// outside the chip, so the encoder's code word and the decoder's received sequence are
// separate ports: connect enc_v to dec_rx directly for a loop-back, or through a channel
// model. All parameters pass to the decoder (see viterbi322_decoder).
module viterbi322_top
  import viterbi322_pkg::*;
#(
  parameter bit          PROPOSED    = 1'b1,
  parameter int unsigned T_CONV      = 10,
  parameter int unsigned N_SYM       = 32,
  parameter int unsigned SYNC_THRESH = 8
) (
  input  logic   clock,
  input  logic   reset,
  // transmitter
  input  logic   enc_clr,
  input  logic   enc_en,
  input  sym_t   enc_u,
  output code_t  enc_v,
  output logic   enc_v_valid,
  // receiver
  input  code_t  dec_rx,
  input  logic   dec_seq_rdy,
  output sym_t   dec_dx,
  output logic   dec_dx_valid,
  output logic   dec_seq_error,
  output logic   dec_block_done,
  output logic   dec_overrun
);

  state_t enc_state;

  conv_encoder322 u_enc (
    .clk(clock), .rst(reset), .clr(enc_clr), .en(enc_en), .u(enc_u),
    .v(enc_v), .v_valid(enc_v_valid), .state(enc_state)
  );

  viterbi322_decoder #(
    .PROPOSED(PROPOSED), .T_CONV(T_CONV), .N_SYM(N_SYM), .SYNC_THRESH(SYNC_THRESH)
  ) u_dec (
    .clock(clock), .reset(reset), .Rx(dec_rx), .seq_rdy(dec_seq_rdy),
    .Dx(dec_dx), .Dx_valid(dec_dx_valid), .seq_error(dec_seq_error),
    .block_done(dec_block_done), .overrun(dec_overrun)
  );

endmodule
