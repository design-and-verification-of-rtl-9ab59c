// conv_encoder322: (3,2,2) convolutional encoder, rate 2/3.
//
// Each cycle with `en` high it takes one 2-bit information symbol u = {U2,U1}, registers
// the 3-bit code word v = {V3,V2,V1} computed from u and the present register contents,
// and shifts U1 into S11 and U2 through S21 into S22. The connection equations are the
// ones of the encoder connection diagram (see viterbi322_pkg). `clr` returns the registers
// to the all-zero state, which is where the decoder expects every block to start; it is a
// choice of this design, as is registering the code word.
//
// Timing: v and v_valid appear the cycle after en; one symbol per cycle.
module conv_encoder322
  import viterbi322_pkg::*;
(
  input  logic   clk,
  input  logic   rst,       // synchronous, active high
  input  logic   clr,       // return to state 000 (block start)
  input  logic   en,        // a new symbol on u
  input  sym_t   u,         // {U2, U1}
  output code_t  v,         // {V3, V2, V1}
  output logic   v_valid,
  output state_t state      // {S22, S21, S11}
);

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= '0;
      v       <= '0;
      v_valid <= 1'b0;
    end else begin
      v_valid <= en;
      if (en) begin
        v     <= enc_out(clr ? state_t'('0) : state, u);
        state <= next_state(clr ? state_t'('0) : state, u);
      end else if (clr) begin
        state <= '0;
      end
    end
  end

endmodule
