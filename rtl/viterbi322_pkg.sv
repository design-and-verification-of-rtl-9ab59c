// viterbi322_pkg: types, sizes and trellis functions shared by the (3,2,2) encoder and
// Viterbi decoder.
//
// The code has k = 2 input bits, n = 3 output bits and m = 2 memory registers per symbol.
// A trellis state is the content of the three encoder registers, written {S22,S21,S11};
// an information symbol is {U2,U1} and a code word is {V3,V2,V1}:
//   V1 = U1 ^ S11 ^ S21,  V2 = U2 ^ S11 ^ S22,  V3 = U1 ^ U2 ^ S22
//   next state = {S21, U2, U1}
// Every state has four predecessors {x, S22, y}; the 2-bit backward label {x,y} (the
// predecessor's S22 and S11 bits) names which one survived. These equations and bit orders
// follow the encoder connection diagram and its state diagram; the path metric width
// (4 bits, all ones standing for "unreachable") follows the decoder's block diagram.
package viterbi322_pkg;

  localparam int unsigned K_IN     = 2;   // input bits per symbol
  localparam int unsigned N_OUT    = 3;   // code bits per symbol
  localparam int unsigned M_MEM    = 2;   // memory registers
  localparam int unsigned NSTATES  = 8;   // 2^(S22,S21,S11)
  localparam int unsigned PM_W     = 4;   // path metric width
  localparam int unsigned HD_W     = 2;   // branch metric width (Hamming distance 0..3)

  typedef logic [2:0]      state_t;   // {S22, S21, S11}
  typedef logic [1:0]      sym_t;     // {U2, U1}
  typedef logic [2:0]      code_t;    // {V3, V2, V1}
  typedef logic [1:0]      label_t;   // backward label {pred S22, pred S11}
  typedef logic [PM_W-1:0] pm_t;
  typedef logic [HD_W-1:0] hd_t;

  localparam pm_t PM_INF = '1;        // saturated metric: state not reachable

  // Code word emitted on the branch leaving state s with input u.
  function automatic code_t enc_out(state_t s, sym_t u);
    code_t v;
    v[0] = u[0] ^ s[0] ^ s[1];
    v[1] = u[1] ^ s[0] ^ s[2];
    v[2] = u[0] ^ u[1] ^ s[2];
    return v;
  endfunction

  function automatic state_t next_state(state_t s, sym_t u);
    return {s[1], u[1], u[0]};
  endfunction

  // Predecessor of destination d selected by backward label b.
  function automatic state_t pred_state(state_t d, label_t b);
    return {b[1], d[2], b[0]};
  endfunction

  // Information symbol carried by every branch that enters state d.
  function automatic sym_t sym_of(state_t d);
    return {d[1], d[0]};
  endfunction

endpackage
