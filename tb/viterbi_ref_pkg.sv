// viterbi_ref_pkg: reference models used by the testbenches of the (3,2,2) encoder and
// Viterbi decoder. Written from the code's equations on their own, without the RTL
// package: an encoder, a Hamming distance, and a complete traceback Viterbi decoder that
// keeps every stage it has seen and decodes with the same rules as the hardware (4-bit
// metrics that stick at 15, lowest label / lowest state wins a tie, release depth L0).
package viterbi_ref_pkg;

  // state = {S22,S21,S11}, u = {U2,U1}, code word = {V3,V2,V1}
  function automatic logic [2:0] ref_enc(logic [2:0] st, logic [1:0] u);
    logic s11, s21, s22, u1, u2;
    {s22, s21, s11} = st;
    {u2, u1} = u;
    return {u1 ^ u2 ^ s22, u2 ^ s11 ^ s22, u1 ^ s11 ^ s21};
  endfunction

  function automatic logic [2:0] ref_next(logic [2:0] st, logic [1:0] u);
    return {st[1], u};
  endfunction

  function automatic int ref_hd(logic [2:0] a, logic [2:0] b);
    return int'(a[0] != b[0]) + int'(a[1] != b[1]) + int'(a[2] != b[2]);
  endfunction

  class ref_decoder;
    int          l0;                    // stages kept before the first release
    int          thresh;
    int          pm [8];
    logic [1:0]  lab [$][8];            // backward labels of every stage seen
    int          t;                     // stages seen in this block

    function new(int l0_i, int thresh_i);
      l0 = l0_i; thresh = thresh_i; start_block();
    endfunction

    function void start_block();
      foreach (pm[s]) pm[s] = (s == 0) ? 0 : 15;
      lab.delete();
      t = 0;
    endfunction

    // The received word that raises the best path metric most: a channel that has lost
    // the transmitted signal altogether.
    function logic [2:0] worst_rx();
      int best_of = -1;
      logic [2:0] w = '0;
      for (int r = 0; r < 8; r++) begin
        int mn = 99;
        for (int d = 0; d < 8; d++)
          for (int j = 0; j < 4; j++) begin
            logic [2:0] p = {j[1], d[2], j[0]};
            int c = (pm[p] == 15) ? 15 : pm[p] + ref_hd(3'(r), ref_enc(p, d[1:0]));
            if (c < mn) mn = c;
          end
        if (mn > best_of) begin best_of = mn; w = 3'(r); end
      end
      return w;
    endfunction

    // One received sequence. Returns 1 and the released symbol when one is due.
    function bit step(logic [2:0] rx, output logic [1:0] sym, output bit sync_err,
                      output int best_metric);
      int         npm [8];
      logic [1:0] nl  [8];
      for (int d = 0; d < 8; d++) begin
        int best = 99;
        for (int j = 0; j < 4; j++) begin
          logic [2:0] p = {j[1], d[2], j[0]};      // predecessor for label j
          int m = pm[p];
          int c = (m == 15) ? 15 : m + ref_hd(rx, ref_enc(p, d[1:0]));
          if (c > 15) c = 15;
          if (c < best) begin best = c; nl[d] = j[1:0]; end
        end
        npm[d] = best;
      end
      pm = npm;
      lab.push_back(nl);
      t++;
      sym = '0; sync_err = 0; best_metric = 0;
      if (t < l0 + 1) return 0;
      begin
        int          bs = 0;
        logic [2:0]  s;
        for (int k = 1; k < 8; k++) if (pm[k] < pm[bs]) bs = k;
        best_metric = pm[bs];
        sync_err = (pm[bs] >= thresh);
        s = 3'(bs);
        // walk back to the state reached at stage t-l0, then read its symbol
        for (int k = t; k > t - l0; k--) begin
          logic [1:0] b = lab[k-1][s];
          s = {b[1], s[2], b[0]};
        end
        sym = {s[1], s[0]};
      end
      return 1;
    endfunction
    // End of block, pass k = 1..l0: the symbol k stages newer than the last release, read
    // from the same best final state along a traceback k steps shorter.
    function logic [1:0] flush(int k);
      int         bs = 0;
      logic [2:0] s;
      for (int j = 1; j < 8; j++) if (pm[j] < pm[bs]) bs = j;
      s = 3'(bs);
      for (int j = t; j > t - l0 + k; j--) begin
        logic [1:0] b = lab[j-1][s];
        s = {b[1], s[2], b[0]};
      end
      return {s[1], s[0]};
    endfunction

    function bit flush_sync();
      int bs = 0;
      for (int j = 1; j < 8; j++) if (pm[j] < pm[bs]) bs = j;
      return pm[bs] >= thresh;
    endfunction
  endclass

endpackage
