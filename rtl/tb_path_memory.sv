// tb_path_memory: traceback path memory of the (3,2,2) decoder.
//
// For every state s there are two shift registers, one for each bit of its backward label:
// P_s[0] (the predecessor's S11 bit) of length L0 and P_s[1] (the predecessor's S22 bit) of
// length L1. In the storage-efficient arrangement L0 = 9 and L1 = 8; the conventional
// arrangement has both 10 long. Only flop 0 of each register is visible, on p_out.
//
// How it moves:
//   we    a new stage of labels enters at flop 0 and every older stage moves one flop
//         further away; the oldest stage drops out of flop L-1.
//   rot0  the bit-0 registers rotate one place towards flop 0 (flop 0 goes round to flop
//         L0-1), so that p_out[s][0] shows the next older stage.
//   rot1  the same for the bit-1 registers.
// A traceback rotates each register exactly as many times as it is long, which reads the
// stages newest first and leaves the memory as it was for the next traceback. The register
// lengths, the per-state 2-bit ports, the we enable and the output at flop 0 are those of
// the path memory diagrams; the direction in which writes shift and the rotation used to
// read are this design's own, since a traceback must read the newest stage first.
//
// Timing: all operations take effect at the clock edge; p_out is the content of flop 0.
module tb_path_memory
  import viterbi322_pkg::*;
#(
  parameter int unsigned L0 = 9,     // length of the bit-0 registers
  parameter int unsigned L1 = 8      // length of the bit-1 registers
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   we,
  input  logic   rot0,
  input  logic   rot1,
  input  label_t p_in  [NSTATES],
  output label_t p_out [NSTATES]
);

  logic [L0-1:0] r0 [NSTATES];    // flop i of P_s[0] is r0[s][i]
  logic [L1-1:0] r1 [NSTATES];

  for (genvar s = 0; s < NSTATES; s++) begin : g_state
    always_ff @(posedge clk) begin
      if (rst) begin
        r0[s] <= '0;
        r1[s] <= '0;
      end else if (we) begin
        r0[s] <= {r0[s][L0-2:0], p_in[s][0]};
        r1[s] <= {r1[s][L1-2:0], p_in[s][1]};
      end else begin
        if (rot0) r0[s] <= {r0[s][0], r0[s][L0-1:1]};
        if (rot1) r1[s] <= {r1[s][0], r1[s][L1-1:1]};
      end
    end
    assign p_out[s] = {r1[s][0], r0[s][0]};
  end

endmodule
