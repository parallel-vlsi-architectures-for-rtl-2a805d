// syndrome_check: evaluates the stopping rule H * x_hat = 0 of the decoder.
// For every check c it XORs the hard decision of parity bit c with the
// parity of the message-bit decisions in that row, built from the same
// permutation and Parity-Check units as the encoder. ok is high when all 64
// syndrome bits are zero. Combinational. The published architecture states the rule; this
// way of evaluating it is this design's choice.
module syndrome_check
  import ldpc_pkg::*;
(
  input  logic [N-1:0] x_hat,   // codeword order: parity bits, then message
  output logic [M-1:0] syn,
  output logic         ok
);

  logic [K-1:0] perm_bits [GROUPS];
  logic [M-1:0] par;

  for (genvar g = 0; g < GROUPS; g++) begin : g_branch
    pcpc_permute #(.G(g)) u_perm (
      .m (x_hat[N-1:M]),
      .y (perm_bits[g])
    );
    parity_check u_pc (
      .x (perm_bits[g]),
      .p (par[g*ROWS +: ROWS])
    );
  end

  assign syn = par ^ x_hat[M-1:0];
  assign ok  = (syn == '0);

endmodule
