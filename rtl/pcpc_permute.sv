// pcpc_permute: the column permutation pi_G of Fig. 2, mapping the 512
// message bits onto the columns of P1 so that the following parity-check unit
// sees them in check order. Output bit pi_G(j) carries input bit j.
//
// The block is pure routing, as the encoder description intends; it has no
// gates and no timing of its own. G = 0 is the identity (the unpermuted P1
// branch); G = 1..3 use the pseudo-random permutations defined in ldpc_pkg,
// which are this design's choice since the exact permutations are not given.
module pcpc_permute
  import ldpc_pkg::*;
#(
  parameter int G = 1
) (
  input  logic [K-1:0] m,   // message bits, bit j = m_j
  output logic [K-1:0] y    // permuted bits, bit pi_G(j) = m_j
);

  for (genvar j = 0; j < K; j++) begin : g_route
    localparam int P = perm(G, j);
    assign y[P] = m[j];
  end

endmodule
