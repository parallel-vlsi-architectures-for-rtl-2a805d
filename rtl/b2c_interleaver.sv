// b2c_interleaver: bit-to-check interleaver of the decoder (Fig. 3). It
// reorders the 2112 bit-to-check messages from bit-node order (64 Cell-A1
// outputs, then 4 outputs per Cell-A2) into check-node order, so that edges
// c*33 .. c*33+32 are the 33 inputs of Cell-B c: slot 0 is the parity bit of
// check c, slots 1..32 its message bits in P1 column order (see ldpc_pkg).
// Pure routing, no logic and no delay; the edge numbering is this design's.
module b2c_interleaver
  import ldpc_pkg::*;
(
  input  msg_t q_par  [M],        // from Cell-A1 c (parity bit c)
  input  msg_t q_info [K][GROUPS],// from Cell-A2 j, one per group
  output msg_t e      [EDGES]     // check-major edge order
);

  for (genvar c = 0; c < M; c++) begin : g_par
    assign e[parity_edge(c)] = q_par[c];
  end

  for (genvar j = 0; j < K; j++) begin : g_info
    for (genvar g = 0; g < GROUPS; g++) begin : g_grp
      localparam int E = info_edge(g, j);
      assign e[E] = q_info[j][g];
    end
  end

endmodule
