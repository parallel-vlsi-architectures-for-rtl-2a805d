// c2b_interleaver: check-to-bit interleaver of the decoder (Fig. 3), the
// inverse routing of b2c_interleaver. It takes the 2112 check-to-bit
// messages in check-major edge order and hands each Cell-A1 its one message
// and each Cell-A2 its four, group 0 first. Pure routing, no logic.
module c2b_interleaver
  import ldpc_pkg::*;
(
  input  msg_t e      [EDGES],
  output msg_t r_par  [M],
  output msg_t r_info [K][GROUPS]
);

  for (genvar c = 0; c < M; c++) begin : g_par
    assign r_par[c] = e[parity_edge(c)];
  end

  for (genvar j = 0; j < K; j++) begin : g_info
    for (genvar g = 0; g < GROUPS; g++) begin : g_grp
      localparam int E = info_edge(g, j);
      assign r_info[j][g] = e[E];
    end
  end

endmodule
