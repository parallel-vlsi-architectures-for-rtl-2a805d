// cell_a2: bit-node unit for a weight-4 column of H, i.e. one of the 512
// message bits (Fig. 4). The four check messages r1..r4 are summed in a tree
// ((r1+r2) + (r3+r4)), the prior lambda is added to give the posterior P_post,
// and each outgoing message is q_k = P_post - r_k, saturated from (8,2) back
// to (6,2). The hard decision x_hat is the inverted MSB of P_post.
//
// Each q_k is a sum of four (6,2) values and always fits the (8,2) format of
// the figure. P_post, a sum of five, is carried with one more bit so that its
// sign (and so x_hat) is exact; this extra bit is this design's choice.
// Purely combinational.
module cell_a2
  import ldpc_pkg::*;
(
  input  msg_t lam,       // channel prior lambda_i
  input  msg_t r [4],     // check-to-bit messages, groups 0..3
  output msg_t q [4],     // bit-to-check messages
  output logic x_hat      // hard decision
);

  localparam int IW = 8;  // (8,2) intermediate format

  logic signed [IW-1:0] s12, s34, srr;
  logic signed [IW:0]   post;         // (9,2) posterior
  logic signed [IW-1:0] ext [4];

  assign s12  = IW'(r[0]) + IW'(r[1]);
  assign s34  = IW'(r[2]) + IW'(r[3]);
  assign srr  = s12 + s34;
  assign post = (IW+1)'(srr) + (IW+1)'(lam);
  assign x_hat = ~post[IW];

  for (genvar k = 0; k < 4; k++) begin : g_out
    assign ext[k] = IW'(post - (IW+1)'(r[k]));
    assign q[k]   = sat_msg(int'(ext[k]));
  end

endmodule
