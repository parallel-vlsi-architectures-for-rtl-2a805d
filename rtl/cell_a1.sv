// cell_a1: bit-node unit for a weight-1 column of H, i.e. one of the 64
// parity bits. It has a single incoming check message r, so its only outgoing
// message is the channel prior itself (the extrinsic sum over no other
// messages), and its hard decision comes from the posterior lambda + r.
//
// Formats follow Cell-A2: (6,2) in and out; the posterior is formed at full
// precision (7 bits) so its sign is exact. x_hat is the inverted MSB of the
// posterior, as in Fig. 4: a non-negative posterior decides bit 1.
// Purely combinational. The published architecture only says Cell-A1 is built like Cell-A2;
// the reduction to these two operations is this design's reading of that.
module cell_a1
  import ldpc_pkg::*;
(
  input  msg_t lam,     // channel prior lambda_i
  input  msg_t r,       // check-to-bit message
  output msg_t q,       // bit-to-check message
  output logic x_hat    // hard decision
);

  logic signed [QW:0] post;

  assign post  = (QW+1)'(lam) + (QW+1)'(r);
  assign q     = lam;
  assign x_hat = ~post[QW];

endmodule
