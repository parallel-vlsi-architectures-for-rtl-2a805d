// msg_register: a bank of DEPTH message flip-flops, used for the two
// pipeline registers of the decoder (Fig. 3; 2112 x 6 = 12672 flip-flops
// each) and for the store of channel priors. On a clock edge clear sets
// every word to zero, otherwise load copies d; clear wins over load.
// There is no reset: the decoder clears what it reads before using it.
module msg_register
  import ldpc_pkg::*;
#(
  parameter int DEPTH = EDGES
) (
  input  logic clk,
  input  logic load,
  input  logic clear,
  input  msg_t d [DEPTH],
  output msg_t q [DEPTH]
);

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      if (clear)     q[i] <= '0;
      else if (load) q[i] <= d[i];
    end
  end

endmodule
