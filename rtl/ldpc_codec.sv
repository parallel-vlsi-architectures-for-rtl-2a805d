// ldpc_codec: the encoder (Fig. 2) and decoder (Fig. 3) of the rate 8/9,
// n = 576 PCPC LDPC code side by side. The channel between them is outside
// the design: the encoder's serial codeword leaves on c_bit, and the decoder
// takes 576 (6,2) channel LLRs in parallel. See ldpc_encoder and
// ldpc_decoder for the interfaces and timing.
module ldpc_codec
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = MAX_ITER_DEFAULT,
  localparam int IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst,
  // encoder
  input  logic          m_valid,
  output logic          m_ready,
  input  logic [K-1:0]  m,
  output logic          c_bit,
  output logic          c_valid,
  output logic          c_first,
  output logic          c_last,
  // decoder
  input  logic          dec_start,
  input  msg_t          llr [N],
  output logic          dec_busy,
  output logic          dec_done,
  output logic [N-1:0]  dec_x_hat,
  output logic [K-1:0]  dec_info,
  output logic          dec_converged,
  output logic [IW-1:0] dec_iterations,
  output logic [M-1:0]  enc_parity      // parity bits of the current m
);


  ldpc_encoder u_enc (
    .clk, .rst, .m_valid, .m_ready, .m, .c_bit, .c_valid, .c_first, .c_last,
    .parity (enc_parity)
  );

  ldpc_decoder #(.MAX_ITER(MAX_ITER)) u_dec (
    .clk, .rst,
    .start      (dec_start),
    .llr        (llr),
    .busy       (dec_busy),
    .done       (dec_done),
    .x_hat      (dec_x_hat),
    .info       (dec_info),
    .converged  (dec_converged),
    .iterations (dec_iterations)
  );

endmodule
