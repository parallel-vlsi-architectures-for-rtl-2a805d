// ldpc_encoder: parallel encoder of the rate 8/9 PCPC LDPC code (Fig. 2).
// The 512-bit message feeds four branches: the unpermuted one and three
// permutations pi_1..pi_3, each followed by a Parity-Check unit that XORs 16
// runs of 32 bits. The 64 parity bits and the message form the systematic
// codeword c = G m = {parity, m}, which the parallel-to-serial converter sends
// to the channel one bit per clock, parity bit 0 first and message bit 511 last.
//
// Timing: the permutations are wiring and the parity logic is combinational
// (five XOR levels), so the codeword is captured in the cycle the message is
// accepted (m_valid && m_ready); its first bit appears on c_bit in the next
// cycle and the 576 bits follow back to back. A new message is accepted in
// the cycle the last bit of the previous one leaves, giving one codeword
// per 576 clocks. The handshake is this design's own choice.
module ldpc_encoder
  import ldpc_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         m_valid,
  output logic         m_ready,
  input  logic [K-1:0] m,
  output logic         c_bit,
  output logic         c_valid,
  output logic         c_first,
  output logic         c_last,
  output logic [M-1:0] parity     // combinational parity of the current m
);

  logic [K-1:0] perm_bits [GROUPS];

  for (genvar g = 0; g < GROUPS; g++) begin : g_branch
    pcpc_permute #(.G(g)) u_perm (
      .m (m),
      .y (perm_bits[g])
    );
    parity_check u_pc (
      .x (perm_bits[g]),
      .p (parity[g*ROWS +: ROWS])
    );
  end

  p2s_converter #(.N(N)) u_p2s (
    .clk        (clk),
    .rst        (rst),
    .load       (m_valid),
    .ready      (m_ready),
    .din        ({m, parity}),
    .dout       (c_bit),
    .dout_valid (c_valid),
    .dout_first (c_first),
    .dout_last  (c_last)
  );

endmodule
