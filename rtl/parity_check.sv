// parity_check: one "Parity-Check" box of Fig. 2. It multiplies P1 with a
// 512-bit (already permuted) vector: row r of P1 holds 32 consecutive ones, so
// parity bit r is the XOR of input bits 32r .. 32r+31. Purely combinational,
// 16 XOR trees of 32 inputs (5 XOR levels).
module parity_check
  import ldpc_pkg::*;
(
  input  logic [K-1:0]    x,   // permuted message
  output logic [ROWS-1:0] p    // 16 parity bits
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    assign p[r] = ^x[r*RUN +: RUN];
  end

endmodule
