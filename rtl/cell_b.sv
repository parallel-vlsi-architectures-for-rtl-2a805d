// cell_b: check-node unit of the decoder (Fig. 5), one per row of H (64 in
// all), with 33 incoming bit-to-check messages q and 33 outgoing
// check-to-bit messages r. It implements the log-domain sum-product rule
//   |r_k| = f( sum_{j != k} f(|q_j|) ),  sign(r_k) from the other signs,
// where f(x) = log((e^x + 1)/(e^x - 1)).
//
// Structure as in the figure: 33 LUT-B1 give f(|q_j|) as unsigned (6,2)
// values; one adder forms their total in a 12-bit (12,2) word; 33
// subtractors remove each own term, and each difference is saturated to
// (6,2) (at most 15.75) before LUT-B2. Sign-Eval XORs all 33 MSBs; removing
// the own MSB gives the sign word of the other 32 inputs for LUT-B2.
// Treating the (12,2) sum as unsigned is this design's choice (all terms are
// non-negative). Purely combinational.
module cell_b
  import ldpc_pkg::*;
(
  input  msg_t q [DC],
  output msg_t r [DC]
);

  localparam int SW = 12;   // (12,2) adder width

  mag_t          fq   [DC];
  logic [SW-1:0] total;
  logic [SW-1:0] ext  [DC];
  mag_t          sat  [DC];
  logic          sign_all;

  for (genvar k = 0; k < DC; k++) begin : g_lut1
    lut_b1 u_lut1 (.q(q[k]), .f(fq[k]));
  end

  // Array of saturating adders and Sign-Eval.
  always_comb begin
    total    = '0;
    sign_all = 1'b0;
    for (int k = 0; k < DC; k++) begin
      total    = total + SW'(fq[k]);
      sign_all = sign_all ^ q[k][QW-1];
    end
    for (int k = 0; k < DC; k++) begin
      ext[k] = total - SW'(fq[k]);
      sat[k] = (ext[k] > SW'(MAG_MAX)) ? mag_t'(MAG_MAX) : mag_t'(ext[k]);
    end
  end

  for (genvar k = 0; k < DC; k++) begin : g_lut2
    lut_b2 u_lut2 (
      .s      (sat[k]),
      .sign_x (sign_all ^ q[k][QW-1]),
      .r      (r[k])
    );
  end

endmodule
