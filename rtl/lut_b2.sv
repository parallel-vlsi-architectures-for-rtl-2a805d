// lut_b2: second look-up of the check-node unit (Fig. 5). From the saturated
// extrinsic sum s (unsigned (6,2), 0 .. 15.75) and the sign word of the other
// inputs it forms the outgoing check-to-bit message r = sign * f(s), with the
// same f as lut_b1, clipped to the signed (6,2) range (magnitude <= 7.75).
//
// Sign: sign_x is the XOR of the MSBs of the 32 other incoming messages.
// Messages are positive when bit 1 is more likely (the hard decision is the
// inverted MSB, Fig. 4). An even number of negative inputs among 32 means an
// even number of ones, so the bit is 0 and r is negative: r is negative
// exactly when sign_x is 0. Magnitude 0 gives r = 0 whatever the sign.
// Combinational. The clip and the sign rule are this design's working-out.
module lut_b2
  import ldpc_pkg::*;
(
  input  mag_t s,
  input  logic sign_x,
  output msg_t r
);

  logic [QW-1:0] mag;

  always_comb begin
    unique case (s)
      6'd0:    mag = 6'(MSG_MAX);   // f(0) is infinite, clipped to 7.75
      6'd1:    mag = 6'd8;
      6'd2:    mag = 6'd6;
      6'd3:    mag = 6'd4;
      6'd4:    mag = 6'd3;
      6'd5,
      6'd6:    mag = 6'd2;
      6'd7,
      6'd8,
      6'd9,
      6'd10,
      6'd11:   mag = 6'd1;
      default: mag = 6'd0;
    endcase
    r = sign_x ? msg_t'(mag) : msg_t'(-mag);
  end

endmodule
