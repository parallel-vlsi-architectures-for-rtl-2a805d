// lut_b1: first look-up of the check-node unit (Fig. 5). It returns
// f(|q|), where f(x) = log((e^x + 1)/(e^x - 1)), for a signed (6,2) message q,
// as an unsigned (6,2) magnitude (0 .. 15.75).
//
// Table: out(k) = min(63, round(4 * f(k/4))) for |q| = k quarter units, which
// gives 63 8 6 4 3 2 2 1 1 1 1 1 for k = 0..11 and 0 from k = 12 (|q| >= 3.0)
// on; f(0) is infinite and clips to 15.75. These are the quantized points of
// the plot of f. It is written as combinational logic, not a memory, as the
// design intends. Rounding to nearest is this design's reading of the plot.
module lut_b1
  import ldpc_pkg::*;
(
  input  msg_t q,
  output mag_t f
);

  logic [QW-1:0] a;   // |q| in quarter units, 0 .. 32

  always_comb begin
    a = q[QW-1] ? QW'(-q) : QW'(q);
    unique case (a)
      6'd0:    f = 6'd63;
      6'd1:    f = 6'd8;
      6'd2:    f = 6'd6;
      6'd3:    f = 6'd4;
      6'd4:    f = 6'd3;
      6'd5,
      6'd6:    f = 6'd2;
      6'd7,
      6'd8,
      6'd9,
      6'd10,
      6'd11:   f = 6'd1;
      default: f = 6'd0;
    endcase
  end

endmodule
