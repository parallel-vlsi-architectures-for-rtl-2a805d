// tb_lut_b2: applies every saturated sum and both sign words to lut_b2 and
// compares with sign * min(31, round(4 * f(s/4))), negative when the sign
// word of the other inputs is 0.
module tb_lut_b2;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  mag_t s;
  logic sx;
  msg_t r;
  lut_b2 dut (.s(s), .sign_x(sx), .r(r));
  initial begin
    for (int v = 0; v < 64; v++)
      for (int b = 0; b < 2; b++) begin
        int mag, exp_r;
        s = mag_t'(v); sx = b[0];
        #1;
        mag = f_q(v); if (mag > 31) mag = 31;
        exp_r = b ? mag : -mag;
        checks++;
        if (int'(r) != exp_r) begin
          failures++;
          $display("lut_b2 s=%0d sx=%0d r=%0d exp=%0d", v, b, r, exp_r);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
