// tb_lut_b1: applies all 64 (6,2) inputs to lut_b1 and compares with
// round(4 * f(|q|/4)) computed in floating point.
module tb_lut_b1;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  msg_t q;
  mag_t f;
  lut_b1 dut (.q(q), .f(f));
  initial begin
    for (int v = -32; v < 32; v++) begin
      q = msg_t'(v);
      #1;
      checks++;
      if (int'(f) != f_q(v < 0 ? -v : v)) begin
        failures++;
        $display("lut_b1 q=%0d f=%0d exp=%0d", v, f, f_q(v < 0 ? -v : v));
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
