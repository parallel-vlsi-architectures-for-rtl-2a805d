// tb_cell_a1: exhaustive test of the weight-1 bit node: q must equal the
// prior and x_hat must be 1 exactly when lambda + r >= 0.
module tb_cell_a1;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  msg_t lam, r, q;
  logic xh;
  cell_a1 dut (.lam(lam), .r(r), .q(q), .x_hat(xh));
  initial begin
    for (int a = -32; a < 32; a++)
      for (int b = -32; b < 32; b++) begin
        lam = msg_t'(a); r = msg_t'(b);
        #1;
        checks++;
        if (int'(q) != a || xh != (a + b >= 0)) begin
          failures++;
          $display("cell_a1 lam=%0d r=%0d q=%0d x=%0d", a, b, q, xh);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
