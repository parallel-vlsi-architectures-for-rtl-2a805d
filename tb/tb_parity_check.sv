// tb_parity_check: random vectors; each parity bit must be the XOR of its
// 32-bit run, counted bit by bit.
module tb_parity_check;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic [K-1:0] x;
  logic [ROWS-1:0] p;
  parity_check dut (.x(x), .p(p));
  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < K; i += 32) x[i +: 32] = $urandom;
      if (t == 0) x = '0;
      if (t == 1) x = {K{1'b1}};
      #1;
      for (int rr = 0; rr < ROWS; rr++) begin
        int ones;
        ones = 0;
        for (int b = 0; b < RUN; b++) if (x[rr*RUN + b]) ones++;
        checks++;
        if (p[rr] != ones[0]) begin
          failures++;
          $display("parity_check row %0d p=%0d ones=%0d", rr, p[rr], ones);
        end
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
