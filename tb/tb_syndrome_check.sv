// tb_syndrome_check: codewords from the reference encoder must give a zero
// syndrome; flipping one bit must set exactly the syndrome bits of the
// checks that contain it (one for a parity bit, four for a message bit).
module tb_syndrome_check;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [N-1:0] x;
  logic [M-1:0] syn;
  logic ok;
  syndrome_check dut (.x_hat(x), .syn(syn), .ok(ok));
  initial begin
    for (int t = 0; t < 40; t++) begin
      logic [K-1:0] m;
      logic [N-1:0] cw;
      int b;
      logic [M-1:0] exp_syn;
      for (int i = 0; i < K; i += 32) m[i +: 32] = $urandom;
      encode(m, cw);
      x = cw; #1;
      checks++;
      if (!ok || syn != '0) begin failures++; $display("codeword %0d not accepted", t); end
      b = int'($urandom_range(N - 1));
      if (t < 2) b = t * 64;
      x[b] = ~x[b]; #1;
      exp_syn = '0;
      if (b < M) exp_syn[b] = 1'b1;
      else for (int g = 0; g < GROUPS; g++) exp_syn[info_check(g, b - M)] = 1'b1;
      checks++;
      if (ok || syn != exp_syn) begin
        failures++; $display("bit %0d flipped: syn %h exp %h", b, syn, exp_syn);
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
