// tb_pcpc_permute: drives one-hot words through the three permutations.
// Each must move bit j to exactly one output position, the one the code
// definition gives, and the positions over all j must be distinct.
module tb_pcpc_permute;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic [K-1:0] m;
  logic [K-1:0] y [1:3];
  pcpc_permute #(.G(1)) dut1 (.m(m), .y(y[1]));
  pcpc_permute #(.G(2)) dut2 (.m(m), .y(y[2]));
  pcpc_permute #(.G(3)) dut3 (.m(m), .y(y[3]));
  initial begin
    bit seen [3][K];
    for (int g = 0; g < 3; g++) for (int i = 0; i < K; i++) seen[g][i] = 0;
    for (int j = 0; j < K; j++) begin
      m = '0; m[j] = 1'b1;
      #1;
      for (int g = 1; g <= 3; g++) begin
        int pos;
        checks++;
        if ($countones(y[g]) != 1) begin
          failures++; $display("G%0d bit %0d: %0d outputs set", g, j, $countones(y[g]));
        end else begin
          pos = 0;
          for (int i = 0; i < K; i++) if (y[g][i]) pos = i;
          if (pos != perm(g, j) || seen[g-1][pos]) begin
            failures++; $display("G%0d bit %0d -> %0d", g, j, pos);
          end
          seen[g-1][pos] = 1;
        end
      end
    end
    // the permutations must differ from the identity and from each other
    checks++;
    m = '0; m[5] = 1'b1; #1;
    if (y[1] == m || y[1] == y[2] || y[2] == y[3]) failures++;
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
