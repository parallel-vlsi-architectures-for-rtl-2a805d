// tb_cell_b: random 33-input vectors for the check node, compared with an
// integer model: |r_k| = min(31, F(min(63, sum_{j!=k} F(|q_j|)))) with
// F(k) = round(4 f(k/4)), and r_k positive when an odd number of the other
// inputs are non-negative (decide 1).
module tb_cell_b;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  msg_t q [DC], r [DC];
  cell_b dut (.q(q), .r(r));
  initial begin
    int v [DC];
    for (int t = 0; t < 3000; t++) begin
      for (int k = 0; k < DC; k++) begin
        // mix of small and large magnitudes so both LUT regions are hit
        if (t % 3 == 0)      v[k] = int'($urandom_range(63)) - 32;
        else if (t % 3 == 1) v[k] = int'($urandom_range(24)) - 12;
        else                 v[k] = ($urandom_range(1) ? 1 : -1) * (k < 2 ? int'($urandom_range(2)) : 12 + int'($urandom_range(19)));
        q[k] = msg_t'(v[k]);
      end
      #1;
      for (int k = 0; k < DC; k++) begin
        int sum, ones, mag, e;
        sum = 0; ones = 0;
        for (int j = 0; j < DC; j++) if (j != k) begin
          sum += f_q(v[j] < 0 ? -v[j] : v[j]);
          if (v[j] >= 0) ones++;
        end
        mag = f_q(sat_i(sum, 0, 63));
        if (mag > 31) mag = 31;
        e = (ones % 2) ? mag : -mag;
        checks++;
        if (int'(r[k]) != e) begin
          failures++;
          if (failures < 10) $display("cell_b t=%0d k=%0d r=%0d exp=%0d", t, k, r[k], e);
        end
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
