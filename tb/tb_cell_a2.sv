// tb_cell_a2: random and extreme vectors for the weight-4 bit node.
// Expected: post = lambda + r1 + .. + r4, q_k = sat6(post - r_k),
// x_hat = (post >= 0), all worked out with integers.
module tb_cell_a2;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0, sat_hits = 0;
  msg_t lam, r [4], q [4];
  logic xh;
  cell_a2 dut (.lam(lam), .r(r), .q(q), .x_hat(xh));
  task automatic apply(input int l, input int a[4]);
    int post;
    lam = msg_t'(l);
    for (int k = 0; k < 4; k++) r[k] = msg_t'(a[k]);
    #1;
    post = l + a[0] + a[1] + a[2] + a[3];
    checks++;
    if (xh != (post >= 0)) begin
      failures++;
      $display("cell_a2 x_hat post=%0d x=%0d", post, xh);
    end
    for (int k = 0; k < 4; k++) begin
      int e;
      e = post - a[k];
      if (e > 31 || e < -32) sat_hits++;
      checks++;
      if (int'(q[k]) != sat_i(e, -32, 31)) begin
        failures++;
        $display("cell_a2 q%0d=%0d exp=%0d", k, q[k], sat_i(e, -32, 31));
      end
    end
  endtask
  initial begin
    int a[4];
    a = '{-32, -32, -32, -32}; apply(-32, a);
    a = '{31, 31, 31, 31};     apply(31, a);
    a = '{-32, 31, -32, 31};   apply(0, a);
    for (int t = 0; t < 5000; t++) begin
      for (int k = 0; k < 4; k++) a[k] = int'($urandom_range(63)) - 32;
      apply(int'($urandom_range(63)) - 32, a);
    end
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation never exercised"); end
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
