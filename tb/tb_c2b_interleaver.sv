// tb_c2b_interleaver: puts a marker on the edges of one check at a time and
// checks that exactly the parity bit of that check (Cell-A1 input) and the
// 32 message bits of its row of H (group input c/16 of their Cell-A2)
// receive it. It then checks that c2b undoes b2c for random messages.
module tb_c2b_interleaver;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  msg_t e [EDGES];
  msg_t r_par [M];
  msg_t r_info [K][GROUPS];
  msg_t q_par [M];
  msg_t q_info [K][GROUPS];
  msg_t e_fwd [EDGES];
  c2b_interleaver dut (.e(e), .r_par(r_par), .r_info(r_info));
  b2c_interleaver u_fwd (.q_par(q_par), .q_info(q_info), .e(e_fwd));
  row_t rows [M];
  function automatic bit in_row(input int c, input int j);
    for (int s = 0; s < RUN; s++) if (rows[c][s] == j) return 1;
    return 0;
  endfunction
  initial begin
    build_rows(rows);
    for (int x = 0; x < EDGES; x++) e[x] = '0;
    for (int c = 0; c < M; c++) begin
      int hits;
      for (int s = 0; s < DC; s++) e[c * DC + s] = msg_t'(5);
      #1;
      for (int cc = 0; cc < M; cc++) begin
        checks++;
        if (r_par[cc] != ((cc == c) ? msg_t'(5) : msg_t'(0))) failures++;
      end
      hits = 0;
      for (int j = 0; j < K; j++)
        for (int g = 0; g < GROUPS; g++) begin
          bit want;
          want = (g == c / ROWS) && in_row(c, j);
          if (r_info[j][g] != '0) hits++;
          checks++;
          if ((r_info[j][g] == msg_t'(5)) != want) begin
            failures++;
            if (failures < 10) $display("check %0d: bit %0d group %0d got %0d", c, j, g, r_info[j][g]);
          end
        end
      checks++;
      if (hits != RUN) begin failures++; $display("check %0d reached %0d inputs", c, hits); end
      for (int s = 0; s < DC; s++) e[c * DC + s] = '0;
    end
    // round trip through the forward interleaver
    for (int t = 0; t < 20; t++) begin
      for (int c = 0; c < M; c++) q_par[c] = msg_t'($urandom);
      for (int j = 0; j < K; j++) for (int g = 0; g < GROUPS; g++) q_info[j][g] = msg_t'($urandom);
      #1;
      e = e_fwd;
      #1;
      for (int c = 0; c < M; c++) begin
        checks++;
        if (r_par[c] != q_par[c]) failures++;
      end
      for (int j = 0; j < K; j++) for (int g = 0; g < GROUPS; g++) begin
        checks++;
        if (r_info[j][g] != q_info[j][g]) failures++;
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
