// tb_b2c_interleaver: marks one bit node at a time with distinct values on
// its outputs (all other inputs zero) and checks that each value lands on
// an edge of the right check: the parity bit in slot 0 of its own check,
// message bit j of group g in a slot 1..32 of the group-g check whose row
// of H (built from the code definition) contains j, and nowhere else.
// Over all bits, every edge must be used exactly once.
module tb_b2c_interleaver;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  msg_t q_par [M];
  msg_t q_info [K][GROUPS];
  msg_t e [EDGES];
  b2c_interleaver dut (.q_par(q_par), .q_info(q_info), .e(e));
  row_t rows [M];
  int used [EDGES];
  function automatic bit in_row(input int c, input int j);
    for (int s = 0; s < RUN; s++) if (rows[c][s] == j) return 1;
    return 0;
  endfunction
  initial begin
    for (int x = 0; x < EDGES; x++) used[x] = 0;
    build_rows(rows);
    for (int c = 0; c < M; c++) q_par[c] = '0;
    for (int j = 0; j < K; j++) for (int g = 0; g < GROUPS; g++) q_info[j][g] = '0;
    for (int c = 0; c < M; c++) begin
      q_par[c] = msg_t'(9); #1;
      for (int x = 0; x < EDGES; x++) begin
        checks++;
        if ((e[x] != '0) != (x == c * DC) || (x == c * DC && e[x] != msg_t'(9))) failures++;
        if (e[x] != '0) used[x]++;
      end
      q_par[c] = '0;
    end
    for (int j = 0; j < K; j++) begin
      int hits;
      for (int g = 0; g < GROUPS; g++) q_info[j][g] = msg_t'(g + 1);
      #1;
      hits = 0;
      for (int x = 0; x < EDGES; x++) if (e[x] != '0) begin
        int c, s, g;
        c = x / DC; s = x % DC; g = int'(e[x]) - 1;
        hits++;
        used[x]++;
        checks++;
        if (s == 0 || g < 0 || g >= GROUPS || c / ROWS != g || !in_row(c, j)) begin
          failures++;
          $display("bit %0d value %0d on edge %0d", j, e[x], x);
        end
      end
      checks++;
      if (hits != GROUPS) begin failures++; $display("bit %0d reached %0d edges", j, hits); end
      for (int g = 0; g < GROUPS; g++) q_info[j][g] = '0;
    end
    for (int x = 0; x < EDGES; x++) begin
      checks++;
      if (used[x] != 1) begin failures++; $display("edge %0d used %0d times", x, used[x]); end
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
