// tb_decoder_ctrl: runs decodes in which the syndrome becomes zero after a
// chosen number of iterations (or never) and checks the phase sequence
// (start: load priors and clear; then A, B alternating), the iteration
// count, the converged flag, the 20-iteration limit, that start is ignored
// while busy, and that done arrives 2n+1 clocks after the start edge.
module tb_decoder_ctrl;
  localparam int MAXI = 20;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, syn_ok = 0;
  logic busy, lam_load, r_clear, a_load, b_load, out_load, done, converged;
  logic [4:0] iterations, iter;
  int conv_at;   // iteration after which the syndrome is zero; 0 = never
  decoder_ctrl #(.MAX_ITER(MAXI)) dut (.clk, .rst, .start, .syn_ok, .busy,
    .lam_load, .r_clear, .a_load, .b_load, .out_load, .done, .converged,
    .iterations, .iter);
  always #5 clk = ~clk;
  // syndrome model: zero once conv_at iterations are complete
  always_comb syn_ok = (conv_at != 0) && (int'(iter) >= conv_at);
  task automatic run(input int ca);
    int cyc, n_a, n_b, exp_n;
    conv_at = ca;
    exp_n = (ca == 0 || ca > MAXI) ? MAXI : ca;
    start <= 1;
    @(posedge clk); #1;
    checks++;
    if (!busy) failures++;
    start <= 1;       // held high: must be ignored while busy
    cyc = 0; n_a = 0; n_b = 0;
    while (!done && cyc < 100) begin
      if (a_load) n_a++;
      if (b_load) n_b++;
      if (lam_load || r_clear) failures++;
      if (a_load && b_load) failures++;
      @(posedge clk); #1;
      cyc++;
    end
    start <= 0;
    checks++;
    if (n_a != exp_n || n_b != exp_n) begin
      failures++; $display("conv_at=%0d: %0d A and %0d B phases", ca, n_a, n_b);
    end
    checks++;
    if (cyc != 2 * exp_n + 1) begin
      failures++; $display("conv_at=%0d: done after %0d clocks, exp %0d", ca, cyc, 2 * exp_n + 1);
    end
    checks++;
    if (int'(iterations) != exp_n || converged != (ca != 0 && ca <= MAXI)) begin
      failures++; $display("conv_at=%0d: iterations=%0d converged=%0d", ca, iterations, converged);
    end
    @(posedge clk); #1;
    checks++;
    if (done || busy) failures++;
  endtask
  initial begin
    conv_at = 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk); #1;
    checks++;
    if (busy || done) failures++;
    run(1); run(3); run(0); run(20); run(21); run(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
