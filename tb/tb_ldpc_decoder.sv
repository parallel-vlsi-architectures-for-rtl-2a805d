// tb_ldpc_decoder: full-size decoder against the loop-based fixed-point
// reference decoder. Random messages are encoded, sent over a quantized
// AWGN channel at several Eb/N0 values (including a noiseless frame and
// frames too noisy to decode), and the hardware's decisions, iteration
// count and converged flag must match the reference exactly; converged
// frames must return the message, and done must come 2n+1 clocks after
// start. Both stopping rules must occur.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int MAXI = MAX_ITER_DEFAULT;
  int checks = 0, failures = 0, n_conv = 0, n_max = 0;
  logic clk = 0, rst = 1, start = 0, busy, done, converged;
  msg_t llr [N];
  logic [N-1:0] x_hat;
  logic [K-1:0] info;
  logic [4:0] iterations;
  ldpc_decoder dut (.clk, .rst, .start, .llr(llr), .busy, .done, .x_hat,
                    .info, .converged, .iterations);
  always #5 clk = ~clk;
  task automatic frame(input real ebn0, input bit noiseless);
    logic [K-1:0] m;
    logic [N-1:0] cw, exp_x;
    int exp_it, cyc;
    bit exp_conv;
    for (int i = 0; i < K; i += 32) m[i +: 32] = $urandom;
    encode(m, cw);
    if (noiseless) for (int i = 0; i < N; i++) llr[i] = cw[i] ? msg_t'(8) : msg_t'(-8);
    else channel(cw, ebn0, llr);
    decode(llr, MAXI, exp_x, exp_it, exp_conv);
    start <= 1;
    @(posedge clk); #1;
    start <= 0;
    cyc = 0;
    while (!done && cyc < 200) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 2 * exp_it + 1) begin
      failures++; $display("Eb/N0 %0.1f: done after %0d clocks, exp %0d", ebn0, cyc, 2 * exp_it + 1);
    end
    checks++;
    if (x_hat != exp_x || int'(iterations) != exp_it || converged != exp_conv) begin
      failures++;
      $display("Eb/N0 %0.1f: it=%0d/%0d conv=%0d/%0d x mismatch=%0d", ebn0,
               iterations, exp_it, converged, exp_conv, x_hat != exp_x);
    end
    if (exp_conv) begin
      n_conv++;
      checks++;
      if (info != m && noiseless) failures++;
    end else n_max++;
    $display("frame Eb/N0=%0.1f iterations=%0d converged=%0d info_errors=%0d",
             ebn0, iterations, converged, $countones(info ^ m));
  endtask
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    frame(0.0, 1);
    frame(6.0, 0);
    frame(4.5, 0);
    frame(4.0, 0);
    frame(1.0, 0);
    frame(3.5, 0);
    checks++;
    if (n_conv == 0 || n_max == 0) begin
      failures++; $display("stopping rules seen: syndrome %0d, limit %0d", n_conv, n_max);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
