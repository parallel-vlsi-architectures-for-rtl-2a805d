// tb_ber_sweep: bit-error-rate sweep of the decoder over an AWGN channel,
// Eb/N0 = 1.0 .. 6.0 dB in 0.5 dB steps with at most 20 iterations and
// 6-bit (6,2) LLRs. Each frame is a random message, encoded by the
// reference encoder, sent with BPSK (bit 1 -> +1) and decoded by the
// hardware. Every frame is also decoded by the fixed-point reference
// decoder and must match it exactly, including the 2n+1 clock latency.
// The sweep prints the message bit error rate and average iteration count
// per point and checks that errors fall from the lowest to the highest
// Eb/N0. FRAMES frames per point keep the run short; raise it for
// smoother curves.
module tb_ber_sweep;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int FRAMES = 25;
  localparam int POINTS = 11;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, start = 0, busy, done, converged;
  msg_t llr [N];
  logic [N-1:0] x_hat;
  logic [K-1:0] info;
  logic [4:0] iterations;
  int errs [POINTS];
  ldpc_decoder dut (.clk, .rst, .start, .llr(llr), .busy, .done, .x_hat,
                    .info, .converged, .iterations);
  always #5 clk = ~clk;
  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    for (int p = 0; p < POINTS; p++) begin
      real ebn0;
      int it_sum;
      ebn0 = 1.0 + 0.5 * p;
      errs[p] = 0; it_sum = 0;
      for (int f = 0; f < FRAMES; f++) begin
        logic [K-1:0] m;
        logic [N-1:0] cw, exp_x;
        int exp_it, cyc;
        bit exp_conv;
        for (int i = 0; i < K; i += 32) m[i +: 32] = $urandom;
        encode(m, cw);
        channel(cw, ebn0, llr);
        decode(llr, MAX_ITER_DEFAULT, exp_x, exp_it, exp_conv);
        start <= 1;
        @(posedge clk); #1;
        start <= 0;
        cyc = 0;
        while (!done && cyc < 200) begin @(posedge clk); #1; cyc++; end
        checks++;
        if (cyc != 2 * exp_it + 1 || x_hat != exp_x || converged != exp_conv) begin
          failures++;
          $display("Eb/N0 %0.1f frame %0d differs from reference", ebn0, f);
        end
        errs[p] += $countones(info ^ m);
        it_sum += int'(iterations);
      end
      $display("Eb/N0 %0.1f dB: BER %e (%0d errors in %0d bits), mean iterations %0.2f",
               ebn0, real'(errs[p]) / (FRAMES * K), errs[p], FRAMES * K, real'(it_sum) / FRAMES);
    end
    checks++;
    if (errs[POINTS-1] >= errs[0]) begin failures++; $display("errors did not fall with Eb/N0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (POINTS * FRAMES * 50 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
