// tb_ldpc_codec: end-to-end run of the codec at its default parameters.
// Random messages go back to back through the encoder; each serial codeword
// is collected, sent over a quantized AWGN channel and decoded. The
// decoder's result must match the fixed-point reference decoder bit for bit
// and arrive 2n+1 clocks after start; frames that converge must return the
// message. The testbench counts how often each mechanism happened and fails
// if one never did: back-to-back codewords in the parallel-to-serial
// converter, stopping on a zero syndrome, stopping at the iteration limit,
// saturated bit-to-check messages in the first pipeline register, and
// check-to-bit messages clipped at the f(0) limit in the second.
module tb_ldpc_codec;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int FRAMES = 6;
  localparam real EBN0 [FRAMES] = '{9.0, 6.0, 5.0, 4.5, 1.0, 5.5};
  int checks = 0, failures = 0;
  int n_b2b = 0, n_conv = 0, n_limit = 0, n_qsat = 0, n_rclip = 0;
  logic clk = 0, rst = 1;
  logic m_valid = 0, m_ready, c_bit, c_valid, c_first, c_last;
  logic [K-1:0] m;
  logic dec_start = 0, dec_busy, dec_done, dec_converged;
  msg_t llr [N];
  logic [N-1:0] dec_x_hat;
  logic [K-1:0] dec_info;
  logic [4:0] dec_iterations;
  logic [M-1:0] enc_parity;

  ldpc_codec dut (.clk, .rst, .m_valid, .m_ready, .m, .c_bit, .c_valid,
    .c_first, .c_last, .dec_start, .llr(llr), .dec_busy, .dec_done,
    .dec_x_hat, .dec_info, .dec_converged, .dec_iterations, .enc_parity);

  always #5 clk = ~clk;

  logic [K-1:0] msgs [FRAMES];
  logic [N-1:0] rx_cw [FRAMES];
  int n_rx = 0, pos = 0;

  // message source
  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < K; i += 32) msgs[f][i +: 32] = $urandom;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FRAMES; f++) begin
      m_valid <= 1; m <= msgs[f];
      @(posedge clk);
      while (!m_ready) @(posedge clk);
    end
    m_valid <= 0;
  end

  // serial receiver
  always @(posedge clk) if (!rst) begin
    if (m_valid && m_ready && c_valid) n_b2b++;
    if (c_valid) begin
      if (c_first) pos = 0;
      rx_cw[n_rx][pos] = c_bit;
      pos++;
      if (c_last) n_rx++;
    end
  end

  // mechanism counters on the decoder's pipeline registers
  always @(posedge clk) if (!rst && dec_busy) begin
    for (int x = 0; x < EDGES; x++) begin
      if (dut.u_dec.reg_bc[x] == msg_t'(MSG_MAX) || dut.u_dec.reg_bc[x] == msg_t'(MSG_MIN)) n_qsat++;
      if (dut.u_dec.reg_cb[x] == msg_t'(MSG_MAX) || dut.u_dec.reg_cb[x] == msg_t'(-MSG_MAX)) n_rclip++;
    end
  end

  // channel and decoder
  initial begin
    @(negedge rst);
    for (int f = 0; f < FRAMES; f++) begin
      logic [N-1:0] exp_cw, exp_x;
      int exp_it, cyc;
      bit exp_conv;
      wait (n_rx > f);
      @(posedge clk); #1;
      encode(msgs[f], exp_cw);
      checks++;
      if (rx_cw[f] != exp_cw) begin failures++; $display("frame %0d: codeword wrong", f); end
      channel(rx_cw[f], EBN0[f], llr);
      decode(llr, MAX_ITER_DEFAULT, exp_x, exp_it, exp_conv);
      dec_start <= 1;
      @(posedge clk); #1;
      dec_start <= 0;
      cyc = 0;
      while (!dec_done && cyc < 200) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (cyc != 2 * exp_it + 1) begin
        failures++; $display("frame %0d: done after %0d clocks, exp %0d", f, cyc, 2 * exp_it + 1);
      end
      checks++;
      if (dec_x_hat != exp_x || int'(dec_iterations) != exp_it || dec_converged != exp_conv) begin
        failures++; $display("frame %0d: decoder differs from reference", f);
      end
      if (dec_converged) begin
        n_conv++;
        checks++;
        if (dec_info != msgs[f] && f == 0) failures++;
      end else n_limit++;
      $display("frame %0d Eb/N0=%0.1f dB iterations=%0d converged=%0d message bit errors=%0d",
               f, EBN0[f], dec_iterations, dec_converged, $countones(dec_info ^ msgs[f]));
    end
    $display("mechanisms: back-to-back codewords %0d, syndrome stops %0d, limit stops %0d, saturated q %0d, clipped r %0d",
             n_b2b, n_conv, n_limit, n_qsat, n_rclip);
    checks += 5;
    if (n_b2b == 0)   begin failures++; $display("no back-to-back codewords"); end
    if (n_conv == 0)  begin failures++; $display("no syndrome stop"); end
    if (n_limit == 0) begin failures++; $display("no iteration-limit stop"); end
    if (n_qsat == 0)  begin failures++; $display("no saturated bit-to-check message"); end
    if (n_rclip == 0) begin failures++; $display("no clipped check-to-bit message"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (N + 2 * MAX_ITER_DEFAULT + 10) + 500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
