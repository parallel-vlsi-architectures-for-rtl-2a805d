// tb_ldpc_encoder: sends random messages back to back through the encoder,
// collects the serial codewords and checks that (a) the message part is the
// message, (b) the parity matches an encoder written from the rows of H, and
// (c) one codeword leaves every 576 clocks.
module tb_ldpc_encoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int FRAMES = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, m_valid = 0, m_ready, c_bit, c_valid, c_first, c_last;
  logic [K-1:0] m;
  logic [M-1:0] parity;
  logic [K-1:0] msgs [FRAMES];
  logic [N-1:0] rx;
  int nrx = 0, pos = 0, cyc = 0, first_c = 0, last_c = 0;
  ldpc_encoder dut (.clk, .rst, .m_valid, .m_ready, .m, .c_bit, .c_valid,
                    .c_first, .c_last, .parity);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int i = 0; i < K; i += 32) msgs[f][i +: 32] = $urandom;
    msgs[0] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < FRAMES; f++) begin
      m_valid <= 1; m <= msgs[f];
      @(posedge clk);
      while (!m_ready) @(posedge clk);
    end
    m_valid <= 0;
  end
  always @(posedge clk) if (!rst && c_valid) begin
    if (c_first) begin pos = 0; if (nrx == 0) first_c = cyc; end
    rx[pos] = c_bit;
    pos++;
    if (c_last) begin
      logic [N-1:0] exp_cw;
      encode(msgs[nrx], exp_cw);
      checks++;
      if (pos != N) begin failures++; $display("codeword %0d has %0d bits", nrx, pos); end
      checks++;
      if (rx[N-1:M] != msgs[nrx]) begin failures++; $display("message part wrong"); end
      checks++;
      if (rx[M-1:0] != exp_cw[M-1:0]) begin
        failures++; $display("parity %h exp %h", rx[M-1:0], exp_cw[M-1:0]);
      end
      nrx++;
      last_c = cyc;
    end
  end
  initial begin
    wait (nrx == FRAMES);
    checks++;
    if (last_c - first_c + 1 != FRAMES * N) begin
      failures++; $display("%0d codewords took %0d cycles", FRAMES, last_c - first_c + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (FRAMES * N + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
