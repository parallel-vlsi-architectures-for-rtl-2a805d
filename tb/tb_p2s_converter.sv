// tb_p2s_converter: loads three 576-bit words, the second and third offered
// while the previous one is still going out, and checks the serial bits,
// the first/last markers and that each word takes exactly 576 clocks with
// no gap between words.
module tb_p2s_converter;
  localparam int N = 576;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0, ready, dout, dv, df, dl;
  logic [N-1:0] din;
  logic [N-1:0] words [3];
  int got_words = 0, bitpos = 0, cycles = 0, first_cycle = -1, last_cycle = -1;
  p2s_converter #(.N(N)) dut (.clk, .rst, .load, .ready, .din, .dout,
                              .dout_valid(dv), .dout_first(df), .dout_last(dl));
  always #5 clk = ~clk;
  always @(posedge clk) cycles++;
  initial begin
    for (int w = 0; w < 3; w++)
      for (int i = 0; i < N; i += 32) words[w][i +: 32] = $urandom;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < 3; w++) begin
      load <= 1; din <= words[w];
      @(posedge clk);
      while (!ready) @(posedge clk);
    end
    load <= 0;
  end
  // receiver
  always @(posedge clk) if (!rst && dv) begin
    if (got_words < 3) begin
      checks++;
      if (dout != words[got_words][bitpos]) failures++;
      checks++;
      if (df != (bitpos == 0) || dl != (bitpos == N-1)) failures++;
      if (df && first_cycle < 0) first_cycle = cycles;
      bitpos++;
      if (bitpos == N) begin bitpos = 0; got_words++; last_cycle = cycles; end
    end else failures++;
  end
  initial begin
    wait (got_words == 3);
    repeat (3) @(posedge clk);
    checks++;
    if (last_cycle - first_cycle + 1 != 3 * N) begin
      failures++;
      $display("p2s took %0d cycles for 3 words", last_cycle - first_cycle + 1);
    end
    checks++;
    if (dv) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
