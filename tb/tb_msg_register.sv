// tb_msg_register: checks load, hold, clear and clear-over-load priority of
// a 2112-word message register with random data.
module tb_msg_register;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, load = 0, clear = 0;
  msg_t d [EDGES], q [EDGES], ref_q [EDGES];
  msg_register #(.DEPTH(EDGES)) dut (.clk, .load, .clear, .d(d), .q(q));
  always #5 clk = ~clk;
  task automatic compare(input string what);
    for (int i = 0; i < EDGES; i++) begin
      checks++;
      if (q[i] != ref_q[i]) begin
        failures++;
        if (failures < 5) $display("%s word %0d: %0d exp %0d", what, i, q[i], ref_q[i]);
      end
    end
  endtask
  initial begin
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int i = 0; i < EDGES; i++) ref_q[i] = '0;
    compare("clear");
    for (int t = 0; t < 4; t++) begin
      for (int i = 0; i < EDGES; i++) d[i] = msg_t'($urandom);
      load = (t != 2); clear = (t == 3);
      @(posedge clk); #1;
      if (t == 3)      for (int i = 0; i < EDGES; i++) ref_q[i] = '0;
      else if (t != 2) for (int i = 0; i < EDGES; i++) ref_q[i] = d[i];
      load = 0; clear = 0;
      compare(t == 2 ? "hold" : "load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
