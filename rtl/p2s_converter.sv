// p2s_converter: the parallel-to-serial converter of the encoder (Fig. 2).
// It captures an N-bit word when load is asserted while ready is high and
// then sends it one bit per clock, bit 0 first, with dout_valid high for
// exactly N cycles. ready is high when idle and also in the cycle that sends
// the last bit, so words can follow each other without a gap.
//
// Interface: valid/ready load handshake on the parallel side; dout, dout_valid,
// dout_first and dout_last on the serial side. Synchronous active-high reset.
// The published architecture names the converter only; the handshake and bit order are this
// design's choice (codeword bit 0, the first parity bit, goes first).
module p2s_converter #(
  parameter int N = 576
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,        // parallel word valid
  output logic         ready,       // word accepted when load && ready
  input  logic [N-1:0] din,
  output logic         dout,
  output logic         dout_valid,
  output logic         dout_first,
  output logic         dout_last
);

  localparam int CW = $clog2(N + 1);

  logic [N-1:0]  sreg;
  logic [CW-1:0] left;      // bits still to send, including the current one

  assign dout       = sreg[0];
  assign dout_valid = (left != '0);
  assign dout_last  = (left == CW'(1));
  assign ready      = (left == '0) || (left == CW'(1));

  logic first_q;
  assign dout_first = dout_valid && first_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      left    <= '0;
      sreg    <= '0;
      first_q <= 1'b0;
    end else if (load && ready) begin
      sreg    <= din;
      left    <= CW'(N);
      first_q <= 1'b1;
    end else if (left != '0) begin
      sreg    <= sreg >> 1;
      left    <= left - CW'(1);
      first_q <= 1'b0;
    end
  end

endmodule
