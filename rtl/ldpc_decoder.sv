// ldpc_decoder: fully parallel sum-product decoder of the rate 8/9 PCPC LDPC
// code (Fig. 3). Every bit node and check node has its own hardware:
// 64 Cell-A1 (parity bits, weight-1 columns), 512 Cell-A2 (message bits,
// weight-4 columns) and 64 Cell-B (33-input checks). The B2C interleaver
// routes the 2112 bit-to-check messages into the first pipeline register,
// Cell-B reads it and writes the second pipeline register, and the C2B
// interleaver routes those check-to-bit messages back to the Cell-A units.
// All messages are (6,2) fixed point; each pipeline register is 2112 x 6 bits.
//
// Operation: pulse start with the 576 channel LLRs on llr (codeword order:
// parity bits 0..63, then message bits; positive means bit 1). The priors
// are stored, so llr may change afterwards. Each iteration takes two clocks
// (see decoder_ctrl); the decode stops when H * x_hat = 0 or after MAX_ITER
// iterations. done then pulses with x_hat, info (the 512 decoded message
// bits), iterations and converged valid until the next decode ends.
// Latency for n iterations: done follows the start edge by 2n+1 clocks.
// The prior store, the controller and the handshake are this design's
// additions around the datapath of the figure.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int MAX_ITER = MAX_ITER_DEFAULT,
  localparam int IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  msg_t          llr [N],
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  x_hat,
  output logic [K-1:0]  info,
  output logic          converged,
  output logic [IW-1:0] iterations
);

  logic lam_load, r_clear, a_load, b_load, out_load, syn_ok;
  logic [IW-1:0] iter;

  msg_t lam    [N];
  msg_t r_par  [M];
  msg_t r_info [K][GROUPS];
  msg_t q_par  [M];
  msg_t q_info [K][GROUPS];
  msg_t e_b2c  [EDGES];
  msg_t reg_bc [EDGES];     // first pipeline register: bit-to-check
  msg_t e_cb   [EDGES];
  msg_t reg_cb [EDGES];     // second pipeline register: check-to-bit
  logic [N-1:0] xh;
  logic [M-1:0] syn;

  decoder_ctrl #(.MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst, .start, .syn_ok, .busy, .lam_load, .r_clear, .a_load, .b_load,
    .out_load, .done, .converged, .iterations, .iter
  );

  msg_register #(.DEPTH(N)) u_prior (
    .clk, .load(lam_load), .clear(1'b0), .d(llr), .q(lam)
  );

  c2b_interleaver u_c2b (.e(reg_cb), .r_par(r_par), .r_info(r_info));

  for (genvar c = 0; c < M; c++) begin : g_cell_a1
    cell_a1 u_a1 (.lam(lam[c]), .r(r_par[c]), .q(q_par[c]), .x_hat(xh[c]));
  end

  for (genvar j = 0; j < K; j++) begin : g_cell_a2
    cell_a2 u_a2 (.lam(lam[M+j]), .r(r_info[j]), .q(q_info[j]), .x_hat(xh[M+j]));
  end

  b2c_interleaver u_b2c (.q_par(q_par), .q_info(q_info), .e(e_b2c));

  msg_register #(.DEPTH(EDGES)) u_reg_bc (
    .clk, .load(a_load), .clear(1'b0), .d(e_b2c), .q(reg_bc)
  );

  for (genvar c = 0; c < M; c++) begin : g_cell_b
    msg_t qin  [DC];
    msg_t rout [DC];
    for (genvar s = 0; s < DC; s++) begin : g_slot
      assign qin[s]        = reg_bc[c*DC + s];
      assign e_cb[c*DC + s] = rout[s];
    end
    cell_b u_b (.q(qin), .r(rout));
  end

  msg_register #(.DEPTH(EDGES)) u_reg_cb (
    .clk, .load(b_load), .clear(r_clear), .d(e_cb), .q(reg_cb)
  );

  syndrome_check u_syn (.x_hat(xh), .syn(syn), .ok(syn_ok));

  always_ff @(posedge clk) begin
    if (rst)           x_hat <= '0;
    else if (out_load) x_hat <= xh;
  end

  assign info = x_hat[N-1:M];

endmodule
