// decoder_ctrl: iteration controller of the parallel decoder. It sequences
// the sum-product steps: on start it loads the channel priors and clears the
// check-to-bit register (so the first bit-to-check messages equal the
// priors); then each iteration takes two clocks, phase A loading the
// bit-to-check pipeline register (Cell-A, B2C) and phase B loading the
// check-to-bit register (Cell-B). At the start of every later phase A the
// hard decisions of the finished iteration are tested: if H * x_hat = 0, or
// MAX_ITER iterations have run, the decisions are stored and done pulses.
//
// Timing: with start seen on clock edge 0, a decode of n iterations raises
// done (for one cycle, together with the results) after edge 2n+1. start is
// ignored while busy. The stopping rules and the 20-iteration limit follow
// the published architecture; the two-phase schedule follows its two pipeline registers,
// and the handshake is this design's choice. Synchronous active-high reset.
module decoder_ctrl #(
  parameter int MAX_ITER = 20,
  localparam int IW = $clog2(MAX_ITER + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic          syn_ok,      // H * x_hat == 0 for the current decisions
  output logic          busy,
  output logic          lam_load,    // capture channel priors
  output logic          r_clear,     // zero the check-to-bit register
  output logic          a_load,      // phase A: load bit-to-check register
  output logic          b_load,      // phase B: load check-to-bit register
  output logic          out_load,    // capture hard decisions
  output logic          done,        // results valid (one-cycle pulse)
  output logic          converged,   // last decode met H * x_hat = 0
  output logic [IW-1:0] iterations,  // iterations the last decode used
  output logic [IW-1:0] iter         // iterations completed so far
);

  typedef enum logic [1:0] {S_IDLE, S_PHASE_A, S_PHASE_B} state_t;

  state_t state, state_n;
  logic   finish;

  assign busy   = (state != S_IDLE);
  assign finish = (state == S_PHASE_A) && (iter != '0) &&
                  (syn_ok || iter == IW'(MAX_ITER));

  always_comb begin
    state_n  = state;
    lam_load = 1'b0;
    r_clear  = 1'b0;
    a_load   = 1'b0;
    b_load   = 1'b0;
    out_load = 1'b0;
    unique case (state)
      S_IDLE: if (start) begin
        lam_load = 1'b1;
        r_clear  = 1'b1;
        state_n  = S_PHASE_A;
      end
      S_PHASE_A: if (finish) begin
        out_load = 1'b1;
        state_n  = S_IDLE;
      end else begin
        a_load   = 1'b1;
        state_n  = S_PHASE_B;
      end
      S_PHASE_B: begin
        b_load   = 1'b1;
        state_n  = S_PHASE_A;
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= S_IDLE;
      iter       <= '0;
      done       <= 1'b0;
      converged  <= 1'b0;
      iterations <= '0;
    end else begin
      state <= state_n;
      done  <= out_load;
      if (lam_load) iter <= '0;
      else if (b_load) iter <= iter + IW'(1);
      if (out_load) begin
        converged  <= syn_ok;
        iterations <= iter;
      end
    end
  end

  // b_load can only follow a_load, and finishing needs a completed iteration.
  assert property (@(posedge clk) disable iff (rst) b_load |-> $past(a_load));
  assert property (@(posedge clk) disable iff (rst) out_load |-> iter != '0);

endmodule
