// ldpc_ref_pkg: reference models for the testbenches. It holds a
// straightforward floating-to-fixed computation of the f() tables, an
// encoder that works from the rows of H, an AWGN channel with (6,2) LLR
// quantization, and a loop-based fixed-point sum-product decoder that
// follows the same schedule and number formats as the hardware, so its
// decisions and iteration counts can be compared bit for bit.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  // round(4 * f(k/4)), f(x) = log((e^x+1)/(e^x-1)), clipped to 63.
  function automatic int f_q(input int k);
    real x, v;
    if (k == 0) return 63;
    x = k / 4.0;
    v = $ln((($exp(x)) + 1.0) / (($exp(x)) - 1.0));
    v = $floor(4.0 * v + 0.5);
    return (v > 63.0) ? 63 : int'(v);
  endfunction

  function automatic int sat_i(input int v, input int lo, input int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Rows of H: row_bits[c] lists the message bits of check c.
  typedef int row_t [RUN];
  function automatic void build_rows(output row_t rows [M]);
    int fill [M];
    for (int c = 0; c < M; c++) fill[c] = 0;
    for (int g = 0; g < GROUPS; g++)
      for (int j = 0; j < K; j++) begin
        int c;
        c = info_check(g, j);
        rows[c][fill[c]] = j;
        fill[c]++;
      end
  endfunction

  // Systematic codeword {parity, m} from the rows of H.
  function automatic void encode(input logic [K-1:0] m, output logic [N-1:0] cw);
    row_t rows [M];
    build_rows(rows);
    cw = '0;
    cw[N-1:M] = m;
    for (int c = 0; c < M; c++) begin
      logic p;
      p = 1'b0;
      for (int s = 0; s < RUN; s++) p ^= m[rows[c][s]];
      cw[c] = p;
    end
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // BPSK over AWGN at the given Eb/N0 (dB), bit 1 -> +1, then the LLR
  // 2y/sigma^2 quantized to (6,2) with rounding and saturation.
  function automatic void channel(input logic [N-1:0] cw, input real ebn0_db,
                                  output msg_t llr [N]);
    real rate, sigma2, y, l;
    rate   = real'(K) / real'(N);
    sigma2 = 1.0 / (2.0 * rate * $pow(10.0, ebn0_db / 10.0));
    for (int i = 0; i < N; i++) begin
      y = (cw[i] ? 1.0 : -1.0) + $sqrt(sigma2) * gauss();
      l = 2.0 * y / sigma2;
      llr[i] = msg_t'(sat_i(int'($floor(l * 4.0 + 0.5)), -32, 31));
    end
  endfunction

  // Fixed-point sum-product decoder in the hardware's formats and schedule.
  function automatic void decode(input msg_t llr [N], input int max_iter,
                                 output logic [N-1:0] xh, output int iters,
                                 output bit conv);
    row_t rows [M];
    int   r [M][DC];        // check-to-bit, slot 0 = parity bit
    int   q [M][DC];        // bit-to-check
    int   post [N];
    int   f1 [DC];
    build_rows(rows);
    for (int c = 0; c < M; c++) for (int s = 0; s < DC; s++) r[c][s] = 0;
    iters = 0;
    conv  = 0;
    forever begin
      // bit nodes: posterior with the current r, then extrinsic messages
      for (int i = 0; i < N; i++) post[i] = int'(llr[i]);
      for (int c = 0; c < M; c++) begin
        post[c] += r[c][0];
        for (int s = 1; s < DC; s++) post[M + rows[c][s-1]] += r[c][s];
      end
      if (iters > 0) begin
        bit ok;
        for (int i = 0; i < N; i++) xh[i] = (post[i] >= 0);
        ok = 1;
        for (int c = 0; c < M; c++) begin
          logic p;
          p = xh[c];
          for (int s = 0; s < RUN; s++) p ^= xh[M + rows[c][s]];
          if (p) ok = 0;
        end
        if (ok || iters == max_iter) begin
          conv = ok;
          return;
        end
      end
      for (int c = 0; c < M; c++) begin
        q[c][0] = int'(llr[c]);
        for (int s = 1; s < DC; s++)
          q[c][s] = sat_i(post[M + rows[c][s-1]] - r[c][s], -32, 31);
      end
      // check nodes
      for (int c = 0; c < M; c++) begin
        for (int s = 0; s < DC; s++) f1[s] = f_q(q[c][s] < 0 ? -q[c][s] : q[c][s]);
        for (int k = 0; k < DC; k++) begin
          int sum, mag, ones;
          sum = 0; ones = 0;
          for (int s = 0; s < DC; s++) if (s != k) begin
            sum += f1[s];
            if (q[c][s] >= 0) ones++;
          end
          mag = f_q(sat_i(sum, 0, 63));
          if (mag > 31) mag = 31;
          r[c][k] = (ones % 2 == 1) ? mag : -mag;
        end
      end
      iters++;
    end
  endfunction

endpackage
