// ldpc_pkg: sizes, message types and code construction shared by the encoder
// and the decoder of the rate 8/9 PCPC (parallel concatenated parity check)
// LDPC code with k = 512 message bits and n = 576 codeword bits.
//
// Code construction. P1 is a 16 x 512 matrix whose row r holds 32 consecutive
// ones in columns 32r .. 32r+31. The 64 x 512 parity part of H stacks P1 and
// three column-permuted copies pi_1(P1), pi_2(P1), pi_3(P1); H = [I64 | P] and
// G = [P ; I512]. The codeword is c = {parity[0..63], m[0..511]}: codeword bit
// i < 64 is parity bit i, codeword bit 64+j is message bit j.
//
// The permutations pi_g are specified only as "independent random column
// permutations", so this design fixes its own: for group g = 1..3
//   pi_g(j) = (C_g * bitrev9((A_g * j + B_g) mod 512) + D_g) mod 512
// with odd A_g, C_g (each step is a bijection of 0..511). pi_0 is the identity.
// Message bit j of group g lies in check row 16*g + pi_g(j)/32.
//
// Messages are (6,2) fixed point: 6-bit two's complement, 2 fraction bits.
// The LUT-B1 output and the saturated check-node sums are unsigned (6,2)
// magnitudes, 0 .. 15.75.
package ldpc_pkg;

  localparam int K       = 512;          // message bits
  localparam int M       = 64;           // parity bits = checks
  localparam int N       = K + M;        // codeword bits
  localparam int GROUPS  = 4;            // P1 and its three permutations
  localparam int ROWS    = 16;           // rows of P1
  localparam int RUN     = 32;           // consecutive ones per row of P1
  localparam int DC      = RUN + 1;      // check-node degree (row weight 33)
  localparam int EDGES   = M * DC;       // 2112 edges of the bipartite graph
  localparam int QW      = 6;            // message width, (6,2) format
  localparam int QF      = 2;            // fraction bits
  localparam int MAX_ITER_DEFAULT = 20;  // iteration limit used for Fig. 8

  typedef logic signed [QW-1:0] msg_t;   // signed (6,2) message
  typedef logic        [QW-1:0] mag_t;   // unsigned (6,2) magnitude

  localparam int MSG_MAX = (1 << (QW-1)) - 1;   //  31 =  7.75
  localparam int MSG_MIN = -(1 << (QW-1));      // -32 = -8.00
  localparam int MAG_MAX = (1 << QW) - 1;       //  63 = 15.75

  // Constants of the three pseudo-random permutations (index 0 unused).
  localparam int PA [GROUPS] = '{1, 303, 391, 511};
  localparam int PB [GROUPS] = '{0,  13, 481,  35};
  localparam int PC [GROUPS] = '{1, 475, 171,  63};
  localparam int PD [GROUPS] = '{0, 424,  17,  16};

  function automatic int bitrev9(input int v);
    int r;
    r = 0;
    for (int b = 0; b < 9; b++) if (v[b]) r = r | (1 << (8 - b));
    return r;
  endfunction

  // Column pi_g(j) of P1 that message bit j occupies in group g.
  function automatic int perm(input int g, input int j);
    int y;
    if (g == 0) return j;
    y = (PA[g] * j + PB[g]) % K;
    y = bitrev9(y);
    return (PC[g] * y + PD[g]) % K;
  endfunction

  // Check (row of H) that message bit j reaches through group g.
  function automatic int info_check(input int g, input int j);
    return g * ROWS + perm(g, j) / RUN;
  endfunction

  // Edge index, check-major: edge c*33 is the parity bit of check c, edges
  // c*33+1 .. c*33+32 are its message bits in column order of P1.
  function automatic int info_edge(input int g, input int j);
    return info_check(g, j) * DC + 1 + perm(g, j) % RUN;
  endfunction

  function automatic int parity_edge(input int c);
    return c * DC;
  endfunction

  // Saturate a two's complement value to the signed (6,2) range.
  function automatic msg_t sat_msg(input int v);
    if (v > MSG_MAX) return msg_t'(MSG_MAX);
    if (v < MSG_MIN) return msg_t'(MSG_MIN);
    return msg_t'(v);
  endfunction

endpackage
