// ecc_pkg: types, constants and code functions shared by the error-control
// coding laboratory design.
//
// The code is the systematic (7,4) Hamming code of the transmitter and
// receiver boards. The trainee sets the 3x4 coefficient matrix P with twelve
// switches; the generator matrix is G = [I4 P^T] and the parity-check matrix
// H = [P I3]. Bit numbering: msg_t bit j-1 holds message bit Mj, cw_t bit i-1
// holds codeword bit Ci, and pmat_t element [i-1][j-1] holds P(i,j).
//
// Soft channel samples are signed fixed point with SOFT_FRAC fractional bits
// (a transmitted +1 is 2**SOFT_FRAC). The sample width and scaling are this
// design's choice; the document gives no number format for them.
package ecc_pkg;

  localparam int K     = 4;  // message length k = 2^m - m - 1
  localparam int N     = 7;  // codeword length n = 2^m - 1
  localparam int M     = 3;  // parity bits m
  localparam int NCW   = 16; // 2^k codewords searched by the ML decoder

  localparam int SOFT_W    = 8;
  localparam int SOFT_FRAC = 4;

  typedef logic [K-1:0]         msg_t;
  typedef logic [N-1:0]         cw_t;
  typedef logic [M-1:0]         syn_t;
  typedef logic [M-1:0][K-1:0]  pmat_t;
  typedef logic signed [SOFT_W-1:0] soft_t;
  typedef soft_t [N-1:0]        soft_word_t;

  // Switch settings of the transmitter panel.
  typedef struct packed {
    pmat_t      p;        // coefficient matrix P
    logic [3:0] ebn0_db;  // Eb/N0 in dB, 0..15
    logic       noise_en; // add channel noise
    logic       coded;    // 1: (7,4) Hamming coded, 0: uncoded 4-bit frames
    logic [3:0] user_id;  // trainee ID shown with the results
  } tx_cfg_t;

  // Switch settings of the receiver panel.
  typedef struct packed {
    pmat_t      p;        // coefficient matrix P (must match the transmitter)
    cw_t        err_sw;   // deliberate error switches e1..e7
    logic       soft_dec; // 1: maximum-likelihood (soft), 0: syndrome (hard)
    logic       coded;    // 1: coded frames, 0: uncoded frames
  } rx_cfg_t;

  // C = M G with G = [I4 P^T]: C1..C4 = M1..M4, C(4+i) = XOR_j M(j) & P(i,j).
  function automatic cw_t hamming_encode(msg_t m, pmat_t p);
    cw_t c;
    c[K-1:0] = m;
    for (int i = 0; i < M; i++) c[K+i] = ^(m & p[i]);
    return c;
  endfunction

  // S = R H^T with H = [P I3]: S(i) = XOR_j R(j) & P(i,j)  XOR  R(4+i).
  function automatic syn_t hamming_syndrome(cw_t r, pmat_t p);
    syn_t s;
    for (int i = 0; i < M; i++) s[i] = (^(r[K-1:0] & p[i])) ^ r[K+i];
    return s;
  endfunction

  // Column j of H, i.e. row j of H^T (j = 0..6).
  function automatic syn_t h_column(int j, pmat_t p);
    syn_t col;
    for (int i = 0; i < M; i++)
      col[i] = (j < K) ? p[i][j] : (j - K == i);
    return col;
  endfunction

endpackage
