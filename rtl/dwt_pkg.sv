// dwt_pkg: word sizes and fixed-point constants shared by the 2-D 9/7 lifting DWT.
//
// Data words are 12-bit two's-complement integers; pixels are 8-bit unsigned.
// These two widths come from the source architecture. It does not give the
// lifting constants (alpha..delta) or the merged 2-D scale factors K^2 and
// 1/K^2; the values below are the usual CDF 9/7 lifting constants, alpha = -1.586134342,
// beta = -0.052980118, gamma = 0.882911076, delta = 0.443506852, K = 1.149604398,
// stored as 12-bit signed numbers with 10 fraction bits, rounded to nearest
// (for example ALPHA_Q = round(-1.586134342 * 1024) = -1624). The constant format
// is this design's own choice.
package dwt_pkg;

  localparam int PIX_W = 8;    // pixel width
  localparam int W     = 12;   // intermediate and output word width
  localparam int CF    = 10;   // constant fraction bits

  localparam int ALPHA_Q = -1624;  // round(alpha * 2^CF)
  localparam int BETA_Q  = -54;    // round(beta  * 2^CF)
  localparam int GAMMA_Q = 904;    // round(gamma * 2^CF)
  localparam int DELTA_Q = 454;    // round(delta * 2^CF)
  localparam int K2_Q    = 1353;   // round(K^2   * 2^CF), LL scale
  localparam int IK2_Q   = 775;    // round(K^-2  * 2^CF), HH scale

  typedef logic signed [W-1:0]     word_t;
  typedef logic        [PIX_W-1:0] pix_t;

  // The four lifting-step outputs of one section (one row sample pair, or one
  // pair of rows in a column): s1 = alpha step, s2 = beta step, s3 = gamma step
  // (high-pass), s4 = delta step (low-pass). The (n-1)/(m-1) carry that the next
  // section or the next cycle needs is the odd-neighbour input b plus s1..s3.
  typedef struct packed {
    word_t b;
    word_t s1;
    word_t s2;
    word_t s3;
  } carry_t;

endpackage
