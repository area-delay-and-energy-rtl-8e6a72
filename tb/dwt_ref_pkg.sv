// dwt_ref_pkg: reference model for the testbenches of the 2-D 9/7 lifting DWT.
//
// The model is written from the lifting equations, not from the RTL: it works on
// whole rows/columns held in integer arrays, indexes the previous pair directly
// (index -1 reads zero), and derives its own fixed-point constants from the real
// CDF 9/7 values (round(c * 2^10)). Arithmetic per lifting step: sum of the two
// neighbours, times the constant, plus half an LSB, arithmetic shift right by 10,
// plus the updated sample, saturated to 12-bit signed. A real-valued version of
// the same transform is provided for accuracy checks. sat_count counts how often
// the integer model saturated.
package dwt_ref_pkg;

  localparam int  FRAC = 10;
  localparam real R_ALPHA = -1.586134342;
  localparam real R_BETA  = -0.052980118;
  localparam real R_GAMMA =  0.882911076;
  localparam real R_DELTA =  0.443506852;
  localparam real R_K     =  1.149604398;

  int sat_count = 0;

  function automatic int q(real c);
    return int'(c * real'(1 << FRAC));   // real to int rounds to nearest
  endfunction

  function automatic int sat12(longint v);
    if (v > 2047) begin sat_count++; return 2047; end
    if (v < -2048) begin sat_count++; return -2048; end
    return int'(v);
  endfunction

  // a + c*(b+d)
  function automatic int lc(int a, int b, int d, int c);
    longint p;
    p = longint'(b + d) * longint'(c);
    p = (p + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
    return sat12(p + longint'(a));
  endfunction

  function automatic int scale(int x, int c);
    longint p;
    p = (longint'(x) * longint'(c) + (64'sd1 <<< (FRAC - 1))) >>> FRAC;
    return sat12(p);
  endfunction

  // One 1-D lifting run over pairs (a[k], b[k]), k = 0..len-1.
  function automatic void lift1d(input int a[], input int b[], output int hi[], output int lo[]);
    int len = a.size();
    int s1[], s2[], s3[];
    int bp, s1p, s2p, s3p;
    s1 = new[len]; s2 = new[len]; s3 = new[len];
    hi = new[len]; lo = new[len];
    for (int k = 0; k < len; k++) begin
      bp  = (k > 0) ? b[k-1]  : 0;
      s1p = (k > 0) ? s1[k-1] : 0;
      s2p = (k > 0) ? s2[k-1] : 0;
      s3p = (k > 0) ? s3[k-1] : 0;
      s1[k] = lc(a[k], b[k], bp,  q(R_ALPHA));
      s2[k] = lc(bp,   s1[k], s1p, q(R_BETA));
      s3[k] = lc(s1p,  s2[k], s2p, q(R_GAMMA));
      lo[k] = lc(s2p,  s3[k], s3p, q(R_DELTA));
      hi[k] = s3[k];
    end
  endfunction

  function automatic void lift1d_real(input real a[], input real b[], output real hi[], output real lo[]);
    int len = a.size();
    real s1[], s2[], s3[];
    real bp, s1p, s2p, s3p;
    s1 = new[len]; s2 = new[len]; s3 = new[len];
    hi = new[len]; lo = new[len];
    for (int k = 0; k < len; k++) begin
      bp  = (k > 0) ? b[k-1]  : 0.0;
      s1p = (k > 0) ? s1[k-1] : 0.0;
      s2p = (k > 0) ? s2[k-1] : 0.0;
      s3p = (k > 0) ? s3[k-1] : 0.0;
      s1[k] = a[k] + R_ALPHA * (b[k] + bp);
      s2[k] = bp   + R_BETA  * (s1[k] + s1p);
      s3[k] = s1p  + R_GAMMA * (s2[k] + s2p);
      lo[k] = s2p  + R_DELTA * (s3[k] + s3p);
      hi[k] = s3[k];
    end
  endfunction

endpackage
