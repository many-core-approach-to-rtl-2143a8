// tb_dct_ref_pkg -- reference model used by the testbenches.
//
// Recomputes, from the formulas and independently of the RTL, the values the
// DCT datapath must produce: the angle (2p+1)f mod 2^(L+2), the 8-fraction-bit
// cosine magnitude round(|cos(a*pi/2^(L+1))|*256) with its sign taken from the
// real cosine, the truncated product pixel*((|cx|*|cy|)>>8), and the signed
// 24-bit sum over a window. It also gives the exact floating-point DCT term
// for sanity checks of the fixed-point result.
package tb_dct_ref_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic int ref_angle(int pos, int freq, int log2n);
    return ((2 * pos + 1) * freq) % (1 << (log2n + 2));
  endfunction

  function automatic int ref_cos_mag(int angle, int log2n);
    real c;
    c = $cos(PI * real'(angle) / real'(1 << (log2n + 1)));
    if (c < 0.0) c = -c;
    return $rtoi(c * 256.0 + 0.5);
  endfunction

  function automatic bit ref_cos_neg(int angle, int log2n);
    return $cos(PI * real'(angle) / real'(1 << (log2n + 1))) < 0.0;
  endfunction

  // Signed fixed-point contribution of one pixel (8 fraction bits).
  function automatic int ref_term(int pixel, int x, int y, int u, int v, int log2n);
    int ax, ay, mx, my, t;
    bit neg;
    ax  = ref_angle(x, u, log2n);
    ay  = ref_angle(y, v, log2n);
    mx  = ref_cos_mag(ax, log2n);
    my  = ref_cos_mag(ay, log2n);
    neg = ref_cos_neg(ax, log2n) ^ ref_cos_neg(ay, log2n);
    t   = pixel * ((mx * my) >> 8);
    return neg ? -t : t;
  endfunction

  function automatic real real_term(int pixel, int x, int y, int u, int v, int log2n);
    real n2;
    n2 = real'(1 << (log2n + 1));
    return real'(pixel) * $cos(PI * real'((2 * x + 1) * u) / n2) * $cos(PI * real'((2 * y + 1) * v) / n2);
  endfunction

  function automatic logic [23:0] wrap24(longint v);
    return v[23:0];
  endfunction
endpackage
