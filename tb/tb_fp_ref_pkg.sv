// tb_fp_ref_pkg: reference models for the testbenches of the floating-point
// divider and logarithm.
//
// The models recompute, with 64-bit integers, what the hardware is specified
// to produce: coefficients truncated to their fractional widths, Horner
// evaluation with each product truncated to the next coefficient's width,
// then the divider's normalisation or the logarithm's fixed-to-float
// conversion, all without rounding. They are written from the arithmetic
// definition, not from the RTL structure (for example the divider model tests
// 1.mx*r >= 1 instead of a shifted product, and the logarithm model takes the
// sign from the fixed-point sum). Helpers convert between the packed format
// and real numbers for accuracy checks against the exact functions.
package tb_fp_ref_pkg;

  // Published coefficients: [function 0=1/(1+m), 1=log2(1+m)][segment][k]
  function automatic real tb_coef_real(int f, int seg, int k);
    real rc [4][3];
    real lc [4][3];
    rc[0] = '{0.7099, -0.9736, 0.9995};
    rc[1] = '{0.3874, -0.8222, 0.9811};
    rc[2] = '{0.2342, -0.6729, 0.9444};
    rc[3] = '{0.1523, -0.5517, 0.8995};
    lc[0] = '{-0.573,  1.4288, 0.0003};
    lc[1] = '{-0.3829, 1.3381, 0.0115};
    lc[2] = '{-0.2739, 1.2312, 0.0379};
    lc[3] = '{-0.2056, 1.1299, 0.0756};
    return (f == 0) ? rc[seg][k] : lc[seg][k];
  endfunction

  function automatic longint tb_coef(int f, int seg, int k, int fb);
    real v;
    longint q;
    v = tb_coef_real(f, seg, k) * (2.0 ** fb);
    q = longint'(v);                 // rounds to nearest
    if (real'(q) > v) q = q - 1;     // -> floor
    if (real'(q) + 1.0 <= v) q = q + 1;
    return q;
  endfunction

  // floor(v / 2^sh) for sh >= 0, v * 2^-sh otherwise
  function automatic longint tb_rescale(longint v, int sh);
    if (sh >= 0) return v >>> sh;
    return v <<< (-sh);
  endfunction

  // Polynomial result with fb2 fractional bits.
  function automatic longint tb_poly(int f, longint m, int M, int fb0, int fb1, int fb2);
    int     seg;
    longint y, z;
    seg = int'(m >> (M - 2));
    y = tb_rescale(tb_coef(f, seg, 0, fb0) * m, fb0 + M - fb1) + tb_coef(f, seg, 1, fb1);
    z = tb_rescale(y * m, fb1 + M - fb2) + tb_coef(f, seg, 2, fb2);
    return z;
  endfunction

  function automatic longint tb_mask(int n);
    return (longint'(1) <<< n) - 1;
  endfunction

  // Reciprocal of 1.m with fb2 fractional bits, limited to [0.5, 1].
  function automatic longint tb_recip(longint m, int M, int fb0, int fb1, int fb2);
    longint r;
    r = tb_poly(0, m, M, fb0, fb1, fb2);
    if (r < (longint'(1) <<< (fb2 - 1))) r = longint'(1) <<< (fb2 - 1);
    if (r > (longint'(1) <<< fb2))       r = longint'(1) <<< fb2;
    return r;
  endfunction

  // Expected quotient bits.
  function automatic longint tb_div(longint x, longint y, int E, int M,
                                    int fb0, int fb1, int fb2);
    longint sx, sy, ex, ey, mx, my, r, p, mant, ez;
    int     bias;
    bias = (1 << (E - 1)) - 1;
    sx = (x >> (E + M)) & 1;  sy = (y >> (E + M)) & 1;
    ex = (x >> M) & tb_mask(E);  ey = (y >> M) & tb_mask(E);
    mx = x & tb_mask(M);  my = y & tb_mask(M);
    r  = tb_recip(my, M, fb0, fb1, fb2);
    p  = ((longint'(1) <<< M) + mx) * r;         // M+fb2 fractional bits
    if (p >= (longint'(1) <<< (M + fb2))) begin  // 1.mx * r >= 1
      mant = (p >>> fb2) & tb_mask(M);
      ez   = ex - ey + bias;
    end else begin
      mant = (p >>> (fb2 - 1)) & tb_mask(M);
      ez   = ex - ey + bias - 1;
    end
    return ((sx ^ sy) <<< (E + M)) | ((ez & tb_mask(E)) <<< M) | mant;
  endfunction

  // True when the divider had to shift its product right (1.mx*r >= 1).
  function automatic bit tb_div_shift(longint x, longint y, int E, int M,
                                      int fb0, int fb1, int fb2);
    longint r;
    r = tb_recip(y & tb_mask(M), M, fb0, fb1, fb2);
    return (((longint'(1) <<< M) + (x & tb_mask(M))) * r) >= (longint'(1) <<< (M + fb2));
  endfunction

  // Expected logarithm bits.
  function automatic longint tb_log(longint x, int E, int M, int fb0, int fb1, int fb2);
    longint ex, m, f, s, mag, mant;
    longint sgn;
    int     bias, p;
    bias = (1 << (E - 1)) - 1;
    if (((x >> (E + M)) & 1) == 1)
      return (tb_mask(E) <<< M) | (longint'(1) <<< (M - 1));
    ex = (x >> M) & tb_mask(E);
    m  = x & tb_mask(M);
    f  = tb_rescale(tb_poly(1, m, M, fb0, fb1, fb2), fb2 - M);
    s  = ((ex - bias) <<< M) + f;
    sgn = (s < 0) ? 1 : 0;
    mag = (s < 0) ? -s : s;
    if (mag == 0) return 0;
    p = 0;
    for (int i = 0; i < 62; i++) if (((mag >> i) & 1) == 1) p = i;
    if (p >= M) mant = (mag >>> (p - M)) & tb_mask(M);
    else        mant = (mag <<< (M - p)) & tb_mask(M);
    return (sgn <<< (E + M)) | ((longint'(p - M + bias) & tb_mask(E)) <<< M) | mant;
  endfunction

  // Packed value -> real (normal numbers; exponent 0 read as 2^-bias).
  function automatic real tb_to_real(longint v, int E, int M);
    real r, scale;
    int  bias, e;
    bias = (1 << (E - 1)) - 1;
    if ((v & tb_mask(E + M)) == 0) return 0.0;
    e = int'((v >> M) & tb_mask(E)) - bias;
    scale = 2.0 ** e;
    r = (1.0 + real'(v & tb_mask(M)) / (2.0 ** M)) * scale;
    return (((v >> (E + M)) & 1) == 1) ? -r : r;
  endfunction

  // Random normal operand with unbiased exponent in [-erange, erange].
  function automatic longint tb_rand_fp(int E, int M, int erange, bit allow_neg);
    int     bias;
    longint s, e, m;
    bias = (1 << (E - 1)) - 1;
    s = allow_neg ? longint'($urandom_range(1, 0)) : 0;
    e = longint'(bias) + longint'($urandom_range(2 * erange, 0)) - erange;
    m = ((longint'($urandom) << 32) | longint'($urandom)) & tb_mask(M);
    return (s <<< (E + M)) | (e <<< M) | m;
  endfunction

endpackage
