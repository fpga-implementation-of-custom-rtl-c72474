// fp_pkg: shared constants of the custom floating-point divider and binary
// logarithm.
//
// Both units approximate a function of the mantissa fraction m (0 <= m < 1)
// with a degree-2 polynomial, evaluated in Horner form (c0*m + c1)*m + c2,
// and split [0,1) into four equal segments selected by the two leading
// mantissa bits. The twelve coefficients of each function are the published
// four-decimal values for log2(1+m) and 1/(1+m). They are kept here as real
// numbers and quantised at elaboration time to the fractional width a unit is
// built with, by truncation (floor), which is the quantisation the bit-width
// analysis of this design assumes. No table file is needed.
//
// Every quantised coefficient is held as a two's-complement number with
// COEF_IBITS integer bits (sign included) above its fractional bits; the
// largest coefficient magnitude is 1.4288, so two integer bits suffice.
package fp_pkg;

  // Which function a polynomial unit approximates.
  typedef enum logic {
    FUNC_RECIP = 1'b0,  // 1/(1+m)
    FUNC_LOG2  = 1'b1   // log2(1+m)
  } poly_func_e;

  localparam int NSEG       = 4;  // number of polynomial segments
  localparam int SEG_BITS   = 2;  // mantissa bits that select a segment
  localparam int COEF_IBITS = 2;  // integer bits (with sign) of a coefficient

  // Published coefficient k (0: c0, 1: c1, 2: c2) of segment seg (0..3).
  function automatic real coeff_real(poly_func_e f, logic [1:0] seg, logic [1:0] k);
    case ({f, seg, k})
      {FUNC_RECIP, 4'h0}: return  0.7099;
      {FUNC_RECIP, 4'h1}: return -0.9736;
      {FUNC_RECIP, 4'h2}: return  0.9995;
      {FUNC_RECIP, 4'h4}: return  0.3874;
      {FUNC_RECIP, 4'h5}: return -0.8222;
      {FUNC_RECIP, 4'h6}: return  0.9811;
      {FUNC_RECIP, 4'h8}: return  0.2342;
      {FUNC_RECIP, 4'h9}: return -0.6729;
      {FUNC_RECIP, 4'hA}: return  0.9444;
      {FUNC_RECIP, 4'hC}: return  0.1523;
      {FUNC_RECIP, 4'hD}: return -0.5517;
      {FUNC_RECIP, 4'hE}: return  0.8995;
      {FUNC_LOG2,  4'h0}: return -0.573;
      {FUNC_LOG2,  4'h1}: return  1.4288;
      {FUNC_LOG2,  4'h2}: return  0.0003;
      {FUNC_LOG2,  4'h4}: return -0.3829;
      {FUNC_LOG2,  4'h5}: return  1.3381;
      {FUNC_LOG2,  4'h6}: return  0.0115;
      {FUNC_LOG2,  4'h8}: return -0.2739;
      {FUNC_LOG2,  4'h9}: return  1.2312;
      {FUNC_LOG2,  4'hA}: return  0.0379;
      {FUNC_LOG2,  4'hC}: return -0.2056;
      {FUNC_LOG2,  4'hD}: return  1.1299;
      {FUNC_LOG2,  4'hE}: return  0.0756;
      default:            return  0.0;
    endcase
  endfunction

  // Coefficient quantised to fb fractional bits by truncation toward -inf.
  function automatic longint coeff_q(poly_func_e f, logic [1:0] seg, logic [1:0] k, int fb);
    return longint'($floor(coeff_real(f, seg, k) * (2.0 ** fb)));
  endfunction

  // Exponent bias of a format with e exponent bits.
  function automatic int bias_of(int e);
    return (1 << (e - 1)) - 1;
  endfunction

endpackage
