// fp_log2: custom-precision floating-point binary logarithm y = log2(x).
//
// Format: {sign, E-bit biased exponent, M-bit fraction}, as in fp_div. For a
// positive x = 1.m * 2^(ex-bias), log2(x) = (ex - bias) + log2(1.m). The
// second term comes from a four-segment degree-2 polynomial (poly_approx,
// FUNC_LOG2) and lies in [0, 1). It is added to the unbiased exponent shifted
// left by M bits, which gives the result as a signed fixed-point number with
// M fractional bits. The result is negative exactly when ex < bias, so that
// comparison drives the multiplexer that picks the magnitude (the sum or its
// negation) and the output sign. fix2float then turns sign and magnitude into
// floating point: the exponent from the position of the leading one, the
// mantissa from the M bits that follow it, truncated. A negative x gives NaN
// (exponent all ones, fraction MSB set, sign clear).
//
// Not handled (as in the design this follows): zero, subnormal, infinity and
// NaN inputs; x = 0 is treated as 1.0 * 2^-bias. An exact result of zero
// (possible for x = 1.0 at small M, where the segment-0 constant truncates to
// zero) is returned as +0.0.
//
// Timing: one logarithm per cycle, latency 7 cycles from in_valid to
// out_valid.
//   1: input registered
//   2-4: polynomial log2(1.m)
//   5: fixed-point sum, sign and magnitude registered
//   6-7: fix2float (leading-one search, then normalise and pack)
//
// Following the design: equation log2(x) = log2(1.m) + (ex - bias), NaN for
// negative input, the sign multiplexer from comparing exponent and bias, the
// exponent shifted by M bits, the conversion through a priority encoder, no
// rounding, the seven-cycle latency. Own choices: the stage split, the NaN
// and zero encodings, and the valid flag.
module fp_log2
  import fp_pkg::*;
#(
  parameter int E   = 8,   // exponent width
  parameter int M   = 23,  // mantissa fraction width
  parameter int FB0 = 19,  // fractional bits of c0
  parameter int FB1 = 17,  // fractional bits of c1
  parameter int FB2 = 18   // fractional bits of c2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [E+M:0] x,
  output logic         out_valid,
  output logic [E+M:0] y
);

  localparam int BIAS = bias_of(E);
  localparam int ZW   = FB2 + 3;      // width of the polynomial result
  localparam int SW   = E + M + 2;    // signed fixed-point sum width
  localparam int MW   = E + M + 1;    // magnitude width
  localparam logic [E+M:0] NAN = {1'b0, {E{1'b1}}, 1'b1, (M-1)'(0)};

  // ---------------- stage 1: input register ----------------
  logic         s1_sx;
  logic [E-1:0] s1_ex;
  logic [M-1:0] s1_m;
  logic         s1_valid;

  always_ff @(posedge clk) begin
    s1_sx <= x[E+M];
    s1_ex <= x[E+M-1:M];
    s1_m  <= x[M-1:0];
  end

  // ---------------- stages 2-4: log2(1.m) ----------------
  logic signed [ZW-1:0] frac_log;
  logic                 s4_valid;

  poly_approx #(.FUNC(FUNC_LOG2), .M(M), .FB0(FB0), .FB1(FB1), .FB2(FB2)) u_log (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .m        (s1_m),
    .out_valid(s4_valid),
    .z        (frac_log)
  );

  logic         s2_sx, s3_sx, s4_sx;
  logic [E-1:0] s2_ex, s3_ex, s4_ex;

  always_ff @(posedge clk) begin
    s2_sx <= s1_sx;  s2_ex <= s1_ex;
    s3_sx <= s2_sx;  s3_ex <= s2_ex;
    s4_sx <= s3_sx;  s4_ex <= s3_ex;
  end

  // ---------------- stage 5: fixed-point sum ----------------
  logic signed [SW-1:0] frac_al, sum;
  logic                 neg;
  logic [MW-1:0]        mag_d, s5_mag;
  logic                 s5_neg, s5_nan, s5_valid;

  fx_align #(.IW(ZW), .IF(FB2), .OW(SW), .OF(M)) u_al (.a(frac_log), .y(frac_al));

  always_comb begin
    sum   = ((SW'(s4_ex) - SW'(BIAS)) <<< M) + frac_al;
    neg   = s4_ex < E'(BIAS);
    mag_d = neg ? MW'(-sum) : MW'(sum);
  end

  always_ff @(posedge clk) begin
    s5_mag <= mag_d;
    s5_neg <= neg;
    s5_nan <= s4_sx;
  end

  // ---------------- stages 6-7: fixed to floating point ----------------
  logic [E+M:0] conv;
  logic         s7_valid;
  logic         s6_nan, s7_nan;

  fix2float #(.E(E), .M(M), .W(MW), .F(M)) u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s5_valid),
    .sign     (s5_neg),
    .mag      (s5_mag),
    .out_valid(s7_valid),
    .fp       (conv)
  );

  always_ff @(posedge clk) begin
    s6_nan <= s5_nan;
    s7_nan <= s6_nan;
  end

  assign y = s7_nan ? NAN : conv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s5_valid <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      s5_valid <= s4_valid;
    end
  end
  assign out_valid = s7_valid;

endmodule
