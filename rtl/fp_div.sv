// fp_div: custom-precision floating-point divider z = x / y.
//
// Format: {sign, E-bit biased exponent, M-bit fraction of a normalised 1.m
// mantissa}, so E=8, M=23 is IEEE-754 single precision and E=5, M=10 is half
// precision. The sign of z is sx XOR sy and its exponent comes from one
// subtraction, ex - ey + bias. The mantissa quotient 1.mx / 1.my is formed as
// 1.mx * r, where r ~ 1/(1.my) comes from a four-segment degree-2 polynomial
// (poly_approx, FUNC_RECIP). r lies in (0.5, 1]; the unit treats it as 2r in
// (1, 2] with the exponent lowered by one, so the product Q = 1.mx * 2r lies
// in [1, 4). When Q >= 2 the mantissa is shifted right by one bit and the
// exponent raised by one; a multiplexer picks the two cases. The fraction is
// truncated, not rounded. Before the product r is clamped to [0.5, 1], the
// range the normalisation assumes; at very small coefficient widths (half
// precision) truncation can otherwise leave r a few ulps under 0.5.
//
// Not handled (as in the design this follows): zero, subnormal, infinity and
// NaN operands, and exponent overflow or underflow, which wrap.
//
// Timing: one division per cycle, latency 6 cycles from in_valid to
// out_valid.
//   1: operands registered, sign computed
//   2-4: polynomial reciprocal (exponent difference formed in stage 2)
//   5: mantissa product registered
//   6: normalisation and packing registered
//
// Following the design: the sign XOR, the single exponent subtraction, the
// polynomial reciprocal and its coefficients, the one-bit normalisation, the
// absence of rounding and exception handling, the six-cycle latency. Own
// choices: how the six stages are split, the clamp of r, the valid flag, and
// reset of the valid pipeline only.
module fp_div
  import fp_pkg::*;
#(
  parameter int E   = 8,   // exponent width
  parameter int M   = 23,  // mantissa fraction width
  parameter int FB0 = 17,  // fractional bits of c0
  parameter int FB1 = 18,  // fractional bits of c1
  parameter int FB2 = 19   // fractional bits of c2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [E+M:0] x,         // dividend
  input  logic [E+M:0] y,         // divisor
  output logic         out_valid,
  output logic [E+M:0] z          // quotient
);

  localparam int BIAS = bias_of(E);
  localparam int XW   = E + 2;           // signed exponent arithmetic width
  localparam int ZW   = FB2 + 3;         // width of the polynomial result
  localparam int QW   = M + 1 + FB2 + 1; // width of 1.mx * r

  // ---------------- stage 1: operand registers ----------------
  logic         s1_sign;
  logic [E-1:0] s1_ex, s1_ey;
  logic [M-1:0] s1_mx, s1_my;
  logic         s1_valid;

  always_ff @(posedge clk) begin
    s1_sign <= x[E+M] ^ y[E+M];
    s1_ex   <= x[E+M-1:M];
    s1_ey   <= y[E+M-1:M];
    s1_mx   <= x[M-1:0];
    s1_my   <= y[M-1:0];
  end

  // ---------------- stages 2-4: reciprocal of 1.my ----------------
  logic signed [ZW-1:0] recip;
  logic                 s4_valid;

  poly_approx #(.FUNC(FUNC_RECIP), .M(M), .FB0(FB0), .FB1(FB1), .FB2(FB2)) u_recip (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (s1_valid),
    .m        (s1_my),
    .out_valid(s4_valid),
    .z        (recip)
  );

  // Side band travelling with the reciprocal: sign, exponent of 1.mx*2r
  // (ex - ey + bias - 1) and the dividend fraction.
  logic                 s2_sign, s3_sign, s4_sign;
  logic signed [XW-1:0] s2_exp,  s3_exp,  s4_exp;
  logic [M-1:0]         s2_mx,   s3_mx,   s4_mx;

  always_ff @(posedge clk) begin
    s2_sign <= s1_sign;
    s2_exp  <= XW'(s1_ex) - XW'(s1_ey) + XW'(BIAS - 1);
    s2_mx   <= s1_mx;
    s3_sign <= s2_sign;
    s3_exp  <= s2_exp;
    s3_mx   <= s2_mx;
    s4_sign <= s3_sign;
    s4_exp  <= s3_exp;
    s4_mx   <= s3_mx;
  end

  // ---------------- stage 5: mantissa product ----------------
  // recip has FB2 fractional bits and lies in (0.5, 1], so its low FB2+1
  // bits hold it unsigned. As 1.mx * r the product has M+FB2 fractional
  // bits; read as Q = 1.mx * 2r it has one fewer.
  logic [QW-1:0]        s5_q;
  logic                 s5_sign;
  logic signed [XW-1:0] s5_exp;

  // The one-bit normalisation below needs r in [0.5, 1]. The polynomial
  // stays inside that range by construction except for truncation at very
  // small coefficient widths (r can end a few ulps under 0.5 as m -> 1), so
  // r is clamped to it first.
  localparam logic signed [ZW-1:0] R_HALF = ZW'(1) <<< (FB2 - 1);
  localparam logic signed [ZW-1:0] R_ONE  = ZW'(1) <<< FB2;
  logic [FB2:0] r_clamped;

  always_comb begin
    if (recip < R_HALF)     r_clamped = R_HALF[FB2:0];
    else if (recip > R_ONE) r_clamped = R_ONE[FB2:0];
    else                    r_clamped = recip[FB2:0];
  end

  always_ff @(posedge clk) begin
    s5_q    <= {1'b1, s4_mx} * r_clamped;
    s5_sign <= s4_sign;
    s5_exp  <= s4_exp;
  end

  // ---------------- stage 6: normalise and pack ----------------
  // Q >= 2 is bit M+FB2 of the product (bit QW-1 is zero as Q < 4).
  logic                 q_ge2;
  logic [M-1:0]         mant_d;
  logic signed [XW-1:0] exp_d;

  always_comb begin
    q_ge2 = s5_q[M+FB2];
    if (q_ge2) begin
      mant_d = s5_q[M+FB2-1 -: M];  // Q shifted right by one
      exp_d  = s5_exp + XW'(1);
    end else begin
      mant_d = s5_q[M+FB2-2 -: M];
      exp_d  = s5_exp;
    end
  end

  always_ff @(posedge clk) begin
    z <= {s5_sign, exp_d[E-1:0], mant_d};
  end

  // valid pipeline: stage 1 here, stages 2-4 inside poly_approx, 5 and 6 here
  logic s5_valid, s6_valid;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s5_valid <= 1'b0;
      s6_valid <= 1'b0;
    end else begin
      s1_valid <= in_valid;
      s5_valid <= s4_valid;
      s6_valid <= s5_valid;
    end
  end
  assign out_valid = s6_valid;

  // With r clamped to [0.5, 1] and 1.mx < 2, 1.mx * r stays below 2, so the
  // top product bit is never set and one shift always normalises.
  a_product_range: assert property (@(posedge clk) disable iff (!rst_n)
    s5_valid |-> !s5_q[QW-1]);

endmodule
