// poly_approx: piecewise degree-2 polynomial approximation of a function of
// the mantissa fraction m in [0,1), used for both 1/(1+m) (divider) and
// log2(1+m) (logarithm).
//
// The two leading bits of m select one of four segments, whose coefficients
// come from coeff_rom. The polynomial is evaluated in Horner form
//   y = trunc_FB1(c0*m) + c1        (first multiply-add)
//   z = trunc_FB2(y*m)  + c2        (second multiply-add)
// with m used in full (not relative to the segment start). Each product is
// truncated to the fractional width of the coefficient it is added to, so the
// fractional widths FB0, FB1 and FB2 of c0, c1 and c2 alone set the cost and
// accuracy; this is how the uniform (all = M) and the optimised multiple
// fractional bit-width variants differ.
//
// Timing: fully pipelined, one input per cycle, latency 3 cycles.
//   stage 1: coefficient ROM read and m registered
//   stage 2: y registered
//   stage 3: z registered
// z is signed, with FB2 fractional bits and Z_IBITS integer bits.
//
// Following the design: the segmentation, the Horner form, the coefficient
// widths and truncation. Own choices: the three-stage split, and the integer
// widths of the intermediate values (sized for the magnitudes of the two
// tabulated functions, |y| < 2 and |z| < 2).
module poly_approx
  import fp_pkg::*;
#(
  parameter poly_func_e FUNC = FUNC_RECIP,
  parameter int         M    = 23,  // mantissa fraction width
  parameter int         FB0  = 17,  // fractional bits of c0
  parameter int         FB1  = 18,  // fractional bits of c1 (and of y)
  parameter int         FB2  = 19,  // fractional bits of c2 (and of z)
  localparam int        Z_IBITS = 3,
  localparam int        ZW   = FB2 + Z_IBITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [M-1:0]         m,
  output logic                 out_valid,
  output logic signed [ZW-1:0] z
);

  localparam int W0 = FB0 + COEF_IBITS;
  localparam int W1 = FB1 + COEF_IBITS;
  localparam int W2 = FB2 + COEF_IBITS;
  localparam int YW = FB1 + 3;            // y: sign + 2 integer bits
  localparam int P0W = W0 + M + 1;        // c0 * m
  localparam int P1W = YW + M + 1;        // y * m

  // ---------------- stage 1: ROM read ----------------
  logic signed [W0-1:0] c0_rom, c0_q;
  logic signed [W1-1:0] c1_rom, c1_q;
  logic signed [W2-1:0] c2_rom, c2_q, c2_q2;
  logic [M-1:0]         m_q, m_q2;
  logic [2:0]           vld;

  coeff_rom #(.FUNC(FUNC), .FB0(FB0), .FB1(FB1), .FB2(FB2)) u_rom (
    .seg(m[M-1 -: SEG_BITS]),
    .c0 (c0_rom),
    .c1 (c1_rom),
    .c2 (c2_rom)
  );

  always_ff @(posedge clk) begin
    c0_q <= c0_rom;
    c1_q <= c1_rom;
    c2_q <= c2_rom;
    m_q  <= m;
  end

  // ---------------- stage 2: y = c0*m + c1 ----------------
  logic signed [P0W-1:0] p0;
  logic signed [YW-1:0]  p0_t, y_d, y_q;

  assign p0 = c0_q * $signed({1'b0, m_q});

  fx_align #(.IW(P0W), .IF(FB0 + M), .OW(YW), .OF(FB1)) u_al0 (.a(p0), .y(p0_t));

  assign y_d = p0_t + YW'(c1_q);

  always_ff @(posedge clk) begin
    y_q   <= y_d;
    c2_q2 <= c2_q;
    m_q2  <= m_q;
  end

  // ---------------- stage 3: z = y*m + c2 ----------------
  logic signed [P1W-1:0] p1;
  logic signed [ZW-1:0]  p1_t;

  assign p1 = y_q * $signed({1'b0, m_q2});

  fx_align #(.IW(P1W), .IF(FB1 + M), .OW(ZW), .OF(FB2)) u_al1 (.a(p1), .y(p1_t));

  always_ff @(posedge clk) begin
    z <= p1_t + ZW'(c2_q2);
  end

  // valid pipeline
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[1:0], in_valid};
  end
  assign out_valid = vld[2];

endmodule
