// fix2float: converts an unsigned fixed-point magnitude with F fractional
// bits, plus a separate sign, into a floating-point number with E exponent
// and M mantissa bits.
//
// The position p of the most significant set bit (from msb_encoder) gives the
// exponent p - F + bias. The magnitude is then shifted left so that this bit
// leaves the top, and the M bits that follow it become the mantissa; any
// lower bits are discarded (truncation, no rounding). A zero magnitude gives
// the all-zero encoding (+0.0).
//
// Timing: two register stages, one input per cycle.
//   stage 1: priority encoding registered with the magnitude
//   stage 2: normalising shift and packing registered
//
// Following the design: exponent from the MSB position, mantissa from the
// bits below it, truncation. Own choices: the two-stage split and the
// encoding of zero.
module fix2float
  import fp_pkg::*;
#(
  parameter int E = 8,        // exponent width of the result
  parameter int M = 23,       // mantissa width of the result
  parameter int W = E + M + 1,// magnitude width
  parameter int F = M         // fractional bits of the magnitude
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           sign,
  input  logic [W-1:0]   mag,
  output logic           out_valid,
  output logic [E+M:0]   fp
);

  localparam int PW   = (W > 1) ? $clog2(W) : 1;
  localparam int BIAS = bias_of(E);
  localparam int XW   = (PW > E ? PW : E) + 2;   // exponent arithmetic width

  // ---------------- stage 1: find the leading one ----------------
  logic [PW-1:0] pos_d, pos_q;
  logic          nz_d, nz_q;
  logic [W-1:0]  mag_q;
  logic          sign_q;
  logic [1:0]    vld;

  msb_encoder #(.W(W)) u_enc (.a(mag), .pos(pos_d), .nonzero(nz_d));

  always_ff @(posedge clk) begin
    pos_q  <= pos_d;
    nz_q   <= nz_d;
    mag_q  <= mag;
    sign_q <= sign;
  end

  // ---------------- stage 2: normalise and pack ----------------
  logic [W+M-1:0]        norm;   // magnitude with M zero bits appended
  logic signed [XW-1:0]  exp_d;
  logic [M-1:0]          mant_d;

  always_comb begin
    norm   = {mag_q, M'(0)} << (PW'(W - 1) - pos_q);
    mant_d = norm[W+M-2 -: M];
    exp_d  = XW'(signed'({1'b0, pos_q})) - XW'(F) + XW'(BIAS);
  end

  always_ff @(posedge clk) begin
    if (nz_q) fp <= {sign_q, exp_d[E-1:0], mant_d};
    else      fp <= '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[0], in_valid};
  end
  assign out_valid = vld[1];

  // After the normalising shift the leading one sits just above the mantissa.
  a_normalised: assert property (@(posedge clk) disable iff (!rst_n)
    (vld[0] && nz_q) |-> norm[W+M-1]);

endmodule
