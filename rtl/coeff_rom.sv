// coeff_rom: read-only memory holding the three polynomial coefficients of
// each of the four segments of one function (1/(1+m) or log2(1+m)).
//
// The segment index is the two leading bits of the mantissa fraction, so the
// segments are [0,0.25), [0.25,0.5), [0.5,0.75) and [0.75,1). The contents are
// computed at elaboration from the coefficient table in fp_pkg and truncated
// to FB0, FB1 and FB2 fractional bits; each word is signed with two integer
// bits. The read is combinational (a small LUT ROM); the polynomial unit
// registers its outputs.
//
// Following the design: the coefficient values, the four segments and the
// per-coefficient fractional widths. Own choices: the two integer bits and
// the asynchronous read.
module coeff_rom
  import fp_pkg::*;
#(
  parameter poly_func_e FUNC = FUNC_RECIP,
  parameter int         FB0  = 17,
  parameter int         FB1  = 18,
  parameter int         FB2  = 19
) (
  input  logic [SEG_BITS-1:0]              seg,
  output logic signed [FB0+COEF_IBITS-1:0] c0,
  output logic signed [FB1+COEF_IBITS-1:0] c1,
  output logic signed [FB2+COEF_IBITS-1:0] c2
);

  localparam int W0 = FB0 + COEF_IBITS;
  localparam int W1 = FB1 + COEF_IBITS;
  localparam int W2 = FB2 + COEF_IBITS;

  logic signed [W0-1:0] rom0 [NSEG];
  logic signed [W1-1:0] rom1 [NSEG];
  logic signed [W2-1:0] rom2 [NSEG];

  for (genvar s = 0; s < NSEG; s++) begin : g_word
    localparam longint Q0 = coeff_q(FUNC, 2'(s), 2'(0), FB0);
    localparam longint Q1 = coeff_q(FUNC, 2'(s), 2'(1), FB1);
    localparam longint Q2 = coeff_q(FUNC, 2'(s), 2'(2), FB2);
    assign rom0[s] = W0'(Q0);
    assign rom1[s] = W1'(Q1);
    assign rom2[s] = W2'(Q2);
  end

  assign c0 = rom0[seg];
  assign c1 = rom1[seg];
  assign c2 = rom2[seg];

endmodule
