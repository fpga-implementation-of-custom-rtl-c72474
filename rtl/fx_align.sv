// fx_align: moves a signed fixed-point value from IF to OF fractional bits.
//
// Dropping fractional bits is an arithmetic right shift, i.e. truncation
// toward minus infinity, the quantisation used throughout this design (no
// rounding). Gaining fractional bits appends zeros. The result is then
// resized to OW bits; the caller sizes OW so that no integer bits are lost.
// Purely combinational.
module fx_align #(
  parameter int IW = 32,  // input width
  parameter int IF = 24,  // input fractional bits
  parameter int OW = 32,  // output width
  parameter int OF = 16   // output fractional bits
) (
  input  logic signed [IW-1:0] a,
  output logic signed [OW-1:0] y
);

  localparam int TW = (IW > OW ? IW : OW) + (OF > IF ? OF - IF : 0);

  logic signed [TW-1:0] wide;
  assign wide = TW'(a);

  if (IF >= OF) begin : g_trunc
    logic signed [TW-1:0] shifted;
    assign shifted = wide >>> (IF - OF);
    assign y = OW'(shifted);
  end else begin : g_extend
    logic signed [TW-1:0] shifted;
    assign shifted = wide <<< (OF - IF);
    assign y = OW'(shifted);
  end

endmodule
