// msb_encoder: combinational priority encoder returning the position of the
// most significant set bit of a, and whether any bit is set.
//
// Used to find the exponent when a fixed-point value is converted to floating
// point. Written as a loop from the least significant bit upward, so the last
// set bit seen (the highest) wins; synthesis turns it into a priority chain.
// pos is 0 when a is zero. No clock.
module msb_encoder #(
  parameter int W  = 32,
  localparam int PW = (W > 1) ? $clog2(W) : 1
) (
  input  logic [W-1:0]  a,
  output logic [PW-1:0] pos,
  output logic          nonzero
);

  always_comb begin
    pos = '0;
    for (int i = 0; i < W; i++) begin
      if (a[i]) pos = PW'(i);
    end
  end

  assign nonzero = |a;

endmodule
