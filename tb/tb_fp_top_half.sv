// tb_fp_top_half: fp_top at half precision (E=5, M=10) with the optimised
// coefficient widths for a 10-bit mantissa (divider 10/9/9, logarithm
// 10/10/8). The logarithm is given every one of the 65536 encodings; the
// divider random operand pairs, enough to reach the reciprocal clamp. At
// this width the segment-0 constant of the logarithm truncates to zero, so
// log2(1.0) = 0 is also exercised. Error bounds are 2^-6, as the 8- and
// 9-bit coefficients allow.
module tb_fp_top_half;
  localparam int E = 5, M = 10;
  logic clk = 1'b0;
  logic rst_n, done, div_in_valid, div_out_valid, log_in_valid, log_out_valid;
  logic [E+M:0] div_x, div_y, div_z, log_x, log_y;

  always #5 clk = ~clk;

  fp_top #(.E(E), .M(M), .DIV_FB0(10), .DIV_FB1(9), .DIV_FB2(9),
           .LOG_FB0(10), .LOG_FB1(10), .LOG_FB2(8)) dut (.*);

  tb_fp_top_drv #(.E(E), .M(M), .DIV_FB0(10), .DIV_FB1(9), .DIV_FB2(9),
                  .LOG_FB0(10), .LOG_FB1(10), .LOG_FB2(8),
                  .N(20000), .ERANGE(6), .LOG_ALL(1'b1), .REQUIRE_ZERO(1'b1), .REQUIRE_CLAMP(1'b1),
                  .DIV_TOL(2.0 ** -6), .LOG_TOL(2.0 ** -6)) drv (.*);

  always @(posedge done) $finish;
endmodule
