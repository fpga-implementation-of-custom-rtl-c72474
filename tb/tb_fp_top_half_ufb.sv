// tb_fp_top_half_ufb: fp_top at half precision (E=5, M=10) with uniform
// coefficient widths (every coefficient with 10 fractional bits). Every
// 16-bit encoding goes to the logarithm, random pairs to the divider; error
// bounds 2^-6 as for the optimised half-precision widths.
module tb_fp_top_half_ufb;
  localparam int E = 5, M = 10;
  logic clk = 1'b0;
  logic rst_n, done, div_in_valid, div_out_valid, log_in_valid, log_out_valid;
  logic [E+M:0] div_x, div_y, div_z, log_x, log_y;

  always #5 clk = ~clk;

  fp_top #(.E(E), .M(M), .DIV_FB0(10), .DIV_FB1(10), .DIV_FB2(10),
           .LOG_FB0(10), .LOG_FB1(10), .LOG_FB2(10)) dut (.*);

  tb_fp_top_drv #(.E(E), .M(M), .DIV_FB0(10), .DIV_FB1(10), .DIV_FB2(10),
                  .LOG_FB0(10), .LOG_FB1(10), .LOG_FB2(10), .N(20000), .ERANGE(6), .LOG_ALL(1'b1),
                  .DIV_TOL(2.0 ** -6), .LOG_TOL(2.0 ** -6)) drv (.*);

  always @(posedge done) $finish;
endmodule
