// tb_fp_top_ufb: fp_top at single precision with uniform coefficient widths
// (every coefficient with 23 fractional bits, the unoptimised variant the
// optimised widths are measured against). Same checks as tb_fp_top.
module tb_fp_top_ufb;
  localparam int E = 8, M = 23;
  logic clk = 1'b0;
  logic rst_n, done, div_in_valid, div_out_valid, log_in_valid, log_out_valid;
  logic [E+M:0] div_x, div_y, div_z, log_x, log_y;

  always #5 clk = ~clk;

  fp_top #(.E(E), .M(M), .DIV_FB0(23), .DIV_FB1(23), .DIV_FB2(23),
           .LOG_FB0(23), .LOG_FB1(23), .LOG_FB2(23)) dut (.*);

  tb_fp_top_drv #(.E(E), .M(M), .DIV_FB0(23), .DIV_FB1(23), .DIV_FB2(23),
                  .LOG_FB0(23), .LOG_FB1(23), .LOG_FB2(23), .N(3000)) drv (.*);

  always @(posedge done) $finish;
endmodule
