// tb_fp_top: end-to-end test of fp_top at its default parameters (single
// precision, optimised coefficient widths): both units run concurrently on
// random operand streams, every result checked. See tb_fp_top_drv.
module tb_fp_top;
  localparam int E = 8, M = 23;
  logic clk = 1'b0;
  logic rst_n, done, div_in_valid, div_out_valid, log_in_valid, log_out_valid;
  logic [E+M:0] div_x, div_y, div_z, log_x, log_y;

  always #5 clk = ~clk;

  fp_top dut (.*);

  tb_fp_top_drv #(.E(E), .M(M), .N(3000)) drv (.*);

  always @(posedge done) $finish;
endmodule
