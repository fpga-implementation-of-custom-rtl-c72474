// fp_top: the floating-point divider and binary logarithm units side by side.
//
// The two units are independent pipelines sharing only the clock and reset;
// each accepts one operation per cycle. Both use the same format, E exponent
// bits and M fraction bits (defaults: single precision, E=8, M=23), and each
// has its own polynomial coefficient widths (defaults: the optimised
// multiple fractional bit-widths for M=23).
//
// Divider: div_in_valid with div_x, div_y; div_out_valid with div_z = x/y
// six cycles later. Logarithm: log_in_valid with log_x; log_out_valid with
// log_y = log2(x) seven cycles later.
module fp_top #(
  parameter int E       = 8,
  parameter int M       = 23,
  parameter int DIV_FB0 = 17,
  parameter int DIV_FB1 = 18,
  parameter int DIV_FB2 = 19,
  parameter int LOG_FB0 = 19,
  parameter int LOG_FB1 = 17,
  parameter int LOG_FB2 = 18
) (
  input  logic         clk,
  input  logic         rst_n,
  // divider
  input  logic         div_in_valid,
  input  logic [E+M:0] div_x,
  input  logic [E+M:0] div_y,
  output logic         div_out_valid,
  output logic [E+M:0] div_z,
  // logarithm
  input  logic         log_in_valid,
  input  logic [E+M:0] log_x,
  output logic         log_out_valid,
  output logic [E+M:0] log_y
);

  fp_div #(.E(E), .M(M), .FB0(DIV_FB0), .FB1(DIV_FB1), .FB2(DIV_FB2)) u_div (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (div_in_valid),
    .x        (div_x),
    .y        (div_y),
    .out_valid(div_out_valid),
    .z        (div_z)
  );

  fp_log2 #(.E(E), .M(M), .FB0(LOG_FB0), .FB1(LOG_FB1), .FB2(LOG_FB2)) u_log (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (log_in_valid),
    .x        (log_x),
    .out_valid(log_out_valid),
    .y        (log_y)
  );

endmodule
