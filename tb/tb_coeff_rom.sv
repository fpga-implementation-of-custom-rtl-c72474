// tb_coeff_rom: checks both coefficient ROMs (reciprocal with widths
// 17/18/19, logarithm with 19/17/18) for every segment. Each word must equal
// the published coefficient truncated toward minus infinity to its
// fractional width, i.e. lie in [c - 2^-FB, c]. Combinational, so the checks
// are made after a settling delay; no clock.
module tb_coeff_rom;
  import tb_fp_ref_pkg::*;
  import fp_pkg::*;

  logic [1:0] seg = '0;
  logic signed [18:0] r0;  logic signed [19:0] r1;  logic signed [20:0] r2;
  logic signed [20:0] l0;  logic signed [18:0] l1;  logic signed [19:0] l2;
  int checks = 0, failures = 0;

  coeff_rom #(.FUNC(FUNC_RECIP), .FB0(17), .FB1(18), .FB2(19)) u_r (.seg, .c0(r0), .c1(r1), .c2(r2));
  coeff_rom #(.FUNC(FUNC_LOG2),  .FB0(19), .FB1(17), .FB2(18)) u_l (.seg, .c0(l0), .c1(l1), .c2(l2));

  task automatic chk(longint got, int f, int s, int k, int fb);
    real v, c;
    checks++;
    v = real'(got) / (2.0 ** fb);
    c = tb_coef_real(f, s, k);
    if (got != tb_coef(f, s, k, fb) || v > c || v <= c - 2.0 ** -fb) begin
      failures++;
      $display("FAIL f=%0d seg=%0d c%0d got %0d (%f) want %f", f, s, k, got, v, c);
    end
  endtask

  initial begin
    for (int s = 0; s < 4; s++) begin
      seg = 2'(s);
      #1;
      chk(longint'(r0), 0, s, 0, 17);
      chk(longint'(r1), 0, s, 1, 18);
      chk(longint'(r2), 0, s, 2, 19);
      chk(longint'(l0), 1, s, 0, 19);
      chk(longint'(l1), 1, s, 1, 17);
      chk(longint'(l2), 1, s, 2, 18);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
