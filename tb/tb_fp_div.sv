// tb_fp_div: self-checking testbench of the floating-point divider at its
// default size (single precision, optimised coefficient widths).
//
// Drives a stream of random and directed operand pairs, mostly back to back
// with some idle cycles, and checks every quotient bit-exactly against the
// reference model, its relative error against the exact quotient (bound
// 2^-10), and that it appears exactly 6 cycles after its operands. Also
// counts how often the one-bit normalisation shift was and was not taken.
module tb_fp_div;
  import tb_fp_ref_pkg::*;

  localparam int E = 8, M = 23, FB0 = 17, FB1 = 18, FB2 = 19, LAT = 6;
  localparam int N = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [E+M:0] x = '0, y = '0, z;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_shift = 0, n_noshift = 0;
  real max_rel = 0.0;

  typedef struct { longint x, y, exp_z; longint t; } item_t;
  item_t q[$];

  fp_div dut (.clk, .rst_n, .in_valid, .x, .y, .out_valid, .z);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // scoreboard
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      real exact, got, rel;
      if (q.size() == 0) check(1'b0, "unexpected out_valid");
      else begin
        it = q.pop_front();
        check(longint'(z) == it.exp_z,
              $sformatf("x=%h y=%h z=%h expected %h", it.x, it.y, z, it.exp_z));
        check(cycle - it.t == LAT, $sformatf("latency %0d", cycle - it.t));
        exact = tb_to_real(it.x, E, M) / tb_to_real(it.y, E, M);
        got   = tb_to_real(longint'(z), E, M);
        rel   = (got - exact) / exact;
        if (rel < 0) rel = -rel;
        if (rel > max_rel) max_rel = rel;
        check(rel < 2.0 ** -10, $sformatf("relative error %g for %h/%h", rel, it.x, it.y));
      end
    end
  end

  task automatic send(longint a, longint b);
    item_t it;
    x = (E+M+1)'(a);
    y = (E+M+1)'(b);
    in_valid = 1'b1;
    it.x = a; it.y = b;
    it.exp_z = tb_div(a, b, E, M, FB0, FB1, FB2);
    it.t = cycle;   // inputs change on the falling edge
    if (tb_div_shift(a, b, E, M, FB0, FB1, FB2)) n_shift++; else n_noshift++;
    q.push_back(it);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // directed: 1/1, equal operands, powers of two, segment edges
    send(64'h3f800000, 64'h3f800000);
    send(64'h40400000, 64'h40400000);
    send(64'h40c00000, 64'h40000000);
    send(64'hc1200000, 64'h40800000);
    for (int s = 0; s < 4; s++) begin
      send(64'h3f800000, 64'h3f800000 | (longint'(s) << 21));
      send(64'h3fffffff, 64'h3f800000 | (longint'(s) << 21) | 64'h1fffff);
    end
    for (int i = 0; i < N; i++) begin
      send(tb_rand_fp(E, M, 40, 1'b1), tb_rand_fp(E, M, 40, 1'b1));
      if ($urandom_range(9, 0) == 0) @(negedge clk);
    end
    repeat (LAT + 3) @(posedge clk);
    check(q.size() == 0, "results missing");
    check(n_shift > 0 && n_noshift > 0, "normalisation cases not both seen");
    $display("normalise shift taken %0d, not taken %0d, max relative error %g",
             n_shift, n_noshift, max_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
