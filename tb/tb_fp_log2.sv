// tb_fp_log2: self-checking testbench of the floating-point binary logarithm
// at its default size (single precision, optimised coefficient widths).
//
// Drives random positive and negative inputs over a wide exponent range plus
// directed ones (1.0, powers of two, segment edges, values just below 1),
// mostly back to back. Every result is checked bit-exactly against the
// reference model, against log2(x) computed with real arithmetic (absolute
// error bound 2^-10), and for its 7-cycle latency. Counts the NaN, negative
// and positive result paths; each must occur.
module tb_fp_log2;
  import tb_fp_ref_pkg::*;

  localparam int E = 8, M = 23, FB0 = 19, FB1 = 17, FB2 = 18, LAT = 7;
  localparam int N = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, out_valid;
  logic [E+M:0] x = '0, y;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int n_nan = 0, n_neg = 0, n_pos = 0;
  real max_abs = 0.0;

  typedef struct { longint x, exp_y; longint t; } item_t;
  item_t q[$];

  fp_log2 dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      real exact, got, err;
      if (q.size() == 0) check(1'b0, "unexpected out_valid");
      else begin
        it = q.pop_front();
        check(longint'(y) == it.exp_y,
              $sformatf("x=%h y=%h expected %h", it.x, y, it.exp_y));
        check(cycle - it.t == LAT, $sformatf("latency %0d", cycle - it.t));
        if (it.x[E+M]) begin
          check(y[E+M-1:M] == '1 && y[M-1:0] != '0, "negative input must give NaN");
        end else begin
          exact = $ln(tb_to_real(it.x, E, M)) / $ln(2.0);
          got   = tb_to_real(longint'(y), E, M);
          err   = got - exact;
          if (err < 0) err = -err;
          if (err > max_abs) max_abs = err;
          check(err < 2.0 ** -10, $sformatf("error %g for %h", err, it.x));
        end
      end
    end
  end

  task automatic send(longint a);
    item_t it;
    x = (E+M+1)'(a);
    in_valid = 1'b1;
    it.x = a;
    it.exp_y = tb_log(a, E, M, FB0, FB1, FB2);
    it.t = cycle;
    if (a[E+M]) n_nan++;
    else if (((a >> M) & 255) < 127) n_neg++;
    else n_pos++;
    q.push_back(it);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    send(64'h3f800000);                 // 1.0
    send(64'h40d80000);                 // 6.75
    send(64'h3f7fffff);                 // just below 1
    send(64'h00800000);                 // smallest normal
    send(64'h7f7fffff);                 // largest finite
    send(64'hbf800000);                 // -1.0 -> NaN
    for (int s = 0; s < 4; s++) begin
      send(64'h3f800000 | (longint'(s) << 21));
      send(64'h3e800000 | (longint'(s) << 21) | 64'h1fffff);
    end
    for (int e = 1; e < 255; e++) send(longint'(e) << 23);
    for (int i = 0; i < N; i++) begin
      send(tb_rand_fp(E, M, 120, ($urandom_range(7, 0) == 0)));
      if ($urandom_range(9, 0) == 0) @(negedge clk);
    end
    repeat (LAT + 3) @(posedge clk);
    check(q.size() == 0, "results missing");
    check(n_nan > 0 && n_neg > 0 && n_pos > 0, "a result path never exercised");
    $display("NaN %0d, negative %0d, positive %0d, max abs error %g",
             n_nan, n_neg, n_pos, max_abs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N * 2 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
