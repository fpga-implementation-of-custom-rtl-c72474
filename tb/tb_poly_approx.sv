// tb_poly_approx: checks the piecewise polynomial unit for both functions at
// single-precision mantissa width: the reciprocal with coefficient widths
// 17/18/19 and the logarithm with 19/17/18.
//
// Random mantissas and the ends of every segment are fed back to back. Each
// result must equal the reference Horner evaluation bit for bit, arrive 3
// cycles later, and lie within 2^-10 of 1/(1+m) or log2(1+m). Every segment is
// counted and must be reached.
module tb_poly_approx;
  import tb_fp_ref_pkg::*;
  import fp_pkg::*;

  localparam int M = 23, LAT = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, rv, lv;
  logic [M-1:0] m = '0;
  logic signed [21:0] zr;
  logic signed [20:0] zl;
  int checks = 0, failures = 0;
  longint cycle = 0;
  int seg_hits [4] = '{0, 0, 0, 0};

  typedef struct { longint m; longint t; } item_t;
  item_t q[$];

  poly_approx #(.FUNC(FUNC_RECIP), .M(M), .FB0(17), .FB1(18), .FB2(19)) u_r
    (.clk, .rst_n, .in_valid, .m, .out_valid(rv), .z(zr));
  poly_approx #(.FUNC(FUNC_LOG2), .M(M), .FB0(19), .FB1(17), .FB2(18)) u_l
    (.clk, .rst_n, .in_valid, .m, .out_valid(lv), .z(zl));

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
    if (rst_n && (rv || lv)) begin
      item_t it;
      real mr, er, el;
      it = q.pop_front();
      mr = real'(it.m) / (2.0 ** M);
      check(rv && lv, "valid mismatch");
      check(cycle - it.t == LAT, $sformatf("latency %0d", cycle - it.t));
      check(longint'(zr) == tb_poly(0, it.m, M, 17, 18, 19), $sformatf("recip m=%h z=%h", it.m, zr));
      check(longint'(zl) == tb_poly(1, it.m, M, 19, 17, 18), $sformatf("log m=%h z=%h", it.m, zl));
      er = real'(zr) / (2.0 ** 19) - 1.0 / (1.0 + mr);
      el = real'(zl) / (2.0 ** 18) - $ln(1.0 + mr) / $ln(2.0);
      check(er < 2.0 ** -10 && er > -(2.0 ** -10), $sformatf("recip error %g", er));
      check(el < 2.0 ** -10 && el > -(2.0 ** -10), $sformatf("log error %g", el));
    end
  end

  task automatic send(longint v);
    item_t it;
    m = M'(v); in_valid = 1'b1;
    it.m = v & ((longint'(1) << M) - 1); it.t = cycle;
    seg_hits[it.m >> (M - 2)]++;
    q.push_back(it);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      send(longint'(s) << (M - 2));
      send(((longint'(s) + 1) << (M - 2)) - 1);
    end
    for (int i = 0; i < 3000; i++) begin
      send(longint'($urandom));
      if ($urandom_range(7, 0) == 0) @(negedge clk);
    end
    repeat (LAT + 3) @(posedge clk);
    check(q.size() == 0, "results missing");
    for (int s = 0; s < 4; s++) check(seg_hits[s] > 0, $sformatf("segment %0d never used", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
