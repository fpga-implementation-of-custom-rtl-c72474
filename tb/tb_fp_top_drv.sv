// tb_fp_top_drv: stimulus and checking for a whole fp_top, shared by the
// end-to-end testbenches (the testbench instantiates fp_top and this block).
//
// It feeds the divider and the logarithm at the same time, mostly one
// operation per cycle on each with occasional idle cycles, and checks every
// result bit-exactly against the reference model, against the exact value
// (divider: relative error below DIV_TOL; logarithm: absolute error below
// LOG_TOL plus the output's own truncation), and for the 6- and 7-cycle
// latencies. With LOG_ALL set, every positive and negative encoding is
// sent to the logarithm (use for half precision).
//
// It counts how often each mechanism of the design was used: both divider
// normalisation cases, all four polynomial segments of each unit, the NaN,
// negative, positive and (when REQUIRE_ZERO) zero logarithm paths, the
// reciprocal clamp (when REQUIRE_CLAMP), and
// back-to-back as well as simultaneous operations. A mechanism never
// exercised counts as a failure. Prints TB_RESULT and raises done; the
// testbench then ends the simulation. A watchdog ends it if results stall.
module tb_fp_top_drv
  import tb_fp_ref_pkg::*;
#(
  parameter int  E = 8, M = 23,
  parameter int  DIV_FB0 = 17, DIV_FB1 = 18, DIV_FB2 = 19,
  parameter int  LOG_FB0 = 19, LOG_FB1 = 17, LOG_FB2 = 18,
  parameter int  N = 2000,           // random divisions (and logarithms unless LOG_ALL)
  parameter int  ERANGE = 40,        // unbiased exponent range of random divider operands
  parameter bit  LOG_ALL = 1'b0,
  parameter bit  REQUIRE_ZERO = 1'b0,
  parameter bit  REQUIRE_CLAMP = 1'b0,  // reciprocal clamp must be reached
  parameter real DIV_TOL = 2.0 ** -10,
  parameter real LOG_TOL = 2.0 ** -10
) (
  input  logic         clk,
  output logic         rst_n,
  output logic         div_in_valid,
  output logic [E+M:0] div_x,
  output logic [E+M:0] div_y,
  input  logic         div_out_valid,
  input  logic [E+M:0] div_z,
  output logic         log_in_valid,
  output logic [E+M:0] log_x,
  input  logic         log_out_valid,
  input  logic [E+M:0] log_y,
  output logic         done       // high once TB_RESULT has been printed
);
  localparam int DIV_LAT = 6, LOG_LAT = 7;
  localparam int BIAS = (1 << (E - 1)) - 1;

  int checks = 0, failures = 0;
  longint cycle = 0;
  bit div_done = 0, log_done = 0;

  // mechanism counters
  int n_shift = 0, n_noshift = 0, n_nan = 0, n_neg = 0, n_pos = 0, n_zero = 0;
  int n_b2b = 0, n_both = 0, n_idle = 0, n_clamp = 0;
  int div_seg [4] = '{0, 0, 0, 0};
  int log_seg [4] = '{0, 0, 0, 0};
  real max_div = 0.0, max_log = 0.0;
  logic div_prev = 0;

  typedef struct { longint a, b, want; longint t; } item_t;
  item_t dq[$], lq[$];

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (div_in_valid && div_prev) n_b2b++;
      if (div_in_valid && log_in_valid) n_both++;
      if (!div_in_valid && !div_done) n_idle++;
      div_prev <= div_in_valid;
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // divider scoreboard
  always @(posedge clk) begin
    if (rst_n && div_out_valid) begin
      item_t it;
      real exact, got, rel;
      if (dq.size() == 0) check(1'b0, "unexpected div_out_valid");
      else begin
        it = dq.pop_front();
        check(longint'(div_z) == it.want, $sformatf("div %h/%h = %h, expected %h", it.a, it.b, div_z, it.want));
        check(cycle - it.t == DIV_LAT, $sformatf("div latency %0d", cycle - it.t));
        exact = tb_to_real(it.a, E, M) / tb_to_real(it.b, E, M);
        got   = tb_to_real(longint'(div_z), E, M);
        rel   = (got - exact) / exact;
        if (rel < 0) rel = -rel;
        if (rel > max_div) max_div = rel;
        check(rel < DIV_TOL, $sformatf("div relative error %g for %h/%h = %h", rel, it.a, it.b, div_z));
      end
    end
  end

  // logarithm scoreboard
  always @(posedge clk) begin
    if (rst_n && log_out_valid) begin
      item_t it;
      real exact, got, err, tol;
      if (lq.size() == 0) check(1'b0, "unexpected log_out_valid");
      else begin
        it = lq.pop_front();
        check(longint'(log_y) == it.want, $sformatf("log %h = %h, expected %h", it.a, log_y, it.want));
        check(cycle - it.t == LOG_LAT, $sformatf("log latency %0d", cycle - it.t));
        if (((it.a >> (E + M)) & 1) == 1) begin
          check(log_y[E+M-1:M] == '1 && log_y[M-1:0] != '0, "negative input must give NaN");
        end else if (tb_to_real(it.a, E, M) != 0.0) begin   // +0 has no logarithm
          exact = $ln(tb_to_real(it.a, E, M)) / $ln(2.0);
          got   = tb_to_real(longint'(log_y), E, M);
          err   = got - exact;
          if (err < 0) err = -err;
          tol   = LOG_TOL + (exact < 0 ? -exact : exact) * (2.0 ** -(M - 1));
          if (err > max_log) max_log = err;
          check(err < tol, $sformatf("log error %g for %h", err, it.a));
        end
      end
    end
  end

  task automatic put_div(longint a, longint b);
    item_t it;
    div_x = (E+M+1)'(a); div_y = (E+M+1)'(b); div_in_valid = 1'b1;
    it.a = a; it.b = b; it.t = cycle;
    it.want = tb_div(a, b, E, M, DIV_FB0, DIV_FB1, DIV_FB2);
    if (tb_div_shift(a, b, E, M, DIV_FB0, DIV_FB1, DIV_FB2)) n_shift++; else n_noshift++;
    div_seg[(b >> (M - 2)) & 3]++;
    if (tb_poly(0, b & tb_mask(M), M, DIV_FB0, DIV_FB1, DIV_FB2) !=
        tb_recip(b & tb_mask(M), M, DIV_FB0, DIV_FB1, DIV_FB2)) n_clamp++;
    dq.push_back(it);
  endtask

  task automatic put_log(longint a);
    item_t it;
    log_x = (E+M+1)'(a); log_in_valid = 1'b1;
    it.a = a; it.t = cycle;
    it.want = tb_log(a, E, M, LOG_FB0, LOG_FB1, LOG_FB2);
    if (((a >> (E + M)) & 1) == 1) n_nan++;
    else if (it.want == 0) n_zero++;
    else if (((it.want >> (E + M)) & 1) == 1) n_neg++;
    else n_pos++;
    log_seg[(a >> (M - 2)) & 3]++;
    lq.push_back(it);
  endtask

  // divider stream
  initial begin
    div_in_valid = 1'b0; div_x = '0; div_y = '0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    put_div(longint'(BIAS) << M, longint'(BIAS) << M);   // 1/1
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      put_div(tb_rand_fp(E, M, ERANGE, 1'b1), tb_rand_fp(E, M, ERANGE, 1'b1));
      @(negedge clk);
      div_in_valid = 1'b0;
      if ($urandom_range(15, 0) == 0) @(negedge clk);
    end
    div_in_valid = 1'b0;
    div_done = 1;
  end

  // logarithm stream
  initial begin
    log_in_valid = 1'b0; log_x = '0;
    @(posedge rst_n);
    @(negedge clk);
    put_log(longint'(BIAS) << M);                          // log2(1.0)
    @(negedge clk);
    if (LOG_ALL) begin
      for (longint v = 0; v < (longint'(1) << (E + M + 1)); v++) begin
        put_log(v);
        @(negedge clk);
      end
    end else begin
      for (int i = 0; i < N; i++) begin
        put_log(tb_rand_fp(E, M, BIAS - 1, ($urandom_range(7, 0) == 0)));
        @(negedge clk);
        log_in_valid = 1'b0;
        if ($urandom_range(15, 0) == 0) @(negedge clk);
      end
    end
    log_in_valid = 1'b0;
    log_done = 1;
  end

  initial begin
    wait (div_done && log_done);
    repeat (LOG_LAT + 3) @(posedge clk);
    check(dq.size() == 0 && lq.size() == 0, "results missing");
    check(n_shift > 0,   "divider normalisation shift never taken");
    check(n_noshift > 0, "divider product never below 2");
    for (int s = 0; s < 4; s++) begin
      check(div_seg[s] > 0, $sformatf("reciprocal segment %0d never used", s));
      check(log_seg[s] > 0, $sformatf("logarithm segment %0d never used", s));
    end
    check(n_nan > 0, "logarithm NaN path never used");
    check(n_neg > 0, "negative logarithm never produced");
    check(n_pos > 0, "positive logarithm never produced");
    if (REQUIRE_ZERO) check(n_zero > 0, "zero logarithm never produced");
    if (REQUIRE_CLAMP) check(n_clamp > 0, "reciprocal clamp never reached");
    check(n_b2b > 0,  "no back-to-back divisions");
    check(n_both > 0, "units never busy together");
    check(n_idle > 0, "no idle cycles");
    $display("divider: shift %0d, no shift %0d, clamp %0d, segments %0d %0d %0d %0d, max rel error %g",
             n_shift, n_noshift, n_clamp, div_seg[0], div_seg[1], div_seg[2], div_seg[3], max_div);
    $display("logarithm: NaN %0d, negative %0d, positive %0d, zero %0d, segments %0d %0d %0d %0d, max abs error %g",
             n_nan, n_neg, n_pos, n_zero, log_seg[0], log_seg[1], log_seg[2], log_seg[3], max_log);
    $display("back-to-back %0d, both units %0d, idle %0d", n_b2b, n_both, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    done = 1'b1;
  end

  initial begin
    done = 1'b0;
    repeat (4 * N + (LOG_ALL ? (1 << (E + M + 1)) : 0) + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
