// tb_fix2float: checks the fixed-to-floating-point converter at single
// precision (E=8, M=23, a 32-bit magnitude with 23 fractional bits).
//
// Random magnitudes of every length, zero, one ulp and the largest value are
// converted; each result is compared with an independently computed
// encoding (value = mag * 2^-23, exponent from its binary logarithm, mantissa
// truncated) and its sign, and must appear 2 cycles after the input.
module tb_fix2float;
  localparam int E = 8, M = 23, W = 32, F = 23, LAT = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sign = 1'b0, out_valid;
  logic [W-1:0] mag = '0;
  logic [E+M:0] fp;
  int checks = 0, failures = 0;
  longint cycle = 0;

  typedef struct { longint mag; bit sign; longint want; longint t; } item_t;
  item_t q[$];

  fix2float #(.E(E), .M(M), .W(W), .F(F)) dut (.clk, .rst_n, .in_valid, .sign, .mag, .out_valid, .fp);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected encoding: find k with 2^k <= mag < 2^(k+1) by comparison.
  function automatic longint expect_fp(longint v, bit s);
    int k;
    longint mant;
    if (v == 0) return 0;
    k = 0;
    while ((longint'(2) << k) <= v) k++;
    if (k >= M) mant = v >> (k - M);        // bits below the leading one
    else        mant = v << (M - k);
    mant = mant & ((longint'(1) << M) - 1);
    return (longint'(s) << (E + M)) | (longint'(k - F + 127) << M) | mant;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      it = q.pop_front();
      checks++;
      if (longint'(fp) != it.want || cycle - it.t != LAT) begin
        failures++;
        $display("FAIL mag=%h sign=%b fp=%h want %h latency %0d", it.mag, it.sign, fp, it.want, cycle - it.t);
      end
    end
  end

  task automatic send(longint v, bit s);
    item_t it;
    mag = W'(v); sign = s; in_valid = 1'b1;
    it.mag = v; it.sign = s; it.want = expect_fp(v, s); it.t = cycle;
    q.push_back(it);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    send(0, 0);
    send(1, 0);
    send(longint'(1) << 23, 1);
    send(64'hffffffff, 0);
    send(64'h1611B05, 0);   // 2.7549 * 2^23 (log2 6.75)
    for (int i = 0; i < 3000; i++)
      send(longint'($urandom) >> $urandom_range(31, 0), 1'($urandom));
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL results missing"); end
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
