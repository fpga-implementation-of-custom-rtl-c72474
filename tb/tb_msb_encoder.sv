// tb_msb_encoder: checks the priority encoder at W=32 with every single-bit
// input, random inputs, zero and all ones, against a loop from the top bit
// down. Combinational; no clock.
module tb_msb_encoder;
  localparam int W = 32;
  logic [W-1:0] a = '0;
  logic [4:0]   pos;
  logic         nonzero;
  int checks = 0, failures = 0;

  msb_encoder #(.W(W)) dut (.a, .pos, .nonzero);

  task automatic run(logic [W-1:0] v);
    int want;
    a = v;
    #1;
    want = 0;
    for (int i = W - 1; i >= 0; i--) if (v[i]) begin want = i; break; end
    checks++;
    if (nonzero !== (v != 0) || (v != 0 && int'(pos) != want)) begin
      failures++;
      $display("FAIL a=%h pos=%0d nonzero=%b want %0d", v, pos, nonzero, want);
    end
  endtask

  initial begin
    run('0);
    run('1);
    for (int i = 0; i < W; i++) run(W'(1) << i);
    for (int i = 0; i < 2000; i++) run(W'($urandom) >> $urandom_range(W - 1, 0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
