// tb_fp16_add: checks fp16_add against double-precision reference sums for
// directed cases (cancellation, rounding ties, carry-out, far-apart exponents,
// overflow, underflow, signed zeros, infinities, NaN) and 30,000 random pairs.
module tb_fp16_add;
  import tb_fp16_ref::*;

  logic [15:0] a, b, s;
  int checks = 0, failures = 0;

  fp16_add dut (.a, .b, .s);

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] exp_s;
    a = x; b = y;
    #1;
    exp_s = ref_add(x, y);
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL add %h + %h = %h, expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h3C00, 16'h3C00);   // 1 + 1 = 2
    if (s !== 16'h4000) begin failures++; $display("FAIL 1+1 gave %h", s); end
    checks++;
    check(16'h4200, 16'hC000);   // 3 - 2 = 1
    if (s !== 16'h3C00) begin failures++; $display("FAIL 3-2 gave %h", s); end
    checks++;
    check(16'h3C00, 16'h1000);   // 1 + 2^-11: tie, round to even
    check(16'h3C01, 16'h1000);   // tie, round up
    check(16'h3C00, 16'hBC00);   // 1 - 1 = +0
    check(16'h8000, 16'h8000);   // -0 + -0 = -0
    check(16'h7BFF, 16'h7BFF);   // overflow
    check(16'h0401, 16'h8400);   // tiny difference flushes to zero
    check(16'h7C00, 16'hFC00);   // inf - inf = NaN
    check(16'h7C00, 16'h3C00);
    check(16'h7BFF, 16'h0400);   // far apart
    check(16'h3C00, 16'hBBFF);   // massive cancellation
    for (int i = 0; i < 20000; i++) check(rand_h(8), rand_h(8));
    for (int i = 0; i < 10000; i++) begin   // opposite signs, close magnitudes
      logic [15:0] x, y;
      x = rand_normal(4);
      y = x ^ 16'h8000;
      y[3:0] = 4'($urandom);
      check(x, y);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
