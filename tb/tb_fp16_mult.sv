// tb_fp16_mult: checks fp16_mult against double-precision reference products
// for directed cases (exact products, rounding ties, overflow, underflow,
// zeros, infinities, NaN) and 20,000 random operand pairs.
module tb_fp16_mult;
  import tb_fp16_ref::*;

  logic [15:0] a, b, p;
  int checks = 0, failures = 0;

  fp16_mult dut (.a, .b, .p);

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [15:0] exp_p;
    a = x; b = y;
    #1;
    exp_p = ref_mul(x, y);
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", x, y, p, exp_p);
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
    check(16'h3C00, 16'h3C00);   // 1 * 1
    check(16'h4000, 16'h4200);   // 2 * 3 = 6
    if (p !== 16'h4600) begin failures++; $display("FAIL 2*3 gave %h", p); end
    checks++;
    check(16'h416F, 16'h3C00);   // 2.717 * 1 (the format example)
    check(16'h3C01, 16'h3C01);   // rounding of (1+2^-10)^2
    check(16'h3C01, 16'h3BFF);
    check(16'h7BFF, 16'h4000);   // overflow to inf
    if (p !== 16'h7C00) begin failures++; $display("FAIL overflow gave %h", p); end
    checks++;
    check(16'h0400, 16'h3800);   // below the smallest normal: flush to zero
    if (p !== 16'h0000) begin failures++; $display("FAIL underflow gave %h", p); end
    checks++;
    check(16'h8000, 16'h4000);   // -0 * 2 = -0
    check(16'h7C00, 16'h0000);   // inf * 0 = NaN
    check(16'h7C00, 16'hC000);   // inf * -2 = -inf
    check(16'h7E01, 16'h3C00);   // NaN
    check(16'h0001, 16'h7BFF);   // subnormal counts as zero
    for (int i = 0; i < 20000; i++) check(rand_h(12), rand_h(12));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
