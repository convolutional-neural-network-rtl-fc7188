// fp16_mult: combinational IEEE 754 binary16 multiplier.
//
// The convolution engine holds nine of these, one per tap of the 3x3 kernel,
// so that all nine products of an output pixel are formed in the same cycle.
// The two 11-bit significands (hidden one included) are multiplied exactly into
// 22 bits, the product is normalised by at most one place, and cnn_pkg's
// fp16_round_pack rounds it to nearest-even. Subnormal inputs count as zero
// and tiny results flush to zero; overflow gives infinity; 0 x inf and any NaN
// input give the quiet NaN.
//
// Interface: a, b in; p out, purely combinational (zero cycles).
// The original design names the unit and the number format; its insides are this
// design's own.
module fp16_mult
  import cnn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t p
);

  logic        sa, sb, sp;
  logic [4:0]  ea, eb;
  logic [9:0]  ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [21:0] prod;
  logic [47:0] sig;
  int          e;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    sp     = sa ^ sb;
    a_zero = (ea == 5'd0);
    b_zero = (eb == 5'd0);
    a_inf  = (ea == 5'h1F) && (ma == 10'd0);
    b_inf  = (eb == 5'h1F) && (mb == 10'd0);
    a_nan  = (ea == 5'h1F) && (ma != 10'd0);
    b_nan  = (eb == 5'h1F) && (mb != 10'd0);
    prod   = {1'b1, ma} * {1'b1, mb};
    // Value = prod * 2^(ea + eb - 30 - 20); leading one at bit 21 or 20.
    if (prod[21]) begin
      sig = {prod, 26'd0};
      e   = int'(ea) + int'(eb) - 30 + 1;
    end else begin
      sig = {prod[20:0], 27'd0};
      e   = int'(ea) + int'(eb) - 30;
    end
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      p = FP16_QNAN;
    else if (a_inf || b_inf)
      p = fp16_inf(sp);
    else if (a_zero || b_zero)
      p = fp16_zero(sp);
    else
      p = fp16_round_pack(sp, e, sig);
  end

endmodule
