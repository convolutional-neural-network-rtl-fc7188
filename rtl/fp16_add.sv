// fp16_add: combinational IEEE 754 binary16 adder.
//
// The convolution engine has a single adder and reuses it nine times per
// output pixel to sum the nine products and the bias. Instead of the usual
// guard/round/sticky alignment, both operands are placed exactly on a common
// 41-bit fixed-point grid whose unit is 2^-24 (the weight of the lowest fraction
// bit of the smallest normal exponent). The exact sum or difference of the
// magnitudes is then normalised with a leading-one search and rounded once, to
// nearest-even, by cnn_pkg's fp16_round_pack. Subnormal inputs count as zero
// and tiny results flush to zero; an exact zero difference is +0; inf - inf and
// any NaN input give the quiet NaN.
//
// Interface: a, b in; s out, purely combinational (zero cycles).
// The original design names the unit and the number format; its insides are this
// design's own.
module fp16_add
  import cnn_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t s
);

  logic        sa, sb, sr;
  logic [4:0]  ea, eb;
  logic [9:0]  ma, mb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [40:0] fa, fb, mag;
  logic [47:0] sig;
  int          lead;

  always_comb begin
    {sa, ea, ma} = a;
    {sb, eb, mb} = b;
    a_zero = (ea == 5'd0);
    b_zero = (eb == 5'd0);
    a_inf  = (ea == 5'h1F) && (ma == 10'd0);
    b_inf  = (eb == 5'h1F) && (mb == 10'd0);
    a_nan  = (ea == 5'h1F) && (ma != 10'd0);
    b_nan  = (eb == 5'h1F) && (mb != 10'd0);
    // Fixed-point magnitudes: value = f * 2^-24.
    fa = a_zero ? 41'd0 : (41'({1'b1, ma}) << (ea - 5'd1));
    fb = b_zero ? 41'd0 : (41'({1'b1, mb}) << (eb - 5'd1));
    if (sa == sb) begin
      mag = fa + fb;
      sr  = sa;
    end else if (fa >= fb) begin
      mag = fa - fb;
      sr  = sa;
    end else begin
      mag = fb - fa;
      sr  = sb;
    end
    lead = 0;
    for (int i = 0; i < 41; i++)
      if (mag[i]) lead = i;
    sig = 48'(mag) << (47 - lead);

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      s = FP16_QNAN;
    else if (a_inf)
      s = fp16_inf(sa);
    else if (b_inf)
      s = fp16_inf(sb);
    else if (mag == 41'd0)
      s = fp16_zero(a_zero && b_zero && sa && sb);
    else
      s = fp16_round_pack(sr, lead - 24, sig);
  end

endmodule
