// tb_fp16_ref: reference FP16 arithmetic for the testbenches, computed through
// IEEE double precision.
//
// A product or sum of two binary16 values is exact in double precision, so the
// reference result is the exact double result rounded once to binary16 with
// round-to-nearest-even, using the same special-value policy as the RTL:
// subnormal inputs count as zero, results below the smallest normal flush to a
// signed zero, overflow gives a signed infinity and any NaN becomes 16'h7E00.
package tb_fp16_ref;

  function automatic real h2r(input logic [15:0] h);
    logic [63:0] b;
    if (h[14:10] == 5'd0)
      b = {h[15], 63'd0};
    else if (h[14:10] == 5'h1F)
      b = (h[9:0] == 0) ? {h[15], 11'h7FF, 52'd0} : {1'b0, 11'h7FF, 1'b1, 51'd0};
    else
      b = {h[15], 11'(int'(h[14:10]) - 15 + 1023), h[9:0], 42'd0};
    return $bitstoreal(b);
  endfunction

  function automatic logic [15:0] r2h(input real r);
    logic [63:0] b;
    logic [11:0] kept;
    int e;
    b = $realtobits(r);
    if (b[62:52] == 11'h7FF) return (b[51:0] != 0) ? 16'h7E00 : {b[63], 5'h1F, 10'd0};
    if (b[62:52] == 11'd0)   return {b[63], 15'd0};
    e    = int'(b[62:52]) - 1023;
    kept = {2'b01, b[51:42]};
    if (b[41] && ((|b[40:0]) || kept[0])) kept = kept + 1;
    if (kept[11]) begin kept = kept >> 1; e = e + 1; end
    if (e + 15 >= 31) return {b[63], 5'h1F, 10'd0};
    if (e + 15 <= 0)  return {b[63], 15'd0};
    return {b[63], 5'(e + 15), kept[9:0]};
  endfunction

  function automatic logic [15:0] ref_mul(input logic [15:0] a, input logic [15:0] b);
    return r2h(h2r(a) * h2r(b));
  endfunction

  function automatic logic [15:0] ref_add(input logic [15:0] a, input logic [15:0] b);
    return r2h(h2r(a) + h2r(b));
  endfunction

  // One output pixel of the 3x3 convolution, in the engine's order of
  // operations: nine rounded products, summed left to right, bias last.
  function automatic logic [15:0] ref_pixel(input logic [143:0] x, input logic [159:0] wb);
    logic [15:0] acc;
    acc = ref_mul(x[15:0], wb[15:0]);
    for (int k = 1; k < 9; k++) acc = ref_add(acc, ref_mul(x[16*k +: 16], wb[16*k +: 16]));
    return ref_add(acc, wb[159:144]);
  endfunction

  // A random FP16 value: mostly normal numbers of moderate size, sometimes
  // zeros, subnormals, extremes, infinities and NaNs.
  function automatic logic [15:0] rand_h(input int unsigned spread);
    int unsigned sel;
    logic [15:0] h;
    sel = $urandom_range(0, 99);
    h   = 16'($urandom);
    if (sel < 3)       h[14:0] = 15'd0;                          // zero
    else if (sel < 5)  h[14:10] = 5'd0;                          // subnormal
    else if (sel < 7)  h[14:0] = {5'h1F, 10'd0};                 // infinity
    else if (sel < 8)  h[14:10] = 5'h1F;                         // NaN (or inf)
    else if (sel < 15) h[14:10] = 5'($urandom_range(1, 30));     // any normal
    else               h[14:10] = 5'(15 - spread/2 + $urandom_range(0, spread));
    return h;
  endfunction

  // A finite normal value with exponent field in [15-spread/2, 15+spread/2].
  function automatic logic [15:0] rand_normal(input int unsigned spread);
    logic [15:0] h;
    h = 16'($urandom);
    h[14:10] = 5'(15 - spread/2 + $urandom_range(0, spread));
    return h;
  endfunction

endpackage
