// cnn_pkg: types, sizes and the shared rounding step of the FP16 convolution
// accelerator.
//
// Numbers are IEEE 754 binary16 (1 sign bit, 5 exponent bits with bias 15,
// 10 fraction bits). The arithmetic units treat subnormal inputs as zero and
// flush results below the smallest normal number to a signed zero; results too
// large for the format become a signed infinity, and invalid operations give
// the quiet NaN 16'h7E00. Rounding is round-to-nearest-even. The format follows
// the original design; the subnormal, overflow and NaN policy is this design's own.
//
// fp16_round_pack is the one place rounding happens: it takes a sign, an
// unbiased exponent and a 48-bit significand whose leading one sits at bit 47,
// and returns the packed binary16 value.
package cnn_pkg;

  typedef logic [15:0] fp16_t;

  localparam int unsigned FP16_BIAS   = 15;
  localparam fp16_t       FP16_QNAN   = 16'h7E00;
  localparam int unsigned KERNEL_TAPS = 9;   // 3x3 kernel
  // Weights and bias are stored first in the input buffer: 9 weights + 1 bias,
  // two bytes each.
  localparam int unsigned WB_WORDS    = KERNEL_TAPS + 1;
  localparam int unsigned WB_BYTES    = 2 * WB_WORDS;

  function automatic fp16_t fp16_inf(input logic sign);
    return {sign, 5'h1F, 10'h000};
  endfunction

  function automatic fp16_t fp16_zero(input logic sign);
    return {sign, 15'h0000};
  endfunction

  // Round a normalised significand (leading one at bit 47) to 11 significant
  // bits, nearest-even, and pack it. exp_unb is the unbiased exponent of bit 47.
  function automatic fp16_t fp16_round_pack(input logic sign, input int exp_unb,
                                            input logic [47:0] sig);
    logic [11:0] kept;
    logic        guard, sticky;
    int          e;
    kept   = {1'b0, sig[47:37]};
    guard  = sig[36];
    sticky = |sig[35:0];
    e      = exp_unb;
    if (guard && (sticky || kept[0])) kept = kept + 12'd1;
    if (kept[11]) begin
      kept = kept >> 1;
      e    = e + 1;
    end
    if (e + int'(FP16_BIAS) >= 31) return fp16_inf(sign);
    if (e + int'(FP16_BIAS) <= 0)  return fp16_zero(sign);
    return {sign, 5'(e + int'(FP16_BIAS)), kept[9:0]};
  endfunction

endpackage
