// float_multi: combinational IEEE 754 half-precision multiplier.
//
// The convolution engine instantiates nine of these, one per 3x3 kernel tap,
// so a whole window is multiplied in a single cycle. The product of the two
// 11-bit significands is exact (22 bits); fp16_pkg::fp16_round() then rounds
// it to nearest-even, producing subnormals and overflowing to infinity.
// NaN inputs and infinity x zero give the quiet NaN 16'h7E00; an infinite
// operand otherwise gives a signed infinity.
//
// Interface: a, b in, p = a * b out, no clock; the result is valid in the
// same cycle. The original report gives the format and that the unit has no
// registers; the rounding mode and special-value handling are this design's.
module float_multi
  import fp16_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t p
);

  logic        sign;
  logic [21:0] prod;

  assign sign = a[15] ^ b[15];
  assign prod = fp16_mant(a) * fp16_mant(b);

  always_comb begin
    if (fp16_is_nan(a) || fp16_is_nan(b) ||
        (fp16_is_inf(a) && fp16_is_zero(b)) || (fp16_is_zero(a) && fp16_is_inf(b)))
      p = FP16_QNAN;
    else if (fp16_is_inf(a) || fp16_is_inf(b))
      p = {sign, 5'h1F, 10'd0};
    else
      p = fp16_round(sign, {{(MAG_BITS-22){1'b0}}, prod}, fp16_eexp(a) + fp16_eexp(b) - 50);
  end

endmodule
