// float_adder: combinational IEEE 754 half-precision adder.
//
// The convolution engine uses a single adder, fed one product per cycle, to
// accumulate a 3x3 window onto the bias. Every half-precision number is an
// integer multiple of 2^-24, so both operands are aligned exactly to that
// grid (at most 40 bits), added or subtracted as integers and the exact
// result is rounded to nearest-even by fp16_pkg::fp16_round(). An exact zero
// from operands of opposite sign is +0. NaN inputs and inf + (-inf) give the
// quiet NaN 16'h7E00; an infinite operand otherwise passes through.
//
// Interface: a, b in, s = a + b out, no clock; valid in the same cycle. The
// original report gives the format and a register-free adder; the alignment method,
// rounding and special values are this design's choices.
module float_adder
  import fp16_pkg::*;
(
  input  fp16_t a,
  input  fp16_t b,
  output fp16_t s
);

  localparam int unsigned AW = 40;  // 11-bit significand shifted by up to 29

  logic [AW-1:0]       ma, mb;
  logic [MAG_BITS-1:0] mag;
  logic                sign;

  always_comb begin
    ma = {{(AW-11){1'b0}}, fp16_mant(a)} << (fp16_eexp(a) - 1);
    mb = {{(AW-11){1'b0}}, fp16_mant(b)} << (fp16_eexp(b) - 1);
    if (a[15] == b[15]) begin
      mag  = MAG_BITS'(ma) + MAG_BITS'(mb);
      sign = a[15];
    end else if (ma >= mb) begin
      mag  = MAG_BITS'(ma - mb);
      sign = (ma == mb) ? 1'b0 : a[15];
    end else begin
      mag  = MAG_BITS'(mb - ma);
      sign = b[15];
    end

    if (fp16_is_nan(a) || fp16_is_nan(b) ||
        (fp16_is_inf(a) && fp16_is_inf(b) && (a[15] != b[15])))
      s = FP16_QNAN;
    else if (fp16_is_inf(a))
      s = a;
    else if (fp16_is_inf(b))
      s = b;
    else
      s = fp16_round(sign, mag, -24);
  end

endmodule
