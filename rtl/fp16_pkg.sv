// fp16_pkg: shared definitions for the IEEE 754 half-precision datapath.
//
// A half-precision value has 1 sign bit, 5 exponent bits (bias 15) and 10
// fraction bits, e.g. 16'h4248 = 1 x 2^1 x 1.571 = 3.141. The format is the
// one the accelerator uses throughout; everything else in this package is a
// choice of this implementation.
//
// fp16_round() turns an exact value, given as sign x mag x 2^exp with an
// unsigned integer magnitude, into the nearest half-precision number
// (round to nearest, ties to even), producing subnormals, signed zero and
// infinity on overflow. Both the multiplier and the adder first form their
// exact result and then call this function, so they round the same way.
package fp16_pkg;

  typedef logic [15:0] fp16_t;

  localparam int unsigned MAG_BITS       = 48;  // width of an exact magnitude

  localparam fp16_t FP16_QNAN = 16'h7E00;

  function automatic logic fp16_is_nan(fp16_t v);
    return (v[14:10] == 5'h1F) && (v[9:0] != 10'd0);
  endfunction

  function automatic logic fp16_is_inf(fp16_t v);
    return (v[14:10] == 5'h1F) && (v[9:0] == 10'd0);
  endfunction

  function automatic logic fp16_is_zero(fp16_t v);
    return v[14:0] == 15'd0;
  endfunction

  // 11-bit significand with the hidden bit made explicit.
  function automatic logic [10:0] fp16_mant(fp16_t v);
    return {v[14:10] != 5'd0, v[9:0]};
  endfunction

  // Exponent of the significand's lowest bit plus 25, i.e. the effective
  // biased exponent (subnormals use 1): value = mant x 2^(fp16_eexp - 25).
  function automatic int fp16_eexp(fp16_t v);
    return (v[14:10] == 5'd0) ? 1 : int'(v[14:10]);
  endfunction

  // Round sign x mag x 2^exp to half precision, ties to even.
  function automatic fp16_t fp16_round(logic sign, logic [MAG_BITS-1:0] mag, int exp);
    int msb;
    int lead;
    int lsb_exp;
    int shift;
    logic [MAG_BITS-1:0] kept;
    logic [MAG_BITS-1:0] low_mask;
    logic round_bit;
    logic sticky;
    int biased;
    fp16_t res;

    msb = -1;
    for (int i = 0; i < int'(MAG_BITS); i++)
      if (mag[i]) msb = i;

    if (msb < 0) begin
      res = {sign, 15'd0};
    end else begin
      lead    = msb + exp;                          // exponent of the leading one
      lsb_exp = (lead - 10 > -24) ? lead - 10 : -24; // weight of the kept LSB
      shift   = lsb_exp - exp;                      // bits dropped from mag
      round_bit = 1'b0;
      sticky    = 1'b0;
      if (shift <= 0) begin
        kept = mag << (-shift);
      end else if (shift > int'(MAG_BITS)) begin
        kept = '0;
        sticky = 1'b1;
      end else begin
        kept      = mag >> shift;
        round_bit = mag[shift-1];
        low_mask  = ({{(MAG_BITS-1){1'b0}}, 1'b1} << (shift - 1)) - 1'b1;
        sticky    = |(mag & low_mask);
      end
      if (round_bit && (sticky || kept[0])) kept = kept + 1'b1;
      if (kept[11]) begin                           // rounding carried out
        kept    = kept >> 1;
        lsb_exp = lsb_exp + 1;
      end
      if (kept[10]) begin
        biased = lsb_exp + 25;
        if (biased >= 31) res = {sign, 5'h1F, 10'd0};
        else              res = {sign, biased[4:0], kept[9:0]};
      end else begin
        res = {sign, 5'd0, kept[9:0]};              // subnormal (or zero)
      end
    end
    return res;
  endfunction

endpackage
