// fp16_ref_pkg: reference half-precision arithmetic for the testbenches.
//
// Works on the simulator's double-precision reals, independently of the
// RTL's integer rounding: fp16 -> real is exact, products and sums of two
// half-precision numbers are exact in double precision, and to_fp16()
// rounds a real to the nearest half-precision value (ties to even) by
// scaling with powers of two and comparing the remainder with one half.
package fp16_ref_pkg;

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real to_real(logic [15:0] h);
    real m;
    if (h[14:10] == 5'd0) m = real'(h[9:0]) * pow2(-24);
    else                  m = real'(1024 + int'(h[9:0])) * pow2(int'(h[14:10]) - 25);
    return h[15] ? -m : m;
  endfunction

  // round half to even of a non-negative real
  function automatic real rne(real q);
    real f = $floor(q);
    real d = q - f;
    if (d > 0.5) return f + 1.0;
    if (d < 0.5) return f;
    return ($floor(f / 2.0) * 2.0 == f) ? f : f + 1.0;
  endfunction

  function automatic logic [15:0] to_fp16(real r);
    logic [63:0] bits = $realtobits(r);
    logic        s    = bits[63];
    real         a    = s ? -r : r;
    real         m, n;
    int          e;
    if (a == 0.0) return {s, 15'd0};
    if (a < pow2(-14)) begin
      n = rne(a * pow2(24));
      if (n >= 1024.0) return {s, 5'd1, 10'd0};
      return {s, 5'd0, 10'(int'(n))};
    end
    e = 0;
    m = a;
    while (m >= 2.0) begin m = m / 2.0; e++; end
    while (m < 1.0)  begin m = m * 2.0; e--; end
    n = rne(m * 1024.0);
    if (n >= 2048.0) begin n = 1024.0; e++; end
    if (e + 15 >= 31) return {s, 5'h1F, 10'd0};
    return {s, 5'(e + 15), 10'(int'(n) - 1024)};
  endfunction

  function automatic logic [15:0] mul(logic [15:0] a, logic [15:0] b);
    return to_fp16(to_real(a) * to_real(b));
  endfunction

  function automatic logic [15:0] add(logic [15:0] a, logic [15:0] b);
    return to_fp16(to_real(a) + to_real(b));
  endfunction

  // random finite half-precision number, exponent field in [emin, emax]
  function automatic logic [15:0] rand_fp16(int emin, int emax);
    logic [15:0] h;
    h[15]    = 1'($urandom);
    h[14:10] = 5'(emin + int'($urandom % 32'(emax - emin + 1)));
    h[9:0]   = 10'($urandom);
    return h;
  endfunction

endpackage
