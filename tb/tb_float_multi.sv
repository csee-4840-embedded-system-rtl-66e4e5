// tb_float_multi: checks the half-precision multiplier against double-
// precision reference arithmetic on directed values (the 3.141 example,
// signed zeros, subnormals, overflow, infinities, NaN) and on random
// operands covering every finite exponent.
module tb_float_multi;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, p;
  int checks = 0, failures = 0;

  float_multi dut (.a, .b, .p);

  task automatic check(logic [15:0] x, logic [15:0] y, logic [15:0] exp_p);
    a = x; b = y;
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", x, y, p, exp_p);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h4248, 16'h3C00, 16'h4248);   // 3.141 * 1
    check(16'h4248, 16'h4000, 16'h4648);   // 3.141 * 2
    check(16'h3C00, 16'h8000, 16'h8000);   // 1 * -0
    check(16'h7BFF, 16'h4000, 16'h7C00);   // overflow to +inf
    check(16'h0001, 16'h3800, 16'h0000);   // tie to even: underflow to 0
    check(16'h0003, 16'h3800, 16'h0002);   // 1.5 ulp -> 2 ulp (tie to even)
    check(16'h0400, 16'h3800, 16'h0200);   // normal -> subnormal
    check(16'h7C00, 16'h0000, 16'h7E00);   // inf * 0 = NaN
    check(16'hFC00, 16'h4000, 16'hFC00);   // -inf * 2
    check(16'h7E01, 16'h3C00, 16'h7E00);   // NaN in
    for (int i = 0; i < 20000; i++) begin
      automatic logic [15:0] x = rand_fp16(0, 30);
      automatic logic [15:0] y = rand_fp16(0, 30);
      check(x, y, mul(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
