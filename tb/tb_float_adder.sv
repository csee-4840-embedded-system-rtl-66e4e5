// tb_float_adder: checks the half-precision adder against double-precision
// reference arithmetic on directed values (cancellation, signed zeros,
// subnormals, overflow, infinities, NaN) and on random operands, half of
// them with nearby exponents so that cancellation is common.
module tb_float_adder;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, s;
  int checks = 0, failures = 0;

  float_adder dut (.a, .b, .s);

  task automatic check(logic [15:0] x, logic [15:0] y, logic [15:0] exp_s);
    a = x; b = y;
    #1;
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h, expected %h", x, y, s, exp_s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h4248, 16'h3C00, 16'h4424);   // 3.141 + 1 = 4.141
    check(16'h3C00, 16'hBC00, 16'h0000);   // 1 - 1 = +0
    check(16'h8000, 16'h8000, 16'h8000);   // -0 + -0
    check(16'h7BFF, 16'h7BFF, 16'h7C00);   // overflow
    check(16'h3C00, 16'h1000, 16'h3C00);   // tiny addend rounds away
    check(16'h3C00, 16'h1401, 16'h3C01);   // just over half an ulp
    check(16'h0001, 16'h8002, 16'h8001);   // subnormals
    check(16'h7C00, 16'hFC00, 16'h7E00);   // inf - inf = NaN
    check(16'h7C00, 16'h4000, 16'h7C00);
    check(16'h4000, 16'hFE00, 16'h7E00);   // NaN in
    for (int i = 0; i < 20000; i++) begin
      automatic logic [15:0] x = rand_fp16(0, 30);
      automatic logic [15:0] y;
      if (i % 2 == 0) y = rand_fp16(0, 30);
      else begin
        y = x ^ 16'h8000;
        y[9:0] = 10'($urandom);
        y[14:10] = (x[14:10] == 5'd0) ? 5'd0 : x[14:10] - 5'(i % 2);
      end
      check(x, y, add(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
