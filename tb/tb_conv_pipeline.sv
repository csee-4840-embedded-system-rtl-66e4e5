// tb_conv_pipeline: runs readOCM -> convOpt -> writeOCM against two byte
// memory models (input with one cycle of read latency, output taking
// writes). For an 8 x 8 and a 5 x 5 random map it checks every result
// byte in the output memory against reference half-precision arithmetic
// (bias first, then the nine products in tap order, zero padding at the
// borders), the result counter, `finish`, and that no byte outside the
// result map is written.
module tb_conv_pipeline;
  import fp16_ref_pkg::*;

  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;

  logic        start, finish;
  logic [15:0] read_length, write_count;
  logic [5:0]  dim;
  logic [8:0]  fpga_stat;
  logic [7:0]  rdata, wdata;
  logic [16:0] raddr, waddr;
  logic        rchip, rce, wchip, wce, we;
  logic [7:0]  imem [4096];
  logic [7:0]  omem [int];
  int          total;

  conv_pipeline dut (
    .clk, .reset, .start, .read_length, .feat_map_dim(dim), .finish,
    .write_count, .fpga_stat,
    .ocm0_readdata(rdata), .ocm0_addr(raddr), .ocm0_chip(rchip), .ocm0_clk_enab(rce),
    .ocm1_writedata(wdata), .ocm1_addr(waddr), .ocm1_chip(wchip), .ocm1_clk_enab(wce),
    .ocm1_write(we)
  );

  always #10 clk = ~clk;
  always @(posedge clk) begin
    if (rchip && rce) rdata <= imem[int'(raddr) % 4096];
    if (wchip && wce && we) omem[int'(waddr)] = wdata;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] pix(int y, int x, int d, int base);
    if (y < 0 || x < 0 || y >= d || x >= d) return 16'h0000;
    return {imem[base + 2 * (y * d + x) + 1], imem[base + 2 * (y * d + x)]};
  endfunction

  task automatic run(int d);
    logic [15:0] w [10];
    omem.delete();
    for (int k = 0; k < 10; k++) begin
      w[k] = rand_fp16(8, 16);
      {imem[2 * k + 1], imem[2 * k]} = w[k];
    end
    for (int i = 0; i < d * d; i++) {imem[20 + 2 * i + 1], imem[20 + 2 * i]} = rand_fp16(10, 18);
    @(negedge clk); dim = 6'(d); read_length = 16'd20; start = 1;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    for (int t = 0; t < 200 * d * d && !finish; t++) @(negedge clk);
    check(finish, "finish");
    total += d * d;
    check(int'(write_count) == total, $sformatf("write_count %0d expected %0d", write_count, total));
    check(omem.size() == 2 * d * d, $sformatf("%0d bytes written", omem.size()));
    for (int y = 0; y < d; y++)
      for (int x = 0; x < d; x++) begin
        logic [15:0] acc = w[9];
        logic [15:0] got;
        int a = 2 * (y * d + x);
        for (int e = 0; e < 9; e++) acc = add(acc, mul(pix(y + e / 3 - 1, x + e % 3 - 1, d, 20), w[e]));
        got = {omem.exists(a + 1) ? omem[a + 1] : 8'hxx, omem.exists(a) ? omem[a] : 8'hxx};
        check(omem.exists(a) && omem.exists(a + 1) && got == acc,
              $sformatf("out(%0d,%0d) = %h expected %h", y, x, got, acc));
      end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; dim = 6'd8; read_length = 16'd20; total = 0;
    for (int i = 0; i < 4096; i++) imem[i] = 8'($urandom);
    repeat (3) @(posedge clk);
    reset = 0;
    run(8);
    run(5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
