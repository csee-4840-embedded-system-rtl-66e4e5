// tb_vgg11_workload: runs VGG-11 convolution-layer work on the accelerator
// top the way a host would.
//
// Part 1 computes one output channel of the first layer: a 3-channel
// 32 x 32 input (a CIFAR-10 sized image) against three 3x3 kernels. Each
// input channel is one accelerator run. The bias is loaded with the first
// channel only (zero for the others) and the host sums the three partial
// maps in half precision, then applies ReLU. Part 2 runs one map of each
// smaller size that appears in the later layers (16, 8, 4 and 2 pixels
// square). Every value is compared with reference half-precision
// arithmetic and each run's cycle count is printed.
module tb_vgg11_workload;
  import fp16_ref_pkg::*;

  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;

  logic [16:0] in_addr, out_addr;
  logic        in_we, out_re;
  logic [7:0]  in_wd, out_rd;
  logic        start, finish;
  logic [15:0] read_length, write_length;
  logic [5:0]  dim;
  logic [8:0]  fpga_stat;

  cnn_main dut (
    .clk, .reset,
    .ocm_in_address(in_addr), .ocm_in_write(in_we), .ocm_in_writedata(in_wd),
    .ocm_out_address(out_addr), .ocm_out_read(out_re), .ocm_out_readdata(out_rd),
    .start, .read_length, .feat_map_dim(dim), .finish, .write_length, .fpga_stat
  );

  always #10 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic dma_write16(int a, logic [15:0] v);
    @(negedge clk); in_addr = 17'(a); in_wd = v[7:0]; in_we = 1;
    @(negedge clk); in_addr = 17'(a + 1); in_wd = v[15:8];
    @(negedge clk); in_we = 0;
  endtask

  task automatic dma_read16(int a, output logic [15:0] v);
    @(negedge clk); out_addr = 17'(a); out_re = 1;
    @(negedge clk); out_addr = 17'(a + 1); v[7:0] = out_rd;
    @(negedge clk); out_re = 0; v[15:8] = out_rd;
  endtask

  // reference 3x3 convolution with zero padding, bias first
  function automatic logic [15:0] ref_conv(logic [15:0] img [], logic [15:0] w [10],
                                           int d, int y, int x);
    logic [15:0] acc = w[9];
    for (int e = 0; e < 9; e++) begin
      int yy = y + e / 3 - 1, xx = x + e % 3 - 1;
      logic [15:0] p = (yy < 0 || xx < 0 || yy >= d || xx >= d) ? 16'h0000 : img[yy * d + xx];
      acc = add(acc, mul(p, w[e]));
    end
    return acc;
  endfunction

  // one accelerator run: load kernel and map, start, wait, read the result
  task automatic accel_run(logic [15:0] w [10], logic [15:0] img [], int d,
                           output logic [15:0] res []);
    int dt = 0;
    res = new[d * d];
    for (int k = 0; k < 10; k++) dma_write16(2 * k, w[k]);
    for (int i = 0; i < d * d; i++) dma_write16(20 + 2 * i, img[i]);
    @(negedge clk); dim = 6'(d); read_length = 16'd20; start = 1;
    @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    while (!finish && dt < 100 * d * d + 1000) begin @(negedge clk); dt++; end
    check(finish, $sformatf("finish for %0d x %0d map", d, d));
    $display("%0d x %0d map: about %0d cycles", d, d, dt + 4);
    for (int i = 0; i < d * d; i++) dma_read16(2 * i, res[i]);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] w [3][10];
    logic [15:0] img [3][];
    logic [15:0] part [3][];
    logic [15:0] sum, want, got;
    static int sizes [4] = '{16, 8, 4, 2};
    in_addr = '0; in_we = 0; in_wd = '0; out_addr = '0; out_re = 0;
    start = 0; read_length = 16'd20; dim = 6'd32;
    repeat (3) @(posedge clk);
    reset = 0;

    // Part 1: one output channel of the first layer, 3 input channels
    for (int c = 0; c < 3; c++) begin
      for (int k = 0; k < 9; k++) w[c][k] = rand_fp16(8, 15);
      w[c][9] = (c == 0) ? rand_fp16(8, 15) : 16'h0000;
      img[c] = new[32 * 32];
      for (int i = 0; i < 32 * 32; i++) img[c][i] = rand_fp16(10, 15);
      accel_run(w[c], img[c], 32, part[c]);
    end
    for (int y = 0; y < 32; y++)
      for (int x = 0; x < 32; x++) begin
        // host side: sum the partial maps, then ReLU
        sum  = add(add(part[0][y * 32 + x], part[1][y * 32 + x]), part[2][y * 32 + x]);
        got  = sum[15] ? 16'h0000 : sum;
        want = add(add(ref_conv(img[0], w[0], 32, y, x), ref_conv(img[1], w[1], 32, y, x)),
                   ref_conv(img[2], w[2], 32, y, x));
        want = want[15] ? 16'h0000 : want;
        check(got == want, $sformatf("channel sum (%0d,%0d) = %h expected %h", y, x, got, want));
      end

    // Part 2: the map sizes of the later layers
    foreach (sizes[s]) begin
      automatic int d = sizes[s];
      automatic logic [15:0] res [];
      img[0] = new[d * d];
      for (int k = 0; k < 10; k++) w[0][k] = rand_fp16(8, 16);
      for (int i = 0; i < d * d; i++) img[0][i] = rand_fp16(10, 18);
      accel_run(w[0], img[0], d, res);
      for (int y = 0; y < d; y++)
        for (int x = 0; x < d; x++)
          check(res[y * d + x] == ref_conv(img[0], w[0], d, y, x),
                $sformatf("%0dx%0d out(%0d,%0d)", d, d, y, x));
    end
    check(int'(write_length) == 3 * 1024 + 256 + 64 + 16 + 4, "results written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
