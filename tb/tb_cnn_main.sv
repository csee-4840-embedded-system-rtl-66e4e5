// tb_cnn_main: end-to-end test of the accelerator at its default sizes.
//
// Acting as the host and its DMA engines, it writes a kernel, a bias and a
// random feature map into the input memory through its DMA-side port,
// raises `start`, waits for `finish` and reads the result map back through
// the output memory's DMA-side port, comparing every value with reference
// half-precision arithmetic. Run 1 is the 32 x 32 map of one CIFAR-10
// sized layer input; run 2 reloads a new kernel with a 24-byte kernel
// block and a 7 x 7 map. It counts how often each mechanism happened -
// kernel loads, window requests, zero-padded window pixels, result
// writes, completed maps - and fails if any never did. For the 32 x 32 run
// it also checks the time from `start` to `finish` against the 840 us
// (42,000 cycles at 50 MHz) reported for the reference implementation,
// allowing +-25%.
module tb_cnn_main;
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

  int n_kernel_loads, n_windows, n_padded, n_writes, n_maps;
  int cyc;

  cnn_main dut (
    .clk, .reset,
    .ocm_in_address(in_addr), .ocm_in_write(in_we), .ocm_in_writedata(in_wd),
    .ocm_out_address(out_addr), .ocm_out_read(out_re), .ocm_out_readdata(out_rd),
    .start, .read_length, .feat_map_dim(dim), .finish, .write_length, .fpga_stat
  );

  always #10 clk = ~clk;   // 50 MHz

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // mechanism counters, from the state fields of fpga_stat and the handshakes
  logic [2:0] rd_prev, cv_prev, wr_prev;
  always @(posedge clk) begin
    cyc++;
    if (!reset) begin
      if (fpga_stat[8:6] == 3'd2 && rd_prev != 3'd2) n_kernel_loads++;
      if (fpga_stat[5:3] == 3'd1 && cv_prev != 3'd1) n_windows++;
      // readOCM stays in state 4 for one extra cycle per padded pixel
      if (fpga_stat[8:6] == 3'd4 && rd_prev == 3'd4) n_padded++;
      if (fpga_stat[2:0] == 3'd3 && wr_prev != 3'd3) n_writes++;
      if (fpga_stat[5:3] == 3'd7 && cv_prev != 3'd7) n_maps++;
    end
    rd_prev <= fpga_stat[8:6];
    cv_prev <= fpga_stat[5:3];
    wr_prev <= fpga_stat[2:0];
  end

  // window pixels that fall outside a d x d map, over all positions
  function automatic int padded_pixels(int d);
    int n = 0;
    for (int y = 0; y < d; y++)
      for (int x = 0; x < d; x++)
        for (int e = 0; e < 9; e++)
          if (y + e / 3 - 1 < 0 || x + e % 3 - 1 < 0 || y + e / 3 - 1 >= d || x + e % 3 - 1 >= d) n++;
    return n;
  endfunction

  task automatic dma_write(int a, logic [7:0] v);
    @(negedge clk); in_addr = 17'(a); in_wd = v; in_we = 1;
    @(negedge clk); in_we = 0;
  endtask

  task automatic dma_read(int a, output logic [7:0] v);
    @(negedge clk); out_addr = 17'(a); out_re = 1;
    @(negedge clk); out_re = 0; v = out_rd;
  endtask

  task automatic run(int d, int len, bit timed);
    logic [15:0] w [10];
    logic [15:0] img [];
    int t0, dt;
    img = new[d * d];
    for (int k = 0; k < 10; k++) begin
      w[k] = rand_fp16(8, 16);
      dma_write(2 * k, w[k][7:0]);
      dma_write(2 * k + 1, w[k][15:8]);
    end
    for (int i = 0; i < d * d; i++) begin
      img[i] = rand_fp16(10, 18);
      dma_write(len + 2 * i, img[i][7:0]);
      dma_write(len + 2 * i + 1, img[i][15:8]);
    end
    @(negedge clk); dim = 6'(d); read_length = 16'(len); start = 1;
    t0 = cyc;
    @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    check(!finish, "finish low while working");
    for (int t = 0; t < 100 * d * d + 1000 && !finish; t++) @(negedge clk);
    dt = cyc - t0;
    check(finish, "finish");
    $display("map %0d x %0d: %0d cycles = %0d us at 50 MHz", d, d, dt, dt / 50);
    if (timed) check(dt >= 31500 && dt <= 52500, $sformatf("%0d cycles outside 42000 +-25%%", dt));
    for (int y = 0; y < d; y++)
      for (int x = 0; x < d; x++) begin
        logic [15:0] acc = w[9];
        logic [7:0]  lo, hi;
        for (int e = 0; e < 9; e++) begin
          int yy = y + e / 3 - 1, xx = x + e % 3 - 1;
          logic [15:0] p = (yy < 0 || xx < 0 || yy >= d || xx >= d) ? 16'h0000 : img[yy * d + xx];
          acc = add(acc, mul(p, w[e]));
        end
        dma_read(2 * (y * d + x), lo);
        dma_read(2 * (y * d + x) + 1, hi);
        check({hi, lo} == acc, $sformatf("out(%0d,%0d) = %h expected %h", y, x, {hi, lo}, acc));
      end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_addr = '0; in_we = 0; in_wd = '0; out_addr = '0; out_re = 0;
    start = 0; read_length = 16'd20; dim = 6'd32; cyc = 0;
    n_kernel_loads = 0; n_windows = 0; n_padded = 0; n_writes = 0; n_maps = 0;
    rd_prev = '0; cv_prev = '0; wr_prev = '0;
    repeat (3) @(posedge clk);
    reset = 0;
    run(32, 20, 1'b1);
    run(7, 24, 1'b0);
    check(int'(write_length) == 32 * 32 + 7 * 7, $sformatf("write_length %0d", write_length));
    $display("kernel loads %0d, windows %0d, padded pixels %0d, result writes %0d, maps %0d",
             n_kernel_loads, n_windows, n_padded, n_writes, n_maps);
    check(n_kernel_loads == 2, "kernel loads");
    check(n_windows == 32 * 32 + 7 * 7, "window requests");
    check(n_padded == padded_pixels(32) + padded_pixels(7), "zero-padded pixels");
    check(n_writes == 32 * 32 + 7 * 7, "result writes");
    check(n_maps == 2, "completed maps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
