// tb_readOCM: runs readOCM against a byte memory model with one cycle of
// read latency. It loads random kernels and maps for two configurations
// (5 x 5 map after 20 bytes of kernel, then a reload with a 7 x 7 map
// after 24 bytes), checks weight_bias, then requests every window in random
// order and checks each against a zero-padded reference window, the
// latency (2 + 3 cycles per pixel read + 1 per padded pixel) and that no
// read leaves the map.
module tb_readOCM;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;

  logic         start, start_fm, in_data_ready, finish_fm;
  logic [15:0]  read_length, conv_idx;
  logic [5:0]   dim;
  logic [159:0] weight_bias;
  logic [143:0] feat_map_in;
  logic [7:0]   rdata;
  logic [16:0]  addr;
  logic         chip, clken;
  logic [2:0]   st;
  logic [7:0]   mem [4096];
  int           n_pad;

  readOCM dut (
    .clk, .reset, .start, .read_length, .read_data_dim(dim),
    .in_data_ready, .weight_bias, .start_fm, .conv_idx, .finish_fm,
    .feat_map_in, .ocm0_readdata(rdata), .ocm0_addr(addr), .ocm0_chip(chip),
    .ocm0_clk_enab(clken), .debug_state(st)
  );

  always #10 clk = ~clk;

  always @(posedge clk) if (chip && clken) rdata <= mem[int'(addr) % 4096];

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] pixel(int y, int x, int d, int base);
    if (y < 0 || x < 0 || y >= d || x >= d) return 16'h0000;
    return {mem[base + 2 * (y * d + x) + 1], mem[base + 2 * (y * d + x)]};
  endfunction

  // a map read must stay inside [base, base + 2*d*d) once weights are in
  int rd_lo, rd_hi;
  always @(posedge clk)
    if (!reset && chip && in_data_ready)
      check(int'(addr) >= rd_lo && int'(addr) < rd_hi, $sformatf("read address %0d in map", addr));

  task automatic run(int d, int len);
    int order [];
    logic [159:0] wb_exp;
    for (int i = 0; i < 4096; i++) mem[i] = 8'($urandom);
    for (int i = 0; i < 20; i++) wb_exp[i*8 +: 8] = mem[i];
    rd_lo = len; rd_hi = len + 2 * d * d;
    @(negedge clk);
    dim = 6'(d); read_length = 16'(len); start = 1;
    @(negedge clk); start = 0;
    repeat (2) @(negedge clk);
    check(!in_data_ready, "in_data_ready low while loading");
    for (int t = 0; t < 100 && !in_data_ready; t++) @(negedge clk);
    check(in_data_ready, "kernel loaded");
    check(weight_bias == wb_exp, $sformatf("weight_bias %h expected %h", weight_bias, wb_exp));
    order = new[d * d];
    for (int i = 0; i < d * d; i++) order[i] = i;
    order.shuffle();
    foreach (order[k]) begin
      int idx = order[k];
      int cy = idx / d, cx = idx % d;
      int nreal = 0, npad = 0, lat = 0;
      logic [143:0] win_exp;
      for (int e = 0; e < 9; e++) begin
        int y = cy + e / 3 - 1, x = cx + e % 3 - 1;
        win_exp[e*16 +: 16] = pixel(y, x, d, len);
        if (y < 0 || x < 0 || y >= d || x >= d) npad++; else nreal++;
      end
      n_pad += npad;
      @(negedge clk); conv_idx = 16'(idx); start_fm = 1;
      do begin @(posedge clk); #1; lat++; end while (!finish_fm && lat < 200);
      check(lat == 2 + 3 * nreal + npad, $sformatf("window latency %0d (%0d real, %0d pad)", lat, nreal, npad));
      check(feat_map_in == win_exp, $sformatf("window %0d: %h expected %h", idx, feat_map_in, win_exp));
      @(negedge clk); start_fm = 0;
      check(finish_fm, "finish_fm holds until the next request");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; start_fm = 0; conv_idx = '0; dim = 6'd5; read_length = 16'd20;
    n_pad = 0; rd_lo = 0; rd_hi = 4096;
    repeat (3) @(posedge clk);
    reset = 0;
    run(5, 20);
    run(7, 24);
    run(1, 20);
    check(n_pad > 0, "padding exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
