// tb_convOpt: drives convOpt with behavioural stand-ins for its window
// source and result sink, each answering after a random delay. For two
// random kernels and maps (6 x 6 and 3 x 3) it checks every result against
// reference arithmetic (bias, then the nine rounded products added in tap
// order with rounding after each addition), that each position is written
// once, that the unused result words are zero, that accumulation takes nine
// cycles (result request 10 cycles after the window arrives) and that
// `finish` rises after the last position and clears for the next map.
module tb_convOpt;
  import fp16_ref_pkg::*;

  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;

  logic         in_data_ready, start_fm, finish_fm, finish_out, start_out, finish;
  logic [5:0]   dim;
  logic [159:0] weight_bias;
  logic [15:0]  conv_idx;
  logic [143:0] feat_map_in, feat_map_out;
  logic [16:0]  out_idx;
  logic [2:0]   st;

  logic [15:0]  map [64][64];
  logic [15:0]  result [int];
  int           win_time, n_windows, n_results;

  convOpt dut (
    .clk, .reset, .in_data_ready, .in_data_dim(dim), .weight_bias,
    .start_fm, .conv_idx, .finish_fm, .feat_map_in,
    .finish_out, .start_out, .out_idx, .feat_map_out, .finish,
    .debug_state(st)
  );

  always #10 clk = ~clk;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [15:0] pix(int y, int x, int d);
    if (y < 0 || x < 0 || y >= d || x >= d) return 16'h0000;
    return map[y][x];
  endfunction

  // window source: answers a start_fm edge after 1..10 cycles
  initial begin
    static logic prev = 0;
    finish_fm = 0; feat_map_in = '0; win_time = 0;
    forever begin
      @(posedge clk);
      if (!reset && start_fm && !prev) begin
        int idx, d;
        idx = int'(conv_idx);
        d = int'(dim);
        #1 finish_fm = 0;
        repeat (1 + $urandom % 10) @(posedge clk);
        for (int e = 0; e < 9; e++)
          feat_map_in[e*16 +: 16] = pix(idx / d + e / 3 - 1, idx % d + e % 3 - 1, d);
        #1 finish_fm = 1;
        n_windows++;
        prev = 1;
        win_time = 0;
      end else begin
        prev = start_fm;
      end
    end
  end

  // count cycles from the first posedge that sees the window
  always @(posedge clk) win_time++;

  // result sink: records a start_out edge, pulses finish_out after 1..5 cycles
  initial begin
    static logic prev = 0;
    finish_out = 0;
    forever begin
      @(posedge clk);
      if (!reset && start_out && !prev) begin
        check(win_time == 10, $sformatf("result after %0d cycles, expected 10", win_time));
        check(!result.exists(int'(out_idx)), $sformatf("position %0d written twice", out_idx));
        result[int'(out_idx)] = feat_map_out[15:0];
        check(feat_map_out[143:16] == '0, "unused result words are zero");
        n_results++;
        repeat ($urandom % 5) @(posedge clk);
        #1 finish_out = 1;
        @(posedge clk);
        #1 finish_out = 0;
      end
      prev = start_out;
    end
  end

  task automatic run(int d);
    logic [15:0] w [10];
    result.delete();
    for (int k = 0; k < 10; k++) w[k] = rand_fp16(8, 16);
    for (int y = 0; y < d; y++) for (int x = 0; x < d; x++) map[y][x] = rand_fp16(10, 18);
    @(negedge clk);
    dim = 6'(d);
    for (int k = 0; k < 10; k++) weight_bias[k*16 +: 16] = w[k];
    in_data_ready = 1;
    for (int t = 0; t < 100 * d * d + 100 && !finish; t++) @(negedge clk);
    check(finish, "finish raised");
    check(result.size() == d * d, $sformatf("%0d results for %0d positions", result.size(), d * d));
    for (int y = 0; y < d; y++)
      for (int x = 0; x < d; x++) begin
        logic [15:0] acc = w[9];
        for (int e = 0; e < 9; e++) acc = add(acc, mul(pix(y + e / 3 - 1, x + e % 3 - 1, d), w[e]));
        check(result.exists(y * d + x) && result[y * d + x] == acc,
              $sformatf("out(%0d,%0d) = %h expected %h", y, x, result[y * d + x], acc));
      end
    @(negedge clk); in_data_ready = 0;
    @(negedge clk); @(negedge clk);
    check(!finish, "finish clears when the kernel is withdrawn");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_data_ready = 0; dim = 6'd6; weight_bias = '0; n_windows = 0; n_results = 0;
    repeat (3) @(posedge clk);
    reset = 0;
    run(6);
    run(3);
    check(n_windows == 45 && n_results == 45, $sformatf("%0d windows, %0d results", n_windows, n_results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
