// tb_writeOCM: sends random results to writeOCM (one-word default and a
// nine-word instance), records every byte it writes into a memory model and
// checks the stored bytes, the addresses (out_idx * bytes per result), the
// latency from request edge to finish_out (bytes + 1 cycles), the one-cycle
// finish_out pulse and the result counter.
module tb_writeOCM;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;

  logic         start1, start9, fin1, fin9;
  logic [16:0]  idx1, idx9;
  logic [143:0] fm1, fm9;
  logic [7:0]   wd1, wd9;
  logic [16:0]  ad1, ad9;
  logic         ch1, ch9, ce1, ce9, we1, we9;
  logic [15:0]  cnt1, cnt9;
  logic [2:0]   st1, st9;
  logic [7:0]   mem1 [int];
  logic [7:0]   mem9 [int];

  writeOCM dut1 (
    .clk, .reset, .start_out(start1), .out_idx(idx1), .feat_map_out(fm1),
    .finish_out(fin1), .ocm1_writedata(wd1), .ocm1_addr(ad1), .ocm1_chip(ch1),
    .ocm1_clk_enab(ce1), .ocm1_write(we1), .count(cnt1), .debug_state(st1)
  );

  writeOCM #(.OUT_WORDS(9)) dut9 (
    .clk, .reset, .start_out(start9), .out_idx(idx9), .feat_map_out(fm9),
    .finish_out(fin9), .ocm1_writedata(wd9), .ocm1_addr(ad9), .ocm1_chip(ch9),
    .ocm1_clk_enab(ce9), .ocm1_write(we9), .count(cnt9), .debug_state(st9)
  );

  always #10 clk = ~clk;

  always @(posedge clk) begin
    if (we1 && ch1 && ce1) mem1[int'(ad1)] = wd1;
    if (we9 && ch9 && ce9) mem9[int'(ad9)] = wd9;
  end

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // one request on instance 1 (nine=0) or 9 (nine=1)
  task automatic request(bit nine, logic [16:0] idx, logic [143:0] data);
    int nbytes = nine ? 18 : 2;
    int lat = 0;
    @(negedge clk);
    if (nine) begin idx9 = idx; fm9 = data; start9 = 1; end
    else      begin idx1 = idx; fm1 = data; start1 = 1; end
    do begin
      @(posedge clk); #1; lat++;
    end while (!(nine ? fin9 : fin1) && lat < 100);
    check(lat == nbytes + 1, $sformatf("latency %0d for %0d bytes", lat, nbytes));
    @(posedge clk); #1;
    check(!(nine ? fin9 : fin1), "finish_out is one cycle");
    start1 = 0; start9 = 0;
    for (int b = 0; b < nbytes; b++) begin
      int a = int'(idx) * nbytes + b;
      if (nine) check(mem9.exists(a) && mem9[a] == data[b*8 +: 8], $sformatf("byte %0d of %0d", b, idx));
      else      check(mem1.exists(a) && mem1[a] == data[b*8 +: 8], $sformatf("byte %0d of %0d", b, idx));
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start1 = 0; start9 = 0; idx1 = '0; idx9 = '0; fm1 = '0; fm9 = '0;
    repeat (3) @(posedge clk);
    reset = 0;
    for (int i = 0; i < 200; i++) begin
      logic [143:0] d;
      for (int w = 0; w < 9; w++) d[w*16 +: 16] = 16'($urandom);
      request(1'b0, 17'($urandom % 5000), d);
      request(1'b1, 17'($urandom % 1000), d);
      // no write unless requested
      repeat (2) @(posedge clk);
      check(!we1 && !we9, "idle without request");
    end
    check(cnt1 == 16'd200 && cnt9 == 16'd200, "result counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
