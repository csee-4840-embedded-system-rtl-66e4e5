// tb_onchip_ram: checks the dual-port byte memory: writes through one port
// are read back through the other with one cycle of latency, reads hold
// their data while the port is disabled, and a same-address write
// collision leaves the port-s2 data.
module tb_onchip_ram;
  localparam int unsigned DEPTH = 256;

  logic        clk = 0;
  logic [16:0] a1, a2;
  logic        cs1, ce1, we1, cs2, ce2, we2;
  logic [7:0]  d1, d2, q1, q2;
  logic [7:0]  model [DEPTH];
  int checks = 0, failures = 0;

  onchip_ram #(.DEPTH(DEPTH), .ADDR_W(17)) dut (
    .clk,
    .s1_address(a1), .s1_chipselect(cs1), .s1_clken(ce1), .s1_write(we1),
    .s1_writedata(d1), .s1_readdata(q1),
    .s2_address(a2), .s2_chipselect(cs2), .s2_clken(ce2), .s2_write(we2),
    .s2_writedata(d2), .s2_readdata(q2)
  );

  always #10 clk = ~clk;

  task automatic check(logic [7:0] got, logic [7:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {cs1, ce1, we1, cs2, ce2, we2} = '0;
    a1 = '0; a2 = '0; d1 = '0; d2 = '0;
    // fill through s1
    for (int i = 0; i < int'(DEPTH); i++) begin
      @(negedge clk);
      a1 = 17'(i); d1 = 8'($urandom); cs1 = 1; ce1 = 1; we1 = 1;
      model[i] = d1;
    end
    @(negedge clk); {cs1, ce1, we1} = '0;
    // read back through s2, one cycle latency
    for (int i = 0; i < 2 * int'(DEPTH); i++) begin
      automatic int k = int'($urandom % DEPTH);
      @(negedge clk); a2 = 17'(k); cs2 = 1; ce2 = 1;
      @(negedge clk); cs2 = 0;
      check(q2, model[k], "s2 read");
    end
    // write through s2, read through s1
    for (int i = 0; i < 64; i++) begin
      automatic int k = int'($urandom % DEPTH);
      @(negedge clk); a2 = 17'(k); d2 = 8'($urandom); cs2 = 1; ce2 = 1; we2 = 1;
      model[k] = d2;
      @(negedge clk); we2 = 0; cs2 = 0; a1 = 17'(k); cs1 = 1; ce1 = 1;
      @(negedge clk); cs1 = 0;
      check(q1, model[k], "s1 read");
    end
    // disabled port keeps its read data
    @(negedge clk); a1 = 17'(5); cs1 = 1; ce1 = 1;
    @(negedge clk); ce1 = 0; a1 = 17'(6);
    @(negedge clk);
    check(q1, model[5], "hold with clken low");
    cs1 = 0;
    // address bits above the depth are ignored
    @(negedge clk); a1 = 17'(DEPTH + 7); cs1 = 1; ce1 = 1;
    @(negedge clk); cs1 = 0;
    check(q1, model[7], "address wrap");
    // collision: s2 wins
    @(negedge clk); a1 = 17'(9); a2 = 17'(9); d1 = 8'hAA; d2 = 8'h55;
    {cs1, ce1, we1, cs2, ce2, we2} = '1;
    @(negedge clk); {cs1, ce1, we1, cs2, ce2, we2} = '0;
    @(negedge clk); a1 = 17'(9); cs1 = 1; ce1 = 1;
    @(negedge clk); cs1 = 0;
    check(q1, 8'h55, "collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
