// onchip_ram: dual-port byte-wide on-chip memory.
//
// Two of these sit between the DMA controllers and the convolution
// pipeline: the input memory is filled by a DMA through port s1 and read by
// the pipeline through port s2; the output memory is written by the
// pipeline through s2 and drained by a DMA through s1. Each port has an
// address, chip select, clock enable, write strobe and 8-bit data.
//
// Timing: a port acts only when both chipselect and clken are high. A write
// takes effect at the clock edge; a read returns the addressed byte one
// cycle later (registered read data). If both ports write the same byte in
// one cycle, s2 wins. Only the low log2(DEPTH) address bits are decoded.
// The original report gives the two-port memories and a 0x0000-0x0fff span
// (4 KiB); the byte width, latency and collision rule are assumed.
module onchip_ram #(
  parameter int unsigned DEPTH  = 4096,
  parameter int unsigned ADDR_W = 17
) (
  input  logic              clk,
  // port s1 (DMA side)
  input  logic [ADDR_W-1:0] s1_address,
  input  logic              s1_chipselect,
  input  logic              s1_clken,
  input  logic              s1_write,
  input  logic [7:0]        s1_writedata,
  output logic [7:0]        s1_readdata,
  // port s2 (accelerator side)
  input  logic [ADDR_W-1:0] s2_address,
  input  logic              s2_chipselect,
  input  logic              s2_clken,
  input  logic              s2_write,
  input  logic [7:0]        s2_writedata,
  output logic [7:0]        s2_readdata
);

  localparam int unsigned IDX_W = $clog2(DEPTH);

  logic [7:0] mem [DEPTH];

  logic [IDX_W-1:0] idx1, idx2;
  logic             en1, en2;

  assign idx1 = s1_address[IDX_W-1:0];
  assign idx2 = s2_address[IDX_W-1:0];
  assign en1  = s1_chipselect && s1_clken;
  assign en2  = s2_chipselect && s2_clken;

  always_ff @(posedge clk) begin
    if (en1 && s1_write) mem[idx1] <= s1_writedata;
    if (en2 && s2_write) mem[idx2] <= s2_writedata;
  end

  always_ff @(posedge clk) begin
    if (en1) s1_readdata <= mem[idx1];
    if (en2) s2_readdata <= mem[idx2];
  end

endmodule
