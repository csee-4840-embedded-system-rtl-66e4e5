// cnn_main: FPGA side of the CNN accelerator - two on-chip memories and the
// convolution pipeline.
//
// The host copies a layer's kernel, bias and one input feature map into the
// input memory (ocm_in) over its DMA-side port, raises `start`, waits for
// `finish` and copies the output map back out of the output memory
// (ocm_out) over that memory's DMA-side port. In the complete system those
// DMA-side ports belong to two DMA controllers and the control signals to
// memory-mapped parallel-I/O registers of the host processor; here they
// are the top-level ports.
//
// Input memory layout (bytes, little-endian half precision): kernel taps
// 0..8 row-major at 0..17, bias at 18..19, then the dim x dim map row-major
// from byte `read_length` (normally 20). Output memory: the dim x dim result
// map row-major from byte 0. Each memory holds OCM_DEPTH bytes; a 32 x 32
// map (2 KiB) fits with room to spare.
//
// DMA-side ports are synchronous byte ports: a write is taken at the clock
// edge, read data arrives one cycle after the address. The memories and
// their sizes follow the original system configuration; the port naming
// and fpga_stat contents are this design's.
module cnn_main #(
  parameter int unsigned OCM_DEPTH = 4096
) (
  input  logic        clk,
  input  logic        reset,
  // input memory, DMA side (written by the host-to-FPGA DMA)
  input  logic [16:0] ocm_in_address,
  input  logic        ocm_in_write,
  input  logic [7:0]  ocm_in_writedata,
  // output memory, DMA side (read by the FPGA-to-host DMA)
  input  logic [16:0] ocm_out_address,
  input  logic        ocm_out_read,
  output logic [7:0]  ocm_out_readdata,
  // host control registers
  input  logic        start,          // kernel and map are in memory
  input  logic [15:0] read_length,    // bytes of kernel + bias
  input  logic [5:0]  feat_map_dim,   // map width = height
  output logic        finish,         // all results written
  output logic [15:0] write_length,   // results written since reset
  output logic [8:0]  fpga_stat       // {readOCM, convOpt, writeOCM} states
);

  logic [7:0]  ocm0_readdata, ocm_in_readdata_unused, ocm_out_readdata_s2;
  logic [16:0] ocm0_addr, ocm1_addr;
  logic        ocm0_chip, ocm0_clk_enab;
  logic [7:0]  ocm1_writedata;
  logic        ocm1_chip, ocm1_clk_enab, ocm1_write;

  onchip_ram #(.DEPTH(OCM_DEPTH), .ADDR_W(17)) ocm_in (
    .clk,
    .s1_address(ocm_in_address), .s1_chipselect(ocm_in_write), .s1_clken(1'b1),
    .s1_write(ocm_in_write), .s1_writedata(ocm_in_writedata),
    .s1_readdata(ocm_in_readdata_unused),
    .s2_address(ocm0_addr), .s2_chipselect(ocm0_chip), .s2_clken(ocm0_clk_enab),
    .s2_write(1'b0), .s2_writedata(8'd0), .s2_readdata(ocm0_readdata)
  );

  onchip_ram #(.DEPTH(OCM_DEPTH), .ADDR_W(17)) ocm_out (
    .clk,
    .s1_address(ocm_out_address), .s1_chipselect(ocm_out_read), .s1_clken(1'b1),
    .s1_write(1'b0), .s1_writedata(8'd0), .s1_readdata(ocm_out_readdata),
    .s2_address(ocm1_addr), .s2_chipselect(ocm1_chip), .s2_clken(ocm1_clk_enab),
    .s2_write(ocm1_write), .s2_writedata(ocm1_writedata),
    .s2_readdata(ocm_out_readdata_s2)
  );

  conv_pipeline pipe (
    .clk, .reset,
    .start, .read_length, .feat_map_dim, .finish,
    .write_count(write_length), .fpga_stat,
    .ocm0_readdata, .ocm0_addr, .ocm0_chip, .ocm0_clk_enab,
    .ocm1_writedata, .ocm1_addr, .ocm1_chip, .ocm1_clk_enab, .ocm1_write
  );

endmodule
