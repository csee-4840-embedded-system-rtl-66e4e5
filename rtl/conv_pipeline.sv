// conv_pipeline: the FPGA-side convolution pipeline, readOCM -> convOpt ->
// writeOCM.
//
// readOCM loads the kernel and bias from the input memory and serves 3x3
// windows to convOpt; convOpt multiplies and accumulates each window and
// hands the result to writeOCM, which stores it in the output memory. The
// pipeline talks to the two memories through their accelerator-side ports
// (8-bit read data with one cycle of latency, 8-bit writes) and to the host
// through plain control signals: `start` (kernel and map are in memory),
// `read_length` (bytes of kernel + bias, which is also where the map
// starts), `feat_map_dim` (map width = height, up to 63), `finish` (all
// positions written) and `write_count` (results written since reset).
// `fpga_stat` packs the three state machines' states as
// {readOCM, convOpt, writeOCM}.
//
// Concurrent assertions check the handshake rules between the machines.
// One dim x dim map with the 3x3 kernel takes about 45 cycles per output
// position. The grouping of the three modules follows the original report; the
// contents of fpga_stat are this design's choice.
module conv_pipeline #(
  parameter int unsigned K  = 3,
  parameter int unsigned DW = 16
) (
  input  logic        clk,
  input  logic        reset,
  // host control
  input  logic        start,
  input  logic [15:0] read_length,
  input  logic [5:0]  feat_map_dim,
  output logic        finish,
  output logic [15:0] write_count,
  output logic [8:0]  fpga_stat,
  // input memory, read port
  input  logic [7:0]  ocm0_readdata,
  output logic [16:0] ocm0_addr,
  output logic        ocm0_chip,
  output logic        ocm0_clk_enab,
  // output memory, write port
  output logic [7:0]  ocm1_writedata,
  output logic [16:0] ocm1_addr,
  output logic        ocm1_chip,
  output logic        ocm1_clk_enab,
  output logic        ocm1_write
);

  logic                  in_data_ready;
  logic [(K*K+1)*DW-1:0] weight_bias;
  logic                  start_fm, finish_fm;
  logic [15:0]           conv_idx;
  logic [K*K*DW-1:0]     feat_map_in, feat_map_out;
  logic                  start_out, finish_out;
  logic [16:0]           out_idx;
  logic [2:0]            rd_state, cv_state, wr_state;

  readOCM #(.K(K), .DW(DW)) rd (
    .clk, .reset,
    .start, .read_length, .read_data_dim(feat_map_dim),
    .in_data_ready, .weight_bias,
    .start_fm, .conv_idx, .finish_fm, .feat_map_in,
    .ocm0_readdata, .ocm0_addr, .ocm0_chip, .ocm0_clk_enab,
    .debug_state(rd_state)
  );

  convOpt #(.K(K), .DW(DW)) cv (
    .clk, .reset,
    .in_data_ready, .in_data_dim(feat_map_dim), .weight_bias,
    .start_fm, .conv_idx, .finish_fm, .feat_map_in,
    .finish_out, .start_out, .out_idx, .feat_map_out,
    .finish,
    .debug_state(cv_state)
  );

  writeOCM #(.K(K), .DW(DW), .OUT_WORDS(1)) wr (
    .clk, .reset,
    .start_out, .out_idx, .feat_map_out, .finish_out,
    .ocm1_writedata, .ocm1_addr, .ocm1_chip, .ocm1_clk_enab, .ocm1_write,
    .count(write_count),
    .debug_state(wr_state)
  );

  assign fpga_stat = {rd_state, cv_state, wr_state};

  // Handshake rules between the three state machines.
  // convOpt has at most one request outstanding.
  a_one_request: assert property (@(posedge clk) disable iff (reset)
    !(start_fm && start_out));
  // A window is requested only once the kernel is loaded.
  a_fm_after_kernel: assert property (@(posedge clk) disable iff (reset)
    $rose(start_fm) |-> in_data_ready);
  // writeOCM answers only a pending result request.
  a_out_answered: assert property (@(posedge clk) disable iff (reset)
    finish_out |-> start_out);
  // convOpt drops a window request only after the window is complete.
  a_window_settled: assert property (@(posedge clk) disable iff (reset)
    $fell(start_fm) |-> finish_fm);

endmodule
