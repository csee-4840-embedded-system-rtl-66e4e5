// readOCM: reads the kernel and the feature-map windows from the input OCM.
//
// After the host has copied a layer's data into the input on-chip memory it
// raises `start`. readOCM then reads the first `read_length` bytes (at most
// 20) into `weight_bias`: ten little-endian half-precision words, taps 0..8
// of the 3x3 kernel in row-major order in words 0..8 and the bias in word 9,
// with word k at bits [16k+15:16k]. `in_data_ready` then stays high.
//
// The feature map, read_data_dim x read_data_dim half-precision pixels in
// row-major order, follows in the memory at byte address `read_length`.
// On each rising edge of `start_fm` the module reads the 3x3 window centred
// on pixel `conv_idx` (= row * dim + column) into `feat_map_in` (element
// 0 = top-left at bits [15:0], row-major), fetching each pixel as its low
// byte and then its high byte. Window positions outside the map are zero
// (padding of one pixel, so the output map is as large as the input) and
// cost one cycle instead of three. `finish_fm` is high while the window is
// complete and stays high until the next request.
//
// States (debug_state): 0 reset, 1 prepare weight read, 2 read weights,
// 3 wait for a window request, 4 prepare next pixel, 5 read low byte,
// 6 read high byte, 7 window done. The memory returns data one cycle after
// the address (onchip_ram); ocm0_addr, ocm0_chip and ocm0_clk_enab are
// combinational from the state. The original report gives the ports and the eight
// states; the memory layout, byte order and padding are read from its
// waveform and the remaining details are this design's.
module readOCM #(
  parameter int unsigned K  = 3,     // kernel size
  parameter int unsigned DW = 16     // data width (half precision)
) (
  input  logic                     clk,
  input  logic                     reset,
  // read weight and bias, requested by the host
  input  logic                     start,
  input  logic [15:0]              read_length,
  input  logic [5:0]               read_data_dim,
  output logic                     in_data_ready,
  output logic [(K*K+1)*DW-1:0]    weight_bias,
  // read a 3x3 feature-map window, requested by convOpt
  input  logic                     start_fm,
  input  logic [15:0]              conv_idx,
  output logic                     finish_fm,
  output logic [K*K*DW-1:0]        feat_map_in,
  // on-chip RAM 0, port s2 (read)
  input  logic [7:0]               ocm0_readdata,
  output logic [16:0]              ocm0_addr,
  output logic                     ocm0_chip,
  output logic                     ocm0_clk_enab,
  // debug
  output logic [2:0]               debug_state
);

  localparam int unsigned NWB    = K * K + 1;
  localparam int unsigned NWIN   = K * K;
  localparam int unsigned WB_MAX = NWB * DW / 8;   // bytes of weights + bias

  typedef enum logic [2:0] {
    S0_RESET, S1_PREP_WB, S2_READ_WB, S3_WAIT_FM,
    S4_PREP_FM, S5_READ_LSB, S6_READ_MSB, S7_FM_DONE
  } state_t;

  state_t state;

  logic start_q, start_fm_q;
  logic start_rise, start_fm_rise;

  // weight / bias loading
  logic [15:0] wb_len;          // bytes to load
  logic [15:0] wb_issue;        // next byte address to issue
  logic        wb_pend;         // a read is in flight
  logic [15:0] wb_pend_idx;

  // window reading
  logic [3:0]        fm_save_idx;                 // window element being read
  logic [1:0]        win_r, win_c;                // its row and column
  logic signed [7:0] cen_y, cen_x;                // window centre
  logic signed [7:0] pix_y, pix_x;
  logic [16:0]       pix_addr;
  logic              msb_pend;
  logic [3:0]        msb_idx;
  logic [DW-1:0]     win [NWIN];

  assign start_rise    = start && !start_q;
  assign start_fm_rise = start_fm && !start_fm_q;

  assign pix_y = cen_y + 8'(signed'({6'd0, win_r})) - 8'sd1;
  assign pix_x = cen_x + 8'(signed'({6'd0, win_c})) - 8'sd1;

  always_comb begin
    ocm0_addr = '0;
    unique case (state)
      S2_READ_WB:  ocm0_addr = 17'(wb_issue);
      S5_READ_LSB: ocm0_addr = pix_addr;
      S6_READ_MSB: ocm0_addr = pix_addr + 17'd1;
      default:     ocm0_addr = '0;
    endcase
  end

  assign ocm0_chip     = (state == S2_READ_WB && wb_issue < wb_len) ||
                         state == S5_READ_LSB || state == S6_READ_MSB;
  assign ocm0_clk_enab = ocm0_chip;
  assign finish_fm     = (state == S7_FM_DONE);
  assign debug_state   = state;

  always_comb
    for (int i = 0; i < int'(NWIN); i++)
      feat_map_in[i*DW +: DW] = win[i];

  always_ff @(posedge clk) begin
    if (reset) begin
      state         <= S0_RESET;
      start_q       <= 1'b0;
      start_fm_q    <= 1'b0;
      in_data_ready <= 1'b0;
      weight_bias   <= '0;
      wb_len        <= '0;
      wb_issue      <= '0;
      wb_pend       <= 1'b0;
      wb_pend_idx   <= '0;
      fm_save_idx   <= '0;
      win_r         <= '0;
      win_c         <= '0;
      cen_y         <= '0;
      cen_x         <= '0;
      pix_addr      <= '0;
      msb_pend      <= 1'b0;
      msb_idx       <= '0;
      for (int i = 0; i < int'(NWIN); i++) win[i] <= '0;
    end else begin
      start_q    <= start;
      start_fm_q <= start_fm;

      unique case (state)
        S0_RESET:
          if (start_rise) state <= S1_PREP_WB;

        S1_PREP_WB: begin
          wb_len   <= (read_length > 16'(WB_MAX)) ? 16'(WB_MAX) : read_length;
          wb_issue <= '0;
          wb_pend  <= 1'b0;
          state    <= S2_READ_WB;
        end

        S2_READ_WB: begin
          if (wb_pend) weight_bias[wb_pend_idx*8 +: 8] <= ocm0_readdata;
          if (wb_issue < wb_len) begin
            wb_pend     <= 1'b1;
            wb_pend_idx <= wb_issue;
            wb_issue    <= wb_issue + 16'd1;
          end else begin
            wb_pend       <= 1'b0;
            in_data_ready <= 1'b1;
            state         <= S3_WAIT_FM;
          end
        end

        S3_WAIT_FM, S7_FM_DONE:
          if (start_rise) begin
            in_data_ready <= 1'b0;
            state         <= S1_PREP_WB;
          end else if (start_fm_rise) begin
            cen_y       <= 8'(signed'({1'b0, conv_idx / {10'd0, read_data_dim}}));
            cen_x       <= 8'(signed'({1'b0, conv_idx % {10'd0, read_data_dim}}));
            fm_save_idx <= '0;
            win_r       <= '0;
            win_c       <= '0;
            msb_pend    <= 1'b0;
            state       <= S4_PREP_FM;
          end

        S4_PREP_FM: begin
          if (msb_pend) begin
            win[msb_idx][15:8] <= ocm0_readdata;
            msb_pend           <= 1'b0;
          end
          if (fm_save_idx == 4'(NWIN)) begin
            state <= S7_FM_DONE;
          end else if (pix_y < 0 || pix_x < 0 ||
                       pix_y >= 8'(signed'({2'b0, read_data_dim})) ||
                       pix_x >= 8'(signed'({2'b0, read_data_dim}))) begin
            win[fm_save_idx] <= '0;                 // zero padding
            fm_save_idx      <= fm_save_idx + 4'd1;
            if (win_c == 2'(K - 1)) begin
              win_c <= '0;
              win_r <= win_r + 2'd1;
            end else begin
              win_c <= win_c + 2'd1;
            end
          end else begin
            pix_addr <= 17'(read_length) +
                        17'((32'(pix_y) * 32'(read_data_dim) + 32'(pix_x)) * 2);
            state    <= S5_READ_LSB;
          end
        end

        S5_READ_LSB:
          state <= S6_READ_MSB;

        S6_READ_MSB: begin
          win[fm_save_idx][7:0] <= ocm0_readdata;
          msb_pend    <= 1'b1;
          msb_idx     <= fm_save_idx;
          fm_save_idx <= fm_save_idx + 4'd1;
          if (win_c == 2'(K - 1)) begin
            win_c <= '0;
            win_r <= win_r + 2'd1;
          end else begin
            win_c <= win_c + 2'd1;
          end
          state <= S4_PREP_FM;
        end

        default: state <= S0_RESET;
      endcase
    end
  end

endmodule
