// writeOCM: stores convolution results in the output OCM.
//
// On each rising edge of start_out it captures out_idx and feat_map_out and
// writes the first OUT_WORDS half-precision words of feat_map_out to the
// output on-chip memory, one byte per cycle, low byte first, starting at
// byte address out_idx * 2 * OUT_WORDS. The result map therefore lands in
// the memory in the same row-major, little-endian layout as the input map,
// ready to be copied back to the host. When the last byte is written,
// finish_out pulses high for one cycle and `count` (results written since
// reset) increments.
//
// Timing: the byte writes start the cycle after the request edge; a request
// of OUT_WORDS words takes 2*OUT_WORDS + 2 cycles until finish_out.
// ocm1_* are combinational from the state; ocm1_write, ocm1_chip and
// ocm1_clk_enab are high on exactly the write cycles.
// States (debug_state): 0 reset, 1 idle, 2 write bytes, 3 done.
// The ports and the byte-wide memory interface follow the original report; the
// address layout, byte order and handshake timing are this design's.
module writeOCM #(
  parameter int unsigned K         = 3,
  parameter int unsigned DW        = 16,
  parameter int unsigned OUT_WORDS = 1    // words written per request, 1..K*K
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              start_out,
  input  logic [16:0]       out_idx,
  input  logic [K*K*DW-1:0] feat_map_out,
  output logic              finish_out,
  // on-chip RAM 1, port s2 (write)
  output logic [7:0]        ocm1_writedata,
  output logic [16:0]       ocm1_addr,
  output logic              ocm1_chip,
  output logic              ocm1_clk_enab,
  output logic              ocm1_write,
  output logic [15:0]       count,
  // debug
  output logic [2:0]        debug_state
);

  localparam int unsigned NBYTES = OUT_WORDS * DW / 8;

  typedef enum logic [2:0] {
    S0_RESET = 3'd0, S1_IDLE = 3'd1, S2_WRITE = 3'd2, S3_DONE = 3'd3
  } state_t;

  state_t              state;
  logic                start_q;
  logic [4:0]          n_written;   // bytes written for this request
  logic [16:0]         base_addr;
  logic [K*K*DW-1:0]   data;

  assign ocm1_write     = (state == S2_WRITE);
  assign ocm1_chip      = ocm1_write;
  assign ocm1_clk_enab  = ocm1_write;
  assign ocm1_addr      = base_addr + 17'(n_written);
  assign ocm1_writedata = data[n_written*8 +: 8];
  assign finish_out     = (state == S3_DONE);
  assign debug_state    = state;

  always_ff @(posedge clk) begin
    if (reset) begin
      state     <= S0_RESET;
      start_q   <= 1'b0;
      n_written <= '0;
      base_addr <= '0;
      data      <= '0;
      count     <= '0;
    end else begin
      start_q <= start_out;
      unique case (state)
        S0_RESET:
          state <= S1_IDLE;

        S1_IDLE:
          if (start_out && !start_q) begin
            base_addr <= 17'(out_idx * 17'(NBYTES));
            data      <= feat_map_out;
            n_written <= '0;
            state     <= S2_WRITE;
          end

        S2_WRITE: begin
          n_written <= n_written + 5'd1;
          if (n_written == 5'(NBYTES - 1)) state <= S3_DONE;
        end

        S3_DONE: begin
          count     <= count + 16'd1;
          n_written <= '0;
          state     <= S1_IDLE;
        end

        default: state <= S0_RESET;
      endcase
    end
  end

endmodule
