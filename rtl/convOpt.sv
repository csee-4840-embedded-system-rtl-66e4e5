// convOpt: 3x3 convolution engine for one half-precision feature map.
//
// Once readOCM reports the kernel loaded (in_data_ready), convOpt walks the
// output positions 0 .. dim*dim-1 in row-major order. For each position it
// asks readOCM for the 3x3 input window (start_fm / conv_idx, answered by
// finish_fm / feat_map_in), multiplies the nine pixels by the nine kernel
// taps in parallel with nine combinational float_multi units, and then
// accumulates the products onto the bias with a single float_adder, one
// product per cycle (add_idx 0..8; the bias is the starting value). The
// result goes to writeOCM (start_out / out_idx / feat_map_out, answered by
// finish_out); `finish` rises after the last position and stays high until
// in_data_ready drops, after which a new map can be processed.
//
// Handshakes: start_fm and start_out are held high from the request until
// the answer and are low in between, so each request is a rising edge.
// finish_fm is a level from readOCM; finish_out a one-cycle pulse.
// feat_map_out keeps the bus width of the window (nine words); the result
// is word 0 (bits [15:0]) and the other words are zero.
// weight_bias: taps 0..8 in words 0..8 (row-major), bias in word 9.
//
// States (debug_state): 0 idle, 1 request window, 2 wait for window,
// 3 multiply-accumulate, 4 request write, 5 wait for write, 6 next
// position, 7 done. Per position: 1 + 1 + readOCM time + 9 + 1 + writeOCM
// time + 1 cycles. The unit structure (nine multipliers, one adder) and the
// ports follow the original report; the accumulation order, handshake timing and
// the state split are this design's.
module convOpt
  import fp16_pkg::*;
#(
  parameter int unsigned K  = 3,
  parameter int unsigned DW = 16
) (
  input  logic                  clk,
  input  logic                  reset,
  // input from the pipeline
  input  logic                  in_data_ready,
  input  logic [5:0]            in_data_dim,
  input  logic [(K*K+1)*DW-1:0] weight_bias,
  // request a feature-map window
  output logic                  start_fm,
  output logic [15:0]           conv_idx,
  input  logic                  finish_fm,
  input  logic [K*K*DW-1:0]     feat_map_in,
  // write a result
  input  logic                  finish_out,
  output logic                  start_out,
  output logic [16:0]           out_idx,
  output logic [K*K*DW-1:0]     feat_map_out,
  // to the host
  output logic                  finish,
  // debug
  output logic [2:0]            debug_state
);

  localparam int unsigned NWIN = K * K;

  typedef enum logic [2:0] {
    S0_IDLE, S1_REQ_FM, S2_WAIT_FM, S3_MAC,
    S4_REQ_OUT, S5_WAIT_OUT, S6_NEXT, S7_DONE
  } state_t;

  state_t      state;
  logic [15:0] mult_idx;       // output position being computed
  logic [15:0] n_pos;          // dim * dim
  logic [3:0]  add_idx;        // product being accumulated
  fp16_t       acc;
  fp16_t       fm  [NWIN];     // latched window
  fp16_t       prod[NWIN];
  fp16_t       add_b;
  fp16_t       sum;

  for (genvar k = 0; k < int'(NWIN); k++) begin : gen_fkernel
    float_multi fp_mult (
      .a(fm[k]),
      .b(weight_bias[k*DW +: DW]),
      .p(prod[k])
    );
  end

  assign add_b = (add_idx < 4'(NWIN)) ? prod[add_idx] : '0;

  float_adder fp_add (
    .a(acc),
    .b(add_b),
    .s(sum)
  );

  assign n_pos        = 16'(in_data_dim) * 16'(in_data_dim);
  assign start_fm     = (state == S1_REQ_FM)  || (state == S2_WAIT_FM);
  assign start_out    = (state == S4_REQ_OUT) || (state == S5_WAIT_OUT);
  assign conv_idx     = mult_idx;
  assign out_idx      = 17'(mult_idx);
  assign feat_map_out = {{((NWIN-1)*DW){1'b0}}, acc};
  assign finish       = (state == S7_DONE);
  assign debug_state  = state;

  always_ff @(posedge clk) begin
    if (reset) begin
      state    <= S0_IDLE;
      mult_idx <= '0;
      add_idx  <= '0;
      acc      <= '0;
      for (int i = 0; i < int'(NWIN); i++) fm[i] <= '0;
    end else begin
      unique case (state)
        S0_IDLE:
          if (in_data_ready) begin
            mult_idx <= '0;
            state    <= (n_pos == 16'd0) ? S7_DONE : S1_REQ_FM;
          end

        S1_REQ_FM:
          state <= S2_WAIT_FM;

        S2_WAIT_FM:
          if (finish_fm) begin
            for (int i = 0; i < int'(NWIN); i++) fm[i] <= feat_map_in[i*DW +: DW];
            acc     <= weight_bias[NWIN*DW +: DW];   // start from the bias
            add_idx <= '0;
            state   <= S3_MAC;
          end

        S3_MAC: begin
          acc     <= sum;
          add_idx <= add_idx + 4'd1;
          if (add_idx == 4'(NWIN - 1)) state <= S4_REQ_OUT;
        end

        S4_REQ_OUT:
          state <= S5_WAIT_OUT;

        S5_WAIT_OUT:
          if (finish_out) state <= S6_NEXT;

        S6_NEXT: begin
          mult_idx <= mult_idx + 16'd1;
          state    <= (mult_idx + 16'd1 == n_pos) ? S7_DONE : S1_REQ_FM;
        end

        S7_DONE:
          if (!in_data_ready) state <= S0_IDLE;

        default: state <= S0_IDLE;
      endcase
    end
  end

endmodule
