// fft_top: multimode reconfigurable FFT processor, 64/128/256/512 points on
// eight parallel paths.
//
// Data flow: test module (fft_io_buffer, input FIFO) -> module1 (Stage1..4,
// first-level DFT of N/32 points) -> CORDIC twiddle unit (W_N^(n2*k1)) ->
// module2 (Stage5..9, 32-point DFT) -> test module (output FIFO). The control
// module (fft_ctrl) configures environment and size and starts frames.
// Eight samples enter and eight results leave per clock, so an N-point
// transform occupies the pipeline for N/8 clocks (64 for 512 points) and
// back-to-back frames sustain 8 samples per clock.
//
// Ports:
//   env_i, size_i  environment (WLAN/WPAN/WMAN) and transform size requested;
//                  taken in IDLE, a later change drains the pipeline (STOP).
//   stop_i         request to stop after the current frame.
//   in_*           input samples, {re, im} of IW bits each; in_ser selects one
//                  sample per cycle on in_data[0] instead of eight.
//   out_*          results, eight per word, with the frequency index k of each
//                  path in out_idx (results come out in the pipeline's own
//                  digit-reversed order, see out_index in fft_pkg).
//   state_o, cfg_err_o  controller state and rejected configuration.
// Timing: a frame's first result reaches the output FIFO LAT_PIPE + 1 = 91
// clocks after its first word left the input FIFO. When the output FIFO is
// full and not being read, the whole pipeline and the controller stall for
// that clock (pipeline enable en), so no result is ever lost. No scaling: a result is
// the exact DFT sum up to rounding of the twiddle products.
module fft_top
  import fft_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  env_t       env_i,
  input  fft_size_t  size_i,
  input  logic       stop_i,
  input  logic       in_valid,
  input  logic       in_ser,
  input  in_word_t   in_data,
  output logic       in_ready,
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t [LANES-1:0] out_data,
  output idx_word_t  out_idx,
  output fft_state_t state_o,
  output logic       cfg_err_o
);

  env_t       cfg_env;
  fft_size_t  cfg_size;
  logic       rd_en, frame_start, flush, in_push;
  logic [7:0] in_words;
  logic       en;
  samp_t      s_in [LANES];
  samp_t      s_m1 [LANES];
  samp_t      s_tw [LANES];
  samp_t      s_m2 [LANES];
  idx_word_t  idx;
  logic [TBITS-1:0] ocnt;

  fft_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .env_i(env_i), .size_i(size_i), .stop_i(stop_i),
    .in_words(in_words), .in_push(in_push), .en(en), .state_o(state_o),
    .cfg_env(cfg_env), .cfg_size(cfg_size), .cfg_err(cfg_err_o),
    .rd_en(rd_en), .frame_start(frame_start), .flush(flush)
  );

  fft_io_buffer u_io (
    .clk(clk), .rst_n(rst_n), .flush(flush),
    .in_valid(in_valid), .in_ser(in_ser), .in_data(in_data), .in_ready(in_ready),
    .rd_en(rd_en), .in_words(in_words), .in_push(in_push), .en(en),
    .pipe_in(s_in), .pipe_out(s_m2), .pipe_idx(idx),
    .out_valid(out_valid), .out_ready(out_ready), .out_data(out_data), .out_idx(out_idx)
  );

  fft_module1 #(.IN_OFFSET(0)) u_module1 (
    .clk(clk), .rst_n(rst_n), .clear(flush), .en(en), .size(cfg_size), .din(s_in),
    .dout(s_m1)
  );

  fft_cordic_twiddle #(.IN_OFFSET(LAT_M1)) u_cordic (
    .clk(clk), .rst_n(rst_n), .en(en), .size(cfg_size), .din(s_m1), .dout(s_tw)
  );

  fft_module2 #(.IN_OFFSET(LAT_M1 + LAT_TW)) u_module2 (
    .clk(clk), .rst_n(rst_n), .clear(flush), .en(en), .din(s_tw), .dout(s_m2)
  );

  // frame position of the words leaving module2, and their frequency indices
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ocnt <= TBITS'((1 << TBITS) - (LAT_PIPE % (1 << TBITS)));
    else if (en) ocnt <= ocnt + 1'b1;
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) idx[l] = out_index({ocnt, LOG_LANES'(l)}, cfg_size);
  end

endmodule
