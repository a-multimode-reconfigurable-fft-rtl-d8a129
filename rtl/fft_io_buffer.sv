// fft_io_buffer: the test module, input conversion and input/output FIFOs.
//
// Two 64-deep FIFOs (fft_sram_fifo) and their controller sit between the
// outside world and the eight-path pipeline:
//   * Input. In parallel mode (in_ser = 0) each accepted cycle delivers eight
//     samples, path l taking in_data[l]. In serial mode (in_ser = 1) one
//     sample per cycle arrives on in_data[0] and a serial-to-parallel
//     converter packs eight consecutive samples into one word, the first
//     sample going to path 0. Words go into the input FIFO (64 words, one
//     512-point frame); in_ready is low while it is full and not being
//     read. in_push tells the controller a word is written this clock. Each sample is a
//     packed {re, im} pair of IW bits each, real part in the high bits.
//   * The controller pops the input FIFO with rd_en; the popped word is
//     presented to module1 in the same cycle (pipe_in, valid = rd_en).
//   * Output. Every valid pipeline word is written, with the frequency index
//     of each path, into the output FIFO (64 words); the outside reads it with
//     out_valid/out_ready. The pipeline enable en is high unless the output
//     FIFO is full and not being read in the same clock; while en is low the
//     whole pipeline and the controller hold still, so back-pressure loses
//     nothing and a consumer that is always ready sees full rate.
//   * flush empties the input FIFO and the serial packer.
// Timing: an accepted word can be popped from the cycle after it is written;
// an output word is visible at out_data the cycle after the pipeline delivers it.
// The two 64-deep FIFOs and their controller follow the document; which side
// does what (serial packing, the stall on a full output FIFO) is this design's
// own.
module fft_io_buffer
  import fft_pkg::*;
#(
  parameter int unsigned DEPTH = 64
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       flush,
  // outside, input
  input  logic       in_valid,
  input  logic       in_ser,
  input  in_word_t   in_data,
  output logic       in_ready,
  // controller
  input  logic       rd_en,
  output logic [7:0] in_words,
  output logic       in_push,
  output logic       en,
  // pipeline
  output samp_t      pipe_in  [LANES],
  input  samp_t      pipe_out [LANES],
  input  idx_word_t  pipe_idx,
  // outside, output
  output logic       out_valid,
  input  logic       out_ready,
  output cplx_t [LANES-1:0] out_data,
  output idx_word_t  out_idx
);

  localparam int unsigned CNTW = $clog2(DEPTH + 1);
  typedef struct packed {
    idx_word_t             idx;
    cplx_t [LANES-1:0]     d;
  } out_word_t;

  // ---------------- input side ----------------
  in_word_t          pack_q, in_word;
  logic [LOG_LANES-1:0] pack_ptr;
  logic              in_wr, in_full, in_empty;
  logic [CNTW-1:0]   in_cnt;
  in_word_t          in_dout;

  // a full FIFO still takes a word in a clock where the controller reads one
  assign in_ready = !in_full || rd_en;
  assign in_push  = in_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pack_ptr <= '0;
      pack_q   <= '0;
    end else if (flush) begin
      pack_ptr <= '0;
    end else if (in_valid && in_ready && in_ser) begin
      pack_q[pack_ptr] <= in_data[0];
      pack_ptr         <= pack_ptr + 1'b1;
    end
  end

  always_comb begin
    in_word = in_data;
    in_wr   = in_valid && in_ready && !in_ser;
    if (in_ser) begin
      in_word = pack_q;
      in_word[LANES-1] = in_data[0];
      in_wr   = in_valid && in_ready && (pack_ptr == LOG_LANES'(LANES - 1));
    end
  end

  fft_sram_fifo #(.WIDTH($bits(in_word_t)), .DEPTH(DEPTH)) u_in_fifo (
    .clk(clk), .rst_n(rst_n), .clear(flush), .chipselect(1'b1),
    .writereq(in_wr), .readreq(rd_en), .datain(in_word), .dataout(in_dout),
    .full(in_full), .empty(in_empty), .almostfull(), .almostempty(), .count(in_cnt)
  );

  assign in_words = 8'(in_cnt);

  for (genvar l = 0; l < LANES; l++) begin : g_unpack
    always_comb begin
      pipe_in[l].valid = rd_en;
      pipe_in[l].d.re  = DW'($signed(in_dout[l][2*IW-1:IW]));
      pipe_in[l].d.im  = DW'($signed(in_dout[l][IW-1:0]));
    end
  end

  // ---------------- output side ----------------
  out_word_t       ow, odout;
  logic            out_wr, out_empty, out_full;
  logic [CNTW-1:0] out_cnt;

  always_comb begin
    ow.idx = pipe_idx;
    for (int l = 0; l < LANES; l++) ow.d[l] = pipe_out[l].d;
  end
  assign out_wr = pipe_out[0].valid && en;

  fft_sram_fifo #(.WIDTH($bits(out_word_t)), .DEPTH(DEPTH)) u_out_fifo (
    .clk(clk), .rst_n(rst_n), .clear(1'b0), .chipselect(1'b1),
    .writereq(out_wr), .readreq(out_ready && !out_empty), .datain(ow), .dataout(odout),
    .full(out_full), .empty(out_empty), .almostfull(), .almostempty(), .count(out_cnt)
  );

  assign out_valid = !out_empty;
  assign out_data  = odout.d;
  assign out_idx   = odout.idx;

  assign en = !out_full || (out_ready && !out_empty);

endmodule
