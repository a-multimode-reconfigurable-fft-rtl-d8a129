// fft_df_stage: one radix-2 decimation-in-frequency delay-feedback stage of
// one data path.
//
// Each of the eight paths carries the samples n = 8*t + LANE of a frame, one
// per clock, t = 0 .. N/8-1. The stage combines samples whose index differs
// only in bit BIT of n (BIT >= 3), i.e. samples D = 2^(BIT-3) clocks apart on
// the same path. It works like the classic single-path delay-feedback
// butterfly: during the first half of each 2D-cycle period the input is
// written into a D-deep FIFO delay line while the line's head (the previous
// period's differences) is sent out; during the second half the head and the
// input form a radix-2 butterfly, the sum goes out and the difference,
// multiplied by the stage twiddle, goes back into the delay line.
//
// Stage twiddle: the stage works on sub-transform index s = n >> SUB_BASE
// (SUB_BASE = 5 for the first level, 0 for the second level), bit
// m = BIT - SUB_BASE, and applies W_(2^(m+1))^(s mod 2^m) to the difference,
// which is W_32^((s mod 2^m) << (4-m)) from the shared W_32 table.
//
// Bypass: with bypass high the stage is a pure D-cycle delay. This is how a
// stage is switched off for transform sizes that do not need it; its latency
// stays the same so the timing of later stages does not depend on the size.
//
// Timing: a free-running cycle counter, reset to CNT_INIT, gives the frame
// position t of the sample at the input; frames must therefore enter the
// pipeline at cycles aligned to the frame length (the controller does this).
// Latency is D + 1 cycles (D in the delay line, one output register). The
// valid bit travels with every sample. While en is low the whole stage
// (counter, delay line, output register) holds still, which is how the
// pipeline is stalled.
// The delay line is the SRAM FIFO wrapper held at a constant fill of D words.
module fft_df_stage
  import fft_pkg::*;
#(
  parameter int unsigned BIT      = 8,
  parameter int unsigned SUB_BASE = 5,
  parameter int unsigned LANE     = 0,
  parameter logic [TBITS-1:0] CNT_INIT = '0,
  localparam int unsigned D = 1 << (BIT - LOG_LANES)
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  en,
  input  logic  bypass,
  input  samp_t din,
  output samp_t dout
);

  localparam int unsigned M = BIT - SUB_BASE;

  logic [TBITS-1:0] cnt;
  logic             phase;
  samp_t            head, push, nxt;
  logic             full_w;
  logic [3:0]       tw_k;
  logic [LOG_NMAX-1:0] pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= CNT_INIT;
    else if (en) cnt <= cnt + 1'b1;
  end

  assign phase = cnt[BIT-LOG_LANES] && !bypass;
  assign pos   = {cnt, LOG_LANES'(LANE)};

  // twiddle exponent in units of W_32
  always_comb begin
    int unsigned s;
    s    = (int'(pos) >> SUB_BASE) & ((1 << M) - 1);
    tw_k = 4'((s << (4 - M)) & 15);
  end

  fft_sram_fifo #(
    .WIDTH($bits(samp_t)),
    .DEPTH(D)
  ) u_delay (
    .clk        (clk),
    .rst_n      (rst_n),
    .clear      (clear),
    .chipselect (en),
    .writereq   (1'b1),
    .readreq    (full_w),
    .datain     (push),
    .dataout    (head),
    .full       (full_w),
    .empty      (),
    .almostfull (),
    .almostempty(),
    .count      ()
  );

  always_comb begin
    samp_t h;
    h       = head;
    h.valid = head.valid && full_w;
    if (phase) begin
      nxt.valid  = din.valid;
      nxt.d      = cadd(h.d, din.d);
      push.valid = din.valid;
      push.d     = mul_w32(csub(h.d, din.d), tw_k);
    end else begin
      nxt  = h;
      push = din;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  dout <= '0;
    else if (en) dout <= nxt;
  end

  initial begin
    assert (BIT >= LOG_LANES && M <= 4) else $fatal(1, "fft_df_stage: unsupported BIT/SUB_BASE");
  end

endmodule
