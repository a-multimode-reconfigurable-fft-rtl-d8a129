// fft_module1: first level of the two-level FFT, four radix-2 stages on eight
// paths (Stage1 .. Stage4).
//
// An N-point frame is indexed n = 32*n1 + n2 with n2 = 0..31 and n1 = 0..N/32-1.
// Module1 computes, for every n2, the N1 = N/32 point DFT over n1 (a radix-16
// DFT for N = 512). Its four radix-2 decimation-in-frequency delay-feedback
// stages work on bits 8, 7, 6 and 5 of n with delays of 32, 16, 8 and 4
// cycles on each of the eight paths. For N < 512 the stages on bits >= log2(N)
// are bypassed (kept as plain delays), so N = 256, 128, 64 use three, two and
// one stages (N1 = 8, 4, 2).
//
// Output order: sample position n keeps n2 in its low five bits, and its bits
// above hold k1 bit-reversed over log2(N1) bits; the value is
// sum_n1 x(32*n1 + n2) * W_N1^(n1*k1).
//
// Interface: din/dout are one samp_t per path, path l carrying n = 8*t + l.
// size selects N and must only change while the pipeline is empty.
// Timing: latency LAT_M1 = 64 cycles for every size. IN_OFFSET is the number
// of cycles between the frame-alignment reference (cycle 0 after reset) and a
// frame's first sample reaching din; frames must start on cycles that are
// multiples of N/8 after that offset (counting only clocks with en high;
// en low stalls the module).
module fft_module1
  import fft_pkg::*;
#(
  parameter int unsigned IN_OFFSET = 0
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      clear,
  input  logic      en,
  input  fft_size_t size,
  input  samp_t     din  [LANES],
  output samp_t     dout [LANES]
);

  localparam int unsigned NST = 4;

  // input offset of stage s (s = 0 works on bit 8)
  function automatic int unsigned stage_off(int unsigned s);
    int unsigned o = IN_OFFSET;
    for (int unsigned i = 0; i < s; i++) o += (1 << (LOG_NMAX - 1 - i - LOG_LANES)) + 1;
    return o;
  endfunction

  samp_t link [NST+1][LANES];
  logic  [NST-1:0] bypass;

  always_comb begin
    for (int s = 0; s < NST; s++)
      bypass[s] = (LOG_NMAX - 1 - s) >= int'(log2n(size));
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    assign link[0][l] = din[l];
    for (genvar s = 0; s < NST; s++) begin : g_stage
      fft_df_stage #(
        .BIT      (LOG_NMAX - 1 - s),
        .SUB_BASE (LOG_N2),
        .LANE     (l),
        .CNT_INIT (TBITS'((1 << TBITS) - (stage_off(s) % (1 << TBITS))))
      ) u_stage (
        .clk    (clk),
        .rst_n  (rst_n),
        .clear  (clear),
        .en     (en),
        .bypass (bypass[s]),
        .din    (link[s][l]),
        .dout   (link[s+1][l])
      );
    end
    assign dout[l] = link[NST][l];
  end

endmodule
