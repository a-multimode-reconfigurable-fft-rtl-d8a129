// fft_cordic_twiddle: the CORDIC module, multiplying the module1 output by the
// inter-level twiddle factors W_N^(n2*k1).
//
// Between the two FFT levels every sample at frame position n = 8*t + l is
// multiplied by W_N^(n2*k1), where n2 = n mod 32 and k1 is the first-level
// frequency index held bit-reversed in bits log2(N)-1 .. 5 of n (see
// fft_module1). The exponent is reduced modulo N and scaled to a 512th of a
// turn, phi = (n2*k1 mod N) * 512/N, and one pipelined CORDIC rotator per path
// (fft_cordic_rot) applies it. For N = 64 (k1 = 0 or 1) this still goes through
// the rotator; no look-up path is used here.
//
// Interface: eight samp_t in and out, size as for module1.
// Timing: latency LAT_TW = 18 cycles; the position counter is reset to
// -IN_OFFSET, IN_OFFSET being the cycles from the frame-alignment reference to
// the first sample of a frame arriving here. en low stalls the unit.
module fft_cordic_twiddle
  import fft_pkg::*;
#(
  parameter int unsigned IN_OFFSET = LAT_M1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  input  fft_size_t size,
  input  samp_t     din  [LANES],
  output samp_t     dout [LANES]
);

  logic [TBITS-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= TBITS'((1 << TBITS) - (IN_OFFSET % (1 << TBITS)));
    else if (en) cnt <= cnt + 1'b1;
  end

  // twiddle exponent of position n, in 512ths of a turn
  function automatic logic [LOG_NMAX-1:0] tw_phi(logic [LOG_NMAX-1:0] n, fft_size_t sz);
    int unsigned l1, k1, n2, e;
    l1 = log2n(sz) - LOG_N2;
    k1 = 0;
    for (int unsigned b = 0; b < LOG_NMAX - LOG_N2; b++)
      if (b < l1) k1 |= ((int'(n) >> (LOG_N2 + b)) & 1) << (l1 - 1 - b);
    n2 = int'(n) & (N2 - 1);
    e  = (n2 * k1) & ((1 << log2n(sz)) - 1);
    return LOG_NMAX'(e << (LOG_NMAX - log2n(sz)));
  endfunction

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [LOG_NMAX-1:0] phi;
    assign phi = tw_phi({cnt, LOG_LANES'(l)}, size);
    fft_cordic_rot u_rot (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (en),
      .din  (din[l]),
      .phi  (phi),
      .dout (dout[l])
    );
  end

endmodule
