// fft_pkg: types, constants and small arithmetic helpers shared by the
// multimode FFT processor.
//
// The processor computes 64/128/256/512-point FFTs on eight parallel paths
// (eight complex samples per clock). A transform of N points is split into a
// first level of N1 = N/32 points (module1, up to four radix-2 stages), an
// inter-level twiddle multiplication W_N^(n2*k1) done by CORDIC rotators, and
// a second level of 32 points (module2, five radix-2 stages).
//
// Data words: input samples are IW-bit two's complement real and imaginary
// parts packed {re, im} (real part in the high bits). Inside the pipeline every
// value is a cplx_t of DW bits per part; DW = IW + 10 is wide enough that a
// 512-point transform of full-scale input cannot overflow, so no scaling is
// done anywhere.
//
// The stage twiddles W_L^j for L <= 32 come from one 16-entry table of
// W_32^k = cos(2*pi*k/32) - j*sin(2*pi*k/32), k = 0..15, in Q1.14
// (round(16384*cos(2*pi*k/32))); every W_L^j with L <= 32 is W_32^(j*32/L).
package fft_pkg;

  localparam int LANES    = 8;     // parallel data paths
  localparam int LOG_LANES = 3;
  localparam int NMAX     = 512;   // largest transform
  localparam int LOG_NMAX = 9;
  localparam int TBITS    = LOG_NMAX - LOG_LANES; // cycle index inside a 512-point frame
  localparam int IW       = 10;    // input word length per part
  localparam int DW       = IW + 10; // internal word length per part
  localparam int CW       = 16;    // twiddle coefficient width, Q1.14
  localparam int CFRAC    = 14;
  localparam int N2       = 32;    // second-level (module2) size
  localparam int LOG_N2   = 5;
  localparam int CORDIC_ITER = 16;  // CORDIC micro-rotations
  // pipeline latencies in cycles (independent of the transform size)
  localparam int LAT_M1   = 64;    // module1: (32+1)+(16+1)+(8+1)+(4+1)
  localparam int LAT_TW   = CORDIC_ITER + 2; // twiddle unit: quadrant, iterations, gain
  localparam int LAT_M2   = 8;     // module2: (2+1)+(1+1)+1+1+1
  localparam int LAT_PIPE = LAT_M1 + LAT_TW + LAT_M2;

  // system environment reported by the synchronisers
  typedef enum logic [1:0] {
    ENV_NONE = 2'd0,
    ENV_WLAN = 2'd1,
    ENV_WPAN = 2'd2,
    ENV_WMAN = 2'd3
  } env_t;

  // transform size, log2(N) = 6 + code
  typedef enum logic [1:0] {
    SZ_64  = 2'd0,
    SZ_128 = 2'd1,
    SZ_256 = 2'd2,
    SZ_512 = 2'd3
  } fft_size_t;

  typedef enum logic [2:0] {
    ST_IDLE  = 3'd0,
    ST_START = 3'd1,
    ST_WAIT  = 3'd2,
    ST_WORK  = 3'd3,
    ST_STOP  = 3'd4
  } fft_state_t;

  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  // one pipeline word: a sample and whether it carries data
  typedef struct packed {
    logic  valid;
    cplx_t d;
  } samp_t;

  typedef logic [LANES-1:0][2*IW-1:0] in_word_t;   // eight packed {re, im} inputs
  typedef logic [LANES-1:0][LOG_NMAX-1:0] idx_word_t;

  // number of cycles one frame of the given size occupies (N/8)
  function automatic int unsigned frame_cycles(fft_size_t sz);
    return 32'd8 << sz;
  endfunction

  function automatic int unsigned log2n(fft_size_t sz);
    return 32'd6 + 32'(sz);
  endfunction

  // frequency index k of the sample leaving the pipeline at frame position n:
  // bits 4..0 of n hold k2 bit-reversed over 5 bits, bits log2(N)-1..5 hold
  // k1 bit-reversed over log2(N)-5 bits, and k = k1 + (N/32)*k2.
  function automatic logic [LOG_NMAX-1:0] out_index(logic [LOG_NMAX-1:0] n, fft_size_t sz);
    int unsigned l1, k1, k2;
    l1 = log2n(sz) - LOG_N2;
    k1 = 0;
    k2 = 0;
    for (int unsigned b = 0; b < LOG_NMAX - LOG_N2; b++)
      if (b < l1) k1 |= ((int'(n) >> (LOG_N2 + b)) & 1) << (l1 - 1 - b);
    for (int unsigned b = 0; b < LOG_N2; b++)
      k2 |= ((int'(n) >> b) & 1) << (LOG_N2 - 1 - b);
    return LOG_NMAX'(k1 + (k2 << l1));
  endfunction

  function automatic logic signed [CW-1:0] w32_cos(logic [3:0] k);
    logic signed [CW-1:0] t [16];
    t = '{16'sd16384, 16'sd16069, 16'sd15137, 16'sd13623, 16'sd11585, 16'sd9102,
          16'sd6270, 16'sd3196, 16'sd0, -16'sd3196, -16'sd6270, -16'sd9102,
          -16'sd11585, -16'sd13623, -16'sd15137, -16'sd16069};
    return t[k];
  endfunction

  function automatic logic signed [CW-1:0] w32_sin(logic [3:0] k);
    logic signed [CW-1:0] t [16];
    t = '{16'sd0, 16'sd3196, 16'sd6270, 16'sd9102, 16'sd11585, 16'sd13623,
          16'sd15137, 16'sd16069, 16'sd16384, 16'sd16069, 16'sd15137, 16'sd13623,
          16'sd11585, 16'sd9102, 16'sd6270, 16'sd3196};
    return t[k];
  endfunction

  // a * W_32^k, k = 0..15, rounded back to DW bits. k = 0 and k = 8 (-j) are exact.
  function automatic cplx_t mul_w32(cplx_t a, logic [3:0] k);
    logic signed [DW+CW-1:0] pr, pi;
    logic signed [CW-1:0] c, s;
    cplx_t r;
    if (k == 4'd0) return a;
    if (k == 4'd8) begin
      r.re = a.im;
      r.im = -a.re;
      return r;
    end
    c  = w32_cos(k);
    s  = w32_sin(k);
    // (ar + j ai)(c - j s) = (ar c + ai s) + j (ai c - ar s)
    pr = a.re * c + a.im * s + (DW+CW)'(1 <<< (CFRAC-1));
    pi = a.im * c - a.re * s + (DW+CW)'(1 <<< (CFRAC-1));
    r.re = DW'(pr >>> CFRAC);
    r.im = DW'(pi >>> CFRAC);
    return r;
  endfunction

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

  function automatic cplx_t csub(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re - b.re;
    r.im = a.im - b.im;
    return r;
  endfunction

endpackage
