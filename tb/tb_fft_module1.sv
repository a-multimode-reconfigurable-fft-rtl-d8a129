// tb_fft_module1: checks the first FFT level on its own.
//
// Random frames of 512, 256 and 64 points (first-level sizes 16, 8 and 2, so
// zero, one and three stages bypassed) are fed eight samples per clock,
// frames back to back and aligned to the frame length. Every output word is
// compared with sum_n1 x(32*n1 + n2) * W_N1^(n1*k1), evaluated here in floating
// point, at position n = 32*bitrev(k1) + n2. The latency of 64 enabled
// clocks is checked for the first word of every frame. The enable is dropped
// at random while frames are fed, to check that a stall loses nothing.
module tb_fft_module1;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 4;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  fft_size_t size = SZ_512;
  samp_t din [LANES];
  samp_t dout [LANES];
  int checks = 0, failures = 0, n_stall = 0;
  logic en = 1'b1;
  int tc = 0;   // same cycle count as the first stage's position counter

  fft_module1 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && en) tc <= tc + 1;

  typedef struct { int n; longint start; int xr[$]; int xi[$]; } frame_t;
  frame_t q[$];

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) r |= ((v >> b) & 1) << (bits - 1 - b);
    return r;
  endfunction

  // consumer
  int oword = 0;
  always @(posedge clk) begin
    if (rst_n && en && dout[0].valid) begin
      frame_t f;
      int nn, l1;
      f  = q[0];
      l1 = $clog2(f.n) - 5;
      if (oword == 0) begin
        checks++;
        if (longint'(tc) - f.start != LAT_M1) begin
          failures++;
          $display("FAIL: latency %0d", longint'(tc) - f.start);
        end
      end
      for (int l = 0; l < LANES; l++) begin
        real sr, si, a;
        cplx_t o;
        int n2, k1, er, ei;
        sr = 0.0;
        si = 0.0;
        nn = oword * LANES + l;
        n2 = nn & 31;
        k1 = bitrev(nn >> 5, l1);
        for (int n1 = 0; n1 < (f.n >> 5); n1++) begin
          a   = -2.0 * PI * real'((n1 * k1) % (f.n >> 5)) / real'(f.n >> 5);
          sr += real'(f.xr[32*n1 + n2]) * $cos(a) - real'(f.xi[32*n1 + n2]) * $sin(a);
          si += real'(f.xr[32*n1 + n2]) * $sin(a) + real'(f.xi[32*n1 + n2]) * $cos(a);
        end
        o  = dout[l].d;
        er = $rtoi(real'(o.re) - sr);
        ei = $rtoi(real'(o.im) - si);
        checks++;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 6) $display("FAIL: N=%0d n=%0d got (%0d,%0d) exp (%0.1f,%0.1f)",
                                     f.n, nn, o.re, o.im, sr, si);
        end
      end
      oword++;
      if (oword == f.n / LANES) begin
        oword = 0;
        void'(q.pop_front());
      end
    end
  end

  task automatic run(fft_size_t sz, int frames);
    int n;
    n = 64 << sz;
    @(negedge clk);
    size = sz;
    while (tc % (n / LANES) != 0) @(negedge clk);
    for (int fr = 0; fr < frames; fr++) begin
      frame_t f;
      f.n = n;
      f.start = tc;
      for (int i = 0; i < n; i++) begin
        f.xr.push_back($signed(IW'($urandom)));
        f.xi.push_back($signed(IW'($urandom)));
      end
      q.push_back(f);
      for (int w = 0; w < n / LANES; w++) begin
        for (int l = 0; l < LANES; l++) begin
          din[l].valid = 1'b1;
          din[l].d.re  = DW'(f.xr[w*LANES + l]);
          din[l].d.im  = DW'(f.xi[w*LANES + l]);
        end
        // random stalls: the word is held until a clock with en high
        en = ($urandom % 8) != 0;
        if (!en) n_stall++;
        @(negedge clk);
        while (!en) begin
          en = ($urandom % 2) != 0;
          @(negedge clk);
        end
      end
    end
    for (int l = 0; l < LANES; l++) din[l] = '0;
    en = 1'b1;
    while (q.size() != 0) @(negedge clk);
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(SZ_512, 2);
    run(SZ_256, 2);
    run(SZ_64, 3);
    run(SZ_128, 1);
    run(SZ_512, 1);
    checks++;
    if (n_stall == 0) begin failures++; $display("FAIL: no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
