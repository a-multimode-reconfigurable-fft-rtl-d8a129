// tb_fft_cordic_twiddle: checks the inter-level twiddle multiplication.
//
// Random samples stream through the unit, one word per clock, for each
// transform size. The expected output at frame position n is the input times
// exp(-j*2*pi*n2*k1/N), n2 = n mod 32, k1 = bit-reverse of n >> 5 over
// log2(N)-5 bits, evaluated here in floating point; a result must be within
// TOL LSBs. The 18-clock latency is checked.
module tb_fft_cordic_twiddle;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  fft_size_t size = SZ_512;
  samp_t din [LANES];
  samp_t dout [LANES];
  int checks = 0, failures = 0;
  logic en = 1'b1;
  int tc = 0;

  fft_cordic_twiddle #(.IN_OFFSET(0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && en) tc <= tc + 1;

  typedef struct { int t; int sz; int xr[LANES]; int xi[LANES]; } word_t;
  word_t q[$];
  longint first_in = -1, first_out = -1;

  function automatic int bitrev(int v, int bits);
    int r = 0;
    for (int b = 0; b < bits; b++) r |= ((v >> b) & 1) << (bits - 1 - b);
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && en && dout[0].valid) begin
      word_t w;
      w = q.pop_front();
      if (first_out < 0) begin
        first_out = tc;
        checks++;
        if (first_out - first_in != LAT_TW) begin
          failures++;
          $display("FAIL: latency %0d", first_out - first_in);
        end
      end
      for (int l = 0; l < LANES; l++) begin
        int nn, n, k1, n2, er, ei;
        real a, er_r, ei_r;
        n   = 64 << w.sz;
        nn  = (w.t * LANES + l) % n;
        n2  = nn & 31;
        k1  = bitrev(nn >> 5, $clog2(n) - 5);
        a   = -2.0 * PI * real'(n2 * k1) / real'(n);
        er_r = real'(w.xr[l]) * $cos(a) - real'(w.xi[l]) * $sin(a);
        ei_r = real'(w.xr[l]) * $sin(a) + real'(w.xi[l]) * $cos(a);
        er = $rtoi(real'(dout[l].d.re) - er_r);
        ei = $rtoi(real'(dout[l].d.im) - ei_r);
        checks++;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 6) $display("FAIL: N=%0d n=%0d got (%0d,%0d) exp (%0.1f,%0.1f)",
                                     n, nn, dout[l].d.re, dout[l].d.im, er_r, ei_r);
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 3; s >= 0; s--) begin
      size = fft_size_t'(s);
      repeat (LAT_TW + 2) @(negedge clk);
      while (tc % 64 != 0) @(negedge clk);
      for (int i = 0; i < 64; i++) begin
        word_t w;
        w.t  = tc % 64;
        w.sz = s;
        for (int l = 0; l < LANES; l++) begin
          w.xr[l] = $signed(16'($urandom));
          w.xi[l] = $signed(16'($urandom));
          din[l].valid = 1'b1;
          din[l].d.re  = DW'(w.xr[l]);
          din[l].d.im  = DW'(w.xi[l]);
        end
        q.push_back(w);
        if (first_in < 0) first_in = tc;
        @(negedge clk);
      end
      for (int l = 0; l < LANES; l++) din[l] = '0;
      repeat (LAT_TW + 2) @(negedge clk);
    end
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d words never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
