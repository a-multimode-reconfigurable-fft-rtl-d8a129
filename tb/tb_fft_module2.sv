// tb_fft_module2: checks the second FFT level (32-point DFT) on its own.
//
// Random frames are fed eight samples per clock, back to back; every group of
// 32 consecutive samples is one 32-point DFT. Output position n holds
// sum_n2 y(32*g + n2) * W_32^(n2*k2) with g = n >> 5 and k2 = bitrev5(n mod 32),
// evaluated here in floating point. The 8-clock latency is checked.
module tb_fft_module2;
  import fft_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 4;
  localparam int FW = 16;   // words per test frame (128 samples, four DFTs)

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  samp_t din [LANES];
  samp_t dout [LANES];
  int checks = 0, failures = 0;
  logic en = 1'b1;
  int tc = 0;

  fft_module2 #(.IN_OFFSET(0)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && en) tc <= tc + 1;

  int yr[$], yi[$];
  longint start = -1;
  int oword = 0;

  function automatic int bitrev5(int v);
    int r = 0;
    for (int b = 0; b < 5; b++) r |= ((v >> b) & 1) << (4 - b);
    return r;
  endfunction

  always @(posedge clk) begin
    if (rst_n && en && dout[0].valid) begin
      if (oword == 0) begin
        checks++;
        if (longint'(tc) - start != LAT_M2) begin
          failures++;
          $display("FAIL: latency %0d", longint'(tc) - start);
        end
      end
      for (int l = 0; l < LANES; l++) begin
        real sr, si, a;
        cplx_t o;
        int nn, g, k2, er, ei;
        sr = 0.0;
        si = 0.0;
        nn = oword * LANES + l;
        g  = nn >> 5;
        k2 = bitrev5(nn & 31);
        for (int n2 = 0; n2 < 32; n2++) begin
          a   = -2.0 * PI * real'((n2 * k2) % 32) / 32.0;
          sr += real'(yr[32*g + n2]) * $cos(a) - real'(yi[32*g + n2]) * $sin(a);
          si += real'(yr[32*g + n2]) * $sin(a) + real'(yi[32*g + n2]) * $cos(a);
        end
        o  = dout[l].d;
        er = $rtoi(real'(o.re) - sr);
        ei = $rtoi(real'(o.im) - si);
        checks++;
        if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
          failures++;
          if (failures < 6) $display("FAIL: n=%0d got (%0d,%0d) exp (%0.1f,%0.1f)",
                                     nn, o.re, o.im, sr, si);
        end
      end
      oword++;
    end
  end

  initial begin
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < FW * LANES; i++) begin
      yr.push_back($signed(14'($urandom)));
      yi.push_back($signed(14'($urandom)));
    end
    while (tc % 4 != 0) @(negedge clk);
    start = tc;
    for (int w = 0; w < FW; w++) begin
      for (int l = 0; l < LANES; l++) begin
        din[l].valid = 1'b1;
        din[l].d.re  = DW'(yr[w*LANES + l]);
        din[l].d.im  = DW'(yi[w*LANES + l]);
      end
      @(negedge clk);
    end
    for (int l = 0; l < LANES; l++) din[l] = '0;
    repeat (20) @(negedge clk);
    checks++;
    if (oword != FW) begin
      failures++;
      $display("FAIL: %0d output words, expected %0d", oword, FW);
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
