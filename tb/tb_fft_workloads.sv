// tb_fft_workloads: runs the processor in each operating mode of the target
// standards and measures the rate it sustains.
//
//   WPAN 512 / 256 / 128 points, parallel input (8 samples per clock):
//     four frames streamed without gaps; the controller must run them back to
//     back, N/8 clocks apart, i.e. 8 samples per clock (2.4 GS/s at 300 MHz).
//   WLAN 64 / 128 points, serial input (1 sample per clock):
//     three frames; the input must never be refused, i.e. the processor keeps
//     up with one sample per clock.
// Frames are an impulse (discrete excitation), a single tone and random data.
// Every result is compared with a floating-point DFT within TOL LSBs.
module tb_fft_workloads;
  import fft_pkg::*;

  localparam int TOL = 48;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  env_t env_i = ENV_NONE;
  fft_size_t size_i = SZ_512;
  logic stop_i = 1'b0;
  logic in_valid = 1'b0, in_ser = 1'b0;
  in_word_t in_data = '0;
  logic in_ready, out_valid;
  logic out_ready = 1'b1;
  cplx_t [LANES-1:0] out_data;
  idx_word_t out_idx;
  fft_state_t state_o;
  logic cfg_err_o;

  int checks = 0, failures = 0, max_err = 0;
  longint cycle = 0;

  fft_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int n; logic [2*IW-1:0] x[$]; } frame_t;
  frame_t exp_q[$];

  // frame starts, for the rate measurement
  longint fs_cycles[$];
  int refused = 0;
  always @(posedge clk) begin
    if (dut.frame_start) fs_cycles.push_back(cycle);
    if (in_valid && !in_ready) refused++;
  end

  cplx_t res [NMAX];
  int    got = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      for (int l = 0; l < LANES; l++) res[out_idx[l]] = out_data[l];
      got += LANES;
      if (exp_q.size() != 0 && got == exp_q[0].n) begin
        check_frame(exp_q[0]);
        void'(exp_q.pop_front());
        got = 0;
      end
    end
  end

  task automatic check_frame(frame_t f);
    int bad = 0;
    for (int k = 0; k < f.n; k++) begin
      real sr, si;
      int er, ei;
      sr = 0.0;
      si = 0.0;
      for (int n = 0; n < f.n; n++) begin
        real xr, xi, a;
        xr = real'($signed(f.x[n][2*IW-1:IW]));
        xi = real'($signed(f.x[n][IW-1:0]));
        a  = -2.0 * PI * real'((n * k) % f.n) / real'(f.n);
        sr += xr * $cos(a) - xi * $sin(a);
        si += xr * $sin(a) + xi * $cos(a);
      end
      er = $rtoi(real'(res[k].re) - sr);
      ei = $rtoi(real'(res[k].im) - si);
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > max_err) max_err = er;
      if (ei > max_err) max_err = ei;
      checks++;
      if (er > TOL || ei > TOL) begin
        failures++;
        bad++;
        if (bad < 4) $display("FAIL: N=%0d k=%0d got (%0d,%0d) expected (%0.1f,%0.1f)",
                              f.n, k, res[k].re, res[k].im, sr, si);
      end
    end
  endtask

  // kind 0: impulse, 1: tone in bin 3, 2: random
  function automatic frame_t make_frame(int n, int kind);
    frame_t f;
    f.n = n;
    for (int i = 0; i < n; i++) begin
      logic signed [IW-1:0] re, im;
      case (kind)
        0: begin re = (i == 0) ? IW'(511) : '0; im = '0; end
        1: begin
          re = IW'($rtoi(400.0 * $cos(2.0 * PI * 3.0 * real'(i) / real'(n))));
          im = IW'($rtoi(400.0 * $sin(2.0 * PI * 3.0 * real'(i) / real'(n))));
        end
        default: begin re = IW'($urandom); im = IW'($urandom); end
      endcase
      f.x.push_back({re, im});
    end
    return f;
  endfunction

  // called at a falling edge; consecutive calls leave no gap
  task automatic send_frame(frame_t f, bit serial);
    exp_q.push_back(f);
    in_ser = serial;
    if (serial) begin
      for (int i = 0; i < f.n; i++) begin
        in_valid = 1'b1;
        in_data = '0;
        in_data[0] = f.x[i];
        @(negedge clk);
        while (!in_ready) @(negedge clk);
      end
    end else begin
      for (int w = 0; w < f.n / LANES; w++) begin
        in_valid = 1'b1;
        for (int l = 0; l < LANES; l++) in_data[l] = f.x[w*LANES + l];
        @(negedge clk);
        while (!in_ready) @(negedge clk);
      end
    end
    in_valid = 1'b0;
  endtask

  task automatic configure(env_t e, fft_size_t s);
    env_i  = e;
    size_i = s;
    repeat (2) @(negedge clk);
    while (state_o != ST_WAIT) @(negedge clk);
  endtask

  task automatic run_wpan(fft_size_t s);
    int n = 64 << s;
    configure(ENV_WPAN, s);
    fs_cycles.delete();
    send_frame(make_frame(n, 0), 0);
    send_frame(make_frame(n, 1), 0);
    send_frame(make_frame(n, 2), 0);
    send_frame(make_frame(n, 2), 0);
    while (exp_q.size() != 0) @(negedge clk);
    checks++;
    if (fs_cycles.size() != 4 || fs_cycles[3] - fs_cycles[0] != 3 * (n / LANES)) begin
      failures++;
      $display("FAIL: WPAN %0d-point frames not back to back", n);
    end else begin
      $display("WPAN %0d points: 4 frames in %0d clocks, %0d samples per clock sustained",
               n, fs_cycles[3] - fs_cycles[0] + n / LANES, 4 * n / (fs_cycles[3] - fs_cycles[0] + n / LANES));
    end
  endtask

  task automatic run_wlan(fft_size_t s);
    int n = 64 << s;
    configure(ENV_WLAN, s);
    refused = 0;
    send_frame(make_frame(n, 0), 1);
    send_frame(make_frame(n, 1), 1);
    send_frame(make_frame(n, 2), 1);
    while (exp_q.size() != 0) @(negedge clk);
    checks++;
    if (refused != 0) begin
      failures++;
      $display("FAIL: WLAN %0d-point serial input refused %0d times", n, refused);
    end else begin
      $display("WLAN %0d points: 3 frames at 1 sample per clock, never refused", n);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_wpan(SZ_512);
    run_wpan(SZ_256);
    run_wpan(SZ_128);
    run_wlan(SZ_64);
    run_wlan(SZ_128);
    $display("largest error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
