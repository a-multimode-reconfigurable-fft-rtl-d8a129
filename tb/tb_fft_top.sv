// tb_fft_top: end-to-end test of the multimode FFT processor at its default
// parameters.
//
// Random 10-bit complex frames are pushed through the whole design and every
// result is compared with a directly evaluated DFT, X(k) = sum x(n) W_N^(nk),
// computed here in floating point. A result passes when real and imaginary
// parts are within TOL LSBs of the reference (the design does no scaling, so
// the only differences are twiddle and CORDIC rounding).
// The sequence exercises every mechanism of the design and counts each one:
//   512-point WPAN frames back to back (full rate; checks 64 clocks per frame
//   and the 91-clock latency), a size change (STOP, drain, flush, IDLE,
//   START), 256/128/64-point frames (module1 stages bypassed), serial input,
//   output back-pressure that fills the output FIFO and stalls the pipeline
//   (results must still be exact and complete), and a rejected WLAN/512
//   configuration.
// Ends with the TB_RESULT line; a watchdog ends a hung run.
module tb_fft_top;
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

  int checks = 0, failures = 0;
  longint cycle = 0;

  // mechanism counters
  int n_backtoback = 0, n_stop = 0, n_flush = 0, n_bypass_frames = 0, n_serial_frames = 0;
  int n_backpressure = 0, n_stall = 0, n_cfg_err = 0, n_frames_512 = 0;
  int max_err = 0, n_b2b_512 = 0;

  fft_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // expected frames, in order
  typedef struct { int n; logic [2*IW-1:0] x[$]; } frame_t;
  frame_t exp_q[$];

  // ---------------- observers ----------------
  fft_state_t prev_state;
  longint last_fs = -1, first_fs = -1, first_out = -1;
  logic prev_work_last;
  always @(posedge clk) begin
    prev_state <= state_o;
    if (state_o == ST_STOP && prev_state != ST_STOP) n_stop++;
    if (dut.flush) n_flush++;
    if (dut.frame_start) begin
      if (prev_state == ST_WORK && dut.u_ctrl.cnt == 0 && state_o == ST_WORK) begin
        n_backtoback++;
        if (dut.cfg_size == SZ_512) n_b2b_512++;
        // full rate: consecutive frames exactly N/8 clocks apart
        checks++;
        if (cycle - last_fs != longint'(frame_cycles(dut.cfg_size))) begin
          failures++;
          $display("FAIL: back-to-back frames %0d clocks apart", cycle - last_fs);
        end
      end
      if (first_fs < 0) first_fs = cycle;
      last_fs = cycle;
    end
    if (rst_n && out_valid && first_out < 0) begin
      first_out = cycle;
      checks++;
      if (first_out - first_fs != LAT_PIPE + 1) begin
        failures++;
        $display("FAIL: latency %0d, expected %0d", first_out - first_fs, LAT_PIPE + 1);
      end
    end
    if (out_valid && !out_ready) n_backpressure++;
    if (!dut.en) n_stall++;
    if (cfg_err_o) n_cfg_err++;
  end

  // ---------------- consumer: collect and check ----------------
  cplx_t res [NMAX];
  bit    seen [NMAX];
  int    got = 0;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: output without a frame");
      end else begin
        for (int l = 0; l < LANES; l++) begin
          res[out_idx[l]] = out_data[l];
          seen[out_idx[l]] = 1'b1;
        end
        got += LANES;
        if (got == exp_q[0].n) begin
          check_frame(exp_q[0]);
          $display("frame of %0d points checked at cycle %0d, max error so far %0d", exp_q[0].n, cycle, max_err);
          void'(exp_q.pop_front());
          got = 0;
          foreach (seen[i]) seen[i] = 1'b0;
        end
      end
    end
  end

  task automatic check_frame(frame_t f);
    int bad = 0;
    for (int k = 0; k < f.n; k++) begin
      real sr = 0.0, si = 0.0;
      int er, ei;
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
      if (!seen[k] || er > TOL || ei > TOL) begin
        failures++;
        bad++;
        if (bad < 5)
          $display("FAIL: N=%0d k=%0d got (%0d,%0d) expected (%0.1f,%0.1f)",
                   f.n, k, res[k].re, res[k].im, sr, si);
      end
    end
  endtask

  // ---------------- producer ----------------
  task automatic send_frame(int n, bit serial);
    frame_t f;
    f.n = n;
    for (int i = 0; i < n; i++) f.x.push_back((2*IW)'($urandom));
    exp_q.push_back(f);
    if (n < NMAX) n_bypass_frames++;
    else          n_frames_512++;
    if (serial) n_serial_frames++;
    // called at a falling edge; words are driven at falling edges and a word
    // is taken at the next rising edge if in_ready is high then. Consecutive
    // calls leave no gap between frames.
    in_ser = serial;
    if (serial) begin
      for (int i = 0; i < n; i++) begin
        in_valid = 1'b1;
        in_data  = '0;
        in_data[0] = f.x[i];
        @(negedge clk);
        while (!in_ready) @(negedge clk);
      end
    end else begin
      for (int w = 0; w < n / LANES; w++) begin
        in_valid = 1'b1;
        for (int l = 0; l < LANES; l++) in_data[l] = f.x[w*LANES + l];
        @(negedge clk);
        while (!in_ready) @(negedge clk);
      end
    end
    in_valid = 1'b0;
  endtask

  task automatic wait_drained();
    while (exp_q.size() != 0) @(posedge clk);
  endtask

  task automatic configure(env_t e, fft_size_t s);
    env_i  <= e;
    size_i <= s;
    repeat (2) @(posedge clk);
    while (state_o != ST_WAIT) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    // WPAN, 512 points, three frames written ahead so they run back to back
    configure(ENV_WPAN, SZ_512);
    send_frame(512, 0);
    send_frame(512, 0);
    send_frame(512, 0);
    wait_drained();
    // size change -> STOP -> IDLE -> START
    configure(ENV_WPAN, SZ_256);
    send_frame(256, 0);
    send_frame(256, 0);
    wait_drained();
    // WLAN 128, serial input
    configure(ENV_WLAN, SZ_128);
    send_frame(128, 1);
    wait_drained();
    // WLAN 64 with output back-pressure: the consumer stalls long enough
    // that the controller has to wait for output room
    configure(ENV_WLAN, SZ_64);
    out_ready <= 1'b0;
    for (int i = 0; i < 9; i++) send_frame(64, 0);
    repeat (200) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      out_ready <= ($urandom % 3) != 0;
      @(posedge clk);
    end
    out_ready <= 1'b1;
    wait_drained();
    // an unsupported configuration is refused
    stop_i <= 1'b1;
    env_i  <= ENV_NONE;
    while (state_o != ST_IDLE) @(posedge clk);
    stop_i <= 1'b0;
    env_i  <= ENV_WLAN;
    size_i <= SZ_512;
    repeat (5) @(posedge clk);
    checks++;
    if (!cfg_err_o || state_o != ST_IDLE) begin
      failures++;
      $display("FAIL: WLAN/512 accepted");
    end
    // WMAN, 512 again after the reconfiguration
    configure(ENV_WMAN, SZ_512);
    send_frame(512, 0);
    wait_drained();
    repeat (10) @(posedge clk);

    $display("mechanisms: back_to_back=%0d stop=%0d flush=%0d bypass_frames=%0d serial_frames=%0d backpressure=%0d stall=%0d cfg_err=%0d frames512=%0d max_err=%0d",
             n_backtoback, n_stop, n_flush, n_bypass_frames, n_serial_frames, n_backpressure,
             n_stall, n_cfg_err, n_frames_512, max_err);
    checks++; if (n_backtoback   == 0) begin failures++; $display("FAIL: no back-to-back frames"); end
    checks++; if (n_stop         == 0) begin failures++; $display("FAIL: no STOP"); end
    checks++; if (n_flush        == 0) begin failures++; $display("FAIL: no flush"); end
    checks++; if (n_bypass_frames == 0) begin failures++; $display("FAIL: no bypassed stages"); end
    checks++; if (n_serial_frames == 0) begin failures++; $display("FAIL: no serial input"); end
    checks++; if (n_backpressure == 0) begin failures++; $display("FAIL: no back-pressure"); end
    checks++; if (n_stall        == 0) begin failures++; $display("FAIL: no pipeline stall"); end
    checks++; if (n_b2b_512      == 0) begin failures++; $display("FAIL: no back-to-back 512-point frames"); end
    checks++; if (n_cfg_err      == 0) begin failures++; $display("FAIL: no configuration error"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
