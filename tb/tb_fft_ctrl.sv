// tb_fft_ctrl: checks the controller's state machine.
//
// Drives the environment/size request and the FIFO fill levels and checks:
// IDLE while no environment is known; a rejected WLAN/512 request (cfg_err);
// IDLE -> START -> WAIT with START lasting 6 clocks; at least two clocks in
// WAIT; WORK starting only on a frame-aligned cycle with a whole frame in the
// input FIFO and room in the output FIFO; rd_en for exactly N/8 clocks with one
// frame_start; back-to-back frames N/8 clocks apart, also with a streaming
// input; a stall (en low) holding the read; STOP on a size change with a single flush pulse
// LAT_PIPE + 1 clocks into STOP, then IDLE.
module tb_fft_ctrl;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  env_t env_i = ENV_NONE;
  fft_size_t size_i = SZ_128;
  logic stop_i = 1'b0;
  logic [7:0] in_words = '0;
  logic in_push = 1'b0, en = 1'b1;
  fft_state_t state_o;
  env_t cfg_env;
  fft_size_t cfg_size;
  logic cfg_err, rd_en, frame_start, flush;
  int checks = 0, failures = 0;
  int tc = 0;

  fft_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && en) tc <= tc + 1;
  // the input FIFO loses a word per read
  always @(posedge clk) in_words <= in_words - 8'(rd_en) + 8'(in_push);

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      $display("FAIL: %s (cycle %0d, state %0d)", what, tc, state_o);
    end
  endtask

  int start_cycles, wait_cycles, rd_cycles, fs_count, last_fs, flush_count, stop_at;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (5) @(negedge clk);
    expect_true(state_o == ST_IDLE && !cfg_err, "IDLE with no environment");
    // WLAN cannot do 512 points
    env_i = ENV_WLAN;
    size_i = SZ_512;
    repeat (3) @(negedge clk);
    expect_true(state_o == ST_IDLE && cfg_err, "WLAN/512 rejected");
    // WLAN 128
    size_i = SZ_128;
    @(negedge clk);
    expect_true(state_o == ST_START, "START after a valid request");
    start_cycles = 0;
    while (state_o == ST_START) begin start_cycles++; @(negedge clk); end
    expect_true(start_cycles == 6, $sformatf("START lasts 6 clocks, saw %0d", start_cycles));
    expect_true(state_o == ST_WAIT && cfg_size == SZ_128 && cfg_env == ENV_WLAN, "WAIT, configured");
    // no data: stays in WAIT
    repeat (40) @(negedge clk);
    expect_true(state_o == ST_WAIT && !rd_en, "WAIT without data");
    // one frame of 16 words
    in_words = 8'd16;
    wait_cycles = 0;
    while (state_o == ST_WAIT) begin wait_cycles++; @(negedge clk); end
    expect_true(state_o == ST_WORK && frame_start && (tc % 16) == 0, "aligned frame start");
    rd_cycles = 0;
    while (state_o == ST_WORK) begin
      rd_cycles += rd_en;
      @(negedge clk);
    end
    expect_true(rd_cycles == 16, $sformatf("16 reads per 128-point frame, saw %0d", rd_cycles));
    // after a frame: WAIT needs at least two clocks
    wait_cycles = 0;
    in_words = 8'd48;
    while (state_o == ST_WAIT) begin wait_cycles++; @(negedge clk); end
    expect_true(wait_cycles >= 2, $sformatf("at least two WAIT clocks, saw %0d", wait_cycles));
    // back to back: three frames while 48 words are available
    fs_count = 0;
    last_fs = -1;
    rd_cycles = 0;
    while (state_o == ST_WORK) begin
      if (frame_start) begin
        if (last_fs >= 0) expect_true(tc - last_fs == 16, "back-to-back frames 16 clocks apart");
        last_fs = tc;
        fs_count++;
      end
      rd_cycles += rd_en;
      @(negedge clk);
    end
    expect_true(fs_count == 3 && rd_cycles == 48, $sformatf("three frames back to back, saw %0d", fs_count));
    // streaming: one word arrives per clock while one is read; the next
    // frame is never complete before the last word of the current one is
    // read, but its last word arrives in that same clock
    while (state_o != ST_WAIT) @(negedge clk);
    in_words = 8'd16;
    in_push = 1'b1;
    while (state_o != ST_WORK) @(negedge clk);
    fs_count = 0;
    repeat (16 * 4) begin
      fs_count += frame_start;
      expect_true(rd_en, "streaming input keeps WORK busy");
      @(negedge clk);
    end
    expect_true(fs_count == 4, $sformatf("four streamed frames, saw %0d", fs_count));
    in_push = 1'b0;
    while (state_o == ST_WORK) @(negedge clk);
    // a stall in the middle of a frame holds the read
    in_words = 8'd16;
    while (state_o != ST_WORK) @(negedge clk);
    repeat (5) @(negedge clk);
    en = 1'b0;
    #1;
    expect_true(!rd_en && !frame_start, "no read while stalled");
    repeat (7) @(negedge clk);
    expect_true(state_o == ST_WORK, "stall holds WORK");
    en = 1'b1;
    #1;
    rd_cycles = 5;
    while (state_o == ST_WORK) begin rd_cycles += rd_en; @(negedge clk); end
    expect_true(rd_cycles == 16, $sformatf("stalled frame still 16 reads, saw %0d", rd_cycles));
    // size change -> STOP -> flush -> IDLE
    size_i = SZ_64;
    @(negedge clk);
    expect_true(state_o == ST_STOP, "STOP on size change");
    flush_count = 0;
    stop_at = tc - 1;
    while (state_o == ST_STOP) begin
      if (flush) begin
        flush_count++;
        expect_true(tc - stop_at == LAT_PIPE + 2, $sformatf("flush after the drain, at %0d", tc - stop_at));
      end
      @(negedge clk);
    end
    expect_true(flush_count == 1, "one flush pulse");
    expect_true(state_o == ST_IDLE, "IDLE after STOP");
    @(negedge clk);
    expect_true(state_o == ST_START, "restart with the new size");
    // reset returns to IDLE
    rst_n = 1'b0;
    @(negedge clk);
    expect_true(state_o == ST_IDLE, "reset to IDLE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
