// tb_fft_io_buffer: checks the test module (input/output FIFOs and controller).
//
// Input side: parallel words and serially packed samples are written, then
// popped with rd_en; the words presented to the pipeline must equal the
// samples in arrival order, sign-extended, with valid = rd_en. The FIFO is
// filled until in_ready drops, and flush empties it.
// Output side: pipeline words are written until the output FIFO is full, the
// pipeline enable must drop exactly then and rise when a word is read; the
// words are read back in order with their indices, with back-pressure.
module tb_fft_io_buffer;
  import fft_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, flush = 1'b0;
  logic in_valid = 1'b0, in_ser = 1'b0;
  in_word_t in_data = '0;
  logic in_ready;
  logic rd_en = 1'b0;
  logic [7:0] in_words;
  logic in_push, en;
  samp_t pipe_in [LANES];
  samp_t pipe_out [LANES];
  idx_word_t pipe_idx = '0;
  logic out_valid, out_ready = 1'b0;
  cplx_t [LANES-1:0] out_data;
  idx_word_t out_idx;
  int checks = 0, failures = 0;

  fft_io_buffer dut (.*);

  always #5 clk = ~clk;

  logic [2*IW-1:0] sq[$];
  typedef struct { cplx_t [LANES-1:0] d; idx_word_t idx; } ow_t;
  ow_t oq[$];

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 8) $display("FAIL: %s", what);
    end
  endtask

  task automatic pop_check(int words);
    for (int w = 0; w < words; w++) begin
      rd_en = 1'b1;
      #1;
      for (int l = 0; l < LANES; l++) begin
        logic [2*IW-1:0] e;
        e = sq.pop_front();
        expect_true(pipe_in[l].valid && pipe_in[l].d.re == DW'($signed(e[2*IW-1:IW]))
                    && pipe_in[l].d.im == DW'($signed(e[IW-1:0])), "input word order and sign");
      end
      @(negedge clk);
    end
    rd_en = 1'b0;
    #1;
    expect_true(!pipe_in[0].valid, "no valid without rd_en");
  endtask

  initial begin
    for (int l = 0; l < LANES; l++) pipe_out[l] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // parallel input
    for (int w = 0; w < 10; w++) begin
      in_valid = 1'b1;
      for (int l = 0; l < LANES; l++) begin
        in_data[l] = (2*IW)'($urandom);
        sq.push_back(in_data[l]);
      end
      @(negedge clk);
    end
    in_valid = 1'b0;
    expect_true(in_words == 8'd10, "ten words stored");
    pop_check(10);
    // serial input: 16 samples make two words
    in_ser = 1'b1;
    for (int i = 0; i < 16; i++) begin
      in_valid = 1'b1;
      in_data = '0;
      in_data[0] = (2*IW)'($urandom);
      sq.push_back(in_data[0]);
      @(negedge clk);
      expect_true(in_words == 8'((i + 1) / 8), "serial packing by eights");
    end
    in_valid = 1'b0;
    in_ser = 1'b0;
    pop_check(2);
    // fill until full
    for (int w = 0; w < 70; w++) begin
      in_valid = 1'b1;
      in_data = {LANES{20'h00001}};
      if (in_ready) for (int l = 0; l < LANES; l++) sq.push_back(in_data[l]);
      @(negedge clk);
    end
    in_valid = 1'b0;
    expect_true(in_words == 8'd64 && !in_ready, "full at 64 words");
    flush = 1'b1;
    @(negedge clk);
    flush = 1'b0;
    sq.delete();
    expect_true(in_words == 8'd0 && in_ready, "flush empties the input FIFO");

    // output: fill the output FIFO; en must drop exactly when it is full
    for (int w = 0; w < 64; w++) begin
      ow_t o;
      expect_true(en, "enabled while the output FIFO has room");
      for (int l = 0; l < LANES; l++) begin
        pipe_out[l].valid = 1'b1;
        pipe_out[l].d.re = DW'($urandom);
        pipe_out[l].d.im = DW'($urandom);
        pipe_idx[l] = LOG_NMAX'($urandom);
        o.d[l] = pipe_out[l].d;
      end
      o.idx = pipe_idx;
      oq.push_back(o);
      @(negedge clk);
    end
    for (int l = 0; l < LANES; l++) pipe_out[l] = '0;
    #1;
    expect_true(!en && out_valid, "stalled when full");
    out_ready = 1'b1;
    #1;
    expect_true(en, "enabled when a word is read from a full FIFO");
    out_ready = 1'b0;
    // read with back-pressure
    while (oq.size() != 0) begin
      out_ready = $urandom % 2;
      #1;
      if (out_ready) begin
        ow_t o;
        o = oq.pop_front();
        expect_true(out_valid && out_data == o.d && out_idx == o.idx, "output word order");
      end
      @(negedge clk);
    end
    out_ready = 1'b0;
    expect_true(en && !out_valid, "empty again");
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
