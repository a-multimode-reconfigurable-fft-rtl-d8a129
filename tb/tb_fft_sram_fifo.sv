// tb_fft_sram_fifo: checks the FIFO wrapper against a queue model.
//
// Random pushes and pops (including simultaneous ones on a full FIFO, and
// requests with chipselect low) are applied to a 64-deep FIFO; every cycle the
// head word, count, full, empty, almostfull and almostempty are compared with
// a SystemVerilog queue. A synchronous clear and a fill to the brim are
// included.
module tb_fft_sram_fifo;
  localparam int W = 41, DEPTH = 64;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic chipselect = 1'b1, writereq = 1'b0, readreq = 1'b0;
  logic [W-1:0] datain = '0, dataout;
  logic full, empty, almostfull, almostempty;
  logic [6:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int n_full = 0, n_rw_full = 0;

  fft_sram_fifo #(.WIDTH(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic compare();
    checks++;
    if (count != 7'(model.size()) || full != (model.size() == DEPTH) || empty != (model.size() == 0)
        || almostfull != (model.size() >= DEPTH - 1) || almostempty != (model.size() <= 1)
        || (model.size() != 0 && dataout != model[0])) begin
      failures++;
      if (failures < 6) $display("FAIL: count %0d model %0d head %h model %h", count, model.size(),
                                 dataout, model.size() ? model[0] : '0);
      // the model no longer matches: stop before the FIFO is driven into misuse
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  // one cycle: requests set at the falling edge, model updated at the rising edge
  task automatic step(bit cs, bit wr, bit rd, logic [W-1:0] d);
    bit do_rd, do_wr;
    chipselect = cs;
    writereq   = wr;
    readreq    = rd;
    datain     = d;
    do_rd = cs && rd && model.size() != 0;
    do_wr = cs && wr && (model.size() != DEPTH || do_rd);
    if (cs && wr && rd && model.size() == DEPTH) n_rw_full++;
    @(negedge clk);
    if (do_rd) void'(model.pop_front());
    if (do_wr) model.push_back(d);
    if (model.size() == DEPTH) n_full++;
    compare();
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare();
    // fill completely, then read and write together while full
    for (int i = 0; i < DEPTH; i++) step(1, 1, 0, {$urandom, 9'($urandom)});
    for (int i = 0; i < 10; i++) step(1, 1, 1, {$urandom, 9'($urandom)});
    // chipselect low: nothing happens
    for (int i = 0; i < 5; i++) step(0, $urandom, $urandom, {$urandom, 9'($urandom)});
    // drain
    for (int i = 0; i < DEPTH; i++) step(1, 0, 1, '0);
    // random traffic, never reading an empty or overfilling
    for (int i = 0; i < 3000; i++) begin
      bit wr, rd;
      wr = ($urandom % 2) && (model.size() < DEPTH || rd);
      rd = ($urandom % 2) && model.size() != 0;
      if (model.size() == DEPTH && !rd) wr = 1'b0;
      step(1, wr, rd, {$urandom, 9'($urandom)});
    end
    // synchronous clear
    for (int i = 0; i < 5; i++) step(1, 1, 0, {$urandom, 9'($urandom)});
    clear = 1'b1;
    writereq = 1'b0;
    readreq = 1'b0;
    @(negedge clk);
    clear = 1'b0;
    model.delete();
    compare();
    checks++;
    if (n_full == 0 || n_rw_full == 0) begin
      failures++;
      $display("FAIL: full FIFO not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
