// fft_sram_fifo: the FIFO wrapper used for every memory of the processor.
//
// The processor's memories (the delay-feedback buffers of module1 and
// module2, and the input/output buffers of the test module) are FIFOs behind
// one common wrapper interface: rst_n, chipselect, writereq, readreq, datain,
// dataout, full, empty, almostfull, almostempty. This module is that wrapper
// around a plain register/array memory of DEPTH words.
//
// Behaviour:
//   * dataout always shows the oldest stored word (show-ahead); readreq pops it.
//   * a write and a read in the same cycle are allowed even when the FIFO is
//     full or empty-but-written (the pop then sees the old head).
//   * requests are ignored while chipselect is low.
//   * clear empties the FIFO synchronously (used when the controller cleans
//     the buffers in its STOP state).
//   * almostfull  = count >= AF_LEVEL, almostempty = count <= AE_LEVEL.
//   * count gives the occupancy.
// Timing: one cycle from a write to the word being visible at dataout of an
// empty FIFO. Pointers reset asynchronously; the storage itself has no reset.
// The pin list follows the document; show-ahead reads, clear, count and the
// flag thresholds are this design's own choices.
module fft_sram_fifo #(
  parameter int unsigned WIDTH    = 41,
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned AF_LEVEL = DEPTH - 1,
  parameter int unsigned AE_LEVEL = 1,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNTW = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             chipselect,
  input  logic             writereq,
  input  logic             readreq,
  input  logic [WIDTH-1:0] datain,
  output logic [WIDTH-1:0] dataout,
  output logic             full,
  output logic             empty,
  output logic             almostfull,
  output logic             almostempty,
  output logic [CNTW-1:0]  count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full        = (count == CNTW'(DEPTH));
  assign empty       = (count == '0);
  assign almostfull  = (count >= CNTW'(AF_LEVEL));
  assign almostempty = (count <= CNTW'(AE_LEVEL));
  assign do_rd       = chipselect && readreq && !empty;
  assign do_wr       = chipselect && writereq && (!full || do_rd);
  assign dataout     = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else if (clear) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= datain;
  end

  // a request the FIFO cannot serve is a fault of the user
  property no_overflow;
    @(posedge clk) disable iff (!rst_n || clear)
      (chipselect && writereq && full) |-> (readreq);
  endproperty
  assert property (no_overflow) else $error("fft_sram_fifo: write while full");

  property no_underflow;
    @(posedge clk) disable iff (!rst_n || clear)
      (chipselect && readreq) |-> (!empty);
  endproperty
  assert property (no_underflow) else $error("fft_sram_fifo: read while empty");

endmodule
