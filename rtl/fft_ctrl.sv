// fft_ctrl: control module of the FFT processor.
//
// Configures the working mode and sequences frames through the pipeline with
// a five-state machine:
//   IDLE  waits until the synchronisers report an environment (env_i is not
//         ENV_NONE) and checks that the requested size suits it (WLAN: 64 or
//         128 points; WPAN and WMAN: 64..512). An unsupported pair raises
//         cfg_err and the machine stays in IDLE.
//   START latches environment and size (cfg_env, cfg_size) and spends
//         CFG_CYCLES clocks configuring, then goes to WAIT.
//   WAIT  waits for input: at least two clocks, then until a whole frame
//         (N/8 words) is in the input FIFO and the frame can start on a
//         cycle that is a multiple of N/8 (the delay-feedback stages count
//         positions with free-running counters). A stop request or a change
//         of env_i/size_i leads to STOP.
//   WORK  reads one 8-sample word per clock into the pipeline for N/8 clocks.
//         If the next frame is complete by the end of this clock (counting a
//         word being written in the same clock) and nothing asks to stop, it
//         follows at once, so a continuous full-rate input runs frames back to
//         back through a FIFO of only one frame; otherwise the machine returns
//         to WAIT.
//   STOP  lets the pipeline drain (LAT_PIPE clocks), then pulses flush to
//         clean the delay-line and input FIFOs, and after STOP_HOLD more
//         clocks returns to IDLE. Results already in the output FIFO are kept.
// An active-low rst_n returns the machine to IDLE at any time.
//
// Interface: in_words is the input FIFO fill, in_push marks a word being
// written into it in the current clock. en is the pipeline enable: while it
// is low (output FIFO full and not read) the pipeline is frozen, and so are
// the frame-alignment counter, the frame being read and the STOP drain
// count. rd_en pops the input FIFO and marks the word entering module1 in the
// same cycle; frame_start marks the first word of a frame.
// The five states and their roles follow the document; the exact waiting
// conditions, CFG_CYCLES = 6 (document: 5 to 8 cycles), the drain time and the
// back-to-back rule are this design's choices.
module fft_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned CFG_CYCLES = 6,
  parameter int unsigned STOP_HOLD  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  env_t       env_i,
  input  fft_size_t  size_i,
  input  logic       stop_i,
  input  logic [7:0] in_words,
  input  logic       in_push,
  input  logic       en,
  output fft_state_t state_o,
  output env_t       cfg_env,
  output fft_size_t  cfg_size,
  output logic       cfg_err,
  output logic       rd_en,
  output logic       frame_start,
  output logic       flush
);

  fft_state_t       state;
  logic [TBITS-1:0] fcnt;      // frame-alignment reference, same as module1 stage 1
  logic [7:0]       cnt;       // cycles in the current state / words of the frame
  logic [7:0]       fwords;    // N/8
  logic             chg_req;
  logic             aligned_next;

  assign fwords       = 8'(frame_cycles(cfg_size));
  assign chg_req      = stop_i || (env_i != cfg_env) || (size_i != cfg_size);
  assign aligned_next = (((fcnt + 1'b1) & TBITS'(fwords - 1'b1)) == '0);
  assign state_o      = state;
  assign rd_en        = (state == ST_WORK) && en;
  assign frame_start  = rd_en && (cnt == 8'd0);
  assign flush        = (state == ST_STOP) && (cnt == 8'(LAT_PIPE + 1)) && en;

  function automatic logic size_ok(env_t e, fft_size_t s);
    return (e == ENV_WLAN) ? (s == SZ_64 || s == SZ_128) : (e != ENV_NONE);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) fcnt <= '0;
    else if (en) fcnt <= fcnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= ST_IDLE;
      cnt      <= '0;
      cfg_env  <= ENV_NONE;
      cfg_size <= SZ_512;
      cfg_err  <= 1'b0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          cnt <= '0;
          if (env_i != ENV_NONE) begin
            if (size_ok(env_i, size_i)) begin
              cfg_err <= 1'b0;
              state   <= ST_START;
            end else begin
              cfg_err <= 1'b1;
            end
          end
        end
        ST_START: begin
          cfg_env  <= env_i;
          cfg_size <= size_i;
          if (cnt == 8'(CFG_CYCLES - 1)) begin
            cnt   <= '0;
            state <= ST_WAIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_WAIT: begin
          if (cnt != 8'hff) cnt <= cnt + 1'b1;
          if (chg_req) begin
            cnt   <= '0;
            state <= ST_STOP;
          end else if (en && cnt >= 8'd1 && in_words >= fwords && aligned_next) begin
            cnt   <= '0;
            state <= ST_WORK;
          end
        end
        ST_WORK: if (en) begin
          if (cnt == fwords - 1'b1) begin
            cnt <= '0;
            // the word popped now still counts in in_words, the word pushed
            // now does not yet
            if (!chg_req && (9'(in_words) + 9'(in_push) > 9'(fwords))) state <= ST_WORK;
            else                                                      state <= ST_WAIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_STOP: if (en) begin
          if (cnt == 8'(LAT_PIPE + 1 + STOP_HOLD)) begin
            cnt   <= '0;
            state <= ST_IDLE;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // a frame is only read while it is complete in the input FIFO
  property rd_has_data;
    @(posedge clk) disable iff (!rst_n) rd_en |-> (in_words != 0);
  endproperty
  assert property (rd_has_data) else $error("fft_ctrl: read from empty input FIFO");

endmodule
