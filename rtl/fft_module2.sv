// fft_module2: second level of the two-level FFT, five radix-2 stages on
// eight paths (Stage5 .. Stage9), computing a 32-point DFT over n2.
//
// After the inter-level twiddle, the 32 samples with equal k1 and
// n2 = 0..31 (bits 4..0 of the frame position n = 8*t + l) form one 32-point
// DFT. Bits 4 and 3 of n are bits 1 and 0 of the cycle index t, so Stage5 and
// Stage6 are delay-feedback stages with delays of 2 and 1 cycles on each path
// (fft_df_stage). Bits 2, 1, 0 of n are the path number, so Stage7..Stage9
// are butterflies between paths l and l + 4, l + 2, l + 1, computed in one
// clock each. All stages use radix-2 decimation in frequency with the stage
// twiddles W_(2^(m+1))^(n2 mod 2^m) taken from the W_32 table. Module2 does
// the same work for every transform size.
//
// Output order: at position n the low five bits hold k2 bit-reversed; the
// upper bits are passed through unchanged (k1 bit-reversed, from module1).
//
// Timing: latency LAT_M2 = 8 cycles; IN_OFFSET is the cycles from the
// frame-alignment reference to a frame's first sample arriving at din.
// en low stalls the module.
module fft_module2
  import fft_pkg::*;
#(
  parameter int unsigned IN_OFFSET = LAT_M1 + LAT_TW
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  clear,
  input  logic  en,
  input  samp_t din  [LANES],
  output samp_t dout [LANES]
);

  localparam int unsigned OFF6 = IN_OFFSET + 3;   // after the 2-cycle stage

  samp_t s5 [LANES];
  samp_t s6 [LANES];
  samp_t sp [4][LANES];   // sp[0] = Stage6 output, sp[3] = Stage9 output

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    fft_df_stage #(
      .BIT(4), .SUB_BASE(0), .LANE(l),
      .CNT_INIT(TBITS'((1 << TBITS) - (IN_OFFSET % (1 << TBITS))))
    ) u_st5 (
      .clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .bypass(1'b0),
      .din(din[l]), .dout(s5[l])
    );
    fft_df_stage #(
      .BIT(3), .SUB_BASE(0), .LANE(l),
      .CNT_INIT(TBITS'((1 << TBITS) - (OFF6 % (1 << TBITS))))
    ) u_st6 (
      .clk(clk), .rst_n(rst_n), .clear(clear), .en(en), .bypass(1'b0),
      .din(s5[l]), .dout(s6[l])
    );
    assign sp[0][l] = s6[l];
  end

  // Stage7..Stage9: butterflies across paths on bits 2, 1, 0 of n
  for (genvar s = 0; s < 3; s++) begin : g_spatial
    localparam int B = 2 - s;
    for (genvar l = 0; l < LANES; l++) begin : g_pair
      if (((l >> B) & 1) == 0) begin : g_bf
        localparam int P = l | (1 << B);
        localparam logic [3:0] K = 4'(((l & ((1 << B) - 1)) << (4 - B)) & 15);
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n) begin
            sp[s+1][l] <= '0;
            sp[s+1][P] <= '0;
          end else if (en) begin
            sp[s+1][l].valid <= sp[s][l].valid;
            sp[s+1][P].valid <= sp[s][P].valid;
            sp[s+1][l].d     <= cadd(sp[s][l].d, sp[s][P].d);
            sp[s+1][P].d     <= mul_w32(csub(sp[s][l].d, sp[s][P].d), K);
          end
        end
      end
    end
  end

  assign dout = sp[3];

endmodule
