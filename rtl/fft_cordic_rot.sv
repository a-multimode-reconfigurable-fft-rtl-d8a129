// fft_cordic_rot: pipelined CORDIC rotator for one data path.
//
// Multiplies a complex sample by W_512^phi = exp(-j*2*pi*phi/512), phi = 0..511.
// The two top bits of phi select a quarter turn, applied exactly as a
// multiplication by (-j)^q. The remaining angle -2*pi*(phi mod 128)/512, which
// lies in (-pi/2, 0], is removed by CORDIC_ITER rotation-mode micro-rotations
// x' = x - d*y*2^-i, y' = y + d*x*2^-i, z' = z - d*atan(2^-i). The angle is kept
// in units of 2*pi/2^20; the atan table holds round(atan(2^-i)/(2*pi)*2^20).
// The CORDIC gain of about 1.6468 is removed at the end by multiplying with
// round(2^15 * 0.607253) = 19898. Four fractional guard bits are carried
// through the iterations and rounded off at the end.
//
// Interface: din/phi in, dout out; the valid bit travels with the sample.
// Timing: fully pipelined, one sample per clock, latency CORDIC_ITER + 2 = 18
// cycles (quarter-turn register, one register per iteration, gain register);
// everything holds while en is low.
// CORDIC for the twiddle multiplication follows the document; the iteration
// count, angle format and gain correction are this design's choices.
module fft_cordic_rot
  import fft_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  samp_t              din,
  input  logic [LOG_NMAX-1:0] phi,
  output samp_t              dout
);

  localparam int FB = 4;            // fractional guard bits
  localparam int XW = DW + 2 + FB;  // room for the CORDIC gain
  localparam int ZW = 21;           // angle, 2^20 = full turn

  function automatic logic signed [ZW-1:0] atan_tab(int i);
    int t [16];
    t = '{131072, 77376, 40884, 20753, 10417, 5213, 2607, 1304,
          652, 326, 163, 81, 41, 20, 10, 5};
    return ZW'(t[i]);
  endfunction

  logic signed [XW-1:0] x [CORDIC_ITER+1];
  logic signed [XW-1:0] y [CORDIC_ITER+1];
  logic signed [ZW-1:0] z [CORDIC_ITER+1];
  logic                 v [CORDIC_ITER+1];

  // quarter-turn stage
  logic signed [XW-1:0] xr, xi;
  assign xr = XW'(din.d.re) <<< FB;
  assign xi = XW'(din.d.im) <<< FB;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x[0] <= '0;
      y[0] <= '0;
      z[0] <= '0;
      v[0] <= 1'b0;
    end else if (en) begin
      unique case (phi[LOG_NMAX-1 -: 2])
        2'd0: begin x[0] <= xr;  y[0] <= xi;  end
        2'd1: begin x[0] <= xi;  y[0] <= -xr; end   // * -j
        2'd2: begin x[0] <= -xr; y[0] <= -xi; end   // * -1
        default: begin x[0] <= -xi; y[0] <= xr; end // * +j
      endcase
      z[0] <= -(ZW'(phi[LOG_NMAX-3:0]) <<< 11);
      v[0] <= din.valid;
    end
  end

  for (genvar i = 0; i < CORDIC_ITER; i++) begin : g_iter
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x[i+1] <= '0;
        y[i+1] <= '0;
        z[i+1] <= '0;
        v[i+1] <= 1'b0;
      end else if (en) begin
        if (z[i] >= 0) begin
          x[i+1] <= x[i] - (y[i] >>> i);
          y[i+1] <= y[i] + (x[i] >>> i);
          z[i+1] <= z[i] - atan_tab(i);
        end else begin
          x[i+1] <= x[i] + (y[i] >>> i);
          y[i+1] <= y[i] - (x[i] >>> i);
          z[i+1] <= z[i] + atan_tab(i);
        end
        v[i+1] <= v[i];
      end
    end
  end

  // gain correction and rounding back to DW bits
  localparam logic signed [15:0] KGAIN = 16'sd19898;
  localparam int KSH = 15 + FB;
  logic signed [XW+16-1:0] gx, gy;
  assign gx = x[CORDIC_ITER] * KGAIN + (XW+16)'(1 <<< (KSH-1));
  assign gy = y[CORDIC_ITER] * KGAIN + (XW+16)'(1 <<< (KSH-1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else if (en) begin
      dout.valid <= v[CORDIC_ITER];
      dout.d.re  <= DW'(gx >>> KSH);
      dout.d.im  <= DW'(gy >>> KSH);
    end
  end

endmodule
