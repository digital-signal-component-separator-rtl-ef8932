// cordic_rotation: rotates an I/Q vector by a phase, i.e. amplitude/phase
// to I/Q conversion. The separator uses it to build the projecting vector
// e = (-sin(alpha), cos(alpha)) * sqrt(r_max^2 - r^2) by rotating
// (0, sqrt(...)) by alpha; the NCO uses it to turn a phase into cos/sin.
//
// A fully pipelined circular CORDIC in rotation mode. Stage 0 multiplies the
// input by 1/K (K = 1.6468) so that the rotation has unit gain, stage 1
// rotates by +-90 degrees so the remaining angle lies in [-90, 90) degrees,
// stages 2..ITER+1 perform the micro-rotations that drive the angle to
// zero, and the last stage rounds and saturates to 16 bits.
//
// Interface: one sample per clock, in_valid/out_valid mark valid data.
// Latency: ITER + 3 cycles. Phase: 24 bits, 2^24 = one turn, positive =
// counter-clockwise. Using a CORDIC follows the source design; widths,
// iteration count and pipelining are this design's choices.
module cordic_rotation
  import dscs_pkg::*;
#(
  parameter int ITER = 18
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  iq_t    in_iq,
  input  phase_t phase,
  output logic   out_valid,
  output iq_t    out_iq
);
  localparam int W  = 24;
  localparam int FB = 4;

  // stage 0: gain pre-compensation
  logic signed [W-1:0] xp, yp;
  phase_t              zp;
  logic signed [33:0]  xm, ym;
  assign xm = in_iq.i * $signed({1'b0, INV_K_CIRC});
  assign ym = in_iq.q * $signed({1'b0, INV_K_CIRC});

  always_ff @(posedge clk) begin
    if (rst) begin
      xp <= '0; yp <= '0; zp <= '0;
    end else begin
      xp <= W'(xm >>> (16 - FB));
      yp <= W'(ym >>> (16 - FB));
      zp <= phase;
    end
  end

  logic signed [W-1:0] xs [0:ITER];
  logic signed [W-1:0] ys [0:ITER];
  phase_t              zs [0:ITER];
  logic [ITER+2:0]     vld;

  // stage 1: coarse +-90 degree rotation
  always_ff @(posedge clk) begin
    if (rst) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0;
    end else if (zp >= 0) begin
      xs[0] <= -yp; ys[0] <= xp;  zs[0] <= zp - PHASE_90;
    end else begin
      xs[0] <= yp;  ys[0] <= -xp; zs[0] <= zp + PHASE_90;
    end
  end

  // micro-rotations towards z = 0
  for (genvar k = 0; k < ITER; k++) begin : g_iter
    always_ff @(posedge clk) begin
      if (rst) begin
        xs[k+1] <= '0; ys[k+1] <= '0; zs[k+1] <= '0;
      end else if (zs[k] >= 0) begin
        xs[k+1] <= xs[k] - (ys[k] >>> k);
        ys[k+1] <= ys[k] + (xs[k] >>> k);
        zs[k+1] <= zs[k] - atan_tab(k);
      end else begin
        xs[k+1] <= xs[k] + (ys[k] >>> k);
        ys[k+1] <= ys[k] - (xs[k] >>> k);
        zs[k+1] <= zs[k] + atan_tab(k);
      end
    end
  end

  // rounding and saturation
  logic signed [W-1:0] xr, yr;
  assign xr = (xs[ITER] + W'(1 << (FB - 1))) >>> FB;
  assign yr = (ys[ITER] + W'(1 << (FB - 1))) >>> FB;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_iq <= '0;
      vld    <= '0;
    end else begin
      out_iq.i <= sat16(48'(xr));
      out_iq.q <= sat16(48'(yr));
      vld      <= {vld[ITER+1:0], in_valid};
    end
  end

  assign out_valid = vld[ITER+2];

endmodule
