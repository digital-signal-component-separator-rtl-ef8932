// cordic_vectoring: I/Q vector to amplitude and phase (r, alpha of eq. 1 of
// the separator), r = sqrt(I^2 + Q^2), alpha = atan2(Q, I).
//
// A fully pipelined circular CORDIC in vectoring mode. Stage 0 folds the
// left half-plane into the right one by a +-90 degree rotation, stages
// 1..ITER each perform one micro-rotation that drives y to zero while the
// angle register collects alpha, and a last stage multiplies x by 1/K
// (K = 1.6468, the CORDIC gain) and rounds it to an integer. A zero input
// vector gets phase 0 (the usual atan2(0, 0) convention), so the separator
// then places its two outputs at exactly +-90 degrees. The datapath
// carries 12 fraction bits below the input LSB, so that the phase of short
// vectors is still accurate enough for the separator.
//
// Interface: one sample per clock, in_valid/out_valid mark valid data.
// Latency: ITER + 2 cycles. Phase: 24 bits, 2^24 = one turn.
// Using a CORDIC for this conversion follows the source design; iteration
// count, widths and pipelining are this design's choices.
module cordic_vectoring
  import dscs_pkg::*;
#(
  parameter int ITER = 18
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  iq_t         in_iq,
  output logic        out_valid,
  output logic [15:0] mag,
  output phase_t      phase
);
  localparam int W  = 32;  // 16 bits + 12 fraction + growth
  localparam int FB = 12;

  logic signed [W-1:0] xs [0:ITER];
  logic signed [W-1:0] ys [0:ITER];
  phase_t              zs [0:ITER];
  logic [ITER+1:0]     vld;
  logic [ITER:0]       zero_in;

  logic signed [W-1:0] xin, yin;
  assign xin = W'(in_iq.i) <<< FB;
  assign yin = W'(in_iq.q) <<< FB;

  // stage 0: quadrant fold
  always_ff @(posedge clk) begin
    if (rst) begin
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0;
    end else if (xin < 0) begin
      if (yin >= 0) begin
        xs[0] <= yin;  ys[0] <= -xin; zs[0] <= PHASE_90;
      end else begin
        xs[0] <= -yin; ys[0] <= xin;  zs[0] <= -PHASE_90;
      end
    end else begin
      xs[0] <= xin; ys[0] <= yin; zs[0] <= '0;
    end
  end

  // stages 1..ITER: micro-rotations towards y = 0
  for (genvar k = 0; k < ITER; k++) begin : g_iter
    always_ff @(posedge clk) begin
      if (rst) begin
        xs[k+1] <= '0; ys[k+1] <= '0; zs[k+1] <= '0;
      end else if (ys[k] >= 0) begin
        xs[k+1] <= xs[k] + (ys[k] >>> k);
        ys[k+1] <= ys[k] - (xs[k] >>> k);
        zs[k+1] <= zs[k] + atan_tab(k);
      end else begin
        xs[k+1] <= xs[k] - (ys[k] >>> k);
        ys[k+1] <= ys[k] + (xs[k] >>> k);
        zs[k+1] <= zs[k] - atan_tab(k);
      end
    end
  end

  // gain correction and rounding
  logic signed [W+17:0] prod;
  logic [W+17:0]        rounded;
  assign prod    = xs[ITER] * $signed({1'b0, INV_K_CIRC});
  assign rounded = (W+18)'(prod + (W+18)'(1 << (16 + FB - 1))) >> (16 + FB);

  always_ff @(posedge clk) begin
    if (rst) begin
      mag     <= '0;
      phase   <= '0;
      vld     <= '0;
      zero_in <= '0;
    end else begin
      mag     <= (rounded > 65535) ? 16'hffff : rounded[15:0];
      phase   <= zero_in[ITER] ? '0 : zs[ITER];
      vld     <= {vld[ITER:0], in_valid};
      zero_in <= {zero_in[ITER-1:0], (in_iq.i == '0) && (in_iq.q == '0)};
    end
  end

  assign out_valid = vld[ITER+1];

endmodule
