// iq_pi: proportional-integral controller for an I/Q error vector. The I
// and Q components have separate but identical PI loops with shared gains,
// i.e. a diagonal 2x2 controller, matching the diagonal amplifier models of
// the feedback linearizer analysis.
//
//   ctrl = (kp * err + sum(ki * err)) / 2^GAIN_FRAC, per component
//
// Cycle 1 forms the proportional term and updates the integrator, cycle 2
// adds them, scales and saturates to 16 bits. The integrator is clamped to
// +-32767 * 2^GAIN_FRAC, so the integral term alone never exceeds full
// scale (anti-windup). While en is low the integrator is held at zero and
// the output is zero.
//
// Interface: one sample per clock, in_valid/out_valid mark valid data; the
// integrator only advances on valid samples. Gains are unsigned 16-bit
// numbers with GAIN_FRAC fraction bits. Latency: 2 cycles.
// The PI type follows the source design; gain format, anti-windup and
// widths are this design's choices.
module iq_pi
  import dscs_pkg::*;
#(
  parameter int GAIN_FRAC = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        in_valid,
  input  iq_t         err,
  input  logic [15:0] kp,
  input  logic [15:0] ki,
  output logic        out_valid,
  output iq_t         ctrl
);
  localparam logic signed [47:0] INT_LIM = 48'sd32767 <<< GAIN_FRAC;

  function automatic logic signed [47:0] clamp_int(input logic signed [47:0] v);
    if (v > INT_LIM)  return INT_LIM;
    if (v < -INT_LIM) return -INT_LIM;
    return v;
  endfunction

  logic signed [47:0] prop_i, prop_q, int_i, int_q;
  logic signed [47:0] kp_s, ki_s;
  logic               v1;
  assign kp_s = 48'(kp);
  assign ki_s = 48'(ki);

  always_ff @(posedge clk) begin
    if (rst) begin
      prop_i <= '0; prop_q <= '0; int_i <= '0; int_q <= '0; v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      if (!en) begin
        prop_i <= '0; prop_q <= '0; int_i <= '0; int_q <= '0;
      end else if (in_valid) begin
        prop_i <= kp_s * 48'(err.i);
        prop_q <= kp_s * 48'(err.q);
        int_i  <= clamp_int(int_i + ki_s * 48'(err.i));
        int_q  <= clamp_int(int_q + ki_s * 48'(err.q));
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ctrl <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      ctrl.i    <= sat16((prop_i + int_i) >>> GAIN_FRAC);
      ctrl.q    <= sat16((prop_q + int_q) >>> GAIN_FRAC);
    end
  end

endmodule
