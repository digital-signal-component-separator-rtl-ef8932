// fb_linearizer: local feedback loop around one solid-state power amplifier
// (SSPA) of the outphasing pair. The separator output r is the set point,
// y the measured, down-converted SSPA output, and the drive is
//
//   u = r + C(r - y),      C = PI controller (iq_pi)
//
// With a high loop gain at low frequency, u approaches G^-1 r minus the
// input disturbance, so slow gain droop and phase drift of the amplifier
// are cancelled locally, and the amplifier keeps a constant drive
// amplitude. With en low the integrator is cleared and u = r, the
// amplifier is then driven by the separator output alone.
//
// Cycle 1 forms the saturated error (en and the gains are registered with
// it, so they apply to the same sample) r - y, cycles 2-3 are the PI
// controller, cycle 4 adds the delayed r and saturates. Latency: 4 cycles.
// The loop structure (feedback subtracted from r, controller output added
// to r) follows the source design; y is expected on the same scale as r.
module fb_linearizer
  import dscs_pkg::*;
#(
  parameter int GAIN_FRAC = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        in_valid,
  input  iq_t         r,
  input  iq_t         y,
  input  logic [15:0] kp,
  input  logic [15:0] ki,
  output logic        out_valid,
  output iq_t         u
);
  iq_t  err, r1;
  logic v1, en1;
  logic [15:0] kp1, ki1;
  always_ff @(posedge clk) begin
    if (rst) begin
      err <= '0; r1 <= '0; v1 <= 1'b0; en1 <= 1'b0; kp1 <= '0; ki1 <= '0;
    end else begin
      v1    <= in_valid;
      en1   <= en;
      kp1   <= kp;
      ki1   <= ki;
      r1    <= r;
      err.i <= sat16(48'(r.i) - 48'(y.i));
      err.q <= sat16(48'(r.q) - 48'(y.q));
    end
  end

  iq_t  c;
  logic cv;
  iq_pi #(.GAIN_FRAC(GAIN_FRAC)) u_pi (
    .clk, .rst, .en(en1), .in_valid(v1), .err, .kp(kp1), .ki(ki1),
    .out_valid(cv), .ctrl(c)
  );

  iq_t r3;
  delay_line #(.WIDTH($bits(iq_t)), .DEPTH(2)) u_dly_r (
    .clk, .rst, .din(r1), .dout(r3)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      u <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= cv;
      u.i       <= sat16(48'(r3.i) + 48'(c.i));
      u.q       <= sat16(48'(r3.q) + 48'(c.q));
    end
  end

endmodule
