// rf_plant_model: behavioural (non-synthesizable) baseband model of the
// analog path that the digital controller drives, for simulation only.
//   - Two SSPAs: complex gain g_k(t) * e^{j phi_k}; g_k falls linearly from
//     1 to 1 - droop_k over pulse_len cycles (the amplitude droop of a
//     pulsed amplifier). Their outputs, normalised to the drive scale, are the
//     sspa*_meas measurements.
//   - Combiner: (y0 + y1) / 2, so that ideal separator outputs recombine to
//     the separator input.
//   - Cavity: first-order low-pass of the combiner output with pole BETA per
//     clock and unit DC gain; its state is the cav_meas measurement.
// The DAC/IF/RF up- and down-conversion is taken as ideal and skipped: the
// model is driven by the baseband drives u0, u1. Outputs update on each
// rising clock edge; t_pulse is the cycle count since the pulse began.
module rf_plant_model #(
  parameter real PHI0   = 3.0,   // degrees
  parameter real PHI1   = -2.0,  // degrees
  parameter real BETA   = 0.001
) (
  input  logic                clk,
  input  logic                rf_on,
  input  int                  t_pulse,
  input  int                  pulse_len,
  input  real                 droop0,
  input  real                 droop1,
  input  logic signed [15:0]  u0_i, u0_q, u1_i, u1_q,
  output logic signed [15:0]  y0_i, y0_q, y1_i, y1_q,
  output logic signed [15:0]  cav_i, cav_q,
  output real                 comb_amp
);
  localparam real PI = 3.14159265358979;
  real ci = 0.0, cq = 0.0;

  function automatic logic signed [15:0] to16(input real v);
    if (v > 32767.0) return 16'sh7fff;
    if (v < -32768.0) return -16'sh8000;
    return 16'($rtoi(v));
  endfunction

  always @(posedge clk) begin
    real g0, g1, a0, a1, x0i, x0q, x1i, x1q, mi, mq;
    g0 = rf_on ? 1.0 - droop0 * real'(t_pulse) / real'(pulse_len) : 0.0;
    g1 = rf_on ? 1.0 - droop1 * real'(t_pulse) / real'(pulse_len) : 0.0;
    a0 = PHI0 * PI / 180.0;
    a1 = PHI1 * PI / 180.0;
    x0i = g0 * ($cos(a0) * real'(u0_i) - $sin(a0) * real'(u0_q));
    x0q = g0 * ($sin(a0) * real'(u0_i) + $cos(a0) * real'(u0_q));
    x1i = g1 * ($cos(a1) * real'(u1_i) - $sin(a1) * real'(u1_q));
    x1q = g1 * ($sin(a1) * real'(u1_i) + $cos(a1) * real'(u1_q));
    mi = (x0i + x1i) / 2.0;
    mq = (x0q + x1q) / 2.0;
    comb_amp <= $sqrt(mi * mi + mq * mq);
    ci = ci + BETA * (mi - ci);
    cq = cq + BETA * (mq - cq);
    y0_i  <= to16(x0i); y0_q <= to16(x0q);
    y1_i  <= to16(x1i); y1_q <= to16(x1q);
    cav_i <= to16(ci);  cav_q <= to16(cq);
  end
endmodule
