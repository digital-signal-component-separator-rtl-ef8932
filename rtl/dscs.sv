// dscs: two-port digital signal component separator for an outphasing
// amplifier. An amplitude- and phase-modulated baseband vector
// s = I + jQ = r e^{j alpha}, with r <= RMAX, is split into two vectors of
// constant length RMAX,
//     d0 = s + e,   d1 = s - e,   e = j e^{j alpha} sqrt(RMAX^2 - r^2),
// so that d0 = RMAX e^{j(alpha+theta)}, d1 = RMAX e^{j(alpha-theta)} with
// cos(theta) = r / RMAX. Each of d0, d1 drives one saturated amplifier; the
// combiner's sum d0 + d1 = 2s restores the original modulation.
//
// Datapath, all in I/Q coordinates as in the source design:
//   1. vectoring CORDIC: s -> (r, alpha)
//   2. radicand p = RMAX^2 - r^2 (0 when r >= RMAX)
//   3. hyperbolic CORDIC: sqrt(p)
//   4. rotation CORDIC: (0, sqrt(p)) rotated by alpha gives (e_I, e_Q) =
//      (-sin(alpha), cos(alpha)) * sqrt(p)
//   5. sum and difference with s, delayed to match.
// The structure and equations follow the source design. This design's own
// choices: 16-bit I/Q, RMAX = 27500, and what happens above RMAX: e becomes
// zero, so d0 = d1 = s, and over_range is raised.
//
// Interface: one sample per clock, in_valid/out_valid mark valid data.
// Latency: LATENCY = 2*ITER + NITER + 11 cycles (70 at the defaults).
module dscs
  import dscs_pkg::*;
#(
  parameter int unsigned RMAX  = 27500,
  parameter int          ITER  = 18,
  parameter int          NITER = 23
) (
  input  logic clk,
  input  logic rst,
  input  logic in_valid,
  input  iq_t  s,
  output logic out_valid,
  output iq_t  d0,
  output iq_t  d1,
  output logic over_range
);
  localparam int LV = ITER + 2;
  localparam int LS = NITER + 4;
  localparam int LR = ITER + 3;
  localparam int LATENCY = LV + 1 + LS + LR + 1;

  // 1. amplitude and phase
  logic        v_valid;
  logic [15:0] r_mag;
  phase_t      alpha;
  cordic_vectoring #(.ITER(ITER)) u_vec (
    .clk, .rst, .in_valid, .in_iq(s),
    .out_valid(v_valid), .mag(r_mag), .phase(alpha)
  );

  // 2. radicand
  localparam logic [31:0] RMAX_SQ = 32'(RMAX) * 32'(RMAX);
  logic        p_valid;
  logic [31:0] p;
  logic        p_over;
  always_ff @(posedge clk) begin
    if (rst) begin
      p_valid <= 1'b0; p <= '0; p_over <= 1'b0;
    end else begin
      p_valid <= v_valid;
      p_over  <= (32'(r_mag) >= 32'(RMAX));
      p       <= (32'(r_mag) >= 32'(RMAX)) ? 32'd0 : RMAX_SQ - 32'(r_mag) * 32'(r_mag);
    end
  end

  // 3. sqrt(RMAX^2 - r^2)
  logic        q_valid;
  logic [15:0] root;
  cordic_sqrt #(.NITER(NITER)) u_sqrt (
    .clk, .rst, .in_valid(p_valid), .p,
    .out_valid(q_valid), .root
  );

  // 4. e = (0, root) rotated by alpha
  phase_t alpha_d;
  delay_line #(.WIDTH(PH_W), .DEPTH(1 + LS)) u_dly_alpha (
    .clk, .rst, .din(alpha), .dout(alpha_d)
  );

  iq_t root_vec;
  assign root_vec.i = '0;
  assign root_vec.q = sample_t'(root);  // root <= RMAX < 2^15

  logic e_valid;
  iq_t  e;
  cordic_rotation #(.ITER(ITER)) u_rot (
    .clk, .rst, .in_valid(q_valid), .in_iq(root_vec), .phase(alpha_d),
    .out_valid(e_valid), .out_iq(e)
  );

  // 5. d0 = s + e, d1 = s - e
  iq_t s_d;
  delay_line #(.WIDTH($bits(iq_t)), .DEPTH(LATENCY - 1)) u_dly_s (
    .clk, .rst, .din(s), .dout(s_d)
  );
  logic over_d;
  delay_line #(.WIDTH(1), .DEPTH(LS + LR)) u_dly_over (
    .clk, .rst, .din(p_over), .dout(over_d)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid  <= 1'b0;
      d0         <= '0;
      d1         <= '0;
      over_range <= 1'b0;
    end else begin
      out_valid  <= e_valid;
      d0.i       <= sat16(48'(s_d.i) + 48'(e.i));
      d0.q       <= sat16(48'(s_d.q) + 48'(e.q));
      d1.i       <= sat16(48'(s_d.i) - 48'(e.i));
      d1.q       <= sat16(48'(s_d.q) - 48'(e.q));
      over_range <= over_d;
    end
  end

endmodule
