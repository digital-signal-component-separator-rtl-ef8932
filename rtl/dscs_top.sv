// dscs_top: digital part of an outphasing RF drive for an accelerator
// cavity. The cavity field controller produces one AM-PM drive vector; the
// signal component separator splits it into two constant-envelope vectors
// r0, r1 for two saturated solid-state amplifiers (SSPAs) whose outputs a
// combiner adds; a feedback linearizer per amplifier corrects that
// amplifier's slow gain and phase drift; each drive is then modulated onto
// a common IF carrier for its DAC.
//
//   sp, cav_meas, ff -> cavity_controller -> dscs -> r0 -> fb_linearizer -> u0 -> if_modulator -> dac0
//                                               \--> r1 -> fb_linearizer -> u1 -> if_modulator -> dac1
//                                                                 nco (shared IF carrier) --^
//
// The analog parts (DACs, RF up-converters, SSPAs, combiner, cavity) and
// the receivers that measure the cavity field and the SSPA outputs are
// outside; their signals are the ports. The beam feedforward term enters
// as ff. The topology follows the source design; widths, gain formats and
// the clock (one I/Q sample per clock) are this design's choices.
//
// Timing: u0/u1 follow the inputs after 4 + LATENCY(dscs) + 4 = 78 cycles
// (out_valid); dac0/dac1 follow u0/u1 by 2 more cycles (dac_valid).
module dscs_top
  import dscs_pkg::*;
#(
  parameter int unsigned RMAX      = 27500,
  parameter logic [31:0] FTW       = 32'h4000_0000,
  parameter int          GAIN_FRAC = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic        cav_en,
  input  logic        lin_en,
  input  iq_t         sp,
  input  iq_t         cav_meas,
  input  iq_t         ff,
  input  iq_t         sspa0_meas,
  input  iq_t         sspa1_meas,
  input  logic [15:0] cav_kp,
  input  logic [15:0] cav_ki,
  input  logic [15:0] lin_kp,
  input  logic [15:0] lin_ki,
  output iq_t         dscs_in,
  output iq_t         r0,
  output iq_t         r1,
  output logic        over_range,
  output logic        out_valid,
  output iq_t         u0,
  output iq_t         u1,
  output logic        dac_valid,
  output sample_t     dac0,
  output sample_t     dac1
);
  // cavity field controller: C_PI plus feedforward
  logic cav_valid;
  cavity_controller #(.GAIN_FRAC(GAIN_FRAC)) u_cav (
    .clk, .rst, .en(cav_en), .in_valid, .sp, .y(cav_meas), .ff,
    .kp(cav_kp), .ki(cav_ki), .out_valid(cav_valid), .u(dscs_in)
  );

  // signal component separator
  logic sep_valid;
  dscs #(.RMAX(RMAX)) u_dscs (
    .clk, .rst, .in_valid(cav_valid), .s(dscs_in),
    .out_valid(sep_valid), .d0(r0), .d1(r1), .over_range
  );

  // feedback linearizers, one per amplifier branch
  logic lin0_valid, lin1_valid;
  fb_linearizer #(.GAIN_FRAC(GAIN_FRAC)) u_lin0 (
    .clk, .rst, .en(lin_en), .in_valid(sep_valid), .r(r0), .y(sspa0_meas),
    .kp(lin_kp), .ki(lin_ki), .out_valid(lin0_valid), .u(u0)
  );
  fb_linearizer #(.GAIN_FRAC(GAIN_FRAC)) u_lin1 (
    .clk, .rst, .en(lin_en), .in_valid(sep_valid), .r(r1), .y(sspa1_meas),
    .kp(lin_kp), .ki(lin_ki), .out_valid(lin1_valid), .u(u1)
  );
  assign out_valid = lin0_valid & lin1_valid;

  // shared IF carrier and the two IF modulators
  sample_t if_cos, if_sin;
  logic    if_valid;
  nco #(.FTW(FTW)) u_nco (
    .clk, .rst, .cos_o(if_cos), .sin_o(if_sin), .valid(if_valid)
  );

  logic mod0_valid, mod1_valid;
  if_modulator u_mod0 (
    .clk, .rst, .in_valid(lin0_valid & if_valid), .u(u0), .cos_i(if_cos), .sin_i(if_sin),
    .out_valid(mod0_valid), .dac(dac0)
  );
  if_modulator u_mod1 (
    .clk, .rst, .in_valid(lin1_valid & if_valid), .u(u1), .cos_i(if_cos), .sin_i(if_sin),
    .out_valid(mod1_valid), .dac(dac1)
  );
  assign dac_valid = mod0_valid & mod1_valid;

endmodule
