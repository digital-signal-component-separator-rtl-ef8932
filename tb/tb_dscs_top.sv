// tb_dscs_top: end-to-end test of the outphasing drive with its default
// parameters, closed around a behavioural model of the amplifiers and the
// cavity (rf_plant_model). Two RF pulses of 700 us (70438 cycles at an
// assumed 100.625 MHz clock) with amplifier droops of 10 % and 8 %:
//   pulse A: feedback linearizers off -- the droop appears at the SSPA
//            outputs and the cavity controller raises the separator input;
//   pulse B: linearizers on -- the SSPA outputs stay constant, the
//            linearizer outputs rise, the separator input stays flat.
//   pulse C: 1.0 ms (100625 cycles), 14 % droop on both amplifiers,
//            linearizers on.
// Pulse A starts with a short feedforward burst above RMAX to exercise the
// separator's over-range path. Checked on every valid sample:
//   - |r0| = |r1| = RMAX within 4 LSB (constant envelope), unless over range;
//   - r0 + r1 = 2 * (separator input 70 cycles earlier), exactly;
//   - dac0/dac1 = (u*cos - u*sin) of the fs/4 carrier, 2 cycles after u;
//   - with the linearizers on (after the first 10 % of the pulse): both
//     SSPA output amplitudes within 1 % of RMAX;
// and at the end of each pulse: cavity field within 1 % of the set point,
// and the droop behaviour listed above. Every mechanism (over range,
// linearizer off, linearizer on, droop compensation in each mode) must
// occur at least once.
module tb_dscs_top;
  import dscs_pkg::*;
  localparam int  PULSE = 70438;   // 700 us at 100.625 MHz
  localparam int  PULSE_C = 100625; // 1.0 ms
  localparam int  GAP   = 3000;
  localparam int  BURST = 800;
  localparam int  RMAXT = 27500;
  localparam int  SEP_LAT = 70;
  localparam real SP_AMP  = 18000.0;

  logic clk = 0, rst = 1, in_valid = 0, cav_en = 0, lin_en = 0;
  iq_t sp, cav_meas, ff, sspa0_meas, sspa1_meas;
  logic [15:0] cav_kp, cav_ki, lin_kp, lin_ki;
  iq_t dscs_in, r0, r1, u0, u1;
  logic over_range, out_valid, dac_valid;
  sample_t dac0, dac1;

  dscs_top dut (.*);

  logic rf_on = 0;
  int   t_pulse = 0;
  int   pulse_len = PULSE;
  real  droop0 = 0.10, droop1 = 0.08;
  real  comb_amp;
  rf_plant_model u_plant (
    .clk, .rf_on, .t_pulse, .pulse_len, .droop0, .droop1,
    .u0_i(u0.i), .u0_q(u0.q), .u1_i(u1.i), .u1_q(u1.q),
    .y0_i(sspa0_meas.i), .y0_q(sspa0_meas.q), .y1_i(sspa1_meas.i), .y1_q(sspa1_meas.q),
    .cav_i(cav_meas.i), .cav_q(cav_meas.q), .comb_amp
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_over = 0, n_lin_off = 0, n_lin_on = 0, n_droop_seen = 0, n_droop_comp = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real amp(input iq_t v);
    return $sqrt(real'(v.i) * real'(v.i) + real'(v.q) * real'(v.q));
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @%0d: %s", cyc, msg);
  endtask

  // separator input history, to check r0 + r1 = 2 s
  iq_t s_hist [0:127];
  always @(posedge clk) s_hist[cyc % 128] <= dscs_in;

  // drives and carrier history, to check the DAC samples
  iq_t u0_hist [0:3], u1_hist [0:3];
  logic uv_hist [0:3];
  always @(posedge clk) begin
    u0_hist[cyc % 4] <= u0; u1_hist[cyc % 4] <= u1; uv_hist[cyc % 4] <= out_valid;
  end

  int nco_t0 = -1;   // cycle whose carrier sample has phase 0
  logic pulse_a = 0, pulse_b = 0;

  // per-sample checks
  always @(posedge clk) if (!rst) begin
    if (dut.u_dscs.out_valid && rf_on && t_pulse > 200) begin
      iq_t s;
      s = s_hist[(cyc - SEP_LAT + 128) % 128];
      checks++;
      if (int'(r0.i) + int'(r1.i) != 2 * int'(s.i) || int'(r0.q) + int'(r1.q) != 2 * int'(s.q))
        fail("r0 + r1 != 2 s");
      if (over_range) n_over++;
      else begin
        checks++;
        if (amp(r0) - RMAXT > 4.0 || RMAXT - amp(r0) > 4.0 ||
            amp(r1) - RMAXT > 4.0 || RMAXT - amp(r1) > 4.0)
          fail($sformatf("envelope %f %f", amp(r0), amp(r1)));
      end
    end
    if (dac_valid && nco_t0 >= 0 && uv_hist[(cyc + 2) % 4]) begin
      // carrier at fs/4: phase index of the sample modulated 2 cycles ago
      int  k;
      iq_t a, b;
      int  e0, e1;
      k = (cyc - 2 - nco_t0) % 4;
      a = u0_hist[(cyc + 2) % 4]; b = u1_hist[(cyc + 2) % 4];
      case (k)
        0: begin e0 =  int'(a.i); e1 =  int'(b.i); end
        1: begin e0 = -int'(a.q); e1 = -int'(b.q); end
        2: begin e0 = -int'(a.i); e1 = -int'(b.i); end
        default: begin e0 = int'(a.q); e1 = int'(b.q); end
      endcase
      checks++;
      if (int'(dac0) - e0 > 2 || e0 - int'(dac0) > 2 || int'(dac1) - e1 > 2 || e1 - int'(dac1) > 2)
        fail($sformatf("dac (%0d,%0d) exp (%0d,%0d)", int'(dac0), int'(dac1), e0, e1));
    end
    if (rf_on && out_valid) begin
      if (lin_en) n_lin_on++; else n_lin_off++;
    end
  end

  real s_amp_early, s_amp_end, u_amp_early, u_amp_end, y_amp_early, y_amp_end, y_min, y_max;

  task automatic run_pulse(input bit lin, input bit burst, input int len,
                           input real dr0, input real dr1);
    lin_en = lin;
    pulse_len = len; droop0 = dr0; droop1 = dr1;
    y_min = 1.0e9; y_max = 0.0;
    for (int t = 0; t < len; t++) begin
      @(posedge clk);
      rf_on   <= 1;
      t_pulse <= t;
      cav_en  <= 1;
      sp      <= '{i: sample_t'($rtoi(SP_AMP)), q: '0};
      if (burst && t < BURST) ff <= '{i: 16'sd29000, q: '0};
      else                    ff <= '{i: sample_t'($rtoi(0.9 * SP_AMP)), q: '0};
      if (t == len / 10) begin
        s_amp_early = amp(dscs_in); u_amp_early = amp(u0); y_amp_early = amp(sspa0_meas);
      end
      if (t > len / 10) begin
        if (lin) begin
          // linearized amplifiers hold the separator's constant amplitude
          checks++;
          if (amp(sspa0_meas) > 1.01 * RMAXT || amp(sspa0_meas) < 0.99 * RMAXT ||
              amp(sspa1_meas) > 1.01 * RMAXT || amp(sspa1_meas) < 0.99 * RMAXT)
            fail($sformatf("SSPA amplitudes %0.0f %0.0f", amp(sspa0_meas), amp(sspa1_meas)));
        end
        if (amp(sspa0_meas) < y_min) y_min = amp(sspa0_meas);
        if (amp(sspa0_meas) > y_max) y_max = amp(sspa0_meas);
      end
    end
    s_amp_end = amp(dscs_in); u_amp_end = amp(u0); y_amp_end = amp(sspa0_meas);
    $display("pulse (%0d cycles, droops %0.2f/%0.2f, lin_en=%0d): |s| %0.0f -> %0.0f, |u0| %0.0f -> %0.0f, |sspa0| %0.0f -> %0.0f, cavity %0d, combiner %0.0f",
             len, dr0, dr1, lin, s_amp_early, s_amp_end, u_amp_early, u_amp_end, y_amp_early, y_amp_end,
             int'(cav_meas.i), comb_amp);
    // cavity field regulated in both modes
    checks++;
    if ($sqrt((real'(cav_meas.i) - SP_AMP) ** 2 + real'(cav_meas.q) ** 2) > 0.01 * SP_AMP)
      fail($sformatf("cavity field (%0d,%0d) off set point", int'(cav_meas.i), int'(cav_meas.q)));
    checks++;
    if (!lin) begin
      // droop visible at the SSPA, compensated by the cavity loop
      if (y_amp_end < 0.95 * y_amp_early && s_amp_end > 1.04 * s_amp_early) n_droop_seen++;
      else fail("pulse A: expected SSPA droop and a rising separator input");
    end else begin
      // droop removed locally by the linearizers
      if (y_max - y_min < 0.01 * RMAXT && u_amp_end > 1.05 * u_amp_early &&
          s_amp_end < 1.02 * s_amp_early && s_amp_end > 0.98 * s_amp_early) n_droop_comp++;
      else fail($sformatf("pulse B: SSPA range %0.0f..%0.0f", y_min, y_max));
    end
    // RF off between pulses
    for (int t = 0; t < GAP; t++) begin
      @(posedge clk);
      rf_on <= 0; t_pulse <= 0; cav_en <= 0; lin_en = 0;
      sp <= '0; ff <= '0;
    end
  endtask

  initial begin
    sp = '0; ff = '0;
    cav_kp = 16'd4096; cav_ki = 16'd2;     // 1.0 and 0.0005
    lin_kp = 16'd2048; lin_ki = 16'd41;    // 0.5 and 0.01
    repeat (4) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    in_valid <= 1;
    wait (dut.if_valid);
    @(negedge clk);
    nco_t0 = cyc;
    repeat (GAP) @(posedge clk);
    run_pulse(1'b0, 1'b1, PULSE, 0.10, 0.08);
    run_pulse(1'b1, 1'b0, PULSE, 0.10, 0.08);
    run_pulse(1'b1, 1'b0, PULSE_C, 0.14, 0.14);
    $display("mechanisms: over_range=%0d lin_off=%0d lin_on=%0d droop_seen=%0d droop_compensated=%0d",
             n_over, n_lin_off, n_lin_on, n_droop_seen, n_droop_comp);
    checks += 5;
    if (n_over == 0)       fail("over range never happened");
    if (n_lin_off == 0)    fail("linearizers never off");
    if (n_lin_on == 0)     fail("linearizers never on");
    if (n_droop_seen == 0) fail("droop never seen with linearizers off");
    if (n_droop_comp == 0) fail("droop never compensated with linearizers on");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (PULSE + GAP) + PULSE_C + 4 * GAP) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
