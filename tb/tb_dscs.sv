// tb_dscs: self-checking test of the two-port signal component separator.
// Stimulus: random vectors with amplitudes from 0 to 1.15 * RMAX and
// random phases, plus a staircase like a cavity pulse (0 -> 20000 -> RMAX).
// For each output it checks, against real arithmetic done here:
//   - d0 and d1 equal s +- e, e = (-sin a, cos a) * sqrt(RMAX^2 - r^2), 4 LSB
//     (a = atan2(0,0) = 0 for s = 0);
//   - |d0| = |d1| = RMAX (constant envelope) within 4 LSB for r < RMAX;
//   - d0 + d1 = 2 s exactly (what the combiner relies on);
//   - above RMAX: over_range set and d0 = d1 = s;
//   - the latency, 2*ITER + NITER + 11 = 70 cycles.
module tb_dscs;
  import dscs_pkg::*;
  localparam int  RMAX = 27500;
  localparam int  LAT  = 70;
  localparam int  N    = 1000;
  localparam real PI   = 3.14159265358979;

  logic clk = 0, rst = 1, in_valid = 0;
  iq_t s, d0, d1;
  logic out_valid, over_range;
  int checks = 0, failures = 0, n_over = 0;

  dscs dut (.*);

  always #5 clk = ~clk;

  iq_t stim [N];
  int  t_in [N];
  int  cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic iq_t polar(input real r, input real a);
    polar.i = sample_t'($rtoi(r * $cos(a)));
    polar.q = sample_t'($rtoi(r * $sin(a)));
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      if (k < 50)       stim[k] = polar(20000.0 * k / 50.0, 0.3);
      else if (k < 100) stim[k] = polar(20000.0, 0.3);
      else if (k < 150) stim[k] = polar(20000.0 + 7500.0 * (k - 100) / 50.0, 0.3);
      else if (k < 170) stim[k] = polar(real'(RMAX), 0.3);
      else stim[k] = polar(1.15 * RMAX * ($urandom % 10000) / 10000.0,
                           2.0 * PI * ($urandom % 100000) / 100000.0);
    end
    s = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      in_valid <= 1; s <= stim[k]; t_in[k] = cyc;
    end
    @(posedge clk); in_valid <= 0;
  end

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  always @(posedge clk) if (!rst && out_valid) begin
    real si, sq, r, a, sr, ei, eq, m0, m1;
    si = real'(stim[nout].i); sq = real'(stim[nout].q);
    r  = $sqrt(si*si + sq*sq);
    a  = $atan2(sq, si);
    m0 = $sqrt(real'(d0.i)**2 + real'(d0.q)**2);
    m1 = $sqrt(real'(d1.i)**2 + real'(d1.q)**2);
    checks++;
    if (int'(d0.i) + int'(d1.i) != 2 * int'(stim[nout].i) ||
        int'(d0.q) + int'(d1.q) != 2 * int'(stim[nout].q)) begin
      failures++; $display("%0d: d0+d1 != 2s", nout);
    end
    if (r < RMAX - 2.0) begin
      sr = $sqrt(real'(RMAX)**2 - r*r);
      ei = -$sin(a) * sr; eq = $cos(a) * sr;
      checks++;
      // for s = 0 the outputs are (0, RMAX) and (0, -RMAX)
      if ((!near(real'(d0.i), si + ei, 4.0) || !near(real'(d0.q), sq + eq, 4.0) ||
          !near(real'(d1.i), si - ei, 4.0) || !near(real'(d1.q), sq - eq, 4.0))) begin
        failures++;
        $display("%0d: s=(%0d,%0d) d0=(%0d,%0d) exp (%f,%f)", nout, int'(stim[nout].i), int'(stim[nout].q),
                 int'(d0.i), int'(d0.q), si + ei, sq + eq);
      end
      checks++;
      if (!near(m0, RMAX, 4.0) || !near(m1, RMAX, 4.0) || over_range) begin
        failures++; $display("%0d: envelope %f %f", nout, m0, m1);
      end
    end else if (r > RMAX + 2.0) begin
      n_over++;
      checks++;
      if (!over_range || d0 != stim[nout] || d1 != stim[nout]) begin
        failures++; $display("%0d: over range not handled", nout);
      end
    end
    checks++;
    if (cyc - t_in[nout] != LAT + 1) begin  // +1: the drive edge
      failures++; $display("latency %0d", cyc - t_in[nout]);
    end
    nout++;
    if (nout == N) begin
      checks++;
      if (n_over == 0) begin
        failures++; $display("no over-range input exercised");
      end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (N + 300) @(posedge clk);
    failures++;
    $display("watchdog: only %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
