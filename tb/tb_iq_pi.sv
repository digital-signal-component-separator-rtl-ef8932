// tb_iq_pi: checks the I/Q PI controller against an integer model written
// here: integrator += ki*err clamped to +-32767*2^12, output =
// sat16((kp*err + integrator) >> 12). Phases: random errors and gains,
// a long constant error that drives the integrator into its clamp, and
// en = 0 (output and integrator zero). Latency 2 cycles is checked.
module tb_iq_pi;
  import dscs_pkg::*;
  localparam int GF = 12;
  localparam int N  = 3000;

  logic clk = 0, rst = 1, en = 0, in_valid = 0;
  iq_t err, ctrl;
  logic [15:0] kp, ki;
  logic out_valid;
  int checks = 0, failures = 0, n_clamp = 0, n_off = 0;

  iq_pi #(.GAIN_FRAC(GF)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  longint mi = 0, mq = 0;
  localparam longint LIM = 64'sd32767 <<< GF;

  function automatic longint clampl(input longint v);
    if (v > LIM) return LIM;
    if (v < -LIM) return -LIM;
    return v;
  endfunction
  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  int exp_i [$], exp_q [$], exp_t [$];

  initial begin
    err = '0; kp = 0; ki = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      sample_t ei, eq;
      logic    e;
      logic [15:0] p, i;
      e = !(k >= 2000 && k < 2300);
      if (k < 1000) begin
        ei = sample_t'($urandom) >>> ($urandom % 12); eq = sample_t'($urandom) >>> ($urandom % 12);
        p = 16'($urandom); i = 16'($urandom % 64);
      end else begin
        // hold a large error until the integrator clamps, then reverse it:
        // the output must come back as soon as the clamped value allows
        ei = 16'sd20000; eq = -16'sd20000; p = 16'd100; i = 16'd2000;
        if (k >= 1600) begin ei = -16'sd3000; eq = 16'sd3000; end
        if (k >= 2300) begin ei = -16'sd300; eq = 16'sd5; end
      end
      @(posedge clk);
      en <= e; in_valid <= 1; err <= '{i: ei, q: eq}; kp <= p; ki <= i;
      if (!e) begin
        mi = 0; mq = 0;
        exp_i.push_back(0); exp_q.push_back(0);
        n_off++;
      end else begin
        mi = clampl(mi + longint'(i) * longint'(ei));
        mq = clampl(mq + longint'(i) * longint'(eq));
        if (mi == LIM || mi == -LIM) n_clamp++;
        exp_i.push_back(sat((longint'(p) * longint'(ei) + mi) >>> GF));
        exp_q.push_back(sat((longint'(p) * longint'(eq) + mq) >>> GF));
      end
      exp_t.push_back(cyc);
    end
    @(posedge clk); in_valid <= 0;
  end

  int nout = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    int ei, eq, et;
    ei = exp_i.pop_front(); eq = exp_q.pop_front(); et = exp_t.pop_front();
    checks++;
    if (int'(ctrl.i) != ei || int'(ctrl.q) != eq) begin
      failures++;
      $display("%0d: got (%0d,%0d) exp (%0d,%0d)", nout, int'(ctrl.i), int'(ctrl.q), ei, eq);
    end
    checks++;
    if (cyc - et != 2 + 1) begin  // +1: the drive edge
      failures++; $display("latency %0d", cyc - et);
    end
    nout++;
    if (nout == N) begin
      checks += 2;
      if (n_clamp == 0) begin failures++; $display("integrator clamp never reached"); end
      if (n_off == 0)   begin failures++; $display("disable never exercised"); end
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog: only %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
