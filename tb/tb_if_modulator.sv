// tb_if_modulator: random baseband vectors and carrier samples, including
// full-scale values that saturate; expected
// dac = sat16((I*cos - Q*sin + 2^14) >> 15) is computed here with 64-bit
// integers. Latency 2 cycles is checked.
module tb_if_modulator;
  import dscs_pkg::*;
  localparam int N = 2000;

  logic clk = 0, rst = 1, in_valid = 0;
  iq_t u;
  sample_t cos_i, sin_i, dac;
  logic out_valid;
  int checks = 0, failures = 0, n_sat = 0;

  if_modulator dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int exp_v [$], exp_t [$];

  initial begin
    u = '0; cos_i = '0; sin_i = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      sample_t a, b, c, s;
      longint v;
      a = sample_t'($urandom); b = sample_t'($urandom);
      c = sample_t'($urandom); s = sample_t'($urandom);
      if (k < 4) begin a = -16'sd32768; b = 16'sd32767; c = -16'sd32768; s = 16'sd32767; end
      @(posedge clk);
      in_valid <= 1; u <= '{i: a, q: b}; cos_i <= c; sin_i <= s;
      v = (longint'(a) * longint'(c) - longint'(b) * longint'(s) + 16384) >>> 15;
      if (v > 32767) begin v = 32767; n_sat++; end
      if (v < -32768) begin v = -32768; n_sat++; end
      exp_v.push_back(int'(v));
      exp_t.push_back(cyc);
    end
    @(posedge clk); in_valid <= 0;
  end

  int nout = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    int ev, et;
    ev = exp_v.pop_front(); et = exp_t.pop_front();
    checks++;
    if (int'(dac) != ev) begin
      failures++; $display("%0d: got %0d exp %0d", nout, int'(dac), ev);
    end
    checks++;
    if (cyc - et != 2 + 1) begin failures++; $display("latency %0d", cyc - et); end
    nout++;
    if (nout == N) begin
      checks++;
      if (n_sat == 0) begin failures++; $display("saturation never exercised"); end
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
