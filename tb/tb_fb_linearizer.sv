// tb_fb_linearizer: tests the feedback linearizer in three phases.
//  1. Open loop: random set points r and measurements y; every output is
//     compared with an integer model written here, u = sat16(r + PI(r - y)).
//  2. Closed loop, enabled: an amplifier model y = g * e^{j phi} * u with a
//     10 % gain droop and a 5 degree phase error closes the loop; after it
//     settles y must equal r within 4 LSB.
//  3. Closed loop, disabled: u must equal r exactly.
// The model check and the 4-cycle latency check run in all phases.
module tb_fb_linearizer;
  import dscs_pkg::*;
  localparam int  GF  = 12;
  localparam int  N1  = 1000, N2 = 3000, N3 = 500;
  localparam int  N   = N1 + N2 + N3;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst = 1, en = 0, in_valid = 0;
  iq_t r, y, u;
  logic [15:0] kp, ki;
  logic out_valid;
  int checks = 0, failures = 0, n_settled = 0;

  fb_linearizer #(.GAIN_FRAC(GF)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sat(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction
  localparam longint LIM = 64'sd32767 <<< GF;
  function automatic longint clampl(input longint v);
    if (v > LIM) return LIM;
    if (v < -LIM) return -LIM;
    return v;
  endfunction

  longint mi = 0, mq = 0;
  int exp_i [$], exp_q [$], exp_t [$], ph [$];
  iq_t rq [$], yq [$];

  initial begin
    r = '0; y = '0; kp = 0; ki = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      iq_t rr, yy;
      logic ee;
      logic [15:0] p, i;
      int er, eqq;
      @(posedge clk);
      if (k < N1) begin
        rr = '{i: sample_t'($urandom), q: sample_t'($urandom)};
        yy = '{i: sample_t'($urandom), q: sample_t'($urandom)};
        p = 16'($urandom % 8192); i = 16'($urandom % 256); ee = 1'b1;
      end else begin
        real g, a;
        g  = 0.9; a = 5.0 * PI / 180.0;
        rr = '{i: 16'sd19000, q: 16'sd19800};
        yy.i = sample_t'($rtoi(g * ($cos(a) * real'(u.i) - $sin(a) * real'(u.q))));
        yy.q = sample_t'($rtoi(g * ($sin(a) * real'(u.i) + $cos(a) * real'(u.q))));
        p = 16'd2048; i = 16'd100; ee = (k < N1 + N2);
      end
      en <= ee; in_valid <= 1; r <= rr; y <= yy; kp <= p; ki <= i;
      // model
      er  = sat(longint'(rr.i) - longint'(yy.i));
      eqq = sat(longint'(rr.q) - longint'(yy.q));
      if (!ee) begin
        mi = 0; mq = 0;
        exp_i.push_back(int'(rr.i)); exp_q.push_back(int'(rr.q));
      end else begin
        mi = clampl(mi + longint'(i) * er);
        mq = clampl(mq + longint'(i) * eqq);
        exp_i.push_back(sat(longint'(rr.i) + sat((longint'(p) * er + mi) >>> GF)));
        exp_q.push_back(sat(longint'(rr.q) + sat((longint'(p) * eqq + mq) >>> GF)));
      end
      exp_t.push_back(cyc);
      ph.push_back(k < N1 ? 1 : (k < N1 + N2 ? 2 : 3));
      rq.push_back(rr); yq.push_back(yy);
    end
    @(posedge clk); in_valid <= 0;
  end

  int nout = 0;
  always @(posedge clk) if (!rst && out_valid) begin
    int ei, eq, et, p;
    iq_t rr, yy;
    ei = exp_i.pop_front(); eq = exp_q.pop_front(); et = exp_t.pop_front();
    p = ph.pop_front(); rr = rq.pop_front(); yy = yq.pop_front();
    checks++;
    if (int'(u.i) != ei || int'(u.q) != eq) begin
      failures++; $display("%0d: got (%0d,%0d) exp (%0d,%0d)", nout, int'(u.i), int'(u.q), ei, eq);
    end
    checks++;
    if (cyc - et != 4 + 1) begin failures++; $display("latency %0d", cyc - et); end
    // settled closed loop: the amplifier output follows r
    if (p == 2 && nout >= N1 + N2 - 500) begin
      checks++; n_settled++;
      if (int'(yy.i) - int'(rr.i) > 4 || int'(rr.i) - int'(yy.i) > 4 ||
          int'(yy.q) - int'(rr.q) > 4 || int'(rr.q) - int'(yy.q) > 4) begin
        failures++; $display("%0d: not settled y=(%0d,%0d)", nout, int'(yy.i), int'(yy.q));
      end
    end
    if (p == 3) begin
      checks++;
      if (u != rr) begin failures++; $display("%0d: disabled but u != r", nout); end
    end
    nout++;
    if (nout == N) begin
      checks++;
      if (n_settled == 0) begin failures++; $display("no settled samples"); end
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
