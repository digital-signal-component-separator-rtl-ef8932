// tb_cordic_rotation: rotates random I/Q vectors by random phases (plus
// the 0, +-90 and 180 degree cases) and compares with
// (I cos(phi) - Q sin(phi), I sin(phi) + Q cos(phi)) computed in real
// arithmetic, allowing 3 LSB; the expected value is clipped to 16 bits like
// the block's output. Also checks the latency of ITER + 3 cycles.
module tb_cordic_rotation;
  import dscs_pkg::*;
  localparam int ITER = 18;
  localparam int N    = 400;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst = 1, in_valid = 0;
  iq_t in_iq;
  phase_t phase;
  logic out_valid;
  iq_t out_iq;
  int checks = 0, failures = 0;

  cordic_rotation #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  iq_t    stim [N];
  phase_t ph   [N];
  int t_in [N];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic real clip(input real v);
    if (v > 32767.0) return 32767.0;
    if (v < -32768.0) return -32768.0;
    return v;
  endfunction

  initial begin
    for (int k = 0; k < N; k++) begin
      stim[k] = '{i: sample_t'($urandom), q: sample_t'($urandom)};
      case (k)
        0: ph[k] = 24'd0;
        1: ph[k] = 24'h400000;
        2: ph[k] = 24'hc00000;
        3: ph[k] = 24'h800000;
        default: ph[k] = phase_t'($urandom);
      endcase
    end
    in_iq = '0; phase = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      in_valid <= 1; in_iq <= stim[k]; phase <= ph[k]; t_in[k] = cyc;
    end
    @(posedge clk); in_valid <= 0;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    real a, xi, yq, ex, ey;
    a  = real'(ph[nout]) * 2.0 * PI / 16777216.0;
    xi = real'(stim[nout].i); yq = real'(stim[nout].q);
    ex = clip(xi * $cos(a) - yq * $sin(a));
    ey = clip(xi * $sin(a) + yq * $cos(a));
    checks++;
    if (real'(out_iq.i) - ex > 3.0 || ex - real'(out_iq.i) > 3.0 ||
        real'(out_iq.q) - ey > 3.0 || ey - real'(out_iq.q) > 3.0) begin
      failures++;
      $display("rot %0d: got (%0d,%0d) exp (%f,%f)", nout, out_iq.i, out_iq.q, ex, ey);
    end
    checks++;
    if (cyc - t_in[nout] != ITER + 3 + 1) begin  // +1: the drive edge
      failures++; $display("latency %0d", cyc - t_in[nout]);
    end
    nout++;
    if (nout == N) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (N + 200) @(posedge clk);
    failures++;
    $display("watchdog: only %0d outputs", nout);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
