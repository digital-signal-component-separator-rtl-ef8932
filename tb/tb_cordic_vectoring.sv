// tb_cordic_vectoring: drives random I/Q vectors (and the four axis
// directions) into the vectoring CORDIC, one per clock, and compares the
// amplitude and phase with sqrt(I^2+Q^2) and atan2(Q,I) computed in real
// arithmetic (atan2(0,0) = 0). Tolerances: 2 LSB in amplitude, 0.02 degree in phase (larger
// for tiny vectors). Also checks the latency of ITER + 2 cycles (counted from the capturing
// clock edge; the testbench adds one for the edge at which it drives).
module tb_cordic_vectoring;
  import dscs_pkg::*;
  localparam int ITER = 18;
  localparam int N    = 400;
  localparam real PI  = 3.14159265358979;

  logic clk = 0, rst = 1, in_valid = 0;
  iq_t in_iq;
  logic out_valid;
  logic [15:0] mag;
  phase_t phase;
  int checks = 0, failures = 0;

  cordic_vectoring #(.ITER(ITER)) dut (.*);

  always #5 clk = ~clk;

  iq_t stim [N];
  int  t_in [N];
  int  cyc = 0;
  int  nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int k = 0; k < N; k++) begin
      case (k)
        0: stim[k] = '{i: 16'sd30000,  q: 16'sd0};
        1: stim[k] = '{i: 16'sd0,      q: 16'sd30000};
        2: stim[k] = '{i: -16'sd30000, q: 16'sd0};
        3: stim[k] = '{i: 16'sd0,      q: -16'sd30000};
        4: stim[k] = '{i: -16'sd32768, q: -16'sd32768};
        5: stim[k] = '{i: 16'sd0,      q: 16'sd0};
        default: stim[k] = '{i: sample_t'($urandom), q: sample_t'($urandom)};
      endcase
    end
    in_iq = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      in_valid <= 1; in_iq <= stim[k]; t_in[k] = cyc;
    end
    @(posedge clk); in_valid <= 0;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    real ei, eq, er, ea, ga, da;
    ei = real'(stim[nout].i); eq = real'(stim[nout].q);
    er = $sqrt(ei*ei + eq*eq);
    ea = $atan2(eq, ei) * 180.0 / PI;
    ga = real'(phase) * 360.0 / 16777216.0;
    da = ga - ea;
    if (da > 180.0) da -= 360.0;
    if (da < -180.0) da += 360.0;
    checks++;
    if ((real'(mag) - er > 2.0) || (er - real'(mag) > 2.0)) begin
      failures++; $display("mag mismatch %0d: got %0d exp %f", nout, mag, er);
    end
    checks++;
    if ((er > 100.0 || er == 0.0) && (da > 0.02 || da < -0.02)) begin
      failures++; $display("phase mismatch %0d: got %f exp %f", nout, ga, ea);
    end
    checks++;
    if (cyc - t_in[nout] != ITER + 2 + 1) begin  // +1: the drive edge
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
