// tb_cordic_sqrt: feeds edge values (0, 1, small numbers, 2^32-1, the
// separator's RMAX^2) and random 32-bit numbers of random magnitude into the
// hyperbolic square-root CORDIC and compares with round(sqrt(p)) computed in
// real arithmetic, allowing 1 LSB. Also checks the latency of NITER + 4 cycles.
module tb_cordic_sqrt;
  localparam int NITER = 23;
  localparam int N     = 500;

  logic clk = 0, rst = 1, in_valid = 0;
  logic [31:0] p;
  logic out_valid;
  logic [15:0] root;
  int checks = 0, failures = 0;

  cordic_sqrt #(.NITER(NITER)) dut (.*);

  always #5 clk = ~clk;

  logic [31:0] stim [N];
  int t_in [N];
  int cyc = 0, nout = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    for (int k = 0; k < N; k++) begin
      case (k)
        0: stim[k] = 32'd0;
        1: stim[k] = 32'd1;
        2: stim[k] = 32'd2;
        3: stim[k] = 32'd3;
        4: stim[k] = 32'hffff_ffff;
        5: stim[k] = 32'd756250000;
        6: stim[k] = 32'd1 << 30;
        7: stim[k] = 32'd99;
        default: stim[k] = $urandom >> ($urandom % 32);
      endcase
    end
    p = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int k = 0; k < N; k++) begin
      @(posedge clk);
      in_valid <= 1; p <= stim[k]; t_in[k] = cyc;
    end
    @(posedge clk); in_valid <= 0;
  end

  always @(posedge clk) if (!rst && out_valid) begin
    real ex;
    ex = $sqrt(real'(stim[nout]));
    checks++;
    if (real'(root) - ex > 1.0 || ex - real'(root) > 1.0) begin
      failures++; $display("sqrt(%0d): got %0d exp %f", stim[nout], root, ex);
    end
    checks++;
    if (cyc - t_in[nout] != NITER + 4 + 1) begin  // +1: the drive edge
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
