// tb_nco: two NCOs, one with the default tuning word (a quarter of the
// sample rate: the carrier must run cos = 32767, 0, -32767, 0, ...) and one
// with an arbitrary word. Output n must equal AMP*cos(2 pi n FTW / 2^32)
// and AMP*sin(...) within 3 LSB, with output 0 belonging to phase 0. The
// fill time of ITER + 3 cycles after reset is checked.
module tb_nco;
  import dscs_pkg::*;
  localparam int  N   = 2000;
  localparam real PI  = 3.14159265358979;
  localparam logic [31:0] FTW2 = 32'h1234_5679;

  logic clk = 0, rst = 1;
  sample_t c0, s0, c1, s1;
  logic v0, v1;
  int checks = 0, failures = 0;

  nco u_def (.clk, .rst, .cos_o(c0), .sin_o(s0), .valid(v0));
  nco #(.FTW(FTW2)) u_alt (.clk, .rst, .cos_o(c1), .sin_o(s1), .valid(v1));

  always #5 clk = ~clk;

  int cyc = 0, t_rst = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0; t_rst = cyc;
  end

  function automatic bit near(input real a, input real b);
    return (a - b <= 3.0) && (b - a <= 3.0);
  endfunction

  int n = 0;
  always @(posedge clk) if (!rst && v0) begin
    real a0, a1;
    if (n == 0) begin
      checks++;
      if (cyc - t_rst != 18 + 3 + 1) begin failures++; $display("fill time %0d", cyc - t_rst); end
    end
    a0 = 2.0 * PI * real'(n % 4) / 4.0;
    a1 = 2.0 * PI * real'(32'(n * FTW2)) / 4294967296.0;
    checks++;
    if (!near(real'(c0), 32767.0 * $cos(a0)) || !near(real'(s0), 32767.0 * $sin(a0))) begin
      failures++; $display("default %0d: (%0d,%0d)", n, int'(c0), int'(s0));
    end
    checks++;
    if (!v1 || !near(real'(c1), 32767.0 * $cos(a1)) || !near(real'(s1), 32767.0 * $sin(a1))) begin
      failures++; $display("alt %0d: (%0d,%0d) exp (%f,%f)", n, int'(c1), int'(s1),
                           32767.0 * $cos(a1), 32767.0 * $sin(a1));
    end
    n++;
    if (n == N) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
