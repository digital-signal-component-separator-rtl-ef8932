// cordic_sqrt: square root of a 32-bit unsigned number by a hyperbolic
// CORDIC. The separator uses it for sqrt(r_max^2 - r^2), the length of the
// projecting vector e.
//
// The hyperbolic CORDIC in vectoring mode turns (x, y) into
// K_h * sqrt(x^2 - y^2). With x = p' + c and y = p' - c this is
// K_h * sqrt(4 p' c). Stage 0 shifts p left by an even count 2n so that
// p' = p * 4^n lies in [2^30, 2^32); with c = 2^30 the ratio y/x stays below
// 0.6, inside the CORDIC's convergence range (0.80). The iterations use shifts
// 1..NITER with 4 and 13 repeated, as the hyperbolic CORDIC needs. The last
// stage multiplies by 1/K_h and shifts right by 16 + 16 + n, which undoes
// both c and the normalisation, and rounds to an integer.
//
// Interface: one value per clock, in_valid/out_valid mark valid data.
// Latency: NITER + 4 cycles. root = round(sqrt(p)), saturated to 65535.
// That a CORDIC computes the square root follows the source design; the
// normalisation and all widths are this design's choices.
module cordic_sqrt
  import dscs_pkg::*;
#(
  parameter int NITER = 23
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  logic [31:0] p,
  output logic        out_valid,
  output logic [15:0] root
);
  localparam int W     = 36;
  localparam int NST   = NITER + 2;  // stages including the two repeats
  localparam int SH_NW = 5;

  // stage 0: even normalisation
  function automatic logic [SH_NW-1:0] lead_zeros(input logic [31:0] v);
    for (int b = 31; b >= 0; b--)
      if (v[b]) return SH_NW'(31 - b);
    return SH_NW'(0);
  endfunction

  logic [SH_NW-1:0] lz;
  logic [SH_NW-1:0] shift_even;
  logic [31:0]      pn;
  assign lz         = lead_zeros(p);
  assign shift_even = lz & ~SH_NW'(1);
  assign pn         = p << shift_even;

  logic signed [W-1:0] xs [0:NST];
  logic signed [W-1:0] ys [0:NST];
  logic [SH_NW-2:0]    half_sh [0:NST];
  logic                zero    [0:NST];
  logic [NST+1:0]      vld;

  always_ff @(posedge clk) begin
    if (rst) begin
      xs[0] <= '0; ys[0] <= '0; half_sh[0] <= '0; zero[0] <= 1'b1;
    end else begin
      xs[0]      <= W'(pn) + W'(64'd1 << 30);
      ys[0]      <= W'(pn) - W'(64'd1 << 30);
      half_sh[0] <= shift_even[SH_NW-1:1];
      zero[0]    <= (p == 32'd0);
    end
  end

  for (genvar k = 0; k < NST; k++) begin : g_iter
    localparam int S = hyp_shift(k);
    always_ff @(posedge clk) begin
      if (rst) begin
        xs[k+1] <= '0; ys[k+1] <= '0; half_sh[k+1] <= '0; zero[k+1] <= 1'b1;
      end else begin
        if (ys[k] >= 0) begin
          xs[k+1] <= xs[k] - (ys[k] >>> S);
          ys[k+1] <= ys[k] - (xs[k] >>> S);
        end else begin
          xs[k+1] <= xs[k] + (ys[k] >>> S);
          ys[k+1] <= ys[k] + (xs[k] >>> S);
        end
        half_sh[k+1] <= half_sh[k];
        zero[k+1]    <= zero[k];
      end
    end
  end

  // gain removal, de-normalisation and rounding
  logic [W+17:0] prod;
  logic [W+17:0] rounded;
  logic [5:0]    rsh;
  assign prod    = (W+18)'($unsigned(xs[NST])) * (W+18)'(INV_K_HYP);
  assign rsh     = 6'd32 + 6'(half_sh[NST]);
  assign rounded = (prod + ((W+18)'(1) << (rsh - 6'd1))) >> rsh;

  always_ff @(posedge clk) begin
    if (rst) begin
      root <= '0;
      vld  <= '0;
    end else begin
      root <= zero[NST] ? 16'd0 : (rounded > 65535) ? 16'hffff : rounded[15:0];
      vld  <= {vld[NST:0], in_valid};
    end
  end

  assign out_valid = vld[NST+1];

endmodule
