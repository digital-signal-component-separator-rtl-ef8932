// nco: numerically controlled oscillator for the IF carrier shared by the
// two IF modulators. A 32-bit phase accumulator advances by FTW every
// clock, f_IF = FTW / 2^32 * f_clk; its top 24 bits rotate the vector
// (AMP, 0) in the rotation CORDIC, giving AMP*cos and AMP*sin.
//
// FTW defaults to 2^30, a quarter of the sample rate: with a 100.625 MHz
// (805 MHz / 8) sample clock this is the 25.15625 MHz IF. The clock
// frequency, the accumulator width and the CORDIC-based sine are this
// design's choices; the source design uses a vendor NCO core for the same
// purpose.
//
// Interface: free-running after reset; valid rises once the CORDIC pipeline
// has filled (ITER + 3 cycles). cos_o/sin_o are 16-bit signed.
module nco
  import dscs_pkg::*;
#(
  parameter logic [31:0] FTW  = 32'h4000_0000,
  parameter int          AMP  = 32767,
  parameter int          ITER = 18
) (
  input  logic    clk,
  input  logic    rst,
  output sample_t cos_o,
  output sample_t sin_o,
  output logic    valid
);
  logic [31:0] acc;
  always_ff @(posedge clk) begin
    if (rst) acc <= '0;
    else     acc <= acc + FTW;
  end

  iq_t amp_vec, rot;
  assign amp_vec.i = sample_t'(AMP);
  assign amp_vec.q = '0;

  cordic_rotation #(.ITER(ITER)) u_rot (
    .clk, .rst, .in_valid(1'b1), .in_iq(amp_vec), .phase(phase_t'(acc[31:8])),
    .out_valid(valid), .out_iq(rot)
  );

  assign cos_o = rot.i;
  assign sin_o = rot.q;

endmodule
