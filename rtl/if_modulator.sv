// if_modulator: quadrature up-conversion of a baseband I/Q drive to the
// intermediate frequency, the sample stream for one DAC:
//
//   dac = (I * cos(w t) - Q * sin(w t)) / 2^15
//
// cos/sin come from the shared NCO. Cycle 1 forms the two products, cycle 2
// subtracts, rounds and saturates to 16 bits. Latency: 2 cycles. The
// modulator's place in the chain follows the source design; its arithmetic
// and the 16-bit DAC word are this design's choices.
module if_modulator
  import dscs_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  iq_t     u,
  input  sample_t cos_i,
  input  sample_t sin_i,
  output logic    out_valid,
  output sample_t dac
);
  logic signed [31:0] pi, pq;
  logic               v1;
  always_ff @(posedge clk) begin
    if (rst) begin
      pi <= '0; pq <= '0; v1 <= 1'b0;
    end else begin
      v1 <= in_valid;
      pi <= u.i * cos_i;
      pq <= u.q * sin_i;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dac <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= v1;
      dac       <= sat16((48'(pi) - 48'(pq) + 48'sd16384) >>> 15);
    end
  end

endmodule
