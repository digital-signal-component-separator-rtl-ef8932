// cavity_controller: cavity field controller ahead of the separator. A PI
// controller acts on the field error sp - y (set point minus measured
// cavity field, both I/Q) and the beam feedforward term ff is added:
//
//   u = C_PI(sp - y) + ff
//
// u is the AM-PM vector handed to the separator. With en low the PI
// integrator is cleared and u = ff (open loop).
//
// Cycle 1 forms the saturated error (en and the gains are registered with
// it, so they apply to the same sample), cycles 2-3 are the PI controller,
// cycle 4 adds the delayed feedforward and saturates. Latency: 4 cycles.
// That the cavity controller is PI and that the feedforward is added after
// it follows the source design; the sign convention of the error and all
// widths are this design's choices. The feedforward controller itself is
// outside this design and enters as ff.
module cavity_controller
  import dscs_pkg::*;
#(
  parameter int GAIN_FRAC = 12
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic        in_valid,
  input  iq_t         sp,
  input  iq_t         y,
  input  iq_t         ff,
  input  logic [15:0] kp,
  input  logic [15:0] ki,
  output logic        out_valid,
  output iq_t         u
);
  iq_t  err, ff1;
  logic v1, en1;
  logic [15:0] kp1, ki1;
  always_ff @(posedge clk) begin
    if (rst) begin
      err <= '0; ff1 <= '0; v1 <= 1'b0; en1 <= 1'b0; kp1 <= '0; ki1 <= '0;
    end else begin
      v1    <= in_valid;
      en1   <= en;
      kp1   <= kp;
      ki1   <= ki;
      ff1   <= ff;
      err.i <= sat16(48'(sp.i) - 48'(y.i));
      err.q <= sat16(48'(sp.q) - 48'(y.q));
    end
  end

  iq_t  c;
  logic cv;
  iq_pi #(.GAIN_FRAC(GAIN_FRAC)) u_pi (
    .clk, .rst, .en(en1), .in_valid(v1), .err, .kp(kp1), .ki(ki1),
    .out_valid(cv), .ctrl(c)
  );

  iq_t ff3;
  delay_line #(.WIDTH($bits(iq_t)), .DEPTH(2)) u_dly_ff (
    .clk, .rst, .din(ff1), .dout(ff3)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      u <= '0; out_valid <= 1'b0;
    end else begin
      out_valid <= cv;
      u.i       <= sat16(48'(ff3.i) + 48'(c.i));
      u.q       <= sat16(48'(ff3.q) + 48'(c.q));
    end
  end

endmodule
