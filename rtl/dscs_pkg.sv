// dscs_pkg: types and constants shared by the outphasing signal component
// separator (DSCS) datapath.
//
// Baseband signals are 16-bit signed I/Q pairs (iq_t). Phases are 24-bit
// two's-complement numbers where 2^24 is a full turn, so the wrap-around of
// the phase accumulator and of the CORDIC angle arithmetic is free.
// The arctangent table below is atan(2^-i) / (2*pi) * 2^24, rounded; the
// gain constants are round(2^16 / K) for the circular CORDIC gain
// K = prod sqrt(1 + 2^-2i) = 1.64676 and for the hyperbolic gain
// K_h = prod sqrt(1 - 2^-2i) = 0.82816 (iterations 4 and 13 repeated).
// All widths are choices of this design; the separator's equations do not
// fix them.
package dscs_pkg;

  localparam int IQ_W  = 16;
  localparam int PH_W  = 24;

  typedef logic signed [IQ_W-1:0] sample_t;
  typedef logic signed [PH_W-1:0] phase_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  localparam phase_t PHASE_90 = phase_t'(1 << (PH_W - 2));

  // round(2^16 / 1.6467602581) : removes the circular CORDIC gain
  localparam logic [16:0] INV_K_CIRC = 17'd39797;
  // round(2^16 / 0.8281593610) : removes the hyperbolic CORDIC gain
  localparam logic [17:0] INV_K_HYP  = 18'd79135;

  // atan(2^-i) in units of 2^-24 turn
  function automatic phase_t atan_tab(input int i);
    case (i)
      0:  return phase_t'(2097152);
      1:  return phase_t'(1238021);
      2:  return phase_t'(654136);
      3:  return phase_t'(332050);
      4:  return phase_t'(166669);
      5:  return phase_t'(83416);
      6:  return phase_t'(41718);
      7:  return phase_t'(20860);
      8:  return phase_t'(10430);
      9:  return phase_t'(5215);
      10: return phase_t'(2608);
      11: return phase_t'(1304);
      12: return phase_t'(652);
      13: return phase_t'(326);
      14: return phase_t'(163);
      15: return phase_t'(81);
      16: return phase_t'(41);
      17: return phase_t'(20);
      18: return phase_t'(10);
      19: return phase_t'(5);
      default: return phase_t'(0);
    endcase
  endfunction

  // shift index of hyperbolic iteration k (k = 0, 1, ...): 1,2,3,4,4,5,...,13,13,14,...
  function automatic int hyp_shift(input int k);
    if (k < 4)       return k + 1;
    else if (k < 14) return k;
    else             return k - 1;
  endfunction

  // saturate a wide signed value to a 16-bit sample
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -48'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v[15:0]);
  endfunction

endpackage
