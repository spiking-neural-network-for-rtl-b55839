// izh_v_eq: the "v" equation of the Izhikevich neuron, one Euler step.
//
// Works in units of 0.1 mV with FRAC fraction bits (see snn_pkg):
//   V' = 0.004 V^2 + 5 V + 1400 - U + I,   V(t+dt) = V + dt * V'
// with dt = 2^-DT_SHIFT ms.  If the stored V has reached the 30 mV threshold,
// the step instead applies the after-spike reset V <- c and raises spike, so
// the over-threshold value is visible in the store for one step before the
// reset.  V is saturated to the 13-bit integer range.  Purely combinational;
// the "v" store register lives in izh_neuron.  Equations and threshold follow
// the document; the fixed-point format and dt are this design's choices.
module izh_v_eq
  import snn_pkg::*;
#(
  parameter int unsigned DT_SHIFT = 1,     // dt = 0.5 ms
  parameter int          C_MV10   = -650   // c = -65 mV
) (
  input  state_t v,
  input  state_t u,
  input  cur_t   i_in,
  output state_t v_next,
  output logic   spike
);

  localparam longint VTH_F  = longint'(VTH_MV10) <<< FRAC;
  localparam longint VMAX_F = longint'(VMAX) <<< FRAC;
  localparam longint VMIN_F = longint'(VMIN) <<< FRAC;

  longint vl, sq, dv, vn;

  always_comb begin
    vl = longint'(v);
    sq = (vl * vl * longint'(K_SQ_Q16)) >>> (FRAC + 16);
    dv = sq + longint'(K_LIN) * vl + (longint'(K_CONST) <<< FRAC)
         - longint'(u) + (longint'(i_in) <<< FRAC);
    vn = vl + (dv >>> DT_SHIFT);
    spike = (vl >= VTH_F);
    if (spike)            v_next = state_t'(longint'(C_MV10) <<< FRAC);
    else if (vn > VMAX_F) v_next = state_t'(VMAX_F);
    else if (vn < VMIN_F) v_next = state_t'(VMIN_F);
    else                  v_next = state_t'(vn);
  end

endmodule
