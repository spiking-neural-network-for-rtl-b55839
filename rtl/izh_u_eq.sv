// izh_u_eq: the "u" equation of the Izhikevich neuron, one Euler step.
//
//   U' = a (b V - U),   U(t+dt) = U + dt * U'   (dt = 2^-DT_SHIFT ms)
// and, in the step that resets V after a spike, U <- U + d instead.  a and b
// are unsigned Q16 fractions, d is in units of 0.1 mV.  Defaults are the
// document's representative values a = 0.02, b = 0.2, d = 2.  Purely
// combinational; the "u" store register lives in izh_neuron.
module izh_u_eq
  import snn_pkg::*;
#(
  parameter int unsigned DT_SHIFT = 1,
  parameter int unsigned A_Q16    = 1311,   // a = 0.02
  parameter int unsigned B_Q16    = 13107,  // b = 0.2
  parameter int          D_MV10   = 20      // d = 2
) (
  input  state_t v,
  input  state_t u,
  input  logic   spike,    // after-spike reset step
  output state_t u_next
);

  longint bv, du;

  always_comb begin
    bv = (longint'(v) * longint'(B_Q16)) >>> 16;
    du = (longint'(A_Q16) * (bv - longint'(u))) >>> (16 + DT_SHIFT);
    if (spike) u_next = state_t'(longint'(u) + (longint'(D_MV10) <<< FRAC));
    else       u_next = state_t'(longint'(u) + du);
  end

endmodule
