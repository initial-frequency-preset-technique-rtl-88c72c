// precharger: behavioural model of the precharge amplifier (not synthesizable).
//
// In silicon: a common-mode adapter that shifts a high input common mode
// down, a two-stage op-amp and a class-AB inverter output stage, connected as
// a unity-gain follower whose output drives the loop-filter node V_LF through
// switch S1. The model is a transconductor with current limit:
//   i_out = clamp(GM * (v_inp - v_fb), -I_MAX, +I_MAX)
// with the follower's own output (V_LF) as v_fb. With the default 50 mS and
// 3 mA it slews a 2.3 nF load by 0.9 V and settles it within 1 us, as the
// design's precharger does. Inputs outside 0..VDD are clipped (the output
// cannot pass the rails). The follower function, the 2.3 nF / 1 us target and
// VDD follow the design; GM, I_MAX and the transconductor form are this
// model's choice.
//
// Interface: non-inverting input and feedback node in volts, output current
// in amperes (positive into the node), all real.
module precharger #(
  parameter real GM    = 0.05,    // S
  parameter real I_MAX = 3.0e-3,  // A
  parameter real VDD   = 1.0
) (
  input  real v_inp,
  input  real v_fb,
  output real i_out
);
  timeunit 1ns; timeprecision 1fs;

  real v_in_c, i_lin;
  always_comb begin
    v_in_c = (v_inp < 0.0) ? 0.0 : (v_inp > VDD) ? VDD : v_inp;
    i_lin  = GM * (v_in_c - v_fb);
    i_out  = (i_lin > I_MAX) ? I_MAX : (i_lin < -I_MAX) ? -I_MAX : i_lin;
  end
endmodule
