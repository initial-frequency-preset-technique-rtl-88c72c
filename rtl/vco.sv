// vco: behavioural model of the LC VCO (not synthesizable).
//
// The oscillator covers 4.3-5.3 GHz with a 6-bit binary-weighted capacitor
// bank (64 tuning curves) and a varactor tuned by V_tune. Each curve is
// modelled as
//   f = F0 + cap * CAP_STEP + KVCO * V_tune + BOW * 4*(v-V_LO)*(V_HI-v)/(V_HI-V_LO)^2
// a straight line plus a parabolic bow that peaks at BOW in the middle of the
// 0.3-0.7 V tuning range and stands for the residual non-linearity left by
// the varactor averaging. The defaults put curve 0 at 4.3 GHz for 0.3 V and
// curve 63 at 5.3 GHz for 0.7 V (15.625 MHz per code), use K_VCO = 40 MHz/V
// (the gain used in the design's lock-time study) and a 1 MHz bow (the
// design's VCO keeps this error under 1.25 MHz). The output toggles every
// half period, the period being recomputed from V_tune at each half cycle, so
// the phase is continuous when V_tune moves.
//
// Interface: V_tune in volts (real), capacitor code, VCO clock out.
module vco #(
  parameter real F0_MHZ       = 4288.0,   // curve 0 at V_tune = 0 V
  parameter real CAP_STEP_MHZ = 15.625,   // 1000 MHz / 64 codes
  parameter real KVCO_MHZ_V   = 40.0,
  parameter real BOW_MHZ      = 1.0,
  parameter real V_LO         = 0.3,
  parameter real V_HI         = 0.7
) (
  input  real        v_tune,
  input  logic [5:0] cap,
  output logic       clk
);
  timeunit 1ns; timeprecision 1fs;

  function automatic real freq_mhz(input real v, input logic [5:0] c);
    real vc;
    vc = (v < 0.0) ? 0.0 : (v > 1.0) ? 1.0 : v;
    return F0_MHZ + real'(c) * CAP_STEP_MHZ + KVCO_MHZ_V * vc
         + BOW_MHZ * 4.0 * (vc - V_LO) * (V_HI - vc) / ((V_HI - V_LO) * (V_HI - V_LO));
  endfunction

  initial clk = 1'b0;

  always begin
    #(500.0 / freq_mhz(v_tune, cap));
    clk = ~clk;
  end
endmodule
