// vtune_ctrl: behavioural model of the V_tune controller (not synthesizable).
//
// While switch S2 is closed it drives the VCO tuning node directly, in turn
// with V_L and V_H (given as codes on the DAC's scale, VFS * code / 2^10),
// and, while the loop filter is being precharged, with the DAC's V_target.
// The tuning node carries only the small VCO and C3 load, so the model drives
// it without delay. Driving V_target during the precharge step is this
// design's reading of the timing diagram; the design lists V_H and V_L as
// this block's voltages.
//
// Interface: selection and codes in, DAC voltage in, output voltage (real).
module vtune_ctrl
  import ifp_pkg::*;
#(
  parameter real VFS = 1.0
) (
  input  vsel_e             vsel,
  input  logic [DAC_W-1:0]  vl_code,
  input  logic [DAC_W-1:0]  vh_code,
  input  real               v_target,
  output real               v_out
);
  timeunit 1ns; timeprecision 1fs;

  always_comb begin
    unique case (vsel)
      VSEL_VL:     v_out = real'(vl_code) * VFS / real'(2 ** DAC_W);
      VSEL_VH:     v_out = real'(vh_code) * VFS / real'(2 ** DAC_W);
      default:     v_out = v_target;
    endcase
  end
endmodule
