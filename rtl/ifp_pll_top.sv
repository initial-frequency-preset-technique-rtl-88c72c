// ifp_pll_top: delta-sigma fractional-N PLL with initial frequency preset.
//
// Start-up runs in two phases. Open loop (S2 closed, S4/S5 open): the
// preset circuit measures the VCO at V_L and V_H, computes V_target for
// N_target by linear interpolation, and precharges the loop filter to
// V_target through the DAC and precharger (S1, S3 closed). Closed loop: S4,
// S5 close and Flag rises; a D flip-flop on f_REF turns Flag into EN, which
// starts the PFD, charge pump, feedback divider and MASH 1-1-1 modulator on
// the same reference edge, so the loop begins close in both frequency and
// phase. The VCO capacitor code comes from a coarse calibration that runs
// before the preset and is an input here.
//
// Digital blocks are synthesizable; the VCO, DAC, precharger, V_tune
// controller, charge pump and loop filter are behavioural models with real
// (volt, ampere, coulomb) signals, so this top is for simulation.
//
// Interface: f_REF (40 MHz) in, active-low reset, `start` pulse, k_IFP,
// k_charge, N_target (8.20 fixed point), V_L/V_H codes and capacitor code.
// Outputs the VCO and divider clocks, Flag, EN, the computed code, the
// measured counts and the analog node voltages.
module ifp_pll_top
  import ifp_pkg::*;
(
  input  logic               clk_ref,
  input  logic               rst_n,
  input  logic               start,
  input  logic [K_W-1:0]     k_ifp,
  input  logic [K_W-1:0]     k_charge,
  input  logic [N_W-1:0]     n_target,
  input  logic [DAC_W-1:0]   vl_code,
  input  logic [DAC_W-1:0]   vh_code,
  input  logic [CAP_W-1:0]   cap_code,     // from the coarse VCO calibration
  output logic               f_vco,
  output logic               f_div,
  output logic               flag,
  output logic               en,
  output logic               busy,
  output logic [DAC_W-1:0]   vtarget_code,
  output logic [CNT_W-1:0]   cnt_l,
  output logic [CNT_W-1:0]   cnt_h,
  output logic               calc_sat,
  output logic               calc_err,
  output switches_t          sw,
  output logic               up,
  output logic               dn,
  output real                v_tune,
  output real                v_lf,
  output real                v_c1
);
  timeunit 1ns; timeprecision 1fs;

  vsel_e             vsel;
  logic [DAC_W-1:0]  vl_used, vh_used;
  logic signed [3:0] dsm_y;
  real               v_dac, v_ctrl, i_pc, q_cp;

  ifp_digital u_ifp (
    .clk_ref      (clk_ref),
    .clk_vco      (f_vco),
    .rst_n        (rst_n),
    .start        (start),
    .k_ifp        (k_ifp),
    .k_charge     (k_charge),
    .n_target     (n_target),
    .vl_code      (vl_code),
    .vh_code      (vh_code),
    .sw           (sw),
    .vsel         (vsel),
    .vtarget_code (vtarget_code),
    .vl_used      (vl_used),
    .vh_used      (vh_used),
    .cnt_l        (cnt_l),
    .cnt_h        (cnt_h),
    .calc_sat     (calc_sat),
    .calc_err     (calc_err),
    .flag         (flag),
    .busy         (busy)
  );

  // Voltage presetter: DAC, precharger, V_tune controller.
  dac_r2r u_dac (
    .code  (vtarget_code),
    .v_out (v_dac)
  );

  precharger u_pc (
    .v_inp (v_dac),
    .v_fb  (v_lf),
    .i_out (i_pc)
  );

  vtune_ctrl u_vtc (
    .vsel     (vsel),
    .vl_code  (vl_used),
    .vh_code  (vh_used),
    .v_target (v_dac),
    .v_out    (v_ctrl)
  );

  // Closed-loop PLL.
  en_sync u_en (
    .clk_ref (clk_ref),
    .rst_n   (rst_n),
    .flag    (flag),
    .en      (en)
  );

  pfd u_pfd (
    .f_ref (clk_ref),
    .f_div (f_div),
    .en    (en),
    .up    (up),
    .dn    (dn)
  );

  charge_pump u_cp (
    .up    (up),
    .dn    (dn),
    .en    (en),
    .q_out (q_cp)
  );

  loop_filter u_lf (
    .s1     (sw.s1),
    .s2     (sw.s2),
    .s3     (sw.s3),
    .s4     (sw.s4),
    .s5     (sw.s5),
    .q_cp   (q_cp),
    .i_pc   (i_pc),
    .v_ctrl (v_ctrl),
    .v_lf   (v_lf),
    .v_tune (v_tune),
    .v_c1   (v_c1)
  );

  vco u_vco (
    .v_tune (v_tune),
    .cap    (cap_code),
    .clk    (f_vco)
  );

  fb_divider #(.NW(NINT_W)) u_div (
    .clk_vco (f_vco),
    .rst_n   (rst_n),
    .en      (en),
    .n_int   (n_target[N_W-1:FRAC_W]),
    .y       (dsm_y),
    .f_div   (f_div)
  );

  dsm_mash111 #(.W(FRAC_W)) u_dsm (
    .clk   (f_div),
    .rst_n (rst_n),
    .en    (en),
    .frac  (n_target[FRAC_W-1:0]),
    .y     (dsm_y)
  );
endmodule
