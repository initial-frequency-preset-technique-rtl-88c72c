// ifp_digital: the digital part of the initial frequency preset circuit.
//
// Ties together the FDC (VCO domain counter), the register set, the V_target
// calculator and the timing controller. After `start` it measures the VCO
// frequency with V_tune = V_L and V_tune = V_H over k_IFP reference periods
// each, interpolates the DAC code of V_target for the target division ratio
// N_target, and then closes S1..S3 for k_charge periods so the precharger
// sets the loop filter to V_target. It ends by closing S4, S5 and raising
// Flag. The analog side (V_tune controller, DAC, precharger, switches) is
// driven through `sw`, `vsel` and `vtarget_code`.
//
// Timing: everything except the FDC counter runs on f_REF. The FDC count
// crosses to f_REF quasi-statically (read two cycles after the gate closes).
module ifp_digital
  import ifp_pkg::*;
(
  input  logic               clk_ref,
  input  logic               clk_vco,
  input  logic               rst_n,
  input  logic               start,
  input  logic [K_W-1:0]     k_ifp,
  input  logic [K_W-1:0]     k_charge,
  input  logic [N_W-1:0]     n_target,
  input  logic [DAC_W-1:0]   vl_code,
  input  logic [DAC_W-1:0]   vh_code,
  output switches_t          sw,
  output vsel_e              vsel,
  output logic [DAC_W-1:0]   vtarget_code,
  output logic [DAC_W-1:0]   vl_used,
  output logic [DAC_W-1:0]   vh_used,
  output logic [CNT_W-1:0]   cnt_l,
  output logic [CNT_W-1:0]   cnt_h,
  output logic               calc_sat,
  output logic               calc_err,
  output logic               flag,
  output logic               busy
);
  timeunit 1ns; timeprecision 1fs;

  logic              fdc_gate, reg_load, cap_en, cap_sel, calc_start, calc_done, calc_busy;
  logic [CNT_W-1:0]  fdc_count;
  logic [KN_W-1:0]   kn;

  fdc u_fdc (
    .clk_vco (clk_vco),
    .rst_n   (rst_n),
    .gate    (fdc_gate),
    .count   (fdc_count)
  );

  ifp_registers u_regs (
    .clk       (clk_ref),
    .rst_n     (rst_n),
    .load      (reg_load),
    .k_ifp     (k_ifp),
    .n_target  (n_target),
    .vl_in     (vl_code),
    .vh_in     (vh_code),
    .cap_en    (cap_en),
    .cap_sel   (cap_sel),
    .fdc_count (fdc_count),
    .cnt_l     (cnt_l),
    .cnt_h     (cnt_h),
    .kn        (kn),
    .vl        (vl_used),
    .vh        (vh_used)
  );

  vtarget_calc u_calc (
    .clk   (clk_ref),
    .rst_n (rst_n),
    .start (calc_start),
    .cnt_l (cnt_l),
    .cnt_h (cnt_h),
    .kn    (kn),
    .vl    (vl_used),
    .vh    (vh_used),
    .busy  (calc_busy),
    .done  (calc_done),
    .code  (vtarget_code),
    .sat   (calc_sat),
    .err   (calc_err)
  );

  timing_ctrl u_tc (
    .clk        (clk_ref),
    .rst_n      (rst_n),
    .start      (start),
    .k_ifp      (k_ifp),
    .k_charge   (k_charge),
    .calc_done  (calc_done),
    .sw         (sw),
    .vsel       (vsel),
    .fdc_gate   (fdc_gate),
    .reg_load   (reg_load),
    .cap_en     (cap_en),
    .cap_sel    (cap_sel),
    .calc_start (calc_start),
    .flag       (flag),
    .busy       (busy)
  );

  a_calc_idle_at_charge: assert property (@(posedge clk_ref) disable iff (!rst_n)
                                          sw.s1 |-> !calc_busy);
endmodule
