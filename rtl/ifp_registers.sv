// ifp_registers: storage between the FDC and the V_target calculator.
//
// Four registers, all in the reference clock domain:
//   cnt_l = k_IFP * f_L / f_REF   FDC result with V_tune = V_L
//   cnt_h = k_IFP * f_H / f_REF   FDC result with V_tune = V_H
//   kn    = k_IFP * N_target      target frequency in FDC units (20 fraction bits)
//   vl/vh = V_L and V_H codes      the two preset voltages in DAC codes
// The FDC output is steered to cnt_l or cnt_h by `cap_sel` (the switch at
// the FDC output) when `cap_en` is high. `load` captures k_IFP * N_target
// (one multiplier) and the V_L/V_H codes at the start of a preset run, so the
// inputs may change later without disturbing it.
//
// Timing: every register updates on the rising reference edge on which its
// strobe is high; outputs are registered. The register set follows the
// design; the strobes and the multiplier's place are this design's choice.
module ifp_registers
  import ifp_pkg::*;
(
  input  logic               clk,       // f_REF
  input  logic               rst_n,
  input  logic               load,      // capture k_IFP*N_target, V_L, V_H
  input  logic [K_W-1:0]     k_ifp,
  input  logic [N_W-1:0]     n_target,  // 8.20 fixed point
  input  logic [DAC_W-1:0]   vl_in,
  input  logic [DAC_W-1:0]   vh_in,
  input  logic               cap_en,    // store the FDC count
  input  logic               cap_sel,   // 0: into cnt_l, 1: into cnt_h
  input  logic [CNT_W-1:0]   fdc_count,
  output logic [CNT_W-1:0]   cnt_l,
  output logic [CNT_W-1:0]   cnt_h,
  output logic [KN_W-1:0]    kn,
  output logic [DAC_W-1:0]   vl,
  output logic [DAC_W-1:0]   vh
);
  timeunit 1ns; timeprecision 1fs;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kn <= '0;
      vl <= '0;
      vh <= '0;
    end else if (load) begin
      kn <= KN_W'(k_ifp) * KN_W'(n_target);
      vl <= vl_in;
      vh <= vh_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_l <= '0;
      cnt_h <= '0;
    end else if (cap_en) begin
      if (cap_sel) cnt_h <= fdc_count;
      else         cnt_l <= fdc_count;
    end
  end
endmodule
