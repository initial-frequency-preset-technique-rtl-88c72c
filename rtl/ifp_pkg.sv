// ifp_pkg: widths, default constants and the switch-control type shared by
// the initial-frequency-preset (IFP) PLL.
//
// The reference clock is 40 MHz, the DAC is 10 bits, the VCO capacitor bank
// 6 bits and the delta-sigma modulator 20 bits, as the design specifies.
// The remaining widths are chosen here: the counting index k_IFP and the
// charge index k_charge are 9 bits (up to 511 reference periods), the FDC
// counter is 17 bits (511 * 5.3 GHz / 40 MHz = 67.7k), and the division ratio
// N_target is an unsigned 8.20 fixed-point number (integer 107..133 for
// 4.3..5.3 GHz).
package ifp_pkg;
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned K_W     = 9;   // k_IFP / k_charge width
  localparam int unsigned CNT_W   = 17;  // FDC count width
  localparam int unsigned NINT_W  = 8;   // integer part of N_target
  localparam int unsigned FRAC_W  = 20;  // delta-sigma resolution
  localparam int unsigned N_W     = NINT_W + FRAC_W;
  localparam int unsigned KN_W    = K_W + N_W;  // k_IFP * N_target, 20 fraction bits
  localparam int unsigned DAC_W   = 10;  // V_target / V_H / V_L code width
  localparam int unsigned CAP_W   = 6;   // VCO capacitor-bank code

  // Loop switches of the PLL (S1..S5). 1 = closed.
  typedef struct packed {
    logic s1;  // precharger output to V_LF
    logic s2;  // V_tune controller to V_tune
    logic s3;  // short across R1 during precharge
    logic s4;  // charge-pump output to V_LF
    logic s5;  // loop filter (R3) to V_tune
  } switches_t;

  // What the V_tune controller drives while S2 is closed.
  typedef enum logic [1:0] {
    VSEL_VL     = 2'd0,
    VSEL_VH     = 2'd1,
    VSEL_TARGET = 2'd2
  } vsel_e;
endpackage
