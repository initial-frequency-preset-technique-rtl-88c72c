// fdc: frequency-to-digital converter.
//
// Counts VCO cycles while the reference-domain gate is high. The timing
// controller holds the gate high for exactly k_IFP reference periods, so the
// count is k_IFP * f_VCO / f_REF, the digital frequency value the design
// specifies. The gate is brought into the VCO clock domain through a
// two-flop synchronizer; the counter is cleared on the synchronized rising
// edge of the gate and then counts every VCO cycle while the gate is high.
// Start and stop see the same synchronizer delay, so the window is k_IFP
// reference periods to within one VCO period; the remaining error is the
// quantization and start-phase uncertainty, worst case 1.5 * f_REF / k_IFP.
//
// Timing: `count` changes only in the VCO domain while the synchronized gate
// is high. It is stable from three VCO cycles after the gate falls, so the
// reference domain may read it on any later reference edge (the timing
// controller waits two reference cycles). The synchronizer and the counter
// structure are this design's choice; the design only states what the FDC
// computes.
module fdc
  import ifp_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk_vco,  // VCO output (counted signal)
  input  logic         rst_n,    // asynchronous reset, active low
  input  logic         gate,     // counting window, reference domain
  output logic [W-1:0] count     // VCO cycles inside the window
);
  timeunit 1ns; timeprecision 1fs;

  logic [2:0] gate_sync;  // [0],[1] synchronizer, [2] edge detect

  always_ff @(posedge clk_vco or negedge rst_n) begin
    if (!rst_n) gate_sync <= '0;
    else        gate_sync <= {gate_sync[1:0], gate};
  end

  always_ff @(posedge clk_vco or negedge rst_n) begin
    if (!rst_n)                         count <= '0;
    else if (gate_sync[1] && !gate_sync[2]) count <= W'(1);
    else if (gate_sync[1])              count <= count + W'(1);
  end
endmodule
