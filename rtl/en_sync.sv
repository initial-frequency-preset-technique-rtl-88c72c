// en_sync: the D flip-flop that turns the preset-complete Flag into the PLL
// enable EN.
//
// Flag drives D and the reference clock f_REF drives CK, so EN rises on a
// rising edge of f_REF. The phase-frequency detector, charge pump, feedback
// divider and delta-sigma modulator all start from EN, so the divider output
// starts at that same reference edge and the loop begins with almost no
// initial phase error. This follows the design; the active-low asynchronous
// reset (EN low) is this design's addition.
//
// Timing: EN follows Flag one f_REF edge later.
module en_sync (
  input  logic clk_ref,  // f_REF
  input  logic rst_n,
  input  logic flag,
  output logic en
);
  timeunit 1ns; timeprecision 1fs;

  always_ff @(posedge clk_ref or negedge rst_n) begin
    if (!rst_n) en <= 1'b0;
    else        en <= flag;
  end
endmodule
