// pfd: tri-state phase-frequency detector.
//
// Two flip-flops with their D inputs tied high, clocked by f_REF and f_DIV.
// UP rises on a reference edge, DN on a divider edge, and both are cleared
// as soon as both are high, so the width of the UP (DN) pulse is the time by
// which the reference leads (lags) the divider. While EN is low both are held
// clear, so the first reference edge that counts is the one after EN rises.
// This is the common PFD structure; the design only names the block and its
// EN input. In silicon the clearing path has a short delay to avoid a dead
// zone; here the clear acts at once.
//
// Timing: UP/DN change on the rising edges of f_REF and f_DIV.
module pfd (
  input  logic f_ref,
  input  logic f_div,
  input  logic en,
  output logic up,
  output logic dn
);
  timeunit 1ns; timeprecision 1fs;

  logic clr;
  assign clr = (up & dn) | ~en;

  always_ff @(posedge f_ref or posedge clr) begin
    if (clr) up <= 1'b0;
    else     up <= 1'b1;
  end

  always_ff @(posedge f_div or posedge clr) begin
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
  end
endmodule
