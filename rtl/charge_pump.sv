// charge_pump: behavioural model of the charge pump (not synthesizable).
//
// Sources I_CP while UP is high and sinks it while DN is high; both at once
// cancel. The silicon pump keeps its up and down currents matched with a
// servo loop built around a rail-to-rail op-amp; MISMATCH models what is
// left of the mismatch (fraction of I_CP added to the down current). The
// output is the total charge delivered since reset, in coulombs, integrated
// exactly from the UP/DN edge times (and brought up to date every DT_NS), so
// pulses far shorter than the loop-filter time step are not lost. The pump is
// off while EN is low. I_CP = 100 uA is the current of the design's
// lock-time study.
//
// Interface: UP, DN, EN logic in; cumulative charge out (real).
module charge_pump #(
  parameter real I_CP     = 100.0e-6,
  parameter real MISMATCH = 0.0,
  parameter real DT_NS    = 1.0
) (
  input  logic up,
  input  logic dn,
  input  logic en,
  output real  q_out
);
  timeunit 1ns; timeprecision 1fs;

  real i_now;     // current flowing since t_last
  real t_last;    // ns

  function automatic real current(input logic u, input logic d, input logic e);
    real i;
    i = 0.0;
    if (e && u) i = i + I_CP;
    if (e && d) i = i - I_CP * (1.0 + MISMATCH);
    return i;
  endfunction

  initial begin
    q_out  = 0.0;
    i_now  = 0.0;
    t_last = 0.0;
  end

  always @(up or dn or en) begin
    q_out  = q_out + i_now * ($realtime - t_last) * 1.0e-9;
    t_last = $realtime;
    i_now  = current(up, dn, en);
  end

  always begin
    #(DT_NS);
    q_out  = q_out + i_now * ($realtime - t_last) * 1.0e-9;
    t_last = $realtime;
  end
endmodule
