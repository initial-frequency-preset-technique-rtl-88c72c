// loop_filter: behavioural model of the third-order passive loop filter and
// its switches S1..S5 (not synthesizable).
//
// Topology: the charge pump reaches node V_LF through S4. From V_LF, R1 in
// series with C1 to ground (S3 shorts R1), C2 to ground, and R3 to the node
// that C3 holds, which reaches V_tune through S5. The precharger feeds V_LF
// through S1 and the V_tune controller drives V_tune through S2.
// The node equations are integrated with forward Euler every DT_NS; charge
// from the pump is taken as the change of its cumulative charge output, so
// it is exact however short the pulses. With S3 closed, C1 and C2 are one
// node. With S2 closed the V_tune node follows the controller at once; with
// S2 and S5 open it holds its voltage.
// Component values are not given by the design and are chosen here for a
// 50 kHz loop bandwidth with I_CP = 100 uA, K_VCO = 40 MHz/V and N ~ 127:
// R1 = 10 k sets the crossover (~ I_CP*R1*K_VCO/N), C1 = 1.27 nF puts the
// zero at a quarter of it (12.5 kHz) and C2 = 0.1 nF the pole near 170 kHz;
// R3, C3 add a pole near 8 MHz. All voltages start at 0 V.
//
// Interface: switch controls (1 = closed), pump charge, precharger current
// and controller voltage in; V_LF, V_tune and the C1 voltage out (real).
module loop_filter #(
  parameter real R1    = 10.0e3,
  parameter real C1    = 1.27e-9,
  parameter real C2    = 0.1e-9,
  parameter real R3    = 1.0e3,
  parameter real C3    = 20.0e-12,
  parameter real DT_NS = 1.0
) (
  input  logic s1,
  input  logic s2,
  input  logic s3,
  input  logic s4,
  input  logic s5,
  input  real  q_cp,     // cumulative charge-pump charge, C
  input  real  i_pc,     // precharger output current, A
  input  real  v_ctrl,   // V_tune controller output, V
  output real  v_lf,
  output real  v_tune,
  output real  v_c1
);
  timeunit 1ns; timeprecision 1fs;

  real q_last, dt, dq, i_in, i1, i3;

  initial begin
    v_lf   = 0.0;
    v_tune = 0.0;
    v_c1   = 0.0;
    q_last = 0.0;
    dt     = DT_NS * 1.0e-9;
  end

  always begin
    #(DT_NS);
    dq     = s4 ? (q_cp - q_last) : 0.0;
    q_last = q_cp;
    i_in   = s1 ? i_pc : 0.0;
    i3     = s5 ? (v_lf - v_tune) / R3 : 0.0;
    if (s3) begin
      v_lf = v_lf + ((i_in - i3) * dt + dq) / (C1 + C2);
      v_c1 = v_lf;
    end else begin
      i1   = (v_lf - v_c1) / R1;
      v_lf = v_lf + ((i_in - i1 - i3) * dt + dq) / C2;
      v_c1 = v_c1 + i1 * dt / C1;
    end
    if (s2)      v_tune = v_ctrl;
    else if (s5) v_tune = v_tune + i3 * dt / C3;
  end
endmodule
