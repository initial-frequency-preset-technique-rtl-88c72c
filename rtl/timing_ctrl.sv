// timing_ctrl: sequencer of the open-loop initial frequency preset.
//
// After `start` it runs, in reference clock cycles:
//   SET_L   S2 closed, V_tune controller drives V_L, wait SETTLE cycles
//   MEAS_L  FDC gate high for exactly k_IFP cycles
//   READ_L  gate low, wait READ_WAIT cycles, store the count as k_IFP*f_L/f_REF
//   SET_H, MEAS_H, READ_H   the same with V_H, giving k_IFP*f_H/f_REF
//   CALC    start the V_target calculator and wait for it
//   CHARGE  S1, S2, S3 closed for k_charge cycles: the precharger drives V_LF
//           to V_target with R1 shorted; V_tune is held at V_target
//   LOCK    S1..S3 open, S4, S5 closed, Flag high: the closed loop runs
// A new `start` in LOCK (or IDLE) begins another run; Flag drops at once.
// The order of the steps, the switch settings, k_IFP and k_charge follow the
// design. The settling wait, the read wait, the reset state (all switches
// open) and V_tune = V_target during CHARGE (read from the timing diagram of
// the locking process) are this design's choices.
//
// Timing: outputs are registered. With the 13-cycle calculator, Flag is high
// 1 + 2*(SETTLE + k_IFP + READ_WAIT) + 16 + k_charge cycles after the edge
// that samples `start`: 237 cycles (5.9 us at 40 MHz) for k_IFP = 64 and
// k_charge = 80.
module timing_ctrl
  import ifp_pkg::*;
#(
  parameter int unsigned SETTLE    = 4,   // cycles for V_tune to settle before counting
  parameter int unsigned READ_WAIT = 2    // cycles from gate low to reading the FDC
) (
  input  logic            clk,        // f_REF
  input  logic            rst_n,
  input  logic            start,
  input  logic [K_W-1:0]  k_ifp,      // counting index, >= 1
  input  logic [K_W-1:0]  k_charge,   // precharge length in f_REF periods, >= 1
  input  logic            calc_done,
  output switches_t       sw,
  output vsel_e           vsel,
  output logic            fdc_gate,
  output logic            reg_load,   // capture k_IFP*N_target, V_L, V_H
  output logic            cap_en,     // store FDC count
  output logic            cap_sel,    // 0: f_L, 1: f_H
  output logic            calc_start,
  output logic            flag,       // preset complete
  output logic            busy
);
  timeunit 1ns; timeprecision 1fs;

  typedef enum logic [3:0] {
    T_IDLE, T_SET_L, T_MEAS_L, T_READ_L, T_SET_H, T_MEAS_H, T_READ_H,
    T_CALC, T_CALC_W, T_CHARGE, T_LOCK
  } tstate_e;

  localparam int unsigned C_W = (K_W > 8) ? K_W : 8;

  tstate_e        state;
  logic [C_W-1:0] cnt;

  // Number of cycles a state lasts, minus one.
  function automatic logic [C_W-1:0] len_m1(input int unsigned n);
    return C_W'(n - 1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= T_IDLE;
      cnt        <= '0;
      sw         <= '0;
      vsel       <= VSEL_VL;
      fdc_gate   <= 1'b0;
      reg_load   <= 1'b0;
      cap_en     <= 1'b0;
      cap_sel    <= 1'b0;
      calc_start <= 1'b0;
      flag       <= 1'b0;
      busy       <= 1'b0;
    end else begin
      reg_load   <= 1'b0;
      cap_en     <= 1'b0;
      calc_start <= 1'b0;
      if (cnt != '0) cnt <= cnt - 1'b1;
      unique case (state)
        T_IDLE, T_LOCK: if (start) begin
          state    <= T_SET_L;
          cnt      <= len_m1(SETTLE);
          reg_load <= 1'b1;
          busy     <= 1'b1;
          flag     <= 1'b0;
          sw       <= '{s1: 1'b0, s2: 1'b1, s3: 1'b0, s4: 1'b0, s5: 1'b0};
          vsel     <= VSEL_VL;
        end
        T_SET_L, T_SET_H: if (cnt == '0) begin
          state    <= (state == T_SET_L) ? T_MEAS_L : T_MEAS_H;
          cnt      <= C_W'(k_ifp) - 1'b1;
          fdc_gate <= 1'b1;
        end
        T_MEAS_L, T_MEAS_H: if (cnt == '0) begin
          state    <= (state == T_MEAS_L) ? T_READ_L : T_READ_H;
          cnt      <= len_m1(READ_WAIT);
          fdc_gate <= 1'b0;
        end
        T_READ_L: if (cnt == '0) begin
          cap_en  <= 1'b1;
          cap_sel <= 1'b0;
          state   <= T_SET_H;
          cnt     <= len_m1(SETTLE);
          vsel    <= VSEL_VH;
        end
        T_READ_H: if (cnt == '0) begin
          cap_en  <= 1'b1;
          cap_sel <= 1'b1;
          state   <= T_CALC;
        end
        T_CALC: begin
          calc_start <= 1'b1;
          state      <= T_CALC_W;
        end
        T_CALC_W: if (calc_done) begin
          state <= T_CHARGE;
          cnt   <= C_W'(k_charge) - 1'b1;
          sw    <= '{s1: 1'b1, s2: 1'b1, s3: 1'b1, s4: 1'b0, s5: 1'b0};
          vsel  <= VSEL_TARGET;
        end
        T_CHARGE: if (cnt == '0) begin
          state <= T_LOCK;
          sw    <= '{s1: 1'b0, s2: 1'b0, s3: 1'b0, s4: 1'b1, s5: 1'b1};
          flag  <= 1'b1;
          busy  <= 1'b0;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // Flag only with the loop closed; never precharger and charge pump together.
  a_flag_after_lock: assert property (@(posedge clk) disable iff (!rst_n)
                                      flag |-> (sw.s4 && sw.s5 && !sw.s1 && !sw.s2 && !sw.s3));
  a_no_short: assert property (@(posedge clk) disable iff (!rst_n)
                               !(sw.s1 && sw.s4));
endmodule
