// tb_ifp_pll_top: end-to-end test of the fast-locking PLL at its default
// parameters.
//
// Two start-ups are run back to back, at 5100 MHz and at 4425 MHz (N = 127.5
// and 110.625 with a 40 MHz reference), with k_IFP = 64 and k_charge = 80.
// The second start is issued while the loop is locked, so the preset
// sequence also runs from the closed-loop state. For each run it checks:
//   - the FDC counts k_IFP*f_L/f_REF and k_IFP*f_H/f_REF against the VCO
//     tuning law, within the FDC error bound 1.5 counts plus one;
//   - the V_target code against an independent real-number interpolation of
//     the measured counts (+-1 code);
//   - the VCO frequency at the end of the precharge within 2.5 MHz of target;
//   - the first f_DIV edge after EN against the next f_REF edge: phase error
//     below 10 degrees;
//   - lock to 40 ppm (average frequency over 2000-cycle windows) within
//     LOCK_LIMIT_US of EN, and the lock time is printed.
// Mechanisms counted (each must occur): V_L and V_H measurement windows, the
// calculation, the precharge, Flag/EN, PFD UP and DN pulses, delta-sigma
// offsets other than zero, a restart from lock.
`timescale 1ns / 1fs
module tb_ifp_pll_top;
  import ifp_pkg::*;

  localparam real F_REF_MHZ     = 40.0;
  localparam real LOCK_LIMIT_US = 8.0;
  localparam real RUN_US        = 14.0;   // closed-loop time simulated per run
  localparam int  WIN           = 2000;   // VCO cycles per frequency window

  // VCO tuning law, written out here independently of the model.
  localparam real F0 = 4288.0, STEP = 15.625, KV = 40.0, BOW = 1.0;

  logic             clk_ref = 1'b0;
  logic             rst_n   = 1'b0;
  logic             start   = 1'b0;
  logic [K_W-1:0]   k_ifp    = 9'd64;
  logic [K_W-1:0]   k_charge = 9'd80;
  logic [N_W-1:0]   n_target = '0;
  logic [DAC_W-1:0] vl_code  = 10'd307;
  logic [DAC_W-1:0] vh_code  = 10'd717;
  logic [CAP_W-1:0] cap_code = '0;

  logic f_vco, f_div, flag, en, busy, calc_sat, calc_err, up, dn;
  logic [DAC_W-1:0] vtarget_code;
  logic [CNT_W-1:0] cnt_l, cnt_h;
  switches_t sw;
  real v_tune, v_lf, v_c1;

  ifp_pll_top dut (.*);

  always #12.5 clk_ref = ~clk_ref;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Mechanism counters.
  int n_meas_l = 0, n_meas_h = 0, n_calc = 0, n_charge = 0, n_en = 0;
  int n_up = 0, n_dn = 0, n_dsm_nz = 0, n_restart = 0;
  always @(posedge dut.u_ifp.u_tc.fdc_gate)
    if (dut.u_ifp.u_tc.state == dut.u_ifp.u_tc.T_MEAS_L || dut.u_ifp.vsel == VSEL_VL) n_meas_l++;
    else n_meas_h++;
  always @(posedge dut.u_ifp.u_calc.done) n_calc++;
  always @(posedge sw.s1) n_charge++;
  always @(posedge en) n_en++;
  always @(posedge up) n_up++;
  always @(posedge dn) n_dn++;
  always @(posedge f_div) if (dut.dsm_y != 0) n_dsm_nz++;

  // Frequency measurement over windows of WIN VCO cycles.
  int  vco_edges = 0;
  real win_t0 = 0.0, f_win = 0.0;
  int  win_cnt = 0;
  always @(posedge f_vco) begin
    vco_edges++;
    if (vco_edges % WIN == 0) begin
      if (win_t0 > 0.0) begin
        f_win = 1.0e3 * WIN / ($realtime - win_t0);
        win_cnt++;
      end
      win_t0 = $realtime;
    end
  end

  function automatic real f_model(input real v, input int cap);
    return F0 + cap * STEP + KV * v + BOW * 4.0 * (v - 0.3) * (0.7 - v) / 0.16;
  endfunction

  // Phase check of the first divider edge after EN.
  real t_en_ref, t_next_ref, t_first_div;

  task automatic run(input real f_target_mhz);
    real n_real, v_l, v_h, exp_l, exp_h, kn, vt_real, f_end, err_ppm, t_en, t_lock, phase_deg;
    int  cap, vt_exp, last_bad;
    bit  locked;
    n_real   = f_target_mhz / F_REF_MHZ;
    n_target = N_W'(longint'(n_real * 1048576.0 + 0.5));
    cap      = int'((f_target_mhz - (F0 + KV * 0.5)) / STEP);
    cap_code = CAP_W'(cap);
    $display("run: f_target %0.3f MHz, N %0.6f, cap %0d", f_target_mhz, n_real, cap);

    @(posedge clk_ref) start <= 1'b1;
    @(posedge clk_ref) start <= 1'b0;
    wait (flag == 1'b0);

    // Wait until the precharge, then check the computation.
    wait (sw.s1 == 1'b1);
    v_l   = real'(vl_code) / 1024.0;
    v_h   = real'(vh_code) / 1024.0;
    exp_l = 64.0 * f_model(v_l, cap) / F_REF_MHZ;
    exp_h = 64.0 * f_model(v_h, cap) / F_REF_MHZ;
    $display("  counts L %0d (exp %0.2f)  H %0d (exp %0.2f)", cnt_l, exp_l, cnt_h, exp_h);
    check((real'(cnt_l) - exp_l) < 2.5 && (exp_l - real'(cnt_l)) < 2.5, "count at V_L");
    check((real'(cnt_h) - exp_h) < 2.5 && (exp_h - real'(cnt_h)) < 2.5, "count at V_H");
    kn      = 64.0 * real'(n_target) / 1048576.0;
    vt_real = (kn - real'(cnt_l)) / (real'(cnt_h) - real'(cnt_l)) * real'(vh_code - vl_code) + real'(vl_code);
    vt_exp  = int'(vt_real);
    $display("  V_target code %0d (exp %0.3f = %0.4f V)", vtarget_code, vt_real, vt_real / 1024.0);
    check((int'(vtarget_code) - vt_exp) <= 1 && (vt_exp - int'(vtarget_code)) <= 1, "V_target code");
    check(!calc_sat && !calc_err, "V_target in range");

    // End of precharge: frequency close to target before the loop closes.
    wait (flag == 1'b1);
    f_end = 1.0e3 / (1.0e3 / f_model(v_tune, cap));
    @(posedge f_vco); @(posedge f_vco);
    $display("  preset: V_LF %0.4f V, V_tune %0.4f V, f %0.3f MHz (error %0.3f MHz)",
             v_lf, v_tune, f_model(v_tune, cap), f_model(v_tune, cap) - f_target_mhz);
    check((f_model(v_tune, cap) - f_target_mhz) < 2.5 && (f_target_mhz - f_model(v_tune, cap)) < 2.5,
          "preset frequency within 2.5 MHz");
    check((v_lf - v_tune) < 0.005 && (v_tune - v_lf) < 0.005, "V_LF charged to V_tune");

    // Initial phase alignment.
    @(posedge en);
    t_en = $realtime;
    fork
      begin @(posedge clk_ref); t_next_ref = $realtime; end
      begin @(posedge f_div);   t_first_div = $realtime; end
    join
    phase_deg = 360.0 * (t_first_div - t_next_ref) / 25.0;
    $display("  first f_DIV edge %0.3f ns after f_REF edge (%0.2f deg)", t_first_div - t_next_ref, phase_deg);
    check(phase_deg < 10.0 && phase_deg > -10.0, "initial phase error below 10 deg");

    // Closed-loop lock to 40 ppm.
    last_bad = -1;
    t_lock   = 0.0;
    locked   = 1'b0;
    begin
      int w0;
      real t_stop;
      w0 = win_cnt;
      t_stop = $realtime + RUN_US * 1.0e3;
      while ($realtime < t_stop) begin
        @(win_cnt);
        err_ppm = (f_win - f_target_mhz) / f_target_mhz * 1.0e6;
        if (err_ppm > 40.0 || err_ppm < -40.0) begin
          t_lock = $realtime - t_en;
          locked = 1'b0;
        end else begin
          locked = 1'b1;
        end
      end
      $display("  closed loop: windows %0d, final f %0.4f MHz (%0.1f ppm), 40 ppm lock %0.2f us after EN",
               win_cnt - w0, f_win, err_ppm, t_lock / 1.0e3);
    end
    check(locked, "locked at end of run");
    check(t_lock < LOCK_LIMIT_US * 1.0e3, "lock time");
  endtask

  initial begin
    repeat (4) @(posedge clk_ref);
    rst_n = 1'b1;
    repeat (4) @(posedge clk_ref);
    run(5100.0);
    n_restart++;
    run(4425.0);
    $display("mechanisms: meas_L %0d meas_H %0d calc %0d charge %0d EN %0d UP %0d DN %0d dsm!=0 %0d restart %0d",
             n_meas_l, n_meas_h, n_calc, n_charge, n_en, n_up, n_dn, n_dsm_nz, n_restart);
    check(n_meas_l >= 2 && n_meas_h >= 2, "both measurement windows ran");
    check(n_calc >= 2, "calculation ran");
    check(n_charge >= 2, "precharge ran");
    check(n_en >= 2, "EN raised");
    check(n_up > 0 && n_dn > 0, "PFD produced UP and DN");
    check(n_dsm_nz > 0, "delta-sigma offset used");
    check(n_restart > 0, "restart from lock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
