// tb_lock_time_sweep: lock time of the closed loop against the initial
// frequency and phase error, the study that motivates the preset.
//
// The closed-loop part of the synthesizer (EN flip-flop, PFD, charge pump,
// loop filter, VCO, divider, MASH modulator) is built from the blocks at
// 4880 MHz (N = 122) with a 40 MHz reference, I_CP = 100 uA, K_VCO = 40 MHz/V
// and a 50 kHz bandwidth. For each case the precharger sets V_LF and V_tune
// to the voltage that puts the VCO a given number of MHz above the target;
// the loop is then closed as in the real sequence. A phase error is made by
// delaying EN at the divider by the matching fraction of a reference period.
// Lock time is from EN to the start of the last 2000-cycle frequency window
// that is more than 40 ppm off. Checks: every case locks; lock time does not
// fall as the frequency error grows; and with at most 2.5 MHz and 10 degrees
// of error the loop locks within 20 us.
`timescale 1ns / 1fs
module tb_lock_time_sweep;
  import ifp_pkg::*;
  localparam real F_T = 4880.0;
  localparam int  CAP = 37;
  localparam int  WIN = 2000;

  logic clk_ref = 1'b0, rst_n = 1'b0, flag = 1'b0;
  logic en, en_div, up, dn, f_vco, f_div;
  logic s1 = 1'b0, s2 = 1'b0, s3 = 1'b0, s4 = 1'b0, s5 = 1'b0;
  logic signed [3:0] dsm_y;
  real v_pre = 0.0, i_pc, q_cp, v_lf, v_tune, v_c1, en_delay = 0.0;
  logic [N_W-1:0] n_target;

  assign n_target = N_W'(longint'(F_T / 40.0 * 1048576.0));

  always #12.5 clk_ref = ~clk_ref;
  always @(en) en_div <= #(en_delay) en;

  en_sync     u_en  (.clk_ref(clk_ref), .rst_n(rst_n), .flag(flag), .en(en));
  pfd         u_pfd (.f_ref(clk_ref), .f_div(f_div), .en(en), .up(up), .dn(dn));
  charge_pump u_cp  (.up(up), .dn(dn), .en(en), .q_out(q_cp));
  precharger  u_pc  (.v_inp(v_pre), .v_fb(v_lf), .i_out(i_pc));
  loop_filter u_lf  (.s1(s1), .s2(s2), .s3(s3), .s4(s4), .s5(s5), .q_cp(q_cp), .i_pc(i_pc),
                     .v_ctrl(v_pre), .v_lf(v_lf), .v_tune(v_tune), .v_c1(v_c1));
  vco         u_vco (.v_tune(v_tune), .cap(6'(CAP)), .clk(f_vco));
  fb_divider  #(.NW(NINT_W)) u_div (.clk_vco(f_vco), .rst_n(rst_n), .en(en_div),
                     .n_int(n_target[N_W-1:FRAC_W]), .y(dsm_y), .f_div(f_div));
  dsm_mash111 #(.W(FRAC_W)) u_dsm (.clk(f_div), .rst_n(rst_n), .en(en_div),
                     .frac(n_target[FRAC_W-1:0]), .y(dsm_y));

  // Tuning law of the VCO, written out here; solved for V by bisection.
  function automatic real f_law(input real v);
    return 4288.0 + 15.625 * CAP + 40.0 * v + 4.0 * (v - 0.3) * (0.7 - v) / 0.16;
  endfunction
  function automatic real v_for(input real f);
    real lo, hi, mid;
    lo = 0.0; hi = 1.0;
    repeat (50) begin
      mid = 0.5 * (lo + hi);
      if (f_law(mid) < f) lo = mid; else hi = mid;
    end
    return mid;
  endfunction

  int  vco_edges = 0, win_cnt = 0;
  real win_t0 = 0.0, f_win = 0.0;
  always @(posedge f_vco) begin
    vco_edges++;
    if (vco_edges % WIN == 0) begin
      if (win_t0 > 0.0) begin f_win = 1.0e3 * WIN / ($realtime - win_t0); win_cnt++; end
      win_t0 = $realtime;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input real f_err, input real ph_deg, input real run_us, output real t_lock_us);
    real t_en, t_stop, err_ppm, t_lock;
    bit  locked;
    flag = 1'b0; s4 = 1'b0; s5 = 1'b0;
    @(posedge clk_ref);
    en_delay = ph_deg / 360.0 * 25.0;
    v_pre = v_for(F_T + f_err);
    s1 = 1'b1; s2 = 1'b1; s3 = 1'b1;
    #2000;
    @(posedge clk_ref);
    s1 = 1'b0; s2 = 1'b0; s3 = 1'b0; s4 = 1'b1; s5 = 1'b1;
    flag = 1'b1;
    @(posedge en);
    t_en = $realtime;
    t_stop = t_en + run_us * 1.0e3;
    t_lock = 0.0; locked = 1'b0;
    while ($realtime < t_stop) begin
      @(win_cnt);
      err_ppm = (f_win - F_T) / F_T * 1.0e6;
      if (err_ppm > 40.0 || err_ppm < -40.0) begin t_lock = $realtime - t_en; locked = 1'b0; end
      else locked = 1'b1;
    end
    t_lock_us = t_lock / 1.0e3;
    $display("frequency error %5.2f MHz, phase error %5.1f deg: lock %6.2f us%s",
             f_err, ph_deg, t_lock_us, locked ? "" : " (not locked)");
    check(locked, $sformatf("locked with %0.2f MHz / %0.1f deg", f_err, ph_deg));
  endtask

  initial begin
    real errs [5] = '{0.0, 1.0, 2.5, 5.0, 10.0};
    real t [5];
    real t_ph;
    repeat (4) @(posedge clk_ref);
    rst_n = 1'b1;
    foreach (errs[i]) run(errs[i], 0.0, 40.0, t[i]);
    for (int i = 1; i < 5; i++)
      check(t[i] + 0.5 >= t[i-1], $sformatf("lock time falls from %0.2f to %0.2f us as the error grows", t[i-1], t[i]));
    check(t[2] < 20.0, "2.5 MHz error locks within 20 us");
    run(2.5, 10.0, 40.0, t_ph);
    check(t_ph < 20.0, "2.5 MHz and 10 deg lock within 20 us");
    run(0.0, 90.0, 40.0, t_ph);
    check(t_ph > t[0], "a 90 degree phase error costs lock time");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
