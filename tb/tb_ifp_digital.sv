// tb_ifp_digital: checks the digital preset circuit on its own.
// The test plays the VCO: its clock runs at a linear tuning law of the
// voltage the circuit selects (V_L, V_H or V_target, each code/1024 volts),
// with a slope that changes from run to run, as K_VCO varies from chip to
// chip. For each run it checks the two FDC counts against k_IFP*f/f_REF, the
// V_target code against interpolation of those counts, that the selected
// V_target gives a frequency within the FDC error of f_target, the switch
// state and Flag at the end, and the preset duration
// 1 + 2*(SETTLE + k_IFP + READ_WAIT) + 16 + k_charge reference cycles.
`timescale 1ns / 1fs
module tb_ifp_digital;
  import ifp_pkg::*;
  logic clk_ref = 1'b0, clk_vco = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [K_W-1:0]   k_ifp = 9'd64, k_charge = 9'd80;
  logic [N_W-1:0]   n_target = '0;
  logic [DAC_W-1:0] vl_code = 10'd307, vh_code = 10'd717;
  switches_t sw;
  vsel_e vsel;
  logic [DAC_W-1:0] vtarget_code, vl_used, vh_used;
  logic [CNT_W-1:0] cnt_l, cnt_h;
  logic calc_sat, calc_err, flag, busy;

  ifp_digital dut (.*);
  always #12.5 clk_ref = ~clk_ref;

  real f_base = 5000.0, kv = 40.0;    // MHz, MHz/V
  function automatic real f_of(input vsel_e s);
    real v;
    case (s)
      VSEL_VL: v = real'(vl_used) / 1024.0;
      VSEL_VH: v = real'(vh_used) / 1024.0;
      default: v = real'(vtarget_code) / 1024.0;
    endcase
    return f_base + kv * v;
  endfunction
  initial forever begin #(500.0 / f_of(vsel)); clk_vco = ~clk_vco; end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input real fb, input real slope, input real f_t, input int k, input int kc);
    real el, eh, kn, vt, f_set, tol;
    int cyc;
    f_base = fb; kv = slope;
    k_ifp = K_W'(k); k_charge = K_W'(kc);
    n_target = N_W'(longint'(f_t / 40.0 * 1048576.0));
    @(negedge clk_ref) start = 1'b1;
    @(negedge clk_ref) start = 1'b0;
    cyc = 1;
    while (!flag) begin @(negedge clk_ref); cyc++; end
    el = real'(k) * (fb + slope * real'(vl_code) / 1024.0) / 40.0;
    eh = real'(k) * (fb + slope * real'(vh_code) / 1024.0) / 40.0;
    check(real'(cnt_l) - el < 2.5 && el - real'(cnt_l) < 2.5, $sformatf("cnt_l %0d expected %0.2f", cnt_l, el));
    check(real'(cnt_h) - eh < 2.5 && eh - real'(cnt_h) < 2.5, $sformatf("cnt_h %0d expected %0.2f", cnt_h, eh));
    kn = real'(k) * real'(n_target) / 1048576.0;
    vt = (kn - real'(cnt_l)) / (real'(cnt_h) - real'(cnt_l)) * (real'(vh_code) - real'(vl_code)) + real'(vl_code);
    check(real'(vtarget_code) - vt <= 0.5001 && vt - real'(vtarget_code) <= 0.5001,
          $sformatf("V_target %0d expected %0.3f", vtarget_code, vt));
    f_set = fb + slope * real'(vtarget_code) / 1024.0;
    // FDC error (1.5 f_REF/k_IFP at each point, scaled by the interpolation) plus half a code.
    tol = 2.0 * 1.5 * 40.0 / real'(k) * 2.0 + slope / 1024.0;
    check(f_set - f_t < tol && f_t - f_set < tol, $sformatf("preset frequency %0.3f for target %0.3f (tol %0.3f)", f_set, f_t, tol));
    check(sw.s4 && sw.s5 && !sw.s1 && !sw.s2 && !sw.s3, "loop closed at Flag");
    check(cyc == 1 + 2 * (4 + k + 2) + 16 + kc, $sformatf("preset took %0d cycles", cyc));
    $display("f_target %0.2f, K_VCO %0.1f MHz/V: counts %0d/%0d, code %0d, preset f %0.3f MHz, %0d cycles (%0.2f us)",
             f_t, slope, cnt_l, cnt_h, vtarget_code, f_set, cyc, real'(cyc) * 0.025);
  endtask

  initial begin
    repeat (3) @(posedge clk_ref);
    rst_n = 1'b1;
    run(5084.0, 40.0, 5100.0, 64, 80);
    run(4413.0, 40.0, 4425.0, 64, 80);
    run(4800.0, 120.0, 4860.0, 64, 80);
    run(4800.0, 25.0, 4812.0, 128, 20);
    run(4800.0, 40.0, 4829.0, 64, 80);   // beyond V_H: extrapolated
    vl_code = 10'd200; vh_code = 10'd800;
    run(5000.0, 60.0, 5030.0, 32, 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
