// tb_timing_ctrl: checks the preset sequence cycle by cycle.
// A stand-in calculator answers calc_start with calc_done after CALC_LAT
// cycles. The test records, per reference cycle, the switches, V_tune
// selection and FDC gate, and checks: reg_load on start; S2 alone closed and
// V_L then V_H selected while measuring; gate windows of exactly k_IFP
// cycles, each preceded by SETTLE cycles; cap_en with the right cap_sel
// READ_WAIT cycles after each window; S1..S3 closed with V_target selected
// for exactly k_charge cycles; then S4, S5 closed and Flag high; the total
// cycle count from start to Flag; and a restart from the locked state.
`timescale 1ns / 1fs
module tb_timing_ctrl;
  import ifp_pkg::*;
  localparam int SETTLE = 4, READ_WAIT = 2, CALC_LAT = 13;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, calc_done = 1'b0;
  logic [K_W-1:0] k_ifp = '0, k_charge = '0;
  switches_t sw;
  vsel_e vsel;
  logic fdc_gate, reg_load, cap_en, cap_sel, calc_start, flag, busy;

  timing_ctrl #(.SETTLE(SETTLE), .READ_WAIT(READ_WAIT)) dut (.*);
  always #12.5 clk = ~clk;

  // Stand-in calculator.
  int calc_cnt = -1;
  always @(posedge clk) begin
    calc_done <= 1'b0;
    if (calc_start) calc_cnt <= CALC_LAT - 1;
    else if (calc_cnt > 0) calc_cnt <= calc_cnt - 1;
    else if (calc_cnt == 0) begin calc_done <= 1'b1; calc_cnt <= -1; end
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int k, input int kc);
    int cyc, gate_l, gate_h, charge, pre_l, pre_h, cap_l_at, cap_h_at, gate_l_end, gate_h_end;
    bit seen_load, bad_sw;
    k_ifp = K_W'(k); k_charge = K_W'(kc);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    seen_load = reg_load;
    cyc = 1; gate_l = 0; gate_h = 0; charge = 0; pre_l = 0; pre_h = 0;
    cap_l_at = -1; cap_h_at = -1; gate_l_end = -1; gate_h_end = -1; bad_sw = 0;
    check(!flag, "Flag low after start");
    while (!flag && cyc < 5000) begin
      if (fdc_gate && vsel == VSEL_VL) gate_l++;
      if (fdc_gate && vsel == VSEL_VH) gate_h++;
      if (!fdc_gate && gate_l == 0 && vsel == VSEL_VL && sw.s2) pre_l++;
      if (!fdc_gate && gate_h == 0 && vsel == VSEL_VH && sw.s2) pre_h++;
      if (gate_l > 0 && !fdc_gate && gate_l_end < 0) gate_l_end = cyc;
      if (gate_h > 0 && !fdc_gate && gate_h_end < 0) gate_h_end = cyc;
      if (cap_en && !cap_sel) cap_l_at = cyc;
      if (cap_en && cap_sel)  cap_h_at = cyc;
      if (sw.s1) begin
        charge++;
        if (!(sw.s2 && sw.s3 && !sw.s4 && !sw.s5 && vsel == VSEL_TARGET)) bad_sw = 1;
      end else if (!(sw.s2 && !sw.s3 && !sw.s4 && !sw.s5)) bad_sw = 1;
      @(negedge clk);
      cyc++;
    end
    check(seen_load, "reg_load at start");
    check(gate_l == k && gate_h == k, $sformatf("gate windows %0d/%0d, expected %0d", gate_l, gate_h, k));
    check(pre_l == SETTLE && pre_h == SETTLE, $sformatf("settling %0d/%0d", pre_l, pre_h));
    check(cap_l_at == gate_l_end + READ_WAIT && cap_h_at == gate_h_end + READ_WAIT,
          $sformatf("FDC read at %0d/%0d, gate ended %0d/%0d", cap_l_at, cap_h_at, gate_l_end, gate_h_end));
    check(charge == kc, $sformatf("precharge %0d cycles, expected %0d", charge, kc));
    check(!bad_sw, "switch settings during preset");
    check(sw.s4 && sw.s5 && !sw.s1 && !sw.s2 && !sw.s3, "loop closed with Flag");
    // start, two measurements, CALC, calculator latency, done register and
    // the CALC_W step, precharge.
    check(cyc == 1 + 2 * (SETTLE + k + READ_WAIT) + 1 + CALC_LAT + 2 + kc,
          $sformatf("start to Flag %0d cycles", cyc));
    $display("k_IFP %0d k_charge %0d: Flag %0d cycles after start", k, kc, cyc);
    repeat (5) @(negedge clk);
    check(flag && !busy, "Flag holds");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(sw == '0 && !flag, "reset state: all switches open");
    run(64, 80);
    run(1, 1);
    run(200, 17);
    run(64, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
