// tb_vtarget_calc: checks the V_target interpolation against a real-number
// model of V_L + (kN/2^20 - cnt_l)/(cnt_h - cnt_l)*(V_H - V_L), rounded to
// the nearest code (ties may go either way) and clamped to 0..1023. Covers
// targets inside and outside V_L..V_H, V_H < V_L, results that clamp, a
// missing slope (cnt_h <= cnt_l, result V_L with err), and the latency
// from start to done (14 falling edges counted from the one that raises
// start, i.e. done on the 13th rising edge after start is sampled).
`timescale 1ns / 1fs
module tb_vtarget_calc;
  import ifp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [CNT_W-1:0] cnt_l = '0, cnt_h = '0;
  logic [KN_W-1:0]  kn = '0;
  logic [DAC_W-1:0] vl = '0, vh = '0, code;
  logic busy, done, sat, err;

  vtarget_calc dut (.*);
  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sat = 0, n_err = 0, n_in = 0;

  task automatic one(input int cl, input int ch, input real f_rel, input int l, input int h);
    real kn_r, v, lo, hi;
    int  cycles;
    bit  exp_sat, exp_err;
    kn_r = real'(cl) + f_rel * real'(ch - cl);
    if (kn_r < 0.0) kn_r = 0.0;
    @(negedge clk);
    cnt_l = CNT_W'(cl); cnt_h = CNT_W'(ch); vl = DAC_W'(l); vh = DAC_W'(h);
    kn = KN_W'(longint'(kn_r * 1048576.0));
    kn_r = real'(kn) / 1048576.0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    exp_err = (ch <= cl);
    if (exp_err) v = real'(l);
    else v = real'(l) + (kn_r - real'(cl)) / real'(ch - cl) * real'(h - l);
    exp_sat = !exp_err && (v < -0.5 || v > 1023.5);
    lo = v - 0.5 - 1.0e-6; hi = v + 0.5 + 1.0e-6;
    if (v < 0.0) begin lo = 0.0; hi = 0.0; end
    if (v > 1023.0) begin lo = 1023.0; hi = 1023.0; end
    checks++;
    if (real'(code) < lo || real'(code) > hi || err != exp_err || (sat != exp_sat && !((v > -0.6 && v < -0.4) || (v > 1023.4 && v < 1023.6)))) begin
      failures++;
      $display("FAIL: cl %0d ch %0d kn %0.4f vl %0d vh %0d: code %0d sat %0d err %0d, expected %0.3f", cl, ch, kn_r, l, h, code, sat, err, v);
    end
    checks++;
    if (cycles != 14 && !exp_err && !sat) begin
      failures++;
      $display("FAIL: latency %0d", cycles);
    end
    if (sat) n_sat++; else if (err) n_err++; else n_in++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    one(8155, 8181, 0.5, 307, 717);                      // mid
    one(8155, 8181, 0.0, 307, 717);                      // exactly V_L
    one(8155, 8181, 1.0, 307, 717);                      // exactly V_H
    one(7055, 7080, -0.3, 307, 717);                     // below V_L
    one(7055, 7080, 1.3, 307, 717);                      // above V_H
    one(7055, 7080, 3.0, 307, 717);                      // clamps high
    one(7055, 7080, -2.0, 307, 717);                     // clamps low
    one(7055, 7055, 0.5, 307, 717);                      // no slope
    one(7080, 7055, 0.5, 307, 717);                      // negative slope
    one(100, 200, 0.25, 800, 200);                       // V_H below V_L
    for (int i = 0; i < 300; i++) begin
      int cl, d;
      cl = $urandom_range(60000, 1000);
      d  = $urandom_range(2000, 1);
      one(cl, cl + d, real'($urandom_range(1400)) / 1000.0 - 0.2,
          $urandom_range(1023), $urandom_range(1023));
    end
    $display("cases: in range %0d, saturated %0d, no slope %0d", n_in, n_sat, n_err);
    checks++;
    if (n_in == 0 || n_sat == 0 || n_err == 0) begin failures++; $display("FAIL: case coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
