// tb_ifp_registers: checks the register set between FDC and calculator.
// Random k_IFP, N_target and V_L/V_H are loaded; k_IFP*N_target must equal
// the product computed here, inputs changed without `load` must not reach the
// outputs, and FDC counts must land in cnt_l or cnt_h as cap_sel says.
`timescale 1ns / 1fs
module tb_ifp_registers;
  import ifp_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0, cap_en = 1'b0, cap_sel = 1'b0;
  logic [K_W-1:0]   k_ifp = '0;
  logic [N_W-1:0]   n_target = '0;
  logic [DAC_W-1:0] vl_in = '0, vh_in = '0, vl, vh;
  logic [CNT_W-1:0] fdc_count = '0, cnt_l, cnt_h;
  logic [KN_W-1:0]  kn;

  ifp_registers dut (.*);
  always #12.5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    longint unsigned prod;
    logic [CNT_W-1:0] l_exp, h_exp;
    logic [DAC_W-1:0] vl_exp, vh_exp;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(kn == '0 && cnt_l == '0 && cnt_h == '0, "reset values");
    for (int i = 0; i < 40; i++) begin
      @(negedge clk);
      k_ifp    = K_W'($urandom_range(1, 511));
      n_target = N_W'({$urandom_range(107, 133), 20'($urandom)});
      vl_in    = DAC_W'($urandom);
      vh_in    = DAC_W'($urandom);
      load     = 1'b1;
      prod     = longint'(k_ifp) * longint'(n_target);
      vl_exp   = vl_in;
      vh_exp   = vh_in;
      @(negedge clk);
      load  = 1'b0;
      check(kn == KN_W'(prod), "k_IFP*N_target");
      check(vl == vl_exp && vh == vh_exp, "V_L/V_H captured");
      // Change inputs without load: outputs hold.
      k_ifp = ~k_ifp; vl_in = ~vl_in;
      // Store counts.
      l_exp = CNT_W'($urandom);
      fdc_count = l_exp; cap_en = 1'b1; cap_sel = 1'b0;
      @(negedge clk);
      h_exp = CNT_W'($urandom);
      fdc_count = h_exp; cap_sel = 1'b1;
      @(negedge clk);
      cap_en = 1'b0; fdc_count = ~fdc_count;
      @(negedge clk);
      check(cnt_l == l_exp, "count into cnt_l");
      check(cnt_h == h_exp, "count into cnt_h");
      check(kn == KN_W'(prod) && vl == vl_exp, "held without load");
    end
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
