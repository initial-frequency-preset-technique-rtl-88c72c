// tb_vtune_ctrl: checks that the V_tune controller drives V_L and V_H as
// code/1024 volts and passes the DAC's V_target when it is selected.
`timescale 1ns / 1fs
module tb_vtune_ctrl;
  import ifp_pkg::*;
  vsel_e vsel = VSEL_VL;
  logic [DAC_W-1:0] vl_code = '0, vh_code = '0;
  real v_target = 0.0, v_out;
  vtune_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic near(input real got, input real want, input string what);
    checks++;
    if (got - want > 1.0e-9 || want - got > 1.0e-9) begin
      failures++; $display("FAIL: %s: %f expected %f", what, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 50; i++) begin
      vl_code = 10'($urandom); vh_code = 10'($urandom);
      v_target = real'($urandom_range(1000)) / 1000.0;
      vsel = VSEL_VL;     #1; near(v_out, real'(vl_code) / 1024.0, "V_L");
      vsel = VSEL_VH;     #1; near(v_out, real'(vh_code) / 1024.0, "V_H");
      vsel = VSEL_TARGET; #1; near(v_out, v_target, "V_target");
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
