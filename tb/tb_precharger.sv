// tb_precharger: checks the precharger model: linear transconductance for
// small differences, current limit of either sign, inputs clipped to the
// rails; and, driving a 2.3 nF capacitor from 0 V to 0.9 V, settling to
// within 1 mV inside 1 us, as the real precharger does.
`timescale 1ns / 1fs
module tb_precharger;
  real v_inp = 0.0, v_fb = 0.0, i_out;
  precharger dut (.*);

  int checks = 0, failures = 0;
  task automatic near(input real got, input real want, input real tol, input string what);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++; $display("FAIL: %s: %e expected %e", what, got, want);
    end
  endtask

  initial begin
    real v_cap, t_settle;
    v_inp = 0.50; v_fb = 0.49; #1; near(i_out, 0.05 * 0.01, 1.0e-9, "linear, sourcing");
    v_inp = 0.30; v_fb = 0.35; #1; near(i_out, -0.05 * 0.05, 1.0e-9, "linear, sinking");
    v_inp = 0.90; v_fb = 0.10; #1; near(i_out, 3.0e-3, 1.0e-9, "limit, sourcing");
    v_inp = 0.00; v_fb = 0.80; #1; near(i_out, -3.0e-3, 1.0e-9, "limit, sinking");
    v_inp = 1.30; v_fb = 0.99; #1; near(i_out, 0.05 * 0.01, 1.0e-9, "input clipped at VDD");
    v_inp = -0.2; v_fb = 0.01; #1; near(i_out, -0.05 * 0.01, 1.0e-9, "input clipped at 0");
    // Settling into 2.3 nF.
    v_inp = 0.9; v_cap = 0.0; v_fb = 0.0; t_settle = -1.0;
    for (int i = 0; i < 2000; i++) begin
      #0.5;
      v_cap += i_out * 0.5e-9 / 2.3e-9;
      v_fb = v_cap;
      if (t_settle < 0.0 && v_cap > 0.899) t_settle = real'(i + 1) * 0.5;
    end
    $display("settled to 1 mV in %0.1f ns", t_settle);
    checks++;
    if (t_settle < 0.0 || t_settle > 1000.0) begin failures++; $display("FAIL: settling"); end
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
