// tb_loop_filter: checks the loop-filter model and its switches against
// closed-form results:
//   - precharge (S1, S2, S3 closed): a constant 1 mA charges C1 + C2 as one
//     node, V_LF = I*t/(C1+C2), C1 follows V_LF, V_tune follows the
//     controller;
//   - closed loop (S4, S5 closed): a charge packet Q first raises V_LF by
//     Q/C2, and after many R1*C1 time constants every node sits at
//     V0 + Q/(C1+C2+C3);
//   - all switches open: V_tune holds and pump charge is ignored.
`timescale 1ns / 1fs
module tb_loop_filter;
  localparam real C1 = 1.27e-9, C2 = 0.1e-9, C3 = 20.0e-12;
  logic s1 = 1'b0, s2 = 1'b0, s3 = 1'b0, s4 = 1'b0, s5 = 1'b0;
  real q_cp = 0.0, i_pc = 0.0, v_ctrl = 0.0;
  real v_lf, v_tune, v_c1;

  loop_filter dut (.*);

  int checks = 0, failures = 0;
  task automatic near(input real got, input real want, input real tol, input string what);
    checks++;
    if (got - want > tol || want - got > tol) begin
      failures++; $display("FAIL: %s: %0.6f expected %0.6f", what, got, want);
    end
  endtask

  initial begin
    real v0, v_after;
    #10;
    s1 = 1'b1; s2 = 1'b1; s3 = 1'b1; v_ctrl = 0.42; i_pc = 1.0e-3;
    #500;
    i_pc = 0.0;
    #5;
    near(v_lf, 1.0e-3 * 500.0e-9 / (C1 + C2), 0.004, "precharge ramp");
    near(v_c1, v_lf, 1.0e-9, "C1 merged with C2");
    near(v_tune, 0.42, 1.0e-9, "V_tune from controller");
    // Close the loop.
    s1 = 1'b0; s2 = 1'b0; s3 = 1'b0;
    s4 = 1'b1; s5 = 1'b1;
    #3000;   // let V_tune reach V_LF
    near(v_tune, v_lf, 0.002, "V_tune joins V_LF through R3");
    v0 = (v_c1 * C1 + v_lf * C2 + v_tune * C3) / (C1 + C2 + C3);   // total charge / total C
    v_after = v_lf;
    q_cp = 1.0e-12;
    #3;
    near(v_lf - v_after, 1.0e-12 / C2, 0.0005, "charge step on C2");
    #100000;
    near(v_lf, v0 + 1.0e-12 / (C1 + C2 + C3), 0.0005, "charge shared by all capacitors");
    near(v_c1, v_lf, 0.0005, "C1 settled");
    near(v_tune, v_lf, 0.0005, "V_tune settled");
    // Open everything: V_tune holds, pump charge ignored.
    s4 = 1'b0; s5 = 1'b0;
    v0 = v_tune;
    q_cp = 5.0e-12;
    #1000;
    near(v_tune, v0, 1.0e-9, "V_tune holds");
    near(v_lf, v0, 0.0005, "pump ignored with S4 open");
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
