// tb_charge_pump: checks the charge-pump model.
// UP and DN pulses of known widths are applied; the cumulative charge must
// grow by I_CP times the UP width, fall by I_CP times the DN width, not
// change when both are high or when EN is low, and sub-nanosecond pulses
// must be counted exactly.
`timescale 1ns / 1fs
module tb_charge_pump;
  logic up = 1'b0, dn = 1'b0, en = 1'b0;
  real  q_out;
  charge_pump dut (.*);

  int checks = 0, failures = 0;
  task automatic expect_q(input real q_exp, input string what);
    checks++;
    if (q_out - q_exp > 1.0e-18 || q_exp - q_out > 1.0e-18) begin
      failures++; $display("FAIL: %s: q %e expected %e", what, q_out, q_exp);
    end
  endtask

  initial begin
    real q;
    #10;
    up = 1'b1; #5; up = 1'b0; #10;
    expect_q(0.0, "EN low");
    en = 1'b1; #3;
    q = 0.0;
    up = 1'b1; #2.5; up = 1'b0; #10;
    q += 100.0e-6 * 2.5e-9;
    expect_q(q, "UP 2.5 ns");
    dn = 1'b1; #7.25; dn = 1'b0; #10;
    q -= 100.0e-6 * 7.25e-9;
    expect_q(q, "DN 7.25 ns");
    up = 1'b1; dn = 1'b1; #4; up = 1'b0; dn = 1'b0; #10;
    expect_q(q, "UP and DN together");
    for (int i = 0; i < 100; i++) begin
      real w;
      w = real'($urandom_range(500)) / 1000.0;   // up to 0.5 ns
      if (i % 2 == 0) begin up = 1'b1; #(w); up = 1'b0; q += 100.0e-6 * w * 1.0e-9; end
      else begin dn = 1'b1; #(w); dn = 1'b0; q -= 100.0e-6 * w * 1.0e-9; end
      #3.3;
    end
    expect_q(q, "short pulses");
    up = 1'b1; #40;   // long pulse, seen while it is on
    q += 100.0e-6 * 40.0e-9;
    checks++;
    if (q_out - q > 100.0e-6 * 1.0e-9 || q - q_out > 100.0e-6 * 1.0e-9) begin
      failures++; $display("FAIL: charge not brought up to date during a long pulse");
    end
    up = 1'b0;
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
