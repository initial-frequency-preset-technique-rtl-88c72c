// tb_vco: checks the VCO model's frequency. For a set of capacitor codes and
// tuning voltages the period is measured over 1000 cycles and compared with
// the tuning law F0 + cap*15.625 MHz + 40 MHz/V * V_tune + bow; the end
// points must be 4.3 GHz (code 0, 0.3 V) and 5.3 GHz (code 63, 0.7 V) to
// within 1 MHz.
`timescale 1ns / 1fs
module tb_vco;
  real v_tune = 0.5;
  logic [5:0] cap = '0;
  logic clk;
  vco dut (.*);

  int checks = 0, failures = 0;

  function automatic real law(input real v, input int c);
    return 4288.0 + 15.625 * real'(c) + 40.0 * v + 1.0 * 4.0 * (v - 0.3) * (0.7 - v) / 0.16;
  endfunction

  task automatic measure(input real v, input int c, output real f);
    real t0;
    v_tune = v; cap = 6'(c);
    repeat (3) @(posedge clk);
    t0 = $realtime;
    repeat (1000) @(posedge clk);
    f = 1000.0 * 1.0e3 / ($realtime - t0);
  endtask

  initial begin
    real f;
    measure(0.3, 0, f);
    checks++; if (f < 4299.0 || f > 4301.0) begin failures++; $display("FAIL: low end %0.3f", f); end
    measure(0.7, 63, f);
    checks++; if (f < 5299.0 || f > 5301.0) begin failures++; $display("FAIL: high end %0.3f", f); end
    for (int i = 0; i < 20; i++) begin
      real v; int c;
      v = 0.2 + real'($urandom_range(600)) / 1000.0;
      c = $urandom_range(63);
      measure(v, c, f);
      checks++;
      if (f - law(v, c) > 0.05 || law(v, c) - f > 0.05) begin
        failures++; $display("FAIL: cap %0d v %0.3f: %0.3f MHz expected %0.3f", c, v, f, law(v, c));
      end
    end
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
