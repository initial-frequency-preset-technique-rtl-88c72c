// tb_dac_r2r: checks the DAC model over all 1024 codes: zero at code 0, one
// LSB of 1/1024 V per step on average, monotonic, and the deviation from the
// straight line (INL) between 0 and +0.5 LSB with its peak at mid scale.
`timescale 1ns / 1fs
module tb_dac_r2r;
  logic [9:0] code = '0;
  real v_out;
  dac_r2r dut (.*);

  int checks = 0, failures = 0;

  initial begin
    real prev, inl, inl_max, inl_min;
    int  nonmono, at_max;
    prev = -1.0; nonmono = 0; inl_max = -9.0; inl_min = 9.0; at_max = 0;
    for (int c = 0; c < 1024; c++) begin
      code = 10'(c);
      #1;
      if (v_out <= prev) nonmono++;
      prev = v_out;
      inl = v_out * 1024.0 - real'(c);
      if (inl > inl_max) begin inl_max = inl; at_max = c; end
      if (inl < inl_min) inl_min = inl;
    end
    code = '0; #1;
    checks++; if (v_out != 0.0) begin failures++; $display("FAIL: code 0 gives %f", v_out); end
    code = 10'd1023; #1;
    checks++; if (v_out < 1022.9 / 1024.0 || v_out > 1023.1 / 1024.0) begin failures++; $display("FAIL: full scale %f", v_out); end
    checks++; if (nonmono != 0) begin failures++; $display("FAIL: not monotonic"); end
    checks++; if (inl_min < -1.0e-9 || inl_max > 0.5 + 1.0e-9 || inl_max < 0.49) begin
      failures++; $display("FAIL: INL %f..%f", inl_min, inl_max);
    end
    checks++; if (at_max < 500 || at_max > 524) begin failures++; $display("FAIL: INL peak at %0d", at_max); end
    $display("INL %0.3f..%0.3f LSB, peak at code %0d", inl_min, inl_max, at_max);
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
