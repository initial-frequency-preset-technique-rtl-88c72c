// tb_fdc: checks the frequency-to-digital converter.
// A 40 MHz reference opens the gate for k reference periods; the VCO clock
// runs at several frequencies in the 4.3-5.3 GHz range. The count must equal
// k * f_VCO / f_REF to within the converter's error bound (1.5 counts) plus
// the synchronizer's one-cycle uncertainty, and must hold after the gate
// closes.
`timescale 1ns / 1fs
module tb_fdc;
  import ifp_pkg::*;
  logic clk_ref = 1'b0, clk_vco = 1'b0, rst_n = 1'b0, gate = 1'b0;
  logic [CNT_W-1:0] count;
  real  half_vco = 0.1;

  fdc dut (.clk_vco(clk_vco), .rst_n(rst_n), .gate(gate), .count(count));

  always #12.5 clk_ref = ~clk_ref;
  initial forever begin #(half_vco); clk_vco = ~clk_vco; end

  int checks = 0, failures = 0;

  task automatic measure(input real f_mhz, input int k);
    real exp_cnt;
    logic [CNT_W-1:0] c0;
    half_vco = 500.0 / f_mhz;
    @(posedge clk_ref) gate <= 1'b1;
    repeat (k) @(posedge clk_ref);
    gate <= 1'b0;
    repeat (2) @(posedge clk_ref);
    exp_cnt = real'(k) * f_mhz / 40.0;
    checks++;
    if ((real'(count) - exp_cnt) > 2.5 || (exp_cnt - real'(count)) > 2.5) begin
      failures++;
      $display("FAIL: f %0.1f k %0d count %0d expected %0.2f", f_mhz, k, count, exp_cnt);
    end
    c0 = count;
    repeat (3) @(posedge clk_ref);
    checks++;
    if (count != c0) begin failures++; $display("FAIL: count moved after gate closed"); end
  endtask

  initial begin
    repeat (3) @(posedge clk_ref);
    rst_n = 1'b1;
    measure(4300.0, 64);
    measure(5300.0, 64);
    measure(5100.0, 32);
    measure(4425.0, 256);
    measure(4880.0, 1);
    for (int i = 0; i < 6; i++) measure(4300.0 + real'($urandom_range(1000)), 16 + $urandom_range(200));
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
