// tb_fb_divider: checks the feedback divider.
// The VCO clock is counted between f_DIV rising edges; each period must be
// n_int + y with y the offset present at the edge that began it (the test
// changes y right after every f_DIV edge, as the modulator does, so a new
// offset takes effect from the following period). After EN
// rises, the first f_DIV edge must come after exactly n_int VCO cycles. With
// EN low f_DIV stays low.
`timescale 1ns / 1fs
module tb_fb_divider;
  logic clk_vco = 1'b0, rst_n = 1'b0, en = 1'b0, f_div;
  logic [7:0] n_int = 8'd127;
  logic signed [3:0] y = '0;

  fb_divider #(.NW(8)) dut (.*);
  always #0.1 clk_vco = ~clk_vco;

  int checks = 0, failures = 0;
  int vco_cnt = 0;
  always @(posedge clk_vco) vco_cnt++;

  task automatic run(input int n, input int periods);
    int c0, exp_n, first;
    n_int = 8'(n);
    y = '0;
    @(negedge clk_vco) en = 1'b0;
    repeat (5) @(posedge clk_vco);
    #0.01;
    checks++; if (f_div) begin failures++; $display("FAIL: f_DIV high with EN low"); end
    @(negedge clk_vco) en = 1'b1;
    c0 = vco_cnt;
    exp_n = n;
    @(posedge f_div);
    first = vco_cnt - c0;
    checks++; if (first != n) begin failures++; $display("FAIL: first edge after %0d cycles, expected %0d", first, n); end
    for (int p = 0; p < periods; p++) begin
      int got;
      exp_n = n + int'(y);   // offset present at the edge that began this period
      y = 4'($signed($urandom_range(7)) - 3);
      c0 = vco_cnt;
      @(posedge f_div);
      got = vco_cnt - c0;
      checks++;
      if (got != exp_n) begin failures++; $display("FAIL: period %0d cycles, expected %0d", got, exp_n); end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk_vco);
    rst_n = 1'b1;
    run(127, 200);
    run(110, 200);
    run(133, 50);
    run(8, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
