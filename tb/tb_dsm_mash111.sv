// tb_dsm_mash111: checks the MASH 1-1-1 modulator.
// For several fractional words the running sum of y over M clocks must stay
// within 4 of M*frac/2^20 (the noise-shaped error is bounded), y must stay in
// -3..+4, a third-order word must use more than three output levels, and y
// must be 0 while EN is low. A reference model of the three accumulators,
// written here, is also compared clock by clock.
`timescale 1ns / 1fs
module tb_dsm_mash111;
  localparam int W = 20;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  logic [W-1:0] frac = '0;
  logic signed [3:0] y;

  dsm_mash111 #(.W(W)) dut (.*);
  always #10 clk = ~clk;

  int checks = 0, failures = 0;

  // Reference model state.
  longint a1, a2, a3;
  int c2d, c3d, c3dd, y_ref;

  task automatic run(input int unsigned f, input int m);
    real sum, ideal, maxerr;
    bit  levels [int];
    int  bad_range, bad_ref;
    frac = W'(f);
    a1 = 0; a2 = 0; a3 = 0; c2d = 0; c3d = 0; c3dd = 0;
    @(negedge clk) en = 1'b1;
    sum = 0.0; maxerr = 0.0; bad_range = 0; bad_ref = 0;
    for (int i = 0; i < m; i++) begin
      int c1, c2, c3;
      @(posedge clk);
      // reference: next state from the current one
      a1 = a1 + f;          c1 = int'(a1 >> W); a1 = a1 % (1 << W);
      a2 = a2 + a1;         c2 = int'(a2 >> W); a2 = a2 % (1 << W);
      a3 = a3 + a2;         c3 = int'(a3 >> W); a3 = a3 % (1 << W);
      y_ref = c1 + c2 - c2d + c3 - 2 * c3d + c3dd;
      c2d = c2; c3dd = c3d; c3d = c3;
      #1;
      if (int'(y) != y_ref) bad_ref++;
      if (y < -3 || y > 4) bad_range++;
      levels[int'(y)] = 1'b1;
      sum   += real'(y);
      ideal = real'(i + 1) * real'(f) / real'(1 << W);
      if (sum - ideal > maxerr) maxerr = sum - ideal;
      if (ideal - sum > maxerr) maxerr = ideal - sum;
    end
    checks++; if (bad_ref != 0)   begin failures++; $display("FAIL: frac %0d: %0d mismatches with reference", f, bad_ref); end
    checks++; if (bad_range != 0) begin failures++; $display("FAIL: y out of range"); end
    checks++; if (maxerr > 4.0)   begin failures++; $display("FAIL: frac %0d running-sum error %0.3f", f, maxerr); end
    $display("frac %0d (%0.6f): %0d levels, max running error %0.3f", f, real'(f) / real'(1 << W), levels.num(), maxerr);
    if (f == 32'h80000 + 12345) begin
      checks++; if (levels.num() <= 3) begin failures++; $display("FAIL: too few levels"); end
    end
    @(negedge clk) en = 1'b0;
    @(posedge clk); #1;
    checks++; if (y != 0) begin failures++; $display("FAIL: y not 0 with EN low"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(32'h80000, 2000);          // 0.5   (N = 127.5)
    run(32'hA0000, 2000);          // 0.625 (N = 110.625)
    run(32'h80000 + 12345, 4000);
    run(1, 1000);
    run(32'hFFFFF, 1000);
    run($urandom_range(1048575), 3000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
