// tb_en_sync: checks the Flag-to-EN flip-flop. EN must be low in reset,
// follow Flag one reference edge later, never change between edges, and rise
// exactly on a reference rising edge.
`timescale 1ns / 1fs
module tb_en_sync;
  logic clk_ref = 1'b0, rst_n = 1'b0, flag = 1'b0, en;
  en_sync dut (.*);
  always #12.5 clk_ref = ~clk_ref;

  int checks = 0, failures = 0;
  logic flag_d;

  always @(posedge en) begin
    checks++;
    if (clk_ref !== 1'b1) begin failures++; $display("FAIL: EN rose away from a reference edge"); end
  end

  initial begin
    flag = 1'b1;
    repeat (3) @(posedge clk_ref);
    #1;
    checks++;
    if (en) begin failures++; $display("FAIL: EN high in reset"); end
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk_ref);
      flag_d = flag;
      flag = 1'($urandom);
      #3;
      checks++;
      if (en != (i == 0 ? 1'b0 : flag_d) && i > 0) begin failures++; $display("FAIL: EN changed between edges"); end
      @(posedge clk_ref);
      #1;
      checks++;
      if (en != flag) begin failures++; $display("FAIL: EN %0b Flag %0b", en, flag); end
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
