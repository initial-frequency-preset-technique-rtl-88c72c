// tb_pfd: checks the phase-frequency detector.
// Reference and divider clocks of the same 25 ns period are offset by a
// chosen time; the UP pulse width must equal the offset when the reference
// leads, DN when it lags, with the other output staying low. With EN low
// neither output may rise, and the reference edge on which EN rises is not
// counted. A faster divider must give DN pulses only (frequency detection).
`timescale 1ns / 1fs
module tb_pfd;
  logic f_ref = 1'b0, f_div = 1'b0, en = 1'b0, up, dn;
  pfd dut (.*);

  int checks = 0, failures = 0;
  real t_up, t_dn, w_up, w_dn;
  int n_up = 0, n_dn = 0;
  always @(posedge up) begin t_up = $realtime; n_up++; end
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) begin t_dn = $realtime; n_dn++; end
  always @(negedge dn) w_dn = $realtime - t_dn;

  task automatic edge_pair(input real off);   // off > 0: divider later
    w_up = 0.0; w_dn = 0.0;
    if (off >= 0.0) begin
      f_ref = 1'b1; #(off); f_div = 1'b1;
    end else begin
      f_div = 1'b1; #(-off); f_ref = 1'b1;
    end
    #5; f_ref = 1'b0; f_div = 1'b0;
    #(12.5 - 5 - (off < 0 ? -off : off));
    #7.5;
    if (!en) return;
    checks++;
    if (off > 0 && (w_up < off - 1.0e-3 || w_up > off + 1.0e-3 || w_dn != 0.0)) begin
      failures++; $display("FAIL: lead %0.3f: up %0.3f dn %0.3f", off, w_up, w_dn);
    end
    if (off < 0 && (w_dn < -off - 1.0e-3 || w_dn > -off + 1.0e-3 || w_up != 0.0)) begin
      failures++; $display("FAIL: lag %0.3f: up %0.3f dn %0.3f", off, w_up, w_dn);
    end
  endtask

  initial begin
    // EN low: nothing.
    repeat (3) edge_pair(2.0);
    checks++;
    if (n_up != 0 || n_dn != 0) begin failures++; $display("FAIL: output with EN low"); end
    // EN rises together with a reference edge: that edge is ignored.
    f_ref = 1'b1; en <= 1'b1;   // as the EN flip-flop does on this edge
    #5 f_ref = 1'b0; #20;
    checks++;
    if (n_up != 0) begin failures++; $display("FAIL: edge at EN counted"); end
    edge_pair(2.0);
    edge_pair(0.3);
    edge_pair(-1.5);
    edge_pair(-0.05);
    for (int i = 0; i < 50; i++) edge_pair(real'($urandom_range(6000)) / 1000.0 - 3.0);
    // Divider at double frequency: DN only.
    n_up = 0; n_dn = 0;
    for (int i = 0; i < 10; i++) begin
      #1 f_div = 1'b1; #3 f_div = 1'b0; #8.5;
      f_div = 1'b1; #3 f_div = 1'b0; #0.5 f_ref = 1'b1; #5 f_ref = 1'b0; #4;
    end
    checks++;
    if (n_dn < 10) begin failures++; $display("FAIL: no DN for fast divider"); end
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
