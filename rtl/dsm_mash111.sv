// dsm_mash111: 20-bit MASH 1-1-1 delta-sigma modulator for the fractional
// division ratio.
//
// Three cascaded first-order accumulators of W bits each. The carry of each
// stage is its 1-bit output; the quantization error (the accumulator value) of
// one stage is the input of the next. The noise-cancellation network
//   y = c1 + (1 - z^-1) c2 + (1 - z^-1)^2 c3
// makes the average of y equal frac / 2^W with third-order shaped
// quantization noise; y lies in -3..+4. The modulator type and resolution
// follow the design; the structure is the textbook MASH 1-1-1.
//
// Timing: clocked by the divider output f_DIV. While `en` is low every state
// is cleared and y = 0; the first update is on the first f_DIV edge with `en`
// high. y is registered.
module dsm_mash111 #(
  parameter int unsigned W = 20
) (
  input  logic               clk,    // f_DIV
  input  logic               rst_n,
  input  logic               en,
  input  logic [W-1:0]       frac,   // fractional part of N
  output logic signed [3:0]  y       // integer offset added to N
);
  timeunit 1ns; timeprecision 1fs;

  logic [W-1:0] acc1, acc2, acc3;
  logic         c2_d;                // c2 delayed
  logic         c3_d, c3_dd;         // c3 delayed once and twice

  logic [W:0]   s1, s2, s3;
  always_comb begin
    s1 = {1'b0, acc1} + {1'b0, frac};
    s2 = {1'b0, acc2} + {1'b0, s1[W-1:0]};
    s3 = {1'b0, acc3} + {1'b0, s2[W-1:0]};
  end

  logic signed [3:0] y_c;
  always_comb begin
    y_c = 4'(s1[W]) + (4'(s2[W]) - 4'(c2_d))
        + (4'(s3[W]) - 4'(c3_d) - 4'(c3_d) + 4'(c3_dd));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc1 <= '0; acc2 <= '0; acc3 <= '0;
      c2_d <= 1'b0; c3_d <= 1'b0; c3_dd <= 1'b0;
      y    <= '0;
    end else if (!en) begin
      acc1 <= '0; acc2 <= '0; acc3 <= '0;
      c2_d <= 1'b0; c3_d <= 1'b0; c3_dd <= 1'b0;
      y    <= '0;
    end else begin
      acc1  <= s1[W-1:0];
      acc2  <= s2[W-1:0];
      acc3  <= s3[W-1:0];
      c2_d  <= s2[W];
      c3_d  <= s3[W];
      c3_dd <= c3_d;
      y     <= y_c;
    end
  end
endmodule
