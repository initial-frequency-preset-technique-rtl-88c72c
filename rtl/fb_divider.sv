// fb_divider: multi-modulus feedback divider (divide by N).
//
// A down counter clocked by the VCO. It divides by n_int + y, where y is the
// delta-sigma offset sampled when the counter reloads. The output f_DIV rises
// on the VCO edge that ends each division period and stays high for the
// first half of the next period. While `en` is low the counter is held at its
// start value and f_DIV is low, so after `en` rises the first f_DIV rising
// edge comes exactly n_int VCO cycles later; with `en` raised on a reference
// edge this aligns f_DIV with the following reference edge. The divider's
// existence and its enable follow the design; counter structure, duty cycle
// and the lower limit (ratios below 4 are raised to 4) are this design's.
//
// Timing: f_DIV is a registered output in the VCO domain.
module fb_divider #(
  parameter int unsigned NW = 8      // width of the integer division ratio
) (
  input  logic              clk_vco,
  input  logic              rst_n,
  input  logic              en,
  input  logic [NW-1:0]     n_int,   // integer part of N
  input  logic signed [3:0] y,       // delta-sigma offset
  output logic              f_div
);
  timeunit 1ns; timeprecision 1fs;

  logic [NW:0] cnt;      // cycles left in this period, minus one
  logic [NW:0] half;     // f_DIV falls when cnt reaches this value
  logic [NW:0] n_next;

  always_comb begin
    n_next = (NW+1)'($signed({1'b0, n_int}) + (NW+1)'(y));
    if (n_next < (NW+1)'(4)) n_next = (NW+1)'(4);
  end

  always_ff @(posedge clk_vco or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      half  <= '0;
      f_div <= 1'b0;
    end else if (!en) begin
      cnt   <= (NW+1)'(n_int) - 1'b1;
      half  <= '0;
      f_div <= 1'b0;
    end else if (cnt == '0) begin
      cnt   <= n_next - 1'b1;
      half  <= n_next >> 1;
      f_div <= 1'b1;
    end else begin
      cnt <= cnt - 1'b1;
      if (cnt == half) f_div <= 1'b0;
    end
  end
endmodule
