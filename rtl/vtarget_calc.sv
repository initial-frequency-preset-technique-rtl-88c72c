// vtarget_calc: computes the DAC code of the VCO tuning voltage that gives the
// target frequency, by linear interpolation between two measured points:
//
//   V_target = (kN - cnt_l) / (cnt_h - cnt_l) * (V_H - V_L) + V_L
//
// where cnt_l, cnt_h are the FDC counts at V_L and V_H and kN = k_IFP*N_target
// is the target frequency in the same units (20 fraction bits). Because the
// counts are measured on chip, the slope K_VCO used is the real one.
//
// How it works: on `start` the signed product P = (kN - cnt_l*2^20)*(V_H-V_L)
// and the divisor D = (cnt_h - cnt_l)*2^20 are formed. A restoring divider
// then produces Q2 = floor(2|P| / D) one bit per cycle (12 bits, MSB first),
// and the result is V_L +/- round(|P|/D) = V_L +/- (Q2+1)/2. A quotient that
// does not fit, or a result outside 0..1023, saturates to the DAC range and
// sets `sat`. If cnt_h <= cnt_l (no usable slope) the result is V_L and `err`
// is set. The interpolation formula is the design's; the fixed-point format,
// rounding, saturation and divider are this design's choice.
//
// Timing: `done` is high for one cycle, on the 13th (QB+1) rising edge after
// the edge that samples `start`; `code`,
// `sat` and `err` hold until the next `start`. `busy` is high in between.
module vtarget_calc
  import ifp_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [CNT_W-1:0]   cnt_l,
  input  logic [CNT_W-1:0]   cnt_h,
  input  logic [KN_W-1:0]    kn,
  input  logic [DAC_W-1:0]   vl,
  input  logic [DAC_W-1:0]   vh,
  output logic               busy,
  output logic               done,
  output logic [DAC_W-1:0]   code,
  output logic               sat,
  output logic               err
);
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned QB     = DAC_W + 2;           // quotient bits of 2|P|/D
  localparam int unsigned NUM_W  = KN_W + 2;            // signed kN - cnt_l*2^20
  localparam int unsigned DV_W   = DAC_W + 1;           // signed V_H - V_L
  localparam int unsigned PROD_W = NUM_W + DV_W;        // signed product
  localparam int unsigned DEN_W  = CNT_W + FRAC_W;      // divisor
  localparam int unsigned R_W    = PROD_W + 2;          // remainder / shifted divisor
  localparam int unsigned V_W    = DAC_W + 3;           // signed result before clamping

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_FIN} state_e;
  state_e state;

  logic signed [NUM_W-1:0]  num;
  logic signed [DV_W-1:0]   dv;
  logic signed [PROD_W-1:0] prod;
  logic [DEN_W-1:0]         den_c;
  logic [R_W-1:0]           mag2_c;

  logic [R_W-1:0]           rem;
  logic [R_W-1:0]           den;
  logic [QB-1:0]            q2;
  logic [$clog2(QB)-1:0]    bit_idx;
  logic                     neg;
  logic [DAC_W-1:0]         vl_r;

  always_comb begin
    num    = $signed({2'b00, kn}) - $signed({2'b00, cnt_l, {FRAC_W{1'b0}}});
    dv     = $signed({1'b0, vh}) - $signed({1'b0, vl});
    prod   = PROD_W'(num) * PROD_W'(dv);
    den_c  = {cnt_h - cnt_l, {FRAC_W{1'b0}}};
    mag2_c = prod[PROD_W-1] ? R_W'(-prod) << 1 : R_W'(prod) << 1;
  end

  // Shifted divisor and trial subtraction for the current quotient bit.
  logic [R_W-1:0] den_sh;
  logic           fits;
  always_comb begin
    den_sh = den << bit_idx;
    fits   = rem >= den_sh;
  end

  // Rounded quotient and signed result.
  logic [QB-1:0]          q_rnd;
  logic signed [V_W-1:0]  v_res;
  always_comb begin
    q_rnd = (q2 + QB'(1)) >> 1;
    v_res = neg ? $signed(V_W'(vl_r)) - $signed(V_W'(q_rnd))
                : $signed(V_W'(vl_r)) + $signed(V_W'(q_rnd));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      busy    <= 1'b0;
      done    <= 1'b0;
      code    <= '0;
      sat     <= 1'b0;
      err     <= 1'b0;
      rem     <= '0;
      den     <= '0;
      q2      <= '0;
      bit_idx <= '0;
      neg     <= 1'b0;
      vl_r    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          busy    <= 1'b1;
          sat     <= 1'b0;
          err     <= 1'b0;
          vl_r    <= vl;
          neg     <= prod[PROD_W-1];
          rem     <= mag2_c;
          den     <= R_W'(den_c);
          q2      <= '0;
          bit_idx <= $bits(bit_idx)'(QB - 1);
          if (cnt_h <= cnt_l) begin
            err   <= 1'b1;
            q2    <= '0;
            state <= S_FIN;
          end else if (mag2_c >= (R_W'(den_c) << QB)) begin
            sat   <= 1'b1;
            q2    <= '1;
            state <= S_FIN;
          end else begin
            state <= S_DIV;
          end
        end
        S_DIV: begin
          if (fits) begin
            rem         <= rem - den_sh;
            q2[bit_idx] <= 1'b1;
          end
          if (bit_idx == '0) state <= S_FIN;
          else               bit_idx <= bit_idx - 1'b1;
        end
        S_FIN: begin
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
          if (v_res < 0) begin
            code <= '0;
            sat  <= 1'b1;
          end else if (v_res > $signed(V_W'({DAC_W{1'b1}}))) begin
            code <= '1;
            sat  <= 1'b1;
          end else begin
            code <= v_res[DAC_W-1:0];
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
