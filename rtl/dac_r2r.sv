// dac_r2r: behavioural model of the 10-bit R-2R DAC with its non-inverting
// output buffer (not synthesizable).
//
// The real DAC steers ten binary-weighted currents into an R-2R ladder and
// buffers the ladder voltage; its full scale is almost rail to rail on a 1 V
// supply. The model gives V = code * VFS / 2^10 plus an integral
// non-linearity term INL_LSB * 4*x*(1-x) (x = code / 2^10), a bow that peaks
// at mid scale; the design reports an INL of -0.25 to +0.63 LSB, and the
// default bow is 0.5 LSB. The output follows the code at once (the buffer
// settles well within a reference period).
//
// Interface: code in, voltage out (real, volts).
module dac_r2r #(
  parameter int unsigned BITS    = 10,
  parameter real         VFS     = 1.0,   // full scale, volts
  parameter real         INL_LSB = 0.5
) (
  input  logic [BITS-1:0] code,
  output real             v_out
);
  timeunit 1ns; timeprecision 1fs;

  real lsb, x;
  always_comb begin
    lsb   = VFS / real'(2 ** BITS);
    x     = real'(code) / real'(2 ** BITS);
    v_out = real'(code) * lsb + INL_LSB * lsb * 4.0 * x * (1.0 - x);
  end
endmodule
