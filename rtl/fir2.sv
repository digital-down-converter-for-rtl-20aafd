// fir2: second low-pass filter of the down converter, run at a quarter of the input rate.
//
// A 100-tap (order 99) direct-form FIR with the FIR2 coefficients of ddc_pkg: an
// equiripple low-pass for a 7.86 MHz sample rate with a 0.4 MHz passband edge and a
// 0.55 MHz stopband edge, weights 1 and 40.  It sets the final channel bandwidth and removes
// what would alias when the following stage keeps one sample in two.
//
// Interface and timing are those of fir_direct: one sample per clock at most, result one
// clock after the sample, out_valid marking it.
//
// Order, sample rate, band edges and weights follow the design; the coefficient values
// are this implementation's own design to them (see ddc_pkg).  The design's filter
// specification states a 7.86 MHz sample rate, while a quarter of 30.72 MHz is 7.68 MHz;
// the coefficients follow the stated 7.86 MHz, so at the real rate the band edges sit
// about 2 % lower (0.39 and 0.54 MHz).
module fir2
  import ddc_pkg::*;
#(
  parameter int OUT_SHIFT = 15
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output sample_t y,
  output logic    out_valid
);

  fir_direct #(
    .TAPS      (FIR2_TAPS),
    .COEFFS    (FIR2_COEFFS),
    .OUT_SHIFT (OUT_SHIFT)
  ) u_fir (
    .clk, .rst, .in_valid, .x, .y, .out_valid
  );

endmodule
