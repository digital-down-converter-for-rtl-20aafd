// fir1: first low-pass filter of the down converter, run at the full input rate.
//
// A 50-tap (order 49) direct-form FIR with the FIR1 coefficients of ddc_pkg: an
// equiripple low-pass for a 30.72 MHz sample rate with a 0.4 MHz passband edge and a
// 0.6 MHz stopband edge, weights 1 and 60.  It removes what would alias onto the band of
// interest when the following stage keeps one sample in four.
//
// Interface and timing are those of fir_direct: one sample per clock at most, result one
// clock after the sample, out_valid marking it.
//
// Order, sample rate, band edges and weights follow the design; the coefficient values
// are this implementation's own design to them (see ddc_pkg).
module fir1
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
    .TAPS      (FIR1_TAPS),
    .COEFFS    (FIR1_COEFFS),
    .OUT_SHIFT (OUT_SHIFT)
  ) u_fir (
    .clk, .rst, .in_valid, .x, .y, .out_valid
  );

endmodule
