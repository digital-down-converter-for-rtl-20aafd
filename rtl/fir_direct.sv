// fir_direct: direct-form FIR filter, one output per input sample.
//
// A tapped delay line holds the last TAPS-1 input samples.  Each accepted sample x(n)
// forms, together with the delay line, the sum of products
//   acc = sum_{k=0}^{TAPS-1} h(k) * x(n-k)
// which is rounded by 2^OUT_SHIFT and saturated to a 16-bit output sample, while the
// delay line shifts by one.  With Q1.15 coefficients OUT_SHIFT = 15 gives the filter its
// designed gain.  The coefficients are a parameter, so the same module serves both low-
// pass filters of the converter.
//
// Timing: one sample per clock at most; the output of the sample accepted on a clock
// with in_valid high appears on the next clock with out_valid high.  The whole sum of
// products is one combinational stage, as in the direct form; a pipelined adder tree
// would be needed for high clock rates.
//
// The direct-form structure (delay line, one multiplier per tap, one summation) follows
// the design.  The accumulator width, rounding, saturation and the one-clock output
// register are this implementation's choices.
module fir_direct
  import ddc_pkg::*;
#(
  parameter int     TAPS      = 4,
  parameter coeff_t COEFFS [TAPS] = '{default: coeff_t'(8192)},
  parameter int     OUT_SHIFT = 15
) (
  input  logic    clk,
  input  logic    rst,         // synchronous; clears the delay line and the output
  input  logic    in_valid,
  input  sample_t x,
  output sample_t y,
  output logic    out_valid
);

  localparam int ACC_W = SAMPLE_W + COEFF_W + $clog2(TAPS + 1);
  typedef logic signed [ACC_W-1:0] acc_t;

  sample_t delay [TAPS];   // delay[0] is x(n) this clock, delay[k] is x(n-k)
  sample_t taps  [TAPS-1]; // registered delay line x(n-1) .. x(n-TAPS+1)
  acc_t    acc;
  acc_t    acc_rounded;

  localparam acc_t RND = (OUT_SHIFT > 0) ? acc_t'(acc_t'(1) <<< (OUT_SHIFT - 1)) : '0;

  always_comb begin
    delay[0] = x;
    for (int k = 1; k < TAPS; k++) delay[k] = taps[k-1];
    acc = '0;
    for (int k = 0; k < TAPS; k++) acc += acc_t'(delay[k] * COEFFS[k]);
    acc_rounded = (acc + RND) >>> OUT_SHIFT;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS - 1; k++) taps[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < TAPS - 1; k++) taps[k] <= delay[k];
        y <= sat_sample(64'(acc_rounded));
      end
    end
  end

  initial begin
    assert (TAPS >= 2) else $error("fir_direct: TAPS must be at least 2");
  end

endmodule
