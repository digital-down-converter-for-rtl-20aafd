// decimator: keeps one sample in M and discards the M-1 samples in between.
//
// A counter runs from 0 to M-1 over the accepted input samples; the sample that arrives
// while it is 0 is passed on, the others are dropped.  The output rate is therefore the
// input rate divided by M.  The input must already be low-pass filtered, which is what
// the FIR in front of each decimator does.  The first sample after reset is kept.
//
// Timing: the kept sample appears one clock after it was accepted, with out_valid high
// for one clock.
//
// Decimation by a counter that passes one sample per M follows the design; which of the
// M samples is kept (the first) and the output register are this implementation's
// choices.
module decimator
  import ddc_pkg::*;
#(
  parameter int M = 4
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output sample_t y,
  output logic    out_valid
);

  localparam int CW = (M > 1) ? $clog2(M) : 1;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst) begin
      count     <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (count == '0);
      if (in_valid) begin
        if (count == '0) y <= x;
        count <= (count == CW'(M - 1)) ? '0 : count + 1'b1;
      end
    end
  end

  initial begin
    assert (M >= 1) else $error("decimator: M must be at least 1");
  end

endmodule
