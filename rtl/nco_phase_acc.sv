// nco_phase_acc: phase accumulator of the numerically controlled oscillator.
//
// Each accepted input sample (in_valid high) adds the frequency tuning word ftw to a
// PHASE_W-bit phase register, so the oscillator frequency is f = ftw * Fs / 2^PHASE_W
// for a sample rate Fs.  The phase that belongs to the accepted sample is presented on
// phase one clock later, with phase_valid high for that one clock; the first sample
// after reset gets phase 0.  The accumulator wraps modulo 2^PHASE_W, which is the
// natural wrap of the angle at one full turn.
//
// The oscillator itself (a CORDIC that turns the phase into cosine and sine) follows the
// design; the accumulator in front of it, its width and the per-sample stepping are
// this implementation's choice.
module nco_phase_acc
  import ddc_pkg::*;
#(
  parameter int W = PHASE_W
) (
  input  logic         clk,
  input  logic         rst,          // synchronous, active high
  input  logic         in_valid,     // one sample arrives this clock
  input  logic [W-1:0] ftw,          // frequency tuning word
  output logic [W-1:0] phase,        // phase of the sample accepted last clock
  output logic         phase_valid
);

  logic [W-1:0] acc;

  always_ff @(posedge clk) begin
    if (rst) begin
      acc         <= '0;
      phase       <= '0;
      phase_valid <= 1'b0;
    end else begin
      phase_valid <= in_valid;
      if (in_valid) begin
        phase <= acc;
        acc   <= acc + ftw;
      end
    end
  end

endmodule
