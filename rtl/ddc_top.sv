// ddc_top: digital down converter from an IF sample stream to a baseband I/Q stream.
//
// Chain, per I and Q branch:
//   IF input -> mixer (x local oscillator) -> FIR1 -> keep 1 in 4 -> FIR2 -> keep 1 in 2
// The local oscillator is an NCO: a phase accumulator stepped by the tuning word ftw for
// every input sample, followed by a pipelined CORDIC that turns each phase into cosine
// and sine.  The input sample is delayed by the oscillator's latency (1 + CORDIC
// latency = 14 clocks) so that each sample meets the oscillator value of its own phase:
// the mixer output for input sample n is x(n) * exp(-j * 2*pi * n * ftw / 2^32).
// FIR1 runs at the input rate (30.72 MS/s for the design's rate), the first decimator
// drops it to a quarter, FIR2 runs there, and the second decimator halves it again, so
// one I/Q pair comes out for every 8 input samples.
//
// Interface: one 16-bit two's complement IF sample per clock at most, flagged by
// in_valid; gaps are allowed and only delay the output.  i_out/q_out are 16-bit samples
// flagged by out_valid.  The tuning word may change at any time and takes effect with
// the next sample: the oscillator frequency is ftw * Fs / 2^32.  Reset is synchronous and
// active high.
//
// The CORDIC takes the top 20 bits of the 32-bit phase; the 12 bits below only refine
// the frequency resolution (Fs / 2^32, about 7 mHz at 30.72 MHz) and are left unused.
//
// Latency from an input sample to the output it completes: 14 (oscillator alignment)
// + 1 (mixer) + 1 (FIR1) + 1 (decimator) + 1 (FIR2) + 1 (decimator) = 19 clocks.
//
// The block chain, the CORDIC oscillator, direct-form filters of the printed orders and
// the decimation factors 4 and 2 follow the design.  The I/Q (quadrature) split of the
// single mixer, the word widths and the alignment delay are this implementation's own.
module ddc_top
  import ddc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t if_in,
  input  phase_t  ftw,
  output sample_t i_out,
  output sample_t q_out,
  output logic    out_valid
);

  localparam int CORDIC_ITER = 12;
  localparam int LO_LATENCY  = 1 + (1 + CORDIC_ITER);   // phase accumulator + CORDIC

  // Local oscillator.
  phase_t  phase;
  logic    phase_valid;
  sample_t lo_cos, lo_sin;
  logic    lo_valid;

  nco_phase_acc #(.W(PHASE_W)) u_phase (
    .clk, .rst, .in_valid, .ftw,
    .phase, .phase_valid
  );

  cordic_nco #(.ITER(CORDIC_ITER)) u_cordic (
    .clk, .rst,
    .in_valid  (phase_valid),
    .angle     (angle_t'(phase[PHASE_W-1 -: ANGLE_W])),
    .cos_out   (lo_cos),
    .sin_out   (lo_sin),
    .out_valid (lo_valid)
  );

  // Input sample aligned with its oscillator value.
  sample_t x_d;
  logic    x_d_valid;

  sample_delay #(.D(LO_LATENCY)) u_align (
    .clk, .rst, .in_valid, .x(if_in),
    .y(x_d), .out_valid(x_d_valid)
  );

  // Mixer.
  sample_t mix_i, mix_q;
  logic    mix_valid;

  mixer u_mixer (
    .clk, .rst,
    .in_valid (x_d_valid),
    .x        (x_d),
    .lo_cos, .lo_sin,
    .i_out    (mix_i),
    .q_out    (mix_q),
    .out_valid(mix_valid)
  );

  // Filter and decimation chains, identical for I and Q.
  sample_t f1_i, f1_q, d4_i, d4_q, f2_i, f2_q;
  logic    f1_i_v, f1_q_v, d4_i_v, d4_q_v, f2_i_v, f2_q_v, d2_i_v, d2_q_v;

  fir1 u_fir1_i (.clk, .rst, .in_valid(mix_valid), .x(mix_i), .y(f1_i), .out_valid(f1_i_v));
  fir1 u_fir1_q (.clk, .rst, .in_valid(mix_valid), .x(mix_q), .y(f1_q), .out_valid(f1_q_v));

  decimator #(.M(4)) u_dec4_i (.clk, .rst, .in_valid(f1_i_v), .x(f1_i), .y(d4_i), .out_valid(d4_i_v));
  decimator #(.M(4)) u_dec4_q (.clk, .rst, .in_valid(f1_q_v), .x(f1_q), .y(d4_q), .out_valid(d4_q_v));

  fir2 u_fir2_i (.clk, .rst, .in_valid(d4_i_v), .x(d4_i), .y(f2_i), .out_valid(f2_i_v));
  fir2 u_fir2_q (.clk, .rst, .in_valid(d4_q_v), .x(d4_q), .y(f2_q), .out_valid(f2_q_v));

  decimator #(.M(2)) u_dec2_i (.clk, .rst, .in_valid(f2_i_v), .x(f2_i), .y(i_out), .out_valid(d2_i_v));
  decimator #(.M(2)) u_dec2_q (.clk, .rst, .in_valid(f2_q_v), .x(f2_q), .y(q_out), .out_valid(d2_q_v));

  assign out_valid = d2_i_v;

  // The two branches see the same valid stream, so they stay in step.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (lo_valid == x_d_valid) else $error("ddc_top: oscillator and sample out of step");
      assert (d2_i_v == d2_q_v)      else $error("ddc_top: I and Q branches out of step");
    end
  end

endmodule
