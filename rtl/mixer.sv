// mixer: quadrature mixer that moves the IF input down to baseband.
//
// The input sample is multiplied by the local oscillator's cosine and sine:
//   i_out = round( x * cos / 2^15)
//   q_out = round(-x * sin / 2^15)
// i.e. x times exp(-j*w*n), which shifts the spectrum down by the oscillator frequency
// so that the wanted band lands around 0 Hz in the I/Q pair.  Products are rounded to
// the nearest sample and saturated to 16 bits.
//
// Timing: one registered stage; in_valid comes out as out_valid one clock later.  The
// caller must present a sample and the oscillator value that belongs to it on the same
// clock.
//
// Multiplying the message by the oscillator follows the design; the I/Q pair, the sign
// of the sine branch, and the rounding are this implementation's choices.
module mixer
  import ddc_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  input  sample_t lo_cos,
  input  sample_t lo_sin,
  output sample_t i_out,
  output sample_t q_out,
  output logic    out_valid
);

  localparam int PW = 2 * SAMPLE_W;
  localparam logic signed [PW:0] RND = (PW+1)'(1 << (SAMPLE_W - 2));

  logic signed [PW:0] p_i, p_q;   // one extra bit: -x * sin can reach +2^30

  always_comb begin
    p_i = (PW+1)'(x * lo_cos) + RND;
    p_q = -((PW+1)'(x * lo_sin)) + RND;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      i_out     <= '0;
      q_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        i_out <= sat_sample(64'(p_i >>> (SAMPLE_W - 1)));
        q_out <= sat_sample(64'(p_q >>> (SAMPLE_W - 1)));
      end
    end
  end

endmodule
