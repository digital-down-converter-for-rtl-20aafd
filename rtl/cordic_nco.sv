// cordic_nco: pipelined CORDIC in rotation mode that turns a phase into cosine and sine.
//
// The start vector (X0, 0) is rotated by the angle on the input with the CORDIC
// recurrences, one iteration per pipeline stage:
//   x[i+1] = x[i] - d[i] * (y[i] >>> i)
//   y[i+1] = y[i] + d[i] * (x[i] >>> i)
//   z[i+1] = z[i] - d[i] * atan(2^-i)
// with d[i] = +1 when the residual angle z[i] is greater than zero and -1 otherwise.
// The shifts are arithmetic, so a negative value keeps its sign.  X0 is the amplitude
// 32767 times 0.6073, the inverse of the CORDIC gain, so the result needs no final
// scaling: x ends as 32767*cos(theta) and y as 32767*sin(theta).
//
// The iterations only converge for angles within about +-99.7 degrees, so a first stage
// folds the two outer quadrants onto the inner two: an angle beyond +-90 degrees is
// turned by half a turn (its top bit inverted) and the start vector is negated.
//
// Timing: fully pipelined, one angle per clock, latency 1 + ITER clocks.  With the
// default ITER = 12 the latency is 13 clocks, the CORDIC latency the design quotes.
// in_valid travels alongside the data and comes out as out_valid.
//
// Following the design: the rotation-mode equations, the sign rule for d, arithmetic
// shifts, the 0.6073 gain and the 13-clock latency.  This implementation's own choices:
// the quadrant folding, the word widths (16-bit outputs, 20-bit angle, two guard bits),
// the split of the latency into one folding stage and twelve iterations, and output
// saturation to 16 bits.
module cordic_nco
  import ddc_pkg::*;
#(
  parameter int ITER = 12
) (
  input  logic    clk,
  input  logic    rst,        // synchronous, active high; clears the valid pipeline
  input  logic    in_valid,
  input  angle_t  angle,      // signed fraction of a turn: 2^ANGLE_W is 360 degrees
  output sample_t cos_out,
  output sample_t sin_out,
  output logic    out_valid
);

  // Stage 0 holds the folded start vector; stage i+1 the result of iteration i.
  xy_t    x [ITER+1];
  xy_t    y [ITER+1];
  angle_t z [ITER+1];
  logic   v [ITER+1];

  // Quadrant folding: an angle in [90, 270) degrees has its two top bits different.
  logic quad_outer;
  assign quad_outer = angle[ANGLE_W-1] ^ angle[ANGLE_W-2];

  always_ff @(posedge clk) begin
    x[0] <= quad_outer ? -CORDIC_X0 : CORDIC_X0;
    y[0] <= '0;
    z[0] <= quad_outer ? {~angle[ANGLE_W-1], angle[ANGLE_W-2:0]} : angle;
  end

  for (genvar i = 0; i < ITER; i++) begin : g_iter
    logic d_pos;
    assign d_pos = (z[i] > 0);
    always_ff @(posedge clk) begin
      if (d_pos) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - CORDIC_ATAN[i];
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + CORDIC_ATAN[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) v[0] <= 1'b0;
    else     v[0] <= in_valid;
  end
  for (genvar i = 0; i < ITER; i++) begin : g_valid
    always_ff @(posedge clk) begin
      if (rst) v[i+1] <= 1'b0;
      else     v[i+1] <= v[i];
    end
  end

  // Drop the guard bits with rounding and saturate to a sample.
  localparam xy_t HALF = xy_t'(1 << (GUARD - 1));
  assign cos_out   = sat_sample(64'(signed'((x[ITER] + HALF) >>> GUARD)));
  assign sin_out   = sat_sample(64'(signed'((y[ITER] + HALF) >>> GUARD)));
  assign out_valid = v[ITER];

  initial begin
    assert (ITER >= 1 && ITER <= CORDIC_MAX_ITER)
      else $error("cordic_nco: ITER must be 1..%0d", CORDIC_MAX_ITER);
  end

endmodule
