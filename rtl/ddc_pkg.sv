// ddc_pkg: types, widths and constant tables shared by the digital down converter.
//
// Samples are 16-bit two's complement fractions (Q1.15) throughout the data path.
// The NCO phase is a 32-bit fraction of a turn, of which the CORDIC uses the top
// ANGLE_W bits.
//
// FIR1_COEFFS and FIR2_COEFFS are the two low-pass filters of the converter, quantised
// as round(h[k] * 2^15).  h[k] is the Parks-McClellan (equiripple) low-pass design for
// the specification of each filter:
//   FIR1: order 49 (50 taps), Fs 30.72 MHz, Fpass 0.4 MHz, Fstop 0.6 MHz,
//         weights Wpass 1, Wstop 60.
//   FIR2: order 99 (100 taps), Fs 7.86 MHz, Fpass 0.4 MHz, Fstop 0.55 MHz,
//         weights Wpass 1, Wstop 40.
// Those specifications are the ones of the design; the coefficient values themselves are
// this implementation's own design to them.  With those weights FIR1 has a passband gain
// of about -16 dB (DC gain 5144/32768) and a stopband of about -36 dB; FIR2 has unity
// passband gain within 0.7 dB and a stopband below -53 dB.
//
// CORDIC_ATAN[i] = round(atan(2^-i) / (2*pi) * 2^ANGLE_W), the elementary rotation
// angles in units of 2^-ANGLE_W turn.  CORDIC_X0 = round(0.60725294 * 32767 * 2^GUARD)
// pre-scales the start vector by the inverse of the CORDIC gain.
package ddc_pkg;

  localparam int SAMPLE_W = 16;               // data path sample width
  localparam int COEFF_W  = 16;               // FIR coefficient width (Q1.15)
  localparam int PHASE_W  = 32;               // NCO phase accumulator width
  localparam int ANGLE_W  = 20;               // CORDIC angle width
  localparam int GUARD    = 2;                // CORDIC fractional guard bits
  localparam int XY_W     = SAMPLE_W + 2 + GUARD;  // CORDIC x/y register width
  localparam int CORDIC_MAX_ITER = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEFF_W-1:0]  coeff_t;
  typedef logic        [PHASE_W-1:0]  phase_t;
  typedef logic signed [ANGLE_W-1:0]  angle_t;
  typedef logic signed [XY_W-1:0]     xy_t;

  localparam xy_t CORDIC_X0 = xy_t'(79591);

  localparam angle_t CORDIC_ATAN [CORDIC_MAX_ITER] = '{
    angle_t'(131072), angle_t'(77376), angle_t'(40884), angle_t'(20753),
    angle_t'(10417),  angle_t'(5213),  angle_t'(2607),  angle_t'(1304),
    angle_t'(652),    angle_t'(326),   angle_t'(163),   angle_t'(81),
    angle_t'(41),     angle_t'(20),    angle_t'(10),    angle_t'(5)
  };

  // Saturate a wide signed value to a sample.
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    if (v > 64'sd32767)       return sample_t'(16'sh7fff);
    else if (v < -64'sd32768) return sample_t'(16'sh8000);
    else                      return sample_t'(v);
  endfunction

  localparam int FIR1_TAPS = 50;
  localparam coeff_t FIR1_COEFFS [FIR1_TAPS] = '{
    278, 51, 56, 60, 64, 69, 73, 78, 82, 87,
    91, 95, 98, 102, 106, 108, 112, 114, 116, 119,
    120, 122, 123, 124, 124, 124, 124, 123, 122, 120,
    119, 116, 114, 112, 108, 106, 102, 98, 95, 91,
    87, 82, 78, 73, 69, 64, 60, 56, 51, 278
  };
  localparam int FIR2_TAPS = 100;
  localparam coeff_t FIR2_COEFFS [FIR2_TAPS] = '{
    -27, 10, 23, 43, 70, 102, 136, 169, 197, 215,
    218, 205, 173, 123, 59, -15, -91, -160, -213, -242,
    -241, -206, -140, -46, 65, 181, 286, 365, 403, 390,
    320, 195, 25, -175, -382, -569, -708, -770, -734, -582,
    -311, 77, 562, 1119, 1710, 2295, 2830, 3274, 3591, 3756,
    3756, 3591, 3274, 2830, 2295, 1710, 1119, 562, 77, -311,
    -582, -734, -770, -708, -569, -382, -175, 25, 195, 320,
    390, 403, 365, 286, 181, 65, -46, -140, -206, -241,
    -242, -213, -160, -91, -15, 59, 123, 173, 205, 218,
    215, 197, 169, 136, 102, 70, 43, 23, 10, -27
  };

endpackage
