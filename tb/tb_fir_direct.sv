// tb_fir_direct: checks the direct-form FIR against a reference convolution.
//
// A 7-tap filter with asymmetric coefficients (so that a reversed delay line shows) is
// fed with random samples, extreme values and a random valid pattern.  Every output must
// equal round(sum h(k) x(n-k) / 2^15), saturated to 16 bits, one clock after its sample;
// the delay line must only move on valid samples.
module tb_fir_direct;
  import ddc_pkg::*;

  localparam int     TAPS = 7;
  localparam coeff_t H [TAPS] = '{coeff_t'(12000), coeff_t'(-7000), coeff_t'(3000),
                                  coeff_t'(20000), coeff_t'(-32768), coeff_t'(1), coeff_t'(900)};

  logic    clk = 1'b0;
  logic    rst, in_valid, out_valid;
  sample_t x, y;
  int      checks = 0, failures = 0;

  fir_direct #(.TAPS(TAPS), .COEFFS(H), .OUT_SHIFT(15)) dut (
    .clk, .rst, .in_valid, .x, .y, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hist [TAPS];   // hist[k] = x(n-k)
  int exp_y;

  function automatic int reference();
    longint acc = 0;
    for (int k = 0; k < TAPS; k++) acc += longint'(hist[k]) * longint'(H[k]);
    acc = (acc + 16384) >>> 15;
    if (acc > 32767) acc = 32767;
    if (acc < -32768) acc = -32768;
    return int'(acc);
  endfunction

  initial begin
    rst = 1'b1; in_valid = 1'b0; x = '0; exp_y = 0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 9))
        0: x = sample_t'(32767);
        1: x = sample_t'(-32768);
        2: x = '0;
        default: x = sample_t'($urandom());
      endcase
      if (n < 20) begin          // an impulse first: the output must read back h
        in_valid = 1'b1;
        x = (n == 0) ? sample_t'(-32768) : '0;
      end
      if (in_valid) begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
        exp_y = reference();
      end
      @(posedge clk);
      #1;
      if (out_valid !== in_valid) begin
        failures++; $display("out_valid %0b, in_valid was %0b", out_valid, in_valid);
      end
      if (int'(y) != exp_y) begin
        failures++; $display("n=%0d y %0d expected %0d", n, y, exp_y);
      end
      checks += 2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
