// tb_fir2: checks the second low-pass filter against its specification.
//
// Sample rate 7.68 MHz, a quarter of the 30.72 MHz input rate (the filter was designed
// for 7.86 MHz, which moves its band edges by about 2 %).  The testbench measures, by
// correlating the settled output with a cosine and sine of the input frequency, the gain
// of tones at 0.05 and 0.3 MHz (passband, edge 0.4 MHz) and at 0.7, 1.5 and 3 MHz
// (stopband, edge 0.55 MHz).  Passband gains must lie within 1 dB of 0 dB and stopband
// gains below -45 dB.  It also checks that the impulse response is symmetric (linear
// phase) and 100 taps long, and that the output follows each sample by one clock.
module tb_fir2;
  import ddc_pkg::*;

  localparam real FS = 7.68e6;
  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 100;

  logic    clk = 1'b0;
  logic    rst, in_valid, out_valid;
  sample_t x, y;
  int      checks = 0, failures = 0;

  fir2 dut (.clk, .rst, .in_valid, .x, .y, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Feed one sample, return the output it produces.
  task automatic step(input int v, output int r);
    in_valid = 1'b1; x = sample_t'(v);
    @(posedge clk); #1;
    if (out_valid !== 1'b1) begin
      failures++; $display("out_valid missing");
    end
    r = y;
    in_valid = 1'b0;
  endtask

  // Gain in dB of a tone of frequency f.
  task automatic tone_gain(input real f, output real g_db);
    real si, sq, amp; int r; int settle, len;
    settle = 2 * N; len = 7680;   // 7680 samples: whole periods of every test tone
    si = 0.0; sq = 0.0;
    for (int n = 0; n < settle + len; n++) begin
      step($rtoi($floor(20000.0 * $cos(2.0 * PI * f * n / FS) + 0.5)), r);
      if (n >= settle) begin
        // output n is the response to input n
        si += r * $cos(2.0 * PI * f * n / FS);
        sq += r * $sin(2.0 * PI * f * n / FS);
      end
    end
    amp  = 2.0 * $sqrt(si * si + sq * sq) / len;
    g_db = 20.0 * $log10((amp + 1e-3) / 20000.0);
  endtask

  int  imp [N + 4];
  real g;

  initial begin
    int r;
    rst = 1'b1; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // Impulse response.
    for (int n = 0; n < N + 4; n++) begin
      step((n == 0) ? 32767 : 0, r);
      imp[n] = r;
    end
    for (int n = 0; n < N; n++) begin
      if (imp[n] != imp[N - 1 - n]) begin
        failures++; $display("h(%0d)=%0d but h(%0d)=%0d", n, imp[n], N - 1 - n, imp[N - 1 - n]);
      end
      checks++;
    end
    if (imp[0] == 0 || imp[N] != 0 || imp[N + 1] != 0) begin
      failures++; $display("impulse response is not %0d taps long", N);
    end
    checks++;

    tone_gain(0.05e6, g); $display("0.05 MHz: %0.1f dB", g);
    if (g < -1.0 || g > 1.0) begin failures++; $display("passband gain out of range"); end
    checks++;
    tone_gain(0.3e6, g); $display("0.3 MHz: %0.1f dB", g);
    if (g < -1.0 || g > 1.0) begin failures++; $display("passband gain out of range"); end
    checks++;
    tone_gain(0.7e6, g); $display("0.7 MHz: %0.1f dB", g);
    if (g > -45.0) begin failures++; $display("stopband too high"); end
    checks++;
    tone_gain(1.5e6, g); $display("1.5 MHz: %0.1f dB", g);
    if (g > -45.0) begin failures++; $display("stopband too high"); end
    checks++;
    tone_gain(3.0e6, g); $display("3 MHz: %0.1f dB", g);
    if (g > -45.0) begin failures++; $display("stopband too high"); end
    checks++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
