// tb_fir1: checks the first low-pass filter against its specification.
//
// Sample rate 30.72 MHz.  The testbench measures, by correlating the settled output
// with a cosine and sine of the input frequency, the gain of tones at 0.05 and 0.3 MHz
// (passband, edge 0.4 MHz) and at 0.8, 2 and 7 MHz (stopband, edge 0.6 MHz).  The
// specification's weights (1 in the passband, 60 in the stopband) leave a passband near
// -20 dB and a stopband near -36 dB: passband gains must lie between -24 and -14 dB, and
// every stopband gain must be below -30 dB.  It also checks that the impulse response is
// symmetric (linear phase) and 50 taps long, and that the output follows each sample by
// one clock.
module tb_fir1;
  import ddc_pkg::*;

  localparam real FS = 30.72e6;
  localparam real PI = 3.14159265358979323846;
  localparam int  N  = 50;

  logic    clk = 1'b0;
  logic    rst, in_valid, out_valid;
  sample_t x, y;
  int      checks = 0, failures = 0;

  fir1 dut (.clk, .rst, .in_valid, .x, .y, .out_valid);

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
    settle = 2 * N; len = 6144;   // 6144 samples: whole periods of every test tone
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
    if (g < -24.0 || g > -14.0) begin failures++; $display("passband gain out of range"); end
    checks++;
    tone_gain(0.3e6, g); $display("0.3 MHz: %0.1f dB", g);
    if (g < -24.0 || g > -14.0) begin failures++; $display("passband gain out of range"); end
    checks++;
    tone_gain(0.8e6, g); $display("0.8 MHz: %0.1f dB", g);
    if (g > -30.0) begin failures++; $display("stopband too high"); end
    checks++;
    tone_gain(2.0e6, g); $display("2 MHz: %0.1f dB", g);
    if (g > -30.0) begin failures++; $display("stopband too high"); end
    checks++;
    tone_gain(7.0e6, g); $display("7 MHz: %0.1f dB", g);
    if (g > -30.0) begin failures++; $display("stopband too high"); end
    checks++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
