// tb_ddc_top: end-to-end test of the down converter at its default parameters.
//
// A sampled IF tone at 30.72 MS/s goes in; the testbench checks the baseband I/Q that
// comes out against what an ideal down converter gives, worked out from the frequencies
// alone:
//   A  tone at f_nco + 0.1 MHz, continuous input: the output must be a complex tone
//      rotating forward at 0.1 MHz (0.1636 rad per output at 3.84 MS/s) with a constant
//      magnitude of A/2 times the filter passband gain (-24 to -14 dB in total), and
//      exactly one output per 8 inputs.
//   B  the same with random gaps in the input (in_valid low 30 % of the clocks): the
//      result must not change, as the oscillator steps per sample, not per clock.
//   C  a new tuning word (f_nco + 0.2 MHz) while the tone stays: the output must now
//      rotate backward at -0.1 MHz.
//   D  a tone 2 MHz above f_nco, outside the channel: the output must stay below
//      20 LSB.
// It also checks the 19-clock latency from the first input after reset to the first
// output, and counts how often each mechanism ran: decimation by 4, decimation by 2,
// input gaps, tuning-word changes and backward rotation; one that never ran is a
// failure.
module tb_ddc_top;
  import ddc_pkg::*;

  localparam real FS    = 30.72e6;
  localparam real PI    = 3.14159265358979323846;
  localparam real A     = 20000.0;
  localparam real F_NCO = 5.0e6;
  localparam int  LATENCY = 19;
  localparam int  SKIP    = 80;        // outputs ignored while the filters settle

  logic    clk = 1'b0;
  logic    rst, in_valid, out_valid;
  sample_t if_in, i_out, q_out;
  phase_t  ftw;
  int      checks = 0, failures = 0, cycle = 0;

  ddc_top dut (.clk, .rst, .in_valid, .if_in, .ftw, .i_out, .q_out, .out_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_dec4 = 0, n_dec2 = 0, n_gaps = 0, n_retune = 0, n_backward = 0;
  always @(negedge clk) begin
    if (!rst) begin
      if (dut.d4_i_v) n_dec4++;
      if (out_valid)  n_dec2++;
    end
  end

  // Output statistics of the running phase.
  int  phase_id = 0, outs = 0, used = 0;
  real mag_sum, mag_min, mag_max, dphi_sum, prev_i, prev_q;
  int  first_out_cycle = -1;

  task automatic clear_stats();
    outs = 0; used = 0; mag_sum = 0.0; mag_min = 1.0e9; mag_max = 0.0; dphi_sum = 0.0;
  endtask

  always @(negedge clk) begin
    if (!rst && out_valid) begin
      real ii, qq, m;
      if (first_out_cycle < 0) first_out_cycle = cycle;
      ii = real'(i_out); qq = real'(q_out);
      outs++;
      if (outs > SKIP) begin
        m = $sqrt(ii * ii + qq * qq);
        mag_sum += m;
        if (m < mag_min) mag_min = m;
        if (m > mag_max) mag_max = m;
        if (used > 0) dphi_sum += $atan2(qq * prev_i - ii * prev_q, ii * prev_i + qq * prev_q);
        used++;
      end
      prev_i = ii; prev_q = qq;
    end
  end

  longint sample_n = 0;     // index of the next accepted IF sample
  int     first_in_cycle = -1;

  // Feed n accepted samples of a tone at f_tone, with in_valid low on gap_pct % of clocks.
  task automatic feed(input real f_tone, input int n, input int gap_pct);
    int accepted = 0;
    while (accepted < n) begin
      if ($urandom_range(0, 99) < gap_pct) begin
        in_valid = 1'b0;
        n_gaps++;
      end else begin
        in_valid = 1'b1;
        if_in = sample_t'($rtoi($floor(A * $cos(2.0 * PI * f_tone * real'(sample_n) / FS) + 0.5)));
      end
      @(posedge clk);
      if (in_valid) begin
        if (first_in_cycle < 0) first_in_cycle = cycle;
        sample_n++;
        accepted++;
      end
      #1;
    end
    in_valid = 1'b0;
  endtask

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic phase_t tuning(input real f);
    return phase_t'(longint'($floor(f / FS * 4294967296.0 + 0.5)));
  endfunction

  // Check a tone phase: magnitude range, flatness, rotation per output.
  task automatic check_tone(input string name, input real f_base);
    real mag, want_dphi, dphi, lo, hi;
    lo = A / 2.0 * $pow(10.0, -24.0 / 20.0);
    hi = A / 2.0 * $pow(10.0, -14.0 / 20.0);
    want_dphi = 2.0 * PI * f_base / (FS / 8.0);
    mag  = mag_sum / used;
    dphi = dphi_sum / (used - 1);
    $display("%s: %0d outputs used, magnitude %0.1f (min %0.1f max %0.1f), %0.4f rad/output (want %0.4f)",
             name, used, mag, mag_min, mag_max, dphi, want_dphi);
    if (used < 100) begin failures++; $display("%s: too few outputs", name); end
    checks++;
    if (mag < lo || mag > hi) begin failures++; $display("%s: magnitude out of range", name); end
    checks++;
    if (mag_min < 0.95 * mag || mag_max > 1.05 * mag) begin
      failures++; $display("%s: magnitude not constant", name);
    end
    checks++;
    if (fabs(dphi - want_dphi) > 0.02 * fabs(want_dphi)) begin
      failures++; $display("%s: wrong baseband frequency", name);
    end
    checks++;
    if (dphi < 0.0) n_backward++;
  endtask

  real ref_mag;


  initial begin
    int in_count;
    rst = 1'b1; in_valid = 1'b0; if_in = '0; ftw = tuning(F_NCO);
    clear_stats();
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;

    // A: continuous input.
    feed(F_NCO + 0.1e6, 2400, 0);
    repeat (LATENCY + 2) @(posedge clk); #1;
    if (first_out_cycle - first_in_cycle != LATENCY) begin
      failures++; $display("latency %0d, expected %0d", first_out_cycle - first_in_cycle, LATENCY);
    end
    checks++;
    if (outs != 2400 / 8) begin failures++; $display("A: %0d outputs for 2400 inputs", outs); end
    checks++;
    check_tone("A", 0.1e6);
    ref_mag = mag_sum / used;

    // B: same tone with gaps in the input.
    clear_stats();
    feed(F_NCO + 0.1e6, 2400, 30);
    repeat (LATENCY + 2) @(posedge clk); #1;
    if (outs != 2400 / 8) begin failures++; $display("B: %0d outputs for 2400 inputs", outs); end
    checks++;
    check_tone("B", 0.1e6);
    if (fabs(mag_sum / used - ref_mag) > 0.02 * ref_mag) begin
      failures++; $display("B: gaps changed the magnitude");
    end
    checks++;

    // C: retune 0.2 MHz higher; the tone is now 0.1 MHz below the oscillator.
    ftw = tuning(F_NCO + 0.2e6);
    n_retune++;
    clear_stats();
    feed(F_NCO + 0.1e6, 2400, 10);
    repeat (LATENCY + 2) @(posedge clk); #1;
    check_tone("C", -0.1e6);

    // D: out-of-channel tone, 2 MHz above the oscillator.
    ftw = tuning(F_NCO);
    n_retune++;
    clear_stats();
    feed(F_NCO + 2.0e6, 2400, 0);
    repeat (LATENCY + 2) @(posedge clk); #1;
    $display("D: largest output magnitude %0.1f", mag_max);
    if (used < 100 || mag_max > 20.0) begin failures++; $display("D: out-of-channel tone passed"); end
    checks++;

    $display("mechanisms: dec4 %0d, dec2 %0d, gaps %0d, retunes %0d, backward rotations %0d",
             n_dec4, n_dec2, n_gaps, n_retune, n_backward);
    if (n_dec4 == 0 || n_dec2 == 0 || n_gaps == 0 || n_retune == 0 || n_backward == 0) begin
      failures++; $display("a mechanism never ran");
    end
    checks++;
    if (n_dec4 != 2 * n_dec2) begin failures++; $display("decimation rates disagree"); end
    checks++;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
