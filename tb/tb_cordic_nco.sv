// tb_cordic_nco: checks the CORDIC oscillator against real-valued cosine and sine.
//
// Angles from all four quadrants (random, plus the axes and the quadrant borders) are
// fed with a random valid pattern.  Each output pair must arrive exactly 13 clocks after
// its angle and lie within TOL LSB of round(32767*cos) and round(32767*sin).
module tb_cordic_nco;
  import ddc_pkg::*;

  localparam int LATENCY = 13;
  localparam int TOL     = 24;
  localparam real PI     = 3.14159265358979323846;

  logic    clk = 1'b0;
  logic    rst, in_valid, out_valid;
  angle_t  angle;
  sample_t cos_out, sin_out;
  int      checks = 0, failures = 0, cycle = 0;

  cordic_nco dut (.clk, .rst, .in_valid, .angle, .cos_out, .sin_out, .out_valid);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  angle_t q_angle [$];
  int     q_cycle [$];
  int     max_err = 0;

  // Output checker: runs on the falling edge, after the outputs have settled.
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      angle_t a; int c; real th; int ec, es;
      if (q_angle.size() == 0) begin
        failures++; $display("unexpected output");
      end else begin
        a = q_angle.pop_front(); c = q_cycle.pop_front();
        th = 2.0 * PI * real'(a) / real'(1 << ANGLE_W);
        ec = int'(cos_out) - int'($rtoi($floor(32767.0 * $cos(th) + 0.5)));
        es = int'(sin_out) - int'($rtoi($floor(32767.0 * $sin(th) + 0.5)));
        if (ec < 0) ec = -ec;
        if (es < 0) es = -es;
        if (ec > max_err) max_err = ec;
        if (es > max_err) max_err = es;
        if (ec > TOL || es > TOL) begin
          failures++;
          $display("angle %0d: cos %0d sin %0d (errors %0d %0d)", a, cos_out, sin_out, ec, es);
        end
        checks++;
        if (cycle - c != LATENCY) begin
          failures++; $display("latency %0d, expected %0d", cycle - c, LATENCY);
        end
        checks++;
      end
    end
  end

  initial begin
    angle_t fixed [10];
    fixed = '{angle_t'(0), angle_t'(1 << 18), angle_t'(1 << 19), angle_t'(-(1 << 18)),
              angle_t'(-(1 << 19)), angle_t'((1 << 18) - 1), angle_t'((1 << 18) + 1),
              angle_t'(-(1 << 18) - 1), angle_t'(87381), angle_t'(-349525)};
    rst = 1'b1; in_valid = 1'b0; angle = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      in_valid = (n < 10) || ($urandom_range(0, 4) != 0);
      angle    = (n < 10) ? fixed[n] : angle_t'($urandom());
      @(posedge clk);
      if (in_valid) begin
        q_angle.push_back(angle);
        q_cycle.push_back(cycle);
      end
      #1;
    end
    in_valid = 1'b0;
    repeat (LATENCY + 5) @(posedge clk);
    if (q_angle.size() != 0) begin
      failures++; $display("%0d outputs missing", q_angle.size());
    end
    checks++;
    $display("largest error %0d LSB", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
