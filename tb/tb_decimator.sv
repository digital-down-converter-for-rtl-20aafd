// tb_decimator: checks decimation by 4 and by 2.
//
// Both instances receive a numbered sample stream (sample n carries the value n) with a
// random valid pattern.  The decimate-by-M instance must pass exactly the samples
// 0, M, 2M, ... in order, each one clock after it was accepted, and nothing else.
module tb_decimator;
  import ddc_pkg::*;

  logic    clk = 1'b0;
  logic    rst, in_valid;
  sample_t x, y4, y2;
  logic    v4, v2;
  int      checks = 0, failures = 0;

  decimator            dut4 (.clk, .rst, .in_valid, .x, .y(y4), .out_valid(v4));
  decimator #(.M(2))   dut2 (.clk, .rst, .in_valid, .x, .y(y2), .out_valid(v2));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int count = 0, out4 = 0, out2 = 0;

  initial begin
    rst = 1'b1; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 4000; n++) begin
      logic keep4, keep2;
      in_valid = ($urandom_range(0, 2) != 0);
      x = sample_t'(count);
      keep4 = in_valid && (count % 4 == 0);
      keep2 = in_valid && (count % 2 == 0);
      @(posedge clk);
      #1;
      if (v4 !== keep4 || (keep4 && int'(y4) != count)) begin
        failures++; $display("M=4: sample %0d valid %0b y %0d", count, v4, y4);
      end
      if (v2 !== keep2 || (keep2 && int'(y2) != count)) begin
        failures++; $display("M=2: sample %0d valid %0b y %0d", count, v2, y2);
      end
      checks += 2;
      if (v4) out4++;
      if (v2) out2++;
      if (in_valid) count++;
    end
    if (out4 != (count + 3) / 4 || out2 != (count + 1) / 2) begin
      failures++; $display("rates: %0d in, %0d and %0d out", count, out4, out2);
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
