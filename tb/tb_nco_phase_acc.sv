// tb_nco_phase_acc: checks the NCO phase accumulator against a reference model.
//
// Random tuning words and a random valid pattern are applied; every phase_valid must
// come exactly one clock after an in_valid and carry the sum of the tuning words of all
// earlier accepted samples (modulo 2^32), starting from 0 after reset.
module tb_nco_phase_acc;
  import ddc_pkg::*;

  logic   clk = 1'b0;
  logic   rst, in_valid;
  phase_t ftw, phase;
  logic   phase_valid;
  int     checks = 0, failures = 0;

  nco_phase_acc dut (.clk, .rst, .in_valid, .ftw, .phase, .phase_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  phase_t model_acc, expect_phase;
  logic   prev_valid;

  initial begin
    rst = 1'b1; in_valid = 1'b0; ftw = '0;
    model_acc = '0; prev_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      // Drive inputs for this clock.
      in_valid = ($urandom_range(0, 3) != 0);
      ftw      = (n < 1000) ? 32'h1000_0000 : phase_t'($urandom());
      @(posedge clk);
      #1;
      // Outputs now reflect the clock edge just passed.
      if (phase_valid !== in_valid) begin
        failures++; $display("phase_valid %0b after in_valid %0b", phase_valid, in_valid);
      end
      checks++;
      if (in_valid) begin
        if (phase !== model_acc) begin
          failures++; $display("n=%0d phase %h expected %h", n, phase, model_acc);
        end
        checks++;
        model_acc += ftw;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
