// tb_mixer: checks the quadrature mixer's products, rounding, saturation and timing.
//
// Random samples and oscillator values, including the extreme values, are applied with a
// random valid pattern.  One clock later i_out must be round(x*cos/2^15) and q_out
// round(-x*sin/2^15), both saturated to 16 bits; the outputs hold while in_valid is low.
module tb_mixer;
  import ddc_pkg::*;

  logic    clk = 1'b0;
  logic    rst, in_valid, out_valid;
  sample_t x, lo_cos, lo_sin, i_out, q_out;
  int      checks = 0, failures = 0;

  mixer dut (.clk, .rst, .in_valid, .x, .lo_cos, .lo_sin, .i_out, .q_out, .out_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_mul(int a, int b);
    longint p;
    p = longint'(a) * longint'(b);
    p = (p + 16384) >>> 15;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return int'(p);
  endfunction

  function automatic sample_t pick();
    case ($urandom_range(0, 7))
      0: return sample_t'(-32768);
      1: return sample_t'(32767);
      default: return sample_t'($urandom());
    endcase
  endfunction

  int exp_i, exp_q;

  initial begin
    rst = 1'b1; in_valid = 1'b0; x = '0; lo_cos = '0; lo_sin = '0;
    exp_i = 0; exp_q = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      x = pick(); lo_cos = pick(); lo_sin = pick();
      if (in_valid) begin
        exp_i = ref_mul(x, lo_cos);
        exp_q = ref_mul(-int'(x), lo_sin);
      end
      @(posedge clk);
      #1;
      if (out_valid !== in_valid) begin
        failures++; $display("out_valid %0b, in_valid was %0b", out_valid, in_valid);
      end
      if (int'(i_out) != exp_i || int'(q_out) != exp_q) begin
        failures++;
        $display("x %0d cos %0d sin %0d: i %0d q %0d, expected %0d %0d",
                 x, lo_cos, lo_sin, i_out, q_out, exp_i, exp_q);
      end
      checks += 2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
