// sample_delay: fixed delay of a sample stream by D clocks.
//
// A shift register of D stages carries a sample and its valid flag, so that the input
// sample reaches the mixer on the same clock as the oscillator value computed for it.
// Valid flags are cleared by reset; the data stages are not.
module sample_delay
  import ddc_pkg::*;
#(
  parameter int D = 14
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    in_valid,
  input  sample_t x,
  output sample_t y,
  output logic    out_valid
);

  sample_t d_data  [D];
  logic    d_valid [D];

  always_ff @(posedge clk) begin
    d_data[0] <= x;
    for (int k = 1; k < D; k++) d_data[k] <= d_data[k-1];
    if (rst) begin
      for (int k = 0; k < D; k++) d_valid[k] <= 1'b0;
    end else begin
      d_valid[0] <= in_valid;
      for (int k = 1; k < D; k++) d_valid[k] <= d_valid[k-1];
    end
  end

  assign y         = d_data[D-1];
  assign out_valid = d_valid[D-1];

  initial begin
    assert (D >= 1) else $error("sample_delay: D must be at least 1");
  end

endmodule
