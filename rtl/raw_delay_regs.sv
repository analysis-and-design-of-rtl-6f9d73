// raw_delay_regs: delay registers (DR) for the raw ECG samples.
//
// A shift register of the most recent raw ADC samples. Each accepted sample
// (in_valid high for one clock) enters tap 0 and every older sample moves one
// tap down, so taps[k] holds x[n-k]. The filter unit reads the taps as the
// input history of its first section. The delay-register chain in front of
// the filter follows the design description; its depth of 3 (x[n], x[n-1],
// x[n-2], what one second-order section needs) is this implementation's choice.
// Timing: taps change on the clock edge at which in_valid is sampled high.
// All taps reset to zero.
module raw_delay_regs
  import cpsd_pkg::*;
#(
  parameter int unsigned DEPTH = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_sample,
  output sample_t taps [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
    end else if (in_valid) begin
      taps[0] <= in_sample;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
