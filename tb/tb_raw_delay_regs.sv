// tb_raw_delay_regs: checks that raw_delay_regs holds x[n-k] in tap k and
// shifts only on accepted samples.
module tb_raw_delay_regs;
  import cpsd_pkg::*;
  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_sample = '0;
  sample_t taps [DEPTH];
  int checks = 0, failures = 0;
  sample_t hist [DEPTH];

  raw_delay_regs #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < DEPTH; k++) hist[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 2) != 0);
      in_sample = sample_t'($urandom);
      @(posedge clk);
      if (in_valid) begin
        for (int k = DEPTH - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = in_sample;
      end
      #1;
      for (int k = 0; k < DEPTH; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          $display("FAIL n=%0d tap %0d: got %0d want %0d", n, k, taps[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
