// tb_filt_sram: circular window memory. Writes random samples, checks the
// write pointer, the full flag after DEPTH writes, and reads back the last
// DEPTH samples oldest-first from wptr with one clock of read latency.
module tb_filt_sram;
  import cpsd_pkg::*;
  localparam int DEPTH = 32;
  localparam int AW = $clog2(DEPTH);
  logic clk = 0, rst_n = 0, we = 0;
  sample_t wdata = '0, rdata;
  logic [AW-1:0] wptr, raddr = '0;
  logic full;
  int checks = 0, failures = 0;
  sample_t hist [$];

  filt_sram #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_window();
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      raddr = AW'(wptr + AW'(i));
      @(negedge clk);
      checks++;
      if (rdata !== hist[hist.size() - DEPTH + i]) begin
        failures++;
        $display("FAIL window word %0d: got %0d want %0d", i, rdata, hist[hist.size() - DEPTH + i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3 * DEPTH + 5; n++) begin
      @(negedge clk);
      we = 1; wdata = sample_t'($urandom);
      hist.push_back(wdata);
      @(negedge clk);
      we = 0;
      checks++;
      if (full !== (n + 1 >= DEPTH)) begin
        failures++; $display("FAIL full after %0d writes", n + 1);
      end
      checks++;
      if (int'(wptr) != (n + 1) % DEPTH) begin
        failures++; $display("FAIL wptr after %0d writes: %0d", n + 1, wptr);
      end
      if (n + 1 == DEPTH || n + 1 == 2 * DEPTH + 7 || n + 1 == 3 * DEPTH + 5) check_window();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
