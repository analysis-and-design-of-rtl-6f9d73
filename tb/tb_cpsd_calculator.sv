// tb_cpsd_calculator: random and corner-case differences; the result must be
// floor(num * 256 / max(den, 1)) saturated to 16 bits, after 19 clocks.
module tb_cpsd_calculator;
  import cpsd_pkg::*;
  localparam int DFW = 9;
  logic clk = 0, rst_n = 0, start = 0;
  logic [DFW-1:0] num = '0, den = '0;
  logic busy, done;
  logic [CPSD_W-1:0] cpsd;
  int checks = 0, failures = 0;

  cpsd_calculator #(.DFW(DFW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int a, input int b);
    longint want;
    int lat;
    @(negedge clk);
    num = DFW'(a); den = DFW'(b); start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    want = (longint'(a) * 256) / ((b == 0) ? 1 : b);
    if (want > 65535) want = 65535;
    checks += 2;
    if (longint'(cpsd) != want) begin
      failures++; $display("FAIL %0d/%0d: got %0d want %0d", a, b, cpsd, want);
    end
    if (lat != DFW + CPSD_FRAC + 2) begin
      failures++; $display("FAIL latency %0d", lat);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    one(0, 0); one(0, 5); one(7, 0); one(256, 1); one(255, 1); one(511, 511);
    one(100, 3); one(1, 256);
    for (int n = 0; n < 300; n++) one($urandom_range(0, 511), $urandom_range(0, 511));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
