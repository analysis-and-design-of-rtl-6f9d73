// tb_diff_accumulator: two PM memory models with random contents; the count
// of cells with |cur - ref| > h is compared with one worked out here, and
// done must come N*N + 2 clocks after start.
module tb_diff_accumulator;
  localparam int N = 8, CNT_W = 12, PAW = $clog2(N * N), DFW = $clog2(N * N + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [CNT_W-1:0] h = '0, ref_rdata, cur_rdata;
  logic busy, done;
  logic [PAW-1:0] raddr;
  logic [DFW-1:0] diff;
  logic [CNT_W-1:0] rmem [N * N], cmem [N * N];
  int checks = 0, failures = 0;

  diff_accumulator #(.N(N), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    ref_rdata <= rmem[raddr];
    cur_rdata <= cmem[raddr];
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int hv, input int spread);
    int want, lat, dd;
    want = 0;
    for (int a = 0; a < N * N; a++) begin
      rmem[a] = CNT_W'($urandom_range(0, 4000));
      cmem[a] = ($urandom_range(0, 3) == 0) ? CNT_W'($urandom_range(0, 4000))
              : CNT_W'(int'(rmem[a]) + $urandom_range(0, spread));
      dd = int'(cmem[a]) - int'(rmem[a]);
      if (dd < 0) dd = -dd;
      if (dd > hv) want++;
    end
    @(negedge clk);
    h = CNT_W'(hv); start = 1;
    @(negedge clk);
    start = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (int'(diff) != want) begin failures++; $display("FAIL h=%0d got %0d want %0d", hv, diff, want); end
    if (lat != N * N + 2) begin failures++; $display("FAIL latency %0d", lat); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(0, 0);
    run(0, 3);
    run(2, 5);
    run(4095, 10);
    for (int t = 0; t < 20; t++) run($urandom_range(0, 20), $urandom_range(0, 30));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
