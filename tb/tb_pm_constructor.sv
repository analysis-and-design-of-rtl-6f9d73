// tb_pm_constructor: the constructor reads a window from a memory model and
// writes a PM memory model, both with one clock of read latency. The PM
// memory is filled with garbage first, so the clear is checked too. Each run
// compares all N*N cells with a histogram computed here from eq. 3 (with
// saturation to [-M, M] and the top level clamped to N-1), and checks that
// the run fits its cycle budget. Runs cover M at, below and above the window
// peak, M = 0 and several delays d.
module tb_pm_constructor;
  import cpsd_pkg::*;
  localparam int DEPTH = 64, N = 8, CNT_W = 7, DMAX = 8;
  localparam int FAW = $clog2(DEPTH), PAW = $clog2(N * N), DW = $clog2(DMAX + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [SAMPLE_W-1:0] m_val = '0;
  logic [DW-1:0] delay_d = '0;
  logic [FAW-1:0] base_addr = '0;
  logic busy, done;
  logic [FAW-1:0] fs_raddr;
  sample_t fs_rdata;
  logic [PAW-1:0] pm_raddr, pm_waddr;
  logic [CNT_W-1:0] pm_rdata, pm_wdata;
  logic pm_we;
  int checks = 0, failures = 0;

  sample_t fmem [DEPTH];
  logic [CNT_W-1:0] pmem [N * N];
  int expect_pm [N * N];

  pm_constructor #(.DEPTH(DEPTH), .N(N), .CNT_W(CNT_W), .DMAX(DMAX)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    fs_rdata <= fmem[fs_raddr];
    pm_rdata <= pmem[pm_raddr];
    if (pm_we) pmem[pm_waddr] <= pm_wdata;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int quant(input int s, input int m);
    int q;
    if (m == 0) m = 1;
    if (s > m) s = m;
    if (s < -m) s = -m;
    q = ((s + m) * N + m) / (2 * m);
    return (q > N - 1) ? N - 1 : q;
  endfunction

  task automatic run(input int m, input int d, input int base, input int amp);
    int cyc, de, j, k;
    for (int i = 0; i < DEPTH; i++) fmem[i] = sample_t'($signed(32'($urandom_range(0, 2 * amp))) - amp);
    for (int a = 0; a < N * N; a++) begin
      pmem[a] = CNT_W'($urandom);
      expect_pm[a] = 0;
    end
    de = (d == 0) ? 1 : (d > DMAX) ? DMAX : d;
    for (int i = de; i < DEPTH; i++) begin
      j = quant(int'(fmem[(base + i - de) % DEPTH]), m);
      k = quant(int'(fmem[(base + i) % DEPTH]), m);
      expect_pm[j * N + k]++;
    end
    @(negedge clk);
    m_val = SAMPLE_W'(m); delay_d = DW'(d); base_addr = FAW'(base); start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > N * N + DEPTH * (3 + $clog2(N) + 1 + 2) + 4) begin
      failures++; $display("FAIL cycles %0d", cyc);
    end
    for (int a = 0; a < N * N; a++) begin
      checks++;
      if (int'(pmem[a]) != expect_pm[a]) begin
        failures++;
        $display("FAIL m=%0d d=%0d cell %0d: got %0d want %0d", m, d, a, pmem[a], expect_pm[a]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(300, 1, 0, 300);
    run(511, 3, 17, 511);
    run(100, 5, 40, 400);   // saturation: samples beyond M
    run(0, 2, 5, 0);        // flat window, M = 0
    run(512, 8, 63, 512);
    run(37, 0, 9, 60);      // d = 0 treated as 1
    run(200, 15, 1, 150);   // d above DMAX clamped
    for (int t = 0; t < 5; t++)
      run($urandom_range(1, 511), $urandom_range(1, DMAX), $urandom_range(0, DEPTH - 1), $urandom_range(1, 511));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
