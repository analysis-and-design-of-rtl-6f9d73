// tb_pm_sram: random writes and reads against an array model, including a
// read of a word written in the same clock (old value expected).
module tb_pm_sram;
  localparam int N = 8, CNT_W = 12, AW = $clog2(N * N);
  logic clk = 0, we = 0;
  logic [AW-1:0] raddr = '0, waddr = '0;
  logic [CNT_W-1:0] rdata, wdata = '0;
  logic [CNT_W-1:0] model [N * N];
  logic [CNT_W-1:0] want;
  int checks = 0, failures = 0;

  pm_sram #(.N(N), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < N * N; a++) begin
      @(negedge clk);
      we = 1; waddr = AW'(a); wdata = CNT_W'($urandom); model[a] = wdata;
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1);
      waddr = AW'($urandom);
      wdata = CNT_W'($urandom);
      raddr = (n % 5 == 0) ? waddr : AW'($urandom);
      want  = model[raddr];
      @(posedge clk);
      if (we) model[waddr] = wdata;
      #1;
      checks++;
      if (rdata !== want) begin
        failures++;
        $display("FAIL read %0d: got %0d want %0d", raddr, rdata, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
