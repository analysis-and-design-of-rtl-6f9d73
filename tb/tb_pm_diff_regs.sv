// tb_pm_diff_regs: the reference and current difference registers load
// only on their own write enables and hold otherwise.
module tb_pm_diff_regs;
  localparam int DFW = 9;
  logic clk = 0, rst_n = 0, cur_we = 0, ref_we = 0;
  logic [DFW-1:0] diff_in = '0, diff_cur, diff_ref;
  logic [DFW-1:0] m_cur = '0, m_ref = '0;
  int checks = 0, failures = 0;

  pm_diff_regs #(.DFW(DFW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      diff_in = DFW'($urandom);
      cur_we  = ($urandom_range(0, 3) == 0);
      ref_we  = ($urandom_range(0, 3) == 0);
      @(posedge clk);
      if (cur_we) m_cur = diff_in;
      if (ref_we) m_ref = diff_in;
      #1;
      checks += 2;
      if (diff_cur !== m_cur) begin failures++; $display("FAIL cur n=%0d", n); end
      if (diff_ref !== m_ref) begin failures++; $display("FAIL ref n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
