// tb_wb_interconnect: one master, three slave models that answer after a
// slave-specific delay with slave-specific data. Checks that only the
// addressed slave sees cyc/stb, that its data and ack reach the master, that
// a slave's err is passed back, and that an unmapped address gets err.
module tb_wb_interconnect;
  localparam int NS = 3, AW = 32, DW = 32;
  logic clk = 0, rst_n = 0;
  logic m_cyc = 0, m_stb = 0, m_we = 0;
  logic [AW-1:0] m_adr = '0;
  logic [DW-1:0] m_dat_w = '0, m_dat_r;
  logic [3:0] m_sel = '1;
  logic m_ack, m_err;
  logic s_cyc [NS], s_stb [NS];
  logic s_we;
  logic [AW-1:0] s_adr;
  logic [DW-1:0] s_dat_w;
  logic [3:0] s_sel;
  logic [DW-1:0] s_dat_r [NS];
  logic s_ack [NS], s_err [NS];
  int checks = 0, failures = 0;
  int selected [NS];

  wb_interconnect #(.NS(NS), .AW(AW), .DW(DW), .SEL_LO(12), .SEL_W(4)) dut (.*);

  always #5 clk = ~clk;

  // Slave i acknowledges after i+1 clocks with data {i, address}; slave 1
  // signals err for address offset 0xFFC.
  for (genvar i = 0; i < NS; i++) begin : g_slave
    int cnt;
    always_ff @(posedge clk) begin
      s_ack[i] <= 1'b0;
      s_err[i] <= 1'b0;
      if (s_cyc[i] && s_stb[i] && !s_ack[i] && !s_err[i]) begin
        cnt <= cnt + 1;
        if (cnt == i) begin
          cnt <= 0;
          if (i == 1 && s_adr[11:0] == 12'hFFC) s_err[i] <= 1'b1;
          else s_ack[i] <= 1'b1;
          s_dat_r[i] <= {8'(i), s_adr[23:0]};
        end
      end else cnt <= 0;
    end
    always @(posedge clk) if (s_cyc[i] && s_stb[i]) selected[i]++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input logic [31:0] adr, input bit want_err);
    logic [31:0] r;
    bit got_err;
    int sel_before [NS];
    for (int i = 0; i < NS; i++) sel_before[i] = selected[i];
    @(negedge clk);
    m_cyc = 1; m_stb = 1; m_adr = adr; m_we = 0;
    do @(negedge clk); while (!m_ack && !m_err);
    r = m_dat_r; got_err = m_err;
    m_cyc = 0; m_stb = 0;
    checks++;
    if (got_err != want_err) begin failures++; $display("FAIL err for %h", adr); end
    if (!want_err) begin
      checks++;
      if (r != {8'(adr[13:12]), adr[23:0]}) begin failures++; $display("FAIL data for %h: %h", adr, r); end
    end
    for (int i = 0; i < NS; i++) begin
      checks++;
      if ((selected[i] != sel_before[i]) != (adr[15:12] == 4'(i))) begin
        failures++; $display("FAIL routing of %h to slave %0d", adr, i);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < NS; i++) selected[i] = 0;
    for (int i = 0; i < NS; i++) s_dat_r[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    access(32'h0000_0008, 0);
    access(32'h0000_1010, 0);
    access(32'h0000_2abc, 0);
    access(32'h0000_1FFC, 1);
    access(32'h0000_3000, 1);
    access(32'h0000_F004, 1);
    for (int t = 0; t < 30; t++) access({16'h0, 4'($urandom_range(0, 2)), 12'($urandom) & 12'hFF0}, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
