// tb_cpsd_wb_regs: Wishbone accesses to the register block. Checks reset
// values, write/read-back of every parameter and coefficient, read-only
// status inputs, the one-clock retrain pulse, the CPSD-ready interrupt with
// its enable and write-1-to-clear, and that each access is acknowledged
// exactly one clock after the strobe.
module tb_cpsd_wb_regs;
  import cpsd_pkg::*;
  localparam int NSEC = 3, CNT_W = 12, DFW = 9, DW = 6, ADR_W = 8;
  logic clk = 0, rst_n = 0;
  logic wb_cyc_i = 0, wb_stb_i = 0, wb_we_i = 0;
  logic [ADR_W-1:0] wb_adr_i = '0;
  logic [WB_DW-1:0] wb_dat_i = '0, wb_dat_o;
  logic wb_ack_o;
  coef_t coef [NSEC][SEC_COEFS];
  logic [CNT_W-1:0] h;
  logic [DFW-1:0] th_valid;
  logic [DW-1:0] delay_d;
  logic [7:0] ref_period;
  logic retrain, irq;
  logic new_cpsd = 0;
  phase_e phase = PH_CHECK;
  logic ref_valid = 1;
  logic [CPSD_W-1:0] cpsd = 16'h1234;
  logic [DFW-1:0] diff_cur = 9'd77, diff_ref = 9'd13;
  logic [SAMPLE_W-1:0] m_ref = 10'd345;
  logic [15:0] seconds = 16'd99;
  logic filt_valid = 0;
  sample_t filt_sample = '0;
  int checks = 0, failures = 0;
  int retrain_pulses = 0;

  cpsd_wb_regs #(.NSEC(NSEC), .CNT_W(CNT_W), .DFW(DFW), .DW(DW), .ADR_W(ADR_W)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (retrain) retrain_pulses++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic access(input bit we, input int word, input logic [31:0] wd, output logic [31:0] rdv);
    int lat;
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = we; wb_adr_i = ADR_W'(word * 4); wb_dat_i = wd;
    lat = 0;
    do begin @(negedge clk); lat++; end while (!wb_ack_o);
    rdv = wb_dat_o;
    checks++;
    if (lat != 1) begin failures++; $display("FAIL ack latency %0d", lat); end
    // the master samples ack at the next rising edge and ends the cycle
    @(posedge clk); #1;
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0;
  endtask

  task automatic expect_rd(input int word, input logic [31:0] want);
    logic [31:0] r;
    access(0, word, '0, r);
    checks++;
    if (r !== want) begin failures++; $display("FAIL read word %0d: %h want %h", word, r, want); end
  endtask

  logic [31:0] dummy;
  logic [15:0] cv [NSEC*SEC_COEFS];

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset values
    expect_rd(REG_H, 4);
    expect_rd(REG_TH_VALID, 32);
    expect_rd(REG_DELAY, 8);
    expect_rd(REG_REF_PERIOD, 30);
    for (int i = 0; i < NSEC * SEC_COEFS; i++)
      expect_rd(REG_COEF_BASE + i, (i % SEC_COEFS == 0) ? 32'h4000 : 32'h0);
    // read-only inputs
    expect_rd(REG_STATUS, {23'b0, 1'b0, 5'b0, 1'b1, 2'(PH_CHECK)});
    expect_rd(REG_CPSD, 32'h1234);
    expect_rd(REG_DIFF_CUR, 77);
    expect_rd(REG_DIFF_REF, 13);
    expect_rd(REG_M_REF, 345);
    expect_rd(REG_SECONDS, 99);
    // filtered sample is captured on its strobe only, and sign-extended
    expect_rd(REG_FILT, 0);
    @(negedge clk); filt_sample = -10'sd300; filt_valid = 1;
    @(negedge clk); filt_valid = 0; filt_sample = 10'sd17;
    expect_rd(REG_FILT, 32'hFFFF_FED4);
    @(negedge clk); filt_valid = 1;
    @(negedge clk); filt_valid = 0;
    expect_rd(REG_FILT, 17);
    // parameters
    access(1, REG_H, 32'd9, dummy);          expect_rd(REG_H, 9);
    access(1, REG_TH_VALID, 32'd100, dummy); expect_rd(REG_TH_VALID, 100);
    access(1, REG_DELAY, 32'd21, dummy);     expect_rd(REG_DELAY, 21);
    access(1, REG_REF_PERIOD, 32'd7, dummy); expect_rd(REG_REF_PERIOD, 7);
    checks += 4;
    if (h != 9 || th_valid != 100 || delay_d != 21 || ref_period != 7) begin
      failures++; $display("FAIL parameter outputs");
    end
    // coefficients, negative values included
    for (int i = 0; i < NSEC * SEC_COEFS; i++) begin
      cv[i] = 16'($urandom);
      access(1, REG_COEF_BASE + i, {16'hABCD, cv[i]}, dummy);
    end
    for (int i = 0; i < NSEC * SEC_COEFS; i++) begin
      expect_rd(REG_COEF_BASE + i, {{16{cv[i][15]}}, cv[i]});
      checks++;
      if (coef[i / SEC_COEFS][i % SEC_COEFS] != cv[i]) begin failures++; $display("FAIL coef %0d", i); end
    end
    // retrain pulse and interrupt
    access(1, REG_CTRL, 32'h2, dummy);
    checks++;
    if (retrain_pulses != 1) begin failures++; $display("FAIL retrain pulses %0d", retrain_pulses); end
    @(negedge clk); new_cpsd = 1; @(negedge clk); new_cpsd = 0;
    checks++;
    if (irq) begin failures++; $display("FAIL irq while disabled"); end
    expect_rd(REG_STATUS, {23'b0, 1'b1, 5'b0, 1'b1, 2'(PH_CHECK)});
    access(1, REG_CTRL, 32'h4, dummy);
    checks++;
    if (!irq) begin failures++; $display("FAIL irq not raised"); end
    expect_rd(REG_CTRL, 32'h4);
    access(1, REG_STATUS, 32'h100, dummy);
    checks++;
    if (irq) begin failures++; $display("FAIL irq not cleared"); end
    checks++;
    if (retrain_pulses != 1) begin failures++; $display("FAIL extra retrain pulses"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
