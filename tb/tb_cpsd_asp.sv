// tb_cpsd_asp: end-to-end test of the CPSD processor at a reduced size
// (16 samples/s, 4 s window, 8 x 8 phase matrix). A host process programs
// the filter (section 0 gain 0.5) and the algorithm parameters over
// Wishbone, then serves every interrupt by reading CPSD, both differences,
// M_ref and the phase, and compares them with the reference model run on
// the same signal. The signal is normal rhythm with a motion artifact (so a
// candidate check fails), then normal rhythm long enough for a periodic
// reference refresh and a host-requested retrain, then fibrillation, which
// must raise the CPSD above the normal values. Each second's processing must
// finish before the next second starts.
module tb_cpsd_asp;
  import cpsd_pkg::*;
  import cpsd_model_pkg::*;
  localparam int SPS = 16, WIN_SEC = 4, N = 8, NSECS = 32, GAP = 80;
  localparam int D = 3, H = 1, THV = 6, RP = 5, RETRAIN_SEC = 19;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  sample_t adc_sample = '0;
  logic wb_cyc_i = 0, wb_stb_i = 0, wb_we_i = 0;
  logic [7:0] wb_adr_i = '0;
  logic [31:0] wb_dat_i = '0, wb_dat_o;
  logic wb_ack_o, irq;
  int checks = 0, failures = 0;

  cpsd_asp #(.SPS(SPS), .WIN_SEC(WIN_SEC), .N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  task automatic bus(input bit we, input int word, input int wd, output int rdv);
    @(negedge clk);
    wb_cyc_i = 1; wb_stb_i = 1; wb_we_i = we; wb_adr_i = 8'(word * 4); wb_dat_i = wd;
    do @(negedge clk); while (!wb_ack_o);
    rdv = int'(wb_dat_o);
    @(posedge clk); #1;
    wb_cyc_i = 0; wb_stb_i = 0; wb_we_i = 0;
  endtask

  cpsd_model mdl;
  int raw[$];
  int cur_sec = 0;
  bit started = 0, retrain_req = 0, done_feed = 0;
  int got = 0, irqs = 0;
  int max_busy = 0;
  longint sum_norm = 0, sum_vf = 0;
  int cnt_norm = 0, cnt_vf = 0;

  function automatic int kind_of(int sec);   // sec counted from 1
    if (sec == 5) return 2;
    if (sec >= 25) return 1;
    return 0;
  endfunction

  // Per-second processing time: from the boundary to the end of the work.
  int busy_cycles = 0;
  always @(posedge clk) begin
    if (dut.u_ctrl.state != 3'd0 || dut.u_ctrl.tick_pend) busy_cycles++;
    else begin
      if (busy_cycles > max_busy) max_busy = busy_cycles;
      busy_cycles = 0;
    end
  end

  // host
  initial begin
    int r, v;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bus(1, REG_COEF_BASE + 0, 32'h2000, r);
    bus(1, REG_H, H, r);
    bus(1, REG_TH_VALID, THV, r);
    bus(1, REG_DELAY, D, r);
    bus(1, REG_REF_PERIOD, RP, r);
    bus(1, REG_CTRL, 4, r);
    started = 1;
    forever begin
      @(negedge clk);
      if (retrain_req) begin
        bus(1, REG_CTRL, 6, r);
        retrain_req = 0;
      end
      if (irq) begin
        irqs++;
        bus(0, REG_CPSD, 0, v);
        if (got < mdl.exp_cpsd.size()) begin
          checks += 4;
          if (v != mdl.exp_cpsd[got]) begin
            failures++; $display("FAIL cpsd #%0d (sec %0d): got %0d want %0d", got, mdl.exp_cpsd_sec[got], v, mdl.exp_cpsd[got]);
          end
          bus(0, REG_DIFF_CUR, 0, v);
          if (v != mdl.exp_diff_cur[got]) begin failures++; $display("FAIL diff_cur #%0d: %0d want %0d", got, v, mdl.exp_diff_cur[got]); end
          bus(0, REG_DIFF_REF, 0, v);
          if (v != mdl.exp_diff_ref[got]) begin failures++; $display("FAIL diff_ref #%0d: %0d want %0d", got, v, mdl.exp_diff_ref[got]); end
          bus(0, REG_M_REF, 0, v);
          if (v != mdl.exp_mref[got]) begin failures++; $display("FAIL m_ref #%0d: %0d want %0d", got, v, mdl.exp_mref[got]); end
          if (mdl.exp_cpsd_sec[got] > 25 + WIN_SEC) begin sum_vf += mdl.exp_cpsd[got]; cnt_vf++; end
          else if (mdl.exp_cpsd_sec[got] < 25) begin sum_norm += mdl.exp_cpsd[got]; cnt_norm++; end
        end else begin
          failures++; $display("FAIL unexpected interrupt");
          if (failures > 50) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
        got++;
        bus(1, REG_STATUS, 32'h100, r);
      end
    end
  end

  // ADC samples
  initial begin
    mdl = new(SPS, WIN_SEC, N, D, H, THV, RP);
    for (int s = 1; s <= NSECS; s++)
      for (int i = 0; i < SPS; i++) begin
        int v;
        v = ecg_sample(kind_of(s), (s - 1) * SPS + i, SPS);
        if (v > 511) v = 511;
        if (v < -512) v = -512;
        raw.push_back(v);
        mdl.x.push_back((v + 1) >>> 1);
      end
    mdl.retrain_in_sec[RETRAIN_SEC] = 1;
    mdl.run();
    wait (started);
    for (int n = 0; n < raw.size(); n++) begin
      @(negedge clk);
      adc_valid = 1; adc_sample = sample_t'(raw[n]);
      @(negedge clk);
      adc_valid = 0;
      if (n == (RETRAIN_SEC - 1) * SPS + SPS / 2) retrain_req = 1;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (4 * SPS * GAP) @(negedge clk);
    done_feed = 1;
    // final checks
    checks++;
    if (got != mdl.exp_cpsd.size()) begin failures++; $display("FAIL %0d CPSD values, want %0d", got, mdl.exp_cpsd.size()); end
    checks++;
    if (max_busy >= SPS * GAP) begin failures++; $display("FAIL per-second work %0d clocks", max_busy); end
    checks++;
    if (int'(dut.u_ctrl.phase) != mdl.final_phase) begin failures++; $display("FAIL final phase"); end
    // every mechanism happened
    checks += 7;
    if (mdl.n_cand == 0)       begin failures++; $display("FAIL no candidate"); end
    if (mdl.n_check_fail == 0) begin failures++; $display("FAIL no failed check"); end
    if (mdl.n_check_pass == 0) begin failures++; $display("FAIL no passed check"); end
    if (mdl.n_refresh == 0)    begin failures++; $display("FAIL no periodic refresh"); end
    if (mdl.n_retrain == 0)    begin failures++; $display("FAIL no requested retrain"); end
    if (mdl.n_saturated == 0)  begin failures++; $display("FAIL no saturation to M"); end
    if (irqs == 0)             begin failures++; $display("FAIL no interrupt"); end
    checks++;
    if (cnt_vf == 0 || cnt_norm == 0 || sum_vf * cnt_norm <= sum_norm * cnt_vf) begin
      failures++; $display("FAIL fibrillation CPSD not above normal");
    end
    $display("events: candidates=%0d checks passed=%0d failed=%0d online=%0d refresh=%0d retrain=%0d saturated=%0d irqs=%0d max_busy=%0d",
             mdl.n_cand, mdl.n_check_pass, mdl.n_check_fail, mdl.n_online, mdl.n_refresh, mdl.n_retrain, mdl.n_saturated, irqs, max_busy);
    if (cnt_norm > 0 && cnt_vf > 0)
      $display("mean CPSD (Q8.8): normal %0d, fibrillation %0d", sum_norm / cnt_norm, sum_vf / cnt_vf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
