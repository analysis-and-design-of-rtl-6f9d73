// tb_ecg_sensor_soc: end-to-end test of the sensor node's digital section at
// its default size: 256 samples/s, 8 s window, 16 x 16 phase matrix, with
// one sample every 390 clocks, i.e. a 100 kHz clock.
//
// A bus-master process plays the general purpose processor: it programs the
// filter (section 0 gain 0.5), a 6 s reference period and a validity
// threshold of 8 cells, leaves h and d at their reset values, touches the radio and I2C
// slaves and an unmapped address, and then serves every CPSD interrupt,
// comparing CPSD, both differences, M_ref and the latest filtered sample
// with the reference model.
// The 36 s signal is normal rhythm with a motion artifact in second 9 (the
// first candidate check fails), a retrain request in second 20 and
// fibrillation from second 27. The test counts every mechanism (training
// from reset in 8-9 s, failed and passed checks, periodic refresh, requested
// retrain, saturation to M, interrupts, routing to each slave, bus error)
// and checks that each second's work ends within that second.
module tb_ecg_sensor_soc;
  import cpsd_pkg::*;
  import cpsd_model_pkg::*;
  localparam int SPS = 256, WIN_SEC = 8, N = 16, NSECS = 36, GAP = 390;
  localparam int THV = 8, RP = 6, RETRAIN_SEC = 20, ART_SEC = 9, VF_SEC = 27;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  sample_t adc_sample = '0;
  logic gpp_cyc = 0, gpp_stb = 0, gpp_we = 0;
  logic [31:0] gpp_adr = '0, gpp_dat_w = '0, gpp_dat_r;
  logic [3:0] gpp_sel = '1;
  logic gpp_ack, gpp_err, cpsd_irq;
  logic radio_cyc, radio_stb, i2c_cyc, i2c_stb;
  logic [31:0] radio_dat_r, i2c_dat_r;
  logic radio_ack = 0, radio_err = 0, i2c_ack = 0, i2c_err = 0;
  logic bus_we;
  logic [31:0] bus_adr, bus_dat_w;
  logic [3:0] bus_sel;
  int checks = 0, failures = 0;

  ecg_sensor_soc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NSECS * SPS * GAP + 2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures);
    $finish;
  end

  // Radio and I2C slave models: acknowledge the next clock with a signature.
  int radio_hits = 0, i2c_hits = 0;
  assign radio_dat_r = 32'hAD10_0000 | bus_adr[11:0];
  assign i2c_dat_r   = 32'h12C0_0000 | bus_adr[11:0];
  always @(posedge clk) begin
    radio_ack <= radio_cyc && radio_stb && !radio_ack;
    i2c_ack   <= i2c_cyc && i2c_stb && !i2c_ack;
    if (radio_cyc && radio_stb && !radio_ack) radio_hits++;
    if (i2c_cyc && i2c_stb && !i2c_ack) i2c_hits++;
  end

  task automatic bus(input bit we, input logic [31:0] adr, input int wd, output int rdv, output bit err);
    @(negedge clk);
    gpp_cyc = 1; gpp_stb = 1; gpp_we = we; gpp_adr = adr; gpp_dat_w = wd;
    do @(negedge clk); while (!gpp_ack && !gpp_err);
    rdv = int'(gpp_dat_r); err = gpp_err;
    @(posedge clk); #1;
    gpp_cyc = 0; gpp_stb = 0; gpp_we = 0;
  endtask

  task automatic asp(input bit we, input int word, input int wd, output int rdv);
    bit e;
    bus(we, 32'(word * 4), wd, rdv, e);
  endtask

  cpsd_model mdl;
  int raw[$];
  bit started = 0, retrain_req = 0;
  int got = 0, irqs = 0, bus_errors = 0, max_busy = 0, busy_cycles = 0;
  int n_fed = 0, filt_reads = 0;
  int first_cpsd_sec = -1;
  longint sum_norm = 0, sum_vf = 0;
  int cnt_norm = 0, cnt_vf = 0;

  function automatic int kind_of(int sec);
    if (sec == ART_SEC) return 2;
    if (sec >= VF_SEC) return 1;
    return 0;
  endfunction

  always @(posedge clk) begin
    if (dut.u_asp.u_ctrl.state != 3'd0 || dut.u_asp.u_ctrl.tick_pend) busy_cycles++;
    else begin
      if (busy_cycles > max_busy) max_busy = busy_cycles;
      busy_cycles = 0;
    end
  end

  // general purpose processor
  initial begin
    int r, v;
    bit e;
    repeat (3) @(posedge clk);
    rst_n = 1;
    asp(1, REG_COEF_BASE + 0, 32'h2000, r);
    asp(1, REG_REF_PERIOD, RP, r);
    asp(1, REG_TH_VALID, THV, r);
    asp(1, REG_CTRL, 4, r);
    // the other slaves and an unmapped address
    bus(0, 32'h0000_1024, 0, v, e);
    checks++;
    if (e || v != 32'hAD10_0024) begin failures++; $display("FAIL radio read %h", v); end
    bus(1, 32'h0000_2008, 5, v, e);
    bus(0, 32'h0000_2010, 0, v, e);
    checks++;
    if (e || v != 32'h12C0_0010) begin failures++; $display("FAIL i2c read %h", v); end
    bus(0, 32'h0000_7000, 0, v, e);
    checks++;
    if (!e) begin failures++; $display("FAIL no error for unmapped address"); end
    else bus_errors++;
    started = 1;
    forever begin
      @(negedge clk);
      if (retrain_req) begin
        asp(1, REG_CTRL, 6, r);
        retrain_req = 0;
      end
      if (cpsd_irq) begin
        irqs++;
        asp(0, REG_CPSD, 0, v);
        if (got < mdl.exp_cpsd.size()) begin
          if (got == 0) first_cpsd_sec = mdl.exp_cpsd_sec[0];
          checks += 4;
          if (v != mdl.exp_cpsd[got]) begin
            failures++; $display("FAIL cpsd #%0d (sec %0d): got %0d want %0d", got, mdl.exp_cpsd_sec[got], v, mdl.exp_cpsd[got]);
          end
          asp(0, REG_DIFF_CUR, 0, v);
          if (v != mdl.exp_diff_cur[got]) begin failures++; $display("FAIL diff_cur #%0d: %0d want %0d", got, v, mdl.exp_diff_cur[got]); end
          asp(0, REG_DIFF_REF, 0, v);
          if (v != mdl.exp_diff_ref[got]) begin failures++; $display("FAIL diff_ref #%0d: %0d want %0d", got, v, mdl.exp_diff_ref[got]); end
          asp(0, REG_M_REF, 0, v);
          if (v != mdl.exp_mref[got]) begin failures++; $display("FAIL m_ref #%0d: %0d want %0d", got, v, mdl.exp_mref[got]); end
          // the latest filtered sample: the last one fed, or the one before
          // if the newest is still in the filter
          asp(0, REG_FILT, 0, v);
          checks++;
          filt_reads++;
          if (n_fed < 2 || (v != mdl.x[n_fed - 1] && v != mdl.x[n_fed - 2])) begin
            failures++; $display("FAIL filtered sample %0d after %0d samples", v, n_fed);
          end
          if (mdl.exp_cpsd_sec[got] >= VF_SEC + WIN_SEC) begin sum_vf += mdl.exp_cpsd[got]; cnt_vf++; end
          else if (mdl.exp_cpsd_sec[got] < VF_SEC && mdl.exp_cpsd_sec[got] >= ART_SEC + WIN_SEC) begin
            sum_norm += mdl.exp_cpsd[got]; cnt_norm++;
          end
        end else begin
          failures++; $display("FAIL unexpected interrupt");
          if (failures > 50) begin
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
        got++;
        asp(1, REG_STATUS, 32'h100, r);
      end
    end
  end

  // ECG recording interface
  initial begin
    int v;
    mdl = new(SPS, WIN_SEC, N, 8, 4, THV, RP);
    for (int s = 1; s <= NSECS; s++)
      for (int i = 0; i < SPS; i++) begin
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
      n_fed = n + 1;
      @(negedge clk);
      adc_valid = 0;
      if (n == (RETRAIN_SEC - 1) * SPS + SPS / 2) retrain_req = 1;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (SPS * GAP) @(negedge clk);
    checks++;
    if (got != mdl.exp_cpsd.size()) begin failures++; $display("FAIL %0d CPSD values, want %0d", got, mdl.exp_cpsd.size()); end
    checks++;
    if (max_busy >= SPS * GAP) begin failures++; $display("FAIL per-second work %0d clocks", max_busy); end
    checks++;
    if (int'(dut.u_asp.u_ctrl.phase) != mdl.final_phase) begin failures++; $display("FAIL final phase"); end
    checks += 11;
    if (mdl.n_cand == 0)       begin failures++; $display("FAIL no candidate"); end
    if (mdl.n_check_fail == 0) begin failures++; $display("FAIL no failed check"); end
    if (mdl.n_check_pass == 0) begin failures++; $display("FAIL no passed check"); end
    if (mdl.n_refresh == 0)    begin failures++; $display("FAIL no periodic refresh"); end
    if (mdl.n_retrain == 0)    begin failures++; $display("FAIL no requested retrain"); end
    if (mdl.n_saturated == 0)  begin failures++; $display("FAIL no saturation to M"); end
    if (irqs == 0)             begin failures++; $display("FAIL no interrupt"); end
    if (filt_reads == 0)       begin failures++; $display("FAIL filtered samples never read"); end
    if (radio_hits == 0)       begin failures++; $display("FAIL radio never addressed"); end
    if (i2c_hits == 0)         begin failures++; $display("FAIL I2C never addressed"); end
    if (bus_errors == 0)       begin failures++; $display("FAIL no bus error"); end
    checks++;
    if (cnt_vf == 0 || cnt_norm == 0 || sum_vf * cnt_norm <= sum_norm * cnt_vf) begin
      failures++; $display("FAIL fibrillation CPSD not above normal");
    end
    $display("events: candidates=%0d checks passed=%0d failed=%0d online=%0d refresh=%0d retrain=%0d saturated=%0d irqs=%0d radio=%0d i2c=%0d buserr=%0d",
             mdl.n_cand, mdl.n_check_pass, mdl.n_check_fail, mdl.n_online, mdl.n_refresh, mdl.n_retrain, mdl.n_saturated,
             irqs, radio_hits, i2c_hits, bus_errors);
    $display("first CPSD at second %0d; longest per-second work %0d of %0d clocks", first_cpsd_sec, max_busy, SPS * GAP);
    if (cnt_norm > 0 && cnt_vf > 0)
      $display("mean CPSD (Q8.8): normal %0d, fibrillation %0d", sum_norm / cnt_norm, sum_vf / cnt_vf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
