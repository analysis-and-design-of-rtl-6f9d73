// tb_rhythm_workload: the sensor node at its default size with every
// register at its reset value (pass-through filter, h = 4, Threshold_valid
// = 32, d = 8, 30 s refresh), 100 kHz clock, 256 samples/s, fed 39 s of
// synthetic rhythm: normal (s 1-15), premature ventricular contractions every
// fourth beat (s 16-23), ventricular tachycardia at 3 beats/s (s 24-31) and
// fibrillation (s 32-39). Every CPSD read on interrupt must equal the
// reference model. The mean CPSD over the last three seconds of each
// abnormal segment must exceed the mean over normal rhythm.
module tb_rhythm_workload;
  import cpsd_pkg::*;
  import cpsd_model_pkg::*;
  localparam int SPS = 256, WIN_SEC = 8, N = 16, NSECS = 39, GAP = 390;
  logic clk = 0, rst_n = 0, adc_valid = 0;
  sample_t adc_sample = '0;
  logic gpp_cyc = 0, gpp_stb = 0, gpp_we = 0;
  logic [31:0] gpp_adr = '0, gpp_dat_w = '0, gpp_dat_r;
  logic [3:0] gpp_sel = '1;
  logic gpp_ack, gpp_err, cpsd_irq;
  logic radio_cyc, radio_stb, i2c_cyc, i2c_stb;
  logic [31:0] radio_dat_r = '0, i2c_dat_r = '0;
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

  task automatic asp(input bit we, input int word, input int wd, output int rdv);
    @(negedge clk);
    gpp_cyc = 1; gpp_stb = 1; gpp_we = we; gpp_adr = 32'(word * 4); gpp_dat_w = wd;
    do @(negedge clk); while (!gpp_ack && !gpp_err);
    rdv = int'(gpp_dat_r);
    @(posedge clk); #1;
    gpp_cyc = 0; gpp_stb = 0; gpp_we = 0;
  endtask

  function automatic int kind_of(int sec);
    if (sec >= 32) return 1;
    if (sec >= 24) return 4;
    if (sec >= 16) return 3;
    return 0;
  endfunction

  function automatic int seg_end(int k);
    case (k)
      3: return 23;
      4: return 31;
      default: return 39;
    endcase
  endfunction

  cpsd_model mdl;
  int raw[$];
  bit started = 0;
  int got = 0;
  // mean CPSD per rhythm: 0 normal, 3 PVC, 4 VT, 1 VF
  longint sum [5];
  int cnt [5];

  initial begin
    int r, v, sec, k;
    for (int i = 0; i < 5; i++) begin sum[i] = 0; cnt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    asp(1, REG_CTRL, 4, r);
    started = 1;
    forever begin
      @(negedge clk);
      if (cpsd_irq) begin
        asp(0, REG_CPSD, 0, v);
        checks++;
        if (got < mdl.exp_cpsd.size()) begin
          sec = mdl.exp_cpsd_sec[got];
          if (v != mdl.exp_cpsd[got]) begin
            failures++; $display("FAIL cpsd #%0d (sec %0d): got %0d want %0d", got, sec, v, mdl.exp_cpsd[got]);
          end
          k = kind_of(sec);
          if (k == 0 || sec > seg_end(k) - 3) begin sum[k] += v; cnt[k]++; end
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

  initial begin
    int v;
    mdl = new(SPS, WIN_SEC, N, 8, 4, 32, 30);
    for (int s = 1; s <= NSECS; s++)
      for (int i = 0; i < SPS; i++) begin
        v = ecg_sample(kind_of(s), (s - 1) * SPS + i, SPS);
        if (v > 511) v = 511;
        if (v < -512) v = -512;
        raw.push_back(v);
        mdl.x.push_back(v);
      end
    mdl.run();
    wait (started);
    for (int n = 0; n < raw.size(); n++) begin
      @(negedge clk);
      adc_valid = 1; adc_sample = sample_t'(raw[n]);
      @(negedge clk);
      adc_valid = 0;
      repeat (GAP - 2) @(negedge clk);
    end
    repeat (SPS * GAP) @(negedge clk);
    checks++;
    if (got != mdl.exp_cpsd.size() || got == 0) begin
      failures++; $display("FAIL %0d CPSD values, want %0d", got, mdl.exp_cpsd.size());
    end
    foreach (cnt[i]) if (cnt[i] > 0)
      $display("rhythm %0d: mean CPSD %0.2f over %0d s", i, real'(sum[i]) / real'(cnt[i]) / 256.0, cnt[i]);
    for (int k = 1; k <= 4; k++) begin
      if (k == 2) continue;
      checks++;
      if (cnt[0] == 0 || cnt[k] == 0 || sum[k] * cnt[0] <= sum[0] * cnt[k]) begin
        failures++; $display("FAIL rhythm %0d CPSD not above normal", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
