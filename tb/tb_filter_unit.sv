// tb_filter_unit: random coefficients and samples; every output is compared
// with a direct integer evaluation of the cascaded second-order sections,
// and the latency from start to out_valid is checked (NSEC*5 + 1 clocks).
module tb_filter_unit;
  import cpsd_pkg::*;
  localparam int NSEC = 3, GUARD = 4, ST_W = 18;
  logic clk = 0, rst_n = 0, start = 0;
  sample_t x_taps [3];
  coef_t coef [NSEC][SEC_COEFS];
  logic busy, out_valid;
  sample_t out_sample;
  int checks = 0, failures = 0;

  filter_unit #(.NSEC(NSEC), .GUARD(GUARD), .ST_W(ST_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model state.
  longint ys [NSEC][2];
  longint xr [3];

  function automatic longint sat(input longint v, input int w);
    longint hi = (64'sd1 <<< (w - 1)) - 1;
    longint lo = -hi - 1;
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  function automatic longint model_step();
    longint xin0, xin1, xin2, acc, y;
    xin0 = xr[0] <<< GUARD; xin1 = xr[1] <<< GUARD; xin2 = xr[2] <<< GUARD;
    for (int s = 0; s < NSEC; s++) begin
      acc = longint'(coef[s][0]) * xin0 + longint'(coef[s][1]) * xin1 +
            longint'(coef[s][2]) * xin2 - longint'(coef[s][3]) * ys[s][0] -
            longint'(coef[s][4]) * ys[s][1];
      y = sat((acc + 8192) >>> 14, ST_W);
      xin0 = y; xin1 = ys[s][0]; xin2 = ys[s][1];
      ys[s][1] = ys[s][0];
      ys[s][0] = y;
    end
    return sat((y + (1 << (GUARD - 1))) >>> GUARD, SAMPLE_W);
  endfunction

  task automatic run(input int nsamples, input bit ident);
    longint want;
    int lat;
    for (int s = 0; s < NSEC; s++) begin
      ys[s][0] = 0; ys[s][1] = 0;
    end
    for (int i = 0; i < 3; i++) begin xr[i] = 0; x_taps[i] = '0; end
    rst_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < nsamples; n++) begin
      @(negedge clk);
      xr[2] = xr[1]; xr[1] = xr[0];
      xr[0] = longint'($signed(10'($urandom)));
      for (int i = 0; i < 3; i++) x_taps[i] = sample_t'(xr[i]);
      start = 1;
      @(negedge clk);
      start = 0;
      want = model_step();
      lat = 0;
      while (!out_valid) begin @(negedge clk); lat++; end
      checks++;
      if (longint'(out_sample) != want) begin
        failures++;
        $display("FAIL n=%0d got %0d want %0d", n, out_sample, want);
      end
      if (ident) begin
        checks++;
        if (out_sample != x_taps[0]) begin
          failures++;
          $display("FAIL identity n=%0d", n);
        end
      end
      checks++;
      if (lat + 1 != NSEC * 5 + 1) begin
        failures++;
        $display("FAIL latency %0d", lat + 1);
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    // 1) identity sections: output equals input.
    for (int s = 0; s < NSEC; s++)
      for (int k = 0; k < SEC_COEFS; k++) coef[s][k] = (k == 0) ? coef_t'(16384) : '0;
    run(50, 1);
    // 2) random stable-ish sections (small feedback) with random gains.
    for (int t = 0; t < 4; t++) begin
      for (int s = 0; s < NSEC; s++) begin
        for (int k = 0; k < 3; k++) coef[s][k] = coef_t'($signed(16'($urandom_range(0, 24000))) - 12000);
        coef[s][3] = coef_t'($signed(16'($urandom_range(0, 16000))) - 8000);
        coef[s][4] = coef_t'($signed(16'($urandom_range(0, 8000))) - 4000);
      end
      run(150, 0);
    end
    // 3) a saturating gain: b0 = 1.99 in every section.
    for (int s = 0; s < NSEC; s++) begin
      coef[s][0] = coef_t'(32600);
      coef[s][3] = coef_t'(-16000);
    end
    run(100, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
