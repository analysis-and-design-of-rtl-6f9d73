// tb_filter_workload: the filter unit at its default size (three sections)
// programmed as in the bench demonstration: a 1-100 Hz band-pass and notches
// at 60 Hz and 120 Hz, for 256 samples/s. The coefficients are the
// bilinear-transform biquads of the well-known audio-EQ cookbook:
//   band-pass, centre sqrt(1*100) = 10 Hz, Q = 10/99:
//     b0 = a/(1+a), b1 = 0, b2 = -b0, a1 = -2cos(w)/(1+a), a2 = (1-a)/(1+a)
//   notch at f, Q = 8:
//     b0 = b2 = 1/(1+a), b1 = a1 = -2cos(w)/(1+a), a2 = (1-a)/(1+a)
// with w = 2*pi*f/256 and a = sin(w)/(2Q), rounded to Q2.14.
// Pure tones of amplitude 400 LSB are filtered; after 768 settling samples
// the peak output over 512 samples is measured. Checked: 10 Hz and 30 Hz pass
// with 0.7 .. 1.1 gain, 60 Hz and 120 Hz are attenuated below 0.1, and a
// 0.1 Hz baseline drift below 0.15 (a second-order band-pass falls off at
// 20 dB/decade below its lower corner).
module tb_filter_workload;
  import cpsd_pkg::*;
  localparam int NSEC = 3;
  localparam real PI = 3.14159265358979;
  localparam real FS = 256.0;
  logic clk = 0, rst_n = 0, start = 0;
  sample_t x_taps [3];
  coef_t coef [NSEC][SEC_COEFS];
  logic busy, out_valid;
  sample_t out_sample;
  int checks = 0, failures = 0;

  filter_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic coef_t q14(input real v);
    return coef_t'($rtoi(v * 16384.0 + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  task automatic set_bandpass(input int s, input real f0, input real q);
    real w, a;
    w = 2.0 * PI * f0 / FS;
    a = $sin(w) / (2.0 * q);
    coef[s][0] = q14(a / (1.0 + a));
    coef[s][1] = '0;
    coef[s][2] = q14(-a / (1.0 + a));
    coef[s][3] = q14(-2.0 * $cos(w) / (1.0 + a));
    coef[s][4] = q14((1.0 - a) / (1.0 + a));
  endtask

  task automatic set_notch(input int s, input real f0, input real q);
    real w, a;
    w = 2.0 * PI * f0 / FS;
    a = $sin(w) / (2.0 * q);
    coef[s][0] = q14(1.0 / (1.0 + a));
    coef[s][1] = q14(-2.0 * $cos(w) / (1.0 + a));
    coef[s][2] = q14(1.0 / (1.0 + a));
    coef[s][3] = q14(-2.0 * $cos(w) / (1.0 + a));
    coef[s][4] = q14((1.0 - a) / (1.0 + a));
  endtask

  // Filter a tone and return the peak |output| after settling.
  task automatic tone(input real f, output int peak);
    int v;
    peak = 0;
    rst_n = 0;
    for (int i = 0; i < 3; i++) x_taps[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 1280; n++) begin
      @(negedge clk);
      v = $rtoi(400.0 * $sin(2.0 * PI * f * real'(n) / FS));
      x_taps[2] = x_taps[1]; x_taps[1] = x_taps[0]; x_taps[0] = sample_t'(v);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!out_valid) @(negedge clk);
      if (n >= 768) begin
        v = int'(out_sample);
        if (v < 0) v = -v;
        if (v > peak) peak = v;
      end
    end
  endtask

  task automatic expect_gain(input real f, input real lo, input real hi);
    int p;
    real g;
    tone(f, p);
    g = real'(p) / 400.0;
    checks++;
    $display("%6.1f Hz: gain %0.3f", f, g);
    if (g < lo || g > hi) begin
      failures++; $display("FAIL gain at %0.1f Hz: %0.3f not in [%0.2f, %0.2f]", f, g, lo, hi);
    end
  endtask

  initial begin
    set_bandpass(0, 10.0, 10.0 / 99.0);
    set_notch(1, 60.0, 8.0);
    set_notch(2, 120.0, 8.0);
    expect_gain(10.0, 0.7, 1.1);
    expect_gain(30.0, 0.7, 1.1);
    expect_gain(60.0, 0.0, 0.1);
    expect_gain(120.0, 0.0, 0.1);
    expect_gain(0.1, 0.0, 0.15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
