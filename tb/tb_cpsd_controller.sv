// tb_cpsd_controller: the controller against stub pipeline units. A scripted
// run of 16 seconds (4 samples per second, window full after 3 s) checks,
// second by second, which unit it starts and what it records: no work while
// the window fills, candidate at the first full second, a failed check
// (new candidate from the next second's window), a passed check (reference
// valid), one CPSD per on-line
// second, refresh after ref_period seconds and retraining on request. It
// also checks that M_ref takes the window's M at each candidate and that the
// window base is the write pointer at the boundary.
module tb_cpsd_controller;
  import cpsd_pkg::*;
  localparam int SPS = 4, DFW = 9, FAW = 4, NSECS = 16;
  logic clk = 0, rst_n = 0;
  logic fs_we = 0, fs_full = 0;
  logic [FAW-1:0] fs_wptr = '0;
  logic last_of_sec;
  logic retrain = 0;
  logic [DFW-1:0] th_valid = DFW'(20);
  logic [7:0] ref_period = 8'd3;
  logic [SAMPLE_W-1:0] m_window = '0, m_ref;
  logic pm_start, pm_to_cur, pm_done = 0;
  logic [FAW-1:0] win_base;
  logic diff_start, diff_done = 0;
  logic [DFW-1:0] diff_val = '0;
  logic dr_cur_we, dr_ref_we, cpsd_start, cpsd_done = 0, new_cpsd, ref_valid;
  phase_e phase;
  logic [15:0] seconds;
  int checks = 0, failures = 0;

  cpsd_controller #(.SPS(SPS), .DFW(DFW), .FAW(FAW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Stub units: each answers its start with done a few clocks later.
  always @(posedge clk) begin
    if (pm_start) begin repeat (7) @(posedge clk); pm_done <= 1; @(posedge clk); pm_done <= 0; end
  end
  always @(posedge clk) begin
    if (diff_start) begin repeat (5) @(posedge clk); diff_done <= 1; @(posedge clk); diff_done <= 0; end
  end
  always @(posedge clk) begin
    if (cpsd_start) begin repeat (3) @(posedge clk); cpsd_done <= 1; @(posedge clk); cpsd_done <= 0; end
  end

  // Event log per second: bit 0 PM built into the reference memory, bit 1
  // PM built into the current memory.
  int sec = 0;
  int ev_pm [NSECS+1], ev_ref [NSECS+1], ev_cur [NSECS+1], ev_new [NSECS+1];
  int mref_at [NSECS+1], base_at [NSECS+1];
  always @(posedge clk) begin
    if (pm_start) begin
      ev_pm[sec] <= ev_pm[sec] | (pm_to_cur ? 2 : 1);
      mref_at[sec] <= int'(m_ref);
      base_at[sec] <= int'(win_base);
    end
    if (dr_ref_we) ev_ref[sec] <= ev_ref[sec] + 1;
    if (dr_cur_we) ev_cur[sec] <= ev_cur[sec] + 1;
    if (new_cpsd)  ev_new[sec] <= ev_new[sec] + 1;
  end

  // Script: diff value presented during each second, and expectations.
  //           second:     0  1  2  3  4   5  6  7  8  9 10 11 12 13 14 15 16
  int dv    [NSECS+1] = '{0, 0, 0, 0, 30, 0, 5, 7, 8, 9, 0, 4, 6, 0, 0, 3, 5};
  int x_pm  [NSECS+1] = '{0, 0, 0, 1, 2,  1, 2, 2, 2, 2, 1, 2, 2, 1, 2, 2, 2};
  int x_ref [NSECS+1] = '{0, 0, 0, 0, 0,  0, 1, 0, 0, 0, 0, 1, 0, 0, 1, 0, 0};
  int x_cur [NSECS+1] = '{0, 0, 0, 0, 0,  0, 0, 1, 1, 1, 0, 0, 1, 0, 0, 1, 1};

  initial begin
    for (int s = 0; s <= NSECS; s++) begin
      ev_pm[s] = 0; ev_ref[s] = 0; ev_cur[s] = 0; ev_new[s] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 1; s <= NSECS; s++) begin
      // the controller sees the diff value and M of this second
      diff_val = DFW'(dv[s]);
      m_window = SAMPLE_W'(100 + s);
      // retrain requested during second 13 (served at its boundary)
      if (s == 13) begin
        @(negedge clk); retrain = 1; @(negedge clk); retrain = 0;
      end
      for (int i = 0; i < SPS; i++) begin
        @(negedge clk);
        fs_we = 1;
        if (s == NSECS && i == SPS - 1) ;
        @(negedge clk);
        fs_we = 0;
        fs_wptr = fs_wptr + 1'b1;
        if (s == 3 && i == SPS - 1) fs_full = 1;
        if (i == SPS - 1) sec = s;
        repeat (60) @(negedge clk);
      end
    end
    repeat (100) @(negedge clk);
    for (int s = 1; s <= NSECS; s++) begin
      checks += 4;
      if (ev_pm[s] != x_pm[s]) begin failures++; $display("FAIL sec %0d PM target %0d want %0d", s, ev_pm[s], x_pm[s]); end
      if (ev_ref[s] != x_ref[s]) begin failures++; $display("FAIL sec %0d ref write %0d", s, ev_ref[s]); end
      if (ev_cur[s] != x_cur[s]) begin failures++; $display("FAIL sec %0d cur write %0d", s, ev_cur[s]); end
      if (ev_new[s] != x_cur[s]) begin failures++; $display("FAIL sec %0d new cpsd %0d", s, ev_new[s]); end
      if (x_pm[s] != 0) begin
        checks++;
        if (base_at[s] != (s * SPS) % 16) begin failures++; $display("FAIL sec %0d base %0d", s, base_at[s]); end
      end
      if (x_pm[s] % 2 == 1) begin
        checks++;
        if (mref_at[s] != 100 + s) begin failures++; $display("FAIL sec %0d M_ref %0d", s, mref_at[s]); end
      end
    end
    checks += 3;
    if (phase != PH_ONLINE) begin failures++; $display("FAIL final phase %0d", phase); end
    if (!ref_valid) begin failures++; $display("FAIL final ref_valid"); end
    if (seconds != 16'(NSECS)) begin failures++; $display("FAIL seconds %0d", seconds); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
