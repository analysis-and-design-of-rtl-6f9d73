// cpsd_asp: application specific processor for the CPSD algorithm.
//
// Raw 10-bit ECG samples stream in one at a time (adc_valid) and the
// processor produces one CPSD value per second, which a host reads over its
// Wishbone slave port after an interrupt. Four pipelines share the work:
//
//   1. per sample:  raw delay registers -> filter unit -> window memory
//                   (the peak |s| of each second is tracked on the way)
//   2. per second:  phase matrix constructor, window memory -> PM memory
//   3. per second:  difference accumulator, reference PM vs. current PM,
//                   into the PM-difference registers
//   4. per second:  CPSD calculator, eq. 6, from those registers
//
// The controller decides per second what pipelines 2-4 do (training or
// on-line processing, see cpsd_controller). Pipeline 1 never stops; the
// per-second work takes about 23,000 clocks and must end within one second
// of samples (100,000 clocks at 100 kHz and 256 samples/s).
//
// Interface: adc_valid is a one-clock strobe with adc_sample; at least
// NSEC*5+2 clocks must separate two strobes. irq is level-sensitive until the
// host clears STATUS.ready. The block structure follows the design
// description; the widths, the handshakes and the register map are this
// design's choices (see the sub-blocks).
module cpsd_asp
  import cpsd_pkg::*;
#(
  parameter int unsigned SPS     = 256,  // samples per second
  parameter int unsigned WIN_SEC = 8,    // window length in seconds
  parameter int unsigned N       = 16,   // PM size N x N
  parameter int unsigned NSEC    = 3,    // filter sections
  parameter int unsigned DMAX    = 32,   // largest delay d, samples
  parameter int unsigned ADR_W   = 8,
  localparam int unsigned DEPTH  = SPS * WIN_SEC,
  localparam int unsigned CNT_W  = $clog2(DEPTH + 1),
  localparam int unsigned FAW    = $clog2(DEPTH),
  localparam int unsigned PAW    = $clog2(N * N),
  localparam int unsigned DFW    = $clog2(N * N + 1),
  localparam int unsigned DW     = $clog2(DMAX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adc_valid,
  input  sample_t          adc_sample,
  input  logic             wb_cyc_i,
  input  logic             wb_stb_i,
  input  logic             wb_we_i,
  input  logic [ADR_W-1:0] wb_adr_i,
  input  logic [WB_DW-1:0] wb_dat_i,
  output logic [WB_DW-1:0] wb_dat_o,
  output logic             wb_ack_o,
  output logic             irq
);

  // ---- parameters from the bus ----
  coef_t            coef [NSEC][SEC_COEFS];
  logic [CNT_W-1:0] h;
  logic [DFW-1:0]   th_valid;
  logic [DW-1:0]    delay_d;
  logic [7:0]       ref_period;
  logic             retrain;

  // ---- pipeline 1: raw DRs, filter, window memory ----
  sample_t raw_taps [3];
  logic    filt_start;
  logic    filt_busy;
  logic    fs_we;
  sample_t fs_wdata;
  logic [FAW-1:0] fs_wptr, fs_raddr;
  logic    fs_full;
  sample_t fs_rdata;
  logic    last_of_sec;
  logic [SAMPLE_W-1:0] m_window, m_ref;

  raw_delay_regs #(.DEPTH(3)) u_raw_dr (
    .clk, .rst_n, .in_valid(adc_valid), .in_sample(adc_sample), .taps(raw_taps)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) filt_start <= 1'b0;
    else        filt_start <= adc_valid;
  end

  filter_unit #(.NSEC(NSEC)) u_filter (
    .clk, .rst_n, .start(filt_start), .x_taps(raw_taps), .coef,
    .busy(filt_busy), .out_valid(fs_we), .out_sample(fs_wdata)
  );

  filt_sram #(.DEPTH(DEPTH)) u_fsram (
    .clk, .rst_n, .we(fs_we), .wdata(fs_wdata), .wptr(fs_wptr), .full(fs_full),
    .raddr(fs_raddr), .rdata(fs_rdata)
  );

  window_max #(.NSEC(WIN_SEC)) u_wmax (
    .clk, .rst_n, .in_valid(fs_we), .in_sample(fs_wdata), .last_of_sec,
    .m_window
  );

  // ---- pipeline 2: phase matrix constructor and the two PM memories ----
  logic             pm_start, pm_to_cur, pm_done, pm_busy;
  logic [FAW-1:0]   win_base;
  logic [PAW-1:0]   pmc_raddr, pmc_waddr, da_raddr;
  logic [CNT_W-1:0] pmc_rdata, pmc_wdata;
  logic             pmc_we;
  logic [PAW-1:0]   ref_raddr, cur_raddr;
  logic [CNT_W-1:0] ref_rdata, cur_rdata;
  logic             da_busy;

  pm_constructor #(.DEPTH(DEPTH), .N(N), .CNT_W(CNT_W), .DMAX(DMAX)) u_pmc (
    .clk, .rst_n, .start(pm_start), .m_val(m_ref), .delay_d, .base_addr(win_base),
    .busy(pm_busy), .done(pm_done),
    .fs_raddr, .fs_rdata,
    .pm_raddr(pmc_raddr), .pm_rdata(pmc_rdata), .pm_we(pmc_we),
    .pm_waddr(pmc_waddr), .pm_wdata(pmc_wdata)
  );

  // The constructor owns the read port of its target memory while busy;
  // otherwise the difference accumulator reads both memories.
  always_comb begin
    ref_raddr = (pm_busy && !pm_to_cur) ? pmc_raddr : da_raddr;
    cur_raddr = (pm_busy &&  pm_to_cur) ? pmc_raddr : da_raddr;
    pmc_rdata = pm_to_cur ? cur_rdata : ref_rdata;
  end

  pm_sram #(.N(N), .CNT_W(CNT_W)) u_ref_pm (
    .clk, .raddr(ref_raddr), .rdata(ref_rdata),
    .we(pmc_we && !pm_to_cur), .waddr(pmc_waddr), .wdata(pmc_wdata)
  );

  pm_sram #(.N(N), .CNT_W(CNT_W)) u_cur_pm (
    .clk, .raddr(cur_raddr), .rdata(cur_rdata),
    .we(pmc_we && pm_to_cur), .waddr(pmc_waddr), .wdata(pmc_wdata)
  );

  // ---- pipeline 3: difference accumulator and PM-difference registers ----
  logic           diff_start, diff_done;
  logic [DFW-1:0] diff_val, diff_cur, diff_ref;
  logic           dr_cur_we, dr_ref_we;

  diff_accumulator #(.N(N), .CNT_W(CNT_W)) u_diff (
    .clk, .rst_n, .start(diff_start), .h, .busy(da_busy), .done(diff_done),
    .raddr(da_raddr), .ref_rdata, .cur_rdata, .diff(diff_val)
  );

  pm_diff_regs #(.DFW(DFW)) u_diff_dr (
    .clk, .rst_n, .diff_in(diff_val), .cur_we(dr_cur_we), .ref_we(dr_ref_we),
    .diff_cur, .diff_ref
  );

  // ---- pipeline 4: CPSD calculator ----
  logic              cpsd_start, cpsd_done, cpsd_busy;
  logic [CPSD_W-1:0] cpsd;

  cpsd_calculator #(.DFW(DFW)) u_cpsd (
    .clk, .rst_n, .start(cpsd_start), .num(diff_cur), .den(diff_ref),
    .busy(cpsd_busy), .done(cpsd_done), .cpsd
  );

  // ---- controller and bus registers ----
  logic        new_cpsd, ref_valid;
  phase_e      phase;
  logic [15:0] seconds;

  cpsd_controller #(.SPS(SPS), .DFW(DFW), .FAW(FAW)) u_ctrl (
    .clk, .rst_n, .fs_we, .fs_full, .fs_wptr, .last_of_sec,
    .retrain, .th_valid, .ref_period, .m_window, .m_ref,
    .pm_start, .pm_to_cur, .win_base, .pm_done,
    .diff_start, .diff_done, .diff_val, .dr_cur_we, .dr_ref_we,
    .cpsd_start, .cpsd_done,
    .new_cpsd, .phase, .ref_valid, .seconds
  );

  cpsd_wb_regs #(.NSEC(NSEC), .CNT_W(CNT_W), .DFW(DFW), .DW(DW), .ADR_W(ADR_W)) u_regs (
    .clk, .rst_n,
    .wb_cyc_i, .wb_stb_i, .wb_we_i, .wb_adr_i, .wb_dat_i, .wb_dat_o, .wb_ack_o,
    .coef, .h, .th_valid, .delay_d, .ref_period, .retrain, .irq,
    .new_cpsd, .phase, .ref_valid, .cpsd, .diff_cur, .diff_ref, .m_ref, .seconds,
    .filt_valid(fs_we), .filt_sample(fs_wdata)
  );

  // A new raw sample must not arrive while the filter is still busy.
  sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    filt_start |-> !filt_busy);
  // The controller starts a unit only when it is idle.
  diff_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    diff_start |-> !da_busy);
  cpsd_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    cpsd_start |-> !cpsd_busy);

endmodule
