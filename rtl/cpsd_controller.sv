// cpsd_controller: FSM that sequences the CPSD processor once per second.
//
// The controller counts filtered samples written to the window memory; every
// SPS samples marks a second boundary (last_of_sec is high together with the
// write of the last sample of a second). At each boundary it runs the
// per-second pipelines in order, according to the operating phase:
//
//   FILL    the window memory is not yet full: nothing to do. When it becomes
//           full the controller moves to CAND at the same boundary.
//   CAND    training: M_ref := M of the newest window; build that window's PM
//           into the reference memory; next phase CHECK.
//   CHECK   training: build the newest window's PM (quantised with M_ref) into
//           the current memory; d = Diff(PM_cur, PM_ref). If d < Th_valid
//           (eq. 7) the candidate becomes the valid reference, d is kept as
//           the denominator of eq. 6 and the phase becomes ONLINE; otherwise
//           the window of the next second is taken as a new candidate
//           (phase CAND). The window just checked cannot serve instead: its
//           PM would have to be rebuilt with its own M, and by the time the
//           check is decided new samples have already overwritten the
//           oldest part of it in the 8-second memory.
//   ONLINE  on-line processing: build the current PM, take its difference to
//           the reference, compute CPSD and pulse new_cpsd. After ref_period
//           seconds on one reference, retraining starts (phase CAND).
//
// A retrain pulse (from the bus) forces CAND at the next boundary. A boundary
// that arrives while the previous second is still being processed is served
// as soon as the pipelines are idle. After reset, the first candidate is thus
// taken at second 8 (the window is full) and checked at second 9; retraining
// takes one or two seconds, and each failed check adds two.
//
// Timing: pm_start, diff_start and cpsd_start are one-clock pulses; the
// controller waits for the done pulse of each unit before the next step.
//
// The two operating phases, candidate validation by eq. 7, a reference kept
// throughout testing, the 30-second refresh and retraining on request follow
// the design description. The encoding of the phases, the use of the
// candidate's M while checking, and service of late boundaries are this
// design's choices.
module cpsd_controller
  import cpsd_pkg::*;
#(
  parameter int unsigned SPS    = 256,
  parameter int unsigned DFW    = 9,
  parameter int unsigned FAW    = 11,
  localparam int unsigned SCW   = $clog2(SPS)
) (
  input  logic                clk,
  input  logic                rst_n,
  // filtered-sample memory status
  input  logic                fs_we,
  input  logic                fs_full,
  input  logic [FAW-1:0]      fs_wptr,
  output logic                last_of_sec,
  // programmable parameters
  input  logic                retrain,
  input  logic [DFW-1:0]      th_valid,
  input  logic [7:0]          ref_period,
  // M of the window and of the reference
  input  logic [SAMPLE_W-1:0] m_window,
  output logic [SAMPLE_W-1:0] m_ref,
  // phase matrix constructor
  output logic                pm_start,
  output logic                pm_to_cur,   // 1: current PM memory, 0: reference
  output logic [FAW-1:0]      win_base,
  input  logic                pm_done,
  // difference accumulator and its delay registers
  output logic                diff_start,
  input  logic                diff_done,
  input  logic [DFW-1:0]      diff_val,
  output logic                dr_cur_we,
  output logic                dr_ref_we,
  // CPSD calculator
  output logic                cpsd_start,
  input  logic                cpsd_done,
  // status
  output logic                new_cpsd,
  output phase_e              phase,
  output logic                ref_valid,
  output logic [15:0]         seconds
);

  typedef enum logic [2:0] {C_IDLE, C_PM_GO, C_PM, C_DIFF_GO, C_DIFF, C_CPSD_GO, C_CPSD} cstate_e;
  cstate_e state;

  logic [SCW-1:0] scount;
  logic           tick_pend;
  logic           retrain_pend;
  logic [7:0]     since_ref;

  assign last_of_sec = fs_we && (32'(scount) == SPS - 1);
  assign pm_start    = (state == C_PM_GO);
  assign diff_start  = (state == C_DIFF_GO);
  assign cpsd_start  = (state == C_CPSD_GO);
  assign dr_cur_we   = (state == C_DIFF) && diff_done && (phase == PH_ONLINE);
  assign dr_ref_we   = (state == C_DIFF) && diff_done && (phase == PH_CHECK) && (diff_val < th_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= C_IDLE;
      scount       <= '0;
      tick_pend    <= 1'b0;
      retrain_pend <= 1'b0;
      since_ref    <= '0;
      phase        <= PH_FILL;
      ref_valid    <= 1'b0;
      m_ref        <= '0;
      pm_to_cur    <= 1'b0;
      win_base     <= '0;
      new_cpsd     <= 1'b0;
      seconds      <= '0;
    end else begin
      new_cpsd <= 1'b0;
      if (fs_we) scount <= last_of_sec ? '0 : scount + SCW'(1);
      if (retrain) retrain_pend <= 1'b1;
      if (last_of_sec) tick_pend <= 1'b1;

      unique case (state)
        C_IDLE: if (tick_pend && !last_of_sec) begin
          tick_pend <= 1'b0;
          seconds   <= seconds + 16'd1;
          win_base  <= fs_wptr;
          if (fs_full) begin
            if (phase == PH_FILL || phase == PH_CAND || retrain_pend) begin
              retrain_pend <= 1'b0;
              phase        <= PH_CAND;
              ref_valid    <= 1'b0;
              m_ref        <= m_window;
              pm_to_cur    <= 1'b0;
              state        <= C_PM_GO;
            end else begin
              pm_to_cur <= 1'b1;
              state     <= C_PM_GO;
            end
          end
        end
        C_PM_GO: state <= C_PM;
        C_PM: if (pm_done) begin
          if (phase == PH_CAND) begin
            phase <= PH_CHECK;
            state <= C_IDLE;
          end else begin
            state <= C_DIFF_GO;
          end
        end
        C_DIFF_GO: state <= C_DIFF;
        C_DIFF: if (diff_done) begin
          if (phase == PH_CHECK) begin
            if (diff_val < th_valid) begin
              phase     <= PH_ONLINE;
              ref_valid <= 1'b1;
              since_ref <= '0;
            end else begin
              phase <= PH_CAND;
            end
            state <= C_IDLE;
          end else begin
            state <= C_CPSD_GO;
          end
        end
        C_CPSD_GO: state <= C_CPSD;
        C_CPSD: if (cpsd_done) begin
          new_cpsd  <= 1'b1;
          since_ref <= since_ref + 8'd1;
          if (ref_period != '0 && since_ref + 8'd1 >= ref_period) phase <= PH_CAND;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

endmodule
