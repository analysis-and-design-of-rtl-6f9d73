// pm_constructor: builds the phase matrix (PM) of one window.
//
// On start the constructor first clears the selected PM memory (N*N writes),
// then scans the DEPTH filtered samples of the window from the oldest
// (base_addr) to the newest. Each sample s is saturated to [-M, M] and
// quantised to one of N levels,
//     q = min( floor( ((s + M) * N + M) / (2M) ), N - 1 ),
// by a restoring divider that needs only log2(N)+1 steps because the quotient
// is at most N. Quantised levels pass through a DMAX-deep delay line, so that
// for every sample i >= d the pair <q(i-d), q(i)> is available without
// reading memory twice; its PM cell, address q(i-d)*N + q(i), is read and
// written back incremented (saturating). A window of DEPTH samples thus
// yields DEPTH - d phase vectors.
//
// Interfaces: a synchronous read port into the filtered-sample memory and a
// read/write port into one PM memory (the parent selects which). done pulses
// one clock after the last write; busy is high from start until then.
// Timing: N*N clear cycles plus, per sample, 3 + log2(N) + 1 cycles, and 2
// more for each phase vector: about 22,800 clocks for the default sizes,
// well inside the 100,000 clocks of one second at 100 kHz.
//
// Phase vectors, quantisation (eq. 3 of the CPSD algorithm, with saturation
// to [-M, M]) and histogram construction follow the design description. The
// clamp of the top level to N-1, the use of M = 1 when M is 0, the quantised
// delay line, the scan order and the cycle-level sequencing are this design's
// choices.
module pm_constructor
  import cpsd_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  parameter int unsigned N     = 16,
  parameter int unsigned CNT_W = 12,
  parameter int unsigned DMAX  = 32,
  localparam int unsigned FAW  = $clog2(DEPTH),
  localparam int unsigned PAW  = $clog2(N * N),
  localparam int unsigned QW   = $clog2(N),
  localparam int unsigned DW   = $clog2(DMAX + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [SAMPLE_W-1:0] m_val,
  input  logic [DW-1:0]       delay_d,
  input  logic [FAW-1:0]      base_addr,
  output logic                busy,
  output logic                done,
  // filtered-sample memory read port
  output logic [FAW-1:0]      fs_raddr,
  input  sample_t             fs_rdata,
  // PM memory port
  output logic [PAW-1:0]      pm_raddr,
  input  logic [CNT_W-1:0]    pm_rdata,
  output logic                pm_we,
  output logic [PAW-1:0]      pm_waddr,
  output logic [CNT_W-1:0]    pm_wdata
);

  localparam int unsigned QB  = QW + 1;                 // quotient bits
  localparam int unsigned DSW = (DMAX > 1) ? $clog2(DMAX) : 1;
  localparam int unsigned NUM_W = SAMPLE_W + 1 + QW + 2; // numerator width

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_READ, S_LOAD, S_DIV, S_PMRD, S_PMWAIT, S_PMWR} state_e;
  state_e state;

  typedef logic [NUM_W-1:0] num_t;

  logic [FAW-1:0]      idx;       // sample index within the window
  logic [PAW-1:0]      clr_addr;
  logic [SAMPLE_W-1:0] m_eff;     // max(M, 1)
  logic [DW-1:0]       d_eff;     // clamp(d, 1, DMAX)
  num_t                rem;
  num_t                den;
  logic [QB-1:0]       quo;
  logic [$clog2(QB+1)-1:0] bitn;
  logic [QW-1:0]       qline [DMAX]; // qline[0] = q(i-1), qline[k] = q(i-1-k)
  logic [QW-1:0]       q_now;
  logic [DSW-1:0]      qsel;      // d_eff - 1, tap of q(i-d)
  logic [PAW-1:0]      pm_cell;

  // Saturate the sample to [-M, M] and form the eq. 3 numerator (s+M)*N + M.
  function automatic num_t numerator(input sample_t s, input logic [SAMPLE_W-1:0] m);
    logic signed [SAMPLE_W+1:0] sv, mv, sat;
    sv = (SAMPLE_W+2)'(s);
    mv = $signed({2'b00, m});
    if (sv > mv)       sat = mv;
    else if (sv < -mv) sat = -mv;
    else               sat = sv;
    return num_t'(unsigned'(sat + mv)) * num_t'(N) + num_t'(m);
  endfunction

  // Clamp the quotient to the top level N-1.
  always_comb begin
    if (32'(quo) > N - 1) q_now = QW'(N - 1);
    else                  q_now = quo[QW-1:0];
  end

  always_comb qsel = DSW'(d_eff - DW'(1));

  num_t den_shift;
  always_comb den_shift = den << (bitn - 1'b1);

  always_comb begin
    fs_raddr = base_addr + idx;
    pm_raddr = pm_cell;
    pm_waddr = (state == S_CLEAR) ? clr_addr : pm_cell;
    pm_we    = (state == S_CLEAR) || (state == S_PMWR);
    if (state == S_CLEAR)           pm_wdata = '0;
    else if (&pm_rdata)             pm_wdata = pm_rdata;
    else                            pm_wdata = pm_rdata + CNT_W'(1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      idx      <= '0;
      clr_addr <= '0;
      m_eff    <= '0;
      d_eff    <= '0;
      rem      <= '0;
      den      <= '0;
      quo      <= '0;
      bitn     <= '0;
      pm_cell     <= '0;
      for (int i = 0; i < DMAX; i++) qline[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          busy     <= 1'b1;
          state    <= S_CLEAR;
          clr_addr <= '0;
          idx      <= '0;
          m_eff    <= (m_val == '0) ? SAMPLE_W'(1) : m_val;
          if (delay_d == '0)                d_eff <= DW'(1);
          else if (32'(delay_d) > DMAX)     d_eff <= DW'(DMAX);
          else                              d_eff <= delay_d;
        end
        S_CLEAR: begin
          clr_addr <= clr_addr + PAW'(1);
          if (32'(clr_addr) == N * N - 1) state <= S_READ;
        end
        S_READ: state <= S_LOAD;                 // fs_raddr presented
        S_LOAD: begin                            // fs_rdata valid
          rem   <= numerator(fs_rdata, m_eff);
          den   <= num_t'({m_eff, 1'b0});
          quo   <= '0;
          bitn  <= ($clog2(QB+1))'(QB);
          state <= S_DIV;
        end
        S_DIV: begin
          if (rem >= den_shift) begin
            rem <= rem - den_shift;
            quo[bitn - 1'b1] <= 1'b1;
          end
          bitn <= bitn - 1'b1;
          if (bitn == 1) state <= S_PMRD;
        end
        S_PMRD: begin
          // quo is final here: record the level and pick the PM cell.
          qline[0] <= q_now;
          for (int i = 1; i < DMAX; i++) qline[i] <= qline[i-1];
          pm_cell <= PAW'({qline[qsel], q_now});
          if (32'(idx) >= 32'(d_eff)) begin
            state <= S_PMWAIT;
          end else begin
            idx   <= idx + FAW'(1);
            state <= S_READ;
          end
        end
        S_PMWAIT: state <= S_PMWR;               // cell presented on pm_raddr
        S_PMWR: begin                            // pm_rdata valid, write back +1
          if (32'(idx) == DEPTH - 1) begin
            state <= S_IDLE;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            idx   <= idx + FAW'(1);
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
