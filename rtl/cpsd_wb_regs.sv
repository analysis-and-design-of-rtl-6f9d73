// cpsd_wb_regs: Wishbone slave with the CPSD processor's programmable
// parameters, its results and its interrupt.
//
// The general purpose processor programs the filter coefficients and the
// algorithm parameters here and reads each CPSD value after an interrupt.
// Wishbone classic, 32-bit data, byte addresses (word offsets from cpsd_pkg,
// times 4). Every access is acknowledged one clock after cyc & stb, the
// acknowledge is a single-clock pulse, and sel is ignored (full-word access).
//
//   CTRL       bit 1 write 1: retrain; bit 2 interrupt enable
//   STATUS     bits 1:0 phase, bit 2 reference valid, bit 8 CPSD ready
//              (write 1 to clear); irq = ready & enable
//   CPSD, DIFF_CUR, DIFF_REF, M_REF, SECONDS    read only
//   FILT       latest filter output, sign-extended (read only), so that the
//              processor can fetch the filtered ECG stream
//   H, TH_VALID, DELAY, REF_PERIOD               read/write
//   COEF + s*5 + k   coefficient k (b0, b1, b2, a1, a2) of filter section s,
//                    signed Q2.14 in bits 15:0
//
// Reset values: every section passes its input (b0 = 1.0, others 0);
// h = 4, Th_valid = 32, d = 8 samples, reference period = 30 s.
// Bus-programmable coefficients and parameters and interrupt-driven result
// read-out follow the design description, as do the 30 s period and read-back
// of the filtered samples; the
// register map, the other reset values and the bus timing are this design's
// choices.
module cpsd_wb_regs
  import cpsd_pkg::*;
#(
  parameter int unsigned NSEC  = 3,
  parameter int unsigned CNT_W = 12,
  parameter int unsigned DFW   = 9,
  parameter int unsigned DW    = 6,
  parameter int unsigned ADR_W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // Wishbone slave
  input  logic                wb_cyc_i,
  input  logic                wb_stb_i,
  input  logic                wb_we_i,
  input  logic [ADR_W-1:0]    wb_adr_i,
  input  logic [WB_DW-1:0]    wb_dat_i,
  output logic [WB_DW-1:0]    wb_dat_o,
  output logic                wb_ack_o,
  // parameters to the processor
  output coef_t               coef [NSEC][SEC_COEFS],
  output logic [CNT_W-1:0]    h,
  output logic [DFW-1:0]      th_valid,
  output logic [DW-1:0]       delay_d,
  output logic [7:0]          ref_period,
  output logic                retrain,
  output logic                irq,
  // results and status from the processor
  input  logic                new_cpsd,
  input  phase_e              phase,
  input  logic                ref_valid,
  input  logic [CPSD_W-1:0]   cpsd,
  input  logic [DFW-1:0]      diff_cur,
  input  logic [DFW-1:0]      diff_ref,
  input  logic [SAMPLE_W-1:0] m_ref,
  input  logic [15:0]         seconds,
  input  logic                filt_valid,
  input  sample_t             filt_sample
);

  localparam int unsigned NCOEF = NSEC * SEC_COEFS;

  logic                 irq_en;
  logic                 ready;
  logic                 access;
  logic [ADR_W-3:0]     word;
  logic [WB_DW-1:0]     rd;
  sample_t              last_filt;

  assign access = wb_cyc_i && wb_stb_i && !wb_ack_o;
  assign word   = wb_adr_i[ADR_W-1:2];
  assign irq    = ready && irq_en;

  // Read data of the addressed register.
  always_comb begin
    rd = '0;
    unique case (32'(word))
      REG_CTRL:       rd = WB_DW'({irq_en, 2'b00});
      REG_STATUS:     rd = WB_DW'({ready, 5'b0, ref_valid, phase});
      REG_CPSD:       rd = WB_DW'(cpsd);
      REG_DIFF_CUR:   rd = WB_DW'(diff_cur);
      REG_DIFF_REF:   rd = WB_DW'(diff_ref);
      REG_H:          rd = WB_DW'(h);
      REG_TH_VALID:   rd = WB_DW'(th_valid);
      REG_DELAY:      rd = WB_DW'(delay_d);
      REG_REF_PERIOD: rd = WB_DW'(ref_period);
      REG_M_REF:      rd = WB_DW'(m_ref);
      REG_SECONDS:    rd = WB_DW'(seconds);
      REG_FILT:       rd = WB_DW'($signed(last_filt));
      default: begin
        for (int i = 0; i < NCOEF; i++)
          if (32'(word) == REG_COEF_BASE + i)
            rd = WB_DW'($signed(coef[i / SEC_COEFS][i % SEC_COEFS]));
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_ack_o   <= 1'b0;
      wb_dat_o   <= '0;
      irq_en     <= 1'b0;
      ready      <= 1'b0;
      last_filt  <= '0;
      retrain    <= 1'b0;
      h          <= CNT_W'(4);
      th_valid   <= DFW'(32);
      delay_d    <= DW'(8);
      ref_period <= 8'd30;
      for (int s = 0; s < NSEC; s++)
        for (int k = 0; k < SEC_COEFS; k++)
          coef[s][k] <= (k == 0) ? coef_t'(1 << COEF_FRAC) : '0;
    end else begin
      wb_ack_o <= access;
      retrain  <= 1'b0;
      if (new_cpsd) ready <= 1'b1;
      if (filt_valid) last_filt <= filt_sample;
      if (access) begin
        wb_dat_o <= rd;
        if (wb_we_i) begin
          unique case (32'(word))
            REG_CTRL: begin
              retrain <= wb_dat_i[1];
              irq_en  <= wb_dat_i[2];
            end
            REG_STATUS:     if (wb_dat_i[8]) ready <= 1'b0;
            REG_H:          h          <= wb_dat_i[CNT_W-1:0];
            REG_TH_VALID:   th_valid   <= wb_dat_i[DFW-1:0];
            REG_DELAY:      delay_d    <= wb_dat_i[DW-1:0];
            REG_REF_PERIOD: ref_period <= wb_dat_i[7:0];
            default: begin
              for (int i = 0; i < NCOEF; i++)
                if (32'(word) == REG_COEF_BASE + i)
                  coef[i / SEC_COEFS][i % SEC_COEFS] <= wb_dat_i[COEF_W-1:0];
            end
          endcase
        end
      end
    end
  end

  // Wishbone classic rule: an acknowledge only answers an active cycle.
  ack_in_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    wb_ack_o |-> wb_cyc_i && wb_stb_i);

endmodule
