// ecg_sensor_soc: digital section of the ECG sensor node.
//
// ECG samples from the recording interface (amplifier and ADC, outside this
// module) enter the CPSD processor, which extracts one CPSD value per second.
// A general purpose processor (outside this module) reads the values over a
// shared Wishbone bus when the processor interrupts, decides whether a fatal
// rhythm is present and controls the radio and the I2C port, which sit on the
// same bus. Their bus ports are brought out here.
//
// Address map (byte addresses): 0x0000 CPSD processor registers (see
// cpsd_wb_regs), 0x1000 radio, 0x2000 I2C port; other addresses answer err.
// Every bus access to the CPSD processor takes two clocks (ack on the second).
// Everything runs on one clock, meant to be 100 kHz (390 clocks per sample
// at 256 samples/s); a host on a slower clock of its own would need a
// clock-domain bridge in front of gpp_*, which is not included.
// The system structure follows the design description; the address map and
// the single clock are this design's choices.
module ecg_sensor_soc
  import cpsd_pkg::*;
#(
  parameter int unsigned SPS     = 256,
  parameter int unsigned WIN_SEC = 8,
  parameter int unsigned N       = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the ECG recording interface
  input  logic             adc_valid,
  input  sample_t          adc_sample,
  // from/to the general purpose processor (bus master)
  input  logic             gpp_cyc,
  input  logic             gpp_stb,
  input  logic             gpp_we,
  input  logic [31:0]      gpp_adr,
  input  logic [31:0]      gpp_dat_w,
  input  logic [3:0]       gpp_sel,
  output logic [31:0]      gpp_dat_r,
  output logic             gpp_ack,
  output logic             gpp_err,
  output logic             cpsd_irq,
  // radio transceiver slave port
  output logic             radio_cyc,
  output logic             radio_stb,
  input  logic [31:0]      radio_dat_r,
  input  logic             radio_ack,
  input  logic             radio_err,
  // I2C port slave port
  output logic             i2c_cyc,
  output logic             i2c_stb,
  input  logic [31:0]      i2c_dat_r,
  input  logic             i2c_ack,
  input  logic             i2c_err,
  // signals shared by the external slaves
  output logic             bus_we,
  output logic [31:0]      bus_adr,
  output logic [31:0]      bus_dat_w,
  output logic [3:0]       bus_sel
);

  localparam int unsigned NS = 3;

  logic        s_cyc   [NS];
  logic        s_stb   [NS];
  logic [31:0] s_dat_r [NS];
  logic        s_ack   [NS];
  logic        s_err   [NS];

  wb_interconnect #(.NS(NS), .AW(32), .DW(32), .SEL_LO(12), .SEL_W(4)) u_bus (
    .clk, .rst_n,
    .m_cyc(gpp_cyc), .m_stb(gpp_stb), .m_we(gpp_we), .m_adr(gpp_adr),
    .m_dat_w(gpp_dat_w), .m_sel(gpp_sel), .m_dat_r(gpp_dat_r), .m_ack(gpp_ack),
    .m_err(gpp_err),
    .s_cyc, .s_stb, .s_we(bus_we), .s_adr(bus_adr), .s_dat_w(bus_dat_w),
    .s_sel(bus_sel), .s_dat_r, .s_ack, .s_err
  );

  cpsd_asp #(.SPS(SPS), .WIN_SEC(WIN_SEC), .N(N), .ADR_W(8)) u_asp (
    .clk, .rst_n, .adc_valid, .adc_sample,
    .wb_cyc_i(s_cyc[0]), .wb_stb_i(s_stb[0]), .wb_we_i(bus_we),
    .wb_adr_i(bus_adr[7:0]), .wb_dat_i(bus_dat_w), .wb_dat_o(s_dat_r[0]),
    .wb_ack_o(s_ack[0]), .irq(cpsd_irq)
  );
  assign s_err[0] = 1'b0;

  assign radio_cyc  = s_cyc[1];
  assign radio_stb  = s_stb[1];
  assign s_dat_r[1] = radio_dat_r;
  assign s_ack[1]   = radio_ack;
  assign s_err[1]   = radio_err;

  assign i2c_cyc    = s_cyc[2];
  assign i2c_stb    = s_stb[2];
  assign s_dat_r[2] = i2c_dat_r;
  assign s_ack[2]   = i2c_ack;
  assign s_err[2]   = i2c_err;

endmodule
