// wb_interconnect: shared Wishbone system bus, one master and NS slaves.
//
// The general purpose processor is the only master. Address bits
// [SEL_LO +: SEL_W] pick the slave: its cyc and stb follow the master's, the
// other slaves see cyc = stb = 0, and the chosen slave's read data, ack and
// err return to the master. we, address, write data and sel go to every
// slave. An address with no slave behind it is answered with err one clock
// after cyc & stb. The bus is combinational: it adds no clock of latency.
// A shared Wishbone bus with the CPSD processor, the radio and the I2C port
// as slaves follows the design description; the decoding, the address map
// (slave i at i * 2**SEL_LO) and the error response are this design's
// choices.
module wb_interconnect #(
  parameter int unsigned NS     = 3,
  parameter int unsigned AW     = 32,
  parameter int unsigned DW     = 32,
  parameter int unsigned SEL_LO = 12,
  parameter int unsigned SEL_W  = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  // master
  input  logic          m_cyc,
  input  logic          m_stb,
  input  logic          m_we,
  input  logic [AW-1:0] m_adr,
  input  logic [DW-1:0] m_dat_w,
  input  logic [DW/8-1:0] m_sel,
  output logic [DW-1:0] m_dat_r,
  output logic          m_ack,
  output logic          m_err,
  // slaves
  output logic          s_cyc   [NS],
  output logic          s_stb   [NS],
  output logic          s_we,
  output logic [AW-1:0] s_adr,
  output logic [DW-1:0] s_dat_w,
  output logic [DW/8-1:0] s_sel,
  input  logic [DW-1:0] s_dat_r [NS],
  input  logic          s_ack   [NS],
  input  logic          s_err   [NS]
);

  logic [SEL_W-1:0] idx;
  logic             mapped;
  logic             unmapped_err;

  assign idx     = m_adr[SEL_LO +: SEL_W];
  assign mapped  = 32'(idx) < NS;
  assign s_we    = m_we;
  assign s_adr   = m_adr;
  assign s_dat_w = m_dat_w;
  assign s_sel   = m_sel;

  always_comb begin
    m_dat_r = '0;
    m_ack   = 1'b0;
    m_err   = unmapped_err;
    for (int i = 0; i < NS; i++) begin
      s_cyc[i] = m_cyc && mapped && (32'(idx) == i);
      s_stb[i] = m_stb && mapped && (32'(idx) == i);
      if (mapped && 32'(idx) == i) begin
        m_dat_r = s_dat_r[i];
        m_ack   = s_ack[i];
        m_err   = s_err[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) unmapped_err <= 1'b0;
    else        unmapped_err <= m_cyc && m_stb && !mapped && !unmapped_err;
  end

endmodule
