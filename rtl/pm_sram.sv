// pm_sram: one phase matrix (PM) memory, N x N histogram counters.
//
// Word j*N + k holds PM(j, k), the number of phase vectors of a window whose
// quantised delayed sample is j and whose quantised current sample is k. The
// memory has one synchronous read port (rdata one clock after raddr) and one
// write port. The processor has two of these: one for the reference PM and
// one for the current PM, so that both can be read in the same clock.
// A read and a write to the same word in one clock return the old word.
// The contents are not reset; the constructor clears a matrix before use.
//
// Two PM memories follow the design description. The matrix size N = 16 and
// the 12-bit counters (enough for a full 2048-sample window) are this design's
// choices.
module pm_sram #(
  parameter int unsigned N     = 16,
  parameter int unsigned CNT_W = 12,
  localparam int unsigned AW   = $clog2(N * N)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [CNT_W-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [CNT_W-1:0] wdata
);

  logic [CNT_W-1:0] mem [N * N];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
