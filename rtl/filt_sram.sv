// filt_sram: circular memory holding the latest window of filtered samples.
//
// Filtered samples are written in arrival order at an internal write pointer
// that wraps after DEPTH words, so the memory always holds the last DEPTH
// samples. Once DEPTH samples have been written, `full` is set and `wptr`
// addresses the oldest sample of the window (the next one to be overwritten);
// the window is then wptr, wptr+1, ... (mod DEPTH). The phase matrix
// constructor reads it through a separate synchronous read port: rdata is the
// word at raddr one clock after raddr is presented. A read and a write to the
// same word in one clock return the old word.
//
// The memory and its 8-second size (8 s x 256 samples/s = 2048 words) follow
// the design description; the circular addressing, the separate read and
// write ports and the full flag are this design's choices.
module filt_sram
  import cpsd_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  sample_t       wdata,
  output logic [AW-1:0] wptr,
  output logic          full,
  input  logic [AW-1:0] raddr,
  output sample_t       rdata
);

  sample_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wptr] <= wdata;
    rdata <= mem[raddr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      full <= 1'b0;
    end else if (we) begin
      if (32'(wptr) == DEPTH - 1) begin
        wptr <= '0;
        full <= 1'b1;
      end else begin
        wptr <= wptr + AW'(1);
      end
    end
  end

endmodule
