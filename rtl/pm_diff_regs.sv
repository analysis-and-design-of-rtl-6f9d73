// pm_diff_regs: delay registers (DRs) for the PM differences.
//
// Holds the two differences that the CPSD value is formed from (eq. 6):
// diff_ref, Diff(PM_ref+1, PM_ref), captured when a candidate reference is
// validated (ref_we), and diff_cur, the latest Diff(PM_cur, PM_ref) of the
// on-line phase (cur_we). Both register on the clock edge at which their
// write enable is high and reset to zero. The hand-off from the difference
// accumulator to the CPSD calculator through these registers follows the
// design description; the two named slots are this design's choice.
module pm_diff_regs #(
  parameter int unsigned DFW = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [DFW-1:0] diff_in,
  input  logic           cur_we,
  input  logic           ref_we,
  output logic [DFW-1:0] diff_cur,
  output logic [DFW-1:0] diff_ref
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_cur <= '0;
      diff_ref <= '0;
    end else begin
      if (cur_we) diff_cur <= diff_in;
      if (ref_we) diff_ref <= diff_in;
    end
  end

endmodule
