// diff_accumulator: counts the cells in which two phase matrices differ.
//
// On start it walks the addresses 0 .. N*N-1 of the reference and current PM
// memories, one address per clock on the shared read address, and counts the
// cells with |PM_cur(j,k) - PM_ref(j,k)| > h. This count is
// Diff(PM_cur, PM_ref), eq. 5 of the CPSD algorithm. done pulses with the
// final count on diff, N*N + 2 clocks after start; diff holds until the next
// start. A start while busy is ignored.
// The difference measure follows the design description; the sequential
// scan with one comparison per clock is this design's choice.
module diff_accumulator #(
  parameter int unsigned N     = 16,
  parameter int unsigned CNT_W = 12,
  localparam int unsigned PAW  = $clog2(N * N),
  localparam int unsigned DFW  = $clog2(N * N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [CNT_W-1:0] h,
  output logic             busy,
  output logic             done,
  output logic [PAW-1:0]   raddr,
  input  logic [CNT_W-1:0] ref_rdata,
  input  logic [CNT_W-1:0] cur_rdata,
  output logic [DFW-1:0]   diff
);

  logic             issuing;   // an address is presented this clock
  logic             cmp_valid; // read data of the previous address is valid
  logic [PAW-1:0]   addr;
  logic [CNT_W-1:0] absdiff;

  assign raddr = addr;

  always_comb begin
    absdiff = (cur_rdata > ref_rdata) ? cur_rdata - ref_rdata : ref_rdata - cur_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      issuing   <= 1'b0;
      cmp_valid <= 1'b0;
      addr      <= '0;
      diff      <= '0;
    end else begin
      done      <= 1'b0;
      cmp_valid <= issuing;
      if (!busy && start) begin
        busy    <= 1'b1;
        issuing <= 1'b1;
        addr    <= '0;
        diff    <= '0;
      end else if (issuing) begin
        if (32'(addr) == N * N - 1) issuing <= 1'b0;
        else                        addr    <= addr + PAW'(1);
      end
      if (cmp_valid) begin
        if (absdiff > h) diff <= diff + DFW'(1);
        if (!issuing) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
