// cpsd_calculator: the CPSD value, eq. 6 of the CPSD algorithm.
//
//     CPSD = Diff(PM_cur, PM_ref) / Diff(PM_ref+1, PM_ref)
//
// computed as an unsigned Q8.8 number, floor(num * 256 / max(den, 1)),
// saturated to 0xFFFF. A restoring divider produces one quotient bit per
// clock; done pulses with the result on cpsd DFW + 9 + 1 clocks after start
// (19 clocks for the default width). A zero reference difference is treated
// as 1 so the result stays defined. A start while busy is ignored.
// The formula follows the design description; the fixed-point format, the
// zero guard and the bit-serial divider are this design's choices.
module cpsd_calculator
  import cpsd_pkg::*;
#(
  parameter int unsigned DFW = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DFW-1:0]    num,
  input  logic [DFW-1:0]    den,
  output logic              busy,
  output logic              done,
  output logic [CPSD_W-1:0] cpsd
);

  localparam int unsigned QB = DFW + CPSD_FRAC;      // quotient bits
  localparam int unsigned RW = DFW + CPSD_FRAC + 1;  // remainder width
  localparam int unsigned BW = $clog2(QB + 1);

  logic [RW-1:0]     rem;
  logic [DFW-1:0]    dvs;
  logic [QB-1:0]     quo;
  logic [BW-1:0]     bitn;
  logic [RW+QB-1:0]  dvs_shift;

  always_comb dvs_shift = (RW+QB)'(dvs) << (bitn - BW'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cpsd <= '0;
      rem  <= '0;
      dvs  <= '0;
      quo  <= '0;
      bitn <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          rem  <= RW'(num) << CPSD_FRAC;
          dvs  <= (den == '0) ? DFW'(1) : den;
          quo  <= '0;
          bitn <= BW'(QB);
        end
      end else if (bitn != '0) begin
        if ((RW+QB)'(rem) >= dvs_shift) begin
          rem <= rem - RW'(dvs_shift);
          quo[bitn - BW'(1)] <= 1'b1;
        end
        bitn <= bitn - BW'(1);
      end else begin
        busy <= 1'b0;
        done <= 1'b1;
        cpsd <= (32'(quo) > 32'hFFFF) ? '1 : CPSD_W'(quo);
      end
    end
  end

endmodule
