// filter_unit: programmable FIR/IIR filter built from cascaded second-order
// sections, evaluated by one multiply-accumulate (MAC) unit.
//
// The filter removes baseline drift and power-line interference from the raw
// ECG before it is stored. Its coefficients are written over the system bus,
// so the same hardware can be a band-pass, a notch, or an FIR filter (set
// a1 = a2 = 0). Section s computes, in direct form I,
//     y_s[n] = b0*x_s[n] + b1*x_s[n-1] + b2*x_s[n-2] - a1*y_s[n-1] - a2*y_s[n-2]
// where x_0 is the raw input (from raw_delay_regs) and x_s = y_{s-1} for s > 0.
// Coefficients are signed Q2.14. Section states carry GUARD fractional bits
// and are saturated to ST_W bits; each product sum is rounded to nearest.
// The final section's output is rounded, shifted back to sample scale and
// saturated to 10 bits.
//
// Timing: pulse start one clock after the raw taps have shifted. The unit then
// performs one MAC per clock, 5 per section, and pulses out_valid with the new
// filtered sample NSEC*5+1 clocks after start. A start while busy is ignored.
//
// The filter's purpose, its programmable coefficients and its construction
// from cascaded MAC operations follow the design description. The section
// count (three: one band-pass and two notches), the direct-form-I structure,
// the single time-shared MAC and all number formats are this design's choices.
module filter_unit
  import cpsd_pkg::*;
#(
  parameter int unsigned NSEC  = 3,
  parameter int unsigned GUARD = 4,
  parameter int unsigned ST_W  = 18
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  sample_t x_taps [3],
  input  coef_t   coef   [NSEC][SEC_COEFS],
  output logic    busy,
  output logic    out_valid,
  output sample_t out_sample
);

  localparam int unsigned ACC_W = ST_W + COEF_W + 4;
  localparam int unsigned SW    = (NSEC > 1) ? $clog2(NSEC) : 1;

  typedef logic signed [ST_W-1:0]  st_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Output history of each section: yh[s][0] = y_s[n-1], yh[s][1] = y_s[n-2].
  st_t  yh [NSEC][2];
  // Input of the section being evaluated: x[n], x[n-1], x[n-2].
  st_t  xin [3];
  acc_t acc;
  logic [SW-1:0] sec;
  logic [2:0]    k;

  // Saturate a wide value to ST_W bits.
  function automatic st_t sat_st(input acc_t v);
    acc_t hi, lo;
    hi = acc_t'({1'b0, {(ST_W-1){1'b1}}});
    lo = -hi - 1;
    if (v > hi)      return st_t'(hi);
    else if (v < lo) return st_t'(lo);
    else             return st_t'(v);
  endfunction

  // Round an accumulator from Q.14 products back to the state scale.
  function automatic st_t round_sec(input acc_t a);
    acc_t r;
    r = (a + (acc_t'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
    return sat_st(r);
  endfunction

  // Operand and coefficient of MAC step k of the current section.
  st_t  op;
  acc_t prod;
  always_comb begin
    unique case (k)
      3'd0:    op = xin[0];
      3'd1:    op = xin[1];
      3'd2:    op = xin[2];
      3'd3:    op = yh[sec][0];
      default: op = yh[sec][1];
    endcase
    prod = acc_t'(op) * acc_t'(coef[sec][k]);
  end

  // Accumulator value after this cycle's MAC; feedback terms are subtracted.
  acc_t acc_next;
  st_t  y_sec;
  always_comb begin
    acc_next = (k < 3'd3) ? acc + prod : acc - prod;
    y_sec    = round_sec(acc_next);
  end

  // Final output: undo the guard bits with rounding, saturate to SAMPLE_W.
  function automatic sample_t to_sample(input st_t v);
    logic signed [ST_W:0] r;
    logic signed [ST_W:0] hi, lo;
    r  = ($signed({v[ST_W-1], v}) + (ST_W+1)'(1 << (GUARD - 1))) >>> GUARD;
    hi = (ST_W+1)'((1 << (SAMPLE_W - 1)) - 1);
    lo = -hi - 1;
    if (r > hi)      return sample_t'(hi);
    else if (r < lo) return sample_t'(lo);
    else             return sample_t'(r);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      out_valid  <= 1'b0;
      out_sample <= '0;
      acc        <= '0;
      sec        <= '0;
      k          <= '0;
      for (int s = 0; s < NSEC; s++) begin
        yh[s][0] <= '0;
        yh[s][1] <= '0;
      end
      for (int i = 0; i < 3; i++) xin[i] <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          sec  <= '0;
          k    <= '0;
          acc  <= '0;
          for (int i = 0; i < 3; i++) xin[i] <= st_t'(x_taps[i]) <<< GUARD;
        end
      end else if (k != 3'd4) begin
        acc <= acc_next;
        k   <= k + 3'd1;
      end else begin
        // Last MAC of the section: finish y_s[n], update its history and
        // hand it to the next section together with the old history.
        yh[sec][0] <= y_sec;
        yh[sec][1] <= yh[sec][0];
        xin[0]     <= y_sec;
        xin[1]     <= yh[sec][0];
        xin[2]     <= yh[sec][1];
        acc        <= '0;
        k          <= '0;
        if (32'(sec) == NSEC - 1) begin
          busy       <= 1'b0;
          out_valid  <= 1'b1;
          out_sample <= to_sample(y_sec);
        end else begin
          sec <= sec + SW'(1);
        end
      end
    end
  end

endmodule
