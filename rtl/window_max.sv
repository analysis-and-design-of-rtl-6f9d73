// window_max: running maximum absolute value of the stored window.
//
// The quantiser needs M, the largest absolute sample value of a window. This
// block finds it without rescanning memory: it keeps the peak |s| of the
// second being received and, at each second boundary (last_of_sec high with
// in_valid), pushes that peak into a register file of the last NSEC per-second
// peaks. m_window is the largest of those, i.e. M of the window made of the
// last NSEC complete seconds. It is valid from the clock after the boundary.
// |-512| is represented as 512, so M is SAMPLE_W bits unsigned.
// The definition of M follows the design description; tracking it per second
// is this design's choice.
module window_max
  import cpsd_pkg::*;
#(
  parameter int unsigned NSEC = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  sample_t             in_sample,
  input  logic                last_of_sec,
  output logic [SAMPLE_W-1:0] m_window
);

  typedef logic [SAMPLE_W-1:0] mag_t;

  mag_t peak;
  mag_t sec_peak [NSEC];
  mag_t mag_in;
  mag_t peak_next;

  always_comb begin
    mag_in    = in_sample[SAMPLE_W-1] ? mag_t'(-in_sample) : mag_t'(in_sample);
    peak_next = (mag_in > peak) ? mag_in : peak;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      peak <= '0;
      for (int i = 0; i < NSEC; i++) sec_peak[i] <= '0;
    end else if (in_valid) begin
      if (last_of_sec) begin
        peak        <= '0;
        sec_peak[0] <= peak_next;
        for (int i = 1; i < NSEC; i++) sec_peak[i] <= sec_peak[i-1];
      end else begin
        peak <= peak_next;
      end
    end
  end

  always_comb begin
    m_window = '0;
    for (int i = 0; i < NSEC; i++)
      if (sec_peak[i] > m_window) m_window = sec_peak[i];
  end

endmodule
