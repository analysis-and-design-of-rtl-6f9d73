// cpsd_pkg: types and constants shared by the CPSD processor.
//
// The CPSD (chaotic phase space differential) processor turns a stream of
// 10-bit ECG samples into one CPSD value per second. This package holds the
// numeric formats, the processor's operating phases and the register map of
// its Wishbone slave port. The 10-bit sample width, the 256 samples/s rate and
// the 8-second window follow the design description; the coefficient format,
// the register map and the phase encoding are this implementation's choices.
package cpsd_pkg;

  // Sample format: 10-bit two's complement, for raw and filtered samples.
  localparam int unsigned SAMPLE_W   = 10;
  // Filter coefficients: signed Q2.14 (range [-2, 2)).
  localparam int unsigned COEF_W     = 16;
  localparam int unsigned COEF_FRAC  = 14;
  // One second-order section: b0, b1, b2, a1, a2 (a0 is 1).
  localparam int unsigned SEC_COEFS  = 5;
  // CPSD value: unsigned Q8.8.
  localparam int unsigned CPSD_W     = 16;
  localparam int unsigned CPSD_FRAC  = 8;
  // Bus data width.
  localparam int unsigned WB_DW      = 32;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;

  // Operating phase of the processor.
  //   FILL   : window memory not yet full after reset
  //   CAND   : training, next window becomes the candidate reference PM
  //   CHECK  : training, next window checks the candidate (eq. 7)
  //   ONLINE : on-line processing, one CPSD value per second
  typedef enum logic [1:0] {
    PH_FILL   = 2'd0,
    PH_CAND   = 2'd1,
    PH_CHECK  = 2'd2,
    PH_ONLINE = 2'd3
  } phase_e;

  // Word offsets (byte address / 4) of the slave registers.
  localparam int unsigned REG_CTRL       = 0;  // [0] enable, [1] retrain (W1), [2] irq enable
  localparam int unsigned REG_STATUS     = 1;  // [1:0] phase, [2] reference valid, [8] irq pending (W1C)
  localparam int unsigned REG_CPSD       = 2;  // latest CPSD, Q8.8
  localparam int unsigned REG_DIFF_CUR   = 3;  // latest Diff(PM_current, PM_reference)
  localparam int unsigned REG_DIFF_REF   = 4;  // Diff(PM_reference+1, PM_reference)
  localparam int unsigned REG_H          = 5;  // difference threshold h
  localparam int unsigned REG_TH_VALID   = 6;  // Threshold_valid of eq. 7
  localparam int unsigned REG_DELAY      = 7;  // delay d in samples
  localparam int unsigned REG_REF_PERIOD = 8;  // reference refresh period in seconds
  localparam int unsigned REG_M_REF      = 9;  // M of the reference window (read only)
  localparam int unsigned REG_SECONDS    = 10; // count of processed seconds (read only)
  localparam int unsigned REG_FILT       = 11; // latest filtered sample, sign-extended (read only)
  localparam int unsigned REG_COEF_BASE  = 16; // coefficient s*5+k at REG_COEF_BASE + s*5 + k

endpackage
