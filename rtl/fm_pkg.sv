// fm_pkg: widths and constants shared by the blocks of the DPLL FM receiver.
//
// The sample and NCO widths (8 bit), the loop filter width (12 bit), the
// NCO phase accumulator (18 bit) with its 10-bit cosine address and
// 256-entry quarter-wave table, the 1/16 free-running offset and the 16-tap
// FIR are the numbers of the design. The widths of the FIR's internal partial
// sums follow from the 16-tap sum of 12-bit samples (16 bit).
package fm_pkg;

  localparam int unsigned SAMPLE_W  = 8;   // ADC sample and NCO output
  localparam int unsigned PROD_W    = 16;  // full multiplier product
  localparam int unsigned LF_W      = 12;  // loop filter state / output
  localparam int unsigned ACC_W     = 18;  // NCO phase accumulator
  localparam int unsigned ADDR_W    = 10;  // cosine address (one full cycle)
  localparam int unsigned LUT_W     = 8;   // quarter-wave table address
  localparam int unsigned GAIN_LOG2 = 10;  // loop gain A = 1/1024
  localparam int unsigned FIR_TAPS  = 16;
  localparam int unsigned FIR_SUM_W = 16;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [LF_W-1:0]     lf_t;
  typedef logic signed [ACC_W-1:0]    freq_t;

  // Quadrant of one cosine cycle, taken from the top two address bits.
  typedef enum logic [1:0] {
    Q1 = 2'd0,  // 0   .. 255 : +rom[i]
    Q2 = 2'd1,  // 256 .. 511 : -rom[511-i]
    Q3 = 2'd2,  // 512 .. 767 : -rom[i-512]
    Q4 = 2'd3   // 768 .. 1023: +rom[1023-i]
  } quadrant_e;

endpackage
