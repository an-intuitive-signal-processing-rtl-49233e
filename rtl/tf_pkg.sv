// Shared number formats and filter coefficients for the temperature-
// fluctuation processing chain (band-pass FIR followed by a bin-2 RMS).
//
// Fixed-point formats are written {integer bits : fractional bits}, sign
// included in the integer bits:
//   * ADC sample        : 16 bits {5:11}, signed
//   * FIR coefficient   : 16 bits {2:14}, signed
//   * FIR product       : 32 bits {7:25}, kept unaltered (no truncation)
//   * FIR output / RMS  : 47 bits {22:25}, signed into the RMS unit
//   * RMS result        : 47 bits, unsigned, same scaling (25 fractional bits)
//
// The nine coefficients are the 14-bit-fraction values of the band-pass
// design (rectangular window, ideal band-pass response, f_L = 0.01 Hz,
// f_H = 24 Hz, Fs = 100 Hz), each the real coefficient times 2^14 rounded
// towards minus infinity. They are used in the order they are listed for
// the design; tap 0 multiplies the newest sample.
package tf_pkg;

  localparam int unsigned SAMPLE_W    = 16;
  localparam int unsigned SAMPLE_FRAC = 11;
  localparam int unsigned COEF_W      = 16;
  localparam int unsigned COEF_FRAC   = 14;
  localparam int unsigned NTAPS       = 9;
  localparam int unsigned FIR_OUT_W   = 47;  // {22:25}

  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [SAMPLE_W-1:0] sample_t;

  //                      real value       14-bit value
  localparam coef_t BPF_COEFS [NTAPS] = '{
    16'sd793,    // 0.048455588950058   0.048401
    -16'sd33,    // -0.001999671029421 -0.0020142
    16'sd4927,   // 0.300730704615709   0.30072
    -16'sd1055,  // -0.064365833819427 -0.064392
    16'sd294,    // 0.017947456292925   0.017944
    16'sd5172,   // 0.315681787493831   0.31567
    16'sd7831,   // 0.478               0.47797
    16'sd1740,   // 0.106223795893264   0.1062
    16'sd357     // 0.021789901874715   0.02179
  };

endpackage
