// decim_pkg: word lengths shared by the stages of the decimation filter.
//
// The filter takes the 3-bit output of an audio sigma-delta modulator at
// 1.6 MS/s and decimates it by 32 to 50 kS/s in three stages: a non-recursive
// CIC (decimation 8, built from three decimate-by-2 stages), a half-band filter
// (decimation 2) and a 27-tap FIR filter (decimation 2).
//
// The stage widths 3 -> 7 -> 11 -> 15 of the CIC, the 15-bit half-band input,
// the 18-bit half-band output, the 17-bit filter output and the 6 product LSBs
// dropped ahead of the delay lines of the half-band and FIR filters follow the
// design description. The coefficient scale (12 fractional bits) and the place
// of the binary point in the 18-bit and 17-bit words are this design's choice:
// all values are two's complement, in units of one CIC output LSB, with 2
// fractional bits at the half-band output and 1 at the FIR output.
package decim_pkg;

  // Modulator sample word (two's complement, -4 .. +3).
  localparam int unsigned IN_W       = 3;

  // CIC output width: B_out = L*log2(R*M) + B_in with L = 4, R = 8, M = 1.
  // Each of the three decimate-by-2 sections adds 4 bits (7, 11, 15).
  localparam int unsigned CIC3_W     = IN_W + 12;

  // Half-band and FIR word lengths.
  localparam int unsigned HB_IN_W    = CIC3_W;  // 15
  localparam int unsigned HB_OUT_W   = 18;
  localparam int unsigned FIR_IN_W   = HB_OUT_W;
  localparam int unsigned FIR_OUT_W  = 17;

  // Fractional bits of the CSD coefficients, and product LSBs dropped
  // ahead of the transposed delay lines.
  localparam int unsigned COEF_FRAC  = 12;
  localparam int unsigned PROD_TRUNC = 6;

endpackage
