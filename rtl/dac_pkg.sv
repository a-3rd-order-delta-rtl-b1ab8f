// dac_pkg: shared types and constants of the 24-bit, 64x oversampled delta-sigma audio DAC.
//
// Holds the sample and code types that pass between the blocks, the master-clock ratio
// (64 clocks per input sample), and the coefficient sets of the two half-band interpolation
// filters. Coefficients are integers scaled by 2^16 (COEF_FRAC fractional bits).
//
// HBF2_COEF is the canonic-signed-digit set of the 11-tap second half-band filter, written as
// the sums of powers of two that define it (h(0)=h(10), h(2)=h(8), h(4)=h(6); h(5)=1/2).
// HBF1_COEF is this design's own 55-tap half-band set (equiripple, passband 0..20 kHz at the
// 88.2 kHz output rate, +-0.03 dB ripple, about -49 dB stopband from 24.1 kHz); the source
// specifies only the tap count, the number of distinct coefficients (15) and the response.
// Only the 14 distinct outer odd-offset taps h(0),h(2),...,h(26) are listed; h(27)=1/2 and
// h(54-n)=h(n).
package dac_pkg;

  localparam int SAMPLE_W   = 24;  // input word and interpolator data width
  localparam int COEF_FRAC  = 16;  // fractional bits of the half-band coefficients
  localparam int OSR        = 64;  // master clocks per input sample
  localparam int N_ELEM     = 15;  // unit elements of the internal DAC
  localparam int CODE_W     = 4;   // signed modulator output code

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [CODE_W-1:0]   code_t;
  typedef logic [N_ELEM-1:0]          therm_t;

  localparam int HBF1_K = 14;
  localparam int HBF1_COEF [HBF1_K] = '{
    -184, 173, -251, 352, -480, 641, -847, 1112, -1463, 1951, -2687, 3959, -6824, 20817
  };

  localparam int HBF2_K = 3;
  // 2^-6 - 2^-8 - 2^-11 + 2^-15                                = 738 / 2^16
  // -2^-4 + 2^-9 - 2^-11 + 2^-14 - 2^-16                       = -3997 / 2^16
  // 2^-2 + 2^-4 - 2^-6 + 2^-8 - 2^-10 + 2^-12 + 2^-14 + 2^-16  = 19669 / 2^16
  localparam int HBF2_COEF [HBF2_K] = '{
    (1 << 10) - (1 << 8) - (1 << 5) + (1 << 1),
    -(1 << 12) + (1 << 7) - (1 << 5) + (1 << 2) - 1,
    (1 << 14) + (1 << 12) - (1 << 10) + (1 << 8) - (1 << 6) + (1 << 4) + (1 << 2) + 1
  };

endpackage
