// hbf1: first interpolation stage, 55-tap half-band filter, 44.1 kHz -> 88.2 kHz.
//
// The sharpest filter of the chain: it keeps 0..20 kHz (+-0.03 dB) and removes the image
// that zero-stuffing creates above 24.1 kHz (about -49 dB). It is the half-band engine
// halfband_interp with the 14 distinct outer coefficients of dac_pkg::HBF1_COEF (plus the
// centre tap 1/2, so 15 distinct non-zero coefficients). The tap count, the 2x factor and
// the response are the source's; the coefficient values were designed for this RTL.
// Timing: one input every 64 clocks; outputs 0 and 32 clocks after each input.
module hbf1
  import dac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  input  sample_t x,
  output logic    y_valid,
  output sample_t y,
  output logic    y_phase,
  output logic    sat_evt
);
  halfband_interp #(
    .DW(SAMPLE_W), .K(HBF1_K), .CF(COEF_FRAC), .COEF(HBF1_COEF), .OUT_SPACING(OSR / 2)
  ) u_hb (
    .clk, .rst_n, .x_valid, .x, .y_valid, .y, .y_phase, .sat_evt
  );
endmodule
