// hbf2: second interpolation stage, 11-tap half-band filter, 88.2 kHz -> 176.4 kHz.
//
// Its wide transition band lets it be short: three distinct canonic-signed-digit
// coefficients h(0)=h(10), h(2)=h(8), h(4)=h(6) and the centre tap h(5)=1/2, so four
// distinct non-zero coefficients. The values are the source's CSD set (dac_pkg::HBF2_COEF);
// as in the source's diagram, the input is multiplied by h(0), h(2), h(4) once and the
// products run through a chain of adders, while the centre-tap path is multiplexed in as
// every second output. Built on halfband_interp.
// Timing: one input every 32 clocks; outputs 0 and 16 clocks after each input.
module hbf2
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
    .DW(SAMPLE_W), .K(HBF2_K), .CF(COEF_FRAC), .COEF(HBF2_COEF), .OUT_SPACING(OSR / 4)
  ) u_hb (
    .clk, .rst_n, .x_valid, .x, .y_valid, .y, .y_phase, .sat_evt
  );
endmodule
