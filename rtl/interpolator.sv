// interpolator: 64x interpolation filter, 44.1 kHz 24-bit samples to 2.8224 MHz.
//
// Three cascaded stages raise the sample rate and remove the images of the zero-stuffed
// signal: hbf1 (55-tap half-band, 2x), hbf2 (11-tap half-band, 2x) and sinc_interp (sinc^3,
// 16x). Splitting the 64x factor this way keeps the expensive sharp filter at the lowest
// rate. All stages run on the 2.8224 MHz master clock and are paced by valid strobes: hbf1
// produces two samples 32 clocks apart per input, hbf2 two samples 16 clocks apart per hbf1
// output, and the sinc filter one sample per clock.
//
// Interface and timing: x_valid must be high once every 64 clocks (the 44.1 kHz input
// rate). y changes every clock. The stage order and factors are the source's; the strobe
// pacing is this design's. The sat_* outputs report clipping inside each stage and the
// *_valid outputs expose the stage rates for observation.
module interpolator
  import dac_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    x_valid,
  input  sample_t x,
  output sample_t y,
  output logic    hb1_valid,
  output logic    hb1_phase,
  output logic    hb2_valid,
  output logic    hb2_phase,
  output logic    sat_evt
);
  sample_t hb1_y, hb2_y;
  logic    sat1, sat2, sat3;

  hbf1 u_hbf1 (
    .clk, .rst_n, .x_valid, .x,
    .y_valid(hb1_valid), .y(hb1_y), .y_phase(hb1_phase), .sat_evt(sat1)
  );

  hbf2 u_hbf2 (
    .clk, .rst_n, .x_valid(hb1_valid), .x(hb1_y),
    .y_valid(hb2_valid), .y(hb2_y), .y_phase(hb2_phase), .sat_evt(sat2)
  );

  sinc_interp #(.DW(SAMPLE_W), .R(OSR / 4), .N(3)) u_sinc (
    .clk, .rst_n, .x_valid(hb2_valid), .x(hb2_y), .y, .sat_evt(sat3)
  );

  assign sat_evt = sat1 | sat2 | sat3;
endmodule
