// rc_lpf: behavioural model of the first-order RC low-pass post filter (150 kHz).
// This is not synthesizable logic: it models a continuous-time analog filter with real
// numbers, for simulation of the whole converter.
//
// The filter smooths the stair-step DAC output and removes out-of-band quantisation noise.
// Its pole sits well above the 20 kHz audio band, so the spread of the on-chip R and C
// values does not disturb the passband. Model: a first-order section evaluated once per
// sampling clock, vout <= vout + (1 - exp(-2*pi*FC/FS)) * (vin - vout), the exact response
// of the RC pole to an input held constant over each clock period.
// Ports: clk (the 2.8224 MHz clock), vin and vout in volts. The first order and the 150 kHz
// cut-off are the source's; the per-clock evaluation is this design's.
module rc_lpf #(
  parameter real FC   = 150.0e3,
  parameter real FS   = 2.8224e6,
  parameter real VINI = 0.9
) (
  input  logic clk,
  input  real  vin,
  output real  vout
);
  localparam real PI    = 3.14159265358979;
  localparam real ALPHA = 1.0 - $exp(-2.0 * PI * FC / FS);

  real v;

  initial v = VINI;

  always @(posedge clk) v <= v + ALPHA * (vin - v);

  assign vout = v;
endmodule
