// dct_src_dac: behavioural model of the 15-element direct-charge-transfer switched-RC DAC.
// This is not synthesizable logic: it models an analog switched-capacitor circuit with real
// numbers, for simulation of the whole converter.
//
// The circuit: each of the 15 unit capacitors C1..C15 samples its element input (high or
// low reference, through a series resistor R) during phase 1. During phase 2 their top
// plates join the op-amp's inverting input and their bottom plates the op-amp output, so the
// sampled charge is shared directly with the hold capacitor CF without the op-amp having to
// supply it. The output level is therefore set by the number of selected elements, and the
// hold capacitor adds a first-order low-pass (about 170 kHz) on top of the conversion.
//
// Model: once per clock (one phase-1/phase-2 cycle) the target level is
//   VCM + VSTEP * (sum_i w_i*sel_i - N_ELEM/2),   w_i = 1 + MISMATCH * e_i
// where e_i is a fixed pattern in -1..+1 (unit-element mismatch, 0 by default), and the
// output moves toward it by the fraction 1 - exp(-2*pi*FP/FS) (the hold-capacitor pole).
// VSTEP = 0.8 V / 12 makes the +-6-step full-scale modulator swing a 0.8 Vpp output.
// Ports: clk (the 2.8224 MHz sampling clock), sel (bit i = element i+1), vout (volts).
// The DCT-SRC principle, the 15 elements, the 170 kHz pole and the 0.8 Vpp range are the
// source's; the reference levels and the one-update-per-clock model are this design's.
module dct_src_dac
  import dac_pkg::*;
#(
  parameter real VCM      = 0.9,
  parameter real VSTEP    = 0.8 / 12.0,
  parameter real FS       = 2.8224e6,
  parameter real FP       = 170.0e3,
  parameter real MISMATCH = 0.0
) (
  input  logic   clk,
  input  therm_t sel,
  output real    vout
);
  localparam real PI    = 3.14159265358979;
  localparam real ALPHA = 1.0 - $exp(-2.0 * PI * FP / FS);

  real level;
  real v;

  initial v = VCM;

  function automatic real elem_err(input int i);
    return real'(((i * 7) % N_ELEM) - (N_ELEM / 2)) / real'(N_ELEM / 2);
  endfunction

  always_comb begin
    level = 0.0;
    for (int i = 0; i < N_ELEM; i++)
      if (sel[i]) level = level + 1.0 + MISMATCH * elem_err(i);
  end

  always @(posedge clk) v <= v + ALPHA * (VCM + VSTEP * (level - real'(N_ELEM) / 2.0) - v);

  assign vout = v;
endmodule
