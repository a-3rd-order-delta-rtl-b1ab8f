// ds_dac_top: 24-bit, 44.1 kHz audio delta-sigma DAC, 64x oversampled, 15-level.
//
// Signal path: serial input -> s2p (24-bit words) -> input register sampled at 44.1 kHz ->
// interpolator (hbf1 2x, hbf2 2x, sinc^3 16x, to 2.8224 MHz) -> dsm3_ciff (third-order
// 15-level noise shaper) -> thermo_enc (15-bit thermometer) -> dwa_enc (data weighted
// averaging element rotation) -> dct_src_dac (15 unit capacitors, behavioural) -> rc_lpf
// (150 kHz first-order post filter, behavioural) -> vout.
//
// Clocking: everything runs on one master clock of 64 x 44.1 kHz = 2.8224 MHz. A free-running
// 6-bit counter marks the input sample instants; at each one the most recent complete
// serial word is passed to the interpolator (a word that arrives faster than that is
// overwritten, one that arrives slower is repeated), so the serial source must deliver one
// 24-bit word per 64 clocks.
//
// Outputs: the modulator code and the element-select word that would drive the analog
// section are brought out next to the modelled analog outputs (vdac after the charge-transfer
// DAC, vout after the RC filter). The event outputs (clipping, DWA wrap) are for observation.
// The block chain and rates follow the source; the input framing and sample timing are this
// design's choice.
module ds_dac_top
  import dac_pkg::*;
(
  input  logic   clk,          // 2.8224 MHz master clock
  input  logic   rst_n,
  input  logic   bit_en,       // serial bit strobe
  input  logic   sdata,        // serial data, MSB first
  input  logic   sync,         // high with the MSB of each word
  output code_t  dsm_code,     // modulator output, -7..+7
  output therm_t dac_sel,      // unit-element select, bit i = element i+1
  output real    vdac,         // modelled DAC output (V)
  output real    vout,         // modelled filtered output (V)
  output logic   fs_tick,      // 44.1 kHz sample instant
  output logic   word_evt,     // a serial word was completed
  output logic   hb1_odd_evt,  // hbf1 produced a centre-tap (odd) sample
  output logic   hb2_odd_evt,  // hbf2 produced a centre-tap (odd) sample
  output logic   interp_sat,   // interpolator output clipped
  output logic   dsm_clip,     // quantiser overload (input beyond the outer level)
  output logic   dsm_acc_sat,  // a modulator accumulator reached its range limit
  output logic   dwa_wrap      // DWA run wrapped from element 15 to element 1
);
  ds_dac_core u_core (
    .clk, .rst_n, .bit_en, .sdata, .sync, .dsm_code, .dac_sel, .fs_tick, .word_evt,
    .hb1_odd_evt, .hb2_odd_evt, .interp_sat, .dsm_clip, .dsm_acc_sat, .dwa_wrap
  );

  dct_src_dac u_dac (.clk, .sel(dac_sel), .vout(vdac));

  rc_lpf u_lpf (.clk, .vin(vdac), .vout);
endmodule
