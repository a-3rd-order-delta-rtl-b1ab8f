// ds_dac_core: synthesizable digital part of the 24-bit, 44.1 kHz, 64x oversampled
// 15-level delta-sigma audio DAC.
//
// Signal path: serial input -> s2p (24-bit words) -> input register sampled at 44.1 kHz ->
// interpolator (hbf1 2x, hbf2 2x, sinc^3 16x, to 2.8224 MHz) -> dsm3_ciff (third-order
// 15-level noise shaper) -> thermo_enc (15-bit thermometer) -> dwa_enc (data weighted
// averaging element rotation) -> dac_sel, the 15 element-select lines of the analog DAC.
//
// Clocking: everything runs on one master clock of 64 x 44.1 kHz = 2.8224 MHz. A free-running
// 6-bit counter marks the input sample instants; at each one the most recent complete
// serial word is passed to the interpolator (a word that arrives faster than that is
// overwritten, one that arrives slower is repeated), so the serial source must deliver one
// 24-bit word per 64 clocks. Latency from a sample instant to the element selects is about
// 975 clocks, almost all of it the group delay of the two half-band filters.
// The event outputs (clipping, DWA wrap) are for observation. The block chain and the rates
// follow the source; the input framing and sample timing are this design's choice.
module ds_dac_core
  import dac_pkg::*;
(
  input  logic   clk,          // 2.8224 MHz master clock
  input  logic   rst_n,
  input  logic   bit_en,       // serial bit strobe
  input  logic   sdata,        // serial data, MSB first
  input  logic   sync,         // high with the MSB of each word
  output code_t  dsm_code,     // modulator output, -7..+7
  output therm_t dac_sel,      // unit-element select, bit i = element i+1
  output logic   fs_tick,      // 44.1 kHz sample instant
  output logic   word_evt,     // a serial word was completed
  output logic   hb1_odd_evt,  // hbf1 produced a centre-tap (odd) sample
  output logic   hb2_odd_evt,  // hbf2 produced a centre-tap (odd) sample
  output logic   interp_sat,   // interpolator output clipped
  output logic   dsm_clip,     // quantiser overload (input beyond the outer level)
  output logic   dsm_acc_sat,  // a modulator accumulator reached its range limit
  output logic   dwa_wrap      // DWA run wrapped from element 15 to element 1
);
  logic [$clog2(OSR)-1:0] phase_cnt;
  logic [SAMPLE_W-1:0]    word;
  sample_t                x_hold;
  sample_t                u;
  therm_t                 therm;
  logic                   hb1_valid, hb1_phase, hb2_valid, hb2_phase;

  s2p #(.W(SAMPLE_W)) u_s2p (
    .clk, .rst_n, .bit_en, .sdata, .sync, .word_valid(word_evt), .word
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_cnt <= '0;
      x_hold    <= '0;
    end else begin
      phase_cnt <= phase_cnt + 1'b1;
      if (word_evt) x_hold <= sample_t'(word);
    end
  end

  assign fs_tick = (phase_cnt == '0);

  interpolator u_interp (
    .clk, .rst_n, .x_valid(fs_tick), .x(x_hold), .y(u),
    .hb1_valid, .hb1_phase, .hb2_valid, .hb2_phase, .sat_evt(interp_sat)
  );

  assign hb1_odd_evt = hb1_valid & hb1_phase;
  assign hb2_odd_evt = hb2_valid & hb2_phase;

  dsm3_ciff u_dsm (
    .clk, .rst_n, .u, .v(dsm_code), .clip_evt(dsm_clip), .acc_sat(dsm_acc_sat)
  );

  thermo_enc u_therm (.code(dsm_code), .therm);

  dwa_enc u_dwa (
    .clk, .rst_n, .therm, .sel(dac_sel), .ptr(), .wrap(dwa_wrap)
  );
endmodule
