// tb_sndr_levels: in-band signal-to-noise-and-distortion of the digital output for a ~1 kHz
// tone swept over input level (0, -1, -6, -20, -40, -60 and -85 dBFS), the measurement used
// to characterise the converter: SNDR against level, SNDR at -6 dBFS, and SNDR at -60 dBFS
// for the dynamic range.
// The whole converter is driven through its serial input. The tone is 6 cycles per 256 input
// samples (1033.6 Hz at 44.1 kHz), so 16384 modulator codes (256 input periods) hold an
// integer number of cycles. A Hann window keeps the large out-of-band quantisation noise from
// leaking into the audio band. Bins 4..8 hold the signal; bins 3..116 (up to 20 kHz) minus
// those are noise plus distortion. Every level gets 64 input samples to settle before its
// 16384-code record. The measured SNDR must exceed a floor per level set about 10 dB below
// what the fixed-point loop gives in this test: about 68, 114, 109, 96, 75, 53 and 19 dB,
// i.e. about 113 dB dynamic range for the digital path alone. At 0 dBFS the interpolator's
// slightly-above-unity passband gain (+0.02 dB at 1 kHz) makes its output clip, which is
// what limits that point.
module tb_sndr_levels;
  import dac_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NREC = 16384, NSET = 64 * 64, NLVL = 7, SIG_BIN = 6, NBAND = 116;
  localparam real LVL_DB [NLVL] = '{0.0, -1.0, -6.0, -20.0, -40.0, -60.0, -85.0};
  localparam real MIN_DB [NLVL] = '{57.0, 104.0, 99.0, 85.0, 65.0, 43.0, 9.0};
  localparam int SEG = NSET + NREC;
  localparam int SIG_LO = SIG_BIN - 2, SIG_HI = SIG_BIN + 2;

  logic   clk = 0, rst_n = 0;
  logic   bit_en = 0, sdata = 0, sync = 0;
  code_t  dsm_code;
  therm_t dac_sel;
  real    vdac, vout;
  logic   fs_tick, word_evt, hb1_odd_evt, hb2_odd_evt, interp_sat, dsm_clip, dsm_acc_sat;
  logic   dwa_wrap;
  int checks = 0, failures = 0, cyc = 0, rec_i = 0;
  real    rec [NREC];
  real    ctab [NREC];
  logic [23:0] cur_word;

  ds_dac_top dut (.*);

  always #5 clk = ~clk;

  // serial source: one word every 64 clocks; level changes every SEG clocks
  always @(negedge clk) if (rst_n) begin
    automatic int w = cyc / 64, b = cyc % 64, lvl = cyc / SEG;
    if (b == 0) begin
      automatic real a = (lvl < NLVL) ? 8388607.0 * (10.0 ** (LVL_DB[lvl] / 20.0)) : 0.0;
      cur_word = 24'($rtoi(a * $sin(2.0 * PI * real'(SIG_BIN) * real'(w) / 256.0)));
    end
    bit_en <= (b < 24);
    sdata  <= (b < 24) ? cur_word[23 - b] : 1'b0;
    sync   <= (b == 0);
  end

  always @(posedge clk) if (rst_n) cyc++;

  function automatic real bin_power(input int k);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < NREC; n++) begin
      re += rec[n] * ctab[(k * n) % NREC];
      im += rec[n] * ctab[(k * n + NREC / 4) % NREC];
    end
    return re * re + im * im;
  endfunction

  initial begin
    for (int n = 0; n < NREC; n++) ctab[n] = $cos(2.0 * PI * real'(n) / real'(NREC));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int l = 0; l < NLVL; l++) begin
      real ps, pn, sndr;
      wait (cyc == l * SEG + NSET);
      for (int n = 0; n < NREC; n++) begin
        @(negedge clk);
        rec[n] = real'(dsm_code) * 0.5 * (1.0 - ctab[n]);
      end
      ps = 0.0;
      pn = 0.0;
      for (int k = 3; k <= NBAND; k++) begin
        if (k >= SIG_LO && k <= SIG_HI) ps += bin_power(k);
        else pn += bin_power(k);
      end
      sndr = 10.0 * $log10(ps / pn);
      $display("level %0.0f dBFS: in-band SNDR %0.1f dB (floor %0.0f dB)", LVL_DB[l], sndr,
               MIN_DB[l]);
      if (LVL_DB[l] == -60.0) $display("dynamic range (SNDR at -60 dBFS + 60 dB): %0.1f dB", sndr + 60.0);
      checks++;
      if (sndr < MIN_DB[l]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NLVL * SEG + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
