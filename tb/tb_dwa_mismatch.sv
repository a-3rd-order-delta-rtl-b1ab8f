// tb_dwa_mismatch: shows what data weighted averaging buys when the 15 unit capacitors do not
// match. The digital chain (ds_dac_core) is driven with a -6 dBFS tone of about 1 kHz (6
// cycles per 256 input samples). Its modulator code feeds three copies of the charge-transfer
// DAC model:
//   ideal  - matched elements, selected through the DWA rotation (reference);
//   dwa    - elements with a fixed +-1 % spread, selected through the DWA rotation;
//   fixed  - the same mismatched elements, driven directly by the thermometer code, so the
//            same elements always stand for the same level.
// For each, 16384 output samples (256 input periods) are Hann-windowed and the in-band
// (up to 20 kHz) signal-to-noise-and-distortion is computed. Without rotation the mismatch
// is a static non-linearity and its harmonics land in the band; with rotation the error is
// first-order shaped out of the band. Checks: dwa beats fixed by at least 30 dB, and dwa
// stays within 10 dB of the matched reference (about 109, 105 and 65 dB are seen).
module tb_dwa_mismatch;
  import dac_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NREC = 16384, NSET = 64 * 64, SIG_BIN = 6, NBAND = 116;
  localparam int SIG_LO = SIG_BIN - 2, SIG_HI = SIG_BIN + 2;
  localparam real MISM = 0.01;

  logic   clk = 0, rst_n = 0;
  logic   bit_en = 0, sdata = 0, sync = 0;
  code_t  dsm_code;
  therm_t dac_sel, therm;
  logic   fs_tick, word_evt, hb1_odd_evt, hb2_odd_evt, interp_sat, dsm_clip, dsm_acc_sat;
  logic   dwa_wrap;
  real    v_ideal, v_dwa, v_fixed;
  int checks = 0, failures = 0, cyc = 0;
  real    rec [3][NREC];
  real    ctab [NREC];
  logic [23:0] cur_word;

  ds_dac_core dut (.*);
  thermo_enc u_th (.code(dsm_code), .therm);
  dct_src_dac #(.MISMATCH(0.0))  u_ideal (.clk, .sel(dac_sel), .vout(v_ideal));
  dct_src_dac #(.MISMATCH(MISM)) u_dwa   (.clk, .sel(dac_sel), .vout(v_dwa));
  dct_src_dac #(.MISMATCH(MISM)) u_fixed (.clk, .sel(therm),   .vout(v_fixed));

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    automatic int w = cyc / 64, b = cyc % 64;
    if (b == 0)
      cur_word = 24'($rtoi(0.5 * 8388607.0 * $sin(2.0 * PI * real'(SIG_BIN) * real'(w) / 256.0)));
    bit_en <= (b < 24);
    sdata  <= (b < 24) ? cur_word[23 - b] : 1'b0;
    sync   <= (b == 0);
  end

  always @(posedge clk) if (rst_n) cyc++;

  function automatic real bin_power(input int c, input int k);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < NREC; n++) begin
      re += rec[c][n] * ctab[(k * n) % NREC];
      im += rec[c][n] * ctab[(k * n + NREC / 4) % NREC];
    end
    return re * re + im * im;
  endfunction

  function automatic real sndr(input int c);
    real ps = 0.0, pn = 0.0, m = 0.0;
    for (int n = 0; n < NREC; n++) m += rec[c][n];
    m = m / real'(NREC);
    for (int n = 0; n < NREC; n++) rec[c][n] = (rec[c][n] - m) * 0.5 * (1.0 - ctab[n]);
    for (int k = 3; k <= NBAND; k++) begin
      if (k >= SIG_LO && k <= SIG_HI) ps += bin_power(c, k);
      else pn += bin_power(c, k);
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real s_ideal, s_dwa, s_fixed;
    for (int n = 0; n < NREC; n++) ctab[n] = $cos(2.0 * PI * real'(n) / real'(NREC));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cyc == NSET);
    for (int n = 0; n < NREC; n++) begin
      @(negedge clk);
      rec[0][n] = v_ideal;
      rec[1][n] = v_dwa;
      rec[2][n] = v_fixed;
    end
    s_ideal = sndr(0);
    s_dwa   = sndr(1);
    s_fixed = sndr(2);
    $display("in-band SNDR at -6 dBFS: matched %0.1f dB, 1%% mismatch with DWA %0.1f dB, without %0.1f dB",
             s_ideal, s_dwa, s_fixed);
    checks++;
    if (s_dwa < s_fixed + 30.0) failures++;
    checks++;
    if (s_dwa < s_ideal - 10.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSET + NREC + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
