// tb_interp_response: frequency response of the 64x interpolation filter, measured with
// tones. For each tone (1.03, 9.99 and 18.95 kHz; 6, 58 and 110 cycles per 256 input
// samples) a record of 16384 output samples (256 input periods, so the output is exactly
// periodic and a plain DFT is exact) is taken after 64 input samples of settling. The gain
// at the tone must be within -0.6..+0.05 dB (the half-band ripple is +-0.03 dB; the sinc^3
// stage adds a droop of about 0.5 dB at 19 kHz, which is not compensated), and every image (bins m*256 +- k up to
// half the 2.8224 MHz rate) must be attenuated by more than 36.67 dB relative to the tone.
module tb_interp_response;
  import dac_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NREC = 16384, NSET = 64 * 64, NT = 3;
  localparam int TONE [NT] = '{6, 58, 110};
  localparam int SEG = NSET + NREC;
  localparam real AMP = 0.5 * 8388607.0;
  logic    clk = 0, rst_n = 0;
  logic    x_valid = 0;
  sample_t x = '0, y;
  logic    hb1_valid, hb1_phase, hb2_valid, hb2_phase, sat_evt;
  int checks = 0, failures = 0, cyc = 0;
  real rec [NREC];
  real ctab [NREC];

  interpolator dut (.clk, .rst_n, .x_valid, .x, .y, .hb1_valid, .hb1_phase,
                    .hb2_valid, .hb2_phase, .sat_evt);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    automatic int t = cyc / SEG;
    x_valid <= (cyc % 64 == 0);
    if (cyc % 64 == 0 && t < NT)
      x <= sample_t'($rtoi(AMP * $sin(2.0 * PI * real'(TONE[t]) * real'(cyc / 64) / 256.0)));
  end

  always @(posedge clk) if (rst_n) cyc++;

  function automatic real bin_amp(input int k);
    real re = 0.0, im = 0.0;
    for (int n = 0; n < NREC; n++) begin
      re += rec[n] * ctab[(k * n) % NREC];
      im += rec[n] * ctab[(k * n + NREC / 4) % NREC];
    end
    return 2.0 * $sqrt(re * re + im * im) / real'(NREC);
  endfunction

  initial begin
    for (int n = 0; n < NREC; n++) ctab[n] = $cos(2.0 * PI * real'(n) / real'(NREC));
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      real g, worst;
      wait (cyc == t * SEG + NSET);
      for (int n = 0; n < NREC; n++) begin
        @(negedge clk);
        rec[n] = real'(y);
      end
      g = 20.0 * $log10(bin_amp(TONE[t]) / AMP);
      worst = -1000.0;
      for (int m = 1; m <= 32; m++) begin
        for (int s = -1; s <= 1; s += 2) begin
          automatic int k = m * 256 + s * TONE[t];
          if (k < NREC / 2) begin
            automatic real a = 20.0 * $log10(bin_amp(k) / AMP + 1.0e-12) - g;
            if (a > worst) worst = a;
          end
        end
      end
      $display("tone %0.2f kHz: gain %0.3f dB, largest image %0.1f dB", 44.1 * TONE[t] / 256.0,
               g, worst);
      checks++;
      if (g < -0.6 || g > 0.05) failures++;
      checks++;
      if (worst > -36.67) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NT * SEG + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
