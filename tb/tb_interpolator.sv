// tb_interpolator: the full 64x interpolation chain. A sine at 1/32 of the input rate (about
// 1.38 kHz at 44.1 kHz), half full scale, is fed once every 64 clocks. The 2.8224 MHz output
// must be the same sine, delayed by the chain's group delay: the delay is searched in
// half-clock steps, must lie near the sum of the stage delays (27 x 32 + 5 x 16 + 22.5
// clocks plus a few register stages, about 972), and the worst error after it must stay
// below 0.4 % of full scale: the +-0.03 dB passband ripple (0.35 % of the amplitude) plus the
// images left by the about -49 dB stopband of hbf1 (0.35 % of the amplitude) bound it. Also checks the stage rates:
// hbf1 emits exactly two and hbf2 exactly four samples per input, evenly spaced.
module tb_interpolator;
  import dac_pkg::*;
  localparam int NIN = 240, NCYC = NIN * 64;
  localparam real PI = 3.14159265358979;
  localparam real AMP = 0.5 * 8388607.0;
  logic    clk = 0, rst_n = 0;
  logic    x_valid = 0;
  sample_t x = '0, y;
  logic    hb1_valid, hb1_phase, hb2_valid, hb2_phase, sat_evt;
  int checks = 0, failures = 0, cyc = 0;
  int n_hb1 = 0, n_hb2 = 0, last1 = -1, last2 = -1, bad_spacing = 0;
  real yr [NCYC];

  interpolator dut (.clk, .rst_n, .x_valid, .x, .y, .hb1_valid, .hb1_phase,
                    .hb2_valid, .hb2_phase, .sat_evt);

  always #5 clk = ~clk;

  always @(negedge clk) if (rst_n) begin
    x_valid <= (cyc % 64 == 0) && (cyc < NCYC);
    x <= sample_t'($rtoi(AMP * $sin(2.0 * PI * real'(cyc / 64) / 32.0)));
  end

  always @(posedge clk) if (rst_n) begin
    if (cyc < NCYC) yr[cyc] = real'(y);
    if (hb1_valid) begin
      n_hb1++;
      if (last1 >= 0 && cyc - last1 != 32) bad_spacing++;
      last1 = cyc;
    end
    if (hb2_valid) begin
      n_hb2++;
      if (last2 >= 0 && cyc - last2 != 16) bad_spacing++;
      last2 = cyc;
    end
    cyc++;
  end

  initial begin
    real best_err, best_d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cyc == NCYC + 200);
    best_err = 1.0e30; best_d = 0.0;
    for (int d2 = 1800; d2 <= 2200; d2++) begin
      automatic real d = real'(d2) / 2.0;
      automatic real err = 0.0;
      for (int n = 3000; n < NCYC; n++) begin
        automatic real e = yr[n] - AMP * $sin(2.0 * PI * (real'(n) - d) / (64.0 * 32.0));
        if (e < 0) e = -e;
        if (e > err) err = e;
      end
      if (err < best_err) begin
        best_err = err; best_d = d;
      end
    end
    $display("interpolator: delay %0.1f clocks, max error %0.1f LSB (%0.4f %% FS)",
             best_d, best_err, 100.0 * best_err / 8388608.0);
    checks++;
    if (best_err > 0.004 * 8388608.0) failures++;
    checks++;
    if (best_d < 965.0 || best_d > 985.0) failures++;
    checks++;
    if (n_hb1 != 2 * NIN || n_hb2 != 4 * NIN) begin
      failures++;
      $display("FAIL rates hb1=%0d hb2=%0d", n_hb1, n_hb2);
    end
    checks++;
    if (bad_spacing != 0) begin
      failures++;
      $display("FAIL spacing %0d", bad_spacing);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
