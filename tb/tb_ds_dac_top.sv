// tb_ds_dac_top: end-to-end test of the whole converter at its default sizes.
// A 24-bit source sends one word per 64 master clocks over the serial port (24 bits MSB
// first, sync on the MSB). Three segments:
//   A  half-scale sine at 1/64 of the sample rate (689 Hz), 320 samples: the modelled analog
//      output must follow 0.9 V + 0.8/12 V * (0.5 + 3 sin(...)) after the chain's delay
//      (searched) within 15 mV;
//   B  full-scale square wave: the interpolator's overshoot must clip at its output and the
//      modulator must reach codes +6 and -6 (the input scaling puts full scale at +-6 steps, so
//      after the interpolator's clipping the quantiser's own +-7 clamp is only reported here;
//      the modulator test drives it directly);
//   C  quiet input (zero), which must bring the output back to mid-scale.
// Throughout: every serial word must arrive intact, the code must stay within -7..+7, the
// element-select word must have code+8 ones one clock after the code, and no element may be
// used more than once more often than another (data weighted averaging). Each mechanism
// (word assembly, odd-phase samples of both half-band stages, interpolator clipping,
// full-scale codes, DWA wrap-around) is counted and must occur at least once.
module tb_ds_dac_top;
  import dac_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int NA = 320, NB = 128, NC = 64;
  localparam int NW = NA + NB + NC;
  logic   clk = 0, rst_n = 0;
  logic   bit_en = 0, sdata = 0, sync = 0;
  code_t  dsm_code;
  therm_t dac_sel;
  real    vdac, vout;
  logic   fs_tick, word_evt, hb1_odd_evt, hb2_odd_evt, interp_sat, dsm_clip, dsm_acc_sat;
  logic   dwa_wrap;

  int checks = 0, failures = 0, cyc = 0;
  int n_pos6 = 0, n_neg6 = 0, n_word = 0, n_hb1odd = 0, n_hb2odd = 0, n_isat = 0, n_clip = 0, n_wrap = 0, n_accsat = 0;
  logic [23:0] words [NW];
  real    va [NA * 64];
  int     usage [N_ELEM];
  code_t  code_d;
  logic   started = 0;

  ds_dac_top dut (.*);

  always #5 clk = ~clk;

  function automatic logic [23:0] sample(input int n);
    if (n < NA) return 24'($rtoi(0.5 * 8388607.0 * $sin(2.0 * PI * real'(n) / 64.0)));
    if (n < NA + NB) return ((n / 8) % 2 == 0) ? 24'h7fffff : 24'h800000;
    return 24'h000000;
  endfunction

  // serial source: word w on clocks 64w .. 64w+23
  always @(negedge clk) if (rst_n) begin
    automatic int w = cyc / 64, b = cyc % 64;
    if (w < NW && b < 24) begin
      bit_en <= 1'b1;
      sdata  <= words[w][23 - b];
      sync   <= (b == 0);
    end else begin
      bit_en <= 1'b0;
      sync   <= 1'b0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (word_evt) begin
      checks++;
      if (n_word >= NW || dut.u_core.word !== words[n_word]) begin
        failures++;
        $display("FAIL word %0d", n_word);
      end
      n_word++;
    end
    if (hb1_odd_evt) n_hb1odd++;
    if (hb2_odd_evt) n_hb2odd++;
    if (interp_sat) n_isat++;
    if (dsm_clip) n_clip++;
    if (dwa_wrap) n_wrap++;
    if (dsm_acc_sat) n_accsat++;
    if (dsm_code == 4'sd6) n_pos6++;
    if (dsm_code == -4'sd6) n_neg6++;
  end

  // per-clock structural checks on the digital outputs
  always @(negedge clk) if (rst_n && cyc > 2) begin
    int umax, umin;
    checks++;
    if (signed'(dsm_code) > 7 || signed'(dsm_code) < -7) failures++;
    if (started) begin
      checks++;
      if ($countones(dac_sel) != int'(signed'(code_d)) + 8) begin
        failures++;
        if (failures < 10) $display("FAIL sel %b code %0d", dac_sel, code_d);
      end
    end
    for (int k = 0; k < N_ELEM; k++) usage[k] += int'(dac_sel[k]);
    umax = usage[0]; umin = usage[0];
    for (int k = 1; k < N_ELEM; k++) begin
      if (usage[k] > umax) umax = usage[k];
      if (usage[k] < umin) umin = usage[k];
    end
    checks++;
    if (umax - umin > 1) failures++;
    code_d  <= dsm_code;
    started <= 1'b1;
    if (cyc - 1 < NA * 64) va[cyc - 1] = vout;
  end

  initial begin
    real best_err, best_d, mid;
    foreach (usage[k]) usage[k] = 0;
    for (int w = 0; w < NW; w++) words[w] = sample(w);
    code_d = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cyc == NW * 64 + 400);
    @(negedge clk);
    // segment A: fit the delay of the analog output against the ideal sine
    best_err = 1.0e9; best_d = 0.0;
    for (int d = 900; d <= 1300; d++) begin
      automatic real err = 0.0;
      for (int n = 8000; n < NA * 64; n += 3) begin
        automatic real e = va[n] - (0.9 + (0.8 / 12.0) * (0.5 + 3.0 *
                           $sin(2.0 * PI * real'(n - d) / 4096.0)));
        if (e < 0.0) e = -e;
        if (e > err) err = e;
      end
      if (err < best_err) begin
        best_err = err; best_d = real'(d);
      end
    end
    $display("top: analog output delay %0.0f clocks, max deviation %0.2f mV", best_d,
             1000.0 * best_err);
    checks++;
    if (best_err > 0.015) failures++;
    mid = 0.9 + (0.8 / 12.0) * 0.5;
    checks++;
    if (vout - mid > 0.02 || mid - vout > 0.02) begin
      failures++;
      $display("FAIL quiet output %f", vout);
    end
    $display("top: words=%0d hbf1_odd=%0d hbf2_odd=%0d interp_clip=%0d code+6=%0d code-6=%0d dsm_overload=%0d dwa_wrap=%0d acc_limit=%0d",
             n_word, n_hb1odd, n_hb2odd, n_isat, n_pos6, n_neg6, n_clip, n_wrap, n_accsat);
    checks++;
    if (n_word != NW) failures++;
    checks++;
    if (n_hb1odd == 0 || n_hb2odd == 0) failures++;
    checks++;
    if (n_isat == 0) failures++;
    checks++;
    if (n_pos6 == 0 || n_neg6 == 0) failures++;
    checks++;
    if (n_wrap == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NW * 64 + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
