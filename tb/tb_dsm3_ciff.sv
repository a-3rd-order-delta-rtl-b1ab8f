// tb_dsm3_ciff: third-order CIFF modulator. Every output code is compared with a model of the
// difference equations kept here in integer units of each accumulator's LSB (2^-13, 2^-9,
// 2^-6), with explicit floor divisions. Stimuli: DC levels (the mean of the code over 8192
// clocks must equal the scaled input within 0.01 step, i.e. the loop has unity signal gain),
// a full-scale sine, and full-scale square waves that overload the quantiser (the clip flag
// must fire and match the model). The code must stay within -7..+7.
module tb_dsm3_ciff;
  import dac_pkg::*;
  logic    clk = 0, rst_n = 0;
  sample_t u = '0;
  code_t   v;
  logic    clip_evt, acc_sat;
  int checks = 0, failures = 0, clips = 0;
  longint X1 = 0, X2 = 0, X3 = 0;
  longint mv = 0;
  logic   mclip = 0;

  dsm3_ciff dut (.clk, .rst_n, .u, .v, .clip_evt, .acc_sat);

  always #5 clk = ~clk;

  function automatic longint fdiv(input longint a, input longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic longint lim(input longint a, input longint m);
    return (a > m - 1) ? m - 1 : ((a < -m) ? -m : a);
  endfunction

  // one model step with input s; returns nothing, updates state and expected outputs
  task automatic model_step(input longint s);
    longint u13, y17, q, nx1, nx2, nx3;
    u13 = fdiv(s * 6, 1024);
    y17 = 9 * X1 + 9 * 16 * X2 + 7 * 128 * X3 + 8 * u13;
    q   = fdiv(y17 + 65536, 131072);
    mclip = (q > 7) || (q < -7);
    if (q > 7) q = 7;
    if (q < -7) q = -7;
    mv  = q;
    nx1 = lim(X1 + 2 * (u13 - q * 8192), 64'sd1 <<< 17);
    nx2 = lim(X2 + fdiv(2 * X1 - 3 * X3, 64), 64'sd1 <<< 12);
    nx3 = lim(X3 + fdiv(X2, 32), 64'sd1 <<< 11);
    X1 = nx1; X2 = nx2; X3 = nx3;
  endtask

  task automatic run(input longint s, input int n, output real mean);
    real acc = 0.0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      u = sample_t'(s);
      model_step(s);
      @(negedge clk);
      #0;
      // registered outputs appear after the posedge between the two negedges
      checks++;
      if (longint'(v) != mv || clip_evt != mclip) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d v=%0d exp=%0d clip=%0b/%0b", s, v, mv, clip_evt, mclip);
      end
      if (clip_evt) clips++;
      acc += real'(v);
      u = sample_t'(s);
      model_step(s);
      // second half of the pair: check on the next negedge via the loop
      @(posedge clk);
      #1;
      checks++;
      if (longint'(v) != mv || clip_evt != mclip) begin
        failures++;
        if (failures < 10) $display("FAIL2 s=%0d v=%0d exp=%0d", s, v, mv);
      end
      if (clip_evt) clips++;
      acc += real'(v);
    end
    mean = acc / real'(2 * n);
  endtask

  initial begin
    real m;
    longint dc [5] = '{0, 1398101, -4194304, 6990506, -8388608};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (dc[i]) begin
      run(dc[i], 1024, m);
      run(dc[i], 4096, m);
      checks++;
      if (m - real'(dc[i]) * 6.0 / 8388608.0 > 0.01 || real'(dc[i]) * 6.0 / 8388608.0 - m > 0.01) begin
        failures++;
        $display("FAIL dc %0d mean %f", dc[i], m);
      end else $display("dc %0d: mean code %f", dc[i], m);
    end
    for (int i = 0; i < 4096; i++) run(longint'(8388607.0 * $sin(6.2831853 * i / 512.0)), 1, m);
    for (int i = 0; i < 40; i++) begin
      run(8388607, 20, m);
      run(-8388608, 20, m);
    end
    checks++;
    if (clips == 0) begin
      failures++;
      $display("FAIL quantiser overload never seen");
    end
    $display("dsm: clip events=%0d", clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
