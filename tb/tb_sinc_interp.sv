// tb_sinc_interp: 16x sinc^3 interpolator. The reference is the direct convolution of the
// zero-stuffed input with the impulse response of (1 + z^-1 + ... + z^-15)^3 (46 taps,
// built here by convolving three length-16 boxcars), divided by 2^8 with round-to-nearest
// and saturated to 24 bits. An input taken at clock c first affects the output register
// four clocks later (one clock to the zero-stuffing register, one per integrator). Checks
// every output clock for an impulse, full-scale steps and random data. (The response has no
// negative taps, so it cannot overshoot and the output saturation is never reached.)
module tb_sinc_interp;
  localparam int R = 16, NT = 3 * (R - 1) + 1, LAT = 4, NCYC = 30000;
  logic clk = 0, rst_n = 0;
  logic x_valid = 0;
  logic signed [23:0] x = '0, y;
  logic sat_evt;
  int checks = 0, failures = 0, sats = 0, cyc = 0;
  longint g [NT];
  longint s [NCYC];
  longint b1 [R];
  longint b2 [2*R-1];

  sinc_interp #(.DW(24), .R(R), .N(3)) dut (.clk, .rst_n, .x_valid, .x, .y, .sat_evt);

  always #5 clk = ~clk;

  function automatic longint ref_y(input int n);
    longint acc = 0;
    for (int k = 0; k < NT; k++) if (n - LAT - k >= 0) acc += g[k] * s[n - LAT - k];
    acc = (acc + 128) >>> 8;
    if (acc > 8388607) acc = 8388607;
    if (acc < -8388608) acc = -8388608;
    return acc;
  endfunction

  // input schedule: one sample every R clocks
  always @(negedge clk) if (rst_n) begin
    if (cyc % R == 0) begin
      automatic int blk = cyc / 2048;
      x_valid <= 1;
      if (cyc == 64) x <= 24'sd1 <<< 16;
      else if (blk == 1 || blk == 3) x <= 24'sh7fffff;
      else if (blk == 2 || blk == 4) x <= -24'sh800000;
      else if (blk >= 5) x <= 24'($urandom);
      else x <= '0;
    end else x_valid <= 0;
  end

  always @(posedge clk) if (rst_n) begin
    s[cyc] = x_valid ? longint'(x) : 0;
    cyc++;
  end

  always @(negedge clk) if (rst_n && cyc > 0 && cyc < NCYC) begin
    automatic longint e = ref_y(cyc - 1);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL cyc=%0d y=%0d exp=%0d", cyc, y, e);
    end
    if (sat_evt) sats++;
  end

  initial begin
    foreach (b1[i]) b1[i] = 1;
    foreach (b2[i]) begin
      b2[i] = 0;
      for (int k = 0; k < R; k++) if (i - k >= 0 && i - k < R) b2[i] += b1[k];
    end
    foreach (g[i]) begin
      g[i] = 0;
      for (int k = 0; k < 2 * R - 1; k++) if (i - k >= 0 && i - k < R) g[i] += b2[k];
    end
    foreach (s[i]) s[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (cyc == NCYC - 1);
    @(negedge clk);
    $display("sinc: saturations=%0d", sats);
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
