// tb_hbf2: second half-band interpolation stage (11 taps, 2x), with the coefficients written from their canonic-signed-digit form.
// Drives impulses, full-scale steps and random samples, one every 32 clocks, and checks
// each output sample and its timing against a direct-form model of the 11-tap half-band
// filter computed here from its coefficient list: y[2m] = 2 * sum_n h[2n] x[m-n], rounded to
// nearest at 2^-16 and saturated, and y[2m+1] = x[m-2] (centre tap 1/2, times 2).
// The even sample must appear one clock after its input and the odd one 16 clocks later.
module tb_hbf2;
  import dac_pkg::*;
  localparam int K  = 3;
  localparam int SP = 16;
  localparam int NT = 2 * K;
  localparam longint H [K] = '{65536/64 - 65536/256 - 65536/2048 + 65536/32768, -65536/16 + 65536/512 - 65536/2048 + 65536/16384 - 1, 65536/4 + 65536/16 - 65536/64 + 65536/256 - 65536/1024 + 65536/4096 + 65536/16384 + 1};
  logic    clk = 0, rst_n = 0;
  logic    x_valid = 0;
  sample_t x = '0;
  logic    y_valid, y_phase, sat_evt;
  sample_t y;
  int checks = 0, failures = 0, sats = 0;
  longint hist [NT];
  longint exp_even, exp_odd;
  int cyc = 0, t_in = 0;

  hbf2 dut (.clk, .rst_n, .x_valid, .x, .y_valid, .y, .y_phase, .sat_evt);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (sat_evt) sats++;

  function automatic longint coef(input int i);
    return (i < K) ? H[i] : H[NT - 1 - i];
  endfunction

  task automatic push(input longint v);
    longint acc;
    for (int i = NT - 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = v;
    acc = 0;
    for (int i = 0; i < NT; i++) acc += coef(i) * hist[i];
    acc = (acc + 64'sd16384) >>> 15;
    if (acc > 64'sd8388607) acc = 64'sd8388607;
    if (acc < -64'sd8388608) acc = -64'sd8388608;
    exp_even = acc;
    exp_odd  = hist[K-1];
    @(negedge clk);
    x = sample_t'(v); x_valid = 1;
    t_in = cyc;
    @(negedge clk);
    x_valid = 0;
    checks++;
    if (!(y_valid && !y_phase && longint'(y) == exp_even && cyc == t_in + 1)) begin
      failures++;
      $display("FAIL even y=%0d exp=%0d v=%0d ph=%0d", y, exp_even, y_valid, y_phase);
    end
    repeat (SP - 1) begin
      @(negedge clk);
      if (y_valid) begin
        failures++;
        $display("FAIL early output");
      end
    end
    @(negedge clk);
    checks++;
    if (!(y_valid && y_phase && longint'(y) == exp_odd)) begin
      failures++;
      $display("FAIL odd y=%0d exp=%0d", y, exp_odd);
    end
    repeat (SP - 2) @(negedge clk);
  endtask

  initial begin
    foreach (hist[i]) hist[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    push(64'sd1 <<< 20);
    repeat (NT + 2) push(0);
    repeat (NT + 2) push(64'sd8388607);
    repeat (NT + 2) push(-64'sd8388608);
    for (int i = 0; i < 8; i++) begin
      repeat (NT) push(64'sd8388607);
      repeat (NT) push(-64'sd8388608);
    end
    repeat (600) push(longint'(signed'(24'($urandom))));
    checks++;
    if (sats == 0) begin
      failures++;
      $display("FAIL saturation never exercised");
    end
    $display("hbf2: saturations=%0d", sats);
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
