// tb_rc_lpf: behavioural first-order RC post filter (150 kHz at a 2.8224 MHz clock).
// Checks the step response clock by clock against v <= vin + (v - vin) * exp(-2*pi*fc/fs),
// and the attenuation of a held-sample sine near the cut-off: at 150 kHz the steady-state
// amplitude must be about 1/sqrt(2) of the input (between 0.66 and 0.76, allowing for the
// sampled-data model), while at 1 kHz it must be within 0.1 % of the input.
module tb_rc_lpf;
  localparam real PI = 3.14159265358979;
  localparam real FS = 2.8224e6;
  logic clk = 0;
  real  vin = 0.9, vout;
  int checks = 0, failures = 0;
  real decay;

  rc_lpf dut (.clk, .vin, .vout);

  always #5 clk = ~clk;

  task automatic sine_gain(input real f, output real gain);
    real peak = 0.0;
    int n = int'(20.0 * FS / f);
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      vin = 0.9 + 0.1 * $sin(2.0 * PI * f * real'(i) / FS);
      @(posedge clk);
      #1;
      if (i > n / 2 && (vout - 0.9) > peak) peak = vout - 0.9;
    end
    gain = peak / 0.1;
  endtask

  initial begin
    real vm = 0.9, g;
    decay = $exp(-2.0 * PI * 150.0e3 / FS);
    for (int s = 0; s < 6; s++) begin
      automatic real step = (s % 2 == 0) ? 1.3 : 0.5;
      for (int i = 0; i < 30; i++) begin
        @(negedge clk);
        vin = step;
        @(posedge clk);
        #1;
        vm = step + (vm - step) * decay;
        checks++;
        if (vout - vm > 1.0e-9 || vm - vout > 1.0e-9) failures++;
      end
    end
    sine_gain(150.0e3, g);
    $display("rc_lpf: gain at 150 kHz = %f", g);
    checks++;
    if (g < 0.66 || g > 0.76) failures++;
    sine_gain(1.0e3, g);
    $display("rc_lpf: gain at 1 kHz = %f", g);
    checks++;
    if (g < 0.999 || g > 1.001) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
