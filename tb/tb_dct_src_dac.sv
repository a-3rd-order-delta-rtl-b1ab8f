// tb_dct_src_dac: behavioural charge-transfer DAC model. Applies element-select words with
// 0..15 elements set and checks the output against the exponential settling of a 170 kHz
// first-order pole sampled at 2.8224 MHz, computed here step by step:
//   target = 0.9 + (0.8/12) * (n - 7.5),  v <= target + (v - target) * exp(-2*pi*170e3/2.8224e6)
// to within 1 uV. Checks that only the number of selected elements matters (no mismatch by
// default) and that the step response settles within 1 mV after 20 clocks.
module tb_dct_src_dac;
  import dac_pkg::*;
  localparam real PI = 3.14159265358979;
  logic   clk = 0;
  therm_t sel = '0;
  real    vout;
  int checks = 0, failures = 0;
  real vm = 0.9;
  real decay;

  dct_src_dac dut (.clk, .sel, .vout);

  always #5 clk = ~clk;

  task automatic hold(input therm_t s, input int cycles);
    real target = 0.9 + (0.8 / 12.0) * (real'($countones(s)) - 7.5);
    for (int i = 0; i < cycles; i++) begin
      @(negedge clk);
      sel = s;
      @(posedge clk);
      #1;
      vm = target + (vm - target) * decay;
      checks++;
      if (vout - vm > 1.0e-6 || vm - vout > 1.0e-6) begin
        failures++;
        if (failures < 10) $display("FAIL vout=%f exp=%f", vout, vm);
      end
    end
    checks++;
    if (cycles >= 20 && (vout - target > 1.0e-3 || target - vout > 1.0e-3)) failures++;
  endtask

  initial begin
    decay = $exp(-2.0 * PI * 170.0e3 / 2.8224e6);
    // the first clock edge sees no element selected
    @(posedge clk);
    #1 vm = 0.4 + (vm - 0.4) * decay;
    hold(15'h7fff, 40);
    hold(15'h0000, 40);
    for (int i = 0; i < 300; i++) hold(therm_t'($urandom), 1 + $urandom_range(0, 3));
    hold(15'h0001, 30);
    hold(15'h4000, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
