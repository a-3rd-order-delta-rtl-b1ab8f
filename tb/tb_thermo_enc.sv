// tb_thermo_enc: exhaustive check of the thermometer encoder. For every 4-bit signed code q
// the expected word is the q+8 lowest bits set, computed here as (1 << (q+8)) - 1.
module tb_thermo_enc;
  import dac_pkg::*;
  code_t  code;
  therm_t therm;
  int checks = 0, failures = 0;

  thermo_enc dut (.code, .therm);

  initial begin
    for (int q = -8; q <= 7; q++) begin
      logic [15:0] exp16;
      code  = code_t'(q);
      exp16 = (16'd1 << (q + 8)) - 16'd1;
      #1;
      checks++;
      if (therm !== exp16[14:0]) begin
        failures++;
        $display("FAIL q=%0d therm=%b exp=%b", q, therm, exp16[14:0]);
      end
      checks++;
      if ($countones(therm) != q + 8) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
