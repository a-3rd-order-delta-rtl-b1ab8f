// tb_s2p: serial-to-parallel converter. Sends 300 random 24-bit words MSB first, with random
// idle clocks between bits, and checks every assembled word and its valid pulse. Before one
// word a stray partial word is sent; the sync on the next MSB must discard it.
module tb_s2p;
  logic clk = 0, rst_n = 0;
  logic bit_en = 0, sdata = 0, sync = 0;
  logic word_valid;
  logic [23:0] word;
  int checks = 0, failures = 0, got = 0;
  logic [23:0] expq [$];

  s2p #(.W(24)) dut (.clk, .rst_n, .bit_en, .sdata, .sync, .word_valid, .word);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n && word_valid) begin
    logic [23:0] e;
    checks++;
    got++;
    if (expq.size() == 0) begin
      failures++;
      $display("FAIL unexpected word %h", word);
    end else begin
      e = expq.pop_front();
      if (word !== e) begin
        failures++;
        $display("FAIL word %h exp %h", word, e);
      end
    end
  end

  task automatic send_bit(input logic b, input logic s);
    @(negedge clk);
    bit_en = 1; sdata = b; sync = s;
    @(negedge clk);
    bit_en = 0; sync = 0;
    repeat ($urandom_range(0, 2)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 300; w++) begin
      automatic logic [23:0] d = 24'($urandom);
      if (w == 150) for (int i = 0; i < 7; i++) send_bit(1'($urandom), i == 0);
      expq.push_back(d);
      for (int i = 23; i >= 0; i--) send_bit(d[i], i == 23);
    end
    repeat (5) @(posedge clk);
    checks++;
    if (got != 300) begin
      failures++;
      $display("FAIL got %0d words", got);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
