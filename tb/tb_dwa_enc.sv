// tb_dwa_enc: checks the data weighted averaging selector against a pointer model.
// First the element sequence of a small worked example (requests 2, 4, 7, 5 on the 15-element
// array), then 4000 random requests. For each request n the expected selection is the n
// elements following the last one used, wrapping from element 15 to element 1. Also checks
// that no element is ever used more than once more often than any other (the averaging
// property), that the wrap flag fires, and the one-clock latency.
module tb_dwa_enc;
  import dac_pkg::*;
  logic   clk = 0, rst_n = 0;
  therm_t therm;
  therm_t sel;
  logic [3:0] ptr;
  logic   wrap;
  int checks = 0, failures = 0, wraps = 0;
  int mptr = 0;
  int usage [N_ELEM];

  dwa_enc dut (.clk, .rst_n, .therm, .sel, .ptr, .wrap);

  always #5 clk = ~clk;

  task automatic apply(input int n);
    therm_t e;
    int umax, umin;
    therm = therm_t'((16'd1 << n) - 16'd1);
    e = '0;
    for (int k = 0; k < n; k++) e[(mptr + k) % N_ELEM] = 1'b1;
    @(posedge clk);
    #1;
    checks++;
    if (sel !== e) begin
      failures++;
      $display("FAIL n=%0d ptr=%0d sel=%b exp=%b", n, mptr, sel, e);
    end
    checks++;
    if (wrap !== (mptr + n > N_ELEM)) failures++;
    if (wrap) wraps++;
    for (int k = 0; k < N_ELEM; k++) usage[k] += int'(e[k]);
    mptr = (mptr + n) % N_ELEM;
    umax = usage[0]; umin = usage[0];
    for (int k = 1; k < N_ELEM; k++) begin
      if (usage[k] > umax) umax = usage[k];
      if (usage[k] < umin) umin = usage[k];
    end
    checks++;
    if (umax - umin > 1) begin
      failures++;
      $display("FAIL usage spread %0d", umax - umin);
    end
  endtask

  initial begin
    foreach (usage[k]) usage[k] = 0;
    therm = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    apply(2); apply(4); apply(7); apply(5);
    // element view of the example: 2 -> {1,2}, 4 -> {3..6}, 7 -> {7..13}, 5 -> {14,15,1,2,3}
    for (int i = 0; i < 4000; i++) apply(int'($urandom_range(0, N_ELEM)));
    checks++;
    if (wraps == 0) failures++;
    $display("dwa: wraps=%0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
