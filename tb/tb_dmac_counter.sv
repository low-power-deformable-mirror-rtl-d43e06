// Testbench of dmac_counter: after reset the count must start at 0, rise by
// one on every rising clock edge and wrap from 2047 to 0, giving a period of
// exactly 2048 clocks. The expected value is kept by the testbench itself.
module tb_dmac_counter;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [10:0] n;
  int checks = 0, failures = 0;

  dmac_counter #(.NUM_BITS(11)) dut (.clk, .rst_n, .n);

  always #4ns clk = ~clk;

  initial begin : watchdog
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected, wraps, last_wrap, period;
    wraps = 0; last_wrap = 0; period = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n !== 11'd0) begin failures++; $display("FAIL: count %0d in reset", n); end
    rst_n = 1'b1;
    expected = 0;
    for (int cyc = 1; cyc <= 5000; cyc++) begin
      @(negedge clk);
      expected = (expected + 1) % 2048;
      checks++;
      if (n !== 11'(expected)) begin
        failures++;
        if (failures < 10) $display("FAIL: cycle %0d count %0d expected %0d", cyc, n, expected);
      end
      if (n == 0) begin
        if (wraps > 0) period = cyc - last_wrap;
        wraps++; last_wrap = cyc;
      end
    end
    checks++;
    if (period != 2048) begin failures++; $display("FAIL: period %0d clocks", period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
