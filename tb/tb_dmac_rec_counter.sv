// Testbench of dmac_rec_counter: the count must rise by one on every clock
// edge, rising and falling, be 0 right after the first rising edge that
// follows reset and wrap after 2048 edges, so a 62.5 MHz clock gives a
// 16.384 us period. Samples are taken in the middle of each clock half.
module tb_dmac_rec_counter;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [10:0] n;
  int checks = 0, failures = 0;

  dmac_rec_counter #(.NUM_BITS(11)) dut (.clk, .rst_n, .n);

  always #8ns clk = ~clk;   // 62.5 MHz

  initial begin : watchdog
    #300us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    realtime t0, t1;
    #20ns rst_n = 1'b1;
    @(posedge clk); #4ns;
    checks++;
    if (n !== 11'd0) begin failures++; $display("FAIL: count %0d after first edge", n); end
    t0 = $realtime;
    expected = 0;
    for (int e = 1; e <= 6000; e++) begin
      #8ns;  // next half period
      expected = (expected + 1) % 2048;
      checks++;
      if (n !== 11'(expected)) begin
        failures++;
        if (failures < 10) $display("FAIL: edge %0d count %0d expected %0d", e, n, expected);
      end
      if (e == 2048) begin
        t1 = $realtime;
        checks++;
        if (n !== 11'd0 || t1 - t0 != 16384ns) begin
          failures++; $display("FAIL: period %0t", t1 - t0);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
