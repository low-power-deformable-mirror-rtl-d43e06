// Testbench of dmac_pwm_rec: for a set of setpoints (including 0, 1, the
// maximum and random values) the output is sampled in the middle of every
// clock half for one full period of 2048 edges. The number of high samples
// must equal the setpoint, and every sample must equal (edge count < setp),
// the counter being kept by the testbench.
module tb_dmac_pwm_rec;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic [10:0] setp = '0;
  logic pwm;
  int checks = 0, failures = 0;

  dmac_pwm_rec #(.PWM_BITS(11)) dut (.clk, .rst_n, .setp, .pwm);

  always #8ns clk = ~clk;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cnt, high, wrong;
    int vals[$];
    vals = '{0, 1, 2, 1023, 1024, 1365, 2046, 2047};
    repeat (6) vals.push_back($urandom_range(0, 2047));
    #20ns rst_n = 1'b1;
    @(posedge clk); #4ns;
    cnt = 0;   // count value in this half period
    foreach (vals[k]) begin
      setp = 11'(vals[k]);
      // let the new value settle and finish the running period
      do begin #8ns; cnt = (cnt + 1) % 2048; end while (cnt != 0);
      high = 0; wrong = 0;
      for (int e = 0; e < 2048; e++) begin
        if (pwm) high++;
        if (pwm !== (cnt < vals[k])) wrong++;
        #8ns; cnt = (cnt + 1) % 2048;
      end
      checks += 2;
      if (high != vals[k]) begin failures++; $display("FAIL: setp %0d high %0d", vals[k], high); end
      if (wrong != 0)      begin failures++; $display("FAIL: setp %0d %0d samples wrong", vals[k], wrong); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
