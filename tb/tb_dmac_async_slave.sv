// Testbench of dmac_async_slave with its defaults (61 cells, recursive
// counter, 62.5 MHz clock). Through the command channel it sets a distinct
// setpoint and the enable of every cell, then the global enable; reads back
// setpoints and the cell-count register; and samples all 305 outputs over one
// period. Checked against values computed here: A0, C0 and B high times of
// each cell, A1/C1 as their complements, the PWM period of 16.384 us (2048
// counts on both edges of a 62.5 MHz clock), a write taking effect 5 clocks
// after acceptance, and all outputs low after the global enable is cleared.
module tb_dmac_async_slave;
  import dmac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic cmd_valid = 1'b0, cmd_ready, rsp_valid, rsp_ready = 1'b0;
  slave_cmd_t cmd = '0;
  logic [15:0] rsp_data;
  logic [60:0] a0, a1, c0, c1, b;
  int checks = 0, failures = 0;

  dmac_async_slave dut (.clk, .rst_n, .cmd_valid, .cmd_ready, .cmd,
    .rsp_valid, .rsp_ready, .rsp_data, .a0, .a1, .c0, .c1, .b);

  always #8ns clk = ~clk;

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write(logic [7:0] a, logic [15:0] d);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{1'b1, a, d};
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic read(logic [7:0] a, output logic [15:0] d);
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{1'b0, a, 16'h0};
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    rsp_ready = 1'b1;
    while (!rsp_valid) @(negedge clk);
    d = rsp_data;
    @(negedge clk);
    rsp_ready = 1'b0;
  endtask

  logic [15:0] setp [61];

  initial begin
    logic [15:0] d;
    int lat;
    realtime r0, r1;
    #20ns rst_n = 1'b1;
    for (int i = 0; i < 61; i++) begin
      setp[i] = 16'($urandom);
      write(8'(i), setp[i]);
      write(8'h40 + 8'(i), 16'h0001);
    end
    write(8'h80, 16'h0001);
    read(8'h81, d);  check(d == 16'd61, "cell count");
    for (int k = 0; k < 5; k++) begin
      int i;
      i = $urandom_range(0, 60);
      read(8'(i), d);
      check(d == setp[i], $sformatf("read of cell %0d: %h", i, d));
    end
    // write latency
    @(negedge clk);
    cmd_valid = 1'b1; cmd = '{1'b1, 8'd60, 16'h5555};
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
    lat = 1;
    while (dut.u_tree.g_leaf[60].g_cell.u_cell.setp != 16'h5555 && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 5, $sformatf("write took %0d clocks", lat));
    setp[60] = 16'h5555;
    // one period of all outputs
    begin
      int ha[61], hc[61], hb[61], bad;
      bad = 0;
      foreach (ha[i]) begin ha[i] = 0; hc[i] = 0; hb[i] = 0; end
      @(posedge clk); #4ns;
      for (int s = 0; s < 2048; s++) begin
        for (int i = 0; i < 61; i++) begin
          ha[i] += a0[i]; hc[i] += c0[i]; hb[i] += b[i];
          if (a1[i] == a0[i] || c1[i] == c0[i]) bad++;
        end
        #8ns;
      end
      check(bad == 0, "A1/C1 not the complement of A0/C0");
      for (int i = 0; i < 61; i++) begin
        int v, da, dc;
        v  = setp[i] >> 4;
        da = (v == 4095) ? 2047 : (v + 1) / 2;
        dc = 2047 - v / 2;
        check(ha[i] == da && hc[i] == dc && hb[i] == (setp[i] & 15) * 128,
              $sformatf("cell %0d setpoint %h: A0 %0d C0 %0d B %0d", i, setp[i], ha[i], hc[i], hb[i]));
      end
    end
    // PWM period from two rising edges of A0 of cell 60, seen in samples taken
    // in the middle of each clock half (the unregistered recursive-counter
    // outputs may glitch right at the clock edges)
    begin
      logic prev;
      int   rises;
      @(posedge clk); #4ns;
      prev = a0[60]; rises = 0;
      while (rises < 2) begin
        #8ns;
        if (a0[60] && !prev) begin
          if (rises == 0) r0 = $realtime; else r1 = $realtime;
          rises++;
        end
        prev = a0[60];
      end
    end
    check(r1 - r0 == 16384ns, $sformatf("PWM period %0t", r1 - r0));
    write(8'h80, 16'h0000);
    #100ns;
    check((a0 | a1 | c0 | c1 | b) == '0, "outputs active with the global enable off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
