// Testbench of dmac_pwm_tree with 61 cells (recursive-counter kind, 62.5 MHz,
// count advanced by the testbench on both clock edges). Every cell gets its
// own setpoint and is enabled through the root port; commands to the empty
// leaves 61..63 must be absorbed. A write must reach its cell register 4
// clocks after the root accepts it (3 hubs, then the cell), and a read must
// be answered 7 clocks after acceptance. All 61 cells' A0 and B high times over one period
// are compared with the duty values derived from their setpoints, and reads
// through the tree must return the setpoints.
module tb_dmac_pwm_tree;
  import dmac_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, global_en = 1'b0;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic dn_valid = 1'b0, dn_ready, up_valid;
  tree_cmd_t dn = '0;
  logic [15:0] up_data;
  logic [10:0] count = '0;
  logic [60:0] a0, a1, c0, c1, b;
  int checks = 0, failures = 0;

  dmac_pwm_tree #(.NUM_CELLS(61), .PWM_KIND(PWM_REC_COUNTER)) dut (.clk, .rst_n,
    .dn_valid, .dn_ready, .dn, .up_valid, .up_data, .count, .global_en,
    .a0, .a1, .c0, .c1, .b);

  always #8ns clk = ~clk;
  always @(clk) if (rst_n) count <= count + 1'b1;

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send(tree_cmd_t c);
    @(negedge clk);
    dn_valid = 1'b1; dn = c;
    while (!dn_ready) @(negedge clk);
    @(negedge clk);
    dn_valid = 1'b0;
  endtask

  logic [15:0] setp [61];

  initial begin
    int lat;
    #20ns rst_n = 1'b1;
    for (int i = 0; i < 61; i++) begin
      setp[i] = 16'h6000 + 16'($urandom_range(0, 16'h4000));
      send('{1'b1, 1'b0, 6'(i), setp[i]});
      send('{1'b1, 1'b1, 6'(i), 16'h0001});
    end
    for (int i = 61; i < 64; i++) send('{1'b1, 1'b0, 6'(i), 16'h1234});
    global_en = 1'b1;
    // write latency to cell 37
    @(negedge clk);
    dn_valid = 1'b1; dn = '{1'b1, 1'b0, 6'd37, 16'h9999};
    @(negedge clk);      // accepted at the rising edge just passed
    dn_valid = 1'b0;
    lat = 0;
    while (dut.g_leaf[37].g_cell.u_cell.setp != 16'h9999 && lat < 20) begin @(negedge clk); lat++; end
    check(lat == 3, $sformatf("write reached the cell %0d clocks after acceptance, expected 4", lat + 1));
    setp[37] = 16'h9999;
    // read latency
    @(negedge clk);
    dn_valid = 1'b1; dn = '{1'b0, 1'b0, 6'd50, 16'h0};
    @(negedge clk);
    dn_valid = 1'b0;
    lat = 1;
    while (!up_valid && lat < 20) begin @(negedge clk); lat++; end
    check(up_valid && up_data == setp[50] && lat == 7, $sformatf("read answer after %0d clocks: %h", lat, up_data));
    for (int k = 0; k < 6; k++) begin
      int i;
      i = $urandom_range(0, 60);
      send('{1'b0, 1'b0, 6'(i), 16'h0});
      while (!up_valid) @(negedge clk);
      check(up_data == setp[i], $sformatf("read of cell %0d: %h", i, up_data));
    end
    // duty of every cell over one period
    begin
      int ha[61], hb[61];
      foreach (ha[i]) begin ha[i] = 0; hb[i] = 0; end
      @(posedge clk); #4ns;
      for (int s = 0; s < 2048; s++) begin
        for (int i = 0; i < 61; i++) begin ha[i] += a0[i]; hb[i] += b[i]; end
        #8ns;
      end
      for (int i = 0; i < 61; i++) begin
        int v;
        v = setp[i] >> 4;
        check(ha[i] == (v + 1) / 2 && hb[i] == (setp[i] & 15) * 128,
              $sformatf("cell %0d: A0 %0d B %0d for setpoint %h", i, ha[i], hb[i], setp[i]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
