// Testbench of dmac_cell in all three PWM kinds side by side:
//   PWM_SYNC at 125 MHz with a binary count kept by the testbench,
//   PWM_REC_COUNTER at 62.5 MHz with a count that the testbench advances on
//   both clock edges, and PWM_REC_UNIT at 62.5 MHz (own dividers).
// For each setpoint the outputs are sampled every 4 ns-offset 8 ns step over
// one whole period (2048 samples) and the high times of A0, C0, B, A1 and C1
// are compared with duty values worked out here from the setpoint:
// A0 = min(ceil(v/2),2047), C0 = 2047-floor(v/2), B = low nibble*128, A1 and
// C1 the rest of the period, v = setpoint[15:4]. A leg must never have both
// switches on. With the cell or global enable off all outputs must be low.
// Setpoint and control registers are read back.
module tb_dmac_cell;
  import dmac_pkg::*;
  logic clk_s = 1'b0, clk_r = 1'b0, rst_n = 1'b1, global_en = 1'b0;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic v_s = 1'b0, v_r = 1'b0;
  tree_cmd_t cmd_s = '0, cmd_r = '0;
  logic [10:0] cnt_s = '0, cnt_r = '0;
  logic [2:0] a0, a1, c0, c1, b, upv, rdy;
  logic [15:0] upd [3];
  int checks = 0, failures = 0;

  dmac_cell #(.PWM_KIND(PWM_SYNC)) u_sync (.clk(clk_s), .rst_n, .cmd_valid(v_s), .cmd_ready(rdy[0]), .cmd(cmd_s),
    .up_valid(upv[0]), .up_data(upd[0]), .count(cnt_s), .global_en,
    .a0(a0[0]), .a1(a1[0]), .c0(c0[0]), .c1(c1[0]), .b(b[0]));
  dmac_cell #(.PWM_KIND(PWM_REC_COUNTER)) u_rc (.clk(clk_r), .rst_n, .cmd_valid(v_r), .cmd_ready(rdy[1]), .cmd(cmd_r),
    .up_valid(upv[1]), .up_data(upd[1]), .count(cnt_r), .global_en,
    .a0(a0[1]), .a1(a1[1]), .c0(c0[1]), .c1(c1[1]), .b(b[1]));
  dmac_cell #(.PWM_KIND(PWM_REC_UNIT)) u_ru (.clk(clk_r), .rst_n, .cmd_valid(v_r), .cmd_ready(rdy[2]), .cmd(cmd_r),
    .up_valid(upv[2]), .up_data(upd[2]), .count(11'd0), .global_en,
    .a0(a0[2]), .a1(a1[2]), .c0(c0[2]), .c1(c1[2]), .b(b[2]));

  always #4ns clk_s = ~clk_s;
  always #8ns clk_r = ~clk_r;
  always @(posedge clk_s) if (rst_n) cnt_s <= cnt_s + 1'b1;
  always @(clk_r)         if (rst_n) cnt_r <= cnt_r + 1'b1;

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

  // one write or read to all three cells
  task automatic access(logic we, logic sel, logic [15:0] d);
    fork
      begin @(negedge clk_s); v_s = 1'b1; cmd_s = '{we, sel, 6'd0, d}; @(negedge clk_s); v_s = 1'b0; end
      begin @(negedge clk_r); v_r = 1'b1; cmd_r = '{we, sel, 6'd0, d}; @(negedge clk_r); v_r = 1'b0; end
    join
  endtask

  // sample one period and compare high times
  task automatic measure(logic [15:0] setp, bit on);
    int ha0[3], ha1[3], hc0[3], hc1[3], hb[3], overlap;
    int v, da, dc, db;
    v  = setp >> 4;
    da = (v == 4095) ? 2047 : (v + 1) / 2;
    dc = 2047 - v / 2;
    db = (setp & 15) * 128;
    if (!on) begin da = 0; dc = 0; db = 0; end
    overlap = 0;
    for (int k = 0; k < 3; k++) begin ha0[k] = 0; ha1[k] = 0; hc0[k] = 0; hc1[k] = 0; hb[k] = 0; end
    @(posedge clk_r); #4ns;
    for (int s = 0; s < 2048; s++) begin
      for (int k = 0; k < 3; k++) begin
        ha0[k] += a0[k]; ha1[k] += a1[k]; hc0[k] += c0[k]; hc1[k] += c1[k]; hb[k] += b[k];
        if ((a0[k] && a1[k]) || (c0[k] && c1[k])) overlap++;
      end
      #8ns;
    end
    for (int k = 0; k < 3; k++) begin
      check(ha0[k] == da && hc0[k] == dc && hb[k] == db,
            $sformatf("kind %0d setp %h: A0 %0d/%0d C0 %0d/%0d B %0d/%0d", k, setp, ha0[k], da, hc0[k], dc, hb[k], db));
      check(ha1[k] == (on ? 2048 - da : 0) && hc1[k] == (on ? 2048 - dc : 0),
            $sformatf("kind %0d setp %h: A1 %0d C1 %0d", k, setp, ha1[k], hc1[k]));
    end
    check(overlap == 0, "both switches of a leg on");
  endtask

  initial begin
    logic [15:0] vals[$] = '{16'h8000, 16'h6000, 16'hA000, 16'h8001, 16'h7FFF, 16'h0000, 16'hFFFF, 16'h1238};
    repeat (3) vals.push_back(16'($urandom));
    #20ns rst_n = 1'b1;
    #100ns;
    measure(16'h8000, 0);                    // everything off after reset
    access(1'b1, 1'b1, 16'h0001);            // cell enable, global still off
    measure(16'h8000, 0);
    global_en = 1'b1;
    foreach (vals[i]) begin
      access(1'b1, 1'b0, vals[i]);
      measure(vals[i], 1);
    end
    // read back
    fork
      begin @(negedge clk_s); v_s = 1'b1; cmd_s = '{1'b0, 1'b0, 6'd0, 16'h0}; @(negedge clk_s); v_s = 1'b0;
            check(upv[0] && upd[0] == vals[vals.size()-1], "sync cell setpoint read"); end
      begin @(negedge clk_r); v_r = 1'b1; cmd_r = '{1'b0, 1'b1, 6'd0, 16'h0}; @(negedge clk_r); v_r = 1'b0;
            check(upv[1] && upv[2] && upd[1] == 16'h1 && upd[2] == 16'h1, "control read"); end
    join
    check(rdy == 3'b111, "cells not ready");
    access(1'b1, 1'b1, 16'h0000);            // cell disable
    measure(16'h0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
