// End-to-end testbench of actuator_controller with the two other PWM kinds:
// one controller with PWM_SYNC on a 125 MHz slave clock and one with
// PWM_REC_UNIT on a 62.5 MHz slave clock, both listening to the same serial
// line (module id 0x01). Packets configure random setpoints over the full
// 16-bit range, enable all cells and the global enable; then 4096 samples,
// one every 8 ns, of all 305 outputs of each controller are compared with
// duty values worked out here (first 2048 samples), and the PWM period of
// cell 0 is measured from the rising edges of A0 (must be 16.384 us). A
// second pass checks the extreme setpoints 0x0000 and 0xFFFF on cells 0 and 1.
module tb_actuator_controller_kinds;
  import dmac_pkg::*;
  logic clk_200 = 1'b0, clk_100 = 1'b0, clk_sync = 1'b0, clk_rec = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic lvds_rxd = 1'b1;
  logic txd_s, txd_r, csum_s, csum_r;
  logic [60:0] a0_s, a1_s, c0_s, c1_s, b_s;
  logic [60:0] a0_r, a1_r, c0_r, c1_r, b_r;
  int checks = 0, failures = 0;

  actuator_controller #(.PWM_KIND(PWM_SYNC)) dut_sync (
    .clk_200, .clk_100, .clk_slave(clk_sync), .rst_n, .lvds_rxd, .lvds_txd(txd_s), .lvds_txen(), .csum_err(csum_s),
    .pwm_a0(a0_s), .pwm_a1(a1_s), .pwm_c0(c0_s), .pwm_c1(c1_s), .pwm_b(b_s));

  actuator_controller #(.PWM_KIND(PWM_REC_UNIT)) dut_rec (
    .clk_200, .clk_100, .clk_slave(clk_rec), .rst_n, .lvds_rxd, .lvds_txd(txd_r), .lvds_txen(), .csum_err(csum_r),
    .pwm_a0(a0_r), .pwm_a1(a1_r), .pwm_c0(c0_r), .pwm_c1(c1_r), .pwm_b(b_r));

  always #2.5ns clk_200  = ~clk_200;
  always #5ns   clk_100  = ~clk_100;
  always #4ns   clk_sync = ~clk_sync;   // 125 MHz, rising edges at 4 + 8k ns
  always #8ns   clk_rec  = ~clk_rec;    // 62.5 MHz, edges at 8k ns

  initial begin : watchdog
    #3ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_frame(logic [15:0] w);
    lvds_rxd = 1'b0; #25ns;
    for (int i = 0; i < 16; i++) begin lvds_rxd = w[i]; #25ns; end
    lvds_rxd = 1'b1; #25ns;
  endtask
  task automatic send_packet(logic [15:0] words[$]);
    logic [15:0] sum;
    sum = '0;
    foreach (words[i]) begin send_frame(words[i]); sum += words[i]; end
    send_frame(sum);
    #500ns;
  endtask

  logic [15:0] setp [61];

  // Samples are taken 2 ns after each edge of clk_rec: away from every edge
  // of both slave clocks and from the glitches of the ripple dividers.
  task automatic measure(string what);
    int ha_s[61], hc_s[61], hb_s[61], ha_r[61], hc_r[61], hb_r[61];
    int leg_s, leg_r, rise_s[$], rise_r[$];
    bit prev_s, prev_r;
    foreach (ha_s[i]) begin
      ha_s[i] = 0; hc_s[i] = 0; hb_s[i] = 0; ha_r[i] = 0; hc_r[i] = 0; hb_r[i] = 0;
    end
    leg_s = 0; leg_r = 0;
    @(posedge clk_rec); #2ns;
    prev_s = a0_s[0]; prev_r = a0_r[0];
    for (int s = 0; s < 4096; s++) begin
      if (s < 2048) begin
        for (int i = 0; i < 61; i++) begin
          ha_s[i] += a0_s[i]; hc_s[i] += c0_s[i]; hb_s[i] += b_s[i];
          ha_r[i] += a0_r[i]; hc_r[i] += c0_r[i]; hb_r[i] += b_r[i];
        end
      end
      if ((a0_s ^ a1_s) != '1 || (c0_s ^ c1_s) != '1) leg_s++;
      if ((a0_r ^ a1_r) != '1 || (c0_r ^ c1_r) != '1) leg_r++;
      if (a0_s[0] && !prev_s) rise_s.push_back(s);
      if (a0_r[0] && !prev_r) rise_r.push_back(s);
      prev_s = a0_s[0]; prev_r = a0_r[0];
      #8ns;
    end
    for (int i = 0; i < 61; i++) begin
      int v, da, dc, db;
      v  = int'(setp[i][15:4]);
      da = (v == 4095) ? 2047 : (v + 1) / 2;
      dc = 2047 - v / 2;
      db = int'(setp[i][3:0]) * 128;
      check(ha_s[i] == da && hc_s[i] == dc && hb_s[i] == db,
            $sformatf("%s: PWM_SYNC cell %0d setpoint %h: A0 %0d/%0d C0 %0d/%0d B %0d/%0d",
                      what, i, setp[i], ha_s[i], da, hc_s[i], dc, hb_s[i], db));
      check(ha_r[i] == da && hc_r[i] == dc && hb_r[i] == db,
            $sformatf("%s: PWM_REC_UNIT cell %0d setpoint %h: A0 %0d/%0d C0 %0d/%0d B %0d/%0d",
                      what, i, setp[i], ha_r[i], da, hc_r[i], dc, hb_r[i], db));
    end
    check(leg_s == 0 && leg_r == 0, $sformatf("%s: A1/C1 not the inverse of A0/C0", what));
    if (setp[0][15:4] > 1 && setp[0][15:4] < 4094) begin
      check(rise_s.size() >= 1 && rise_r.size() >= 1 &&
            (rise_s.size() < 2 || rise_s[1] - rise_s[0] == 2048) &&
            (rise_r.size() < 2 || rise_r[1] - rise_r[0] == 2048) &&
            rise_s.size() <= 2 && rise_r.size() <= 2,
            $sformatf("%s: A0 period, rising edges at %p and %p", what, rise_s, rise_r));
      if (rise_s.size() == 2 && rise_r.size() == 2)
        $display("%s: PWM period %0d ns (PWM_SYNC) and %0d ns (PWM_REC_UNIT)",
                 what, (rise_s[1] - rise_s[0]) * 8, (rise_r[1] - rise_r[0]) * 8);
    end
  endtask

  initial begin
    logic [15:0] words[$];
    #42ns rst_n = 1'b1;
    #1us;
    words = '{16'h0102, 16'h0000, 16'd61};
    for (int i = 0; i < 61; i++) begin
      setp[i] = 16'($urandom);
      words.push_back(setp[i]);
    end
    setp[0] = 16'h8000 + 16'($urandom_range(0, 16'h0FFF));   // cell 0: a duty far from the ends
    words[3] = setp[0];
    send_packet(words);
    words = '{16'h0102, 16'h0040, 16'd61};
    for (int i = 0; i < 61; i++) words.push_back(16'h0001);
    send_packet(words);
    send_packet('{16'h0101, 16'h0080, 16'h0001});
    #1us;
    measure("random setpoints");

    send_packet('{16'h0101, 16'h0000, 16'h0000});
    send_packet('{16'h0101, 16'h0001, 16'hFFFF});
    setp[0] = 16'h0000;
    setp[1] = 16'hFFFF;
    #1us;
    measure("extreme setpoints");

    check(!csum_s && !csum_r, "checksum error flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
