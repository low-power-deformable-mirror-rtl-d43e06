// End-to-end testbench of actuator_controller with all parameters at their
// defaults: 61 cells, recursive-counter PWM, module id 0x01, with 200 MHz,
// 100 MHz and 62.5 MHz clocks. Everything goes through the 40 Mbit/s serial
// line, as packets separated by pauses:
//   burst writes of all 61 setpoints and all 61 enables, global enable on;
//   then one PWM period of all 305 outputs is checked against duty values
//   worked out here from the setpoints;
//   a single write whose latency, from the stop bit of its data word to the
//   cell register, must stay below 2 us; reads of a cell and of the cell-count
//   register, whose reply packets are decoded from the transmit line (the
//   line driver enable must be high exactly while they are sent);
//   a packet for another module (ignored), a broadcast packet (obeyed), a
//   packet with a bad checksum (obeyed and flagged), a write to a leaf
//   without a cell (dropped), and global disable (all outputs low).
// Each mechanism is counted and a mechanism that never occurs is a failure.
module tb_actuator_controller;
  import dmac_pkg::*;
  logic clk_200 = 1'b0, clk_100 = 1'b0, clk_slave = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic lvds_rxd = 1'b1, lvds_txd, lvds_txen, csum_err;
  logic [60:0] pwm_a0, pwm_a1, pwm_c0, pwm_c1, pwm_b;
  int checks = 0, failures = 0;

  actuator_controller dut (.clk_200, .clk_100, .clk_slave, .rst_n, .lvds_rxd, .lvds_txd, .lvds_txen, .csum_err,
    .pwm_a0, .pwm_a1, .pwm_c0, .pwm_c1, .pwm_b);

  always #2.5ns clk_200   = ~clk_200;
  always #5ns   clk_100   = ~clk_100;
  always #8ns   clk_slave = ~clk_slave;   // 62.5 MHz for the recursive counter

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

  // ---------------- serial line ----------------
  realtime last_stop;
  task automatic send_frame(logic [15:0] w);
    lvds_rxd = 1'b0; #25ns;
    for (int i = 0; i < 16; i++) begin lvds_rxd = w[i]; #25ns; end
    lvds_rxd = 1'b1; #25ns;
    last_stop = $realtime;
  endtask
  task automatic send_packet(logic [15:0] words[$], bit bad = 0);
    logic [15:0] sum = '0;
    foreach (words[i]) begin send_frame(words[i]); sum += words[i]; end
    send_frame(bad ? sum ^ 16'h0100 : sum);
    #500ns;   // pause of 20 bit times
  endtask

  logic [15:0] reply[$];
  int txen_low = 0, txen_high = 0;   // reply bits sampled with the driver off / on
  initial begin
    wait (rst_n);
    forever begin
      logic [15:0] w;
      @(negedge lvds_txd);
      #37.5ns;
      for (int i = 0; i < 16; i++) begin
        w[i] = lvds_txd;
        if (lvds_txen) txen_high++; else txen_low++;
        #25ns;
      end
      reply.push_back(w);
    end
  end

  // ---------------- mechanism counters ----------------
  int n_pause = 0, n_cmd = 0, n_skip = 0, n_csum = 0, n_missing = 0, n_reply_pkts = 0;
  always @(negedge clk_100) begin
    if (dut.u_master.p_pause_valid && dut.u_master.p_pause_ready) n_pause++;
    if (dut.u_master.u_packet.state == dut.u_master.u_packet.S_HEADER &&
        dut.u_master.p_rx_valid && dut.u_master.p_rx_ready &&
        dut.u_master.p_rx_data[15:8] != 8'h01 && dut.u_master.p_rx_data[15:8] != 8'hFF) n_skip++;
    if (csum_err) n_csum++;
  end
  always @(negedge clk_slave) begin
    if (dut.s_cmd_valid && dut.s_cmd_ready) begin
      n_cmd++;
      if (dut.s_cmd.addr[7] == 1'b0 && int'(dut.s_cmd.addr[5:0]) >= 61) n_missing++;
    end
  end

  // ---------------- PWM measurement ----------------
  logic [15:0] setp [61];
  logic [60:0] enabled;

  task automatic measure_all(string what);
    int ha[61], ha1[61], hc[61], hc1[61], hb[61];
    foreach (ha[i]) begin ha[i] = 0; ha1[i] = 0; hc[i] = 0; hc1[i] = 0; hb[i] = 0; end
    @(posedge clk_slave); #4ns;
    for (int s = 0; s < 2048; s++) begin
      for (int i = 0; i < 61; i++) begin
        ha[i] += pwm_a0[i]; ha1[i] += pwm_a1[i]; hc[i] += pwm_c0[i]; hc1[i] += pwm_c1[i]; hb[i] += pwm_b[i];
      end
      #8ns;
    end
    for (int i = 0; i < 61; i++) begin
      int v, da, dc, db;
      v  = int'(setp[i][15:4]);
      da = (v == 4095) ? 2047 : (v + 1) / 2;
      dc = 2047 - v / 2;
      db = int'(setp[i][3:0]) * 128;
      if (!enabled[i]) begin
        check(ha[i] + ha1[i] + hc[i] + hc1[i] + hb[i] == 0, $sformatf("%s: disabled cell %0d active", what, i));
      end else begin
        check(ha[i] == da && hc[i] == dc && hb[i] == db && ha1[i] == 2048 - da && hc1[i] == 2048 - dc,
              $sformatf("%s: cell %0d setpoint %h: A0 %0d/%0d C0 %0d/%0d B %0d/%0d A1 %0d C1 %0d",
                        what, i, setp[i], ha[i], da, hc[i], dc, hb[i], db, ha1[i], hc1[i]));
      end
    end
  endtask

  initial begin
    logic [15:0] words[$];
    realtime t_stop, t_set;
    #42ns rst_n = 1'b1;
    #1us;
    // setpoints of all cells, in one burst
    words = '{16'h0102, 16'h0000, 16'd61};
    for (int i = 0; i < 61; i++) begin
      setp[i] = 16'h6000 + 16'($urandom_range(0, 16'h4000));
      words.push_back(setp[i]);
    end
    send_packet(words);
    // enables of all cells, in one burst
    words = '{16'h0102, 16'h0040, 16'd61};
    for (int i = 0; i < 61; i++) words.push_back(16'h0001);
    send_packet(words);
    enabled = '1;
    send_packet('{16'h0101, 16'h0080, 16'h0001});          // global enable
    #1us;
    measure_all("after configuration");

    // single write, latency from the stop bit of the data word
    fork
      send_packet('{16'h0101, 16'h000A, 16'h7123});
      begin
        wait (dut.u_slave.u_tree.g_leaf[10].g_cell.u_cell.setp == 16'h7123);
        t_set = $realtime;
      end
    join
    t_stop = last_stop - 450ns;   // stop bit of the data word; the checksum word followed
    check(t_set - t_stop < 2us, $sformatf("setpoint latency %0t", t_set - t_stop));
    $display("setpoint latency %0t", t_set - t_stop);
    setp[10] = 16'h7123;

    // read back cell 10 and the cell count
    reply.delete();
    send_packet('{16'h0103, 16'h000A});
    #2us;
    check(reply.size() == 3 && reply[0] == 16'h0183 && reply[1] == 16'h7123 && reply[2] == 16'h0183 + 16'h7123,
          "reply to a setpoint read");
    if (reply.size() == 3) n_reply_pkts++;
    reply.delete();
    send_packet('{16'h0103, 16'h0081});
    #2us;
    check(reply.size() == 3 && reply[1] == 16'd61, "reply to the cell-count read");
    if (reply.size() == 3) n_reply_pkts++;

    // another module's packet, broadcast, bad checksum, missing cell
    send_packet('{16'h0201, 16'h000B, 16'h9999});
    send_packet('{16'hFF01, 16'h000C, 16'h9ABC});
    setp[12] = 16'h9ABC;
    send_packet('{16'h0101, 16'h000D, 16'h6543}, 1);
    setp[13] = 16'h6543;
    send_packet('{16'h0101, 16'h003E, 16'h1111});
    send_packet('{16'h0101, 16'h0045, 16'h0000});          // disable cell 5
    enabled[5] = 1'b0;
    #1us;
    measure_all("after the second set of packets");

    send_packet('{16'h0101, 16'h0080, 16'h0000});          // global disable
    #200ns;
    check((pwm_a0 | pwm_a1 | pwm_c0 | pwm_c1 | pwm_b) == '0, "outputs active with the global enable off");

    $display("mechanisms: pauses %0d, slave commands %0d, skipped packets %0d, checksum errors %0d, missing-cell writes %0d, read replies %0d",
             n_pause, n_cmd, n_skip, n_csum, n_missing, n_reply_pkts);
    check(n_pause >= 12, "pauses not detected");
    check(n_cmd == 61 + 61 + 1 + 1 + 2 + 1 + 1 + 1 + 1 + 1, $sformatf("%0d slave commands", n_cmd));
    check(n_skip == 1, "foreign packet not skipped");
    check(n_csum == 1, "checksum error not flagged once");
    check(n_missing == 1, "write to a missing cell did not occur");
    check(n_reply_pkts == 2, "read replies missing");
    check(txen_low == 0 && txen_high == 6 * 16 && !lvds_txen,
          $sformatf("line driver enable: low for %0d reply bits, high for %0d", txen_low, txen_high));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
