// Testbench of dmac_async_master: packets are sent on the serial line at
// 40 Mbit/s (transceiver at 200 MHz, packet handler at 100 MHz). A slave
// model takes the commands and answers reads with ~addr. Checked: a write
// and a burst write arrive as commands, in order; each data word leaves the
// master less than 0.5 us after its stop bit; a read is answered on txd by the
// three-word reply packet, with txen high while it is sent and low
// otherwise; a bad checksum is flagged.
module tb_dmac_async_master;
  import dmac_pkg::*;
  logic clk_200 = 1'b0, clk_100 = 1'b0, rst_n = 1'b1;
  initial #1ns rst_n = 1'b0;  // falling edge starts the asynchronous reset
  logic rxd = 1'b1, txd, txen;
  logic cmd_valid, cmd_ready = 1'b1, rsp_valid = 1'b0, rsp_ready;
  slave_cmd_t cmd;
  logic [15:0] rsp_data = '0;
  logic csum_err;
  int checks = 0, failures = 0;

  dmac_async_master #(.MODULE_ID(8'h01)) dut (
    .clk_200, .rst_200_n(rst_n), .clk_100, .rst_100_n(rst_n),
    .rxd, .txd, .txen, .cmd_valid, .cmd_ready, .cmd,
    .rsp_valid, .rsp_ready, .rsp_data, .csum_err);

  always #2.5ns clk_200 = ~clk_200;
  always #5ns   clk_100 = ~clk_100;

  initial begin : watchdog
    #300us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  realtime last_stop;   // end of the last stop bit sent
  task automatic send_frame(logic [15:0] w);
    rxd = 1'b0; #25ns;
    for (int i = 0; i < 16; i++) begin rxd = w[i]; #25ns; end
    rxd = 1'b1; #25ns;
    last_stop = $realtime;
  endtask
  task automatic send_packet(logic [15:0] words[$], bit bad = 0);
    logic [15:0] sum = '0;
    foreach (words[i]) begin send_frame(words[i]); sum += words[i]; end
    send_frame(bad ? sum + 1 : sum);
    #600ns;   // pause
  endtask

  // slave model at 100 MHz
  slave_cmd_t cmds[$];
  realtime    lat_max = 0;
  int         csum_errs = 0;
  bit rsp_taken = 0;
  always @(negedge clk_100) begin
    // a transfer seen on one falling edge happens at the next rising edge
    if (rsp_taken) begin rsp_valid = 1'b0; rsp_taken = 0; end
    if (rsp_valid && rsp_ready) rsp_taken = 1;
    if (cmd_valid && cmd_ready) begin
      cmds.push_back(cmd);
      if (cmd.we && $realtime - last_stop > lat_max) lat_max = $realtime - last_stop;
      if (!cmd.we) begin rsp_valid = 1'b1; rsp_data = ~{8'h00, cmd.addr}; end
    end
    if (csum_err) csum_errs++;
  end

  // serial reply decoder
  logic [15:0] txw[$];
  int txen_low = 0, txen_high = 0;   // reply bits sampled with the driver off / on
  initial begin
    wait (rst_n);
    forever begin
      logic [15:0] w;
      @(negedge txd);
      #37.5ns;
      for (int i = 0; i < 16; i++) begin
        w[i] = txd;
        if (txen) txen_high++; else txen_low++;
        #25ns;
      end
      txw.push_back(w);
    end
  end

  initial begin
    #42ns rst_n = 1'b1;
    #1us;
    send_packet('{16'h0101, 16'h0003, 16'h9000});
    send_packet('{16'h0102, 16'h0040, 16'd3, 16'h0001, 16'h0000, 16'h0001});
    check(cmds.size() == 4, $sformatf("%0d commands", cmds.size()));
    if (cmds.size() == 4) begin
      check(cmds[0] == '{1'b1, 8'h03, 16'h9000}, "write");
      check(cmds[1] == '{1'b1, 8'h40, 16'h0001}, "burst 0");
      check(cmds[2] == '{1'b1, 8'h41, 16'h0000}, "burst 1");
      check(cmds[3] == '{1'b1, 8'h42, 16'h0001}, "burst 2");
    end
    check(lat_max < 500ns, $sformatf("command latency %0t", lat_max));
    cmds.delete();
    send_packet('{16'h0103, 16'h0081});
    #2us;
    check(cmds.size() == 1 && cmds[0].we == 1'b0 && cmds[0].addr == 8'h81, "read command");
    check(txw.size() == 3, $sformatf("%0d reply words", txw.size()));
    if (txw.size() == 3)
      check(txw[0] == 16'h0183 && txw[1] == 16'hFF7E && txw[2] == 16'h0183 + 16'hFF7E, "reply packet");
    check(csum_errs == 0, "false checksum error");
    send_packet('{16'h0101, 16'h0003, 16'h9001}, 1);
    check(csum_errs == 1, "checksum error not flagged");
    checks++;
    if (txen_low != 0 || txen_high == 0 || txen) begin
      failures++; $display("FAIL: txen low for %0d reply bits, high for %0d, now %b", txen_low, txen_high, txen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
